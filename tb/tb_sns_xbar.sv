// tb_sns_xbar: checks the crossbar switch. Five inputs send numbered
// flits under a random permutation with random output back pressure; every
// output must receive exactly its selected input's flits in order, none
// lost or duplicated, and a flit must appear one cycle after it is taken.
// An unrouted input must never be ready.
module tb_sns_xbar;
  localparam int N = 5, W = 16, SEL_W = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0][SEL_W-1:0] sel;
  logic [N-1:0] en, in_valid, in_ready, out_valid, out_ready;
  logic [N-1:0][W-1:0] in_data, out_data;

  sns_xbar #(.N(N), .W(W)) dut (.*);

  int sent [N], recv [N];
  int perm [N];
  logic [N-1:0] took_prev;
  logic [N-1:0][W-1:0] data_prev;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < N; o++) begin
      if (out_valid[o] && out_ready[o]) begin
        checks++;
        if (!en[o] || out_data[o] !== W'({perm[o][3:0], 12'(recv[o])})) begin
          failures++; $display("FAIL out %0d got %h", o, out_data[o]);
        end
        recv[o]++;
      end
    end
    for (int i = 0; i < N; i++) if (in_valid[i] && in_ready[i]) sent[i]++;
  end

  // one-cycle latency: a flit taken from input perm[o] is at output o next cycle
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < N; o++) if (en[o] && took_prev[perm[o]]) begin
      checks++;
      if (!out_valid[o] || out_data[o] !== data_prev[perm[o]]) begin
        failures++; $display("FAIL latency at out %0d", o);
      end
    end
    took_prev <= in_valid & in_ready;
    data_prev <= in_data;
  end

  always_comb for (int i = 0; i < N; i++) in_data[i] = W'({4'(i), 12'(sent[i])});

  initial begin
    for (int i = 0; i < N; i++) begin sent[i] = 0; recv[i] = 0; end
    took_prev = '0; data_prev = '0;
    // random permutation; output 4 disabled
    for (int i = 0; i < N; i++) perm[i] = i;
    perm.shuffle();
    for (int o = 0; o < N; o++) sel[o] = SEL_W'(perm[o]);
    en = 5'b01111;
    in_valid = '0; out_ready = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2000) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) in_valid[i] = ($urandom_range(0, 3) != 0);
      for (int o = 0; o < N; o++) out_ready[o] = ($urandom_range(0, 3) != 0);
      checks++;
      if (in_ready[perm[4]]) begin failures++; $display("FAIL unrouted input ready"); end
    end
    @(negedge clk);
    in_valid = '0; out_ready = '1;
    repeat (3) @(negedge clk);
    for (int o = 0; o < 4; o++) begin
      checks++;
      if (recv[o] != sent[perm[o]] || sent[perm[o]] < 100) begin
        failures++; $display("FAIL out %0d recv %0d sent %0d", o, recv[o], sent[perm[o]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
