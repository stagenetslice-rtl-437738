// tb_sns_link_tx: checks the double-buffered serialising output latch.
// Messages of 150 bits go out as 64-bit flits, most significant first;
// each message is given a random flit count 1..3 and the test compares
// every flit and the last marker with slices computed here. The receiver
// withdraws ready at random; with ready held low the latch must accept
// exactly two messages (double buffering) and then refuse.
module tb_sns_link_tx;
  localparam int MSG_W = 150, CH_W = 64, NF = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic push_valid = 0, push_ready, flit_valid, flit_last;
  logic flit_ready = 0;
  logic [MSG_W-1:0] push_msg = '0;
  logic [1:0] push_nflits = 2'd1;
  logic [CH_W-1:0] flit_data;

  sns_link_tx #(.MSG_W(MSG_W), .CH_W(CH_W)) dut (.*);

  logic [MSG_W-1:0] q_msg [$];
  int               q_nf [$];
  int               got = 0, fi = 0;
  bit               rand_ready = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver / checker
  always @(posedge clk) if (rst_n) begin
    if (flit_valid && flit_ready) begin
      logic [NF*CH_W-1:0] padded;
      padded = {q_msg[0], {(NF*CH_W-MSG_W){1'b0}}};
      checks++;
      if (flit_data !== padded[NF*CH_W-1-fi*CH_W -: CH_W] || flit_last !== (fi == q_nf[0] - 1)) begin
        failures++;
        $display("FAIL msg %0d flit %0d", got, fi);
      end
      if (flit_last) begin
        fi = 0; got++;
        void'(q_msg.pop_front()); void'(q_nf.pop_front());
      end else fi++;
    end
    if (rand_ready) flit_ready <= ($urandom_range(0, 2) != 0);
  end

  task automatic push(logic [MSG_W-1:0] m, int nf);
    push_msg = m; push_nflits = 2'(nf); push_valid = 1;
    do @(posedge clk); while (!push_ready);
    q_msg.push_back(m); q_nf.push_back(nf);
    #1 push_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // double buffering: two accepted, third refused while receiver stalls
    push({$urandom, $urandom, $urandom, $urandom, $urandom}, 3);
    push({$urandom, $urandom, $urandom, $urandom, $urandom}, 2);
    @(negedge clk);
    checks++;
    if (push_ready) begin failures++; $display("FAIL accepted a third message"); end
    rand_ready = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      push({$urandom, $urandom, $urandom, $urandom, $urandom}, $urandom_range(1, 3));
    end
    wait (q_msg.size() == 0);
    checks++;
    if (got != 202) begin failures++; $display("FAIL got %0d messages", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
