// tb_sns_bypass_cache: random inserts of 0..4 (register, value) pairs per
// cycle into a depth-6 bypass cache, compared with a queue model kept
// here: a lookup hits exactly when the register is among the last six
// inserted destinations and then returns the newest value.
module tb_sns_bypass_cache;
  localparam int D = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, hits = 0;

  logic ins = 0;
  logic [2:0] ins_n = 0;
  logic [3:0][5:0] ins_reg, q_reg;
  logic [3:0][31:0] ins_val, q_val;
  logic [3:0] q_hit;

  sns_bypass_cache #(.DEPTH(D), .AW(6), .XLEN(32), .NINS(4), .NQ(4)) dut (.*);

  int          mreg [$];
  logic [31:0] mval [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ins_reg = '0; ins_val = '0; q_reg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (ins) for (int j = 0; j < int'(ins_n); j++) begin
        mreg.push_back(ins_reg[j]); mval.push_back(ins_val[j]);
        if (mreg.size() > D) begin void'(mreg.pop_front()); void'(mval.pop_front()); end
      end
      for (int q = 0; q < 4; q++) begin
        bit eh; logic [31:0] ev;
        eh = 0; ev = 0;
        for (int e = 0; e < mreg.size(); e++) if (mreg[e] == q_reg[q]) begin eh = 1; ev = mval[e]; end
        checks++;
        if (q_hit[q] !== eh || (eh && q_val[q] !== ev)) begin
          failures++; $display("FAIL lookup r%0d hit %0d exp %0d", q_reg[q], q_hit[q], eh);
        end
        if (eh) hits++;
      end
      ins = $urandom_range(0, 1); ins_n = 3'($urandom_range(0, 4));
      for (int j = 0; j < 4; j++) begin
        ins_reg[j] = 6'($urandom_range(0, 15)); ins_val[j] = $urandom;
        q_reg[j] = 6'($urandom_range(0, 15));
      end
    end
    checks++;
    if (hits < 100) begin failures++; $display("FAIL too few hits %0d", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
