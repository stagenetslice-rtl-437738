// tb_sns_regfile: random writes and four-port reads against a model
// array; register 0 must always read zero and reset must clear all.
module tb_sns_regfile;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0][5:0] raddr;
  logic [3:0][31:0] rdata;
  logic we = 0;
  logic [5:0] waddr = 0;
  logic [31:0] wdata = 0;

  sns_regfile #(.NREGS(64), .XLEN(32), .NRD(4)) dut (.*);

  logic [31:0] model [64];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 64; r++) model[r] = 0;
    raddr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (we && waddr != 0) model[waddr] = wdata;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rdata[p] !== model[raddr[p]]) begin
          failures++; $display("FAIL r%0d = %h exp %h", raddr[p], rdata[p], model[raddr[p]]);
        end
      end
      we = $urandom_range(0, 1); waddr = 6'($urandom); wdata = $urandom;
      for (int p = 0; p < 4; p++) raddr[p] = 6'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
