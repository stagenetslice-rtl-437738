// tb_sns_scoreboard: checks the issue rule. Registers marked pending by an
// issued macro-op are usable from the bypass cache while their write id
// is within the configured depth of the next id, and block issue beyond
// it; a writeback with the latest id frees the register, one with an
// older id does not; a wipe frees everything; r0 is always usable.
module tb_sns_scoreboard;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] byp_depth = 8'd6, next_wid = 0, set_base_wid = 0, clr_wid = 0;
  logic [3:0][5:0] q_reg = '0, set_reg = '0;
  logic [3:0] q_use = '0, rf_ok, byp_ok;
  logic ok, wipe = 0, set = 0, clr = 0;
  logic [2:0] set_n = 0;
  logic [5:0] clr_reg = 0;

  sns_scoreboard #(.NREGS(64), .WID_W(8), .NQ(4), .NS(4)) dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int g, int e);
    checks++;
    if (g != e) begin failures++; $display("FAIL %s got %0d exp %0d", what, g, e); end
  endtask

  task automatic do_set(int n, int r0, int r1, int r2, int r3);
    @(negedge clk);
    set = 1; set_n = 3'(n); set_reg = {6'(r3), 6'(r2), 6'(r1), 6'(r0)}; set_base_wid = next_wid;
    @(negedge clk);
    set = 0; next_wid = next_wid + 8'(n);
  endtask

  task automatic query(int r);
    q_reg = {4{6'(r)}}; q_use = 4'b0001; #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    query(5); chk("reset valid", rf_ok[0], 1); chk("reset ok", ok, 1);
    do_set(4, 5, 6, 7, 8);        // ids 0..3
    query(5); chk("r5 pending", rf_ok[0], 0); chk("r5 in bypass", byp_ok[0], 1); chk("ok", ok, 1);
    do_set(2, 9, 10, 0, 0);       // ids 4,5 ; next 6
    query(5); chk("r5 dist 6", byp_ok[0], 1);
    do_set(1, 11, 0, 0, 0);       // id 6 ; next 7: r5 is 7 back
    query(5); chk("r5 beyond bypass", byp_ok[0], 0); chk("stall", ok, 0);
    query(8); chk("r8 within", byp_ok[0], 1);
    query(0); chk("r0", ok, 1);
    // writeback of r5 with its id frees it
    @(negedge clk) begin clr = 1; clr_reg = 5; clr_wid = 0; end
    @(negedge clk) clr = 0;
    query(5); chk("r5 freed", rf_ok[0], 1);
    // r6 rewritten (id 7); old writeback (id 1) must not free it
    do_set(1, 6, 0, 0, 0);
    @(negedge clk) begin clr = 1; clr_reg = 6; clr_wid = 1; end
    @(negedge clk) clr = 0;
    query(6); chk("r6 still pending", rf_ok[0], 0);
    @(negedge clk) begin clr = 1; clr_reg = 6; clr_wid = 7; end
    @(negedge clk) clr = 0;
    query(6); chk("r6 freed", rf_ok[0], 1);
    // smaller configured depth
    byp_depth = 8'd2;
    query(9); chk("r9 beyond depth 2", ok, 0);
    @(negedge clk) wipe = 1;
    @(negedge clk) wipe = 0;
    query(9); chk("wiped", rf_ok[0], 1);
    query(11); chk("wiped 11", rf_ok[0], 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
