// tb_sns_gshare: checks the gshare predictor with an 8-bit history. After
// the reset sweep every counter is weakly not-taken. Training one branch
// taken twice makes it predict taken at the same index; the global
// history must then hold the resolved outcomes, so the index of a pc is
// pc-bits XOR history (compared with a value computed here), and
// saturating counters need two not-taken outcomes to flip back.
module tb_sns_gshare;
  localparam int H = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] pred_pc = 0;
  logic [H-1:0] pred_idx, upd_idx = 0;
  logic pred_taken, upd_valid = 0, upd_taken = 0, init_busy;

  sns_gshare #(.HIST_W(H)) dut (.*);

  logic [H-1:0] hist = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic upd(logic [H-1:0] idx, bit t);
    @(negedge clk);
    upd_valid = 1; upd_idx = idx; upd_taken = t;
    @(negedge clk);
    upd_valid = 0;
    hist = {hist[H-2:0], t};
  endtask

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    int idx;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("busy", init_busy, 1);
    wait (!init_busy);
    @(negedge clk);
    for (int i = 0; i < 20; i++) begin
      pred_pc = $urandom; #1;
      chk("after sweep", pred_taken, 0);
      chk("index", pred_idx, int'(pred_pc[H+1:2]));
    end
    pred_pc = 32'h0000_0124; #1;
    idx = pred_idx;
    upd(H'(idx), 1);
    upd(H'(idx), 1);
    // history is now 2'b11; index of the same pc moves
    #1 chk("index with history", pred_idx, int'(pred_pc[H+1:2] ^ hist));
    pred_pc = {pred_pc[31:H+2], H'(idx) ^ hist, 2'b00}; #1;
    chk("trained index", pred_idx, idx);
    chk("trained taken", pred_taken, 1);
    upd(H'(idx), 0);
    pred_pc = {pred_pc[31:H+2], H'(idx) ^ hist, 2'b00}; #1;
    chk("still taken (saturating)", pred_taken, 1);
    upd(H'(idx), 0);
    pred_pc = {pred_pc[31:H+2], H'(idx) ^ hist, 2'b00}; #1;
    chk("flipped", pred_taken, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
