// tb_sns_decode: checks the decode stage between two links. Fetch
// messages go in through a link_tx, macro-ops come out through a link_rx.
// A three-instruction group must arrive as one macro-op using exactly the
// number of flits its length needs. Two instructions of an unfinished group
// followed by an instruction with a new stream id must be flushed (flush
// counter, sid register), and the next macro-op must hold only new-stream
// instructions.
module tb_sns_decode;
  import sns_pkg::*;
  localparam int CH_W = 64;
  localparam int MNF = (MOP_W + CH_W - 1) / CH_W;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last, sid;
  logic [CH_W-1:0] in_data, out_data;
  logic [31:0] flushes;

  sns_decode #(.CH_W(CH_W)) dut (.*);

  logic p_valid = 0, p_ready, m_valid;
  fetch_msg_t p_msg = '0;
  logic [MOP_W-1:0] m_raw;
  sns_link_tx #(.MSG_W(FMSG_W), .CH_W(CH_W)) u_tx (.clk, .rst_n,
    .push_valid(p_valid), .push_ready(p_ready), .push_msg(p_msg), .push_nflits(2'd2),
    .flit_valid(in_valid), .flit_ready(in_ready), .flit_data(in_data), .flit_last(in_last));
  sns_link_rx #(.MSG_W(MOP_W), .CH_W(CH_W)) u_rx (.clk, .rst_n,
    .flit_valid(out_valid), .flit_ready(out_ready), .flit_data(out_data), .flit_last(out_last),
    .msg_valid(m_valid), .msg_ready(1'b1), .msg(m_raw));

  mop_t got [$];
  int   flits [$];
  int   fcount = 0;
  always @(posedge clk) if (rst_n) begin
    if (m_valid) got.push_back(mop_unpack(m_raw, 1'b0));
    if (out_valid && out_ready) begin
      fcount++;
      if (out_last) begin flits.push_back(fcount); fcount = 0; end
    end
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [31:0] w, bit s, int pc);
    @(negedge clk);
    p_msg.instr = w; p_msg.sid = s; p_msg.pc = pc; p_valid = 1;
    do @(posedge clk); while (!p_ready);
    #1 p_valid = 0;
  endtask

  task automatic chk(string what, int g, int e);
    checks++;
    if (g != e) begin failures++; $display("FAIL %s got %0d exp %0d", what, g, e); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    send(enc_i(OP_ADDI, 1, 0, 3), 0, 0);
    send(enc_i(OP_ADDI, 2, 1, 4), 0, 4);
    send(enc_r(OP_ADD, 3, 1, 2, 1'b1), 0, 8);
    send(enc_i(OP_ADDI, 4, 0, 1), 0, 12);
    send(enc_i(OP_ADDI, 5, 0, 1), 0, 16);
    send(enc_i(OP_ADDI, 6, 0, 9), 1, 100);
    send(enc_j(OP_HALT, 0, 0, 1'b1), 1, 104);
    repeat (60) @(posedge clk);
    chk("mops", got.size(), 2);
    chk("flushes", flushes, 1);
    chk("sid", sid, 1);
    if (got.size() == 2) begin
      chk("m0 len", got[0].len, 3);
      chk("m0 nlo", got[0].nlo, 3);
      chk("m0 flits", flits[0], (MOP_FIX_W + 3 * OP_W + CH_W - 1) / CH_W);
      chk("m1 len", got[1].len, 2);
      chk("m1 sid", got[1].sid, 1);
      chk("m1 lo0", got[1].lo_reg[0], 6);
      chk("m1 op1", got[1].ops[MAX_OPS-2].opc, OP_HALT);
      chk("m1 flits", flits[1], (MOP_FIX_W + 2 * OP_W + CH_W - 1) / CH_W);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
