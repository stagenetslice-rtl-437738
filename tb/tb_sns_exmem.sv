// tb_sns_exmem: checks the execute/memory stage through its links.
// Sends a short sequence of issued macro-ops and compares every writeback
// and branch message with values worked out here:
//   1. add, multiply, store and load inside one macro-op (values chained
//      through operation results; the store/load round trip goes through a
//      small data memory with random ready),
//   2. a live-in flagged "from bypass" must take the previous macro-op's
//      live-out from the bypass cache, not the stale value in the message,
//   3. a branch predicted taken that falls through: mispredict, redirect
//      to pc+4, sid toggles, an empty writeback carries the new sid,
//   4. a macro-op still carrying the old sid is squashed,
//   5. a correctly predicted JAL writes its link register,
//   6. HALT stops the stage.
module tb_sns_exmem;
  import sns_pkg::*;
  localparam int CH_W = 64;
  localparam int MNF_W = $clog2((MOP_W + CH_W - 1) / CH_W + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, in_last, wb_valid, wb_ready, wb_last, br_valid, br_ready, br_last;
  logic [CH_W-1:0] in_data, wb_data, br_data;
  logic dmem_req_valid, dmem_req_ready, dmem_req_we, dmem_resp_valid;
  logic [31:0] dmem_req_addr, dmem_req_wdata, dmem_resp_rdata;
  logic sid, halted;
  logic [31:0] n_mops, n_ops, n_squashed, n_mispredicts, n_byp_hits;

  sns_exmem #(.CH_W(CH_W), .BYP_DEPTH(6)) dut (.*);

  // data memory: random ready, answer one cycle after acceptance
  logic [31:0] mem [64];
  always @(posedge clk) begin
    dmem_req_ready  <= $urandom_range(0, 1);
    dmem_resp_valid <= 1'b0;
    if (rst_n && dmem_req_valid && dmem_req_ready) begin
      dmem_resp_valid <= 1'b1;
      if (dmem_req_we) mem[dmem_req_addr[5:0]] <= dmem_req_wdata;
      else dmem_resp_rdata <= mem[dmem_req_addr[5:0]];
    end
  end

  logic mp_valid = 0, mp_ready, w_valid, b_valid;
  mop_t mp = '0;
  logic [WBMSG_W-1:0] w_raw;
  logic [BRMSG_W-1:0] b_raw;
  sns_link_tx #(.MSG_W(MOP_W), .CH_W(CH_W)) u_txm (.clk, .rst_n,
    .push_valid(mp_valid), .push_ready(mp_ready), .push_msg(mop_pack(mp, 1'b1)),
    .push_nflits(MNF_W'(mop_flits(mp, 1'b1, CH_W))),
    .flit_valid(in_valid), .flit_ready(in_ready), .flit_data(in_data), .flit_last(in_last));
  sns_link_rx #(.MSG_W(WBMSG_W), .CH_W(CH_W)) u_rxw (.clk, .rst_n,
    .flit_valid(wb_valid), .flit_ready(wb_ready), .flit_data(wb_data), .flit_last(wb_last),
    .msg_valid(w_valid), .msg_ready(1'b1), .msg(w_raw));
  sns_link_rx #(.MSG_W(BRMSG_W), .CH_W(CH_W)) u_rxb (.clk, .rst_n,
    .flit_valid(br_valid), .flit_ready(br_ready), .flit_data(br_data), .flit_last(br_last),
    .msg_valid(b_valid), .msg_ready(1'b1), .msg(b_raw));

  wb_msg_t wbs [$];
  br_msg_t brs [$];
  always @(posedge clk) if (rst_n) begin
    if (w_valid) wbs.push_back(wb_msg_t'(w_raw));
    if (b_valid) brs.push_back(br_msg_t'(b_raw));
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic src_t li(int i);  return '{kind: SRC_LIVEIN, idx: 3'(i)}; endfunction
  function automatic src_t opr(int i); return '{kind: SRC_OP, idx: 3'(i)}; endfunction
  function automatic src_t zr();       return '{kind: SRC_ZERO, idx: 3'd0}; endfunction
  function automatic mop_op_t mk(opcode_e o, src_t s1, src_t s2, int imm);
    return '{opc: o, src1: s1, src2: s2, imm: IMM_W'(imm)};
  endfunction

  mop_t m;
  task automatic start(int mid, bit s, int len);
    m = '0; m.mid = 8'(mid); m.sid = s; m.len = 4'(len); m.base_wid = 8'(mid * 10);
  endtask
  task automatic set_op(int i, mop_op_t o); m.ops[MAX_OPS-1-i] = o; endtask
  task automatic send();
    @(negedge clk);
    mp = m; mp_valid = 1;
    do @(posedge clk); while (!mp_ready);
    #1 mp_valid = 0;
  endtask

  task automatic chk(string what, longint g, longint e);
    checks++;
    if (g != e) begin failures++; $display("FAIL %s got %0d exp %0d", what, g, e); end
  endtask

  initial begin
    foreach (mem[i]) mem[i] = 32'hdead0000 + i;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1: r3 = (r1+r2)*r1 ; mem[r2+16] = r3 ; r4 = mem[r2+16]
    start(1, 0, 4);
    m.nli = 2; m.li_reg[0] = 1; m.li_reg[1] = 2; m.li_val[0] = 7; m.li_val[1] = 5;
    set_op(0, mk(OP_ADD, li(0), li(1), 0));
    set_op(1, mk(OP_MUL, opr(0), li(0), 0));
    set_op(2, mk(OP_SW, li(1), opr(1), 16));
    set_op(3, mk(OP_LW, li(1), zr(), 16));
    m.nlo = 2; m.lo_reg[0] = 3; m.lo_op[0] = 1; m.lo_reg[1] = 4; m.lo_op[1] = 3;
    send();
    // 2: r5 = r3 + 1, r3 taken from the bypass cache
    start(2, 0, 1);
    m.nli = 1; m.li_reg[0] = 3; m.li_byp[0] = 1; m.li_val[0] = 999;
    set_op(0, mk(OP_ADDI, li(0), zr(), 1));
    m.nlo = 1; m.lo_reg[0] = 5; m.lo_op[0] = 0;
    send();
    // 3: beq r5, r0 predicted taken, falls through
    start(3, 0, 1);
    m.nli = 1; m.li_reg[0] = 5; m.li_byp[0] = 1;
    set_op(0, mk(OP_BEQ, li(0), zr(), 8));
    m.br.is_br = 1; m.br.pred_taken = 1; m.br.pc = 32'h200; m.br.bp_idx = 16'h1234;
    send();
    // 4: wrong path, old sid
    start(4, 0, 1);
    set_op(0, mk(OP_ADDI, zr(), zr(), 3));
    m.nlo = 1; m.lo_reg[0] = 9; m.lo_op[0] = 0;
    send();
    // 5: jal r6, +10 words, predicted taken
    start(5, 1, 1);
    set_op(0, mk(OP_JAL, zr(), zr(), 10));
    m.br.is_br = 1; m.br.pred_taken = 1; m.br.pc = 32'h100;
    m.nlo = 1; m.lo_reg[0] = 6; m.lo_op[0] = 0;
    send();
    // 6: halt
    start(6, 1, 1);
    set_op(0, mk(OP_HALT, zr(), zr(), 0));
    send();
    repeat (100) @(posedge clk);

    chk("halted", halted, 1);
    chk("sid", sid, 1);
    chk("n_mops", n_mops, 5);
    chk("n_ops", n_ops, 8);
    chk("n_squashed", n_squashed, 1);
    chk("n_mispredicts", n_mispredicts, 1);
    chk("n_byp_hits", n_byp_hits, 2);
    chk("mem", mem[21], 84);
    chk("wb count", wbs.size(), 4);
    if (wbs.size() == 4) begin
      chk("wb1 mid", wbs[0].mid, 1);     chk("wb1 wid", wbs[0].base_wid, 10);
      chk("wb1 nlo", wbs[0].nlo, 2);     chk("wb1 r3", wbs[0].lo_val[0], 84);
      chk("wb1 r4", wbs[0].lo_val[1], 84); chk("wb1 reg", wbs[0].lo_reg[1], 4);
      chk("wb2 r5", wbs[1].lo_val[0], 85); chk("wb2 sid", wbs[1].sid, 0);
      chk("wb3 mis", wbs[2].mispredict, 1); chk("wb3 sid", wbs[2].sid, 1);
      chk("wb3 nlo", wbs[2].nlo, 0);
      chk("wb5 mid", wbs[3].mid, 5);     chk("wb5 link", wbs[3].lo_val[0], 32'h104);
      chk("wb5 mis", wbs[3].mispredict, 0);
    end
    chk("br count", brs.size(), 2);
    if (brs.size() == 2) begin
      chk("br3 mis", brs[0].mispredict, 1); chk("br3 taken", brs[0].taken, 0);
      chk("br3 pc", brs[0].redirect_pc, 32'h204); chk("br3 sid", brs[0].sid, 1);
      chk("br3 cond", brs[0].is_cond, 1);  chk("br3 idx", brs[0].bp_idx, 16'h1234);
      chk("br5 mis", brs[1].mispredict, 0); chk("br5 pc", brs[1].redirect_pc, 32'h128);
      chk("br5 cond", brs[1].is_cond, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
