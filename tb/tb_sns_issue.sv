// tb_sns_issue: checks the issue stage between three links.
// A writeback loads r1 and r2; a macro-op reading them must leave with the
// register-file values. A consumer of a pending register one destination
// back must be sent "from bypass" without waiting. A consumer eight
// destinations back (beyond the depth-6 bypass cache) must wait until the
// producer's writeback arrives and then read the register file. For a
// mispredict: a wrong-path macro-op issued before the branch writes back
// is passed on, one arriving after the writeback (new stream id) is
// squashed, and the first corrected-path macro-op waits for the writeback,
// wipes the scoreboard and issues. Output order, MIDs, write ids, values
// and the counters are compared with values worked out here, and so is
// the flit count of two macro-ops: register-file values travel, operands
// left to the bypass cache do not. Last, macro-ops with four and three
// live-ins (read over two cycles through two register-file ports) must
// carry the right value or bypass flag in every live-in slot.
module tb_sns_issue;
  import sns_pkg::*;
  localparam int CH_W = 64;
  localparam int MNF_W = $clog2((MOP_W + CH_W - 1) / CH_W + 1);
  localparam int WNF = (WBMSG_W + CH_W - 1) / CH_W;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, in_last, wb_valid, wb_ready, wb_last, out_valid, out_ready, out_last;
  logic [CH_W-1:0] in_data, wb_data, out_data;
  logic sid, last_sid;
  logic [31:0] n_issued, n_squashed, n_dep_stalls, n_byp_operands, n_wipes;

  sns_issue #(.CH_W(CH_W), .BYP_DEPTH(6)) dut (.*);

  logic mp_valid = 0, mp_ready, wp_valid = 0, wp_ready, o_valid;
  mop_t mp = '0;
  wb_msg_t wp = '0;
  logic [MOP_W-1:0] o_raw;
  sns_link_tx #(.MSG_W(MOP_W), .CH_W(CH_W)) u_txm (.clk, .rst_n,
    .push_valid(mp_valid), .push_ready(mp_ready), .push_msg(mop_pack(mp, 1'b0)),
    .push_nflits(MNF_W'(mop_flits(mp, 1'b0, CH_W))),
    .flit_valid(in_valid), .flit_ready(in_ready), .flit_data(in_data), .flit_last(in_last));
  sns_link_tx #(.MSG_W(WBMSG_W), .CH_W(CH_W)) u_txw (.clk, .rst_n,
    .push_valid(wp_valid), .push_ready(wp_ready), .push_msg(wp), .push_nflits(2'(WNF)),
    .flit_valid(wb_valid), .flit_ready(wb_ready), .flit_data(wb_data), .flit_last(wb_last));
  sns_link_rx #(.MSG_W(MOP_W), .CH_W(CH_W)) u_rx (.clk, .rst_n,
    .flit_valid(out_valid), .flit_ready(out_ready), .flit_data(out_data), .flit_last(out_last),
    .msg_valid(o_valid), .msg_ready(1'b1), .msg(o_raw));

  mop_t got [$];
  always @(posedge clk) if (rst_n && o_valid) got.push_back(mop_unpack(o_raw, 1'b1));
  // flits per issued macro-op: only register-file values travel
  int flits [$];
  int fcount = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    fcount++;
    if (out_last) begin flits.push_back(fcount); fcount = 0; end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_mop(int mid, bit s, int nli, int li0, int li1, int nlo, int lo0,
                         int li2 = 0, int li3 = 0);
    @(negedge clk);
    mp = '0; mp.mid = 8'(mid); mp.sid = s; mp.len = 4'd1; mp.nli = 3'(nli);
    mp.li_reg[0] = 6'(li0); mp.li_reg[1] = 6'(li1);
    mp.li_reg[2] = 6'(li2); mp.li_reg[3] = 6'(li3); mp.nlo = 3'(nlo);
    for (int j = 0; j < nlo; j++) begin mp.lo_reg[j] = 6'(lo0 + j); mp.lo_op[j] = 3'd0; end
    mp_valid = 1;
    do @(posedge clk); while (!mp_ready);
    #1 mp_valid = 0;
  endtask

  task automatic send_wb(bit s, bit mis, int wid, int nlo, int lo0, int v0);
    @(negedge clk);
    wp = '0; wp.sid = s; wp.mispredict = mis; wp.base_wid = 8'(wid); wp.nlo = 3'(nlo);
    for (int j = 0; j < nlo; j++) begin wp.lo_reg[j] = 6'(lo0 + j); wp.lo_val[j] = 32'(v0 + j); end
    wp_valid = 1;
    do @(posedge clk); while (!wp_ready);
    #1 wp_valid = 0;
  endtask

  task automatic chk(string what, int g, int e);
    checks++;
    if (g != e) begin failures++; $display("FAIL %s got %0d exp %0d", what, g, e); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    send_wb(0, 0, 200, 2, 1, 100);                 // r1=100, r2=101
    repeat (20) @(posedge clk);
    send_mop(1, 0, 2, 1, 2, 1, 3);                 // A: r3 <- r1, r2   wid 0
    send_mop(2, 0, 1, 3, 0, 1, 4);                 // B: r4 <- r3       wid 1 (r3 from bypass)
    send_mop(3, 0, 0, 0, 0, 4, 10);                // C: r10..13        wids 2..5
    send_mop(4, 0, 0, 0, 0, 4, 14);                // D: r14..17        wids 6..9
    send_mop(5, 0, 1, 10, 0, 1, 20);               // E: reads r10, 8 back: waits
    repeat (60) @(posedge clk);
    chk("issued before writeback", got.size(), 4);
    checks++;
    if (n_dep_stalls < 30) begin failures++; $display("FAIL stall count %0d", n_dep_stalls); end
    send_wb(0, 0, 2, 4, 10, 500);                  // C writes back r10=500..
    repeat (40) @(posedge clk);
    chk("E issued", got.size(), 5);
    send_mop(6, 0, 0, 0, 0, 1, 30);                // G: wrong path, issued
    repeat (40) @(posedge clk);
    send_wb(1, 1, 0, 0, 0, 0);                     // branch writeback, new sid 1
    repeat (20) @(posedge clk);
    send_mop(7, 0, 0, 0, 0, 1, 31);                // X: wrong path after wb: squash
    send_mop(8, 1, 1, 10, 0, 1, 32);               // F: corrected path
    repeat (60) @(posedge clk);
    chk("total issued", got.size(), 7);
    chk("squashed", n_squashed, 1);
    chk("wipes", n_wipes, 1);
    chk("sid", sid, 1);
    chk("last_sid", last_sid, 1);
    if (got.size() == 7) begin
      int exp_mid [7] = '{1, 2, 3, 4, 5, 6, 8};
      for (int i = 0; i < 7; i++) chk("order", got[i].mid, exp_mid[i]);
      chk("A li0", got[0].li_val[0], 100); chk("A li1", got[0].li_val[1], 101);
      chk("A byp", got[0].li_byp, 0);      chk("A wid", got[0].base_wid, 0);
      chk("B byp", got[1].li_byp, 1);      chk("B wid", got[1].base_wid, 1);
      chk("D wid", got[3].base_wid, 6);
      chk("E byp", got[4].li_byp, 0);      chk("E val", got[4].li_val[0], 500);
      chk("F byp", got[6].li_byp, 0);      chk("F val", got[6].li_val[0], 500);
      // A carries two register values, B's only operand comes from bypass
      chk("A flits", flits[0], (MOP_FIX_W + 2 * XLEN + OP_W + CH_W - 1) / CH_W);
      chk("B flits", flits[1], (MOP_FIX_W + OP_W + CH_W - 1) / CH_W);
    end
    // wide macro-ops: live-ins 2/3 take a second register-file read cycle
    send_mop(9, 1, 4, 1, 2, 1, 40, 10, 32);        // H: r1 r2 r10 from RF, r32 bypass
    send_mop(10, 1, 3, 1, 11, 1, 41, 2);           // I: r1 r11 r2 from RF
    repeat (40) @(posedge clk);
    chk("wide issued", got.size(), 9);
    if (got.size() == 9) begin
      chk("H li0", got[7].li_val[0], 100); chk("H li1", got[7].li_val[1], 101);
      chk("H li2", got[7].li_val[2], 500); chk("H byp", got[7].li_byp, 4'b1000);
      chk("I li0", got[8].li_val[0], 100); chk("I li1", got[8].li_val[1], 501);
      chk("I li2", got[8].li_val[2], 101); chk("I byp", got[8].li_byp, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
