// sns_issue: issue stage of a StageNetSlice.
//
// Macro-ops arrive from decode, writebacks from execute/memory, each over
// a double-buffered input link; issued macro-ops leave for
// execute/memory over a double-buffered output link.
// Stream ids: the stage keeps sid (stream id of the latest writeback) and
// last_sid (stream id of the last issued macro-op). For the macro-op at
// the head of the input buffer:
//   sid == last_sid, sid == mop.sid   same stream: issue when the
//                                     scoreboard allows it
//   mop.sid == last_sid != sid        the mispredicting branch has
//                                     written back; this macro-op is on
//                                     the wrong path: squash it
//   mop.sid != last_sid               first macro-op of the corrected
//                                     path: wait until the branch's
//                                     writeback has set sid to mop.sid,
//                                     wipe the scoreboard (it holds
//                                     wrong-path state), then issue
// Issue reads the register file for the live-ins the scoreboard marks
// valid and flags the others as "from bypass cache" (selective operand
// fetch; on the output link only the register-file values travel, see
// mop_pack), numbers the live-outs with consecutive write ids, marks them
// pending in the scoreboard and sends the macro-op on. The register file
// keeps two read ports, as a scalar pipeline would: a macro-op with up to
// two live-ins issues in one cycle; one with three or four reads
// live-ins 0/1 in a first cycle (values and bypass flags are held) and
// live-ins 2/3 in the cycle it issues. A writeback is applied one
// live-out per cycle (one register-file write port); when all are
// written the stage takes the writeback's stream id.
// The sid/last-sid rules, the scoreboard, the wipe and selective operand
// fetch are the document's, as is keeping the register-file ports of the
// baseline; the write-id numbering, the two-cycle read of wide macro-ops,
// one write per cycle and the one-cycle wipe are this design's choices.
module sns_issue
  import sns_pkg::*;
#(
  parameter int CH_W      = 64,
  parameter int BYP_DEPTH = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  // macro-ops from decode
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [CH_W-1:0]  in_data,
  input  logic             in_last,
  // writebacks from execute/memory
  input  logic             wb_valid,
  output logic             wb_ready,
  input  logic [CH_W-1:0]  wb_data,
  input  logic             wb_last,
  // macro-ops to execute/memory
  output logic             out_valid,
  input  logic             out_ready,
  output logic [CH_W-1:0]  out_data,
  output logic             out_last,
  // status
  output logic             sid,
  output logic             last_sid,
  output logic [31:0]      n_issued,
  output logic [31:0]      n_squashed,
  output logic [31:0]      n_dep_stalls,
  output logic [31:0]      n_byp_operands,
  output logic [31:0]      n_wipes
);
  localparam int MNF   = ceil_div(MOP_W, CH_W);
  localparam int MNF_W = $clog2(MNF + 1);

  logic              m_valid, m_ready;
  logic [MOP_W-1:0]  m_raw;
  mop_t              m, mo;
  logic              w_valid, w_ready;
  logic [WBMSG_W-1:0] w_raw;
  wb_msg_t           w;
  logic [2:0]        w_idx;
  logic              w_write;

  logic              sid_q, last_sid_q, wiped_q;
  logic [WID_W-1:0]  next_wid_q;
  logic [MAX_LI-1:0] q_use, rf_ok, byp_ok;
  logic              sb_ok;
  localparam int NRP = 2;                      // register-file read ports
  logic [NRP-1:0][REG_W-1:0] rf_addr;
  logic [NRP-1:0][XLEN-1:0]  rf_rd;
  logic              rd_ph_q, two_reads, can_go;
  logic [NRP-1:0][XLEN-1:0]  hold_val_q;
  logic [NRP-1:0]    hold_byp_q;
  logic              tx_ready;
  logic              same_stream, wrong_path, new_stream;
  logic              do_issue, do_squash, do_wipe;

  sns_link_rx #(.MSG_W(MOP_W), .CH_W(CH_W)) u_rx_mop (
    .clk, .rst_n,
    .flit_valid(in_valid), .flit_ready(in_ready), .flit_data(in_data), .flit_last(in_last),
    .msg_valid(m_valid), .msg_ready(m_ready), .msg(m_raw));

  sns_link_rx #(.MSG_W(WBMSG_W), .CH_W(CH_W)) u_rx_wb (
    .clk, .rst_n,
    .flit_valid(wb_valid), .flit_ready(wb_ready), .flit_data(wb_data), .flit_last(wb_last),
    .msg_valid(w_valid), .msg_ready(w_ready), .msg(w_raw));

  assign m = mop_unpack(m_raw, 1'b0);   // from decode: no values
  assign w = wb_msg_t'(w_raw);

  // ---- writeback path: one live-out per cycle ----
  assign w_write = w_valid && (w_idx < w.nlo);
  assign w_ready = w_valid && (w_idx + 3'd1 >= w.nlo);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) w_idx <= '0;
    else if (w_valid) w_idx <= w_ready ? 3'd0 : w_idx + 3'd1;
  end

  // ---- scoreboard and register file ----
  always_comb
    for (int j = 0; j < MAX_LI; j++) q_use[j] = (j < int'(m.nli));

  sns_scoreboard #(.NREGS(NREGS), .WID_W(WID_W), .NQ(MAX_LI), .NS(MAX_LO)) u_sb (
    .clk, .rst_n,
    .byp_depth(WID_W'(BYP_DEPTH)), .next_wid(next_wid_q),
    .q_reg(m.li_reg), .q_use, .rf_ok, .byp_ok, .ok(sb_ok),
    .wipe(do_wipe),
    .set(do_issue), .set_n(m.nlo), .set_reg(m.lo_reg), .set_base_wid(next_wid_q),
    .clr(w_write), .clr_reg(w.lo_reg[w_idx[1:0]]), .clr_wid(w.base_wid + WID_W'(w_idx)));

  // phase 0 reads live-ins 0/1, phase 1 reads live-ins 2/3
  assign rf_addr = rd_ph_q ? {m.li_reg[3], m.li_reg[2]} : {m.li_reg[1], m.li_reg[0]};

  sns_regfile #(.NREGS(NREGS), .XLEN(XLEN), .NRD(NRP)) u_rf (
    .clk, .rst_n,
    .raddr(rf_addr), .rdata(rf_rd),
    .we(w_write), .waddr(w.lo_reg[w_idx[1:0]]), .wdata(w.lo_val[w_idx[1:0]]));

  // ---- stream-id decision ----
  assign same_stream = m_valid && (m.sid == last_sid_q) && (m.sid == sid_q);
  assign wrong_path  = m_valid && (m.sid == last_sid_q) && (m.sid != sid_q);
  assign new_stream  = m_valid && (m.sid != last_sid_q);
  assign do_wipe     = new_stream && (m.sid == sid_q) && !wiped_q;
  assign can_go      = (same_stream || (new_stream && m.sid == sid_q && wiped_q))
                       && sb_ok && tx_ready;
  assign two_reads   = (m.nli > 3'd2);
  assign do_issue    = can_go && (!two_reads || rd_ph_q);
  assign do_squash   = wrong_path;
  assign m_ready     = do_issue || do_squash;

  always_comb begin
    mo          = m;
    mo.base_wid = next_wid_q;
    for (int j = 0; j < MAX_LI; j++) begin
      if (j < NRP && two_reads) begin           // read in the first cycle
        mo.li_byp[j] = hold_byp_q[j];
        mo.li_val[j] = hold_val_q[j];
      end else begin
        mo.li_byp[j] = q_use[j] && byp_ok[j];
        mo.li_val[j] = (q_use[j] && rf_ok[j]) ? rf_rd[j % NRP] : '0;
      end
    end
  end

  sns_link_tx #(.MSG_W(MOP_W), .CH_W(CH_W)) u_tx (
    .clk, .rst_n,
    .push_valid(do_issue), .push_ready(tx_ready), .push_msg(mop_pack(mo, 1'b1)),
    .push_nflits(MNF_W'(mop_flits(mo, 1'b1, CH_W))),
    .flit_valid(out_valid), .flit_ready(out_ready), .flit_data(out_data), .flit_last(out_last));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sid_q          <= 1'b0;
      last_sid_q     <= 1'b0;
      wiped_q        <= 1'b0;
      next_wid_q     <= '0;
      rd_ph_q        <= 1'b0;
      hold_val_q     <= '0;
      hold_byp_q     <= '0;
      n_issued       <= '0;
      n_squashed     <= '0;
      n_dep_stalls   <= '0;
      n_byp_operands <= '0;
      n_wipes        <= '0;
    end else begin
      if (w_ready) sid_q <= w.sid;
      if (do_wipe) begin
        wiped_q <= 1'b1;
        n_wipes <= n_wipes + 1;
      end
      if (do_issue) begin
        last_sid_q     <= m.sid;
        wiped_q        <= 1'b0;
        next_wid_q     <= next_wid_q + WID_W'(m.nlo);
        n_issued       <= n_issued + 1;
        n_byp_operands <= n_byp_operands + 32'($countones(mo.li_byp));
      end
      // first read cycle of a macro-op with more than two live-ins
      rd_ph_q <= can_go && two_reads && !rd_ph_q;
      if (can_go && two_reads && !rd_ph_q)
        for (int j = 0; j < NRP; j++) begin
          hold_byp_q[j] <= q_use[j] && byp_ok[j];
          hold_val_q[j] <= (q_use[j] && rf_ok[j]) ? rf_rd[j] : '0;
        end
      if (do_squash) n_squashed <= n_squashed + 1;
      if ((same_stream || (new_stream && m.sid == sid_q && wiped_q)) && !sb_ok)
        n_dep_stalls <= n_dep_stalls + 1;
    end
  end

  assign sid      = sid_q;
  assign last_sid = last_sid_q;
endmodule
