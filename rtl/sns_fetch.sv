// sns_fetch: fetch stage of a StageNetSlice.
//
// Generates the program counter, reads one instruction at a time from the
// instruction-memory port and sends it, stamped with the current stream id
// (sid) and its branch prediction, to the decode stage through a
// double-buffered output link. The fetch controller pre-decodes the
// returned word: a conditional branch asks the gshare predictor, JAL is
// always taken to its PC-relative target, JALR is predicted to fall
// through, and HALT stops fetching until a redirect.
// Branch resolutions come back from execute/memory over the branch
// feedback link. Every conditional branch trains the predictor; a
// mispredict (the mispredict handler) toggles the sid register, loads the
// correct PC and drops the instruction still in flight, so everything
// fetched from then on carries the new stream id. This sid behaviour is
// the document's; the memory port, the pre-decode and one outstanding
// request are this design's choices.
// Memory port timing: a request accepted (imem_req_valid && imem_req_ready)
// in cycle t returns imem_resp_valid / imem_resp_data in a later cycle, in
// order; one request is outstanding at a time.
module sns_fetch
  import sns_pkg::*;
#(
  parameter int CH_W     = 64,
  parameter int HIST_W   = BP_IDX_W,
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  // instruction memory
  output logic              imem_req_valid,
  input  logic              imem_req_ready,
  output logic [31:0]       imem_req_addr,
  input  logic              imem_resp_valid,
  input  logic [31:0]       imem_resp_data,
  // output link to decode
  output logic              out_valid,
  input  logic              out_ready,
  output logic [CH_W-1:0]   out_data,
  output logic              out_last,
  // branch feedback link from execute/memory
  input  logic              fb_valid,
  output logic              fb_ready,
  input  logic [CH_W-1:0]   fb_data,
  input  logic              fb_last,
  // status
  output logic              sid,
  output logic [31:0]       mispredicts
);
  localparam int NF   = ceil_div(FMSG_W, CH_W);
  localparam int NF_W = $clog2(NF + 1);

  logic [31:0]   pc_q, pend_pc;
  logic          sid_q, halted_q, pending_q, discard_q;
  logic          push_valid, push_ready;
  fetch_msg_t    fmsg;
  logic          fbm_valid;
  logic [BRMSG_W-1:0] fbm_raw;
  br_msg_t       fbm;
  logic [HIST_W-1:0] bp_idx;
  logic          bp_taken, bp_busy;
  logic          redirect;
  opcode_e       ropc;
  logic [31:0]   next_pc;
  logic          ptaken;
  logic          resp_use;

  sns_link_tx #(.MSG_W(FMSG_W), .CH_W(CH_W)) u_tx (
    .clk, .rst_n,
    .push_valid, .push_ready, .push_msg(fmsg), .push_nflits(NF_W'(NF)),
    .flit_valid(out_valid), .flit_ready(out_ready), .flit_data(out_data), .flit_last(out_last));

  sns_link_rx #(.MSG_W(BRMSG_W), .CH_W(CH_W)) u_rx (
    .clk, .rst_n,
    .flit_valid(fb_valid), .flit_ready(fb_ready), .flit_data(fb_data), .flit_last(fb_last),
    .msg_valid(fbm_valid), .msg_ready(1'b1), .msg(fbm_raw));

  assign fbm = br_msg_t'(fbm_raw);

  sns_gshare #(.HIST_W(HIST_W)) u_bp (
    .clk, .rst_n,
    .pred_pc(pend_pc), .pred_idx(bp_idx), .pred_taken(bp_taken),
    .upd_valid(fbm_valid && fbm.is_cond), .upd_idx(fbm.bp_idx[HIST_W-1:0]),
    .upd_taken(fbm.taken), .init_busy(bp_busy));

  assign redirect = fbm_valid && fbm.mispredict;

  // pre-decode of the returned instruction
  always_comb begin
    ropc    = i_opc(imem_resp_data);
    ptaken  = 1'b0;
    next_pc = pend_pc + 32'd4;
    if (is_cond(ropc) && bp_taken) begin
      ptaken  = 1'b1;
      next_pc = pend_pc + {{17{imem_resp_data[24]}}, i_off13(imem_resp_data), 2'b00};
    end else if (ropc == OP_JAL) begin
      ptaken  = 1'b1;
      next_pc = pend_pc + {{11{imem_resp_data[18]}}, imem_resp_data[18:0], 2'b00};
    end
  end

  assign resp_use   = imem_resp_valid && pending_q && !discard_q && !redirect;
  assign push_valid = resp_use;
  always_comb begin
    fmsg            = '0;
    fmsg.sid        = sid_q;
    fmsg.pred_taken = ptaken;
    fmsg.bp_idx     = BP_IDX_W'(bp_idx);
    fmsg.pc         = pend_pc;
    fmsg.instr      = imem_resp_data;
  end

  assign imem_req_valid = run && !halted_q && !pending_q && push_ready && !redirect;
  assign imem_req_addr  = pc_q;
  assign sid            = sid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q        <= RESET_PC;
      pend_pc     <= '0;
      sid_q       <= 1'b0;
      halted_q    <= 1'b0;
      pending_q   <= 1'b0;
      discard_q   <= 1'b0;
      mispredicts <= '0;
    end else begin
      if (imem_req_valid && imem_req_ready) begin
        pending_q <= 1'b1;
        discard_q <= 1'b0;
        pend_pc   <= pc_q;
      end else if (imem_resp_valid && pending_q) begin
        pending_q <= 1'b0;
      end
      if (resp_use) begin
        pc_q <= next_pc;
        if (ropc == OP_HALT) halted_q <= 1'b1;
      end
      if (redirect) begin
        sid_q       <= ~sid_q;
        pc_q        <= fbm.redirect_pc;
        halted_q    <= 1'b0;
        mispredicts <= mispredicts + 1;
        if (pending_q && !imem_resp_valid) discard_q <= 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) push_valid |-> push_ready);
endmodule
