// sns_decode: decode stage of a StageNetSlice.
//
// Instructions arrive from fetch over a double-buffered input link and are
// collected in an instruction buffer (IBUF_DEPTH entries). The stage keeps
// a one-bit stream id (sid) register: when an arriving instruction carries
// a stream id different from it, a branch mispredict has happened, so the
// register is toggled, the instruction buffer and the partly built
// macro-op are flushed, and the arriving instruction is kept as the first
// of the new stream. The decoder logic turns the buffer head into register
// uses and an immediate, and the packer groups instructions into
// macro-ops, which leave over a double-buffered output link using only as
// many CH_W-bit flits as the macro-op length needs.
// The sid flush rule, the instruction buffer and the packer are the
// document's; the buffer depth is this design's choice.
module sns_decode
  import sns_pkg::*;
#(
  parameter int CH_W       = 64,
  parameter int IBUF_DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [CH_W-1:0]  in_data,
  input  logic             in_last,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [CH_W-1:0]  out_data,
  output logic             out_last,
  output logic             sid,
  output logic [31:0]      flushes
);
  localparam int MNF   = ceil_div(MOP_W, CH_W);
  localparam int MNF_W = $clog2(MNF + 1);
  localparam int PW    = $clog2(IBUF_DEPTH);

  logic                rxm_valid, rxm_ready;
  logic [FMSG_W-1:0]   rxm_raw;
  fetch_msg_t          rxm;
  fetch_msg_t          ibuf_q [IBUF_DEPTH];
  logic [PW-1:0]       rd_q, wr_q;
  logic [PW:0]         cnt_q;
  logic                sid_q, mismatch, push, pop;
  logic                pk_ready, pk_out_valid, tx_ready;
  mop_t                pk_mop;

  sns_link_rx #(.MSG_W(FMSG_W), .CH_W(CH_W)) u_rx (
    .clk, .rst_n,
    .flit_valid(in_valid), .flit_ready(in_ready), .flit_data(in_data), .flit_last(in_last),
    .msg_valid(rxm_valid), .msg_ready(rxm_ready), .msg(rxm_raw));

  assign rxm       = fetch_msg_t'(rxm_raw);
  assign mismatch  = rxm_valid && (rxm.sid != sid_q);
  assign rxm_ready = mismatch || (int'(cnt_q) < IBUF_DEPTH);
  assign push      = rxm_valid && rxm_ready;
  assign pop       = !mismatch && (cnt_q != '0) && pk_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q    <= '0;
      wr_q    <= '0;
      cnt_q   <= '0;
      sid_q   <= 1'b0;
      flushes <= '0;
    end else if (mismatch) begin
      // new stream: drop everything buffered, keep the arriving instruction
      sid_q        <= rxm.sid;
      flushes      <= flushes + 1;
      rd_q         <= '0;
      wr_q         <= PW'(1);
      cnt_q        <= (PW+1)'(1);
    end else begin
      if (push) wr_q <= wr_q + 1'b1;
      if (pop) rd_q <= rd_q + 1'b1;
      cnt_q <= cnt_q + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  // buffer storage (no reset: only entries below cnt_q are read)
  always_ff @(posedge clk) begin
    if (mismatch)  ibuf_q[0]    <= rxm;
    else if (push) ibuf_q[wr_q] <= rxm;
  end

  sns_packer u_packer (
    .clk, .rst_n,
    .flush(mismatch),
    .in_valid(cnt_q != '0 && !mismatch), .in_ready(pk_ready),
    .in_dec(decode_instr(ibuf_q[rd_q])),
    .out_valid(pk_out_valid), .out_ready(tx_ready), .out_mop(pk_mop));

  sns_link_tx #(.MSG_W(MOP_W), .CH_W(CH_W)) u_tx (
    .clk, .rst_n,
    .push_valid(pk_out_valid), .push_ready(tx_ready), .push_msg(mop_pack(pk_mop, 1'b0)),
    .push_nflits(MNF_W'(mop_flits(pk_mop, 1'b0, CH_W))),
    .flit_valid(out_valid), .flit_ready(out_ready), .flit_data(out_data), .flit_last(out_last));

  assign sid = sid_q;
endmodule
