// sns_link_tx: double-buffered output latch of a pipeline stage.
//
// A stage pushes a whole message (MSG_W bits) together with the number of
// flits that carry it. The block holds up to two messages (double
// buffering, so the stage can produce the next message while the previous
// one is still crossing the switch) and sends the head message to the
// crossbar as CH_W-bit flits, most significant flit first, marking the
// final flit with flit_last. Short messages (a macro-op with few
// operations) send only their leading flits. A flit moves when
// flit_valid && flit_ready (back pressure from the switch).
// The double buffering follows the document; the flit format, MSB-first
// order and the variable flit count are this design's choices.
module sns_link_tx #(
  parameter int MSG_W = 64,
  parameter int CH_W  = 64,
  parameter int NF    = (MSG_W + CH_W - 1) / CH_W,
  parameter int NF_W  = $clog2(NF + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push_valid,
  output logic              push_ready,
  input  logic [MSG_W-1:0]  push_msg,
  input  logic [NF_W-1:0]   push_nflits,   // 1..NF
  output logic              flit_valid,
  input  logic              flit_ready,
  output logic [CH_W-1:0]   flit_data,
  output logic              flit_last
);
  localparam int PW = NF * CH_W;

  logic [1:0][PW-1:0]   buf_q;
  logic [1:0][NF_W-1:0] nf_q;
  logic                 rd_ptr, wr_ptr;
  logic [1:0]           count;
  logic [NF_W-1:0]      flit_idx;
  logic                 pop;

  assign push_ready = (count != 2'd2);
  assign flit_valid = (count != 2'd0);
  assign flit_data  = buf_q[rd_ptr][PW-1 - int'(flit_idx)*CH_W -: CH_W];
  assign flit_last  = (flit_idx + 1'b1 >= nf_q[rd_ptr]);
  assign pop        = flit_valid && flit_ready && flit_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr   <= 1'b0;
      wr_ptr   <= 1'b0;
      count    <= '0;
      flit_idx <= '0;
      buf_q    <= '0;
      nf_q     <= '0;
    end else begin
      if (push_valid && push_ready) begin
        buf_q[wr_ptr] <= PW'(push_msg) << (PW - MSG_W);
        nf_q[wr_ptr]  <= push_nflits;
        wr_ptr        <= ~wr_ptr;
      end
      if (flit_valid && flit_ready) begin
        if (flit_last) begin
          flit_idx <= '0;
          rd_ptr   <= ~rd_ptr;
        end else begin
          flit_idx <= flit_idx + 1'b1;
        end
      end
      count <= count + 2'(push_valid && push_ready) - 2'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   push_valid |-> (push_nflits >= 1 && int'(push_nflits) <= NF));
endmodule
