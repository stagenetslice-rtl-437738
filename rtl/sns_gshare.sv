// sns_gshare: global-history (gshare) branch direction predictor.
//
// 2^HIST_W two-bit saturating counters indexed by the XOR of the global
// history register and the word address of the branch. Prediction is
// combinational: pred_idx and pred_taken follow pred_pc in the same cycle.
// The index used is carried along with the branch and returned with its
// resolution (upd_valid, upd_idx, upd_taken): the counter is trained and
// the outcome shifted into the history at resolution, so the history holds
// resolved outcomes only. After reset the table is cleared to weakly
// not-taken by a sweep of one entry per cycle; init_busy is high meanwhile
// and predictions read not-taken.
// The gshare organisation and the 16-bit history are the document's
// simulation configuration; the non-speculative history update and the
// reset sweep are this design's choices.
module sns_gshare #(
  parameter int HIST_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [31:0]       pred_pc,
  output logic [HIST_W-1:0] pred_idx,
  output logic              pred_taken,
  input  logic              upd_valid,
  input  logic [HIST_W-1:0] upd_idx,
  input  logic              upd_taken,
  output logic              init_busy
);
  localparam int ENTRIES = 1 << HIST_W;

  logic [1:0]        ctr_q [ENTRIES];
  logic [HIST_W-1:0] ghr_q;
  logic [HIST_W-1:0] init_idx;
  logic [1:0]        cur;

  assign pred_idx   = pred_pc[HIST_W+1:2] ^ ghr_q;
  assign pred_taken = !init_busy && ctr_q[pred_idx][1];
  assign cur        = ctr_q[upd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ghr_q     <= '0;
      init_idx  <= '0;
      init_busy <= 1'b1;
    end else if (init_busy) begin
      init_idx <= init_idx + 1'b1;
      if (init_idx == HIST_W'(ENTRIES - 1)) init_busy <= 1'b0;
    end else if (upd_valid) begin
      ghr_q <= {ghr_q[HIST_W-2:0], upd_taken};
    end
  end

  // counter table: no reset, cleared by the sweep
  always_ff @(posedge clk) begin
    if (init_busy) ctr_q[init_idx] <= 2'b01;
    else if (upd_valid) begin
      if (upd_taken && cur != 2'b11)  ctr_q[upd_idx] <= cur + 2'b01;
      if (!upd_taken && cur != 2'b00) ctr_q[upd_idx] <= cur - 2'b01;
    end
  end
endmodule
