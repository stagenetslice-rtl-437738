// sns_xbar: full N x N crossbar switch between two pipeline-stage columns.
//
// Every output port o forwards the flits of the input port sel[o] when
// en[o] is set; any input can reach any output, so a stage at depth X can
// talk to any stage at depth X+1, including one of another slice. Each
// output has a one-entry register (one cycle of switch traversal), so a
// flit accepted in cycle t is visible at the output in cycle t+1. The
// switch never drops a flit: an input is ready only when the output
// register it is routed to is empty or being emptied (network back
// pressure). Inputs routed nowhere are not ready. The routing must be a
// partial permutation (no input on two outputs); an assertion checks it.
// Full crossbars and back pressure are the document's; the single
// register stage and the select encoding are this design's choices.
module sns_xbar #(
  parameter int N   = 5,
  parameter int W   = 65,
  parameter int SEL_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0][SEL_W-1:0] sel,
  input  logic [N-1:0]          en,
  input  logic [N-1:0]          in_valid,
  output logic [N-1:0]          in_ready,
  input  logic [N-1:0][W-1:0]   in_data,
  output logic [N-1:0]          out_valid,
  input  logic [N-1:0]          out_ready,
  output logic [N-1:0][W-1:0]   out_data
);
  logic [N-1:0] can_take;

  always_comb begin
    for (int o = 0; o < N; o++) can_take[o] = !out_valid[o] || out_ready[o];
    in_ready = '0;
    for (int o = 0; o < N; o++)
      if (en[o] && int'(sel[o]) < N) in_ready[sel[o]] = in_ready[sel[o]] | can_take[o];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_data  <= '0;
    end else begin
      for (int o = 0; o < N; o++) begin
        if (can_take[o]) begin
          out_valid[o] <= en[o] && int'(sel[o]) < N && in_valid[sel[o]];
          if (en[o] && int'(sel[o]) < N) out_data[o] <= in_data[sel[o]];
        end
      end
    end
  end

  // routing must be a partial permutation
  generate
    for (genvar a = 0; a < N; a++) begin : g_chk
      for (genvar b = a + 1; b < N; b++) begin : g_chk2
        assert property (@(posedge clk) disable iff (!rst_n)
                         !(en[a] && en[b] && sel[a] == sel[b]));
      end
    end
  endgenerate
endmodule
