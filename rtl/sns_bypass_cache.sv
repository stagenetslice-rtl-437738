// sns_bypass_cache: bypass cache of the execute/memory stage.
//
// Holds the (register, value) pairs of the last DEPTH destinations written
// by executed macro-ops, with FIFO replacement: each insert of up to NINS
// pairs (the live-outs of one macro-op, in live-out order) pushes out the
// oldest entries. Lookup is associative and combinational: for each of NQ
// queried registers it returns whether the register is present and the
// value of its newest entry. Entries are invalid after reset.
// It stands in for the forwarding network a conventional pipeline has:
// the issue stage only sends an operand "from bypass" when the scoreboard
// guarantees it is still here.
// FIFO replacement, the register-id/value organisation and the
// associative lookup are the document's; the multi-entry insert per
// macro-op is this design's choice.
module sns_bypass_cache #(
  parameter int DEPTH = 6,
  parameter int AW    = 6,
  parameter int XLEN  = 32,
  parameter int NINS  = 4,
  parameter int NQ    = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      ins,
  input  logic [2:0]                ins_n,
  input  logic [NINS-1:0][AW-1:0]   ins_reg,
  input  logic [NINS-1:0][XLEN-1:0] ins_val,
  input  logic [NQ-1:0][AW-1:0]     q_reg,
  output logic [NQ-1:0]             q_hit,
  output logic [NQ-1:0][XLEN-1:0]   q_val
);
  // entry 0 is the newest
  logic [DEPTH-1:0]           v_q;
  logic [DEPTH-1:0][AW-1:0]   r_q;
  logic [DEPTH-1:0][XLEN-1:0] d_q;

  always_comb begin
    for (int q = 0; q < NQ; q++) begin
      q_hit[q] = 1'b0;
      q_val[q] = '0;
      for (int e = DEPTH - 1; e >= 0; e--) begin
        if (v_q[e] && r_q[e] == q_reg[q]) begin
          q_hit[q] = 1'b1;
          q_val[q] = d_q[e];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
      r_q <= '0;
      d_q <= '0;
    end else if (ins && ins_n != '0) begin
      for (int e = 0; e < DEPTH; e++) begin
        if (e < int'(ins_n)) begin
          // live-out (ins_n-1-e) is the newest of this group at e = 0
          v_q[e] <= 1'b1;
          r_q[e] <= ins_reg[int'(ins_n) - 1 - e];
          d_q[e] <= ins_val[int'(ins_n) - 1 - e];
        end else begin
          v_q[e] <= v_q[e - int'(ins_n)];
          r_q[e] <= r_q[e - int'(ins_n)];
          d_q[e] <= d_q[e - int'(ins_n)];
        end
      end
    end
  end
endmodule
