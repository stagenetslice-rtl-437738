// sns_scoreboard: register dependency tracker of the issue stage.
//
// Two columns per register: a valid bit (the register file holds the
// latest value) and the id of the last modifying write. Because an SNS has
// no forwarding network, an operand whose valid bit is clear can only be
// used if its producer's result is still guaranteed to be in the bypass
// cache of the execute/memory stage. Ids are handed out one per
// destination (live-out) in issue order, and the bypass cache keeps the
// last byp_depth destinations in FIFO order, so a pending operand written
// with id w is guaranteed there when next_wid - w <= byp_depth, next_wid
// being the id the next destination will get. The bypass depth is an
// input set when the system is configured.
// Query (combinational): for each of the NQ operands, rf_ok (read the
// register file) or byp_ok (take it from the bypass cache); ok = all
// operands usable.
// Update (clocked): wipe marks every register valid (after a branch
// mispredict); set marks the live-outs of an issued macro-op pending with
// ids base_wid, base_wid+1, ...; clr marks a register valid on writeback
// if its id is still the last one given to it. set wins over clr on the
// same register.
// Valid bits, last-writer ids, the bypass-distance rule and the wipe on
// mispredict are the document's. The document states the rule for one
// destination per instruction with "less than the depth"; counting ids
// per destination, the equivalent bound used here is "at most the depth".
module sns_scoreboard #(
  parameter int NREGS = 64,
  parameter int AW    = $clog2(NREGS),
  parameter int WID_W = 8,
  parameter int NQ    = 4,
  parameter int NS    = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [WID_W-1:0]        byp_depth,
  input  logic [WID_W-1:0]        next_wid,
  input  logic [NQ-1:0][AW-1:0]   q_reg,
  input  logic [NQ-1:0]           q_use,
  output logic [NQ-1:0]           rf_ok,
  output logic [NQ-1:0]           byp_ok,
  output logic                    ok,
  input  logic                    wipe,
  input  logic                    set,
  input  logic [2:0]              set_n,
  input  logic [NS-1:0][AW-1:0]   set_reg,
  input  logic [WID_W-1:0]        set_base_wid,
  input  logic                    clr,
  input  logic [AW-1:0]           clr_reg,
  input  logic [WID_W-1:0]        clr_wid
);
  logic [NREGS-1:0]  valid_q;
  logic [WID_W-1:0]  wid_q [NREGS];
  logic [WID_W-1:0]  wdist [NQ];

  always_comb begin
    ok = 1'b1;
    for (int q = 0; q < NQ; q++) begin
      wdist[q]   = next_wid - wid_q[q_reg[q]];
      rf_ok[q]  = valid_q[q_reg[q]] || q_reg[q] == '0;
      byp_ok[q] = !rf_ok[q] && wdist[q] != '0 && wdist[q] <= byp_depth;
      if (q_use[q] && !rf_ok[q] && !byp_ok[q]) ok = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '1;
      for (int r = 0; r < NREGS; r++) wid_q[r] <= '0;
    end else begin
      if (wipe) valid_q <= '1;
      else if (clr && wid_q[clr_reg] == clr_wid) valid_q[clr_reg] <= 1'b1;
      if (set) begin
        for (int j = 0; j < NS; j++) begin
          if (j < int'(set_n)) begin
            valid_q[set_reg[j]] <= 1'b0;
            wid_q[set_reg[j]]   <= set_base_wid + WID_W'(j);
          end
        end
      end
    end
  end
endmodule
