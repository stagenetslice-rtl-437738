// sns_regfile: architectural register file of the issue stage.
//
// NREGS registers of XLEN bits, register 0 reads as zero. NRD combinational
// read ports (two by default, as in a scalar pipeline) serve the live-ins
// of a macro-op, two per cycle; one write port takes a single live-out per
// cycle from the writeback path. All registers reset to zero. The document
// places the register file in the issue stage and keeps the baseline's
// port counts; the count of two and the reset are this design's choices.
module sns_regfile #(
  parameter int NREGS = 64,
  parameter int XLEN  = 32,
  parameter int NRD   = 2,
  parameter int AW    = $clog2(NREGS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NRD-1:0][AW-1:0]   raddr,
  output logic [NRD-1:0][XLEN-1:0] rdata,
  input  logic                     we,
  input  logic [AW-1:0]            waddr,
  input  logic [XLEN-1:0]          wdata
);
  logic [XLEN-1:0] regs_q [NREGS];

  always_comb
    for (int p = 0; p < NRD; p++)
      rdata[p] = (raddr[p] == '0) ? '0 : regs_q[raddr[p]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs_q[r] <= '0;
    end else if (we && waddr != '0) begin
      regs_q[waddr] <= wdata;
    end
  end
endmodule
