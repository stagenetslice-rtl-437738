// sns_config_manager: routing table of a StageNet built from N slices.
//
// A logical slice s is made of one physical stage of each type: fetch,
// decode, issue and execute/memory. The table phys[s][t] names the physical
// stage (its crossbar port) used by slice s for stage type t; active[s]
// turns the slice on. A healthy chip uses the identity map; to route
// around a broken stage, software rewrites one entry so that the slice
// uses the stage of an idle (spare) slice instead. From the table the
// block derives the select and enable of all five crossbars:
//   FD fetch->decode, DI decode->issue, IE issue->exmem,
//   EF exmem->fetch (branch feedback), EI exmem->issue (writeback).
// fetch_run[p] starts physical fetch stage p. conflict flags two active
// slices claiming the same physical stage: time-multiplexing a stage
// between slices is not supported by this implementation.
// The document only names the configuration manager; the table, the write
// port and the reset state are this design's own.
module sns_config_manager #(
  parameter int N     = 5,
  parameter int SEL_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cfg_we,
  input  logic [SEL_W-1:0]        cfg_slice,
  input  logic [1:0]              cfg_stage,   // 0 fetch 1 decode 2 issue 3 exmem
  input  logic [SEL_W-1:0]        cfg_phys,
  input  logic                    cfg_active,
  output logic [N-1:0][SEL_W-1:0] fd_sel, di_sel, ie_sel, ef_sel, ei_sel,
  output logic [N-1:0]            fd_en,  di_en,  ie_en,  ef_en,  ei_en,
  output logic [N-1:0]            fetch_run,
  output logic                    conflict
);
  logic [N-1:0][3:0][SEL_W-1:0] phys_q;
  logic [N-1:0]                 active_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N; s++) begin
        for (int t = 0; t < 4; t++) phys_q[s][t] <= SEL_W'(s);
        active_q[s] <= 1'b0;
      end
    end else if (cfg_we && int'(cfg_slice) < N) begin
      phys_q[cfg_slice][cfg_stage] <= cfg_phys;
      active_q[cfg_slice]          <= cfg_active;
    end
  end

  always_comb begin
    fd_sel = '0; di_sel = '0; ie_sel = '0; ef_sel = '0; ei_sel = '0;
    fd_en = '0;  di_en = '0;  ie_en = '0;  ef_en = '0;  ei_en = '0;
    fetch_run = '0;
    conflict  = 1'b0;
    for (int s = 0; s < N; s++) begin
      if (active_q[s]) begin
        fd_sel[phys_q[s][1]] = phys_q[s][0];  fd_en[phys_q[s][1]] = 1'b1;
        di_sel[phys_q[s][2]] = phys_q[s][1];  di_en[phys_q[s][2]] = 1'b1;
        ie_sel[phys_q[s][3]] = phys_q[s][2];  ie_en[phys_q[s][3]] = 1'b1;
        ef_sel[phys_q[s][0]] = phys_q[s][3];  ef_en[phys_q[s][0]] = 1'b1;
        ei_sel[phys_q[s][2]] = phys_q[s][3];  ei_en[phys_q[s][2]] = 1'b1;
        fetch_run[phys_q[s][0]] = 1'b1;
      end
    end
    for (int a = 0; a < N; a++)
      for (int b = a + 1; b < N; b++)
        for (int t = 0; t < 4; t++)
          if (active_q[a] && active_q[b] && phys_q[a][t] == phys_q[b][t]) conflict = 1'b1;
  end
endmodule
