// sns_stagenet: a StageNet array of N_SLICE StageNetSlices.
//
// Each slice is a four-stage in-order processor (fetch, decode, issue,
// execute/memory) whose stages share no wires: every connection between
// stages, including the two feedback paths, passes through a full
// N_SLICE x N_SLICE crossbar. There are five crossbars:
//   FD fetch -> decode          DI decode -> issue
//   IE issue -> execute/memory  EF execute/memory -> fetch (branch feedback)
//   EI execute/memory -> issue (register writeback)
// The configuration manager decides which physical stage of each column
// serves each logical slice, so a slice whose stage has failed can be
// rebuilt from a spare stage of another slice; the crossbars then carry
// its traffic sideways. Stage-to-stage transfers are CH_W-bit flits; a
// message needs several flits (an instruction 2, a macro-op 5 to 9 with
// the default 64-bit channel), which is why the design relies on
// macro-ops and double buffering to keep the stages busy.
// Physical stage p owns instruction-memory port p (fetch p) and
// data-memory port p (execute/memory p); these are the L1-cache ports of
// the slices, modelled outside this block.
// Follows the document: four stage types, five crossbars per slice, 5x5
// switches with 64-bit channels, bypass cache depth 6, four live-ins and
// four live-outs. Own choices: flit format, crossbar register stage,
// configuration table and memory ports.
module sns_stagenet
  import sns_pkg::*;
#(
  parameter int N_SLICE   = 5,
  parameter int CH_W      = 64,
  parameter int BYP_DEPTH = 6,
  parameter int HIST_W    = BP_IDX_W,
  parameter int SEL_W     = (N_SLICE > 1) ? $clog2(N_SLICE) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration manager write port
  input  logic                          cfg_we,
  input  logic [SEL_W-1:0]              cfg_slice,
  input  logic [1:0]                    cfg_stage,
  input  logic [SEL_W-1:0]              cfg_phys,
  input  logic                          cfg_active,
  output logic                          cfg_conflict,
  // instruction memory ports, one per physical fetch stage
  output logic [N_SLICE-1:0]            imem_req_valid,
  input  logic [N_SLICE-1:0]            imem_req_ready,
  output logic [N_SLICE-1:0][31:0]      imem_req_addr,
  input  logic [N_SLICE-1:0]            imem_resp_valid,
  input  logic [N_SLICE-1:0][31:0]      imem_resp_data,
  // data memory ports, one per physical execute/memory stage
  output logic [N_SLICE-1:0]            dmem_req_valid,
  input  logic [N_SLICE-1:0]            dmem_req_ready,
  output logic [N_SLICE-1:0]            dmem_req_we,
  output logic [N_SLICE-1:0][31:0]      dmem_req_addr,
  output logic [N_SLICE-1:0][31:0]      dmem_req_wdata,
  input  logic [N_SLICE-1:0]            dmem_resp_valid,
  input  logic [N_SLICE-1:0][31:0]      dmem_resp_rdata,
  // status per physical execute/memory stage
  output logic [N_SLICE-1:0]            halted,
  output logic [N_SLICE-1:0][31:0]      n_mops,
  output logic [N_SLICE-1:0][31:0]      n_ops,
  output logic [N_SLICE-1:0][31:0]      n_mispredicts,
  output logic [N_SLICE-1:0][31:0]      n_ex_squashed,
  output logic [N_SLICE-1:0][31:0]      n_byp_hits,
  output logic [N_SLICE-1:0][31:0]      n_fetch_mis,
  // status per physical decode / issue stage
  output logic [N_SLICE-1:0][31:0]      n_dec_flushes,
  output logic [N_SLICE-1:0][31:0]      n_iss_squashed,
  output logic [N_SLICE-1:0][31:0]      n_dep_stalls,
  output logic [N_SLICE-1:0][31:0]      n_issued,
  output logic [N_SLICE-1:0][31:0]      n_byp_ops,
  output logic [N_SLICE-1:0][31:0]      n_wipes,
  // stream-id registers per physical stage, for debugging
  output logic [N_SLICE-1:0]            fetch_sid,
  output logic [N_SLICE-1:0]            dec_sid,
  output logic [N_SLICE-1:0]            iss_sid,
  output logic [N_SLICE-1:0]            iss_last_sid,
  output logic [N_SLICE-1:0]            ex_sid
);
  localparam int FW = CH_W + 1;   // flit = {last, data}

  logic [N_SLICE-1:0][SEL_W-1:0] fd_sel, di_sel, ie_sel, ef_sel, ei_sel;
  logic [N_SLICE-1:0]            fd_en,  di_en,  ie_en,  ef_en,  ei_en;
  logic [N_SLICE-1:0]            fetch_run;

  // stage-side flit buses: *_s = into switch, *_r = out of switch
  logic [N_SLICE-1:0]          fd_sv, fd_sr, fd_rv, fd_rr;
  logic [N_SLICE-1:0][FW-1:0]  fd_sd, fd_rd;
  logic [N_SLICE-1:0]          di_sv, di_sr, di_rv, di_rr;
  logic [N_SLICE-1:0][FW-1:0]  di_sd, di_rd;
  logic [N_SLICE-1:0]          ie_sv, ie_sr, ie_rv, ie_rr;
  logic [N_SLICE-1:0][FW-1:0]  ie_sd, ie_rd;
  logic [N_SLICE-1:0]          ef_sv, ef_sr, ef_rv, ef_rr;
  logic [N_SLICE-1:0][FW-1:0]  ef_sd, ef_rd;
  logic [N_SLICE-1:0]          ei_sv, ei_sr, ei_rv, ei_rr;
  logic [N_SLICE-1:0][FW-1:0]  ei_sd, ei_rd;


  sns_config_manager #(.N(N_SLICE)) u_cfg (
    .clk, .rst_n,
    .cfg_we, .cfg_slice, .cfg_stage, .cfg_phys, .cfg_active,
    .fd_sel, .di_sel, .ie_sel, .ef_sel, .ei_sel,
    .fd_en, .di_en, .ie_en, .ef_en, .ei_en,
    .fetch_run, .conflict(cfg_conflict));

  sns_xbar #(.N(N_SLICE), .W(FW)) u_xb_fd (.clk, .rst_n, .sel(fd_sel), .en(fd_en),
    .in_valid(fd_sv), .in_ready(fd_sr), .in_data(fd_sd),
    .out_valid(fd_rv), .out_ready(fd_rr), .out_data(fd_rd));
  sns_xbar #(.N(N_SLICE), .W(FW)) u_xb_di (.clk, .rst_n, .sel(di_sel), .en(di_en),
    .in_valid(di_sv), .in_ready(di_sr), .in_data(di_sd),
    .out_valid(di_rv), .out_ready(di_rr), .out_data(di_rd));
  sns_xbar #(.N(N_SLICE), .W(FW)) u_xb_ie (.clk, .rst_n, .sel(ie_sel), .en(ie_en),
    .in_valid(ie_sv), .in_ready(ie_sr), .in_data(ie_sd),
    .out_valid(ie_rv), .out_ready(ie_rr), .out_data(ie_rd));
  sns_xbar #(.N(N_SLICE), .W(FW)) u_xb_ef (.clk, .rst_n, .sel(ef_sel), .en(ef_en),
    .in_valid(ef_sv), .in_ready(ef_sr), .in_data(ef_sd),
    .out_valid(ef_rv), .out_ready(ef_rr), .out_data(ef_rd));
  sns_xbar #(.N(N_SLICE), .W(FW)) u_xb_ei (.clk, .rst_n, .sel(ei_sel), .en(ei_en),
    .in_valid(ei_sv), .in_ready(ei_sr), .in_data(ei_sd),
    .out_valid(ei_rv), .out_ready(ei_rr), .out_data(ei_rd));

  for (genvar p = 0; p < N_SLICE; p++) begin : g_stage
    sns_fetch #(.CH_W(CH_W), .HIST_W(HIST_W)) u_fetch (
      .clk, .rst_n, .run(fetch_run[p]),
      .imem_req_valid(imem_req_valid[p]), .imem_req_ready(imem_req_ready[p]),
      .imem_req_addr(imem_req_addr[p]),
      .imem_resp_valid(imem_resp_valid[p]), .imem_resp_data(imem_resp_data[p]),
      .out_valid(fd_sv[p]), .out_ready(fd_sr[p]),
      .out_data(fd_sd[p][CH_W-1:0]), .out_last(fd_sd[p][CH_W]),
      .fb_valid(ef_rv[p]), .fb_ready(ef_rr[p]),
      .fb_data(ef_rd[p][CH_W-1:0]), .fb_last(ef_rd[p][CH_W]),
      .sid(fetch_sid[p]), .mispredicts(n_fetch_mis[p]));

    sns_decode #(.CH_W(CH_W)) u_decode (
      .clk, .rst_n,
      .in_valid(fd_rv[p]), .in_ready(fd_rr[p]),
      .in_data(fd_rd[p][CH_W-1:0]), .in_last(fd_rd[p][CH_W]),
      .out_valid(di_sv[p]), .out_ready(di_sr[p]),
      .out_data(di_sd[p][CH_W-1:0]), .out_last(di_sd[p][CH_W]),
      .sid(dec_sid[p]), .flushes(n_dec_flushes[p]));

    sns_issue #(.CH_W(CH_W), .BYP_DEPTH(BYP_DEPTH)) u_issue (
      .clk, .rst_n,
      .in_valid(di_rv[p]), .in_ready(di_rr[p]),
      .in_data(di_rd[p][CH_W-1:0]), .in_last(di_rd[p][CH_W]),
      .wb_valid(ei_rv[p]), .wb_ready(ei_rr[p]),
      .wb_data(ei_rd[p][CH_W-1:0]), .wb_last(ei_rd[p][CH_W]),
      .out_valid(ie_sv[p]), .out_ready(ie_sr[p]),
      .out_data(ie_sd[p][CH_W-1:0]), .out_last(ie_sd[p][CH_W]),
      .sid(iss_sid[p]), .last_sid(iss_last_sid[p]),
      .n_issued(n_issued[p]), .n_squashed(n_iss_squashed[p]),
      .n_dep_stalls(n_dep_stalls[p]), .n_byp_operands(n_byp_ops[p]), .n_wipes(n_wipes[p]));

    sns_exmem #(.CH_W(CH_W), .BYP_DEPTH(BYP_DEPTH)) u_exmem (
      .clk, .rst_n,
      .in_valid(ie_rv[p]), .in_ready(ie_rr[p]),
      .in_data(ie_rd[p][CH_W-1:0]), .in_last(ie_rd[p][CH_W]),
      .wb_valid(ei_sv[p]), .wb_ready(ei_sr[p]),
      .wb_data(ei_sd[p][CH_W-1:0]), .wb_last(ei_sd[p][CH_W]),
      .br_valid(ef_sv[p]), .br_ready(ef_sr[p]),
      .br_data(ef_sd[p][CH_W-1:0]), .br_last(ef_sd[p][CH_W]),
      .dmem_req_valid(dmem_req_valid[p]), .dmem_req_ready(dmem_req_ready[p]),
      .dmem_req_we(dmem_req_we[p]), .dmem_req_addr(dmem_req_addr[p]),
      .dmem_req_wdata(dmem_req_wdata[p]),
      .dmem_resp_valid(dmem_resp_valid[p]), .dmem_resp_rdata(dmem_resp_rdata[p]),
      .sid(ex_sid[p]), .halted(halted[p]),
      .n_mops(n_mops[p]), .n_ops(n_ops[p]), .n_squashed(n_ex_squashed[p]),
      .n_mispredicts(n_mispredicts[p]), .n_byp_hits(n_byp_hits[p]));
  end
endmodule
