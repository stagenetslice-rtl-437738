// sns_packer: macro-op assembler of the decode stage.
//
// Takes decoded instructions one per cycle and groups them into macro-ops.
// Boundaries come from the compiler hint bit of each instruction; a
// control-transfer instruction (branch, jump, HALT) always ends its
// macro-op, and if adding an instruction would exceed MAX_OPS operations,
// MAX_LI live-ins or MAX_LO live-outs the current macro-op is closed first
// (a safety net: the compiler already keeps to these limits).
// For each instruction the packer renames its sources: register r0 reads
// zero, a register written by an earlier operation of the same macro-op
// points at that operation, any other register becomes (or reuses) a
// live-in entry. Its destination becomes a live-out entry, or replaces the
// producer of an existing one. Each macro-op gets the next macro-op id
// (MID) and the stream id of its instructions; a final branch fills in the
// branch information. flush drops a partly built macro-op.
// The macro-op contents, the MID, the hint-driven boundaries and the
// live-in/live-out limits follow the document; the renaming procedure and
// the closing rules are this design's.
// Output: a registered macro-op with valid/ready; one instruction is taken
// per cycle unless the output register is full when a macro-op closes.
module sns_packer
  import sns_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flush,
  input  logic  in_valid,
  output logic  in_ready,
  input  dec_t  in_dec,
  output logic  out_valid,
  input  logic  out_ready,
  output mop_t  out_mop
);
  mop_t             cur_q, nxt;
  logic             open_q;
  logic [MID_W-1:0] mid_q;
  logic             can_emit;
  logic             fits, closes;
  int               new_li, new_lo;
  logic             f1_lo, f1_li, f2_lo, f2_li, fd_lo;
  int               j1_lo, j1_li, j2_lo, j2_li, jd_lo;
  mop_t             base;
  src_t             s1, s2;
  mop_op_t          op;

  assign can_emit = !out_valid || out_ready;
  assign closes   = in_dec.end_hint || is_ctrl(in_dec.opc);

  always_comb begin
    // start from the open macro-op or from a fresh one
    if (open_q) base = cur_q;
    else begin
      base     = '0;
      base.mid = mid_q;
      base.sid = in_dec.sid;
    end
    f1_lo = 1'b0; f1_li = 1'b0; f2_lo = 1'b0; f2_li = 1'b0; fd_lo = 1'b0;
    j1_lo = 0; j1_li = 0; j2_lo = 0; j2_li = 0; jd_lo = 0;
    for (int j = 0; j < MAX_LO; j++) begin
      if (j < int'(base.nlo) && base.lo_reg[j] == in_dec.rs1) begin f1_lo = 1'b1; j1_lo = j; end
      if (j < int'(base.nlo) && base.lo_reg[j] == in_dec.rs2) begin f2_lo = 1'b1; j2_lo = j; end
      if (j < int'(base.nlo) && base.lo_reg[j] == in_dec.rd)  begin fd_lo = 1'b1; jd_lo = j; end
    end
    for (int j = 0; j < MAX_LI; j++) begin
      if (j < int'(base.nli) && base.li_reg[j] == in_dec.rs1) begin f1_li = 1'b1; j1_li = j; end
      if (j < int'(base.nli) && base.li_reg[j] == in_dec.rs2) begin f2_li = 1'b1; j2_li = j; end
    end
    new_li = 0;
    if (in_dec.rs1 != '0 && !f1_lo && !f1_li) new_li++;
    if (in_dec.rs2 != '0 && !f2_lo && !f2_li && in_dec.rs2 != in_dec.rs1) new_li++;
    new_lo = (in_dec.has_rd && !fd_lo) ? 1 : 0;
    fits = (int'(base.len) < MAX_OPS) && (int'(base.nli) + new_li <= MAX_LI)
           && (int'(base.nlo) + new_lo <= MAX_LO);

    // append the instruction
    nxt = base;
    s1  = '{kind: SRC_ZERO, idx: '0};
    s2  = '{kind: SRC_ZERO, idx: '0};
    if (in_dec.rs1 != '0) begin
      if (f1_lo)      s1 = '{kind: SRC_OP,     idx: base.lo_op[j1_lo]};
      else if (f1_li) s1 = '{kind: SRC_LIVEIN, idx: 3'(j1_li)};
      else begin
        s1 = '{kind: SRC_LIVEIN, idx: nxt.nli};
        nxt.li_reg[nxt.nli[1:0]] = in_dec.rs1;
        nxt.nli = nxt.nli + 3'd1;
      end
    end
    if (in_dec.rs2 != '0) begin
      if (in_dec.rs2 == in_dec.rs1) s2 = s1;
      else if (f2_lo)               s2 = '{kind: SRC_OP,     idx: base.lo_op[j2_lo]};
      else if (f2_li)               s2 = '{kind: SRC_LIVEIN, idx: 3'(j2_li)};
      else begin
        s2 = '{kind: SRC_LIVEIN, idx: nxt.nli};
        nxt.li_reg[nxt.nli[1:0]] = in_dec.rs2;
        nxt.nli = nxt.nli + 3'd1;
      end
    end
    op = '{opc: in_dec.opc, src1: s1, src2: s2, imm: in_dec.imm};
    nxt.ops[MAX_OPS-1-int'(base.len[2:0])] = op;
    if (in_dec.has_rd) begin
      if (fd_lo) nxt.lo_op[jd_lo] = base.len[2:0];
      else begin
        nxt.lo_reg[nxt.nlo[1:0]] = in_dec.rd;
        nxt.lo_op[nxt.nlo[1:0]]  = base.len[2:0];
        nxt.nlo = nxt.nlo + 3'd1;
      end
    end
    nxt.len = base.len + 4'd1;
    if (is_ctrl(in_dec.opc) && in_dec.opc != OP_HALT) begin
      nxt.br.is_br      = 1'b1;
      nxt.br.pred_taken = in_dec.pred_taken;
      nxt.br.bp_idx     = in_dec.bp_idx;
      nxt.br.pc         = in_dec.pc;
    end
  end

  always_comb begin
    in_ready = 1'b0;
    if (!flush) begin
      if (open_q && !fits) in_ready = 1'b0;
      else if (closes)     in_ready = can_emit;
      else                 in_ready = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q     <= '0;
      open_q    <= 1'b0;
      mid_q     <= '0;
      out_valid <= 1'b0;
      out_mop   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (flush) begin
        open_q <= 1'b0;
      end else if (in_valid) begin
        if (open_q && !fits) begin
          if (can_emit) begin
            out_mop   <= cur_q;
            out_valid <= 1'b1;
            open_q    <= 1'b0;
            mid_q     <= mid_q + 1'b1;
          end
        end else if (closes) begin
          if (can_emit) begin
            out_mop   <= nxt;
            out_valid <= 1'b1;
            open_q    <= 1'b0;
            mid_q     <= mid_q + 1'b1;
          end
        end else begin
          cur_q  <= nxt;
          open_q <= 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid |-> (out_mop.len >= 1 && int'(out_mop.len) <= MAX_OPS));
endmodule
