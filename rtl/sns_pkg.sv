// sns_pkg: types and constants shared by the StageNetSlice (SNS) stages.
//
// The SNS is a four-stage in-order pipeline (fetch, decode, issue,
// execute/memory) whose stages talk only through crossbar switches. Every
// inter-stage transfer is one of four messages defined here:
//   fetch_msg_t  fetch  -> decode   one instruction stamped with its stream id
//   mop_t        decode -> issue    a macro-op (decode fills structure,
//                issue -> exmem     issue fills live-in values)
//   wb_msg_t     exmem  -> issue    register writeback of a macro-op's live-outs
//   br_msg_t     exmem  -> fetch    branch resolution / mispredict redirect
// The macro-op layout follows the document's macro-op figure: MID, length,
// branch information, stream id, a list of operations whose sources name a
// live-in or an earlier operation, a live-in list and a live-out list.
// The instruction set is this design's own (the document's compiler target
// is not specified at bit level): 32-bit words, 64 registers, bit 31 is the
// compiler's "macro-op ends here" hint.
package sns_pkg;

  localparam int XLEN      = 32;
  localparam int NREGS     = 64;
  localparam int REG_W     = 6;
  localparam int MAX_OPS   = 8;   // operations per macro-op
  localparam int MAX_LI    = 4;   // live-ins per macro-op
  localparam int MAX_LO    = 4;   // live-outs per macro-op
  localparam int MID_W     = 8;
  localparam int WID_W     = 8;   // destination (write) id, see scoreboard
  localparam int BP_IDX_W  = 16;  // gshare index width = history length
  localparam int IMM_W     = 19;

  typedef enum logic [5:0] {
    OP_NOP  = 6'd0,
    OP_ADD  = 6'd1,  OP_SUB  = 6'd2,  OP_AND  = 6'd3,  OP_OR   = 6'd4,
    OP_XOR  = 6'd5,  OP_SLL  = 6'd6,  OP_SRL  = 6'd7,  OP_SRA  = 6'd8,
    OP_SLT  = 6'd9,  OP_SLTU = 6'd10, OP_MUL  = 6'd11,
    OP_ADDI = 6'd12, OP_ANDI = 6'd13, OP_ORI  = 6'd14, OP_XORI = 6'd15,
    OP_SLTI = 6'd16, OP_SLLI = 6'd17, OP_SRLI = 6'd18, OP_LUI  = 6'd19,
    OP_LW   = 6'd20, OP_SW   = 6'd21,
    OP_BEQ  = 6'd22, OP_BNE  = 6'd23, OP_BLT  = 6'd24, OP_BGE  = 6'd25,
    OP_JAL  = 6'd26, OP_JALR = 6'd27,
    OP_HALT = 6'd63
  } opcode_e;

  // Operand source of a macro-op operation.
  typedef enum logic [1:0] {
    SRC_ZERO  = 2'd0,   // constant zero (register r0 or unused)
    SRC_LIVEIN = 2'd1,  // entry idx of the live-in list
    SRC_OP    = 2'd2    // result of earlier operation idx
  } src_kind_e;

  typedef struct packed {
    src_kind_e  kind;
    logic [2:0] idx;
  } src_t;

  typedef struct packed {
    opcode_e            opc;
    src_t               src1;
    src_t               src2;
    logic [IMM_W-1:0]   imm;   // sign-extended immediate / word offset
  } mop_op_t;

  typedef struct packed {
    logic                 is_br;      // last op is a branch or jump
    logic                 pred_taken;
    logic [BP_IDX_W-1:0]  bp_idx;
    logic [XLEN-1:0]      pc;         // pc of the branch
  } br_info_t;

  // Macro-op. Fixed fields first (most significant), then the live-in
  // values, then the operations with op 0 at the most significant end.
  // On a link it travels in the compact form built by mop_pack below.
  typedef struct packed {
    logic [MID_W-1:0]              mid;
    logic [3:0]                    len;        // number of ops, 1..MAX_OPS
    logic                          sid;
    br_info_t                      br;
    logic [2:0]                    nli;
    logic [MAX_LI-1:0][REG_W-1:0]  li_reg;
    logic [MAX_LI-1:0]             li_byp;     // set by issue: read from bypass cache
    logic [2:0]                    nlo;
    logic [MAX_LO-1:0][REG_W-1:0]  lo_reg;
    logic [MAX_LO-1:0][2:0]        lo_op;      // op producing live-out j
    logic [WID_W-1:0]              base_wid;   // set by issue
    logic [MAX_LI-1:0][XLEN-1:0]   li_val;     // set by issue: register-file value
    mop_op_t [MAX_OPS-1:0]         ops;        // op i stored at ops[MAX_OPS-1-i]
  } mop_t;

  localparam int OP_W      = $bits(mop_op_t);
  localparam int MOP_W     = $bits(mop_t);
  // fixed part of a macro-op: everything ahead of the live-in values
  localparam int MOP_FIX_W = MOP_W - MAX_LI * XLEN - MAX_OPS * OP_W;

  typedef struct packed {
    logic                 sid;
    logic                 pred_taken;
    logic [BP_IDX_W-1:0]  bp_idx;
    logic [XLEN-1:0]      pc;
    logic [XLEN-1:0]      instr;
  } fetch_msg_t;

  typedef struct packed {
    logic                          sid;        // stream id after this macro-op
    logic                          mispredict;
    logic [MID_W-1:0]              mid;
    logic [WID_W-1:0]              base_wid;
    logic [2:0]                    nlo;
    logic [MAX_LO-1:0][REG_W-1:0]  lo_reg;
    logic [MAX_LO-1:0][XLEN-1:0]   lo_val;
  } wb_msg_t;

  typedef struct packed {
    logic                 sid;         // exmem stream id after resolution
    logic                 mispredict;
    logic                 is_cond;     // conditional branch: train predictor
    logic                 taken;
    logic [BP_IDX_W-1:0]  bp_idx;
    logic [XLEN-1:0]      redirect_pc; // correct next pc
  } br_msg_t;

  localparam int FMSG_W  = $bits(fetch_msg_t);
  localparam int WBMSG_W = $bits(wb_msg_t);
  localparam int BRMSG_W = $bits(br_msg_t);


  // ---- macro-op wire format ----
  // On a link a macro-op is sent as: fixed part, then only the live-in
  // values that travel (with_vals set and live-in j not flagged "from
  // bypass"), packed together, then its len operations; the rest of the
  // message is not sent. Decode sends no values (issue has not read
  // them yet); issue sends only register-file values, so operands the
  // bypass cache will supply cost no wire bits.
  function automatic logic mop_val_sent(input mop_t m, input logic with_vals, input int j);
    return with_vals && (j < int'(m.nli)) && !m.li_byp[j];
  endfunction

  function automatic int mop_bits(input mop_t m, input logic with_vals);
    int bits;
    bits = MOP_FIX_W + int'(m.len) * OP_W;
    for (int j = 0; j < MAX_LI; j++)
      if (mop_val_sent(m, with_vals, j)) bits += XLEN;
    return bits;
  endfunction

  // Number of channel flits needed to carry macro-op m.
  function automatic int mop_flits(input mop_t m, input logic with_vals, input int ch_w);
    return (mop_bits(m, with_vals) + ch_w - 1) / ch_w;
  endfunction

  function automatic logic [MOP_W-1:0] mop_pack(input mop_t m, input logic with_vals);
    logic [MOP_W-1:0] acc;
    acc = MOP_W'(m[MOP_W-1 -: MOP_FIX_W]);
    for (int j = 0; j < MAX_LI; j++)
      if (mop_val_sent(m, with_vals, j)) acc = (acc << XLEN) | MOP_W'(m.li_val[j]);
    for (int i = 0; i < MAX_OPS; i++)
      if (i < int'(m.len)) acc = (acc << OP_W) | MOP_W'(m.ops[MAX_OPS-1-i]);
    return acc << (MOP_W - mop_bits(m, with_vals));
  endfunction

  function automatic mop_t mop_unpack(input logic [MOP_W-1:0] w, input logic with_vals);
    mop_t m;
    logic [MOP_W-1:0] rest;
    m = mop_t'({w[MOP_W-1 -: MOP_FIX_W], {(MOP_W - MOP_FIX_W){1'b0}}});
    rest = w << MOP_FIX_W;
    for (int j = 0; j < MAX_LI; j++)
      if (mop_val_sent(m, with_vals, j)) begin
        m.li_val[j] = rest[MOP_W-1 -: XLEN];
        rest = rest << XLEN;
      end
    for (int i = 0; i < MAX_OPS; i++)
      if (i < int'(m.len)) begin
        m.ops[MAX_OPS-1-i] = rest[MOP_W-1 -: OP_W];
        rest = rest << OP_W;
      end
    return m;
  endfunction

  function automatic int ceil_div(input int a, input int b);
    return (a + b - 1) / b;
  endfunction

  // ---- instruction field extraction (this design's encoding) ----
  function automatic opcode_e i_opc(input logic [31:0] w);
    return opcode_e'(w[30:25]);
  endfunction
  function automatic logic [REG_W-1:0] i_rd (input logic [31:0] w); return w[24:19]; endfunction
  function automatic logic [REG_W-1:0] i_rs1(input logic [31:0] w); return w[18:13]; endfunction
  function automatic logic [REG_W-1:0] i_rs2(input logic [31:0] w); return w[12:7];  endfunction
  // 13-bit offset of stores and branches, split around rs2
  function automatic logic [12:0] i_off13(input logic [31:0] w); return {w[24:19], w[6:0]}; endfunction

  function automatic logic is_ctrl(input opcode_e o);
    return o inside {OP_BEQ, OP_BNE, OP_BLT, OP_BGE, OP_JAL, OP_JALR, OP_HALT};
  endfunction
  function automatic logic is_cond(input opcode_e o);
    return o inside {OP_BEQ, OP_BNE, OP_BLT, OP_BGE};
  endfunction

  // Instruction encoders, used by testbenches to build programs.
  function automatic logic [31:0] enc_r(input opcode_e o, input int rd, input int rs1, input int rs2,
                                        input logic e = 1'b0);
    return {e, 6'(o), 6'(rd), 6'(rs1), 6'(rs2), 7'd0};
  endfunction
  function automatic logic [31:0] enc_i(input opcode_e o, input int rd, input int rs1, input int imm,
                                        input logic e = 1'b0);
    return {e, 6'(o), 6'(rd), 6'(rs1), 13'(imm)};
  endfunction
  function automatic logic [31:0] enc_s(input opcode_e o, input int rs1, input int rs2, input int off,
                                        input logic e = 1'b0);
    logic [12:0] f;
    f = 13'(off);
    return {e, 6'(o), f[12:7], 6'(rs1), 6'(rs2), f[6:0]};
  endfunction
  function automatic logic [31:0] enc_j(input opcode_e o, input int rd, input int imm,
                                        input logic e = 1'b0);
    return {e, 6'(o), 6'(rd), 19'(imm)};
  endfunction

  // Decoded instruction handed from the decoder logic to the packer.
  typedef struct packed {
    opcode_e             opc;
    logic                has_rd;
    logic [REG_W-1:0]    rd;
    logic                use1;
    logic [REG_W-1:0]    rs1;
    logic                use2;
    logic [REG_W-1:0]    rs2;
    logic [IMM_W-1:0]    imm;
    logic                end_hint;
    logic                sid;
    logic                pred_taken;
    logic [BP_IDX_W-1:0] bp_idx;
    logic [XLEN-1:0]     pc;
  } dec_t;

  // Decoder logic: instruction word -> register use and immediate.
  function automatic dec_t decode_instr(input fetch_msg_t f);
    dec_t d;
    logic [31:0] w;
    w = f.instr;
    d = '0;
    d.opc        = i_opc(w);
    d.rd         = i_rd(w);
    d.rs1        = i_rs1(w);
    d.rs2        = i_rs2(w);
    d.end_hint   = w[31];
    d.sid        = f.sid;
    d.pred_taken = f.pred_taken;
    d.bp_idx     = f.bp_idx;
    d.pc         = f.pc;
    case (d.opc)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SRA,
      OP_SLT, OP_SLTU, OP_MUL: begin
        d.has_rd = 1'b1; d.use1 = 1'b1; d.use2 = 1'b1;
      end
      OP_ADDI, OP_ANDI, OP_ORI, OP_XORI, OP_SLTI, OP_SLLI, OP_SRLI, OP_LW, OP_JALR: begin
        d.has_rd = 1'b1; d.use1 = 1'b1;
        d.imm    = {{6{w[12]}}, w[12:0]};
      end
      OP_LUI: begin
        d.has_rd = 1'b1;
        d.imm    = w[18:0];
      end
      OP_SW, OP_BEQ, OP_BNE, OP_BLT, OP_BGE: begin
        d.use1 = 1'b1; d.use2 = 1'b1;
        d.imm  = {{6{w[24]}}, i_off13(w)};
      end
      OP_JAL: begin
        d.has_rd = 1'b1;
        d.imm    = w[18:0];
      end
      default: ;
    endcase
    if (d.rd == '0)  d.has_rd = 1'b0;
    if (!d.use1)     d.rs1 = '0;
    if (!d.use2)     d.rs2 = '0;
    return d;
  endfunction

endpackage
