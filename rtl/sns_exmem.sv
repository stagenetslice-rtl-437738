// sns_exmem: execute/memory stage of a StageNetSlice.
//
// Takes issued macro-ops from a double-buffered input link. A macro-op
// whose stream id differs from the stage's sid register is on a
// mispredicted path and is squashed. Otherwise the Ex/Mem controller
// first resolves the live-ins (register-file values sent by issue, or the
// newest entry of the bypass cache for those flagged "from bypass") and
// then steps through the operations one per cycle with its op counter,
// keeping each result for later operations of the same macro-op. Loads and
// stores wait for the data-memory port. The last operation may be a branch
// or jump: its outcome is compared with the fetch-time prediction and, on
// a mispredict, the sid register is toggled and the macro-op's stream id
// with it. When all operations are done the live-outs are written into the
// bypass cache, sent to issue as a writeback (also sent, with no
// live-outs, for a mispredicted branch so that issue learns the new
// stream id), and a branch sends its resolution to fetch.
// HALT stops the stage once its macro-op has completed; halted goes high.
// Data-memory port: request valid/ready with write enable, word address
// and data; every accepted request (load or store) is answered by one
// dmem_resp_valid pulse, carrying read data for a load.
// The squash rule, sid toggling, the op-by-op controller and the bypass
// cache are the document's; the instruction semantics, the memory port and
// the writeback of mispredicted branches without live-outs are this
// design's.
module sns_exmem
  import sns_pkg::*;
#(
  parameter int CH_W      = 64,
  parameter int BYP_DEPTH = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  // macro-ops from issue
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [CH_W-1:0]  in_data,
  input  logic             in_last,
  // writeback to issue
  output logic             wb_valid,
  input  logic             wb_ready,
  output logic [CH_W-1:0]  wb_data,
  output logic             wb_last,
  // branch resolution to fetch
  output logic             br_valid,
  input  logic             br_ready,
  output logic [CH_W-1:0]  br_data,
  output logic             br_last,
  // data memory
  output logic             dmem_req_valid,
  input  logic             dmem_req_ready,
  output logic             dmem_req_we,
  output logic [31:0]      dmem_req_addr,
  output logic [31:0]      dmem_req_wdata,
  input  logic             dmem_resp_valid,
  input  logic [31:0]      dmem_resp_rdata,
  // status
  output logic             sid,
  output logic             halted,
  output logic [31:0]      n_mops,
  output logic [31:0]      n_ops,
  output logic [31:0]      n_squashed,
  output logic [31:0]      n_mispredicts,
  output logic [31:0]      n_byp_hits
);
  localparam int WNF   = ceil_div(WBMSG_W, CH_W);
  localparam int WNF_W = $clog2(WNF + 1);
  localparam int BNF   = ceil_div(BRMSG_W, CH_W);
  localparam int BNF_W = $clog2(BNF + 1);

  typedef enum logic [2:0] {S_IDLE, S_EXEC, S_MEM_WAIT, S_FINISH, S_HALT} state_e;

  state_e            state_q;
  logic              m_valid, m_ready;
  logic [MOP_W-1:0]  m_raw;
  mop_t              m;
  logic              sid_q;
  logic [2:0]        op_idx_q;
  logic [MAX_LI-1:0][XLEN-1:0]  li_q;
  logic [MAX_OPS-1:0][XLEN-1:0] res_q;
  logic [MAX_LI-1:0]            byp_hit;
  logic [MAX_LI-1:0][XLEN-1:0]  byp_val;
  logic              mis_q, taken_q, halt_q;
  logic [XLEN-1:0]   redirect_q;
  logic              wtx_ready, btx_ready, need_wb, need_br, fin_ok;
  wb_msg_t           wmsg;
  br_msg_t           bmsg;
  logic [MAX_LO-1:0][XLEN-1:0]  lo_val;

  mop_op_t           op;
  logic [XLEN-1:0]   a, b, alu, sext_imm, tgt, link;
  logic              taken, is_mem, last_op;

  sns_link_rx #(.MSG_W(MOP_W), .CH_W(CH_W)) u_rx (
    .clk, .rst_n,
    .flit_valid(in_valid), .flit_ready(in_ready), .flit_data(in_data), .flit_last(in_last),
    .msg_valid(m_valid), .msg_ready(m_ready), .msg(m_raw));
  assign m = mop_unpack(m_raw, 1'b1);

  sns_bypass_cache #(.DEPTH(BYP_DEPTH), .AW(REG_W), .XLEN(XLEN), .NINS(MAX_LO), .NQ(MAX_LI)) u_byp (
    .clk, .rst_n,
    .ins(state_q == S_FINISH && fin_ok), .ins_n(m.nlo), .ins_reg(m.lo_reg), .ins_val(lo_val),
    .q_reg(m.li_reg), .q_hit(byp_hit), .q_val(byp_val));

  function automatic logic [XLEN-1:0] src_val(input src_t s,
                                              input logic [MAX_LI-1:0][XLEN-1:0] li,
                                              input logic [MAX_OPS-1:0][XLEN-1:0] res);
    case (s.kind)
      SRC_LIVEIN: return li[s.idx[1:0]];
      SRC_OP:     return res[s.idx];
      default:    return '0;
    endcase
  endfunction

  // ---- current operation ----
  always_comb begin
    op       = m.ops[MAX_OPS-1-int'(op_idx_q)];
    a        = src_val(op.src1, li_q, res_q);
    b        = src_val(op.src2, li_q, res_q);
    sext_imm = {{(XLEN-IMM_W){op.imm[IMM_W-1]}}, op.imm};
    link     = m.br.pc + 32'd4;
    tgt      = m.br.pc + (sext_imm << 2);
    taken    = 1'b0;
    alu      = '0;
    case (op.opc)
      OP_ADD:  alu = a + b;
      OP_SUB:  alu = a - b;
      OP_AND:  alu = a & b;
      OP_OR:   alu = a | b;
      OP_XOR:  alu = a ^ b;
      OP_SLL:  alu = a << b[4:0];
      OP_SRL:  alu = a >> b[4:0];
      OP_SRA:  alu = $signed(a) >>> b[4:0];
      OP_SLT:  alu = {31'd0, $signed(a) < $signed(b)};
      OP_SLTU: alu = {31'd0, a < b};
      OP_MUL:  alu = a * b;
      OP_ADDI: alu = a + sext_imm;
      OP_ANDI: alu = a & sext_imm;
      OP_ORI:  alu = a | sext_imm;
      OP_XORI: alu = a ^ sext_imm;
      OP_SLTI: alu = {31'd0, $signed(a) < $signed(sext_imm)};
      OP_SLLI: alu = a << op.imm[4:0];
      OP_SRLI: alu = a >> op.imm[4:0];
      OP_LUI:  alu = {op.imm, 13'd0};
      OP_BEQ:  taken = (a == b);
      OP_BNE:  taken = (a != b);
      OP_BLT:  taken = ($signed(a) < $signed(b));
      OP_BGE:  taken = ($signed(a) >= $signed(b));
      OP_JAL:  begin taken = 1'b1; alu = link; end
      OP_JALR: begin taken = 1'b1; alu = link; tgt = (a + sext_imm) & ~32'd3; end
      default: ;
    endcase
    is_mem  = (op.opc == OP_LW) || (op.opc == OP_SW);
    last_op = (op_idx_q + 3'd1 == m.len[2:0]) || (m.len == 4'(MAX_OPS) && op_idx_q == 3'(MAX_OPS - 1));
  end

  assign dmem_req_valid = (state_q == S_EXEC) && is_mem;
  assign dmem_req_we    = (op.opc == OP_SW);
  assign dmem_req_addr  = a + sext_imm;
  assign dmem_req_wdata = b;

  // ---- completion: writeback, branch resolution, bypass insert ----
  always_comb begin
    for (int j = 0; j < MAX_LO; j++) lo_val[j] = res_q[m.lo_op[j]];
    need_wb = (m.nlo != '0) || mis_q;
    need_br = m.br.is_br;
    fin_ok  = (!need_wb || wtx_ready) && (!need_br || btx_ready);
    wmsg            = '0;
    wmsg.sid        = sid_q ^ mis_q;
    wmsg.mispredict = mis_q;
    wmsg.mid        = m.mid;
    wmsg.base_wid   = m.base_wid;
    wmsg.nlo        = m.nlo;
    wmsg.lo_reg     = m.lo_reg;
    for (int j = 0; j < MAX_LO; j++) wmsg.lo_val[j] = (j < int'(m.nlo)) ? lo_val[j] : '0;
    bmsg             = '0;
    bmsg.sid         = sid_q ^ mis_q;
    bmsg.mispredict  = mis_q;
    bmsg.is_cond     = is_cond(m.ops[MAX_OPS-int'(m.len)].opc);
    bmsg.taken       = taken_q;
    bmsg.bp_idx      = m.br.bp_idx;
    bmsg.redirect_pc = redirect_q;
  end

  sns_link_tx #(.MSG_W(WBMSG_W), .CH_W(CH_W)) u_tx_wb (
    .clk, .rst_n,
    .push_valid(state_q == S_FINISH && fin_ok && need_wb), .push_ready(wtx_ready),
    .push_msg(wmsg), .push_nflits(WNF_W'(WNF)),
    .flit_valid(wb_valid), .flit_ready(wb_ready), .flit_data(wb_data), .flit_last(wb_last));

  sns_link_tx #(.MSG_W(BRMSG_W), .CH_W(CH_W)) u_tx_br (
    .clk, .rst_n,
    .push_valid(state_q == S_FINISH && fin_ok && need_br), .push_ready(btx_ready),
    .push_msg(bmsg), .push_nflits(BNF_W'(BNF)),
    .flit_valid(br_valid), .flit_ready(br_ready), .flit_data(br_data), .flit_last(br_last));

  assign m_ready = (state_q == S_IDLE && m_valid && m.sid != sid_q)
                || (state_q == S_FINISH && fin_ok);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= S_IDLE;
      sid_q         <= 1'b0;
      op_idx_q      <= '0;
      li_q          <= '0;
      res_q         <= '0;
      mis_q         <= 1'b0;
      taken_q       <= 1'b0;
      halt_q        <= 1'b0;
      redirect_q    <= '0;
      n_mops        <= '0;
      n_ops         <= '0;
      n_squashed    <= '0;
      n_mispredicts <= '0;
      n_byp_hits    <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (m_valid) begin
          if (m.sid != sid_q) begin
            n_squashed <= n_squashed + 1;
          end else begin
            for (int j = 0; j < MAX_LI; j++)
              li_q[j] <= m.li_byp[j] ? byp_val[j] : m.li_val[j];
            n_byp_hits <= n_byp_hits + 32'($countones(m.li_byp & byp_hit));
            op_idx_q <= '0;
            mis_q    <= 1'b0;
            taken_q  <= 1'b0;
            state_q  <= S_EXEC;
          end
        end
        S_EXEC: begin
          if (op.opc == OP_HALT) begin
            halt_q  <= 1'b1;
            n_ops   <= n_ops + 1;
            state_q <= S_FINISH;
          end else if (is_mem) begin
            if (dmem_req_ready) state_q <= S_MEM_WAIT;
          end else begin
            res_q[op_idx_q] <= alu;
            n_ops <= n_ops + 1;
            if (is_ctrl(op.opc)) begin
              taken_q    <= taken;
              redirect_q <= taken ? tgt : link;
              mis_q      <= (taken != m.br.pred_taken);
            end
            if (last_op) state_q <= S_FINISH;
            else         op_idx_q <= op_idx_q + 3'd1;
          end
        end
        S_MEM_WAIT: if (dmem_resp_valid) begin
          res_q[op_idx_q] <= dmem_resp_rdata;
          n_ops <= n_ops + 1;
          if (last_op) state_q <= S_FINISH;
          else begin
            op_idx_q <= op_idx_q + 3'd1;
            state_q  <= S_EXEC;
          end
        end
        S_FINISH: if (fin_ok) begin
          if (mis_q) begin
            sid_q         <= ~sid_q;
            n_mispredicts <= n_mispredicts + 1;
          end
          n_mops  <= n_mops + 1;
          state_q <= halt_q ? S_HALT : S_IDLE;
        end
        default: ;  // S_HALT: stopped
      endcase
    end
  end

  assign sid    = sid_q;
  assign halted = (state_q == S_HALT);

  // an operand flagged "from bypass" must be found there
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state_q == S_IDLE && m_valid && m.sid == sid_q)
                   |-> ((m.li_byp & ~byp_hit) == '0));
endmodule
