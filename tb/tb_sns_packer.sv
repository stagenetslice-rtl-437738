// tb_sns_packer: checks macro-op assembly. Instruction groups are fed with
// their boundary hints; each produced macro-op is compared field by field
// with one written out here by hand: length, MID sequence, live-in list,
// live-out list and producers, and the renamed sources of every operation
// (zero, live-in index or earlier operation). Also checked: a branch
// closes a macro-op and records the branch information; a group that would
// need a fifth live-in is split; flush drops a partial macro-op.
module tb_sns_packer;
  import sns_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic flush = 0, in_valid = 0, in_ready, out_valid, out_ready = 1;
  dec_t in_dec;
  mop_t out_mop;

  sns_packer dut (.*);

  mop_t got [$];
  always @(posedge clk) if (rst_n && out_valid && out_ready) got.push_back(out_mop);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(logic [31:0] w, logic [31:0] pc = 0, bit sid = 0, bit pt = 0);
    fetch_msg_t f;
    f = '0; f.instr = w; f.pc = pc; f.sid = sid; f.pred_taken = pt; f.bp_idx = 16'h1234;
    @(negedge clk);
    in_dec = decode_instr(f); in_valid = 1;
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 0;
  endtask

  task automatic chk(string what, int g, int e);
    checks++;
    if (g != e) begin failures++; $display("FAIL %s got %0d exp %0d", what, g, e); end
  endtask

  function automatic mop_op_t opn(mop_t m, int i);
    return m.ops[MAX_OPS-1-i];
  endfunction

  initial begin
    mop_t m;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // group 1: r5 = r1 + r2; r6 = r5 - r1; r5 = r6 + 7 (end)
    feed(enc_r(OP_ADD, 5, 1, 2));
    feed(enc_r(OP_SUB, 6, 5, 1));
    feed(enc_i(OP_ADDI, 5, 6, 7, 1'b1));
    // group 2: two ops then a branch closes it
    feed(enc_i(OP_ADDI, 1, 1, -1));
    feed(enc_s(OP_BNE, 1, 0, -4), 32'h40, 1'b0, 1'b1);
    // group 3: needs five live-ins: split after 2 ops
    feed(enc_r(OP_ADD, 10, 1, 2));
    feed(enc_r(OP_ADD, 11, 3, 4));
    feed(enc_r(OP_ADD, 12, 7, 8, 1'b1));
    // partial group flushed, then a one-op group with sid 1
    feed(enc_r(OP_ADD, 13, 1, 2));
    @(negedge clk) flush = 1;
    @(negedge clk) flush = 0;
    feed(enc_j(OP_HALT, 0, 0), 0, 1'b1);
    repeat (5) @(posedge clk);

    chk("count", got.size(), 5);
    m = got[0];
    chk("g1 len", m.len, 3); chk("g1 mid", m.mid, 0); chk("g1 nli", m.nli, 2);
    chk("g1 li0", m.li_reg[0], 1); chk("g1 li1", m.li_reg[1], 2);
    chk("g1 nlo", m.nlo, 2);
    chk("g1 lo0", m.lo_reg[0], 5); chk("g1 lo0 op", m.lo_op[0], 2);
    chk("g1 lo1", m.lo_reg[1], 6); chk("g1 lo1 op", m.lo_op[1], 1);
    chk("g1 op1 src1 kind", opn(m, 1).src1.kind, SRC_OP);
    chk("g1 op1 src1 idx", opn(m, 1).src1.idx, 0);
    chk("g1 op1 src2 kind", opn(m, 1).src2.kind, SRC_LIVEIN);
    chk("g1 op1 src2 idx", opn(m, 1).src2.idx, 0);
    chk("g1 op2 src1", opn(m, 2).src1.idx, 1);
    chk("g1 op2 imm", int'(opn(m, 2).imm), 7);
    chk("g1 op0 opc", opn(m, 0).opc, OP_ADD);
    chk("g1 is_br", m.br.is_br, 0);
    m = got[1];
    chk("g2 mid", m.mid, 1); chk("g2 len", m.len, 2); chk("g2 is_br", m.br.is_br, 1);
    chk("g2 pc", m.br.pc, 32'h40); chk("g2 pt", m.br.pred_taken, 1); chk("g2 nli", m.nli, 1);
    chk("g2 br src1", opn(m, 1).src1.kind, SRC_OP); chk("g2 br src2", opn(m, 1).src2.kind, SRC_ZERO);
    chk("g2 nlo", m.nlo, 1);
    chk("g2 addi imm", int'(opn(m, 0).imm), 19'h7ffff);
    chk("g2 br off", int'(opn(m, 1).imm), 19'h7fffc);
    m = got[2];
    chk("g3a len", m.len, 2); chk("g3a nli", m.nli, 4); chk("g3a mid", m.mid, 2);
    m = got[3];
    chk("g3b len", m.len, 1); chk("g3b nli", m.nli, 2); chk("g3b li0", m.li_reg[0], 7);
    m = got[4];
    chk("g4 len", m.len, 1); chk("g4 sid", m.sid, 1); chk("g4 opc", opn(m, 0).opc, OP_HALT);
    chk("g4 mid", m.mid, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
