// tb_sns_stagenet: end-to-end test of the StageNet array at its default
// size (five slices, 64-bit 5x5 crossbars, bypass depth 6, 16-bit gshare).
//
// Each physical stage column gets its own instruction and data memory
// (one-cycle response, request ready withdrawn at random to create memory
// stalls). Slices 0..3 each run a program built here from the instruction
// encoders: an array-sum loop with loads, multiplies and dependent
// arithmetic, a data-dependent branch loop that mispredicts, a call and
// return through JAL/JALR, stores of every result and HALT. Slice 4 is
// switched off and its decode stage is lent to slice 3, so slice 3's
// traffic crosses the switches sideways (reconfiguration around a stage).
// A small instruction-set interpreter in this file runs the same programs;
// the final data memories and the number of executed operations must
// match it. The test also counts how often each mechanism of the design
// happened (dependency stalls, bypass-cache operands, mispredicts and
// squashes, decode flushes, scoreboard wipes, multi-op macro-ops, memory
// back pressure) and fails if one never did.
module tb_sns_stagenet;
  import sns_pkg::*;

  localparam int N     = 5;
  localparam int IW    = 256;   // instruction words per memory
  localparam int DW    = 256;   // data words per memory
  localparam int SEL_W = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic             cfg_we = 1'b0;
  logic [SEL_W-1:0] cfg_slice = '0, cfg_phys = '0;
  logic [1:0]       cfg_stage = '0;
  logic             cfg_active = 1'b0;
  logic             cfg_conflict;

  logic [N-1:0]          imem_req_valid, imem_req_ready, imem_resp_valid;
  logic [N-1:0][31:0]    imem_req_addr, imem_resp_data;
  logic [N-1:0]          dmem_req_valid, dmem_req_ready, dmem_req_we, dmem_resp_valid;
  logic [N-1:0][31:0]    dmem_req_addr, dmem_req_wdata, dmem_resp_rdata;
  logic [N-1:0]          halted;
  logic [N-1:0][31:0]    n_mops, n_ops, n_mispredicts, n_ex_squashed, n_byp_hits, n_fetch_mis;
  logic [N-1:0][31:0]    n_dec_flushes, n_iss_squashed, n_dep_stalls, n_issued, n_byp_ops, n_wipes;
  logic [N-1:0]          fetch_sid, dec_sid, iss_sid, iss_last_sid, ex_sid;

  sns_stagenet dut (.*);

  // ---------------- memories ----------------
  logic [31:0] imem [N][IW];
  logic [31:0] dmem [N][DW];
  logic [31:0] ref_dmem [N][DW];
  int          mem_stall_cycles = 0;

  always_ff @(posedge clk) begin
    for (int p = 0; p < N; p++) begin
      imem_req_ready[p]  <= ($urandom_range(0, 7) != 0);
      dmem_req_ready[p]  <= ($urandom_range(0, 5) != 0);
      imem_resp_valid[p] <= imem_req_valid[p] && imem_req_ready[p];
      imem_resp_data[p]  <= imem[p][imem_req_addr[p][9:2]];
      dmem_resp_valid[p] <= dmem_req_valid[p] && dmem_req_ready[p];
      dmem_resp_rdata[p] <= dmem[p][dmem_req_addr[p][9:2]];
      if (dmem_req_valid[p] && dmem_req_ready[p] && dmem_req_we[p])
        dmem[p][dmem_req_addr[p][9:2]] <= dmem_req_wdata[p];
      if ((dmem_req_valid[p] && !dmem_req_ready[p]) || (imem_req_valid[p] && !imem_req_ready[p]))
        mem_stall_cycles++;
    end
  end

  // ---------------- program ----------------
  int pcw;
  task automatic emit(int s, logic [31:0] w);
    imem[s][pcw] = w;
    pcw++;
  endtask

  // Program of slice s; data array of n words at byte 64.
  task automatic build(int s, int n);
    int loop1, loop2, func, callsite;
    pcw = 0;
    for (int i = 0; i < IW; i++) imem[s][i] = enc_j(OP_HALT, 0, 0, 1'b1);
    // r1 = n, r2 = sum, r3 = pointer, r6 = xor of squares
    emit(s, enc_i(OP_ADDI, 1, 0, n));
    emit(s, enc_i(OP_ADDI, 2, 0, 0));
    emit(s, enc_i(OP_ADDI, 3, 0, 64, 1'b1));
    loop1 = pcw;
    emit(s, enc_i(OP_LW,   4, 3, 0));
    emit(s, enc_r(OP_ADD,  2, 2, 4));
    emit(s, enc_r(OP_MUL,  5, 4, 4));
    emit(s, enc_r(OP_XOR,  6, 6, 5));
    emit(s, enc_i(OP_ADDI, 3, 3, 4));
    emit(s, enc_i(OP_ADDI, 1, 1, -1));
    emit(s, enc_s(OP_BNE,  1, 0, loop1 - pcw, 1'b1));
    emit(s, enc_s(OP_SW,   0, 2, 0));
    emit(s, enc_s(OP_SW,   0, 6, 4, 1'b1));
    // count odd elements: data-dependent branch
    emit(s, enc_i(OP_ADDI, 1, 0, n));
    emit(s, enc_i(OP_ADDI, 3, 0, 64));
    emit(s, enc_i(OP_ADDI, 7, 0, 0, 1'b1));
    loop2 = pcw;
    emit(s, enc_i(OP_LW,   4, 3, 0));
    emit(s, enc_i(OP_ANDI, 8, 4, 1));
    emit(s, enc_s(OP_BEQ,  8, 0, 2, 1'b1));     // skip increment if even
    emit(s, enc_i(OP_ADDI, 7, 7, 1, 1'b1));
    emit(s, enc_i(OP_ADDI, 3, 3, 4));           // skip target
    emit(s, enc_i(OP_ADDI, 1, 1, -1));
    emit(s, enc_s(OP_BNE,  1, 0, loop2 - pcw, 1'b1));
    emit(s, enc_s(OP_SW,   0, 7, 8, 1'b1));
    // two macro-ops with four live-outs each, then a consumer of the
    // oldest: eight destinations apart, beyond the bypass cache
    for (int k = 0; k < 8; k++) emit(s, enc_i(OP_ADDI, 20 + k, 0, 3 * k + s, 1'(k % 4 == 3)));
    emit(s, enc_r(OP_ADD, 28, 20, 24));
    emit(s, enc_r(OP_ADD, 28, 28, 21, 1'b1));
    emit(s, enc_s(OP_SW,   0, 28, 16, 1'b1));
    // call f(r2) = (r2 << 3) - r2 + s, return through r31
    callsite = pcw;
    func = callsite + 4;
    emit(s, enc_j(OP_JAL,  31, func - callsite, 1'b1));
    emit(s, enc_s(OP_SW,   0, 9, 12));
    emit(s, enc_r(OP_SLT, 10, 7, 2));
    emit(s, enc_j(OP_HALT, 0, 0, 1'b1));
    // func
    emit(s, enc_i(OP_SLLI, 9, 2, 3));
    emit(s, enc_r(OP_SUB,  9, 9, 2));
    emit(s, enc_i(OP_ADDI, 9, 9, s));
    emit(s, enc_j(OP_LUI, 11, 5));
    emit(s, enc_r(OP_OR,   9, 9, 11));
    emit(s, enc_i(OP_JALR, 0, 31, 0, 1'b1));
    for (int i = 0; i < DW; i++) dmem[s][i] = '0;
    for (int i = 0; i < n; i++) dmem[s][16 + i] = $urandom_range(0, 1000);
  endtask

  // ---------------- reference interpreter ----------------
  function automatic logic [31:0] sx(logic [31:0] v, int bits);
    return 32'($signed(v << (32 - bits)) >>> (32 - bits));
  endfunction

  task automatic iss(int s, output int executed);
    logic [31:0] r [64];
    logic [31:0] pc, w, a, b, nxt;
    opcode_e o;
    for (int i = 0; i < 64; i++) r[i] = '0;
    for (int i = 0; i < DW; i++) ref_dmem[s][i] = dmem[s][i];
    pc = 0;
    executed = 0;
    while (executed < 100000) begin
      w = imem[s][pc[9:2]];
      o = opcode_e'(w[30:25]);
      a = r[w[18:13]];
      b = r[w[12:7]];
      nxt = pc + 4;
      executed++;
      case (o)
        OP_ADD:  r[w[24:19]] = a + b;
        OP_SUB:  r[w[24:19]] = a - b;
        OP_AND:  r[w[24:19]] = a & b;
        OP_OR:   r[w[24:19]] = a | b;
        OP_XOR:  r[w[24:19]] = a ^ b;
        OP_SLL:  r[w[24:19]] = a << b[4:0];
        OP_SRL:  r[w[24:19]] = a >> b[4:0];
        OP_SRA:  r[w[24:19]] = $signed(a) >>> b[4:0];
        OP_SLT:  r[w[24:19]] = ($signed(a) < $signed(b)) ? 1 : 0;
        OP_SLTU: r[w[24:19]] = (a < b) ? 1 : 0;
        OP_MUL:  r[w[24:19]] = a * b;
        OP_ADDI: r[w[24:19]] = a + sx({19'd0, w[12:0]}, 13);
        OP_ANDI: r[w[24:19]] = a & sx({19'd0, w[12:0]}, 13);
        OP_ORI:  r[w[24:19]] = a | sx({19'd0, w[12:0]}, 13);
        OP_XORI: r[w[24:19]] = a ^ sx({19'd0, w[12:0]}, 13);
        OP_SLTI: r[w[24:19]] = ($signed(a) < $signed(sx({19'd0, w[12:0]}, 13))) ? 1 : 0;
        OP_SLLI: r[w[24:19]] = a << w[4:0];
        OP_SRLI: r[w[24:19]] = a >> w[4:0];
        OP_LUI:  r[w[24:19]] = {w[18:0], 13'd0};
        OP_LW:   r[w[24:19]] = ref_dmem[s][(a + sx({19'd0, w[12:0]}, 13)) >> 2];
        OP_SW:   ref_dmem[s][(a + sx({19'd0, w[24:19], w[6:0]}, 13)) >> 2] = b;
        OP_BEQ:  if (a == b) nxt = pc + (sx({19'd0, w[24:19], w[6:0]}, 13) << 2);
        OP_BNE:  if (a != b) nxt = pc + (sx({19'd0, w[24:19], w[6:0]}, 13) << 2);
        OP_BLT:  if ($signed(a) < $signed(b))  nxt = pc + (sx({19'd0, w[24:19], w[6:0]}, 13) << 2);
        OP_BGE:  if ($signed(a) >= $signed(b)) nxt = pc + (sx({19'd0, w[24:19], w[6:0]}, 13) << 2);
        OP_JAL:  begin r[w[24:19]] = pc + 4; nxt = pc + (sx({13'd0, w[18:0]}, 19) << 2); end
        OP_JALR: begin nxt = (a + sx({19'd0, w[12:0]}, 13)) & ~32'd3; r[w[24:19]] = pc + 4; end
        OP_HALT: break;
        default: ;
      endcase
      r[0] = '0;
      pc = nxt;
    end
  endtask

  // ---------------- run ----------------
  int exp_ops [N];
  int cycles = 0;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    for (int p = 0; p < N; p++)
      $display("  stage %0d: halted %0d ops %0d mops %0d issued %0d dec-flush %0d mis %0d",
               p, halted[p], n_ops[p], n_mops[p], n_issued[p], n_dec_flushes[p], n_mispredicts[p]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    for (int s = 0; s < N; s++) build(s, 20 + 6 * s);
    for (int s = 0; s < N; s++) iss(s, exp_ops[s]);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // let the predictor finish its reset sweep first
    repeat ((1 << BP_IDX_W) + 10) @(posedge clk);
    // slices 0..2 on with their own stages; slice 3 borrows decode stage 4;
    // slice 4 stays off
    @(negedge clk);
    cfg_we = 1'b1; cfg_stage = 2'd0; cfg_active = 1'b1;
    for (int s = 0; s < 3; s++) begin
      cfg_slice = SEL_W'(s); cfg_phys = SEL_W'(s);
      @(negedge clk);
    end
    cfg_slice = 3'(3); cfg_stage = 2'd1; cfg_phys = 3'(4); cfg_active = 1'b1;
    @(negedge clk);
    cfg_we = 1'b0;
    t0 = cycles;
    wait (halted[3:0] == 4'hF);
    repeat (5) @(posedge clk);
    $display("all four slices halted after %0d cycles", cycles - t0);

    checks++;
    if (cfg_conflict) begin failures++; $display("FAIL configuration conflict"); end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (int'(n_ops[s]) != exp_ops[s]) begin
        failures++;
        $display("FAIL slice %0d executed %0d ops, expected %0d", s, n_ops[s], exp_ops[s]);
      end
      for (int i = 0; i < DW; i++) begin
        checks++;
        if (dmem[s][i] !== ref_dmem[s][i]) begin
          failures++;
          $display("FAIL slice %0d dmem[%0d]=%0d expected %0d", s, i, dmem[s][i], ref_dmem[s][i]);
        end
      end
      $display("slice %0d: ops %0d mops %0d mispredicts %0d ex-squash %0d iss-squash %0d flushes %0d wipes %0d dep-stalls %0d byp-operands %0d",
               s, n_ops[s], n_mops[s], n_mispredicts[s], n_ex_squashed[s], n_iss_squashed[s],
               n_dec_flushes[3 == s ? 4 : s], n_wipes[s], n_dep_stalls[s], n_byp_hits[s]);
    end
    // once drained, every stage of a slice must agree on the stream id
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (fetch_sid[s] != ex_sid[s] || iss_sid[s] != ex_sid[s] || iss_last_sid[s] != ex_sid[s] ||
          dec_sid[3 == s ? 4 : s] != ex_sid[s]) begin
        failures++;
        $display("FAIL slice %0d stream ids disagree: f%0d d%0d i%0d/%0d e%0d", s, fetch_sid[s],
                 dec_sid[3 == s ? 4 : s], iss_sid[s], iss_last_sid[s], ex_sid[s]);
      end
    end
    // slice 4 must have stayed idle, its decode serving slice 3
    checks++;
    if (n_ops[4] != 0 || n_issued[4] != 0) begin failures++; $display("FAIL idle slice 4 ran"); end

    // mechanisms
    begin
      automatic int mis = 0, exsq = 0, issq = 0, fl = 0, wp = 0, st = 0, byp = 0, multi = 0, fm = 0;
      for (int p = 0; p < N; p++) begin
        mis += n_mispredicts[p]; exsq += n_ex_squashed[p]; issq += n_iss_squashed[p];
        fl += n_dec_flushes[p]; wp += n_wipes[p]; st += n_dep_stalls[p]; byp += n_byp_hits[p];
        fm += n_fetch_mis[p];
        if (n_ops[p] > n_mops[p]) multi++;
      end
      $display("mechanisms: mispredict %0d ex-squash %0d issue-squash %0d decode-flush %0d wipe %0d dep-stall %0d bypass %0d multi-op slices %0d mem-stall %0d",
               mis, exsq, issq, fl, wp, st, byp, multi, mem_stall_cycles);
      checks += 9;
      if (mis == 0)   begin failures++; $display("FAIL no mispredict"); end
      if (fm != mis)  begin failures++; $display("FAIL fetch saw %0d redirects, exmem %0d", fm, mis); end
      if (exsq + issq == 0) begin failures++; $display("FAIL no squash"); end
      if (fl == 0)    begin failures++; $display("FAIL no decode flush"); end
      if (wp == 0)    begin failures++; $display("FAIL no scoreboard wipe"); end
      if (st == 0)    begin failures++; $display("FAIL no dependency stall"); end
      if (byp == 0)   begin failures++; $display("FAIL no bypass-cache operand"); end
      if (multi == 0) begin failures++; $display("FAIL no multi-op macro-op"); end
      if (mem_stall_cycles == 0) begin failures++; $display("FAIL no memory stall"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
