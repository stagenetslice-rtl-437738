// sns_kernel_bench: benchmark-style kernels on one StageNet array, used by
// the kernel testbenches. CH_W and BYP_DEPTH are passed to the array, so
// the same programs can be timed at different channel widths and bypass
// depths. Ports: done rises once every slice has halted (or the watchdog
// fired); checks, failures and cycles_used (cycles from enabling the
// slices to the last halt) are valid from then on.
//
// Each slice runs one small kernel of the kinds the StageNetSlice was
// evaluated on, written here with the instruction encoders:
//   slice 0  RC4: key schedule over a 256-entry state, then 64 bytes of
//            keystream XORed into a message (encryption)
//   slice 1  Sobel edge magnitude |gx|+|gy|, clamped to 255, over a 10x10
//            window of a 12x12 image (media kernel)
//   slice 2  8-point integer DCT-style butterfly on 8 rows, with constant
//            multiplies and arithmetic shifts (media kernel, idct-like)
//   slice 3  ADPCM-style encoder: 4-bit codes from 64 samples with an
//            adaptive step taken from a table (audio encoding)
//   slice 4  Sobel again on a different image
// All memories answer one cycle after a request and withdraw ready at
// random. Every slice's final data memory and executed-operation count
// are compared with the instruction-set interpreter of this file, and
// the RC4 and Sobel outputs are also compared with direct computations,
// so a wrong program cannot hide behind a matching interpreter.
// Sizes are this test's own: the original benchmark inputs are not
// available, so each kernel runs on a small generated input.
module sns_kernel_bench #(
  parameter int CH_W      = 64,
  parameter int BYP_DEPTH = 6
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   cycles_used
);
  import sns_pkg::*;

  localparam int N     = 5;
  localparam int IW    = 256;    // instruction words per memory
  localparam int DW    = 1024;   // data words per memory
  localparam int SEL_W = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;


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

  sns_stagenet #(.CH_W(CH_W), .BYP_DEPTH(BYP_DEPTH)) dut (.*);

  // ---------------- memories ----------------
  logic [31:0] imem [N][IW];
  logic [31:0] dmem [N][DW];
  logic [31:0] ref_dmem [N][DW];

  always_ff @(posedge clk) begin
    for (int p = 0; p < N; p++) begin
      imem_req_ready[p]  <= ($urandom_range(0, 7) != 0);
      dmem_req_ready[p]  <= ($urandom_range(0, 5) != 0);
      imem_resp_valid[p] <= imem_req_valid[p] && imem_req_ready[p];
      imem_resp_data[p]  <= imem[p][imem_req_addr[p][9:2]];
      dmem_resp_valid[p] <= dmem_req_valid[p] && dmem_req_ready[p];
      dmem_resp_rdata[p] <= dmem[p][dmem_req_addr[p][11:2]];
      if (dmem_req_valid[p] && dmem_req_ready[p] && dmem_req_we[p])
        dmem[p][dmem_req_addr[p][11:2]] <= dmem_req_wdata[p];
    end
  end

  // ---------------- assembler helpers ----------------
  int cs, pcw;
  task automatic emit(logic [31:0] w);
    imem[cs][pcw] = w;
    pcw++;
  endtask
  task automatic R(opcode_e o, int rd, int a, int b); emit(enc_r(o, rd, a, b)); endtask
  task automatic I(opcode_e o, int rd, int a, int imm); emit(enc_i(o, rd, a, imm)); endtask
  task automatic ST(int base, int src, int off); emit(enc_s(OP_SW, base, src, off)); endtask
  // backward branch to a known label
  task automatic BR(opcode_e o, int a, int b, int label); emit(enc_s(o, a, b, label - pcw)); endtask
  // forward branch: reserve a word, patch it when the target is reached
  task automatic FWD(output int hole); hole = pcw; emit(32'd0); endtask
  task automatic LAND(int hole, opcode_e o, int a, int b);
    imem[cs][hole] = enc_s(o, a, b, pcw - hole);
  endtask
  task automatic begin_prog(int s);
    cs  = s;
    pcw = 0;
    for (int i = 0; i < IW; i++) imem[s][i] = enc_j(OP_HALT, 0, 0, 1'b1);
    for (int i = 0; i < DW; i++) dmem[s][i] = '0;
  endtask

  // ---- RC4: S at byte 0, key (8 words) at 1024, text at 1536, out at 2048
  localparam int RC4_N = 64;
  task automatic build_rc4(int s);
    int l_init, l_ksa, l_prga;
    begin_prog(s);
    I(OP_ADDI, 1, 0, 0);
    l_init = pcw;                                   // S[i] = i
    I(OP_SLLI, 2, 1, 2);   ST(2, 1, 0);
    I(OP_ADDI, 1, 1, 1);   I(OP_SLTI, 3, 1, 256);   BR(OP_BNE, 3, 0, l_init);
    I(OP_ADDI, 1, 0, 0);   I(OP_ADDI, 4, 0, 0);
    l_ksa = pcw;                                    // j += S[i] + key[i%8]; swap
    I(OP_SLLI, 2, 1, 2);   I(OP_LW, 5, 2, 0);
    I(OP_ANDI, 6, 1, 7);   I(OP_SLLI, 6, 6, 2);     I(OP_LW, 7, 6, 1024);
    R(OP_ADD, 4, 4, 5);    R(OP_ADD, 4, 4, 7);      I(OP_ANDI, 4, 4, 255);
    I(OP_SLLI, 8, 4, 2);   I(OP_LW, 9, 8, 0);
    ST(2, 9, 0);           ST(8, 5, 0);
    I(OP_ADDI, 1, 1, 1);   I(OP_SLTI, 3, 1, 256);   BR(OP_BNE, 3, 0, l_ksa);
    I(OP_ADDI, 1, 0, 0);   I(OP_ADDI, 4, 0, 0);     I(OP_ADDI, 10, 0, 0);
    l_prga = pcw;                                   // keystream XOR text
    I(OP_ADDI, 1, 1, 1);   I(OP_ANDI, 1, 1, 255);
    I(OP_SLLI, 2, 1, 2);   I(OP_LW, 5, 2, 0);
    R(OP_ADD, 4, 4, 5);    I(OP_ANDI, 4, 4, 255);
    I(OP_SLLI, 8, 4, 2);   I(OP_LW, 9, 8, 0);
    ST(2, 9, 0);           ST(8, 5, 0);
    R(OP_ADD, 11, 5, 9);   I(OP_ANDI, 11, 11, 255); I(OP_SLLI, 11, 11, 2);
    I(OP_LW, 12, 11, 0);
    I(OP_SLLI, 13, 10, 2); I(OP_LW, 14, 13, 1536);
    R(OP_XOR, 14, 14, 12); ST(13, 14, 2048);
    I(OP_ADDI, 10, 10, 1); I(OP_SLTI, 3, 10, RC4_N); BR(OP_BNE, 3, 0, l_prga);
    emit(enc_j(OP_HALT, 0, 0, 1'b1));
    for (int i = 0; i < 8; i++) dmem[s][256 + i] = $urandom_range(0, 255);
    for (int i = 0; i < RC4_N; i++) dmem[s][384 + i] = $urandom_range(0, 255);
  endtask

  function automatic logic [31:0] rc4_expect(int s, int k);
    int st [256];
    int j, i, t, n;
    logic [31:0] out [RC4_N];
    for (i = 0; i < 256; i++) st[i] = i;
    j = 0;
    for (i = 0; i < 256; i++) begin
      j = (j + st[i] + int'(dmem[s][256 + (i % 8)])) & 255;
      t = st[i]; st[i] = st[j]; st[j] = t;
    end
    i = 0; j = 0;
    for (n = 0; n < RC4_N; n++) begin
      i = (i + 1) & 255;
      j = (j + st[i]) & 255;
      t = st[i]; st[i] = st[j]; st[j] = t;
      out[n] = dmem[s][384 + n] ^ 32'(st[(st[i] + st[j]) & 255]);
    end
    return out[k];
  endfunction

  // ---- Sobel: 12x12 image at byte 0, 10x10 result at byte 1024
  task automatic build_sobel(int s);
    int l_row, l_col, h1, h2, h3;
    begin_prog(s);
    I(OP_ADDI, 1, 0, 10);                           // rows left
    I(OP_ADDI, 3, 0, 52);                           // centre of (1,1)
    I(OP_ADDI, 20, 0, 1024);                        // output pointer
    I(OP_ADDI, 30, 0, 255);
    l_row = pcw;
    I(OP_ADDI, 2, 0, 10);                           // columns left
    l_col = pcw;
    I(OP_LW, 4, 3, -52);  I(OP_LW, 5, 3, -48);  I(OP_LW, 6, 3, -44);   // row above
    I(OP_LW, 7, 3, -4);                         I(OP_LW, 8, 3, 4);     // same row
    I(OP_LW, 9, 3, 44);   I(OP_LW, 10, 3, 48);  I(OP_LW, 11, 3, 52);   // row below
    // gx = (p6 + 2 p8 + p11) - (p4 + 2 p7 + p9)
    I(OP_SLLI, 12, 8, 1); R(OP_ADD, 12, 12, 6);  R(OP_ADD, 12, 12, 11);
    I(OP_SLLI, 13, 7, 1); R(OP_ADD, 13, 13, 4);  R(OP_ADD, 13, 13, 9);
    R(OP_SUB, 14, 12, 13);
    // gy = (p9 + 2 p10 + p11) - (p4 + 2 p5 + p6)
    I(OP_SLLI, 15, 10, 1); R(OP_ADD, 15, 15, 9); R(OP_ADD, 15, 15, 11);
    I(OP_SLLI, 16, 5, 1);  R(OP_ADD, 16, 16, 4); R(OP_ADD, 16, 16, 6);
    R(OP_SUB, 17, 15, 16);
    FWD(h1); R(OP_SUB, 14, 0, 14); LAND(h1, OP_BGE, 14, 0);      // |gx|
    FWD(h2); R(OP_SUB, 17, 0, 17); LAND(h2, OP_BGE, 17, 0);      // |gy|
    R(OP_ADD, 18, 14, 17);
    FWD(h3); I(OP_ADDI, 18, 0, 255); LAND(h3, OP_BGE, 30, 18);   // clamp
    ST(20, 18, 0);
    I(OP_ADDI, 20, 20, 4); I(OP_ADDI, 3, 3, 4);
    I(OP_ADDI, 2, 2, -1);  BR(OP_BNE, 2, 0, l_col);
    I(OP_ADDI, 3, 3, 8);
    I(OP_ADDI, 1, 1, -1);  BR(OP_BNE, 1, 0, l_row);
    emit(enc_j(OP_HALT, 0, 0, 1'b1));
    for (int i = 0; i < 144; i++)
      dmem[s][i] = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 255) : 32'((i % 12) * 9 + s);
  endtask

  function automatic logic [31:0] sobel_expect(int s, int k);
    int y, x, gx, gy, m;
    y = k / 10 + 1; x = k % 10 + 1;
    gx = int'(dmem[s][(y-1)*12+x+1]) + 2*int'(dmem[s][y*12+x+1]) + int'(dmem[s][(y+1)*12+x+1])
       - int'(dmem[s][(y-1)*12+x-1]) - 2*int'(dmem[s][y*12+x-1]) - int'(dmem[s][(y+1)*12+x-1]);
    gy = int'(dmem[s][(y+1)*12+x-1]) + 2*int'(dmem[s][(y+1)*12+x]) + int'(dmem[s][(y+1)*12+x+1])
       - int'(dmem[s][(y-1)*12+x-1]) - 2*int'(dmem[s][(y-1)*12+x]) - int'(dmem[s][(y-1)*12+x+1]);
    m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return 32'(m > 255 ? 255 : m);
  endfunction

  // ---- DCT-style butterfly: 8 rows of 8 at byte 0, result at byte 512
  task automatic build_dct(int s);
    int l_row;
    begin_prog(s);
    I(OP_ADDI, 1, 0, 8);                            // rows left
    I(OP_ADDI, 2, 0, 0);                            // row pointer
    I(OP_ADDI, 40, 0, 8);                           // shift amount
    I(OP_ADDI, 41, 0, 181); I(OP_ADDI, 42, 0, 98);
    I(OP_ADDI, 43, 0, 251); I(OP_ADDI, 44, 0, 213);
    I(OP_ADDI, 45, 0, 142); I(OP_ADDI, 46, 0, 50);
    l_row = pcw;
    for (int k = 0; k < 8; k++) I(OP_LW, 3 + k, 2, 4 * k);          // x0..x7 in r3..r10
    for (int k = 0; k < 4; k++) R(OP_ADD, 11 + k, 3 + k, 10 - k);   // a0..a3 in r11..r14
    for (int k = 0; k < 4; k++) R(OP_SUB, 15 + k, 3 + k, 10 - k);   // b0..b3 in r15..r18
    R(OP_ADD, 19, 11, 14); R(OP_ADD, 20, 12, 13);
    R(OP_ADD, 21, 19, 20); ST(2, 21, 512);                          // y0
    R(OP_SUB, 21, 19, 20); ST(2, 21, 528);                          // y4
    R(OP_SUB, 22, 11, 14); R(OP_SUB, 23, 12, 13);
    R(OP_MUL, 24, 22, 41); R(OP_MUL, 25, 23, 42); R(OP_ADD, 24, 24, 25);
    R(OP_SRA, 24, 24, 40); ST(2, 24, 520);                          // y2
    R(OP_MUL, 24, 22, 42); R(OP_MUL, 25, 23, 41); R(OP_SUB, 24, 24, 25);
    R(OP_SRA, 24, 24, 40); ST(2, 24, 536);                          // y6
    R(OP_MUL, 26, 15, 43); R(OP_MUL, 27, 16, 44); R(OP_MUL, 28, 17, 45); R(OP_MUL, 29, 18, 46);
    R(OP_ADD, 30, 26, 27); R(OP_ADD, 30, 30, 28); R(OP_ADD, 30, 30, 29);
    R(OP_SRA, 30, 30, 40); ST(2, 30, 516);                          // y1
    R(OP_SUB, 30, 26, 29); R(OP_SUB, 30, 30, 27); R(OP_ADD, 30, 30, 28);
    R(OP_SRA, 30, 30, 40); ST(2, 30, 524);                          // y3
    R(OP_SUB, 30, 27, 26); R(OP_ADD, 30, 30, 29); R(OP_SUB, 30, 30, 28);
    R(OP_SRA, 30, 30, 40); ST(2, 30, 532);                          // y5
    R(OP_SUB, 30, 28, 27); R(OP_ADD, 30, 30, 26); R(OP_SUB, 30, 30, 29);
    R(OP_SRA, 30, 30, 40); ST(2, 30, 540);                          // y7
    I(OP_ADDI, 2, 2, 32);
    I(OP_ADDI, 1, 1, -1); BR(OP_BNE, 1, 0, l_row);
    emit(enc_j(OP_HALT, 0, 0, 1'b1));
    for (int i = 0; i < 64; i++) dmem[s][i] = 32'($urandom_range(0, 511) - 256);
  endtask

  // ---- ADPCM-style encoder: samples at byte 0, step table at 1024,
  //      index table at 1536, codes at 2048
  localparam int AD_N = 64;
  task automatic build_adpcm(int s);
    int l_smp, h_pos, h_b2, h_b1, h_b0, h_sign, h_join, h_lo, h_hi, h_ilo, h_ihi;
    int st;
    begin_prog(s);
    I(OP_ADDI, 1, 0, 0);                            // sample index
    I(OP_ADDI, 2, 0, 0);                            // predictor
    I(OP_ADDI, 3, 0, 0);                            // step index
    I(OP_LW, 4, 0, 1024);                           // step
    emit(enc_j(OP_LUI, 31, 4)); I(OP_ADDI, 31, 31, -1);   // 32767
    R(OP_SUB, 32, 0, 31); I(OP_ADDI, 32, 32, -1);         // -32768
    I(OP_ADDI, 33, 0, 48);                          // last step index
    l_smp = pcw;
    I(OP_SLLI, 5, 1, 2); I(OP_LW, 6, 5, 0);
    R(OP_SUB, 7, 6, 2);                             // diff
    I(OP_ADDI, 8, 0, 0);                            // code
    FWD(h_pos); R(OP_SUB, 7, 0, 7); I(OP_ADDI, 8, 0, 8); LAND(h_pos, OP_BGE, 7, 0);
    I(OP_SRLI, 9, 4, 3);                            // vpdiff = step >> 3
    I(OP_ADDI, 10, 4, 0);                           // working step
    FWD(h_b2); I(OP_ORI, 8, 8, 4); R(OP_SUB, 7, 7, 10); R(OP_ADD, 9, 9, 10);
    LAND(h_b2, OP_BLT, 7, 10);
    I(OP_SRLI, 10, 10, 1);
    FWD(h_b1); I(OP_ORI, 8, 8, 2); R(OP_SUB, 7, 7, 10); R(OP_ADD, 9, 9, 10);
    LAND(h_b1, OP_BLT, 7, 10);
    I(OP_SRLI, 10, 10, 1);
    FWD(h_b0); I(OP_ORI, 8, 8, 1); R(OP_ADD, 9, 9, 10);
    LAND(h_b0, OP_BLT, 7, 10);
    I(OP_ANDI, 11, 8, 8);
    FWD(h_sign); R(OP_ADD, 2, 2, 9); FWD(h_join);
    LAND(h_sign, OP_BEQ, 11, 0);
    R(OP_SUB, 2, 2, 9);
    imem[cs][h_join] = enc_j(OP_JAL, 0, pcw - h_join);
    FWD(h_hi); R(OP_ADD, 2, 31, 0); LAND(h_hi, OP_BGE, 31, 2);    // clamp high
    FWD(h_lo); R(OP_ADD, 2, 32, 0); LAND(h_lo, OP_BGE, 2, 32);    // clamp low
    I(OP_ANDI, 12, 8, 7); I(OP_SLLI, 12, 12, 2); I(OP_LW, 13, 12, 1536);
    R(OP_ADD, 3, 3, 13);
    FWD(h_ilo); I(OP_ADDI, 3, 0, 0);  LAND(h_ilo, OP_BGE, 3, 0);
    FWD(h_ihi); I(OP_ADDI, 3, 33, 0); LAND(h_ihi, OP_BGE, 33, 3);
    I(OP_SLLI, 14, 3, 2); I(OP_LW, 4, 14, 1024);
    ST(5, 8, 2048);
    I(OP_ADDI, 1, 1, 1); I(OP_SLTI, 15, 1, AD_N); BR(OP_BNE, 15, 0, l_smp);
    ST(0, 2, 4000);
    emit(enc_j(OP_HALT, 0, 0, 1'b1));
    // geometric step table, 49 entries: step(k+1) = step(k) + step(k)/8 + 1
    st = 7;
    for (int k = 0; k < 49; k++) begin dmem[s][256 + k] = 32'(st); st = st + st / 8 + 1; end
    // index adjustment per 3-bit magnitude
    begin
      int adj [8] = '{-1, -1, -1, -1, 2, 4, 6, 8};
      for (int k = 0; k < 8; k++) dmem[s][384 + k] = 32'(adj[k]);
    end
    for (int i = 0; i < AD_N; i++)
      dmem[s][i] = 32'(int'(4000.0 * $sin(i * 0.3)) + $urandom_range(0, 600) - 300);
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
    while (executed < 1000000) begin
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
        OP_LW:   r[w[24:19]] = ref_dmem[s][10'((a + sx({19'd0, w[12:0]}, 13)) >> 2)];
        OP_SW:   ref_dmem[s][10'((a + sx({19'd0, w[24:19], w[6:0]}, 13)) >> 2)] = b;
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
    repeat (1500000) @(posedge clk);
    if (done) disable watchdog;
    failures++;
    $display("watchdog expired");
    for (int p = 0; p < N; p++)
      $display("  slice %0d: halted %0d ops %0d of %0d", p, halted[p], n_ops[p], exp_ops[p]);
    done = 1'b1;
  end

  initial begin
    int t0;
    automatic string names [N] = '{"rc4", "sobel", "dct", "adpcm", "sobel-2"};
    done = 1'b0; checks = 0; failures = 0; cycles_used = 0;
    build_rc4(0);
    build_sobel(1);
    build_dct(2);
    build_adpcm(3);
    build_sobel(4);
    for (int s = 0; s < N; s++) iss(s, exp_ops[s]);
    // the programs themselves must compute the kernels
    for (int k = 0; k < RC4_N; k++) begin
      checks++;
      if (ref_dmem[0][512 + k] != rc4_expect(0, k)) begin
        failures++; $display("FAIL rc4 program byte %0d", k);
      end
    end
    for (int k = 0; k < 100; k++)
      for (int s = 1; s < N; s += 3) begin
        checks++;
        if (ref_dmem[s][256 + k] != sobel_expect(s, k)) begin
          failures++; $display("FAIL sobel program (slice %0d) pixel %0d", s, k);
        end
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat ((1 << BP_IDX_W) + 10) @(posedge clk);
    @(negedge clk);
    cfg_we = 1'b1; cfg_stage = 2'd0; cfg_active = 1'b1;
    for (int s = 0; s < N; s++) begin
      cfg_slice = SEL_W'(s); cfg_phys = SEL_W'(s);
      @(negedge clk);
    end
    cfg_we = 1'b0;
    t0 = cycles;
    wait (halted == '1);
    repeat (5) @(posedge clk);
    for (int s = 0; s < N; s++) begin
      int bad;
      bad = 0;
      checks++;
      if (int'(n_ops[s]) != exp_ops[s]) begin
        failures++;
        $display("FAIL %s executed %0d ops, expected %0d", names[s], n_ops[s], exp_ops[s]);
      end
      for (int i = 0; i < DW; i++) begin
        checks++;
        if (dmem[s][i] !== ref_dmem[s][i]) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL %s dmem[%0d]=%0d expected %0d", names[s], i, dmem[s][i], ref_dmem[s][i]);
        end
      end
      if (CH_W == 64 && BYP_DEPTH == 6)
        $display("%-8s ops %6d  macro-ops %6d  mispredicts %5d  bypass operands %5d  dependency stalls %6d",
               names[s], n_ops[s], n_mops[s], n_mispredicts[s], n_byp_hits[s], n_dep_stalls[s]);
    end
    cycles_used = cycles - t0;
    $display("CH_W=%0d BYP_DEPTH=%0d: all kernels done after %0d cycles", CH_W, BYP_DEPTH, cycles_used);
    done = 1'b1;
  end
endmodule
