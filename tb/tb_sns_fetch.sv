// tb_sns_fetch: checks the fetch stage with a 4-bit predictor history.
// A small program in a one-cycle instruction memory (ready withdrawn at
// random): ADDI, a conditional branch (predicted not-taken after reset),
// a JAL that must be followed to its target, and HALT, after which fetch
// must stop. A mispredict resolution sent over the feedback link must
// toggle the stream id, redirect the PC and restart fetching.
// Instructions are received through a link_rx and compared with the
// expected pc, word, stream id and prediction bit.
module tb_sns_fetch;
  import sns_pkg::*;
  localparam int CH_W = 64, H = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic run = 0;
  logic imem_req_valid, imem_req_ready = 0, imem_resp_valid = 0;
  logic [31:0] imem_req_addr, imem_resp_data = 0;
  logic out_valid, out_ready, out_last, fb_valid, fb_ready, fb_last, sid;
  logic [CH_W-1:0] out_data, fb_data;
  logic [31:0] mispredicts;

  sns_fetch #(.CH_W(CH_W), .HIST_W(H)) dut (.*);

  logic m_valid, fbp_valid = 0, fbp_ready;
  logic [FMSG_W-1:0] m_raw;
  fetch_msg_t m;
  br_msg_t fbm = '0;
  sns_link_rx #(.MSG_W(FMSG_W), .CH_W(CH_W)) u_rx (.clk, .rst_n,
    .flit_valid(out_valid), .flit_ready(out_ready), .flit_data(out_data), .flit_last(out_last),
    .msg_valid(m_valid), .msg_ready(1'b1), .msg(m_raw));
  sns_link_tx #(.MSG_W(BRMSG_W), .CH_W(CH_W)) u_tx (.clk, .rst_n,
    .push_valid(fbp_valid), .push_ready(fbp_ready), .push_msg(fbm), .push_nflits(2'd1),
    .flit_valid(fb_valid), .flit_ready(fb_ready), .flit_data(fb_data), .flit_last(fb_last));
  assign m = fetch_msg_t'(m_raw);

  logic [31:0] imem [64];
  always @(posedge clk) begin
    imem_req_ready  <= ($urandom_range(0, 2) != 0);
    imem_resp_valid <= imem_req_valid && imem_req_ready;
    imem_resp_data  <= imem[imem_req_addr[7:2]];
  end

  int exp_pc [$];
  bit exp_sid [$];
  bit exp_pt [$];
  int got = 0;
  always @(posedge clk) if (rst_n && m_valid) begin
    checks++;
    if (exp_pc.size() == 0) begin failures++; $display("FAIL unexpected fetch pc %0d", m.pc); end
    else begin
      if (m.pc != exp_pc[0] || m.instr != imem[m.pc[7:2]] || m.sid != exp_sid[0] || m.pred_taken != exp_pt[0]) begin
        failures++;
        $display("FAIL got pc %0d sid %0d pt %0d, exp pc %0d sid %0d pt %0d", m.pc, m.sid, m.pred_taken,
                 exp_pc[0], exp_sid[0], exp_pt[0]);
      end
      void'(exp_pc.pop_front()); void'(exp_sid.pop_front()); void'(exp_pt.pop_front());
    end
    got++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) imem[i] = enc_j(OP_HALT, 0, 0, 1'b1);
    imem[0]  = enc_i(OP_ADDI, 1, 0, 5);
    imem[1]  = enc_s(OP_BEQ, 0, 0, 5, 1'b1);
    imem[2]  = enc_j(OP_JAL, 31, 10, 1'b1);
    imem[12] = enc_j(OP_HALT, 0, 0, 1'b1);
    imem[25] = enc_i(OP_ADDI, 2, 0, 7);
    imem[26] = enc_j(OP_HALT, 0, 0, 1'b1);
    exp_pc = '{0, 4, 8, 48};  exp_sid = '{0, 0, 0, 0};  exp_pt = '{0, 0, 1, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    @(negedge clk) run = 1;
    repeat (100) @(posedge clk);
    checks++;
    if (got != 4 || exp_pc.size() != 0) begin failures++; $display("FAIL fetched %0d before halt", got); end
    // mispredict: redirect to word 25
    exp_pc = '{100, 104}; exp_sid = '{1, 1}; exp_pt = '{0, 0};
    @(negedge clk);
    fbm.mispredict = 1; fbm.sid = 1; fbm.redirect_pc = 100; fbm.is_cond = 1; fbm.taken = 1;
    fbp_valid = 1;
    @(negedge clk) fbp_valid = 0;
    repeat (100) @(posedge clk);
    checks += 3;
    if (got != 6 || exp_pc.size() != 0) begin failures++; $display("FAIL fetched %0d after redirect", got); end
    if (sid !== 1'b1) begin failures++; $display("FAIL sid not toggled"); end
    if (mispredicts != 1) begin failures++; $display("FAIL mispredict count %0d", mispredicts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
