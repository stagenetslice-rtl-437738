// tb_sns_link_rx: checks the double-buffered reassembling input latch.
// Random 150-bit messages are cut here into 1..3 flits of 64 bits (most
// significant first) and sent with random gaps; each received message must
// equal the sent one with the unsent trailing bits zero. With the stage
// not taking messages the latch must hold two and then refuse flits.
module tb_sns_link_rx;
  localparam int MSG_W = 150, CH_W = 64, NF = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic flit_valid = 0, flit_ready, flit_last = 0;
  logic [CH_W-1:0] flit_data = '0;
  logic msg_valid, msg_ready = 0;
  logic [MSG_W-1:0] msg;

  sns_link_rx #(.MSG_W(MSG_W), .CH_W(CH_W)) dut (.*);

  logic [MSG_W-1:0] expq [$];
  int got = 0;
  bit rand_ready = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (msg_valid && msg_ready) begin
      checks++;
      if (msg !== expq[0]) begin failures++; $display("FAIL message %0d", got); end
      void'(expq.pop_front());
      got++;
    end
    if (rand_ready) msg_ready <= ($urandom_range(0, 2) != 0);
  end

  task automatic send(int nf);
    logic [NF*CH_W-1:0] padded, keep;
    padded = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    keep   = padded;
    for (int k = nf; k < NF; k++) keep[NF*CH_W-1-k*CH_W -: CH_W] = '0;
    expq.push_back(keep[NF*CH_W-1 -: MSG_W]);
    for (int k = 0; k < nf; k++) begin
      flit_valid = 1; flit_data = padded[NF*CH_W-1-k*CH_W -: CH_W]; flit_last = (k == nf - 1);
      do @(posedge clk); while (!flit_ready);
      #1 flit_valid = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    send(3); send(1);
    @(negedge clk);
    checks++;
    if (flit_ready) begin failures++; $display("FAIL ready with two messages held"); end
    rand_ready = 1;
    for (int i = 0; i < 200; i++) send($urandom_range(1, 3));
    wait (expq.size() == 0);
    checks++;
    if (got != 202) begin failures++; $display("FAIL got %0d", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
