// tb_sns_config_manager: checks the routing table. After reset no slice
// runs; slices are switched on with the identity map, then slice 1 is
// rebuilt around decode stage 3 and the crossbar selects/enables and the
// fetch run bits are compared with values worked out by hand. A map that
// gives one physical stage to two slices must raise conflict.
module tb_sns_config_manager;
  localparam int N = 5, SEL_W = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0, cfg_active = 0, conflict;
  logic [SEL_W-1:0] cfg_slice = 0, cfg_phys = 0;
  logic [1:0] cfg_stage = 0;
  logic [N-1:0][SEL_W-1:0] fd_sel, di_sel, ie_sel, ef_sel, ei_sel;
  logic [N-1:0] fd_en, di_en, ie_en, ef_en, ei_en, fetch_run;

  sns_config_manager #(.N(N)) dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int s, int t, int p, bit a);
    @(negedge clk);
    cfg_we = 1; cfg_slice = SEL_W'(s); cfg_stage = 2'(t); cfg_phys = SEL_W'(p); cfg_active = a;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("run after reset", 32'(fetch_run), 0);
    chk("en after reset", 32'(fd_en | di_en | ie_en | ef_en | ei_en), 0);
    for (int s = 0; s < 4; s++) wr(s, 0, s, 1);
    chk("run", 32'(fetch_run), 32'b01111);
    chk("fd_en", 32'(fd_en), 32'b01111);
    for (int s = 0; s < 4; s++) begin
      chk("fd_sel", 32'(fd_sel[s]), s);
      chk("ei_sel", 32'(ei_sel[s]), s);
    end
    // slice 1 uses decode stage 3? no: stage 3 belongs to slice 3; use 4
    wr(1, 1, 4, 1);
    chk("conflict", 32'(conflict), 0);
    chk("fd_en", 32'(fd_en), 32'b11101);
    chk("fd_sel[4]", 32'(fd_sel[4]), 1);    // decode 4 listens to fetch 1
    chk("di_sel[1]", 32'(di_sel[1]), 4);    // issue 1 listens to decode 4
    chk("di_en", 32'(di_en), 32'b01111);
    chk("ef_sel[1]", 32'(ef_sel[1]), 1);
    chk("ie_sel[3]", 32'(ie_sel[3]), 3);
    // give slice 2 the execute stage of slice 0: conflict
    wr(2, 3, 0, 1);
    chk("conflict set", 32'(conflict), 1);
    chk("ef_sel[2]", 32'(ef_sel[2]), 0);
    wr(0, 0, 0, 0);
    chk("conflict cleared", 32'(conflict), 0);
    chk("run", 32'(fetch_run), 32'b01110);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
