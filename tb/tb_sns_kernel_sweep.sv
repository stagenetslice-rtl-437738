// tb_sns_kernel_sweep: the same kernels on three more configurations of
// the array, the kind of design-space points the StageNetSlice was
// evaluated on: a 32-bit crossbar channel (bypass depth 6), and bypass
// caches of depth 2 and 8 (64-bit channel). Each run must be correct on
// its own (interpreter and direct checks). Across runs, the narrower
// channel must cost cycles against the 64-bit/depth-6 point, and the
// depth-2 cache must cost cycles against depth 8. A cycle count for each
// point is printed.
module tb_sns_kernel_sweep;
  logic       done [4];
  int         checks [4], failures [4], cyc [4];
  int         tot_checks, tot_failures;

  sns_kernel_bench #(.CH_W(64), .BYP_DEPTH(6)) u_base  (.done(done[0]), .checks(checks[0]), .failures(failures[0]), .cycles_used(cyc[0]));
  sns_kernel_bench #(.CH_W(32), .BYP_DEPTH(6)) u_ch32  (.done(done[1]), .checks(checks[1]), .failures(failures[1]), .cycles_used(cyc[1]));
  sns_kernel_bench #(.CH_W(64), .BYP_DEPTH(2)) u_byp2  (.done(done[2]), .checks(checks[2]), .failures(failures[2]), .cycles_used(cyc[2]));
  sns_kernel_bench #(.CH_W(64), .BYP_DEPTH(8)) u_byp8  (.done(done[3]), .checks(checks[3]), .failures(failures[3]), .cycles_used(cyc[3]));

  initial begin
    #1;  // the benches clear done at time 0
    wait (done[0] === 1'b1 && done[1] === 1'b1 && done[2] === 1'b1 && done[3] === 1'b1);
    tot_checks = 0;
    tot_failures = 0;
    for (int i = 0; i < 4; i++) begin
      tot_checks += checks[i];
      tot_failures += failures[i];
    end
    $display("cycles: 64-bit/depth 6 %0d, 32-bit/depth 6 %0d, 64-bit/depth 2 %0d, 64-bit/depth 8 %0d",
             cyc[0], cyc[1], cyc[2], cyc[3]);
    tot_checks += 2;
    if (!(cyc[1] > cyc[0])) begin tot_failures++; $display("FAIL 32-bit channel not slower than 64-bit"); end
    if (!(cyc[2] > cyc[3])) begin tot_failures++; $display("FAIL depth-2 bypass cache not slower than depth 8"); end
    $display("TB_RESULT checks=%0d failures=%0d", tot_checks, tot_failures);
    $finish;
  end
endmodule
