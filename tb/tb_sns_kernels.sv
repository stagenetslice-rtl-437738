// tb_sns_kernels: runs the benchmark-style kernels of sns_kernel_bench
// (RC4, Sobel, a DCT-style butterfly, an ADPCM-style encoder) on the
// StageNet array at its default size: 64-bit channels, bypass depth 6.
// Each slice's data memory and operation count must match the
// instruction-set interpreter, and the RC4 and Sobel results must match
// direct computations.
module tb_sns_kernels;
  logic done;
  int   checks, failures, cycles_used;

  sns_kernel_bench #(.CH_W(64), .BYP_DEPTH(6)) u_bench (.*);

  initial begin
    #1;  // the bench clears done at time 0
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
