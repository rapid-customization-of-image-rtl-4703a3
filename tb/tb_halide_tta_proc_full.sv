// tb_halide_tta_proc_full: end-to-end test of the processor at its default
// parameters on one full 512 x 512 image plane, the
// blur benchmark size, producing the 510 x 510 blurred plane (see blur_bench).
module tb_halide_tta_proc_full;
  logic clk = 0;
  logic finished;
  int   checks, failures;

  blur_bench #(.W(512), .H(512)) bench (.clk, .finished, .checks, .failures);

  always #5 clk = ~clk;

  initial begin
    fork
      @(posedge finished);
      begin
        repeat (20000000) @(posedge clk);
        $display("watchdog expired");
        bench.failures++;
        #1;
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
