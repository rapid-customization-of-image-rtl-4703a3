// tb_halide_tta_proc: end-to-end test of the processor at its default
// parameters on a small image (16 x 12 input plane), see blur_bench.
module tb_halide_tta_proc;
  logic clk = 0;
  logic finished;
  int   checks, failures;

  blur_bench #(.W(16), .H(12)) bench (.clk, .finished, .checks, .failures);

  always #5 clk = ~clk;

  initial begin
    fork
      @(posedge finished);
      begin
        repeat (200000) @(posedge clk);
        $display("watchdog expired");
        bench.failures++;
        #1;
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
