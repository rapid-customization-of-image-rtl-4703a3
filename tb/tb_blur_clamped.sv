// tb_blur_clamped: the clamp-to-edge blur benchmark on the processor at its default
// parameters: one 512 x 512 image plane blurred to a 512 x 512 plane, border
// neighbours clamped to the edge (see blur_bench).
module tb_blur_clamped;
  localparam int WW = 512, HH = 512;
  logic clk = 0;
  logic finished;
  int   checks, failures;

  blur_bench #(.W(WW), .H(HH), .CLAMP(1)) bench (.clk, .finished, .checks, .failures);

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
