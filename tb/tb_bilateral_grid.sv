// tb_bilateral_grid: the bilateral grid workload on the processor at its
// default parameters, on a WW x HH float image (see grid_bench).
module tb_bilateral_grid;
  localparam int WW = 256, HH = 256;
  logic clk = 0;
  logic finished;
  int   checks, failures;

  grid_bench #(.W(WW), .H(HH)) bench (.clk, .finished, .checks, .failures);

  always #5 clk = ~clk;

  initial begin
    fork
      @(posedge finished);
      begin
        repeat (80000000) @(posedge clk);
        $display("watchdog expired");
        bench.failures++;
        #1;
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
