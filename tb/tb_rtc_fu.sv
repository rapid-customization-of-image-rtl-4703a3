// tb_rtc_fu: self-checking test of the real time clock unit. After reset
// the counter must equal the number of elapsed clock cycles; a value
// written to the trigger reads back as value + k k cycles later, including
// wrap-around past 2^32 - 1.
module tb_rtc_fu;
  import tta_pkg::*;

  logic          clk = 0, rst_n = 0;
  logic          we = 0;
  logic [DW-1:0] din = '0;
  logic [DW-1:0] r;
  int checks = 0, failures = 0;

  rtc_fu dut (.clk, .rst_n, .we, .din, .r);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] exp, input string what);
    checks++;
    if (r !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, r, exp);
    end
  endtask

  initial begin
    logic [31:0] v;
    int k;
    @(negedge clk);
    check(0, "in reset");
    rst_n = 1;
    for (int i = 1; i <= 100; i++) begin
      @(negedge clk);
      check(i, "free running");
    end
    for (int n = 0; n < 200; n++) begin
      v = (n % 4 == 0) ? 32'hffff_fff0 + 32'($urandom_range(0, 15)) : $urandom;
      we = 1; din = v;
      @(negedge clk);
      we = 0; din = $urandom;
      k = $urandom_range(1, 40);
      check(v + 1, "loaded");
      repeat (k - 1) @(negedge clk);
      check(v + 32'(k), "counting after load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
