// rtc_fu: real time clock unit used to measure the execution time of
// kernels in clock cycles. A free-running 32-bit counter advances by one
// every cycle. Writing the trigger port loads the counter with the written
// value (usually 0 at the start of a kernel); the result port reads the
// counter. A value written in cycle t reads back as value + k in cycle t + k.
//
// The source says the RTC unit measures execution time in instruction
// cycles (at an assumed 100 MHz clock). Counting raw clock cycles, the
// width, and the load-on-trigger behaviour are this design's choices.
module rtc_fu
  import tta_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] r
);
  logic [DW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  cnt <= '0;
    else if (we) cnt <= din + DW'(1);
    else         cnt <= cnt + DW'(1);
  end

  assign r = cnt;
endmodule
