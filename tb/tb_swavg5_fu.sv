// tb_swavg5_fu: self-checking test of the floating point 1-4-6-4-1 weighted
// sum. Random operations are issued with gaps and back to back; a reference
// model schedules each expected result 5 cycles after its trigger, and the
// result port is compared every cycle, so both the value and the exact
// latency are checked. The reference computes x0 + 4 x1, 6 x2 + 4 x3, their
// sum, plus x4, rounding each step to single precision in real arithmetic.
module tb_swavg5_fu;
  import tta_pkg::*;
  import tb_fp_pkg::*;

  localparam int LAT = 5;
  localparam logic [31:0] F4 = 32'h4080_0000, F6 = 32'h40c0_0000;

  logic          clk = 0, rst_n = 0;
  logic [4:0]    we = '0;
  logic [DW-1:0] din [5] = '{default: '0};
  logic [DW-1:0] r;
  int checks = 0, failures = 0, issued = 0;
  int cyc = 0;
  logic [31:0] model = '0;
  logic [31:0] sched [int];

  swavg5_fu dut (.clk, .rst_n, .we, .din, .r);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_sw(input logic [31:0] x [5]);
    logic [31:0] a, b;
    a = radd(x[0], rmul(x[1], F4));
    b = radd(rmul(x[2], F6), rmul(x[3], F4));
    return radd(radd(a, b), x[4]);
  endfunction

  // compare after every clock edge
  always @(negedge clk) if (rst_n) begin
    if (sched.exists(cyc - 1)) begin
      model = sched[cyc - 1];
      sched.delete(cyc - 1);
    end
    checks++;
    if (r !== model) begin
      failures++;
      $display("FAIL cycle %0d: got %h expected %h", cyc, r, model);
    end
  end

  initial begin
    logic [31:0] x [5];
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 600; i++) begin
      for (int k = 0; k < 5; k++) x[k] = (i < 20) ? r2f(real'(k + i)) : rand_f32(8);
      if (i % 7 == 3) x[2] = 32'd0;                 // zero operand
      if (i % 11 == 5) x[4] = {~x[0][31], x[0][30:0]};
      // operands 2..5 one cycle ahead, or together with the trigger
      if ($urandom_range(0, 1) == 1) begin
        we = 5'b11110;
        for (int k = 1; k < 5; k++) din[k] = x[k];
        @(negedge clk);
        we = 5'b00001;
        din[0] = x[0];
        for (int k = 1; k < 5; k++) din[k] = $urandom;
      end else begin
        we = 5'b11111;
        for (int k = 0; k < 5; k++) din[k] = x[k];
      end
      sched[cyc + LAT - 1] = ref_sw(x);
      issued++;
      @(negedge clk);
      we = '0;
      repeat ($urandom_range(0, 7) > 4 ? $urandom_range(1, 6) : 0) @(negedge clk);
    end
    repeat (LAT + 2) @(negedge clk);
    $display("issued %0d operations", issued);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
