// tb_lerp3d_fu: self-checking test of the floating point trilinear
// interpolation. Random voxel values and weights in [0, 1) are issued with
// gaps and back to back; each expected result is scheduled 15 cycles after
// its trigger and the result port is compared every cycle, checking value
// and latency. The reference blends along x, then y, then z with
// lerp(a, b, w) = a + (b - a) w, each step rounded to single precision.
// Corner cases: weights 0 and 1 must return a corner voxel exactly.
module tb_lerp3d_fu;
  import tta_pkg::*;
  import tb_fp_pkg::*;

  localparam int LAT = 15;

  logic          clk = 0, rst_n = 0;
  logic [10:0]   we = '0;
  logic [DW-1:0] din [11] = '{default: '0};
  logic [DW-1:0] r;
  int checks = 0, failures = 0, issued = 0;
  int cyc = 0;
  logic [31:0] model = '0;
  logic [31:0] sched [int];

  lerp3d_fu dut (.clk, .rst_n, .we, .din, .r);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // x: v000 v100 v010 v110 v001 v101 v011 v111 wx wy wz
  function automatic logic [31:0] ref_lerp(input logic [31:0] x [11]);
    logic [31:0] l [4];
    logic [31:0] m [2];
    for (int i = 0; i < 4; i++) l[i] = rlerp(x[2*i], x[2*i+1], x[8]);
    for (int i = 0; i < 2; i++) m[i] = rlerp(l[2*i], l[2*i+1], x[9]);
    return rlerp(m[0], m[1], x[10]);
  endfunction

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

  task automatic issue(input logic [31:0] x [11]);
    if ($urandom_range(0, 1) == 1) begin
      we = 11'h7fe;
      for (int k = 1; k < 11; k++) din[k] = x[k];
      @(negedge clk);
      we = 11'h001;
      din[0] = x[0];
      for (int k = 1; k < 11; k++) din[k] = $urandom;
    end else begin
      we = 11'h7ff;
      for (int k = 0; k < 11; k++) din[k] = x[k];
    end
    sched[cyc + LAT - 1] = ref_lerp(x);
    issued++;
    @(negedge clk);
    we = '0;
  endtask

  initial begin
    logic [31:0] x [11];
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // corners: weights select one voxel exactly
    for (int c = 0; c < 8; c++) begin
      for (int k = 0; k < 8; k++) x[k] = r2f(real'(10 * k + 3));
      x[8]  = c[0] ? 32'h3f80_0000 : 32'd0;
      x[9]  = c[1] ? 32'h3f80_0000 : 32'd0;
      x[10] = c[2] ? 32'h3f80_0000 : 32'd0;
      issue(x);
      repeat (LAT) @(negedge clk);
      checks++;
      if (r !== r2f(real'(10 * c + 3))) begin
        failures++;
        $display("FAIL corner %0d: got %h", c, r);
      end
    end
    for (int i = 0; i < 500; i++) begin
      for (int k = 0; k < 8; k++) x[k] = rand_f32(10);
      for (int k = 8; k < 11; k++) x[k] = r2f(real'($urandom_range(0, 65535)) / 65536.0);
      issue(x);
      repeat ($urandom_range(0, 7) > 4 ? $urandom_range(1, 20) : 0) @(negedge clk);
    end
    repeat (LAT + 2) @(negedge clk);
    $display("issued %0d operations", issued);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
