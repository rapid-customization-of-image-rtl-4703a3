// swavg5_fu: floating point five-point "semi" weighted average custom
// operation, used by the bilateral grid blur:
//   r = w0*x0 + w1*x1 + w2*x2 + w3*x3 + w4*x4     (no division)
// with the binomial weights 1, 4, 6, 4, 1. Latency 5 cycles, fully pipelined:
// a new operation can be triggered every cycle.
//
// Port 1 (din[0]) is the trigger and carries x0; ports 2..5 are operand
// registers holding x1..x4 (an operand written in the same cycle as the
// trigger is used directly). Values are IEEE single precision.
//
// Pipeline (one register per stage, the last one is the result register):
//   1: multiply x1, x2, x3 by 4, 6, 4   (x0 and x4 pass, their weight is 1)
//   2: x0 + 4*x1 and 6*x2 + 4*x3
//   3: sum of the two pairs
//   4: plus x4
//   5: result register
// The five inputs, the missing division, the floating point format and the
// 5-cycle latency follow the source. The weights are this design's choice,
// taken from the 1-4-6-4-1 blur of the Halide bilateral grid example the
// operation accelerates; the source does not list them.
module swavg5_fu
  import tta_pkg::*;
  import fp32_pkg::*;
#(
  parameter int unsigned LATENCY = 5,  // fixed by the pipeline below
  parameter logic [31:0] W1 = 32'h4080_0000,   // 4.0
  parameter logic [31:0] W2 = 32'h40c0_0000,   // 6.0
  parameter logic [31:0] W3 = 32'h4080_0000    // 4.0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [4:0]    we,
  input  logic [DW-1:0] din [5],
  output logic [DW-1:0] r
);
  f32_t op_q [1:4];
  f32_t x [5];

  // stage registers
  logic s1_v, s2_v, s3_v, s4_v;
  f32_t s1_x0, s1_p1, s1_p2, s1_p3, s1_x4;
  f32_t s2_a, s2_b, s2_x4;
  f32_t s3_c, s3_x4;
  f32_t s4_d;

  always_comb begin
    x[0] = din[0];
    for (int k = 1; k < 5; k++) x[k] = we[k] ? din[k] : op_q[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < 5; k++) op_q[k] <= '0;
      {s1_v, s2_v, s3_v, s4_v} <= '0;
      {s1_x0, s1_p1, s1_p2, s1_p3, s1_x4} <= '0;
      {s2_a, s2_b, s2_x4, s3_c, s3_x4, s4_d} <= '0;
      r <= '0;
    end else begin
      for (int k = 1; k < 5; k++) if (we[k]) op_q[k] <= din[k];
      s1_v <= we[0];
      if (we[0]) begin
        s1_x0 <= x[0];
        s1_p1 <= fp_mul(x[1], W1);
        s1_p2 <= fp_mul(x[2], W2);
        s1_p3 <= fp_mul(x[3], W3);
        s1_x4 <= x[4];
      end
      s2_v <= s1_v;
      if (s1_v) begin
        s2_a  <= fp_add(s1_x0, s1_p1);
        s2_b  <= fp_add(s1_p2, s1_p3);
        s2_x4 <= s1_x4;
      end
      s3_v <= s2_v;
      if (s2_v) begin
        s3_c  <= fp_add(s2_a, s2_b);
        s3_x4 <= s2_x4;
      end
      s4_v <= s3_v;
      if (s3_v) s4_d <= fp_add(s3_c, s3_x4);
      if (s4_v) r <= s4_d;
    end
  end

  initial assert (LATENCY == 5) else $error("swavg5_fu supports only LATENCY = 5");
endmodule
