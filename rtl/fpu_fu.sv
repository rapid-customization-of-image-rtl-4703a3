// fpu_fu: floating point function unit of the bilateral grid processor.
// Operations (selected by the trigger address): ADDF, SUBF, MULF, DIVF on
// IEEE single precision values, CIF (signed integer to float) and CFI (float to
// signed integer, rounding toward zero).
//
// Port 1 (din[0], trigger) is the first operand, port 2 an operand register
// holding the second (used directly if written in the trigger cycle). The
// operation is computed in the trigger cycle and passes LATENCY result
// registers, so it can be read LATENCY cycles after the trigger; one
// operation may start every cycle.
//
// The source only says that the machine gains a floating point unit. The
// operation set (DIVF is included because the bilateral grid divides its
// result by the interpolated weight), the latency and the arithmetic model
// of fp32_pkg (round to nearest even, subnormals flushed to zero) are this
// design's choices.
module fpu_fu
  import tta_pkg::*;
  import fp32_pkg::*;
#(
  parameter int unsigned LATENCY = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    we,          // [0] trigger, [1] operand 2
  input  fpu_op_e       opc,         // valid with we[0]
  input  logic [DW-1:0] din [2],
  output logic [DW-1:0] r
);
  f32_t op2_q, b, res;
  logic pv [LATENCY];
  f32_t pd [LATENCY];

  always_comb begin
    b = we[1] ? din[1] : op2_q;
    unique case (opc)
      FPU_ADDF: res = fp_add(din[0], b);
      FPU_SUBF: res = fp_sub(din[0], b);
      FPU_MULF: res = fp_mul(din[0], b);
      FPU_CIF:  res = fp_from_int(din[0]);
      FPU_CFI:  res = fp_to_int(din[0]);
      FPU_DIVF: res = fp_div(din[0], b);
      default:  res = F32_QNAN;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op2_q <= '0;
      for (int i = 0; i < LATENCY; i++) begin
        pv[i] <= 1'b0;
        pd[i] <= '0;
      end
    end else begin
      if (we[1]) op2_q <= din[1];
      pv[0] <= we[0];
      if (we[0]) pd[0] <= res;
      for (int i = 1; i < LATENCY; i++) begin
        pv[i] <= pv[i-1];
        if (pv[i-1]) pd[i] <= pd[i-1];
      end
    end
  end

  assign r = pd[LATENCY-1];

  initial assert (LATENCY >= 1) else $error("fpu_fu needs LATENCY >= 1");
endmodule
