// wavg3_fu: the weighted average custom operation used to blur images,
//   r = (p0 + 2*p1 + p2) / 4
// on three 8-bit pixel values, with a 1-cycle latency.
//
// Port 1 (din[0]) is the trigger and carries p0; ports 2 and 3 are operand
// registers holding p1 and p2. Writing the trigger starts the operation; an
// operand written in the same cycle as the trigger is used directly. The
// result register can be read from the cycle after the trigger and holds its
// value until the next trigger. Only the low 8 bits of each input are used
// and the result is zero-extended to the 32-bit word.
//
// The formula, the 8-bit operands and the single-cycle latency follow the
// source. The 10-bit intermediate sum keeps the carries of p0 + 2*p1 + p2, so
// no intermediate overflow occurs, and the division is a hard-wired right
// shift by two that truncates (rounding toward zero is this design's
// choice; the source does not say how the fraction is treated).
module wavg3_fu
  import tta_pkg::*;
#(
  parameter int unsigned LATENCY = 1   // fixed: one register stage
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [2:0]    we,            // [0] trigger, [1] p1, [2] p2
  input  logic [DW-1:0] din [3],
  output logic [DW-1:0] r
);
  logic [7:0] op2_q, op3_q;
  logic [7:0] p0, p1, p2;
  logic [9:0] sum;

  always_comb begin
    p0  = din[0][7:0];
    p1  = we[1] ? din[1][7:0] : op2_q;
    p2  = we[2] ? din[2][7:0] : op3_q;
    sum = {2'b00, p0} + {1'b0, p1, 1'b0} + {2'b00, p2};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op2_q <= '0;
      op3_q <= '0;
      r     <= '0;
    end else begin
      if (we[1]) op2_q <= din[1][7:0];
      if (we[2]) op3_q <= din[2][7:0];
      if (we[0]) r <= {24'd0, sum[9:2]};
    end
  end

  initial assert (LATENCY == 1) else $error("wavg3_fu supports only LATENCY = 1");
endmodule
