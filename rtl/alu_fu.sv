// alu_fu: integer ALU of the processor, with the basic operations a C
// compiler selects for image kernels: ADD, SUB, AND, IOR, XOR, shifts
// SHL / SHR (arithmetic) / SHRU (logical), and the comparisons EQ, GT
// (signed) and GTU (unsigned), which return 0 or 1.
//
// Port 1 (din[0]) is the trigger and the first operand a; port 2 is an
// operand register holding b (used directly if written in the trigger cycle).
// The result r = a OP b is registered: it is readable from the cycle after
// the trigger and holds until the next trigger. Shift amounts use the low 5
// bits of b.
//
// The source only names an integer ALU with basic operations; the operation
// set, operand order and 1-cycle latency are this design's choices.
module alu_fu
  import tta_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    we,          // [0] trigger, [1] operand 2
  input  alu_op_e       opc,         // valid with we[0]
  input  logic [DW-1:0] din [2],
  output logic [DW-1:0] r
);
  logic [DW-1:0] op2_q, a, b, res;

  always_comb begin
    a = din[0];
    b = we[1] ? din[1] : op2_q;
    unique case (opc)
      ALU_ADD:  res = a + b;
      ALU_SUB:  res = a - b;
      ALU_AND:  res = a & b;
      ALU_IOR:  res = a | b;
      ALU_XOR:  res = a ^ b;
      ALU_SHL:  res = a << b[4:0];
      ALU_SHR:  res = DW'($signed(a) >>> b[4:0]);
      ALU_SHRU: res = a >> b[4:0];
      ALU_EQ:   res = DW'(a == b);
      ALU_GT:   res = DW'($signed(a) > $signed(b));
      ALU_GTU:  res = DW'(a > b);
      default:  res = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op2_q <= '0;
      r     <= '0;
    end else begin
      if (we[1]) op2_q <= din[1];
      if (we[0]) r <= res;
    end
  end
endmodule
