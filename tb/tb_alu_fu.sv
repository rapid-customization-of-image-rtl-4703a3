// tb_alu_fu: self-checking test of the integer ALU. Every opcode is issued
// with random and corner operands, operand 2 written ahead of or together
// with the trigger; the result must appear one cycle after the trigger and
// hold until the next trigger.
module tb_alu_fu;
  import tta_pkg::*;

  logic          clk = 0, rst_n = 0;
  logic [1:0]    we = '0;
  alu_op_e       opc = ALU_ADD;
  logic [DW-1:0] din [2] = '{default: '0};
  logic [DW-1:0] r;
  int checks = 0, failures = 0;

  alu_fu dut (.clk, .rst_n, .we, .opc, .din, .r);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_alu(input alu_op_e o, input logic [31:0] a, b);
    longint sa, sb;
    sa = longint'($signed(a));
    sb = longint'($signed(b));
    case (o)
      ALU_ADD:  return 32'(longint'(a) + longint'(b));
      ALU_SUB:  return 32'(longint'(a) - longint'(b));
      ALU_AND:  return a & b;
      ALU_IOR:  return a | b;
      ALU_XOR:  return a ^ b;
      ALU_SHL:  return 32'(longint'(a) * (64'd1 << b[4:0]));
      ALU_SHR:  return 32'(sa / (64'sd1 << b[4:0]) - ((sa < 0 && (sa % (64'sd1 << b[4:0])) != 0) ? 1 : 0));
      ALU_SHRU: return 32'(longint'(a) / (64'd1 << b[4:0]));
      ALU_EQ:   return {31'd0, a == b};
      ALU_GT:   return {31'd0, sa > sb};
      default:  return {31'd0, longint'(a) > longint'(b)};
    endcase
  endfunction

  task automatic check(input logic [31:0] exp, input string what);
    checks++;
    if (r !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, r, exp);
    end
  endtask

  initial begin
    logic [31:0] a, b, e;
    alu_op_e o;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 4000; i++) begin
      o = alu_op_e'(i % N_ALU_OPS);
      a = $urandom; b = $urandom;
      case ((i / N_ALU_OPS) % 6)
        0: b = a;
        1: a = 32'h8000_0000;
        2: b = 32'hffff_ffff;
        3: begin a = 32'($urandom_range(0, 9)); b = 32'($urandom_range(0, 9)); end
        default: ;
      endcase
      e = ref_alu(o, a, b);
      if ($urandom_range(0, 1) == 1) begin
        we = 2'b10; din[1] = b;
        @(negedge clk);
        we = 2'b01; din[0] = a; din[1] = $urandom; opc = o;
      end else begin
        we = 2'b11; din[0] = a; din[1] = b; opc = o;
      end
      @(negedge clk);
      we = '0; opc = alu_op_e'($urandom_range(0, N_ALU_OPS - 1));
      check(e, o.name());
      if (i % 5 == 0) begin
        @(negedge clk);
        check(e, "hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
