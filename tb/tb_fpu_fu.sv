// tb_fpu_fu: self-checking test of the floating point unit. Random ADDF,
// SUBF, MULF, DIVF, CIF and CFI operations (including cancellation, zeros and
// large exponent differences) are issued with gaps and back to back; each
// expected result is scheduled 3 cycles after its trigger and the result
// port is compared every cycle, checking value and latency.
module tb_fpu_fu;
  import tta_pkg::*;
  import tb_fp_pkg::*;

  localparam int LAT = 3;

  logic          clk = 0, rst_n = 0;
  logic [1:0]    we = '0;
  fpu_op_e       opc = FPU_ADDF;
  logic [DW-1:0] din [2] = '{default: '0};
  logic [DW-1:0] r;
  int checks = 0, failures = 0;
  int cyc = 0;
  int nop [N_FPU_OPS] = '{default: 0};
  logic [31:0] model = '0;
  logic [31:0] sched [int];

  fpu_fu dut (.clk, .rst_n, .we, .opc, .din, .r);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  function automatic logic [31:0] ref_op(input fpu_op_e o, input logic [31:0] a, b);
    real t;
    case (o)
      FPU_ADDF: return radd(a, b);
      FPU_SUBF: return rsub(a, b);
      FPU_MULF: return rmul(a, b);
      FPU_CIF:  return r2f(real'($signed(a)));
      FPU_DIVF: return r2f(f2r(a) / f2r(b));
      default: begin
        t = f2r(a);
        if (t >= 2147483647.0) return 32'h7fff_ffff;
        if (t <= -2147483648.0) return 32'h8000_0000;
        return 32'($rtoi(t));
      end
    endcase
  endfunction

  initial begin
    logic [31:0] a, b;
    fpu_op_e o;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      o = fpu_op_e'($urandom_range(0, N_FPU_OPS - 1));
      a = rand_f32(20);
      b = rand_f32(20);
      case (i % 8)
        1: b = {~a[31], a[30:0]};                       // exact cancellation
        2: b = {~a[31], a[30:0] ^ 31'($urandom_range(0, 3))}; // near cancellation
        3: b = 32'd0;
        4: b = {b[31], a[30:23] - 8'd30, b[22:0]};      // far apart
        default: ;
      endcase
      if (o == FPU_CIF) a = (i % 3 == 0) ? 32'($urandom_range(0, 1000)) - 32'd500 : $urandom;
      nop[o]++;
      if ($urandom_range(0, 1) == 1) begin
        we = 2'b10; din[1] = b;
        @(negedge clk);
        we = 2'b01; din[0] = a; din[1] = $urandom;
      end else begin
        we = 2'b11; din[0] = a; din[1] = b;
      end
      opc = o;
      sched[cyc + LAT - 1] = ref_op(o, a, b);
      @(negedge clk);
      we = '0;
      opc = fpu_op_e'($urandom_range(0, N_FPU_OPS - 1));
      repeat ($urandom_range(0, 7) > 4 ? $urandom_range(1, 4) : 0) @(negedge clk);
    end
    repeat (LAT + 2) @(negedge clk);
    for (int k = 0; k < N_FPU_OPS; k++) begin
      checks++;
      if (nop[k] == 0) begin
        failures++;
        $display("FAIL opcode %0d never issued", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
