// tb_scalar_rf: self-checking test of the scalar register file. Random
// writes on all three ports per cycle (distinct registers, or the same one
// to check that the highest port wins) are compared against a reference
// array after every clock; reset must clear all registers.
module tb_scalar_rf;
  import tta_pkg::*;

  localparam int N = 16, P = 3;

  logic          clk = 0, rst_n = 0;
  logic [P-1:0]  we = '0;
  logic [3:0]    waddr [P] = '{default: '0};
  logic [DW-1:0] wdata [P] = '{default: '0};
  logic [DW-1:0] regs  [N];
  logic [DW-1:0] refr  [N];
  int checks = 0, failures = 0;

  scalar_rf #(.NREGS(N), .NPORT(P)) dut (.clk, .rst_n, .we, .waddr, .wdata, .regs);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (regs[i] !== refr[i]) begin
        failures++;
        $display("FAIL %s: r%0d = %h expected %h", what, i, regs[i], refr[i]);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) refr[i] = '0;
    compare("after reset");
    for (int c = 0; c < 2000; c++) begin
      for (int p = 0; p < P; p++) begin
        we[p]    = 1'($urandom);
        waddr[p] = 4'($urandom);
        wdata[p] = $urandom;
      end
      if (c % 10 == 0) waddr[2] = waddr[0];
      for (int p = 0; p < P; p++) if (we[p]) refr[waddr[p]] = wdata[p];
      @(negedge clk);
      compare("after write");
    end
    we = '0;
    rst_n = 0;
    #1;
    for (int i = 0; i < N; i++) refr[i] = '0;
    compare("async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
