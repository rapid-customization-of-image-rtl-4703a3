// tb_bool_rf: self-checking test of the boolean register file: random
// writes of whole words on all ports must store only bit 0, later ports
// win on the same register, and reset clears both registers.
module tb_bool_rf;
  import tta_pkg::*;

  localparam int P = 3;

  logic          clk = 0, rst_n = 0;
  logic [P-1:0]  we = '0;
  logic          waddr [P] = '{default: '0};
  logic [DW-1:0] wdata [P] = '{default: '0};
  logic [1:0]    b, refb;
  int checks = 0, failures = 0;

  bool_rf #(.NREGS(2), .NPORT(P)) dut (.clk, .rst_n, .we, .waddr, .wdata, .b);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    refb = '0;
    checks++; if (b !== refb) failures++;
    for (int c = 0; c < 2000; c++) begin
      for (int p = 0; p < P; p++) begin
        we[p] = 1'($urandom);
        waddr[p] = 1'($urandom);
        wdata[p] = {31'($urandom), 1'($urandom)};
        if (we[p]) refb[waddr[p]] = wdata[p][0];
      end
      @(negedge clk);
      checks++;
      if (b !== refb) begin
        failures++;
        $display("FAIL cycle %0d: b=%b expected %b", c, b, refb);
      end
    end
    we = '0;
    rst_n = 0;
    #1;
    checks++; if (b !== 2'b00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
