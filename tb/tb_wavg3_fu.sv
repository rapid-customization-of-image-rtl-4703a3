// tb_wavg3_fu: self-checking test of the weighted average operation.
// Random and corner pixel triples are issued, with the operands written
// either before the trigger or in the trigger cycle; the result must equal
// (p0 + 2 p1 + p2) >> 2 one cycle after the trigger and must hold while no
// new trigger arrives. Back-to-back triggers check one result per cycle.
module tb_wavg3_fu;
  import tta_pkg::*;

  logic          clk = 0, rst_n = 0;
  logic [2:0]    we = '0;
  logic [DW-1:0] din [3] = '{default: '0};
  logic [DW-1:0] r;
  int checks = 0, failures = 0;

  wavg3_fu dut (.clk, .rst_n, .we, .din, .r);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned ref_wavg(int unsigned a, int unsigned b, int unsigned c);
    return (a + 2 * b + c) / 4;
  endfunction

  task automatic check(input int unsigned exp, input string what);
    checks++;
    if (r !== DW'(exp)) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, r, exp);
    end
  endtask

  // issue one operation; split = operands written one cycle ahead
  task automatic issue(input logic [7:0] a, b, c, input bit split);
    if (split) begin
      we = 3'b110;
      din[1] = {24'hABCDEF, b};     // upper bits must be ignored
      din[2] = {24'h123456, c};
      @(negedge clk);
      we = 3'b001;
      din[0] = {24'hFFFFFF, a};
      din[1] = $urandom;            // not written: must not matter
      din[2] = $urandom;
    end else begin
      we = 3'b111;
      din[0] = {24'd0, a};
      din[1] = {24'd0, b};
      din[2] = {24'd0, c};
    end
    @(negedge clk);
    we = '0;
  endtask

  initial begin
    logic [7:0] a, b, c;
    int unsigned q [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // corners
    issue(8'd255, 8'd255, 8'd255, 0); check(255, "all 255");
    issue(8'd0, 8'd0, 8'd0, 1);       check(0, "all 0");
    issue(8'd1, 8'd1, 8'd1, 0);       check(1, "all 1");
    issue(8'd3, 8'd0, 8'd0, 0);       check(0, "truncate 3/4");
    issue(8'd255, 8'd0, 8'd255, 1);   check(127, "510/4");
    // random, including result holding for a few cycles
    for (int i = 0; i < 500; i++) begin
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      issue(a, b, c, 1'($urandom));
      check(ref_wavg(a, b, c), "random");
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        check(ref_wavg(a, b, c), "hold");
      end
    end
    // one result per cycle with operands kept in the registers
    we = 3'b110; din[1] = 10; din[2] = 20;
    @(negedge clk);
    for (int i = 0; i < 50; i++) begin
      we = 3'b001; din[0] = i;
      @(negedge clk);
      check(ref_wavg(i, 10, 20), "pipelined");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
