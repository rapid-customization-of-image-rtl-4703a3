// tb_gcu: self-checking test of the global control unit. A program with
// jumps and a halt is loaded; the testbench plays the interconnect by
// turning the moves of the issued instruction into jump and halt requests.
// The sequence of issued program counters, the halt code, the empty
// instructions issued while stopped and a restart from address 0 are
// checked.
module tb_gcu;
  import tta_pkg::*;
  import tta_asm_pkg::*;

  logic          clk = 0, rst_n = 0;
  logic          prog_we = 0;
  logic [9:0]    prog_addr = '0;
  instr_t        prog_data = '0;
  logic          start = 0;
  logic          jump_we, halt_we;
  logic [DW-1:0] jump_target, halt_code;
  instr_t        instr;
  logic [9:0]    pc;
  logic          running, done;
  logic [DW-1:0] exit_code;
  int checks = 0, failures = 0;

  gcu #(.IMEM_DEPTH(1024)) dut (.clk, .rst_n, .prog_we, .prog_addr, .prog_data, .start,
    .jump_we, .jump_target, .halt_we, .halt_code, .instr, .pc, .running, .done, .exit_code);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the interconnect's role: immediate moves to the jump and halt sockets
  always_comb begin
    jump_we = 0; jump_target = '0; halt_we = 0; halt_code = '0;
    for (int b = 0; b < NBUS; b++) begin
      if (instr[b].guard == G_ALWAYS && instr[b].dst == SOCK_W'(D_JUMP)) begin
        jump_we = 1; jump_target = DW'($signed(instr[b].imm));
      end
      if (instr[b].guard == G_ALWAYS && instr[b].dst == SOCK_W'(D_HALT)) begin
        halt_we = 1; halt_code = DW'($signed(instr[b].imm));
      end
    end
  end

  task automatic load(input int a, input instr_t i);
    prog_we = 1; prog_addr = 10'(a); prog_data = i;
    @(negedge clk);
    prog_we = 0;
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int trace [$];
    int expect_pc [$] = '{0, 1, 5, 6, 700, 701, 702};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 1024; a++) load(a, ins(im(a, D_RF)));  // fill: harmless moves
    load(1, ins(im(5, D_JUMP)));
    load(2, ins(im(99, D_HALT)));                 // skipped by the jump
    load(6, ins(im(0, D_RF), im(700, D_JUMP)));   // jump in slot 1
    load(702, ins(im(7, D_RF), nopm(), im(32'h1234, D_HALT)));
    check(!running && !done, "idle after reset");
    for (int b = 0; b < NBUS; b++) check(instr[b].guard == G_NEVER, "empty slots while stopped");
    for (int run = 0; run < 2; run++) begin
      start = 1;
      @(negedge clk);
      start = 0;
      trace.delete();
      while (running) begin
        trace.push_back(int'(pc));
        check(instr == ins(im(int'(pc), D_RF)) || pc inside {1, 6, 702}, "issued instruction");
        @(negedge clk);
      end
      check(trace.size() == expect_pc.size(), "trace length");
      foreach (expect_pc[i])
        if (i < trace.size()) check(trace[i] == expect_pc[i], $sformatf("pc[%0d]=%0d", i, trace[i]));
      check(done, "done after halt");
      check(exit_code == 32'h1234, "exit code");
      repeat (3) @(negedge clk);
      check(!running && done, "stays halted");
      for (int b = 0; b < NBUS; b++) check(instr[b].guard == G_NEVER, "empty slots after halt");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
