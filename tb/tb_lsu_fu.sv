// tb_lsu_fu: self-checking test of the load-store unit and its data
// memory (reduced to 4 KiB). The host port fills the memory with random
// words; then random word and byte loads and stores are issued through the
// trigger port against a reference copy of the memory. Loads must return
// their data one cycle after the trigger and keep it while stores follow.
// Finally the host port reads every word back.
module tb_lsu_fu;
  import tta_pkg::*;

  localparam int BYTES = 4096;
  localparam int WORDS = BYTES / 4;

  logic          clk = 0, rst_n = 0;
  logic [1:0]    we = '0;
  lsu_op_e       opc = LSU_LDW;
  logic [DW-1:0] din [2] = '{default: '0};
  logic [DW-1:0] r;
  logic          host_en = 0, host_we = 0;
  logic [$clog2(BYTES)-3:0] host_addr = '0;
  logic [DW-1:0] host_wdata = '0, host_rdata;
  logic [7:0]    refm [BYTES];
  int checks = 0, failures = 0;
  int nld = 0, nldq = 0, nst = 0, nstq = 0;

  lsu_fu #(.DMEM_BYTES(BYTES)) dut (.clk, .rst_n, .we, .opc, .din, .r,
    .host_en, .host_we, .host_addr, .host_wdata, .host_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_word(input int a);
    a = a & ~3;
    return {refm[a+3], refm[a+2], refm[a+1], refm[a]};
  endfunction

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] w, last;
    bit have_last;
    int a;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      w = $urandom;
      host_en = 1; host_we = 1; host_addr = i[$clog2(BYTES)-3:0]; host_wdata = w;
      {refm[4*i+3], refm[4*i+2], refm[4*i+1], refm[4*i]} = w;
      @(negedge clk);
    end
    host_en = 0; host_we = 0;
    last = '0;
    have_last = 0;
    for (int i = 0; i < 6000; i++) begin
      a = $urandom_range(0, BYTES - 1);
      w = $urandom;
      case ($urandom_range(0, 3))
        0: begin we = 2'b01; opc = LSU_LDW;  din[0] = a; @(negedge clk); we = 0;
                 check(r, ref_word(a), "LDW"); last = ref_word(a); have_last = 1; nld++; end
        1: begin we = 2'b01; opc = LSU_LDQU; din[0] = a; @(negedge clk); we = 0;
                 check(r, {24'd0, refm[a]}, "LDQU"); last = {24'd0, refm[a]}; have_last = 1; nldq++; end
        2: begin
             we = 2'b10; din[1] = w; @(negedge clk);
             we = 2'b01; opc = LSU_STW; din[0] = a; din[1] = $urandom; @(negedge clk); we = 0;
             a = a & ~3;
             {refm[a+3], refm[a+2], refm[a+1], refm[a]} = w;
             nst++;
             if (have_last) check(r, last, "load result held over store");
           end
        default: begin
             we = 2'b11; opc = LSU_STQ; din[0] = a; din[1] = w; @(negedge clk); we = 0;
             refm[a] = w[7:0];
             nstq++;
           end
      endcase
    end
    for (int i = 0; i < WORDS; i++) begin
      host_en = 1; host_we = 0; host_addr = i[$clog2(BYTES)-3:0];
      @(negedge clk);
      check(host_rdata, ref_word(4 * i), "host read");
    end
    host_en = 0;
    checks++;
    if (nld == 0 || nldq == 0 || nst == 0 || nstq == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
