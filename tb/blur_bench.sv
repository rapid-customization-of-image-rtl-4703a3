// blur_bench: end-to-end bench for halide_tta_proc (default parameters),
// shared by the small and the full-size testbench.
//
// It assembles and loads a program that
//   1. resets the RTC, blurs a W x H 8-bit image plane with the 3x3
//      weighted average (horizontal wavg3 on three rows, then vertical
//      wavg3 on the three results) and stores the RTC count. With CLAMP = 0
//      border pixels are not computed and the result is (W-2) x (H-2); with
//      CLAMP = 1 neighbours outside the image are clamped to the edge
//      (guarded moves) and the result is W x H;
//   2. loads 11 floats and computes a trilinear interpolation (lerp3d), a
//      1-4-6-4-1 weighted sum (swavg5) and FPU ADDF, MULF, SUBF, DIVF, CIF and CFI,
//      reading each result exactly at the unit's latency;
//   3. halts with an exit code.
// The image goes in and the results come out through the host port. The
// blurred plane is compared with a reference computed here, the floats with
// the tb_fp_pkg reference, and the RTC count with the number of cycles the
// bench counts between the RTC reset and the RTC read. Each mechanism the
// core has (taken and not-taken guarded jumps, squashed moves, operand
// bypass in the trigger cycle, every FU and opcode used) is counted and a
// mechanism that never happened is a failure.
module blur_bench
  import tta_pkg::*;
  import tta_asm_pkg::*;
  import tb_fp_pkg::*;
#(
  parameter int W = 16,
  parameter int H = 12,
  parameter bit CLAMP = 0      // 0: no border handling, 1: clamp-to-edge
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int IN   = 0;
  localparam int OUT  = ((W * H + 3) / 4) * 4;
  localparam int OW   = CLAMP ? W : W - 2;
  localparam int OH   = CLAMP ? H : H - 2;
  localparam int RES  = OUT + ((OW * OH + 3) / 4) * 4;  // RTC count
  localparam int FIN  = RES + 4;                         // 11 float inputs
  localparam int FOUT = FIN + 64;                        // float results
  localparam int EXIT = 32'h600d;

  logic          rst_n = 0;
  logic          prog_we = 0;
  logic [9:0]    prog_addr = '0;
  instr_t        prog_data = '0;
  logic          host_en = 0, host_we = 0;
  logic [18:0]   host_addr = '0;
  logic [31:0]   host_wdata = '0, host_rdata;
  logic          start = 0, running, done;
  logic [31:0]   exit_code;

  halide_tta_proc dut (.clk, .rst_n, .prog_we, .prog_addr, .prog_data,
    .host_en, .host_we, .host_addr, .host_wdata, .host_rdata,
    .start, .running, .done, .exit_code);

  instr_t prog [$];
  int     rtc_pc_set, rtc_pc_read;

  function automatic int emit(input instr_t i);
    prog.push_back(i);
    return prog.size() - 1;
  endfunction

  // clamp-to-edge kernel: every output pixel, neighbours clamped to the image.
  // r0 x, r1 y, r2 output pointer, r3/r4/r5 base of rows y-1/y/y+1 (clamped),
  // r6/r8 columns x-1/x+1 (clamped), r9..r10 pixels, r12/r13 row averages.
  task automatic build_clamped_kernel();
    int ly, lx, dummy;
    rtc_pc_set = emit(ins(im(0, D_RTC_T), im(0, 1), im(OUT, 2)));
    dummy = emit(ins(im(IN, 4)));
    ly = emit(ins(im(W, D_ALU_O2), mv(4, D_ALU_T + ALU_SUB)));
    dummy = emit(ins(mv(S_ALU, 3), im(0, D_ALU_O2), mv(1, D_ALU_T + ALU_EQ)));
    dummy = emit(ins(mv(S_ALU, D_B0), im(W, D_ALU_O2), mv(4, D_ALU_T + ALU_ADD)));
    dummy = emit(ins(mv(4, 3, G_B0), mv(S_ALU, 5), im(H - 1, D_ALU_O2)));
    dummy = emit(ins(mv(1, D_ALU_T + ALU_EQ)));
    dummy = emit(ins(mv(S_ALU, D_B0), im(0, 0)));
    dummy = emit(ins(mv(4, 5, G_B0)));
    lx = emit(ins(im(1, D_ALU_O2), mv(0, D_ALU_T + ALU_SUB)));
    dummy = emit(ins(mv(S_ALU, 6), im(0, D_ALU_O2), mv(0, D_ALU_T + ALU_EQ)));
    dummy = emit(ins(mv(S_ALU, D_B0), im(1, D_ALU_O2), mv(0, D_ALU_T + ALU_ADD)));
    dummy = emit(ins(im(0, 6, G_B0), mv(S_ALU, 8), im(W - 1, D_ALU_O2)));
    dummy = emit(ins(mv(0, D_ALU_T + ALU_EQ)));
    dummy = emit(ins(mv(S_ALU, D_B0)));
    dummy = emit(ins(im(W - 1, 8, G_B0)));
    for (int j = 0; j < 3; j++) begin
      if (j == 0) dummy = emit(ins(mv(3 + j, D_ALU_O2), mv(6, D_ALU_T + ALU_ADD)));
      else        dummy = emit(ins(mv(S_WAVG3, 12 + j - 1), mv(3 + j, D_ALU_O2),
                                   mv(6, D_ALU_T + ALU_ADD)));
      dummy = emit(ins(mv(S_ALU, D_LSU_T + LSU_LDQU), mv(0, D_ALU_T + ALU_ADD)));
      dummy = emit(ins(mv(S_LSU, 9), mv(S_ALU, D_LSU_T + LSU_LDQU), mv(8, D_ALU_T + ALU_ADD)));
      dummy = emit(ins(mv(S_LSU, 10), mv(S_ALU, D_LSU_T + LSU_LDQU)));
      dummy = emit(ins(mv(S_LSU, D_WAVG3_O3), mv(10, D_WAVG3_O2), mv(9, D_WAVG3_T)));
    end
    dummy = emit(ins(mv(S_WAVG3, D_WAVG3_O3), mv(13, D_WAVG3_O2), mv(12, D_WAVG3_T)));
    dummy = emit(ins(mv(S_WAVG3, D_LSU_O2), mv(2, D_LSU_T + LSU_STQ)));
    dummy = emit(ins(im(1, D_ALU_O2), mv(2, D_ALU_T + ALU_ADD)));
    dummy = emit(ins(mv(S_ALU, 2), im(1, D_ALU_O2), mv(0, D_ALU_T + ALU_ADD)));
    dummy = emit(ins(mv(S_ALU, 0), im(W, D_ALU_O2), mv(S_ALU, D_ALU_T + ALU_EQ)));
    dummy = emit(ins(mv(S_ALU, D_B0)));
    dummy = emit(ins(im(lx, D_JUMP, G_NB0)));
    dummy = emit(ins(im(W, D_ALU_O2), mv(4, D_ALU_T + ALU_ADD)));
    dummy = emit(ins(mv(S_ALU, 4), im(1, D_ALU_O2), mv(1, D_ALU_T + ALU_ADD)));
    dummy = emit(ins(mv(S_ALU, 1), im(H, D_ALU_O2), mv(S_ALU, D_ALU_T + ALU_EQ)));
    dummy = emit(ins(mv(S_ALU, D_B0)));
    dummy = emit(ins(im(ly, D_JUMP, G_NB0)));
  endtask

  // no border handling: r0 input pointer, r1 output pointer, r2/r3 x/y
  // counters, r4..r12 the 3x3 window, r13/r14 row averages.
  task automatic build_noborder_kernel();
    int lx, dummy;
    // prologue: RTC <- 0, r0 <- input, r1 <- output, counters
    rtc_pc_set = emit(ins(im(0, D_RTC_T), im(IN, 0), im(OUT, 1)));
    dummy = emit(ins(im(OW, 2), im(OH, 3)));
    // per output pixel: load the 3x3 window into r4..r12
    lx = emit(ins(im(0, D_ALU_O2), mv(0, D_ALU_T + ALU_ADD)));
    for (int k = 0; k < 9; k++) begin
      dummy = emit(ins(mv(S_ALU, D_LSU_T + LSU_LDQU)));
      if (k < 8)
        dummy = emit(ins(mv(S_LSU, 4 + k), im(((k + 1) / 3) * W + (k + 1) % 3, D_ALU_O2),
                         mv(0, D_ALU_T + ALU_ADD)));
      else
        dummy = emit(ins(mv(S_LSU, 4 + k)));
    end
    // three horizontal averages, then the vertical one
    dummy = emit(ins(mv(5, D_WAVG3_O2), mv(6, D_WAVG3_O3), mv(4, D_WAVG3_T)));
    dummy = emit(ins(mv(S_WAVG3, 13), mv(8, D_WAVG3_O2), mv(9, D_WAVG3_O3)));
    dummy = emit(ins(mv(7, D_WAVG3_T)));
    dummy = emit(ins(mv(S_WAVG3, 14), mv(11, D_WAVG3_O2), mv(12, D_WAVG3_O3)));
    dummy = emit(ins(mv(10, D_WAVG3_T)));
    dummy = emit(ins(mv(S_WAVG3, D_WAVG3_O3), mv(14, D_WAVG3_O2), mv(13, D_WAVG3_T)));
    dummy = emit(ins(mv(S_WAVG3, D_LSU_O2), mv(1, D_LSU_T + LSU_STQ)));
    // advance pointers, count x
    dummy = emit(ins(im(1, D_ALU_O2), mv(0, D_ALU_T + ALU_ADD)));
    dummy = emit(ins(mv(S_ALU, 0), im(1, D_ALU_O2), mv(1, D_ALU_T + ALU_ADD)));
    dummy = emit(ins(mv(S_ALU, 1), im(1, D_ALU_O2), mv(2, D_ALU_T + ALU_SUB)));
    dummy = emit(ins(mv(S_ALU, 2), im(0, D_ALU_O2), mv(S_ALU, D_ALU_T + ALU_EQ)));
    dummy = emit(ins(mv(S_ALU, D_B0)));
    dummy = emit(ins(im(lx, D_JUMP, G_NB0)));
    // end of row: skip the two border columns, count y
    dummy = emit(ins(im(2, D_ALU_O2), mv(0, D_ALU_T + ALU_ADD)));
    dummy = emit(ins(mv(S_ALU, 0), im(1, D_ALU_O2), mv(3, D_ALU_T + ALU_SUB)));
    dummy = emit(ins(mv(S_ALU, 3), im(0, D_ALU_O2), mv(S_ALU, D_ALU_T + ALU_EQ)));
    dummy = emit(ins(mv(S_ALU, D_B0), im(OW, 2)));
    dummy = emit(ins(im(lx, D_JUMP, G_NB0)));
  endtask

  task automatic build();
    int dummy;
    prog.delete();
    if (CLAMP) build_clamped_kernel();
    else       build_noborder_kernel();
    rtc_pc_read = emit(ins(mv(S_RTC, D_LSU_O2), im(RES, D_LSU_T + LSU_STW)));
    // floating point part: r0..r10 <- FIN[0..10]
    dummy = emit(ins(im(FIN, D_LSU_T + LSU_LDW)));
    for (int k = 0; k < 11; k++)
      if (k < 10) dummy = emit(ins(mv(S_LSU, k), im(FIN + 4 * (k + 1), D_LSU_T + LSU_LDW)));
      else        dummy = emit(ins(mv(S_LSU, k)));
    // lerp3d: operands 2..11 from r1..r10, trigger with r0
    dummy = emit(ins(mv(1, D_LERP_O + 0), mv(2, D_LERP_O + 1), mv(3, D_LERP_O + 2)));
    dummy = emit(ins(mv(4, D_LERP_O + 3), mv(5, D_LERP_O + 4), mv(6, D_LERP_O + 5)));
    dummy = emit(ins(mv(7, D_LERP_O + 6), mv(8, D_LERP_O + 7), mv(9, D_LERP_O + 8)));
    dummy = emit(ins(mv(10, D_LERP_O + 9), mv(0, D_LERP_T)));
    // swavg5 issued while the lerp runs, triggered together with ADDF
    dummy = emit(ins(mv(1, D_SWAVG5_O + 0), mv(2, D_SWAVG5_O + 1), mv(3, D_SWAVG5_O + 2)));
    dummy = emit(ins(mv(4, D_SWAVG5_O + 3)));
    // FPU: ADDF, MULF, SUBF back to back, then CIF, CFI
    dummy = emit(ins(mv(1, D_FPU_O2), mv(0, D_FPU_T + FPU_ADDF), mv(0, D_SWAVG5_T))); // t0
    dummy = emit(ins(mv(3, D_FPU_O2), mv(2, D_FPU_T + FPU_MULF)));     // t0+1
    dummy = emit(ins(mv(5, D_FPU_O2), mv(4, D_FPU_T + FPU_SUBF)));     // t0+2
    dummy = emit(ins(mv(S_FPU, D_LSU_O2), im(FOUT + 8, D_LSU_T + LSU_STW),
                     im(-1234567, D_FPU_T + FPU_CIF)));                 // t0+3
    dummy = emit(ins(mv(S_FPU, D_LSU_O2), im(FOUT + 12, D_LSU_T + LSU_STW),
                     mv(6, D_FPU_T + FPU_CFI)));                         // t0+4
    dummy = emit(ins(mv(S_FPU, D_LSU_O2), im(FOUT + 16, D_LSU_T + LSU_STW),
                     mv(S_SWAVG5, 11)));                                 // t0+5 = swavg5 +5
    dummy = emit(ins(mv(S_FPU, D_LSU_O2), im(FOUT + 20, D_LSU_T + LSU_STW)));  // CIF +3
    dummy = emit(ins(mv(S_FPU, D_LSU_O2), im(FOUT + 24, D_LSU_T + LSU_STW)));  // CFI +3
    dummy = emit(ins(mv(11, D_LSU_O2), im(FOUT + 4, D_LSU_T + LSU_STW)));
    // wait for the lerp: read exactly 15 instructions after its trigger
    // (DIVF issued in the wait, read 3 later together with the lerp)
    dummy = emit(ins(mv(7, D_FPU_O2), mv(6, D_FPU_T + FPU_DIVF)));
    dummy = emit(ins(nopm()));
    dummy = emit(ins(nopm()));
    dummy = emit(ins(mv(S_LERP, D_LSU_O2), im(FOUT + 0, D_LSU_T + LSU_STW), mv(S_FPU, 11)));
    dummy = emit(ins(mv(11, D_LSU_O2), im(FOUT + 28, D_LSU_T + LSU_STW)));
    dummy = emit(ins(im(EXIT, D_HALT)));
  endtask

  // ---------------- mechanism counters ----------------
  int n_jump_taken = 0, n_jump_not = 0, n_squashed = 0, n_bypass = 0, n_guard_exec = 0;
  int n_wavg3 = 0, n_lerp = 0, n_swavg5 = 0, n_rtc_set = 0, n_rtc_read = 0;
  int n_ldq = 0, n_ldw = 0, n_stq = 0, n_stw = 0;
  int n_fpu [N_FPU_OPS];
  int n_alu [N_ALU_OPS];
  int cyc_set = -1, cyc_read = -1, cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (running && rst_n) begin
      for (int b = 0; b < NBUS; b++) begin
        move_t m;
        m = dut.instr[b];
        if (m.guard != G_NEVER && m.dst != SOCK_W'(D_NONE) && !dut.en[b]) n_squashed++;
        if (dut.en[b]) begin
          if (m.dst == SOCK_W'(D_JUMP)) n_jump_taken++;
          if (m.guard == G_B0 && m.dst < SOCK_W'(16)) n_guard_exec++;
          if (m.dst == SOCK_W'(D_WAVG3_T)) n_wavg3++;
          if (m.dst == SOCK_W'(D_LERP_T)) n_lerp++;
          if (m.dst == SOCK_W'(D_SWAVG5_T)) n_swavg5++;
          if (m.dst == SOCK_W'(D_RTC_T)) begin n_rtc_set++; cyc_set = cyc; end
          if (m.src == SOCK_W'(S_RTC)) begin n_rtc_read++; cyc_read = cyc; end
          if (m.dst == SOCK_W'(D_LSU_T + LSU_LDQU)) n_ldq++;
          if (m.dst == SOCK_W'(D_LSU_T + LSU_LDW)) n_ldw++;
          if (m.dst == SOCK_W'(D_LSU_T + LSU_STQ)) n_stq++;
          if (m.dst == SOCK_W'(D_LSU_T + LSU_STW)) n_stw++;
          for (int o = 0; o < N_FPU_OPS; o++) if (m.dst == SOCK_W'(D_FPU_T + o)) n_fpu[o]++;
          for (int o = 0; o < N_ALU_OPS; o++) if (m.dst == SOCK_W'(D_ALU_T + o)) n_alu[o]++;
        end
        if (m.guard != G_NEVER && m.dst == SOCK_W'(D_JUMP) && !dut.en[b]) n_jump_not++;
      end
      if (dut.wavg3_we[0] && |dut.wavg3_we[2:1]) n_bypass++;
    end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic host_write(input int byte_addr, input logic [31:0] v);
    host_en = 1; host_we = 1; host_addr = 19'(byte_addr / 4); host_wdata = v;
    @(negedge clk);
    host_en = 0; host_we = 0;
  endtask

  task automatic host_read(input int byte_addr, output logic [31:0] v);
    host_en = 1; host_we = 0; host_addr = 19'(byte_addr / 4);
    @(negedge clk);
    host_en = 0;
    v = host_rdata;
  endtask

  logic [7:0]  img [W * H];
  logic [7:0]  expo [OW * OH];
  logic [31:0] fin [11];

  function automatic int clampi(int v, int n);
    return v < 0 ? 0 : (v > n - 1 ? n - 1 : v);
  endfunction

  function automatic int wavg(int a, int b, int c);
    return (a + 2 * b + c) >> 2;
  endfunction

  initial begin
    logic [31:0] v;
    logic [7:0]  h [3];
    int          start_cyc;
    checks = 0; failures = 0; finished = 0;
    foreach (n_fpu[o]) n_fpu[o] = 0;
    foreach (n_alu[o]) n_alu[o] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    build();
    if (prog.size() > 1024) $fatal(1, "program too long");
    foreach (prog[a]) begin
      prog_we = 1; prog_addr = 10'(a); prog_data = prog[a];
      @(negedge clk);
    end
    prog_we = 0;
    // image and reference
    for (int i = 0; i < W * H; i++) img[i] = 8'($urandom);
    img[0] = 8'hff; img[1] = 8'hff; img[W] = 8'hff; img[W + 1] = 8'hff;   // saturated corner
    // output (x, y) is centred on input (x + B, y + B); B = 1 without borders
    for (int y = 0; y < OH; y++)
      for (int x = 0; x < OW; x++) begin
        for (int r = 0; r < 3; r++) begin
          int yy, xm, xp, xc;
          yy = clampi(y + r - (CLAMP ? 1 : 0), H);
          xc = x + (CLAMP ? 0 : 1);
          xm = clampi(xc - 1, W);
          xp = clampi(xc + 1, W);
          h[r] = 8'(wavg(img[yy * W + xm], img[yy * W + xc], img[yy * W + xp]));
        end
        expo[y * OW + x] = 8'(wavg(h[0], h[1], h[2]));
      end
    for (int i = 0; i < W * H; i += 4)
      host_write(IN + i, {img[i + 3 < W * H ? i + 3 : i], img[i + 2 < W * H ? i + 2 : i],
                          img[i + 1 < W * H ? i + 1 : i], img[i]});
    for (int k = 0; k < 8; k++) fin[k] = rand_f32(6);
    for (int k = 8; k < 11; k++) fin[k] = r2f(real'($urandom_range(0, 1023)) / 1024.0);
    fin[6] = r2f(-98765.4);              // for CFI
    for (int k = 0; k < 11; k++) host_write(FIN + 4 * k, fin[k]);
    // run
    start = 1;
    @(negedge clk);
    start = 0;
    start_cyc = cyc;
    while (!done) @(negedge clk);
    $display("program ran %0d cycles", cyc - start_cyc);
    check(exit_code == EXIT, "exit code");
    // blurred plane
    for (int i = 0; i < OW * OH; i += 4) begin
      host_read(OUT + i, v);
      for (int j = 0; j < 4; j++)
        if (i + j < OW * OH)
          check(v[8*j +: 8] == expo[i + j],
                $sformatf("pixel %0d: got %0d expected %0d", i + j, v[8*j +: 8], expo[i + j]));
    end
    // RTC: cycles from the RTC reset to the RTC read
    host_read(RES, v);
    check(v == 32'(cyc_read - cyc_set), $sformatf("RTC count %0d, expected %0d", v, cyc_read - cyc_set));
    $display("blur kernel (%s): %0d cycles for %0d x %0d output pixels",
             CLAMP ? "clamp-to-edge" : "no borders", v, OW, OH);
    // floats
    begin
      logic [31:0] l [4];
      logic [31:0] m [2];
      logic [31:0] exp_f [8];
      for (int i = 0; i < 4; i++) l[i] = rlerp(fin[2*i], fin[2*i+1], fin[8]);
      for (int i = 0; i < 2; i++) m[i] = rlerp(l[2*i], l[2*i+1], fin[9]);
      exp_f[0] = rlerp(m[0], m[1], fin[10]);
      exp_f[1] = radd(radd(radd(fin[0], rmul(fin[1], 32'h4080_0000)),
                           radd(rmul(fin[2], 32'h40c0_0000), rmul(fin[3], 32'h4080_0000))),
                      fin[4]);
      exp_f[2] = radd(fin[0], fin[1]);
      exp_f[3] = rmul(fin[2], fin[3]);
      exp_f[4] = rsub(fin[4], fin[5]);
      exp_f[5] = r2f(-1234567.0);
      exp_f[6] = 32'(-98765);
      exp_f[7] = r2f(f2r(fin[6]) / f2r(fin[7]));
      for (int k = 0; k < 8; k++) begin
        host_read(FOUT + 4 * k, v);
        check(v == exp_f[k], $sformatf("float result %0d: got %h expected %h", k, v, exp_f[k]));
      end
    end
    // every mechanism happened
    check(n_jump_taken > 0, "taken jump");
    check(n_jump_not > 0, "jump squashed by its guard");
    if (CLAMP) check(n_guard_exec > 0, "guarded register move executed at a border");
    check(n_squashed > 0, "squashed move");
    check(n_bypass > 0, "operand bypass in the trigger cycle");
    check(n_wavg3 == 4 * OW * OH, $sformatf("wavg3 count %0d", n_wavg3));
    check(n_lerp == 1 && n_swavg5 == 1, "lerp3d and swavg5 issued");
    check(n_rtc_set == 1 && n_rtc_read == 1, "RTC set and read");
    check(n_ldq == 9 * OW * OH && n_stq == OW * OH, "byte loads and stores");
    check(n_ldw == 11 && n_stw == 9, "word loads and stores");
    for (int o = 0; o < N_FPU_OPS; o++) check(n_fpu[o] == 1, $sformatf("FPU op %0d", o));
    foreach (n_alu[o])
      if (o inside {ALU_ADD, ALU_SUB, ALU_EQ}) check(n_alu[o] > 0, $sformatf("ALU op %0d", o));
    $display("mechanisms: jumps taken %0d, not taken %0d, squashed moves %0d, bypasses %0d, wavg3 %0d",
             n_jump_taken, n_jump_not, n_squashed, n_bypass, n_wavg3);
    finished = 1;
  end
endmodule
