// grid_bench: bilateral grid workload on halide_tta_proc (default
// parameters), used by tb_bilateral_grid.
//
// The program runs the stages of an edge-preserving bilateral grid filter on
// a W x H float image with values in [0, 1), grid cell size 8 (s_sigma) and
// 10 intensity levels (r_sigma = 0.1):
//   1. histogram: each pixel adds its value and a weight of 1.0 to the cell
//      (x/8, y/8, round(10 v)) of a two-channel grid (FPU MULF, ADDF, CFI);
//   2. three blur passes along z, x and y, each cell the 1-4-6-4-1 weighted
//      sum of its neighbours on that axis (swavg5);
//   3. slicing: each pixel trilinearly interpolates both channels at
//      (x/8, y/8, 10 v) (lerp3d) and divides value by weight (DIVF).
// This follows the structure of the Halide bilateral grid example, with
// simplifications: cells start at multiples of 8 (no half-cell offset), the
// grid has two cells of padding on every side instead of clamping, and each
// blur pass runs over the whole linear grid array (cells near the array
// edges mix unrelated neighbours; the slicing never reads them).
// Grid layout: z innermost (16 levels, stride 4 bytes), then x (GXP cells,
// stride 64 bytes), then y (GYP cells); channel 1 (weights) follows
// channel 0 (values). The bench computes the same operations in the same
// order with the tb_fp_pkg reference and compares the grid after the
// histogram and the final image bit for bit. The RTC counts of the three
// kernels are printed.
module grid_bench
  import tta_pkg::*;
  import tta_asm_pkg::*;
  import tb_fp_pkg::*;
#(
  parameter int W = 32,
  parameter int H = 32
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int LGX  = $clog2(W / 8 + 5);
  localparam int LGY  = $clog2(H / 8 + 5);
  localparam int GXP  = 1 << LGX;
  localparam int GYP  = 1 << LGY;
  localparam int GZP  = 16;
  localparam int NCH  = GXP * GYP * GZP;       // cells per channel
  localparam int NC   = 2 * NCH;               // floats per grid
  localparam int CHB  = 4 * NCH;               // channel offset in bytes
  localparam int SX   = 4 * GZP;               // byte strides
  localparam int SY   = SX * GXP;
  localparam int IN   = 0;
  localparam int OUTF = 4 * W * H;
  localparam int GA   = 8 * W * H;
  localparam int GB   = GA + 4 * NC;
  localparam int CST  = GB + 4 * NC;           // 10.0, 0.5, 1.0, 0.125
  localparam int RES  = CST + 16;              // RTC counts
  localparam int EXIT = 32'hb11a;

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

  function automatic int emit(input instr_t i);
    prog.push_back(i);
    return prog.size() - 1;
  endfunction

  // ---- small code generators (each a fixed instruction sequence) ----
  task automatic aop(input alu_op_e op, input int a, input int b, input int dst);
    int d;
    d = emit(ins(mv(b, D_ALU_O2), mv(a, D_ALU_T + op)));
    d = emit(ins(mv(S_ALU, dst)));
  endtask
  task automatic aopi(input alu_op_e op, input int a, input int imm, input int dst);
    int d;
    d = emit(ins(im(imm, D_ALU_O2), mv(a, D_ALU_T + op)));
    d = emit(ins(mv(S_ALU, dst)));
  endtask
  task automatic fop(input fpu_op_e op, input int a, input int b, input int dst);
    int d;
    d = emit(ins(mv(b, D_FPU_O2), mv(a, D_FPU_T + op)));
    for (int i = 1; i < 3; i++) d = emit(ins(nopm()));
    d = emit(ins(mv(S_FPU, dst)));
  endtask
  task automatic ld(input int a, input int dst);
    int d;
    d = emit(ins(mv(a, D_LSU_T + LSU_LDW)));
    d = emit(ins(mv(S_LSU, dst)));
  endtask
  task automatic st(input int a, input int v);
    int d;
    d = emit(ins(mv(v, D_LSU_O2), mv(a, D_LSU_T + LSU_STW)));
  endtask
  // counter += 1; jump to target unless counter == limit
  task automatic loop_end(input int ctr, input int limit, input int target);
    int d;
    aopi(ALU_ADD, ctr, 1, ctr);
    d = emit(ins(im(limit, D_ALU_O2), mv(ctr, D_ALU_T + ALU_EQ)));
    d = emit(ins(mv(S_ALU, D_B0)));
    d = emit(ins(im(target, D_JUMP, G_NB0)));
  endtask
  task automatic rtc_store(input int k);
    int d;
    d = emit(ins(mv(S_RTC, D_LSU_O2), im(RES + 4 * k, D_LSU_T + LSU_STW), im(0, D_RTC_T)));
  endtask
  // cell address (value channel of grid G) of pixel (r0, r1) and level reg z
  task automatic cell_addr(input int z, input int g, input int dst, input int tmp);
    aopi(ALU_SHRU, 0, 3, tmp);
    aopi(ALU_ADD, tmp, 2, tmp);
    aopi(ALU_SHRU, 1, 3, dst);
    aopi(ALU_ADD, dst, 2, dst);
    aopi(ALU_SHL, dst, LGX, dst);
    aop(ALU_ADD, dst, tmp, dst);
    aopi(ALU_SHL, dst, 6, dst);
    aopi(ALU_ADD, z, 2, z);
    aopi(ALU_SHL, z, 2, z);
    aop(ALU_ADD, dst, z, dst);
    aopi(ALU_ADD, dst, g, dst);
  endtask

  task automatic build();
    int d, ly, lx, lb;
    int offs [7] = '{SX, SY, SX + SY, 4, SX + 4, SY + 4, SX + SY + 4};
    prog.delete();
    d = emit(ins(im(0, D_RTC_T), im(CST, 2)));
    ld(2, 12); aopi(ALU_ADD, 2, 4, 2);
    ld(2, 13); aopi(ALU_ADD, 2, 4, 2);
    ld(2, 14); aopi(ALU_ADD, 2, 4, 2);
    ld(2, 15);
    // ---- 1. histogram ----
    d = emit(ins(im(0, 1), im(IN, 2)));
    ly = emit(ins(im(0, 0)));
    lx = prog.size();
    ld(2, 3);                                // v
    fop(FPU_MULF, 3, 12, 4);                 // 10 v
    fop(FPU_ADDF, 4, 13, 4);                 // + 0.5
    d = emit(ins(mv(4, D_FPU_T + FPU_CFI))); // round
    d = emit(ins(nopm())); d = emit(ins(nopm()));
    d = emit(ins(mv(S_FPU, 5)));
    cell_addr(5, GA, 7, 6);
    aopi(ALU_ADD, 7, CHB, 8);
    ld(7, 9); fop(FPU_ADDF, 9, 3, 9); st(7, 9);
    ld(8, 9); fop(FPU_ADDF, 9, 14, 9); st(8, 9);
    aopi(ALU_ADD, 2, 4, 2);
    loop_end(0, W, lx);
    loop_end(1, H, ly);
    rtc_store(0);
    // ---- 2. blur passes: z (GA->GB), x (GB->GA), y (GA->GB) ----
    for (int p = 0; p < 3; p++) begin
      int k, src, dst;
      k   = (p == 0) ? 4 : (p == 1) ? SX : SY;   // stride in bytes
      src = (p == 1) ? GB : GA;
      dst = (p == 1) ? GA : GB;
      d = emit(ins(im(src + 2 * k, 0), im(dst + 2 * k, 1), im(0, 2)));
      lb = prog.size();
      aopi(ALU_SUB, 0, 2 * k, 3); ld(3, 4);
      aopi(ALU_SUB, 0, k, 3);     ld(3, 5);
      ld(0, 6);
      aopi(ALU_ADD, 0, k, 3);     ld(3, 7);
      aopi(ALU_ADD, 0, 2 * k, 3); ld(3, 8);
      d = emit(ins(mv(5, D_SWAVG5_O), mv(6, D_SWAVG5_O + 1), mv(7, D_SWAVG5_O + 2)));
      d = emit(ins(mv(8, D_SWAVG5_O + 3), mv(4, D_SWAVG5_T)));
      for (int i = 1; i < 5; i++) d = emit(ins(nopm()));
      d = emit(ins(mv(S_SWAVG5, D_LSU_O2), mv(1, D_LSU_T + LSU_STW)));
      aopi(ALU_ADD, 0, 4, 0);
      aopi(ALU_ADD, 1, 4, 1);
      loop_end(2, NC - k, lb);
    end
    rtc_store(1);
    // ---- 3. slicing and normalisation ----
    d = emit(ins(im(0, 1), im(IN, 2), im(OUTF, 3)));
    ly = emit(ins(im(0, 0)));
    lx = prog.size();
    ld(2, 4);                                  // v
    fop(FPU_MULF, 4, 12, 5);                   // zv = 10 v
    d = emit(ins(mv(5, D_FPU_T + FPU_CFI)));
    d = emit(ins(nopm())); d = emit(ins(nopm()));
    d = emit(ins(mv(S_FPU, 6)));               // zi
    d = emit(ins(mv(6, D_FPU_T + FPU_CIF)));
    d = emit(ins(nopm())); d = emit(ins(nopm()));
    d = emit(ins(mv(S_FPU, 7)));
    fop(FPU_SUBF, 5, 7, 7);                    // zf
    aopi(ALU_AND, 0, 7, 8);
    d = emit(ins(mv(8, D_FPU_T + FPU_CIF)));
    d = emit(ins(nopm())); d = emit(ins(nopm()));
    d = emit(ins(mv(S_FPU, 8)));
    fop(FPU_MULF, 8, 15, 8);                   // xf
    aopi(ALU_AND, 1, 7, 9);
    d = emit(ins(mv(9, D_FPU_T + FPU_CIF)));
    d = emit(ins(nopm())); d = emit(ins(nopm()));
    d = emit(ins(mv(S_FPU, 9)));
    fop(FPU_MULF, 9, 15, 9);                   // yf
    cell_addr(6, GB, 11, 10);
    for (int c = 0; c < 2; c++) begin
      ld(11, 4);                               // v000
      for (int k = 0; k < 7; k++) begin
        d = emit(ins(im(offs[k], D_ALU_O2), mv(11, D_ALU_T + ALU_ADD)));
        d = emit(ins(mv(S_ALU, D_LSU_T + LSU_LDW)));
        d = emit(ins(mv(S_LSU, D_LERP_O + k)));
      end
      d = emit(ins(mv(8, D_LERP_O + 7), mv(9, D_LERP_O + 8), mv(7, D_LERP_O + 9)));
      d = emit(ins(mv(4, D_LERP_T)));
      for (int i = 1; i < 15; i++) d = emit(ins(nopm()));
      d = emit(ins(mv(S_LERP, 5 + c)));        // r5 value, r6 weight
      if (c == 0) aopi(ALU_ADD, 11, CHB, 11);
    end
    fop(FPU_DIVF, 5, 6, 10);
    st(3, 10);
    aopi(ALU_ADD, 2, 4, 2);
    aopi(ALU_ADD, 3, 4, 3);
    loop_end(0, W, lx);
    loop_end(1, H, ly);
    rtc_store(2);
    d = emit(ins(im(EXIT, D_HALT)));
  endtask

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

  // reference model
  logic [31:0] img [W * H];
  logic [31:0] ga [NC];
  logic [31:0] gb [NC];
  logic [31:0] hist [NC];
  logic [31:0] outr [W * H];
  localparam logic [31:0] F10 = 32'h4120_0000, FHALF = 32'h3f00_0000,
                          F1 = 32'h3f80_0000, F8TH = 32'h3e00_0000;

  function automatic int cell_of(int x, int y, int z);
    return ((y / 8 + 2) * GXP + x / 8 + 2) * GZP + z + 2;
  endfunction

  function automatic int f2i(input logic [31:0] f);
    return $rtoi(f2r(f));
  endfunction

  task automatic reference();
    logic [31:0] zv, zf, xf, yf, val [2];
    int zi, c0, k;
    int offs [7];
    foreach (ga[i]) begin ga[i] = '0; gb[i] = '0; end
    for (int i = 0; i < W * H; i++) begin
      zi = f2i(radd(rmul(img[i], F10), FHALF));
      c0 = cell_of(i % W, i / W, zi);
      ga[c0] = radd(ga[c0], img[i]);
      ga[c0 + NCH] = radd(ga[c0 + NCH], F1);
    end
    hist = ga;
    for (int p = 0; p < 3; p++) begin
      k = (p == 0) ? 1 : (p == 1) ? GZP : GZP * GXP;
      for (int i = 2 * k; i < NC - 2 * k; i++) begin
        logic [31:0] x [5];
        for (int j = 0; j < 5; j++) x[j] = (p == 1) ? gb[i + (j - 2) * k] : ga[i + (j - 2) * k];
        x[0] = radd(radd(radd(x[0], rmul(x[1], 32'h4080_0000)),
                         radd(rmul(x[2], 32'h40c0_0000), rmul(x[3], 32'h4080_0000))), x[4]);
        if (p == 1) ga[i] = x[0]; else gb[i] = x[0];
      end
    end
    offs = '{GZP, GZP * GXP, GZP + GZP * GXP, 1, GZP + 1, GZP * GXP + 1, GZP + GZP * GXP + 1};
    for (int i = 0; i < W * H; i++) begin
      zv = rmul(img[i], F10);
      zi = f2i(zv);
      zf = rsub(zv, r2f(real'(zi)));
      xf = rmul(r2f(real'((i % W) % 8)), F8TH);
      yf = rmul(r2f(real'((i / W) % 8)), F8TH);
      c0 = cell_of(i % W, i / W, zi);
      for (int c = 0; c < 2; c++) begin
        logic [31:0] v [8];
        logic [31:0] l [4];
        logic [31:0] m [2];
        v[0] = gb[c0 + c * NCH];
        for (int j = 0; j < 7; j++) v[j + 1] = gb[c0 + c * NCH + offs[j]];
        for (int j = 0; j < 4; j++) l[j] = rlerp(v[2*j], v[2*j+1], xf);
        for (int j = 0; j < 2; j++) m[j] = rlerp(l[2*j], l[2*j+1], yf);
        val[c] = rlerp(m[0], m[1], zf);
      end
      outr[i] = r2f(f2r(val[0]) / f2r(val[1]));
    end
  endtask

  initial begin
    logic [31:0] v;
    int n_lerp = 0;
    checks = 0; failures = 0; finished = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    build();
    if (prog.size() > 1024) $fatal(1, "program too long");
    $display("program: %0d instructions", prog.size());
    foreach (prog[a]) begin
      prog_we = 1; prog_addr = 10'(a); prog_data = prog[a];
      @(negedge clk);
    end
    prog_we = 0;
    // image: two flat regions with an edge, plus noise
    for (int i = 0; i < W * H; i++)
      img[i] = r2f(((i % W) < W / 2 ? 0.25 : 0.7) + real'($urandom_range(0, 999)) / 10000.0);
    for (int i = 0; i < W * H; i++) host_write(IN + 4 * i, img[i]);
    for (int i = 0; i < 2 * NC; i++) host_write(GA + 4 * i, 32'd0);   // both grids
    host_write(CST, F10); host_write(CST + 4, FHALF);
    host_write(CST + 8, F1); host_write(CST + 12, F8TH);
    reference();
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    check(exit_code == EXIT, "exit code");
    // grids: GA holds the result of the x pass, GB the final blurred grid
    for (int i = 0; i < NC; i++) begin
      host_read(GA + 4 * i, v);
      check(v == ga[i], $sformatf("grid A %0d: got %h expected %h", i, v, ga[i]));
      host_read(GB + 4 * i, v);
      check(v == gb[i], $sformatf("grid B %0d: got %h expected %h", i, v, gb[i]));
    end
    for (int i = 0; i < W * H; i++) begin
      host_read(OUTF + 4 * i, v);
      check(v == outr[i], $sformatf("pixel %0d: got %h expected %h", i, v, outr[i]));
    end
    // edges preserved: the filtered image keeps the step between the halves
    check(f2r(outr[W / 4]) < 0.4 && f2r(outr[3 * W / 4]) > 0.6, "edge preserved");
    for (int k = 0; k < 3; k++) begin
      host_read(RES + 4 * k, v);
      $display("kernel %0d (%s): %0d cycles", k,
               k == 0 ? "histogram" : k == 1 ? "three blur passes" : "slice + normalise", v);
      check(v > 0, "RTC count");
    end
    finished = 1;
  end
endmodule
