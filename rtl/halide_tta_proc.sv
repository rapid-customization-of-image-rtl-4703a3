// halide_tta_proc: customized image processor with image-specific custom
// operations, built as a transport-triggered architecture (TTA).
//
// Each cycle the control unit issues one instruction of NBUS moves. A move
// reads one source socket (scalar or boolean register, FU result port, or
// the move's own immediate), optionally guarded by boolean register B0, and
// writes it to one destination socket (register, FU operand port, FU trigger
// port with opcode, jump or halt). All moves of an instruction read their
// sources before any destination is written. Function units:
//   alu_fu     integer ALU                  latency 1
//   lsu_fu     load-store unit + data memory latency 1
//   rtc_fu     cycle counter for timing kernels
//   wavg3_fu   (p0 + 2 p1 + p2) / 4 on 8-bit pixels, latency 1
//   fpu_fu     float add / sub / mul / conversions, latency FPU_LATENCY
//   swavg5_fu  float 1-4-6-4-1 weighted sum, latency 5
//   lerp3d_fu  float trilinear interpolation of 8 voxels, latency LERP_LATENCY
// plus scalar_rf, bool_rf and gcu. Operations are not interlocked: the
// program must read a result port no earlier than the unit's latency after
// the trigger, as a statically scheduled compiler would ensure.
//
// The unit mix follows the source's two machines: a small scalar machine
// with ALU, LSU, scalar and boolean registers and RTC, extended with the
// weighted-average operation for blurring, and the same machine with a
// floating point unit and the two bilateral grid operations. This core holds
// the union of both. The instruction format, socket map, bus count, memory
// sizes and host ports are this design's choices.
//
// Host interface: load the program with prog_*, load data with host_* while
// the core is stopped, pulse start, wait for done, read results with host_*.
module halide_tta_proc
  import tta_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH   = 1024,
  parameter int unsigned DMEM_BYTES   = 2097152,
  parameter int unsigned NREGS        = 16,
  parameter int unsigned FPU_LATENCY  = 3,
  parameter int unsigned LERP_LATENCY = 15
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prog_addr,
  input  instr_t                        prog_data,
  input  logic                          host_en,
  input  logic                          host_we,
  input  logic [$clog2(DMEM_BYTES)-3:0] host_addr,
  input  logic [DW-1:0]                 host_wdata,
  output logic [DW-1:0]                 host_rdata,
  input  logic                          start,
  output logic                          running,
  output logic                          done,
  output logic [DW-1:0]                 exit_code
);
  localparam int unsigned NDST = 64;
  localparam int unsigned RW   = $clog2(NREGS);

  instr_t instr;
  logic [$clog2(IMEM_DEPTH)-1:0] pc;

  // ---------------- sources ----------------
  logic [DW-1:0] rf_q [NREGS];
  logic [1:0]    b_q;
  logic [DW-1:0] alu_r, lsu_r, rtc_r, wavg3_r, fpu_r, swavg5_r, lerp_r;

  logic [NBUS-1:0] en;
  logic [DW-1:0]   bval [NBUS];

  always_comb begin
    for (int b = 0; b < NBUS; b++) begin
      move_t m;
      m = instr[b];
      unique case (m.guard)
        G_ALWAYS: en[b] = 1'b1;
        G_B0:     en[b] = b_q[0];
        G_NB0:    en[b] = !b_q[0];
        default:  en[b] = 1'b0;
      endcase
      if (m.dst == SOCK_W'(D_NONE)) en[b] = 1'b0;
      if (m.src < SOCK_W'(NREGS)) bval[b] = rf_q[m.src[RW-1:0]];
      else unique case (int'(m.src))
        S_B0:     bval[b] = DW'(b_q[0]);
        S_B1:     bval[b] = DW'(b_q[1]);
        S_ALU:    bval[b] = alu_r;
        S_LSU:    bval[b] = lsu_r;
        S_RTC:    bval[b] = rtc_r;
        S_WAVG3:  bval[b] = wavg3_r;
        S_FPU:    bval[b] = fpu_r;
        S_SWAVG5: bval[b] = swavg5_r;
        S_LERP:   bval[b] = lerp_r;
        S_IMM:    bval[b] = DW'($signed(m.imm));
        default:  bval[b] = '0;
      endcase
    end
  end

  // ---------------- destination decode ----------------
  logic [NDST-1:0] dwe;
  logic [DW-1:0]   dval [NDST];

  always_comb begin
    for (int d = 0; d < NDST; d++) begin
      dwe[d]  = 1'b0;
      dval[d] = '0;
      for (int b = 0; b < NBUS; b++)
        if (en[b] && instr[b].dst == SOCK_W'(d)) begin
          dwe[d]  = 1'b1;
          dval[d] = bval[b];
        end
    end
  end

  // a trigger address range: which opcode is written, if any
  function automatic logic [3:0] trig_op(input logic [NDST-1:0] w, input int base, input int n);
    trig_op = '0;
    for (int i = 0; i < n; i++) if (w[base+i]) trig_op = 4'(i);
  endfunction

  function automatic logic [DW-1:0] trig_val(input logic [NDST-1:0] w,
                                             input logic [DW-1:0] v [NDST],
                                             input int base, input int n);
    trig_val = '0;
    for (int i = 0; i < n; i++) if (w[base+i]) trig_val = v[base+i];
  endfunction

  // ---------------- control unit ----------------
  gcu #(.IMEM_DEPTH(IMEM_DEPTH)) u_gcu (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data, .start,
    .jump_we(dwe[D_JUMP]), .jump_target(dval[D_JUMP]),
    .halt_we(dwe[D_HALT]), .halt_code(dval[D_HALT]),
    .instr, .pc, .running, .done, .exit_code
  );

  // ---------------- register files ----------------
  logic [NBUS-1:0] rf_we, brf_we;
  logic [RW-1:0]   rf_wa  [NBUS];
  logic            brf_wa [NBUS];

  always_comb begin
    for (int b = 0; b < NBUS; b++) begin
      rf_we[b]  = en[b] && (instr[b].dst < SOCK_W'(NREGS));
      rf_wa[b]  = instr[b].dst[RW-1:0];
      brf_we[b] = en[b] && (instr[b].dst == SOCK_W'(D_B0) || instr[b].dst == SOCK_W'(D_B1));
      brf_wa[b] = instr[b].dst[0];
    end
  end

  scalar_rf #(.NREGS(NREGS), .NPORT(NBUS)) u_rf (
    .clk, .rst_n, .we(rf_we), .waddr(rf_wa), .wdata(bval), .regs(rf_q)
  );

  bool_rf #(.NREGS(2), .NPORT(NBUS)) u_brf (
    .clk, .rst_n, .we(brf_we), .waddr(brf_wa), .wdata(bval), .b(b_q)
  );

  // ---------------- function units ----------------
  logic [DW-1:0] alu_d [2], lsu_d [2], fpu_d [2];
  logic [DW-1:0] wavg3_d [3], swavg5_d [5], lerp_d [11];
  logic [1:0]    alu_we, lsu_we, fpu_we;
  logic [2:0]    wavg3_we;
  logic [4:0]    swavg5_we;
  logic [10:0]   lerp_we;

  always_comb begin
    alu_we    = {dwe[D_ALU_O2], |dwe[D_ALU_T +: N_ALU_OPS]};
    alu_d[0]  = trig_val(dwe, dval, D_ALU_T, N_ALU_OPS);
    alu_d[1]  = dval[D_ALU_O2];
    lsu_we    = {dwe[D_LSU_O2], |dwe[D_LSU_T +: 4]};
    lsu_d[0]  = trig_val(dwe, dval, D_LSU_T, 4);
    lsu_d[1]  = dval[D_LSU_O2];
    fpu_we    = {dwe[D_FPU_O2], |dwe[D_FPU_T +: N_FPU_OPS]};
    fpu_d[0]  = trig_val(dwe, dval, D_FPU_T, N_FPU_OPS);
    fpu_d[1]  = dval[D_FPU_O2];
    wavg3_we  = {dwe[D_WAVG3_O3], dwe[D_WAVG3_O2], dwe[D_WAVG3_T]};
    wavg3_d   = '{dval[D_WAVG3_T], dval[D_WAVG3_O2], dval[D_WAVG3_O3]};
    swavg5_we[0] = dwe[D_SWAVG5_T];
    swavg5_d[0]  = dval[D_SWAVG5_T];
    for (int k = 1; k < 5; k++) begin
      swavg5_we[k] = dwe[D_SWAVG5_O + k - 1];
      swavg5_d[k]  = dval[D_SWAVG5_O + k - 1];
    end
    lerp_we[0] = dwe[D_LERP_T];
    lerp_d[0]  = dval[D_LERP_T];
    for (int k = 1; k < 11; k++) begin
      lerp_we[k] = dwe[D_LERP_O + k - 1];
      lerp_d[k]  = dval[D_LERP_O + k - 1];
    end
  end

  alu_fu u_alu (
    .clk, .rst_n, .we(alu_we), .opc(alu_op_e'(trig_op(dwe, D_ALU_T, N_ALU_OPS))),
    .din(alu_d), .r(alu_r)
  );

  lsu_fu #(.DMEM_BYTES(DMEM_BYTES)) u_lsu (
    .clk, .rst_n, .we(lsu_we), .opc(lsu_op_e'(trig_op(dwe, D_LSU_T, 4))),
    .din(lsu_d), .r(lsu_r),
    .host_en, .host_we, .host_addr, .host_wdata, .host_rdata
  );

  rtc_fu u_rtc (
    .clk, .rst_n, .we(dwe[D_RTC_T]), .din(dval[D_RTC_T]), .r(rtc_r)
  );

  wavg3_fu u_wavg3 (
    .clk, .rst_n, .we(wavg3_we), .din(wavg3_d), .r(wavg3_r)
  );

  fpu_fu #(.LATENCY(FPU_LATENCY)) u_fpu (
    .clk, .rst_n, .we(fpu_we), .opc(fpu_op_e'(trig_op(dwe, D_FPU_T, N_FPU_OPS))),
    .din(fpu_d), .r(fpu_r)
  );

  swavg5_fu u_swavg5 (
    .clk, .rst_n, .we(swavg5_we), .din(swavg5_d), .r(swavg5_r)
  );

  lerp3d_fu #(.LATENCY(LERP_LATENCY)) u_lerp (
    .clk, .rst_n, .we(lerp_we), .din(lerp_d), .r(lerp_r)
  );

  // ---------------- program rules ----------------
  always_ff @(posedge clk) begin
    if (rst_n && running) begin
      for (int b = 0; b < NBUS; b++)
        for (int c = b + 1; c < NBUS; c++)
          assert (!(en[b] && en[c] && instr[b].dst == instr[c].dst))
            else $error("halide_tta_proc: buses %0d and %0d write socket %0d at pc %0d",
                        b, c, instr[b].dst, pc);
      assert (!(host_en && running)) else $error("halide_tta_proc: host access while running");
    end
  end
endmodule
