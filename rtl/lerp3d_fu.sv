// lerp3d_fu: floating point 3D linear interpolation custom operation.
// It blends the 8 corner voxels of a grid cell with three weights:
//   lerp(a, b, w) = a + (b - a) * w
//   along x: l0 = lerp(v000, v100, wx)  l1 = lerp(v010, v110, wx)
//            l2 = lerp(v001, v101, wx)  l3 = lerp(v011, v111, wx)
//   along y: m0 = lerp(l0, l1, wy)      m1 = lerp(l2, l3, wy)
//   along z: r  = lerp(m0, m1, wz)
// Latency 15 cycles, fully pipelined (one operation may start every cycle).
//
// Port 1 (din[0]) is the trigger and carries v000; ports 2..11 are operand
// registers holding v100, v010, v110, v001, v101, v011, v111, wx, wy, wz (an
// operand written in the same cycle as the trigger is used directly). Values
// are IEEE single precision.
//
// Each of the three levels takes three stages (subtract, multiply, add), so
// the arithmetic needs 9 stages; LATENCY - 10 delay stages and the result register bring the
// result to the 15-cycle latency. The 8 intensity and 3 weight inputs, the
// single output and the 15-cycle latency follow the source. The operand
// order, the lerp form and the stage split are this design's choices.
module lerp3d_fu
  import tta_pkg::*;
  import fp32_pkg::*;
#(
  parameter int unsigned LATENCY = 15  // at least 11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [10:0]   we,
  input  logic [DW-1:0] din [11],
  output logic [DW-1:0] r
);
  localparam int unsigned PAD = LATENCY - 10;

  typedef struct packed {
    logic    v;
    f32_t [3:0] a;   // first value of each pair, then the blended results
    f32_t [3:0] d;   // differences, then products
    f32_t    wx, wy, wz;
  } stage_t;

  f32_t   op_q [1:10];
  f32_t   x    [11];
  stage_t st   [1:9];
  logic   pad_v [PAD];
  f32_t   pad_d [PAD];

  always_comb begin
    x[0] = din[0];
    for (int k = 1; k < 11; k++) x[k] = we[k] ? din[k] : op_q[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < 11; k++) op_q[k] <= '0;
      for (int s = 1; s <= 9; s++) st[s] <= '0;
      for (int p = 0; p < PAD; p++) begin
        pad_v[p] <= 1'b0;
        pad_d[p] <= '0;
      end
      r <= '0;
    end else begin
      for (int k = 1; k < 11; k++) if (we[k]) op_q[k] <= din[k];

      // level x: 1 subtract, 2 multiply, 3 add
      st[1].v <= we[0];
      if (we[0]) begin
        for (int i = 0; i < 4; i++) begin
          st[1].a[i] <= x[2*i];
          st[1].d[i] <= fp_sub(x[2*i+1], x[2*i]);
        end
        st[1].wx <= x[8];
        st[1].wy <= x[9];
        st[1].wz <= x[10];
      end
      st[2].v <= st[1].v;
      if (st[1].v) begin
        st[2] <= st[1];
        for (int i = 0; i < 4; i++) st[2].d[i] <= fp_mul(st[1].d[i], st[1].wx);
      end
      st[3].v <= st[2].v;
      if (st[2].v) begin
        st[3] <= st[2];
        for (int i = 0; i < 4; i++) st[3].a[i] <= fp_add(st[2].a[i], st[2].d[i]);
      end
      // level y: pairs (l0, l1) and (l2, l3)
      st[4].v <= st[3].v;
      if (st[3].v) begin
        st[4] <= st[3];
        for (int i = 0; i < 2; i++) begin
          st[4].a[i] <= st[3].a[2*i];
          st[4].d[i] <= fp_sub(st[3].a[2*i+1], st[3].a[2*i]);
        end
      end
      st[5].v <= st[4].v;
      if (st[4].v) begin
        st[5] <= st[4];
        for (int i = 0; i < 2; i++) st[5].d[i] <= fp_mul(st[4].d[i], st[4].wy);
      end
      st[6].v <= st[5].v;
      if (st[5].v) begin
        st[6] <= st[5];
        for (int i = 0; i < 2; i++) st[6].a[i] <= fp_add(st[5].a[i], st[5].d[i]);
      end
      // level z: pair (m0, m1)
      st[7].v <= st[6].v;
      if (st[6].v) begin
        st[7] <= st[6];
        st[7].d[0] <= fp_sub(st[6].a[1], st[6].a[0]);
      end
      st[8].v <= st[7].v;
      if (st[7].v) begin
        st[8] <= st[7];
        st[8].d[0] <= fp_mul(st[7].d[0], st[7].wz);
      end
      st[9].v <= st[8].v;
      if (st[8].v) begin
        st[9] <= st[8];
        st[9].a[0] <= fp_add(st[8].a[0], st[8].d[0]);
      end
      // padding to the operation latency; the last stage is the result
      pad_v[0] <= st[9].v;
      if (st[9].v) pad_d[0] <= st[9].a[0];
      for (int p = 1; p < PAD; p++) begin
        pad_v[p] <= pad_v[p-1];
        if (pad_v[p-1]) pad_d[p] <= pad_d[p-1];
      end
      if (pad_v[PAD-1]) r <= pad_d[PAD-1];
    end
  end

  initial assert (LATENCY >= 11) else $error("lerp3d_fu needs LATENCY >= 11");
endmodule
