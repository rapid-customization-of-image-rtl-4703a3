// fp32_pkg: single-precision (IEEE 754 binary32) arithmetic used by the
// floating point unit and the two floating point custom operations.
//
// Functions are combinational and synthesizable. Rounding is round to
// nearest, ties to even. Subnormal inputs are read as zero and results too
// small to be normal are flushed to a signed zero; results too large become
// infinity. A NaN or infinity input gives a NaN or infinity result but NaN
// payloads are not preserved. This arithmetic model is this design's own
// choice: the floating point units are only named by the source, not
// specified.
package fp32_pkg;

  typedef logic [31:0] f32_t;

  localparam f32_t F32_QNAN = 32'h7fc0_0000;

  function automatic logic is_zero(input f32_t a);
    return a[30:23] == 8'd0;
  endfunction

  function automatic logic is_special(input f32_t a);
    return a[30:23] == 8'hff;
  endfunction

  // Pack sign, unbiased-by-127 exponent and a 24-bit mantissa with hidden
  // bit, applying overflow and flush-to-zero.
  function automatic f32_t pack(input logic s, input int e, input logic [23:0] m);
    if (e >= 255) return {s, 8'hff, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, e[7:0], m[22:0]};
  endfunction

  function automatic f32_t fp_mul(input f32_t a, input f32_t b);
    logic        s;
    logic [47:0] p;
    logic [23:0] m;
    logic        g, st;
    logic [24:0] mr;
    int          e;
    s = a[31] ^ b[31];
    if (is_special(a) || is_special(b)) begin
      if ((is_special(a) && a[22:0] != 0) || (is_special(b) && b[22:0] != 0) ||
          is_zero(a) || is_zero(b))
        return F32_QNAN;
      return {s, 8'hff, 23'd0};
    end
    if (is_zero(a) || is_zero(b)) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = |p[22:0];
      e  = e + 1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = |p[21:0];
    end
    mr = {1'b0, m} + 25'(g && (st || m[0]));
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    return pack(s, e, mr[23:0]);
  endfunction

  function automatic f32_t fp_add(input f32_t a, input f32_t b);
    f32_t        x, y;
    logic [26:0] mx, my;     // 24-bit mantissa + guard, round, sticky
    logic [27:0] sum;
    logic [23:0] m;
    logic [24:0] mr;
    logic        g, rs;
    int          e, d, lz;
    if (is_special(a) || is_special(b)) begin
      if (is_special(a) && a[22:0] != 0) return F32_QNAN;
      if (is_special(b) && b[22:0] != 0) return F32_QNAN;
      if (is_special(a) && is_special(b) && (a[31] != b[31])) return F32_QNAN;
      return is_special(a) ? a : b;
    end
    if (is_zero(a) && is_zero(b)) return {a[31] & b[31], 31'd0};
    if (is_zero(a)) return b;
    if (is_zero(b)) return a;
    // order so that |x| >= |y|
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else                    begin x = b; y = a; end
    e  = int'(x[30:23]);
    d  = int'(x[30:23]) - int'(y[30:23]);
    mx = {1'b1, x[22:0], 3'b000};
    my = {1'b1, y[22:0], 3'b000};
    if (d >= 27) begin
      my = 27'd1;                       // only the sticky bit survives
    end else if (d > 0) begin
      logic lost;
      lost = 1'b0;
      for (int i = 0; i < 27; i++)
        if (i < d) lost = lost | my[i];
      my = (my >> d) | 27'(lost);
    end
    if (x[31] == y[31]) begin
      sum = {1'b0, mx} + {1'b0, my};
      if (sum[27]) begin
        sum = {1'b0, sum[27:2], sum[1] | sum[0]};
        e   = e + 1;
      end
    end else begin
      sum = {1'b0, mx} - {1'b0, my};
      if (sum == 28'd0) return 32'd0;
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) break;
        lz++;
      end
      sum = sum << lz;
      e   = e - lz;
    end
    m  = sum[26:3];
    g  = sum[2];
    rs = sum[1] | sum[0];
    mr = {1'b0, m} + 25'(g && (rs || m[0]));
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    return pack(x[31], e, mr[23:0]);
  endfunction

  function automatic f32_t fp_sub(input f32_t a, input f32_t b);
    return fp_add(a, {~b[31], b[30:0]});
  endfunction

  // a / b, rounded to nearest even (restoring division of the mantissas)
  function automatic f32_t fp_div(input f32_t a, input f32_t b);
    logic        s;
    logic [24:0] rem;
    logic [23:0] mb;
    logic [25:0] q;
    logic [24:0] mr;
    int          e;
    s = a[31] ^ b[31];
    if ((is_special(a) && a[22:0] != 0) || (is_special(b) && b[22:0] != 0)) return F32_QNAN;
    if (is_special(a) && is_special(b)) return F32_QNAN;
    if (is_zero(a) && is_zero(b)) return F32_QNAN;
    if (is_special(a) || is_zero(b)) return {s, 8'hff, 23'd0};
    if (is_zero(a) || is_special(b)) return {s, 31'd0};
    rem = {1'b0, 1'b1, a[22:0]};
    mb  = {1'b1, b[22:0]};
    e   = int'(a[30:23]) - int'(b[30:23]) + 127;
    if (rem[23:0] < mb) begin
      rem = rem << 1;
      e   = e - 1;
    end
    // 26 quotient bits: integer bit, 23 fraction bits, guard, round
    q = '0;
    for (int i = 25; i >= 0; i--) begin
      if (rem >= {1'b0, mb}) begin
        rem  = rem - {1'b0, mb};
        q[i] = 1'b1;
      end
      rem = rem << 1;
    end
    mr = {1'b0, q[25:2]} + 25'(q[1] && (q[0] || rem != 0 || q[2]));
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    return pack(s, e, mr[23:0]);
  endfunction

  // signed 32-bit integer to float, rounded to nearest even
  function automatic f32_t fp_from_int(input logic [31:0] v);
    logic        s;
    logic [31:0] u;
    logic [23:0] m;
    logic [24:0] mr;
    logic        g, st;
    int          msb, e;
    if (v == 32'd0) return 32'd0;
    s = v[31];
    u = s ? (~v + 32'd1) : v;
    msb = 0;
    for (int i = 0; i < 32; i++) if (u[i]) msb = i;
    u = u << (31 - msb);               // leading one at bit 31
    m  = u[31:8];
    g  = u[7];
    st = |u[6:0];
    e  = msb + 127;
    mr = {1'b0, m} + 25'(g && (st || m[0]));
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    return pack(s, e, mr[23:0]);
  endfunction

  // float to signed 32-bit integer, rounding toward zero, saturating
  function automatic logic [31:0] fp_to_int(input f32_t a);
    int          e;
    logic [55:0] w;
    logic [31:0] mag;
    e = int'(a[30:23]) - 127;
    if (is_zero(a) || e < 0) return 32'd0;
    if (a[30:23] == 8'hff && a[22:0] != 0) return 32'h8000_0000;
    if (e >= 31) return a[31] ? 32'h8000_0000 : 32'h7fff_ffff;
    w   = 56'({1'b1, a[22:0]}) << e;   // binary point at bit 23
    mag = w[54:23];
    return a[31] ? (~mag + 32'd1) : mag;
  endfunction

endpackage
