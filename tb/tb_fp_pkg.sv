// tb_fp_pkg: reference single-precision arithmetic for the testbenches.
// Values are converted to double precision, combined with the simulator's
// real arithmetic and rounded back to single precision (round to nearest
// even, results below the normal range flushed to zero). For one add, sub or
// multiply of two singles the double result rounds to the correctly rounded
// single result, so this model is independent of the RTL's integer
// implementation.
package tb_fp_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real x);
    logic [63:0] d;
    logic        s, g, st;
    logic [23:0] m;
    int          e;
    d = $realtobits(x);
    s = d[63];
    if (d[62:52] == 11'd0) return {s, 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b0, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 24'd1;
    if (m[23]) begin
      m = 24'd0;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hff, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, e[7:0], m[22:0]};
  endfunction

  function automatic logic [31:0] radd(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  function automatic logic [31:0] rsub(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) - f2r(b));
  endfunction

  function automatic logic [31:0] rmul(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  // random normal single with exponent in [127-span, 127+span]
  function automatic logic [31:0] rand_f32(input int span);
    int e;
    e = 127 - span + int'($urandom_range(0, 2 * span));
    return {1'($urandom), e[7:0], 23'($urandom)};
  endfunction

  // lerp reference with the RTL's operation order: a + (b - a) * w
  function automatic logic [31:0] rlerp(input logic [31:0] a, input logic [31:0] b,
                                        input logic [31:0] w);
    return radd(a, rmul(rsub(b, a), w));
  endfunction

endpackage
