// tb_f32_pkg: reference arithmetic for the testbenches.
//
// Converts binary32 bit patterns to and from the simulator's 64-bit
// `real`, independently of the design's own arithmetic. A binary32 sum or
// product computed in binary64 and then rounded once to binary32 is the
// correctly rounded binary32 result, so these functions give exact
// expected values for the adder and multiplier. Subnormals are flushed to
// zero, matching the design's stated behaviour.
package tb_f32_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return f[31] ? -0.0 : 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic        s, g, st;
    int          e;
    logic [23:0] m;
    d  = $realtobits(r);
    s  = d[63];
    if (d[62:0] == 0) return {s, 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b0, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 1;
    if (m[23]) begin m = 24'd0; e = e + 1; end
    if (e <= 0)   return {s, 31'd0};
    if (e >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  // Reference for the example island: x = ((0.9 + a) * 0.7 + 0.3) * b,
  // each operation rounded to binary32 as the hardware does it.
  function automatic logic [31:0] island_ref(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] t;
    t = r2f(f2r(a) + f2r(32'h3F66_6666));
    t = r2f(f2r(t) * f2r(32'h3F33_3333));
    t = r2f(f2r(t) + f2r(32'h3E99_999A));
    return r2f(f2r(t) * f2r(b));
  endfunction

  // Reference for the vecNormTrans island:
  // weight' = ((d * d + 19.5) * d + 3.7) * d + 0.73 * weight, each step rounded.
  function automatic logic [31:0] vnt_ref(input logic [31:0] d, input logic [31:0] w);
    logic [31:0] t, q;
    t = r2f(f2r(d) * f2r(d));
    t = r2f(f2r(t) + f2r(32'h419C_0000));
    t = r2f(f2r(t) * f2r(d));
    t = r2f(f2r(t) + f2r(32'h406C_CCCD));
    t = r2f(f2r(t) * f2r(d));
    q = r2f(f2r(w) * f2r(32'h3F3A_E148));
    return r2f(f2r(t) + f2r(q));
  endfunction

  // A random binary32 with an exponent in [lo, hi] and a random sign.
  function automatic logic [31:0] rand_f32(input int lo, input int hi);
    int e;
    e = lo + int'($urandom % 32'(hi - lo + 1));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
