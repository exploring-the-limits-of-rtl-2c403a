// Reference single-precision arithmetic for the testbenches.
//
// Operands are widened exactly to double precision, the operation is done in
// double precision, and the result is rounded back to single precision (round
// to nearest even) by explicit bit manipulation. For a single add or multiply
// of binary32 values this double rounding gives the correctly rounded binary32
// result. Subnormals are read and written as signed zero, matching the design.
package fp_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) d = {f[31], 63'd0};
    else if (f[30:23] == 8'hFF) d = {f[31], 11'h7FF, f[22:0], 29'd0};
    else d = {f[31], 11'(f[30:23]) + 11'd896, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        g, s;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 896;
    m = {2'b01, d[51:29]};
    g = d[28];
    s = |d[27:0];
    if (g && (s || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] y;
    y = r2f(f2r(a) + f2r(b));
    // IEEE: an exact zero sum of non-zero operands is +0.
    if (y[30:0] == 31'd0 && !(a[31] && b[31])) y = 32'd0;
    return y;
  endfunction

  // Random normal number with exponent in [127-span, 127+span].
  function automatic logic [31:0] rand_fp(input int span);
    int e;
    e = 127 - span + int'($urandom_range(0, 2 * span));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
