// fp_ref_pkg: reference single-precision arithmetic for the testbenches.
//
// Operands are widened to double precision, added or multiplied there (exact
// for products of two binary32 values and for sums whose exponents differ by
// at most 29), and the double result is rounded to binary32 by an explicit
// round-to-nearest-even on its bit pattern. Results below the smallest normal
// number become signed zero and subnormal inputs count as zero, the same
// conventions as the processing elements.
package fp_ref_pkg;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0)  d = {f[31], 63'd0};
    else if (f[30:23] == 8'hFF)
      d = (f[22:0] == 0) ? {f[31], 11'h7FF, 52'd0} : 64'h7FF8_0000_0000_0000;
    else d = {f[31], 11'(f[30:23]) - 11'd127 + 11'd1023, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [23:0] keep;
    logic [24:0] m;
    logic        g, st, up;
    d = $realtobits(r);
    if (d[62:52] == 11'h7FF) return (d[51:0] == 0) ? {d[63], 8'hFF, 23'd0} : QNAN;
    if (d[62:52] == 11'd0)   return {d[63], 31'd0};
    e    = int'(d[62:52]) - 1023 + 127;
    keep = {1'b1, d[51:29]};
    g    = d[28];
    st   = |d[27:0];
    up   = g & (st | keep[0]);
    m    = {1'b0, keep} + 25'(up);
    if (m[24]) begin m = m >> 1; e++; end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] canon(input logic [31:0] f);
    if (f[30:23] == 8'hFF && f[22:0] != 0) return QNAN;
    if (f[30:23] == 8'd0) return {f[31], 31'd0};
    return f;
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b,
                                          input logic sub);
    logic [31:0] bb, r;
    bb = {b[31] ^ sub, b[30:0]};
    if (a[30:23] == 0 && bb[30:23] == 0) return {a[31] & bb[31], 31'd0};
    r = r2f(f2r(a) + f2r(bb));
    // an exact cancellation of finite values gives +0
    if (r[30:0] == 0 && a[30:23] != 8'hFF) r = 32'd0;
    return canon(r);
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    return canon(r2f(f2r(a) * f2r(b)));
  endfunction

  // Random normal number with exponent field in [emin, emax].
  function automatic logic [31:0] rand_fp(input int emin, input int emax);
    logic [31:0] f;
    f = $urandom;
    f[30:23] = 8'(emin + int'($urandom_range(emax - emin)));
    return f;
  endfunction

endpackage
