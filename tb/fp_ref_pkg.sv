// fp_ref_pkg -- single-precision reference arithmetic for the testbenches.
//
// The simulator has no single-precision type, so values are carried as
// double-precision reals and rounded to single precision by hand. A product
// or sum of two single-precision numbers rounded first to double and then to
// single gives the correctly rounded single result (double has more than
// 2*24+2 significand bits), so these functions are an independent model of
// the hardware units. Subnormal results flush to zero as in the hardware.
package fp_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return $bitstoreal({f[31], 63'd0});
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        g, s;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    g = d[28];
    s = |d[27:0];
    if (g && (s || m[0])) m = m + 25'd1;
    if (m[24]) begin m = m >> 1; e = e + 1; end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] fmul(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic logic [31:0] fadd(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] r;
    r = r2f(f2r(a) + f2r(b));
    // exact cancellation of non-zero operands is +0 in round-to-nearest
    if (r[30:0] == 31'd0 && !(a[30:23] == 8'd0 && b[30:23] == 8'd0)) r = 32'd0;
    return r;
  endfunction

  // random normal number with exponent field in [elo, ehi]
  function automatic logic [31:0] rand_f(input int elo, input int ehi);
    return {1'($urandom), 8'(elo + int'($urandom % (ehi - elo + 1))), 23'($urandom)};
  endfunction

endpackage
