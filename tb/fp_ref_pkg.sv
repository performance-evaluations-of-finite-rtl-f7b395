// fp_ref_pkg: reference binary32 arithmetic for the testbenches, computed
// with double precision reals. A binary32 sum, difference or product is
// formed exactly or with one double rounding, which is harmless because
// binary64 has more than 2*24+2 significand bits; the result is then rounded
// to binary32 (nearest even) here. Results below the normal range flush to
// zero, as in the hardware. Infinities and NaNs are not modelled.
package fp_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    if (f[30:23] == 8'd0) return 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] r2f(input real x);
    logic [63:0] d;
    logic [52:0] m53;
    logic [24:0] m;
    logic        g, st;
    int          e;
    d = $realtobits(x);
    if (d[62:0] == '0) return {d[63], 31'd0};
    e   = int'(d[62:52]) - 1023 + 127;
    m53 = {1'b1, d[51:0]};
    g   = m53[28];
    st  = |m53[27:0];
    m   = {1'b0, m53[52:29]} + 25'(g & (st | m53[29]));
    if (m[24]) begin
      e = e + 1;
      m = m >> 1;
    end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] fadd(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  function automatic logic [31:0] fsub(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) - f2r(b));
  endfunction

  function automatic logic [31:0] fmul(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  // random normal number with exponent field in [lo, hi]
  function automatic logic [31:0] rnd_f(input int lo, input int hi);
    logic [31:0] r;
    r = $urandom;
    return {r[31], 8'(lo + int'($urandom % 32'(hi - lo + 1))), r[22:0]};
  endfunction

endpackage
