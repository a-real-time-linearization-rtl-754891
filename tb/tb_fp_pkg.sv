// tb_fp_pkg -- reference arithmetic for the testbenches.
//
// Single-precision results are worked out in double precision and then
// rounded once to single precision, to nearest with ties to even, with
// subnormal results flushed to zero like the design.  Because a double
// carries more than 2*24+2 significand bits, this gives the correctly
// rounded single-precision sum, difference, product and quotient.
package tb_fp_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return f[31] ? -0.0 : 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic [52:0] m;
    logic [24:0] k;
    logic        g, st;
    int          e;
    d = $realtobits(r);
    if (d[62:0] == '0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    g  = m[28];
    st = m[27:0] != '0;
    k  = {1'b0, m[52:29]} + 25'(g && (st || m[29]));
    if (k[24]) begin
      k = k >> 1;
      e = e + 1;
    end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), k[22:0]};
  endfunction

  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  function automatic logic [31:0] fsub(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) - f2r(b));
  endfunction

  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic logic [31:0] fdiv(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) / f2r(b));
  endfunction

  // Random normal float with exponent field in [emin, emax].
  function automatic logic [31:0] rand_fp(int emin, int emax);
    logic [31:0] v;
    v = $urandom;
    v[30:23] = 8'(emin + int'($urandom % (emax - emin + 1)));
    return v;
  endfunction

  // Bit patterns equal, treating +0 and -0 as equal.
  function automatic logic same(logic [31:0] a, logic [31:0] b);
    if (a[30:0] == 0 && b[30:0] == 0) return 1'b1;
    return a == b;
  endfunction

endpackage
