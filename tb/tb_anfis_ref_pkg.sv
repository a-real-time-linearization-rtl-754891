// tb_anfis_ref_pkg -- independent reference model of the ANFIS linearizer
// for the testbenches.
//
// The trained parameters are written here as decimal numbers; every
// pre-computed constant is derived from them in double precision and rounded
// once to single precision.  ref_tri / ref_cons / ref_core repeat the
// single-precision operation order of the hardware (so results can be
// compared bit for bit), and ideal_core evaluates equation
//   F = (f1*Tri1 + f2*Tri2) / (Tri1 + Tri2)
// in double precision to bound the rounding error.
package tb_anfis_ref_pkg;
  import tb_fp_pkg::*;

  localparam real A1 = -3.13, B1 = -0.35, C1 = 5.169;
  localparam real A2 = 0.21,  B2 = 3.0,   C2 = 6.305;
  localparam real Q1 = 4.5,   R1 = -0.03, Q2 = 1.225, R2 = 0.5;
  localparam real VSCALE = 5.0 / 4096.0;

  typedef struct {
    logic [31:0] a, b, c, ku, ou, kd, od;
  } tri_prm_t;

  function automatic tri_prm_t tri_prm(real a, real b, real c);
    tri_prm_t p;
    p.a  = r2f(a);             p.b  = r2f(b);            p.c = r2f(c);
    p.ku = r2f(1.0 / (b - a)); p.ou = r2f(-a / (b - a));
    p.kd = r2f(1.0 / (c - b)); p.od = r2f(c / (c - b));
    return p;
  endfunction

  function automatic logic [31:0] ref_tri(tri_prm_t p, logic [31:0] x);
    real xr;
    logic [31:0] v;
    xr = f2r(x);
    if (xr <= f2r(p.a) || xr >= f2r(p.c)) return 32'd0;
    if (xr <= f2r(p.b)) v = fadd(fmul(p.ku, x), p.ou);
    else                v = fsub(p.od, fmul(p.kd, x));
    return v[31] ? 32'd0 : v;
  endfunction

  function automatic logic [31:0] ref_cons(logic [31:0] q, logic [31:0] r, logic [31:0] x);
    return fadd(fmul(q, x), r);
  endfunction

  function automatic logic [31:0] ref_core(logic [11:0] code);
    logic [31:0] x, t1, t2, f1, f2, s, n, inv;
    x   = fmul(r2f(real'(code)), r2f(VSCALE));
    t1  = ref_tri(tri_prm(A1, B1, C1), x);
    t2  = ref_tri(tri_prm(A2, B2, C2), x);
    f1  = ref_cons(r2f(Q1), r2f(R1), x);
    f2  = ref_cons(r2f(Q2), r2f(R2), x);
    s   = fadd(t1, t2);
    n   = fadd(fmul(t1, f1), fmul(t2, f2));
    inv = fdiv(32'h3F80_0000, s);
    return fmul(n, inv);
  endfunction

  function automatic real tri_ideal(real a, real b, real c, real x);
    if (x <= a || x >= c) return 0.0;
    if (x <= b) return (x - a) / (b - a);
    return (c - x) / (c - b);
  endfunction

  function automatic real ideal_core(logic [11:0] code);
    real x, t1, t2;
    x  = real'(code) * VSCALE;
    t1 = tri_ideal(A1, B1, C1, x);
    t2 = tri_ideal(A2, B2, C2, x);
    return ((Q1 * x + R1) * t1 + (Q2 * x + R2) * t2) / (t1 + t2);
  endfunction

  // DAC code for output F: round(F * 2^frac), saturated to 0..4095.
  function automatic logic [11:0] ref_dac(logic [31:0] f, int frac);
    real v;
    v = f2r(f) * (2.0 ** frac);
    if (f[31] || v <= 0.0) return 12'd0;
    if (v + 0.5 >= 4095.0) return 12'hFFF;
    return 12'($rtoi($floor(v + 0.5)));
  endfunction

endpackage
