// anfis_tri -- triangular input membership function Tri(x) (combinational).
//
//   Tri(x) = 0            for x <= a or x >= c
//          = ku*x + ou    for a < x <= b   (ku = 1/(b-a), ou = -a/(b-a))
//          = od - kd*x    for b < x <  c   (kd = 1/(c-b), od =  c/(c-b))
// Both branches are evaluated in parallel with two multipliers, an adder and
// a subtractor, as the document's Tri blocks do, and float comparisons of x
// against a, b and c pick the branch.  The slopes and offsets come from the
// parameter ROM, so no division happens here.  A branch value that rounding
// pushes just below zero next to a foot is clamped to zero; that clamp is
// this design's own addition; it also means the sign bit of 'mu' is
// always 0.
module anfis_tri
  import fp_pkg::*;
(
  input  fp32_t x,
  input  fp32_t a,
  input  fp32_t b,
  input  fp32_t c,
  input  fp32_t ku,
  input  fp32_t ou,
  input  fp32_t kd,
  input  fp32_t od,
  output fp32_t mu
);

  fp32_t px_up, px_dn, up, dn;

  fp_mul    u_mul_up (.a(ku), .b(x), .y(px_up));
  fp_addsub u_add_up (.a(px_up), .b(ou), .sub(1'b0), .y(up));
  fp_mul    u_mul_dn (.a(kd), .b(x), .y(px_dn));
  fp_addsub u_sub_dn (.a(od), .b(px_dn), .sub(1'b1), .y(dn));

  always_comb begin
    if (fp_le(x, a) || fp_le(c, x)) mu = FP_ZERO;
    else if (fp_le(x, b))           mu = up.sign ? FP_ZERO : up;
    else                            mu = dn.sign ? FP_ZERO : dn;
  end

endmodule
