// anfis_consequent -- linear output membership function f(x) = q*x + r.
//
// One multiplier and one adder, combinational, as the document's f blocks.
// The first-order Sugeno rule has a third term p*y for a second input; the
// linearizer has a single input and its p parameters are zero, so the term
// is not built.
module anfis_consequent
  import fp_pkg::*;
(
  input  fp32_t x,
  input  fp32_t q,
  input  fp32_t r,
  output fp32_t f
);

  fp32_t qx;

  fp_mul    u_mul (.a(q), .b(x), .y(qx));
  fp_addsub u_add (.a(qx), .b(r), .sub(1'b0), .y(f));

endmodule
