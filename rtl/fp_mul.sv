// fp_mul -- IEEE-754 single-precision multiplier (combinational).
//
// The two 24-bit significands (hidden one included) are multiplied into a
// 48-bit product, which is normalised by at most one place; the exponents
// are added and re-biased, and the product is rounded to nearest, ties to
// even, from a guard bit and a sticky bit.  Subnormal operands and results
// are flushed to zero, overflow gives a signed infinity, 0 * inf and NaN
// inputs give the quiet NaN.  The document asks for an IEEE-754 binary32
// multiplier and reports no DSP blocks used; the single-cycle structure and
// the flush-to-zero policy are this design's own.
module fp_mul
  import fp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        s;
  logic [47:0] p;
  logic [23:0] m;
  logic        g, st, rup;
  logic [24:0] rnd;
  logic signed [10:0] e;

  always_comb begin
    s = a.sign ^ b.sign;
    p = {1'b1, a.man} * {1'b1, b.man};
    e = 11'(a.exp) + 11'(b.exp) - 11'sd127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = p[22:0] != '0;
      e  = e + 11'sd1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = p[21:0] != '0;
    end
    rup = g && (st || m[0]);
    rnd = {1'b0, m} + 25'(rup);
    if (rnd[24]) begin
      rnd = rnd >> 1;
      e   = e + 11'sd1;
    end

    if (fp_is_nan(a) || fp_is_nan(b) ||
        (fp_is_inf(a) && fp_is_zero(b)) || (fp_is_zero(a) && fp_is_inf(b)))
      y = FP_QNAN;
    else if (fp_is_inf(a) || fp_is_inf(b))
      y = {s, 8'hFF, 23'd0};
    else if (fp_is_zero(a) || fp_is_zero(b) || e <= 11'sd0)
      y = {s, 31'd0};
    else if (e >= 11'sd255)
      y = {s, 8'hFF, 23'd0};
    else
      y = {s, e[7:0], rnd[22:0]};
  end

endmodule
