// fp_addsub -- IEEE-754 single-precision adder/subtractor (combinational).
//
// y = a + b when sub = 0, y = a - b when sub = 1.  The larger magnitude
// operand is kept, the smaller one is aligned to it with guard, round and
// sticky bits, the significands are added or subtracted, the result is
// normalised with a leading-zero count and rounded to nearest, ties to even.
// Subnormal operands and results are flushed to zero; infinities and NaNs
// follow IEEE-754 (inf - inf and NaN inputs give the quiet NaN 7FC00000).
// The document asks for an IEEE-754 binary32 adder/subtractor; the
// single-cycle structure and the flush-to-zero policy are this design's own.
module fp_addsub
  import fp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);

  fp32_t bb;
  logic        swap;
  fp32_t       big, sml;
  logic [7:0]  d;
  logic [27:0] mbig, msml, msh;   // {carry, hidden, 23 fraction, G, R, S}
  logic        sticky;
  logic        eff_sub;
  logic [27:0] sum;
  logic [4:0]  lz;
  logic [27:0] norm;
  logic signed [9:0] e;
  logic [24:0] rnd;
  logic        rup;

  always_comb begin
    bb      = b;
    bb.sign = b.sign ^ sub;
    swap    = {bb.exp, bb.man} > {a.exp, a.man};
    big     = swap ? bb : a;
    sml     = swap ? a  : bb;
    eff_sub = big.sign ^ sml.sign;
    d       = big.exp - sml.exp;

    mbig = {2'b01, big.man, 3'b000};
    msml = fp_is_zero(sml) ? '0 : {2'b01, sml.man, 3'b000};
    if (d >= 8'd27) begin
      msh    = '0;
      sticky = msml != '0;
    end else begin
      msh    = msml >> d;
      sticky = (msml & ((28'd1 << d) - 28'd1)) != '0;
    end
    msh[0] = msh[0] | sticky;

    sum = eff_sub ? (mbig - msh) : (mbig + msh);

    // Normalise: the leading one belongs at bit 26.
    lz = 5'd0;
    for (int i = 0; i <= 26; i++) if (sum[i]) lz = 5'(26 - i);
    e = 10'(big.exp);
    if (sum[27]) begin
      norm = {1'b0, sum[27:2], sum[1] | sum[0]};
      e    = e + 10'sd1;
    end else begin
      norm = sum << lz;
      e    = e - 10'(lz);
    end

    // Round to nearest even on bit 3 (G = bit 2, R|S = bits 1:0).
    rup = norm[2] && (norm[1] || norm[0] || norm[3]);
    rnd = {1'b0, norm[26:3]} + 25'(rup);
    if (rnd[24]) begin
      rnd = rnd >> 1;
      e   = e + 10'sd1;
    end

    y = '0;
    if (fp_is_nan(a) || fp_is_nan(bb) ||
        (fp_is_inf(a) && fp_is_inf(bb) && (a.sign != bb.sign))) begin
      y = FP_QNAN;
    end else if (fp_is_inf(a)) begin
      y = a;
    end else if (fp_is_inf(bb)) begin
      y = bb;
    end else if (fp_is_zero(big)) begin
      y = '0;
      y.sign = a.sign & bb.sign;          // -0 + -0 = -0, otherwise +0
    end else if (sum == '0 || e <= 10'sd0) begin
      y = '0;                             // exact cancellation or underflow
    end else if (e >= 10'sd255) begin
      y = {big.sign, 8'hFF, 23'd0};
    end else begin
      y = {big.sign, e[7:0], rnd[22:0]};
    end
  end

endmodule
