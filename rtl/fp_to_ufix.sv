// fp_to_ufix -- IEEE-754 single precision to unsigned 12-bit fixed point
// with FRAC fraction bits (combinational).
//
// out = round(v * 2^FRAC), ties away from zero, saturated to 0..4095:
// negative values, zero and NaN give 0, values too large (or +inf) give
// 4095.  Used to turn the linearizer output F into the 12-bit DAC code.  The
// scaling and saturation are this design's own choice.
module fp_to_ufix
  import fp_pkg::*;
#(
  parameter int unsigned FRAC = 8
) (
  input  fp32_t       v,
  output logic [11:0] out
);

  logic signed [10:0] e;       // weight of the hidden bit in output LSBs
  logic [36:0]        mag;     // {24-bit significand, 13 zeros}, 2^-13 units
  logic [36:0]        sh;
  logic [13:0]        r;

  always_comb begin
    e   = 11'(v.exp) - 11'sd127 + 11'(FRAC);
    mag = {1'b1, v.man, 13'd0};
    sh  = '0;
    r   = '0;
    out = '0;
    if (v.sign || fp_is_zero(v) || fp_is_nan(v)) begin
      out = '0;
    end else if (e >= 11'sd12) begin
      out = 12'hFFF;
    end else if (e >= -11'sd2) begin
      // value in 2^-13 output units is mag >> (23 - e); keep one more bit
      // to round with.
      sh  = mag >> (11'sd23 - e + 11'sd12);
      r   = 14'(sh) + 14'd1;          // sh holds one extra LSB
      r   = r >> 1;
      out = (r > 14'd4095) ? 12'hFFF : r[11:0];
    end
  end

endmodule
