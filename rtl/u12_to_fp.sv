// u12_to_fp -- exact conversion of a 12-bit unsigned integer to IEEE-754
// single precision (combinational).  The leading one is found, the integer
// is shifted so that it becomes the hidden bit, and the exponent is 127 plus
// its position; twelve bits always fit in the 24-bit significand, so no
// rounding is needed.  Used to turn the ADC code into a float before it is
// scaled to volts.  The input is unsigned, so the sign bit of 'y' is
// always 0.
module u12_to_fp
  import fp_pkg::*;
(
  input  logic [11:0] u,
  output fp32_t       y
);

  logic [3:0]  msb;
  logic [22:0] frac;

  always_comb begin
    msb = 4'd0;
    for (int i = 0; i < 12; i++) if (u[i]) msb = 4'(i);
    frac = 23'({11'd0, u} << (5'd23 - 5'(msb)));
    y    = (u == '0) ? FP_ZERO : {1'b0, 8'(BIAS) + 8'(msb), frac};
  end

endmodule
