// fp_div -- IEEE-754 single-precision divider, one quotient bit per clock.
//
// y = a / b.  A restoring division of the two 24-bit significands produces
// 26 quotient bits (an integer bit, 23 fraction bits, a guard bit and one
// spare for the case where the quotient is below one); the remainder gives
// the sticky bit and the result is rounded to nearest, ties to even.
// Subnormals are flushed to zero, x/0 gives a signed infinity, 0/0, inf/inf
// and NaN inputs give the quiet NaN.  In the linearizer this unit is the
// S^-1 block: it is started with a = 1.0 and b = S = Tri1(x) + Tri2(x).
//
// Interface and timing: a one-cycle 'start' while not busy latches a and b.
// 'busy' is high for the next 27 cycles; 'done' pulses for one cycle
// together with a valid 'y' (held until the next result) 27 clock edges
// after the edge that sampled 'start', in the cycle where 'busy' falls.  The latency is the same for every
// operand, specials included.  The document names the divider; the
// bit-serial structure is this design's own choice.
module fp_div
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t a,
  input  fp32_t b,
  output logic  busy,
  output logic  done,
  output fp32_t y
);

  localparam int unsigned QBITS = 26;

  typedef enum logic [1:0] {D_IDLE, D_RUN, D_ROUND} dstate_t;

  dstate_t     st;
  logic [4:0]  cnt;
  logic [25:0] rem;
  logic [23:0] den;
  logic [25:0] q;
  logic signed [9:0] e0;
  logic        sgn;
  fp32_t       special;
  logic        is_special;

  // Rounding of the finished quotient.
  logic [23:0] m;
  logic        g, sticky, rup;
  logic [24:0] rnd;
  logic signed [9:0] e;
  fp32_t       res;

  always_comb begin
    if (q[25]) begin
      m = q[25:2]; g = q[1]; sticky = q[0] || (rem != '0); e = e0;
    end else begin
      m = q[24:1]; g = q[0]; sticky = rem != '0;           e = e0 - 10'sd1;
    end
    rup = g && (sticky || m[0]);
    rnd = {1'b0, m} + 25'(rup);
    if (rnd[24]) begin
      rnd = rnd >> 1;
      e   = e + 10'sd1;
    end
    if (is_special)        res = special;
    else if (e <= 10'sd0)  res = {sgn, 31'd0};
    else if (e >= 10'sd255) res = {sgn, 8'hFF, 23'd0};
    else                   res = {sgn, e[7:0], rnd[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_IDLE; cnt <= '0; rem <= '0; den <= '0; q <= '0;
      e0 <= '0; sgn <= 1'b0; special <= '0; is_special <= 1'b0;
      done <= 1'b0; y <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        D_IDLE: if (start) begin
          sgn        <= a.sign ^ b.sign;
          e0         <= 10'(a.exp) - 10'(b.exp) + 10'sd127;
          rem        <= 26'({2'b01, a.man});
          den        <= {1'b1, b.man};
          q          <= '0;
          cnt        <= '0;
          is_special <= 1'b1;
          if (fp_is_nan(a) || fp_is_nan(b) || (fp_is_inf(a) && fp_is_inf(b)) ||
              (fp_is_zero(a) && fp_is_zero(b)))
            special <= FP_QNAN;
          else if (fp_is_inf(a) || fp_is_zero(b))
            special <= {a.sign ^ b.sign, 8'hFF, 23'd0};
          else if (fp_is_zero(a) || fp_is_inf(b))
            special <= {a.sign ^ b.sign, 31'd0};
          else
            is_special <= 1'b0;
          st <= D_RUN;
        end
        D_RUN: begin
          if (rem >= {2'b00, den}) begin
            rem <= (rem - {2'b00, den}) << 1;
            q   <= {q[24:0], 1'b1};
          end else begin
            rem <= rem << 1;
            q   <= {q[24:0], 1'b0};
          end
          cnt <= cnt + 5'd1;
          if (cnt == 5'(QBITS - 1)) st <= D_ROUND;
        end
        D_ROUND: begin
          y    <= res;
          done <= 1'b1;
          st   <= D_IDLE;
        end
        default: st <= D_IDLE;
      endcase
    end
  end

  assign busy = st != D_IDLE;

endmodule
