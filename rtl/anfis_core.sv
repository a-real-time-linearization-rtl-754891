// anfis_core -- the digital ANFIS linearizer.
//
// Computes, in IEEE-754 single precision,
//   x = code * 5/4096                          (ADC code to volts)
//   F = (f1(x)*Tri1(x) + f2(x)*Tri2(x)) / (Tri1(x) + Tri2(x))
// with f_i(x) = q_i*x + r_i and triangular Tri_i, the two-rule first-order
// Sugeno fuzzy system whose trained parameters sit in the parameter ROM.
// Blocks: parameter ROM, Tri1, Tri2, f1, f2, the S^-1 unit (fp_div with
// dividend 1.0), two shared multipliers (mul_a, mul_b), two shared adders
// (add_a, add_b) and the control unit.  The division by S is done once as a
// reciprocal and then a multiplication, as the document's S^-1 block does.
// mul_a is used three times per sample (scale, w1*f1, N*1/S); the control
// unit's state selects its operands.  The output is given both as the float
// F and as a 12-bit code round(F * 2^DAC_FRAC) saturated to 0..4095 for the
// DAC; that scaling and the ADC scaling are this design's own choice.
//
// Interface and timing: after reset the core spends about 20 clocks loading the
// ROM ('ready' low).  A 'start' pulse while 'ready' samples 'adc_code';
// 'done' pulses 33 clocks later with 'f_out' and 'dac_code' valid, and they
// hold until the next result.  Samples cannot overlap.
module anfis_core
  import fp_pkg::*;
#(
  parameter int unsigned DAC_FRAC = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [11:0] adc_code,
  output logic        ready,
  output logic        done,
  output fp32_t       f_out,
  output logic [11:0] dac_code
);

  anfis_state_t state;
  logic [4:0]   rom_addr, ld_addr;
  logic         ld_en, div_start, div_done, div_busy;
  fp32_t        rom_data;
  fp32_t        prm [ROM_WORDS];

  // Pipeline registers of the datapath.
  fp32_t xi, x, t1, t2, f1, f2, m1, m2, s, n, inv;

  fp32_t xi_c, tri1_c, tri2_c, f1_c, f2_c;
  fp32_t mula_a, mula_b, mula_y, mulb_y, adda_y, addb_y, div_y;
  logic [11:0] code_c;

  anfis_ctrl u_ctrl (
    .clk, .rst_n, .start, .div_done, .state, .rom_addr, .ld_en, .ld_addr,
    .div_start, .ready, .done
  );

  anfis_rom u_rom (.clk, .addr(rom_addr), .data(rom_data));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ROM_WORDS); i++) prm[i] <= '0;
    end else if (ld_en && ld_addr < 5'(ROM_WORDS)) begin
      prm[ld_addr] <= rom_data;
    end
  end

  u12_to_fp u_cvt_in (.u(adc_code), .y(xi_c));

  anfis_tri u_tri1 (
    .x, .a(prm[R_A1]), .b(prm[R_B1]), .c(prm[R_C1]),
    .ku(prm[R_KU1]), .ou(prm[R_OU1]), .kd(prm[R_KD1]), .od(prm[R_OD1]),
    .mu(tri1_c)
  );
  anfis_tri u_tri2 (
    .x, .a(prm[R_A2]), .b(prm[R_B2]), .c(prm[R_C2]),
    .ku(prm[R_KU2]), .ou(prm[R_OU2]), .kd(prm[R_KD2]), .od(prm[R_OD2]),
    .mu(tri2_c)
  );
  anfis_consequent u_f1 (.x, .q(prm[R_Q1]), .r(prm[R_R1]), .f(f1_c));
  anfis_consequent u_f2 (.x, .q(prm[R_Q2]), .r(prm[R_R2]), .f(f2_c));

  // Shared multiplier A: scale in S_SCALE, w1*f1 in S_WEIGHT, N/S in S_OUT.
  always_comb begin
    unique case (state)
      S_SCALE:  begin mula_a = xi; mula_b = prm[R_VSCALE]; end
      S_WEIGHT: begin mula_a = t1; mula_b = f1;            end
      default:  begin mula_a = n;  mula_b = inv;           end
    endcase
  end
  fp_mul    u_mul_a (.a(mula_a), .b(mula_b), .y(mula_y));
  fp_mul    u_mul_b (.a(t2), .b(f2), .y(mulb_y));
  fp_addsub u_add_a (.a(m1), .b(m2), .sub(1'b0), .y(adda_y));
  fp_addsub u_add_b (.a(t1), .b(t2), .sub(1'b0), .y(addb_y));

  // S^-1 block.
  fp_div u_sinv (
    .clk, .rst_n, .start(div_start), .a(FP_ONE), .b(s),
    .busy(div_busy), .done(div_done), .y(div_y)
  );

  fp_to_ufix #(.FRAC(DAC_FRAC)) u_cvt_out (.v(mula_y), .out(code_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xi <= '0; x <= '0; t1 <= '0; t2 <= '0; f1 <= '0; f2 <= '0;
      m1 <= '0; m2 <= '0; s <= '0; n <= '0; inv <= '0;
      f_out <= '0; dac_code <= '0;
    end else begin
      unique case (state)
        S_IDLE:   if (start && ready) xi <= xi_c;
        S_SCALE:  x <= mula_y;
        S_FUZZ:   begin t1 <= tri1_c; t2 <= tri2_c; f1 <= f1_c; f2 <= f2_c; end
        S_WEIGHT: begin m1 <= mula_y; m2 <= mulb_y; s <= addb_y; end
        S_SUM:    n <= adda_y;
        S_DIV:    if (div_done) inv <= div_y;
        S_OUT:    begin f_out <= mula_y; dac_code <= code_c; end
        default:  ;
      endcase
    end
  end

  a_start_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
    div_start |-> !div_busy);

endmodule
