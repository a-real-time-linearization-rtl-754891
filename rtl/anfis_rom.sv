// anfis_rom -- parameter ROM of the ANFIS linearizer.
//
// Holds, as IEEE-754 single-precision words, the trained parameters of the
// two triangular input membership functions and the two linear output
// functions, together with constants worked out ahead of time so that the
// datapath needs no divider for them:
//   rising branch   Tri(x) = ku*x + ou,  ku = 1/(b-a),  ou = -a/(b-a)
//   falling branch  Tri(x) = od - kd*x,  kd = 1/(c-b),  od =  c/(c-b)
// Trained values: Tri1 a=-3.13 b=-0.35 c=5.169, Tri2 a=0.21 b=3 c=6.305,
// f1: q=4.5 r=-0.03, f2: q=1.225 r=0.5 (the p terms are zero and not
// stored).  The last word is the ADC scale 5 V / 4096 codes.  The word
// order is given by fp_pkg::rom_word_e.  The parameter values and the idea
// of storing pre-computed constants follow the document; the word order,
// the ADC scale word and the reading of Tri1's peak as -0.35 are this
// design's own.
//
// Interface and timing: one synchronous read port; 'data' shows the word at
// 'addr' one clock after 'addr' is presented.  Addresses past the last word
// read as zero.
module anfis_rom
  import fp_pkg::*;
(
  input  logic        clk,
  input  logic [4:0]  addr,
  output fp32_t       data
);

  localparam logic [31:0] INIT [ROM_WORDS] = '{
    32'hC048_51EC,  // a1  = -3.13
    32'hBEB3_3333,  // b1  = -0.35
    32'h40A5_6873,  // c1  =  5.169
    32'h3EB8_2C34,  // ku1 =  1/(b1-a1)
    32'h3F90_1D78,  // ou1 = -a1/(b1-a1)
    32'h3E39_8A76,  // kd1 =  1/(c1-b1)
    32'h3F6F_C3E2,  // od1 =  c1/(c1-b1)
    32'h3E57_0A3D,  // a2  =  0.21
    32'h4040_0000,  // b2  =  3.0
    32'h40C9_C28F,  // c2  =  6.305
    32'h3EB7_8336,  // ku2 =  1/(b2-a2)
    32'hBD9A_268A,  // ou2 = -a2/(b2-a2)
    32'h3E9A_EAB3,  // kd2 =  1/(c2-b2)
    32'h3FF4_3006,  // od2 =  c2/(c2-b2)
    32'h4090_0000,  // q1  =  4.5
    32'hBCF5_C28F,  // r1  = -0.03
    32'h3F9C_CCCD,  // q2  =  1.225
    32'h3F00_0000,  // r2  =  0.5
    32'h3AA0_0000   // volts per ADC code = 5/4096
  };

  always_ff @(posedge clk) begin
    if (addr < 5'(ROM_WORDS)) data <= INIT[addr];
    else                      data <= '0;
  end

endmodule
