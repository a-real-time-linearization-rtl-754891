// fp_pkg -- shared types and helpers for the IEEE-754 single-precision
// arithmetic of the thermistor linearizer.
//
// A float is carried as fp32_t: 1 sign bit, 8 exponent bits (bias 127) and a
// 23-bit fraction with a hidden leading one, the binary32 layout of IEEE-754.
// All units in this design flush subnormal numbers to zero and round to
// nearest, ties to even; that simplification is this design's own choice.
// The package also holds the ROM word map and the control unit's state type
// so that the ROM, the control unit and the datapath agree on them.
package fp_pkg;

  localparam int unsigned FP_W  = 32;
  localparam int unsigned EXP_W = 8;
  localparam int unsigned MAN_W = 23;
  localparam int unsigned BIAS  = 127;

  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exp;
    logic [MAN_W-1:0] man;
  } fp32_t;

  localparam fp32_t FP_ZERO = '0;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_QNAN = 32'h7FC0_0000;

  function automatic logic fp_is_nan(fp32_t v);
    return (v.exp == '1) && (v.man != '0);
  endfunction

  function automatic logic fp_is_inf(fp32_t v);
    return (v.exp == '1) && (v.man == '0);
  endfunction

  // Zero, including flushed subnormals.
  function automatic logic fp_is_zero(fp32_t v);
    return v.exp == '0;
  endfunction

  // a < b for ordered (non-NaN) operands; +0 and -0 compare equal and
  // subnormals are treated as zero.
  function automatic logic fp_lt(fp32_t a, fp32_t b);
    logic [30:0] ma, mb;
    ma = fp_is_zero(a) ? '0 : {a.exp, a.man};
    mb = fp_is_zero(b) ? '0 : {b.exp, b.man};
    if (ma == '0 && mb == '0) return 1'b0;
    if (a.sign != b.sign)     return a.sign && !(ma == '0 && mb == '0);
    if (!a.sign)              return ma < mb;
    return ma > mb;
  endfunction

  function automatic logic fp_le(fp32_t a, fp32_t b);
    return !fp_lt(b, a);
  endfunction

  // Word map of the parameter ROM (see anfis_rom).  For each triangle i:
  // feet a, peak b, foot c, rising slope 1/(b-a), rising offset -a/(b-a),
  // falling slope 1/(c-b) and falling offset c/(c-b).  Then the consequent
  // parameters q, r of f1 and f2 and the ADC volts-per-code scale.
  typedef enum logic [4:0] {
    R_A1, R_B1, R_C1, R_KU1, R_OU1, R_KD1, R_OD1,
    R_A2, R_B2, R_C2, R_KU2, R_OU2, R_KD2, R_OD2,
    R_Q1, R_R1, R_Q2, R_R2, R_VSCALE
  } rom_word_e;

  localparam int unsigned ROM_WORDS = 19;

  // States of the ANFIS control unit.
  typedef enum logic [3:0] {
    S_RESET,   // parameters not loaded yet
    S_LOAD,    // copy ROM words into parameter registers
    S_IDLE,    // wait for a sample
    S_SCALE,   // x = code * volts-per-code
    S_FUZZ,    // Tri1, Tri2, f1, f2 registered
    S_WEIGHT,  // w1*f1, w2*f2 and S = w1 + w2 registered, S^-1 started
    S_SUM,     // N = w1*f1 + w2*f2 registered
    S_DIV,     // wait for 1/S
    S_OUT      // F = N * (1/S) registered, done
  } anfis_state_t;

endpackage
