// ntc_linearizer_top -- real-time NTC thermistor linearizer.
//
// The thermistor and a 1 kOhm resistor form a divider from +5 V; the voltage
// across the resistor, a strongly non-linear function of temperature, is
// digitised by an MCP3202 ADC.  This top runs a free loop:
//   1. read one 12-bit conversion over SPI (adc_mcp3202_if),
//   2. linearize it with the floating-point ANFIS core (anfis_core),
//   3. write the 12-bit result code to the MCP4921 DAC (dac_mcp4921_if) and,
//      at the same time, send a 7-byte frame to the PC over the UART:
//      A5h, {4'h0, code[11:8]}, code[7:0], F[31:24], F[23:16], F[15:8],
//      F[7:0] (F = IEEE-754 single-precision linearizer output),
//   4. start over once the DAC write and the frame are both finished.
// 'result' and 'result_valid' show each new F as it leaves the core.  The
// chain ADC -> ANFIS -> DAC and PC follows the document; the loop order and
// frame layout are this design's own.
//
// Timing at the defaults (100 MHz clock): an ADC read takes about 1.1k
// clocks, the core 33, the DAC write about 1.1k and the UART frame 70 bit
// times of 868 clocks, so one sample completes about every 62k clocks
// (about 1.6 k samples per second).
module ntc_linearizer_top
  import fp_pkg::*;
#(
  parameter int unsigned SPI_CLK_DIV  = 32,
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter int unsigned DAC_FRAC     = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  output logic  adc_cs_n,
  output logic  adc_sclk,
  output logic  adc_mosi,
  input  logic  adc_miso,
  output logic  dac_cs_n,
  output logic  dac_sclk,
  output logic  dac_sdi,
  output logic  dac_ldac_n,
  output logic  uart_txd,
  output fp32_t result,
  output logic  result_valid
);

  localparam int unsigned FRAME_BYTES = 7;

  typedef enum logic [2:0] {T_BOOT, T_ADC, T_ADC_WAIT, T_CORE_WAIT, T_OUT} tstate_t;

  tstate_t     st;
  logic        adc_start, adc_busy, adc_done;
  logic [11:0] adc_code, code_r;
  logic        core_start, core_ready, core_done;
  fp32_t       f_out;
  logic [11:0] dac_code;
  logic        dac_start, dac_busy, dac_done, dac_fin;
  logic        tx_start, tx_busy;
  logic [7:0]  tx_byte;
  logic [2:0]  idx;

  adc_mcp3202_if #(.CLK_DIV(SPI_CLK_DIV)) u_adc (
    .clk, .rst_n, .start(adc_start), .cs_n(adc_cs_n), .sclk(adc_sclk),
    .mosi(adc_mosi), .miso(adc_miso), .busy(adc_busy), .done(adc_done),
    .code(adc_code)
  );

  anfis_core #(.DAC_FRAC(DAC_FRAC)) u_core (
    .clk, .rst_n, .start(core_start), .adc_code(adc_code), .ready(core_ready),
    .done(core_done), .f_out, .dac_code
  );

  dac_mcp4921_if #(.CLK_DIV(SPI_CLK_DIV)) u_dac (
    .clk, .rst_n, .start(dac_start), .code(dac_code), .cs_n(dac_cs_n),
    .sclk(dac_sclk), .sdi(dac_sdi), .ldac_n(dac_ldac_n), .busy(dac_busy),
    .done(dac_done)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst_n, .start(tx_start), .data(tx_byte), .tx(uart_txd),
    .busy(tx_busy)
  );

  always_comb begin
    unique case (idx)
      3'd0:    tx_byte = 8'hA5;
      3'd1:    tx_byte = {4'h0, code_r[11:8]};
      3'd2:    tx_byte = code_r[7:0];
      3'd3:    tx_byte = result[31:24];
      3'd4:    tx_byte = result[23:16];
      3'd5:    tx_byte = result[15:8];
      default: tx_byte = result[7:0];
    endcase
  end

  assign adc_start  = st == T_ADC;
  assign core_start = (st == T_ADC_WAIT) && adc_done;
  assign dac_start  = (st == T_CORE_WAIT) && core_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_BOOT; code_r <= '0; result <= '0; result_valid <= 1'b0;
      dac_fin <= 1'b0; tx_start <= 1'b0; idx <= '0;
    end else begin
      result_valid <= 1'b0;
      tx_start     <= 1'b0;
      unique case (st)
        T_BOOT:      if (core_ready) st <= T_ADC;
        T_ADC:       st <= T_ADC_WAIT;
        T_ADC_WAIT:  if (adc_done) begin
          code_r <= adc_code;
          st     <= T_CORE_WAIT;
        end
        T_CORE_WAIT: if (core_done) begin
          result       <= f_out;
          result_valid <= 1'b1;
          dac_fin      <= 1'b0;
          idx          <= '0;
          st           <= T_OUT;
        end
        T_OUT: begin
          if (dac_done) dac_fin <= 1'b1;
          if (!tx_busy && !tx_start) begin
            if (idx < 3'(FRAME_BYTES)) begin
              tx_start <= 1'b1;
            end else if (dac_fin || dac_done) begin
              st <= T_ADC;
            end
          end
          if (tx_start) idx <= idx + 3'd1;
        end
        default: st <= T_BOOT;
      endcase
    end
  end

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    adc_start |-> !adc_busy && !dac_busy);

endmodule
