// dac_mcp4921_if -- SPI master that writes a 12-bit code to an MCP4921 DAC.
//
// A 'start' pulse while idle latches 'code', pulls cs_n low and shifts out
// the 16-bit command word MSB first in SPI mode 0 (data changes while sclk
// is low, the DAC samples on the rising edge):
//   bit 15 A/B = 0, bit 14 BUF = 0, bit 13 GA_n = 1 (gain 1),
//   bit 12 SHDN_n = 1 (output on), bits 11..0 = code.
// After the 16th clock cs_n returns high, then ldac_n is held low for one
// SPI half period to move the word to the output, and 'done' pulses.  sclk
// runs at clk / (2*CLK_DIV).  The word format follows the MCP4921 data
// sheet; the document only names the DAC.
module dac_mcp4921_if #(
  parameter int unsigned CLK_DIV = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [11:0] code,
  output logic        cs_n,
  output logic        sclk,
  output logic        sdi,
  output logic        ldac_n,
  output logic        busy,
  output logic        done
);

  typedef enum logic [1:0] {W_IDLE, W_SHIFT, W_GAP, W_LDAC} wstate_t;

  wstate_t st;
  logic [$clog2(CLK_DIV)-1:0] div;
  logic [4:0]  k;
  logic [15:0] word;
  logic        tick;

  assign tick = div == '0;
  assign busy = st != W_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= W_IDLE; cs_n <= 1'b1; sclk <= 1'b0; sdi <= 1'b0; ldac_n <= 1'b1;
      div <= '0; k <= '0; word <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (st != W_IDLE)
        div <= tick ? $bits(div)'(CLK_DIV - 1) : div - 1'b1;
      unique case (st)
        W_IDLE: if (start) begin
          word <= {4'b0011, code} << 1;
          sdi  <= 1'b0;                 // bit 15, A/B = 0
          cs_n <= 1'b0;
          k    <= '0;
          div  <= $bits(div)'(CLK_DIV - 1);
          st   <= W_SHIFT;
        end
        W_SHIFT: if (tick) begin
          if (!sclk) begin
            sclk <= 1'b1;
            k    <= k + 5'd1;
          end else begin
            sclk <= 1'b0;
            sdi  <= word[15];
            word <= word << 1;
            if (k == 5'd16) begin
              cs_n <= 1'b1;
              st   <= W_GAP;
            end
          end
        end
        W_GAP: if (tick) begin
          ldac_n <= 1'b0;
          st     <= W_LDAC;
        end
        W_LDAC: if (tick) begin
          ldac_n <= 1'b1;
          done   <= 1'b1;
          st     <= W_IDLE;
        end
        default: st <= W_IDLE;
      endcase
    end
  end

endmodule
