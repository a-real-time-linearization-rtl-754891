// adc_mcp3202_if -- SPI master that reads one conversion from an MCP3202
// 12-bit ADC.
//
// A 'start' pulse while idle pulls cs_n low and runs 17 SPI clocks in
// mode 0 (sclk idles low, both sides sample on the rising edge).  The
// master sends the command bits start=1, SGL/DIFF=1 (single-ended),
// ODD/SIGN=CHANNEL and MSBF=1 on the first four clocks; the ADC answers with
// a null bit on clock 5 and the result, MSB first, on clocks 6..17.  After
// the last falling edge cs_n goes high and 'done' pulses for one clock with
// 'code' valid (held until the next conversion).  sclk runs at
// clk / (2*CLK_DIV): 1.56 MHz for a 100 MHz clock, inside the part's limit.
// The frame follows the MCP3202 data sheet; the document only names the
// ADC.  The clock rate and channel are this design's choice.
module adc_mcp3202_if #(
  parameter int unsigned CLK_DIV = 32,
  parameter bit          CHANNEL = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        cs_n,
  output logic        sclk,
  output logic        mosi,
  input  logic        miso,
  output logic        busy,
  output logic        done,
  output logic [11:0] code
);

  localparam int unsigned NCLK = 17;
  localparam logic [3:0]  CMD  = {1'b1, 1'b1, CHANNEL, 1'b1};

  logic [$clog2(CLK_DIV)-1:0] div;
  logic [4:0]  k;          // rising edges done so far
  logic [11:0] sh;
  logic        tick;

  assign tick = div == '0;
  assign busy = !cs_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_n <= 1'b1; sclk <= 1'b0; mosi <= 1'b0; div <= '0; k <= '0;
      sh <= '0; done <= 1'b0; code <= '0;
    end else begin
      done <= 1'b0;
      if (cs_n) begin
        if (start) begin
          cs_n <= 1'b0;
          sclk <= 1'b0;
          mosi <= CMD[3];
          k    <= '0;
          div  <= $bits(div)'(CLK_DIV - 1);
        end
      end else begin
        div <= tick ? $bits(div)'(CLK_DIV - 1) : div - 1'b1;
        if (tick) begin
          if (!sclk) begin
            sclk <= 1'b1;
            k    <= k + 5'd1;
            if (k >= 5'd5) sh <= {sh[10:0], miso};
          end else begin
            sclk <= 1'b0;
            mosi <= (k < 5'd4) ? CMD[3 - k[1:0]] : 1'b0;
            if (k == 5'(NCLK)) begin
              cs_n <= 1'b1;
              done <= 1'b1;
              code <= sh;
            end
          end
        end
      end
    end
  end

endmodule
