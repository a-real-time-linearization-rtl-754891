// mcp3202_model -- behavioural model of the MCP3202 12-bit SPI ADC for the
// testbenches (not synthesizable hardware).
//
// On each falling cs_n it collects the start, SGL/DIFF, ODD/SIGN and MSBF
// bits on the first four rising sclk edges, then drives a null bit after the
// fourth falling edge and the 12-bit 'value' (sampled at the fourth falling
// edge) MSB first after each following falling edge.  dout is high while
// cs_n is high.  'frames' counts complete frames; 'bad_cmd' counts frames
// whose command bits were not start=1, single-ended, channel 0, MSB first.
module mcp3202_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic        din,
  output logic        dout,
  input  logic [11:0] value,
  output int          frames,
  output int          bad_cmd
);

  int          rise, fall;
  logic [3:0]  cmd;
  logic [11:0] held;

  initial begin
    frames = 0; bad_cmd = 0; rise = 0; fall = 0; dout = 1'b1; cmd = '0; held = '0;
  end

  always @(negedge cs_n) begin
    rise = 0;
    fall = 0;
    cmd  = '0;
  end

  always @(posedge cs_n) begin
    dout = 1'b1;
    if (rise >= 17) begin
      frames++;
      if (cmd != 4'b1101) bad_cmd++;
    end
  end

  always @(posedge sclk) if (!cs_n) begin
    if (rise < 4) cmd = {cmd[2:0], din};
    rise++;
  end

  always @(negedge sclk) if (!cs_n) begin
    fall++;
    if (fall == 4) begin
      held = value;
      dout = 1'b0;                      // null bit
    end else if (fall >= 5 && fall <= 16) begin
      dout = held[16 - fall];
    end else if (fall > 16) begin
      dout = 1'b0;
    end
  end

endmodule
