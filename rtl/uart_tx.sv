// uart_tx -- 8N1 serial transmitter for the link to the host PC.
//
// A 'start' pulse while not busy latches 'data' and sends a start bit (0),
// the eight data bits LSB first and a stop bit (1), each CLKS_PER_BIT clocks
// long (868 clocks = 115200 baud from 100 MHz).  'busy' is high from the
// clock after 'start' to the end of the stop bit; 'tx' idles high.  The
// document says the board talks to a PC but not how; the UART and its rate
// are this design's choice.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       tx,
  output logic       busy
);

  logic [$clog2(CLKS_PER_BIT)-1:0] cnt;
  logic [3:0] bitn;          // 0 start, 1..8 data, 9 stop
  logic [8:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx <= 1'b1; busy <= 1'b0; cnt <= '0; bitn <= '0; sh <= '1;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        tx   <= 1'b0;
        sh   <= {1'b1, data};
        bitn <= '0;
        cnt  <= $bits(cnt)'(CLKS_PER_BIT - 1);
      end
    end else if (cnt != '0) begin
      cnt <= cnt - 1'b1;
    end else if (bitn == 4'd9) begin
      busy <= 1'b0;
      tx   <= 1'b1;
    end else begin
      tx   <= sh[0];
      sh   <= {1'b1, sh[8:1]};
      bitn <= bitn + 4'd1;
      cnt  <= $bits(cnt)'(CLKS_PER_BIT - 1);
    end
  end

endmodule
