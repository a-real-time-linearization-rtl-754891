// tb_uart_tx -- checks the UART transmitter: a receiver in the testbench
// samples each bit in its middle and checks the start bit, eight data bits
// LSB first, the stop bit and the bit time of CLKS_PER_BIT clocks.
module tb_uart_tx;

  localparam int CPB = 16;

  logic       clk = 0, rst_n = 0, start = 0;
  logic [7:0] data;
  logic       tx, busy;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .start, .data, .tx, .busy);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d, got;
    int n;
    data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (tx !== 1'b1) begin failures++; $display("FAIL line not idle high"); end
    for (int i = 0; i < 100; i++) begin
      d = (i == 0) ? 8'h00 : (i == 1) ? 8'hFF : 8'($urandom);
      @(negedge clk);
      data = d;
      start = 1;
      @(negedge clk);
      start = 0;
      data = ~d;
      // now CPB/2 + 1 clocks into... sample the middle of each bit
      repeat (CPB / 2 - 1) @(negedge clk);
      checks++;
      if (tx !== 1'b0) begin failures++; $display("FAIL start bit"); end
      for (int b = 0; b < 8; b++) begin
        repeat (CPB) @(negedge clk);
        got[b] = tx;
      end
      repeat (CPB) @(negedge clk);
      checks += 2;
      if (tx !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      if (got != d) begin failures++; $display("FAIL byte %h expected %h", got, d); end
      n = 0;
      while (busy) begin @(negedge clk); n++; end
      checks++;
      if (n < CPB / 2 - 2 || n > CPB / 2 + 2) begin
        failures++;
        $display("FAIL frame length off by %0d clocks", n - CPB / 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
