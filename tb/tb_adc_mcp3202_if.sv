// tb_adc_mcp3202_if -- checks the ADC interface against the MCP3202 model:
// random codes come back unchanged, the command bits are right, the frame
// has 17 SPI clocks at clk/(2*CLK_DIV), and 'done' follows the end of the
// frame.
module tb_adc_mcp3202_if;

  localparam int DIV = 4;

  logic        clk = 0, rst_n = 0, start = 0;
  logic        cs_n, sclk, mosi, miso, busy, done;
  logic [11:0] code, value;
  int          frames, bad_cmd;
  int checks = 0, failures = 0;
  int edges;
  always #5 clk = ~clk;

  adc_mcp3202_if #(.CLK_DIV(DIV)) dut (.clk, .rst_n, .start, .cs_n, .sclk,
    .mosi, .miso, .busy, .done, .code);
  mcp3202_model adc (.cs_n, .sclk, .din(mosi), .dout(miso), .value, .frames, .bad_cmd);

  always @(posedge sclk) edges++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    value = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      value = (i == 0) ? 12'hFFF : (i == 1) ? 12'h000 : (i == 2) ? 12'hA5A : 12'($urandom);
      edges = 0;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      n = 1;
      while (!done) begin
        @(negedge clk);
        n++;
      end
      checks += 4;
      if (code != value) begin
        failures++;
        $display("FAIL code %h expected %h", code, value);
      end
      if (edges != 17) begin
        failures++;
        $display("FAIL %0d SPI clocks", edges);
      end
      if (n != 17 * 2 * DIV + 1) begin
        failures++;
        $display("FAIL frame took %0d clocks", n);
      end
      if (!cs_n) begin
        failures++;
        $display("FAIL cs_n still low at done");
      end
    end
    checks += 2;
    if (frames != 200) begin
      failures++;
      $display("FAIL model saw %0d frames", frames);
    end
    if (bad_cmd != 0) begin
      failures++;
      $display("FAIL %0d bad command words", bad_cmd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
