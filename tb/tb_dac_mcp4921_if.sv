// tb_dac_mcp4921_if -- checks the DAC interface: the 16-bit word captured on
// rising sclk edges while cs_n is low is 0011 followed by the code, there
// are exactly 16 clocks, ldac_n pulses low only after cs_n is high again,
// and 'done' follows.
module tb_dac_mcp4921_if;

  localparam int DIV = 3;

  logic        clk = 0, rst_n = 0, start = 0;
  logic [11:0] code;
  logic        cs_n, sclk, sdi, ldac_n, busy, done;
  logic [15:0] word;
  int          nbits, ldac_pulses, ldac_bad;
  logic [15:0] latched;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dac_mcp4921_if #(.CLK_DIV(DIV)) dut (.clk, .rst_n, .start, .code, .cs_n,
    .sclk, .sdi, .ldac_n, .busy, .done);

  always @(negedge cs_n) begin word = '0; nbits = 0; end
  always @(posedge sclk) if (!cs_n) begin word = {word[14:0], sdi}; nbits++; end
  always @(negedge ldac_n) begin
    ldac_pulses++;
    if (!cs_n) ldac_bad++;
    latched = word;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] c;
    ldac_pulses = 0; ldac_bad = 0;
    code = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      c = (i == 0) ? 12'hFFF : (i == 1) ? 12'h000 : 12'($urandom);
      @(negedge clk);
      code = c;
      start = 1;
      @(negedge clk);
      start = 0;
      code = ~c;               // must have been latched
      while (!done) @(negedge clk);
      checks += 3;
      if (nbits != 16) begin
        failures++;
        $display("FAIL %0d bits", nbits);
      end
      if (latched != {4'b0011, c}) begin
        failures++;
        $display("FAIL word %h expected %h", latched, {4'b0011, c});
      end
      if (ldac_pulses != i + 1 || ldac_bad != 0 || !ldac_n) begin
        failures++;
        $display("FAIL ldac pulses=%0d bad=%0d", ldac_pulses, ldac_bad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
