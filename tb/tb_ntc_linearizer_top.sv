// tb_ntc_linearizer_top -- end-to-end test of the thermistor linearizer at
// its default parameters (100 MHz clock, 1.56 MHz SPI, 115200 baud).
//
// The testbench models the sensor: for each ADC frame it picks the next
// temperature of a sweep from -5 C to 125 C, computes the NTC resistance
// R = 10k * exp(3950 * (1/T - 1/298 K)), the voltage across the 1 kOhm
// resistor of the 5 V divider and the ADC code, and hands that code to the
// MCP3202 model.  For each sample it checks
//   - the float result against the bit-exact single-precision reference,
//   - the 16-bit word written to the DAC (0011 followed by the code),
//   - the 7-byte UART frame (A5h, ADC code, F),
//   - that the output rises with temperature along the sweep,
// and it counts the mechanisms of the design it saw: each branch of the
// second triangle (off, rising, falling), DAC saturation at zero, DAC
// writes, LDAC pulses and UART frames.  A mechanism never seen is a failure.
module tb_ntc_linearizer_top;
  import fp_pkg::*;
  import tb_fp_pkg::*;
  import tb_anfis_ref_pkg::*;

  localparam int CPB      = 868;   // default UART bit time in clocks
  localparam int NSAMPLES = 27;

  logic  clk = 0, rst_n = 0;
  logic  adc_cs_n, adc_sclk, adc_mosi, adc_miso;
  logic  dac_cs_n, dac_sclk, dac_sdi, dac_ldac_n, uart_txd;
  fp32_t result;
  logic  result_valid;
  logic [11:0] adc_value;
  int    frames, bad_cmd;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ntc_linearizer_top dut (
    .clk, .rst_n, .adc_cs_n, .adc_sclk, .adc_mosi, .adc_miso, .dac_cs_n,
    .dac_sclk, .dac_sdi, .dac_ldac_n, .uart_txd, .result, .result_valid
  );

  mcp3202_model adc (.cs_n(adc_cs_n), .sclk(adc_sclk), .din(adc_mosi),
    .dout(adc_miso), .value(adc_value), .frames, .bad_cmd);

  // Sensor model: next temperature at each ADC frame.
  logic [11:0] codes [$];
  int          nconv = 0;

  function automatic logic [11:0] sensor_code(real t_c);
    real t_k, r_t, v;
    int  c;
    t_k = t_c + 273.15;
    r_t = 10000.0 * $exp(3950.0 * (1.0 / t_k - 1.0 / 298.0));
    v   = 5.0 * 1000.0 / (1000.0 + r_t);
    c   = int'($floor(v / 5.0 * 4096.0));
    return (c > 4095) ? 12'd4095 : 12'(c);
  endfunction

  always @(negedge adc_cs_n) begin
    real t_c;
    t_c = -5.0 + 130.0 * real'(nconv % NSAMPLES) / real'(NSAMPLES - 1);
    if (nconv == 0) adc_value = 12'd0;          // drives the output below zero
    else            adc_value = sensor_code(t_c);
    codes.push_back(adc_value);
    nconv++;
  end

  task automatic fail(string s);
    failures++;
    if (failures < 40) $display("FAIL %s at %0t (%0d)", s, $time, failures);
  endtask

  // Results leaving the core.
  logic [31:0] exp_f [$];
  logic [11:0] exp_code [$];
  int n_results = 0, tri2_off = 0, tri2_up = 0, tri2_dn = 0, dac_zero = 0;
  always @(posedge clk) if (result_valid) begin
    logic [11:0] c;
    logic [31:0] e;
    real x;
    c = codes[n_results];
    e = ref_core(c);
    checks++;
    if (!same(result, e)) fail($sformatf("F for code %0d = %h expected %h", c, result, e));
    exp_f.push_back(e);
    exp_code.push_back(c);
    x = real'(c) * VSCALE;
    if (x <= A2) tri2_off++; else if (x <= B2) tri2_up++; else tri2_dn++;
    if (ref_dac(e, 8) == 0) dac_zero++;
    n_results++;
  end

  // DAC word capture.
  logic [15:0] dword;
  int dbits, n_dac = 0, n_ldac = 0;
  always @(negedge dac_cs_n) begin dword = '0; dbits = 0; end
  always @(posedge dac_sclk) if (!dac_cs_n) begin dword = {dword[14:0], dac_sdi}; dbits++; end
  always @(posedge dac_cs_n) begin
    checks += 2;
    if (dbits != 16) fail($sformatf("DAC frame of %0d bits", dbits));
    if (dword != {4'b0011, ref_dac(exp_f[n_dac], 8)})
      fail($sformatf("DAC word %h expected %h", dword, {4'b0011, ref_dac(exp_f[n_dac], 8)}));
    n_dac++;
  end
  always @(negedge dac_ldac_n) n_ldac++;

  // UART receiver and frame check.
  logic [7:0] rx [$];
  int n_frames = 0;
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      repeat (CPB / 2) @(posedge clk);
      if (uart_txd !== 1'b0) fail("UART start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = uart_txd;
      end
      repeat (CPB) @(posedge clk);
      if (uart_txd !== 1'b1) fail("UART stop bit");
      rx.push_back(b);
      if (rx.size() == 7) begin
        logic [31:0] f;
        logic [11:0] c;
        f = {rx[3], rx[4], rx[5], rx[6]};
        c = {rx[1][3:0], rx[2]};
        checks += 3;
        if (rx[0] != 8'hA5) fail("UART header");
        if (c != exp_code[n_frames]) fail($sformatf("UART code %0d", c));
        if (f != exp_f[n_frames]) fail($sformatf("UART F %h expected %h", f, exp_f[n_frames]));
        rx.delete();
        n_frames++;
      end
    end
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    adc_value = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_frames == 1);
    t0 = int'($time / 10);
    wait (n_frames == NSAMPLES);
    $display("one sample every %0d clocks", (int'($time / 10) - t0) / (NSAMPLES - 1));
    repeat (10) @(posedge clk);
    checks += 8;
    if (bad_cmd != 0) fail("ADC command bits");
    if (n_dac < NSAMPLES || n_ldac < NSAMPLES) fail("DAC writes missing");
    if (tri2_off == 0) fail("Tri2 off branch never used");
    if (tri2_up == 0) fail("Tri2 rising branch never used");
    if (tri2_dn == 0) fail("Tri2 falling branch never used");
    if (dac_zero == 0) fail("DAC saturation never happened");
    if (n_results < NSAMPLES) fail("results missing");
    if (frames < NSAMPLES) fail("ADC frames missing");
    $display("samples=%0d dac_writes=%0d ldac=%0d uart_frames=%0d tri2_off=%0d tri2_rising=%0d tri2_falling=%0d dac_zero=%0d",
             n_results, n_dac, n_ldac, n_frames, tri2_off, tri2_up, tri2_dn, dac_zero);
    // The sweep rises in temperature, so the linearized output must rise.
    for (int i = 2; i < NSAMPLES; i++) begin
      checks++;
      if (f2r(exp_f[i]) < f2r(exp_f[i - 1])) fail($sformatf("output falls at sample %0d", i));
    end
    for (int i = 0; i < NSAMPLES; i += 4)
      $display("code %4d  x=%6.4f V  F=%9.5f", exp_code[i], real'(exp_code[i]) * VSCALE, f2r(exp_f[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
