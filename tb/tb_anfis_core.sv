// tb_anfis_core -- checks the ANFIS core end to end: after the ROM load,
// samples over the whole ADC range give F bit for bit equal to the
// single-precision reference, within 1e-4 of the exact equation, and the
// saturated DAC code; 'done' must come 33 clocks after 'start'.  The test
// also counts the membership regions and DAC saturation it exercised.
module tb_anfis_core;
  import fp_pkg::*;
  import tb_fp_pkg::*;
  import tb_anfis_ref_pkg::*;

  localparam int LATENCY = 33;

  logic        clk = 0, rst_n = 0, start = 0, ready, done;
  logic [11:0] adc_code, dac_code;
  logic [31:0] f_out;
  int checks = 0, failures = 0;
  int sat_lo = 0, tri2_off = 0, tri2_up = 0, tri2_dn = 0;
  always #5 clk = ~clk;

  anfis_core dut (.clk, .rst_n, .start, .adc_code, .ready, .done, .f_out, .dac_code);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sample(logic [11:0] code);
    int n;
    logic [31:0] e;
    real err, x;
    @(negedge clk);
    adc_code = code;
    start = 1;
    @(negedge clk);
    start = 0;
    adc_code = 12'($urandom);    // the core must have captured the code
    n = 0;
    while (!done && n < 200) begin
      @(negedge clk);
      n++;
    end
    e = ref_core(code);
    checks += 4;
    if (n != LATENCY) begin
      failures++;
      $display("FAIL latency %0d", n);
    end
    if (!same(f_out, e)) begin
      failures++;
      if (failures < 10) $display("FAIL code %0d: F=%h expected %h", code, f_out, e);
    end
    err = f2r(f_out) - ideal_core(code);
    if (err > 1e-4 || err < -1e-4) begin
      failures++;
      $display("FAIL code %0d: F=%f exact %f", code, f2r(f_out), ideal_core(code));
    end
    if (dac_code != ref_dac(e, 8)) begin
      failures++;
      $display("FAIL code %0d: dac %0d expected %0d", code, dac_code, ref_dac(e, 8));
    end
    x = real'(code) * VSCALE;
    if (dac_code == 0) sat_lo++;
    if (x <= A2) tri2_off++; else if (x <= B2) tri2_up++; else tri2_dn++;
  endtask

  initial begin
    int n;
    adc_code = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    n = 0;
    while (!ready) begin
      @(negedge clk);
      n++;
    end
    checks++;
    if (n < int'(ROM_WORDS)) begin
      failures++;
      $display("FAIL ready after %0d clocks, before the ROM load", n);
    end
    sample(12'd0);
    sample(12'd1);
    sample(12'd172);      // Tri2 foot region
    sample(12'd2458);     // Tri2 peak at 3.0 V
    sample(12'd4095);
    for (int i = 0; i < 4096; i += 7) sample(12'(i));
    for (int i = 0; i < 300; i++) sample(12'($urandom));
    checks += 3;
    if (sat_lo == 0 || tri2_off == 0 || tri2_up == 0 || tri2_dn == 0) begin
      failures++;
      $display("FAIL a region was never exercised");
    end
    $display("samples: dac_zero=%0d tri2_off=%0d tri2_rising=%0d tri2_falling=%0d",
             sat_lo, tri2_off, tri2_up, tri2_dn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
