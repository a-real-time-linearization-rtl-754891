// tb_anfis_rom -- checks every word of the parameter ROM against the
// trained parameters and the constants derived from them, the one-clock
// read latency, and that addresses past the table read as zero.
module tb_anfis_rom;
  import fp_pkg::*;
  import tb_fp_pkg::*;
  import tb_anfis_ref_pkg::*;

  logic        clk = 0;
  logic [4:0]  addr;
  logic [31:0] data;
  logic [31:0] expv [32];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  anfis_rom dut (.clk, .addr, .data);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tri_prm_t p1, p2;
    p1 = tri_prm(A1, B1, C1);
    p2 = tri_prm(A2, B2, C2);
    foreach (expv[i]) expv[i] = 32'd0;
    expv[0] = p1.a;  expv[1] = p1.b;  expv[2] = p1.c;  expv[3] = p1.ku;
    expv[4] = p1.ou; expv[5] = p1.kd; expv[6] = p1.od;
    expv[7] = p2.a;  expv[8] = p2.b;  expv[9] = p2.c;  expv[10] = p2.ku;
    expv[11] = p2.ou; expv[12] = p2.kd; expv[13] = p2.od;
    expv[14] = r2f(Q1); expv[15] = r2f(R1); expv[16] = r2f(Q2); expv[17] = r2f(R2);
    expv[18] = r2f(VSCALE);
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      addr = 5'(i);
      @(posedge clk);
      #1;
      checks++;
      if (data !== expv[i]) begin
        failures++;
        $display("FAIL word %0d = %h expected %h", i, data, expv[i]);
      end
    end
    // Latency: the word must not change before the clock edge.
    @(negedge clk);
    addr = 5'(R_Q1);
    #1;
    checks++;
    if (data !== expv[31]) begin
      failures++;
      $display("FAIL read is not registered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
