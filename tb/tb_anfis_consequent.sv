// tb_anfis_consequent -- checks f(x) = q*x + r for both trained consequents
// and random parameters, bit for bit against the reference.
module tb_anfis_consequent;
  import fp_pkg::*;
  import tb_fp_pkg::*;
  import tb_anfis_ref_pkg::*;

  logic [31:0] x, q, r, f;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  anfis_consequent dut (.x, .q, .r, .f);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6000; i++) begin
      unique case (i % 3)
        0: begin q = r2f(Q1); r = r2f(R1); end
        1: begin q = r2f(Q2); r = r2f(R2); end
        default: begin q = rand_fp(110, 140); r = rand_fp(110, 140); end
      endcase
      x = r2f(6.0 * real'($urandom % 100000) / 100000.0);
      #1;
      checks++;
      if (!same(f, ref_cons(q, r, x))) begin
        failures++;
        if (failures < 10) $display("FAIL %h*%h+%h = %h expected %h", q, x, r, f, ref_cons(q, r, x));
      end
    end
    // f1(2.0) = 4.5*2 - 0.03 = 8.97
    q = r2f(Q1); r = r2f(R1); x = 32'h4000_0000;
    #1;
    checks++;
    if (!same(f, r2f(8.97))) begin
      failures++;
      $display("FAIL f1(2) = %h", f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
