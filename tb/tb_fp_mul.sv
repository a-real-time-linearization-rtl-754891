// tb_fp_mul -- self-checking test of the single-precision multiplier.
// Random operands, products that are exact rounding ties, products near overflow and underflow, exact ties and the
// special values; results are compared bit for bit with a correctly rounded
// reference.
module tb_fp_mul;
  import fp_pkg::*;
  import tb_fp_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  fp_mul dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] ea);
    #1;
    checks++;
    if (!same(y, ea)) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h expected %h", a, b, y, ea);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      if (i % 5 == 4) begin
        a = rand_fp(100, 154); b = 32'h3FC0_0000;     // x * 1.5: exact ties
      end else if (i % 3 == 0) begin
        a = rand_fp(1, 254); b = rand_fp(1, 254);
      end else begin
        a = rand_fp(100, 154); b = rand_fp(100, 154);
      end
      check(fmul(a, b));
    end
    a = 32'h4040_0000; b = 32'h3F00_0000; check(32'h3FC0_0000);   // 3 * 0.5
    a = 32'hC090_0000; b = 32'h4000_0000; check(32'hC110_0000);   // -4.5 * 2
    a = 32'h0000_0000; b = 32'h4000_0000; check(32'h0000_0000);
    a = 32'h7F80_0000; b = 32'hC000_0000; check(32'hFF80_0000);
    a = 32'h7F80_0000; b = 32'h0000_0000; check(32'h7FC0_0000);
    a = 32'h7F00_0000; b = 32'h7F00_0000; check(32'h7F80_0000);
    a = 32'h0100_0000; b = 32'h0100_0000; check(32'h0000_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
