// tb_fp_addsub -- self-checking test of the single-precision adder/subtractor.
// Random operands over a wide exponent range, operands with equal or nearly
// equal exponents (cancellation), exact cancellation, zeros, infinities and
// NaN; every result is compared bit for bit with a correctly rounded
// reference.
module tb_fp_addsub;
  import fp_pkg::*;
  import tb_fp_pkg::*;

  logic [31:0] a, b, y, exp_y;
  logic        sub;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  fp_addsub dut (.a(a), .b(b), .sub(sub), .y(y));

  task automatic check(logic [31:0] ea);
    #1;
    checks++;
    if (!same(y, ea)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h %s %h = %h expected %h", a, sub ? "-" : "+", b, y, ea);
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
      a = rand_fp(90, 160);
      unique case (i % 4)
        0: b = rand_fp(90, 160);
        1: b = rand_fp(int'(a[30:23]) - 2, int'(a[30:23]) + 2);
        2: begin b = a ^ 32'(($urandom % 64)); b[31] = 1'($urandom); end
        default: b = rand_fp(int'(a[30:23]) - 30, int'(a[30:23]));
      endcase
      sub = 1'($urandom);
      check(sub ? fsub(a, b) : fadd(a, b));
    end
    // Directed cases.
    a = 32'h3F80_0000; b = 32'h3F80_0000; sub = 1; check(32'h0000_0000);
    a = 32'h4000_0000; b = 32'hBF80_0000; sub = 0; check(32'h3F80_0000);
    a = 32'h3F80_0000; b = 32'h3380_0000; sub = 0; check(32'h3F80_0000); // tie, even
    a = 32'h3F80_0001; b = 32'h3380_0000; sub = 0; check(32'h3F80_0002); // tie, odd
    a = 32'h0000_0000; b = 32'hC0A0_0000; sub = 0; check(32'hC0A0_0000);
    a = 32'h7F80_0000; b = 32'h3F80_0000; sub = 1; check(32'h7F80_0000);
    a = 32'h7F80_0000; b = 32'h7F80_0000; sub = 1; check(32'h7FC0_0000);
    a = 32'h7F7F_FFFF; b = 32'h7F7F_FFFF; sub = 0; check(32'h7F80_0000);
    a = 32'h7FC0_0000; b = 32'h3F80_0000; sub = 0; check(32'h7FC0_0000);
    a = 32'h0080_0001; b = 32'h0080_0000; sub = 1; check(32'h0000_0000); // underflow flushes
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
