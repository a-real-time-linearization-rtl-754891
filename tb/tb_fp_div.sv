// tb_fp_div -- self-checking test of the bit-serial single-precision divider.
// Random quotients, reciprocals 1/S as the linearizer uses them, the special
// values, and the latency: 'done' must come exactly 27 clocks after the
// clock edge that takes 'start'.
module tb_fp_div;
  import fp_pkg::*;
  import tb_fp_pkg::*;

  localparam int LATENCY = 27;

  logic        clk = 0, rst_n = 0, start = 0, busy, done;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fp_div dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .y);

  task automatic run(logic [31:0] ea);
    int n = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    n = 1;
    while (!done) begin
      @(negedge clk);
      n++;
    end
    checks += 2;
    if (n - 1 != LATENCY) begin
      failures++;
      $display("FAIL latency %0d", n - 1);
    end
    if (!same(y, ea)) begin
      failures++;
      if (failures < 10) $display("FAIL %h / %h = %h expected %h", a, b, y, ea);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      if (i % 2 == 0) begin
        a = rand_fp(60, 190); b = rand_fp(60, 190);
      end else begin
        a = 32'h3F80_0000; b = rand_fp(118, 130); b[31] = 1'b0;
      end
      run(fdiv(a, b));
    end
    a = 32'h3F80_0000; b = 32'h4040_0000; run(32'h3EAA_AAAB);   // 1/3
    a = 32'h40C0_0000; b = 32'h4040_0000; run(32'h4000_0000);   // 6/3
    a = 32'h3F80_0000; b = 32'h0000_0000; run(32'h7F80_0000);
    a = 32'h0000_0000; b = 32'h0000_0000; run(32'h7FC0_0000);
    a = 32'h0000_0000; b = 32'h4040_0000; run(32'h0000_0000);
    a = 32'h7F00_0000; b = 32'h0080_0000; run(32'h7F80_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
