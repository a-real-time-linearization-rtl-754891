// tb_anfis_tri -- checks the triangular membership function for both trained
// triangles over inputs on both feet, both branches and outside the support,
// bit for bit against the reference and within 1e-6 of the exact triangle.
// Every region must be visited.
module tb_anfis_tri;
  import fp_pkg::*;
  import tb_fp_pkg::*;
  import tb_anfis_ref_pkg::*;

  tri_prm_t p;
  logic [31:0] x, mu, e;
  int checks = 0, failures = 0;
  int hits [4];   // below a, rising, falling, above c
  logic clk = 0;
  always #5 clk = ~clk;

  anfis_tri dut (.x, .a(p.a), .b(p.b), .c(p.c), .ku(p.ku), .ou(p.ou),
                 .kd(p.kd), .od(p.od), .mu);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xr, ar, br, cr;
    foreach (hits[i]) hits[i] = 0;
    for (int t = 0; t < 2; t++) begin
      if (t == 0) begin p = tri_prm(A1, B1, C1); ar = A1; br = B1; cr = C1; end
      else        begin p = tri_prm(A2, B2, C2); ar = A2; br = B2; cr = C2; end
      for (int i = 0; i < 4000; i++) begin
        unique case (i)
          0: xr = ar;
          1: xr = br;
          2: xr = cr;
          default: xr = -5.0 + 13.0 * real'($urandom % 100000) / 100000.0;
        endcase
        x = r2f(xr);
        xr = f2r(x);
        #1;
        e = ref_tri(p, x);
        checks++;
        if (!same(mu, e)) begin
          failures++;
          if (failures < 10) $display("FAIL tri%0d(%h) = %h expected %h", t + 1, x, mu, e);
        end
        checks++;
        if ((f2r(mu) - tri_ideal(ar, br, cr, xr)) > 1e-6 ||
            (tri_ideal(ar, br, cr, xr) - f2r(mu)) > 1e-6) begin
          failures++;
          $display("FAIL tri%0d(%f) = %f off the exact triangle", t + 1, xr, f2r(mu));
        end
        if (xr <= f2r(p.a))      hits[0]++;
        else if (xr <= f2r(p.b)) hits[1]++;
        else if (xr < f2r(p.c))  hits[2]++;
        else                     hits[3]++;
      end
    end
    foreach (hits[i]) begin
      checks++;
      if (hits[i] == 0) begin
        failures++;
        $display("FAIL region %0d never visited", i);
      end
    end
    $display("regions: below=%0d rising=%0d falling=%0d above=%0d",
             hits[0], hits[1], hits[2], hits[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
