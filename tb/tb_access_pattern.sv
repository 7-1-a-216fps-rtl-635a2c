// tb_access_pattern: checks every pattern, both scan orders and all 64 block positions against
// the literal offset table of tb_ref_pkg, at random block origins.
module tb_access_pattern;
  import fvvs_pkg::*;
  import tb_ref_pkg::*;
  crd_t ox, oy, px, py; pattern_e pat; logic transpose; logic [2:0] i, j;
  int checks = 0, failures = 0;

  access_pattern dut (.ox, .oy, .pat, .transpose, .i, .j, .pos_x(px), .pos_y(py));

  initial begin
    for (int rep = 0; rep < 4; rep++)
      for (int p = 0; p < 7; p++)
        for (int t = 0; t < 2; t++)
          for (int n = 0; n < 64; n++) begin
            int ex, ey;
            ox = crd_t'($urandom % 4000); oy = crd_t'(16 + $urandom % 2000);
            pat = pattern_e'(p); transpose = t[0]; i = 3'(n / 8); j = 3'(n % 8);
            #1;
            if (t == 0) begin ex = int'(ox) + n / 8; ey = int'(oy) + n % 8 + pat_off(p, n / 8); end
            else        begin ex = int'(ox) + n % 8 + pat_off(p, n / 8); ey = int'(oy) + n / 8; end
            checks++;
            if (int'(px) != ex || int'(py) != ey) begin
              failures++;
              $display("FAIL pat %0d t %0d i %0d j %0d: (%0d,%0d) expected (%0d,%0d)", p, t, i, j, px, py, ex, ey);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
