// tb_warp_pe: self-checking test of the warping PE.
// Streams random pixels with random homography sets (mild perspective) back to back, and checks
// every result against a 64-bit integer model of H(Z) = base + inc*Z[6:0] (segment Z[7]),
// [x' y' w'] = H*[xs ys 1], round-half-up division, and the 6-cycle latency.
module tb_warp_pe;
  import fvvs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid; crd_t xs, ys; logic [7:0] z; logic [39:0] in_tag; hset_t hs;
  logic out_valid, out_ok; crd_t xv, yv; logic [39:0] out_tag;
  int checks = 0, failures = 0, cyc = 0;

  warp_pe dut (.*);

  typedef struct { longint ex, ey; bit ok; int t; } exp_t;
  exp_t q[$];

  always @(posedge clk) cyc <= cyc + 1;

  function automatic exp_t model(hset_t h, int x, int y, int zz, int t);
    exp_t e; longint c[8]; longint xp, yp, wp, nx, ny, d;
    for (int k = 0; k < 8; k++)
      c[k] = longint'(h.base[zz/128][k]) + longint'(h.inc[zz/128][k]) * longint'(zz % 128);
    xp = c[0]*x + c[1]*y + c[2];
    yp = c[3]*x + c[4]*y + c[5];
    wp = c[6]*x + c[7]*y + 65536;
    nx = 2*xp + wp; ny = 2*yp + wp; d = 2*wp;
    e.ok = (wp > 0) && (nx >= 0) && (ny >= 0);
    if (e.ok) begin
      e.ex = nx / d; e.ey = ny / d;
      if (e.ex > 8191 || e.ey > 8191) e.ok = 0;
    end
    e.t = t;
    return e;
  endfunction

  function automatic coef_t rnd(int lo, int hi);
    return coef_t'(lo + int'($urandom % (hi - lo + 1)));
  endfunction

  initial begin
    in_valid = 0; xs = 0; ys = 0; z = 0; in_tag = 0; hs = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      if (n % 50 == 0) begin
        for (int s = 0; s < 2; s++) begin
          hs.base[s][0] = 65536 + rnd(-6000, 6000);  hs.base[s][1] = rnd(-6000, 6000);
          hs.base[s][2] = rnd(-60, 60) * 65536 + rnd(0, 65535);
          hs.base[s][3] = rnd(-6000, 6000);          hs.base[s][4] = 65536 + rnd(-6000, 6000);
          hs.base[s][5] = rnd(-60, 60) * 65536 + rnd(0, 65535);
          hs.base[s][6] = rnd(-3, 3);                hs.base[s][7] = rnd(-3, 3);
          for (int k = 0; k < 8; k++) hs.inc[s][k] = rnd(-300, 300);
          hs.inc[s][6] = 0; hs.inc[s][7] = 0;
        end
        if (n == 350) hs.base[0][6] = -200000;   // forces w' <= 0: result must be flagged
      end
      in_valid = ($urandom % 8) != 0;
      xs = crd_t'($urandom % 4096); ys = crd_t'($urandom % 2160); z = 8'($urandom);
      if (n < 8) begin xs = 0; ys = 0; end
      in_tag = 40'(n);
      if (in_valid) q.push_back(model(hs, int'(xs), int'(ys), int'(z), cyc + LATCHK));
    end
    @(negedge clk); in_valid = 0;
    repeat (20) @(posedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("FAIL: %0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam int LATCHK = 6;

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    if (q.size() == 0) begin checks++; failures++; $display("FAIL: unexpected output"); end
    else begin
      e = q.pop_front();
      checks++;
      if (cyc != e.t) begin failures++; $display("FAIL latency: cycle %0d expected %0d", cyc, e.t); end
      checks++;
      if (out_ok != e.ok || (e.ok && (longint'(xv) != e.ex || longint'(yv) != e.ey))) begin
        failures++;
        $display("FAIL tag %0d: ok %0d/%0d x %0d/%0d y %0d/%0d", out_tag, out_ok, e.ok, xv, e.ex, yv, e.ey);
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
