// tb_inpaint_engine: random blocks with random hole patterns (sparse cracks, wide holes,
// depth edges, empty blocks) are filled by the engine and by the sequential model
// tb_ref_pkg::inpaint; every output pixel, the per-mode counters and the 24-cycle block time
// are compared, and each padding mode must have been used.
module tb_inpaint_engine;
  import fvvs_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done; pix_t blk_in [64], blk_out [64]; logic [63:0] mask_in;
  logic [31:0] n_gradient, n_foreground, n_raster;
  int checks = 0, failures = 0, cyc = 0;
  int tg = 0, tf = 0, tr = 0;

  inpaint_engine dut (.*);
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    start = 0; mask_in = 0;
    for (int n = 0; n < 64; n++) blk_in[n] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      blk_t ref_b;
      int cg, cf, cr, t0, kind;
      kind = t % 5;
      for (int n = 0; n < 64; n++) begin
        blk_in[n] = pix_t'($urandom);
        blk_in[n].d = (n / 8 < 3 + t % 3) ? 8'(180 + $urandom % 10) : 8'(50 + $urandom % 10);
        case (kind)
          0: mask_in[n] = ($urandom % 5) != 0;                 // cracks
          1: mask_in[n] = (($urandom % 2) != 0);               // many holes
          2: mask_in[n] = !(n / 8 >= 2 && n / 8 <= 5);          // wide disocclusion
          3: mask_in[n] = ($urandom % 6) == 0;                 // mostly empty
          default: mask_in[n] = (t % 10 == 4) ? 1'b0 : (($urandom % 3) != 0);
        endcase
      end
      for (int n = 0; n < 64; n++) ref_b[n] = blk_in[n];
      inpaint(ref_b, mask_in, 16, cg, cf, cr);
      for (int n = 0; n < 64; n++) if (!mask_in[n]) blk_in[n] = pix_t'($urandom);  // hole contents are don't-care
      @(negedge clk); start = 1; t0 = cyc;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (cyc - t0 != 25) begin failures++; $display("FAIL block time %0d", cyc - t0); end
      for (int n = 0; n < 64; n++) begin
        checks++;
        if (blk_out[n] !== ref_b[n]) begin
          failures++;
          if (failures < 10) $display("FAIL t %0d n %0d: %h vs %h", t, n, blk_out[n], ref_b[n]);
        end
      end
      tg += cg; tf += cf; tr += cr;
      checks++;
      if (int'(n_gradient) != tg || int'(n_foreground) != tf || int'(n_raster) != tr) begin
        failures++; $display("FAIL counters %0d %0d %0d vs %0d %0d %0d", n_gradient, n_foreground, n_raster, tg, tf, tr);
      end
    end
    $display("filled: gradient %0d foreground %0d raster %0d", tg, tf, tr);
    checks++;
    if (tg == 0 || tf == 0 || tr == 0) begin failures++; $display("FAIL a padding mode was never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
