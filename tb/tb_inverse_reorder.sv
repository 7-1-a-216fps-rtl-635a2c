// tb_inverse_reorder: random slanted blocks (all patterns, both scan orders, any alignment) are
// written back; the unit writes are collected into a sparse frame and checked: every block pixel
// lands at its frame position exactly once, no other pixel is masked, each unit lies in the
// block's unit range, and the chroma of a unit comes from the first masked pixel of its group.
module tb_inverse_reorder;
  import fvvs_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, transpose, busy, done, uw_valid, uw_ready;
  pix_t blk [64]; crd_t vox, voy; pattern_e pat; logic [3:0] view, uw_view;
  logic [9:0] uw_ux; logic [10:0] uw_uy; unit_t uw_data; logic [7:0] uw_mask;
  int checks = 0, failures = 0, units = 0;

  inverse_reorder dut (.*);

  pix_t fr [longint];
  int   cnt [longint];

  function automatic longint key(int x, int y);
    return longint'(y) * 10000 + x;
  endfunction

  always @(posedge clk) begin
    uw_ready <= ($urandom % 4) != 0;
    if (rst_n && uw_valid && uw_ready) begin
      units++;
      checks++;
      if (uw_view != view) begin failures++; $display("FAIL view"); end
      for (int p = 0; p < 8; p++) if (uw_mask[p]) begin
        int x, y; pix_t q;
        x = 4 * int'(uw_ux) + p % 4; y = 2 * int'(uw_uy) + p / 4;
        q.y = uw_data.y[8*p +: 8]; q.d = uw_data.d[8*p +: 8];
        q.u = uw_data.u[8*((p % 4) / 2) +: 8]; q.v = uw_data.v[8*((p % 4) / 2) +: 8];
        fr[key(x, y)] = q;
        cnt[key(x, y)] = cnt.exists(key(x, y)) ? cnt[key(x, y)] + 1 : 1;
      end
    end
  end

  initial begin
    start = 0; vox = 0; voy = 0; pat = PAT_0; transpose = 0; view = 0; uw_ready = 0;
    for (int n = 0; n < 64; n++) blk[n] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      fr.delete(); cnt.delete();
      for (int n = 0; n < 64; n++) blk[n] = pix_t'($urandom);
      pat = pattern_e'($urandom % 7); transpose = $urandom % 2; view = 4'($urandom % 9);
      vox = crd_t'(16 + $urandom % 4000); voy = crd_t'(16 + $urandom % 2100);
      if (t % 2 == 0) begin vox = vox & ~crd_t'(7); voy = voy & ~crd_t'(7); end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      checks++;
      if (cnt.num() != 64) begin failures++; $display("FAIL t %0d: %0d pixels written", t, cnt.num()); end
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          int x, y;
          pix_t e, g;
          if (!transpose) begin x = int'(vox) + i; y = int'(voy) + j + pat_off(pat, i); end
          else            begin x = int'(vox) + j + pat_off(pat, i); y = int'(voy) + i; end
          checks++;
          if (!cnt.exists(key(x, y)) || cnt[key(x, y)] != 1) begin
            failures++; if (failures < 10) $display("FAIL t %0d pixel (%0d,%0d) not written once", t, x, y);
          end else begin
            g = fr[key(x, y)]; e = blk[i*8+j];
            checks++;
            if (g.y != e.y || g.d != e.d) begin failures++; if (failures < 10) $display("FAIL t %0d luma/depth (%0d,%0d)", t, x, y); end
          end
        end
      // chroma: first masked pixel of each 2x2 group in the order (2k,0),(2k+1,0),(2k,1),(2k+1,1)
      foreach (fr[k]) begin
        int x, y, gx, gy; pix_t src; bit found;
        x = int'(k % 10000); y = int'(k / 10000);
        gx = x - x % 2; gy = y - y % 2; found = 0;
        for (int q = 0; q < 4 && !found; q++) begin
          int qx, qy;
          qx = gx + q % 2; qy = gy + q / 2;
          for (int i = 0; i < 8 && !found; i++)
            for (int j = 0; j < 8 && !found; j++) begin
              int bx, by;
              if (!transpose) begin bx = int'(vox) + i; by = int'(voy) + j + pat_off(pat, i); end
              else            begin bx = int'(vox) + j + pat_off(pat, i); by = int'(voy) + i; end
              if (bx == qx && by == qy) begin src = blk[i*8+j]; found = 1; end
            end
        end
        checks++;
        if (!found || fr[k].u != src.u || fr[k].v != src.v) begin
          failures++; if (failures < 10) $display("FAIL t %0d chroma (%0d,%0d)", t, x, y);
        end
      end
    end
    $display("%0d unit writes", units);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
