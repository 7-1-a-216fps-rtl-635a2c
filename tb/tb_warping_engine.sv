// tb_warping_engine: random source blocks warped with random homographies (scaling between 0.5
// and 1.5, so pixels collide and depth select matters) and in parallel-disparity mode, each
// followed by a second-view pass that may only fill holes. The result buffers and masks are
// compared with a sequential model (tb_ref_pkg::warp_pos, larger depth wins, first pixel wins a
// tie), and the block time is checked: 8 cycles of input plus the PE pipeline.
module tb_warping_engine;
  import fvvs_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, pass, parallel, transpose, busy, done;
  pix_t src_blk [64];
  crd_t sox, soy, vox, voy; pattern_e pat; hset_t hs;
  logic signed [7:0] scale [3];
  logic dt_we; logic [7:0] dt_addr, dt_data;
  pix_t vbuf [3][64]; logic [63:0] vmask [3];
  int checks = 0, failures = 0, cyc = 0;
  int disp[256];
  int n_collide = 0, n_locked = 0;

  warping_engine dut (.*);
  always @(posedge clk) cyc <= cyc + 1;

  pix_t mb [3][64]; bit mv [3][64]; bit lock [3][64];

  task automatic model_pass(bit ps, bit par);
    for (int b = 0; b < 3; b++)
      for (int p = 0; p < 64; p++) begin
        lock[b][p] = ps ? mv[b][p] : 0;
        if (!ps) mv[b][p] = 0;
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        int xs, ys, xt, yt, wi, wj; bit ok; pix_t px;
        px = src_blk[i*8+j];
        if (!transpose) begin xs = int'(sox) + i; ys = int'(soy) + j + pat_off(pat, i); end
        else            begin xs = int'(sox) + j + pat_off(pat, i); ys = int'(soy) + i; end
        for (int b = 0; b < 3; b++) begin
          if (par) begin
            xt = xs - int'(scale[b]) * disp[px.d]; yt = ys; ok = xt >= 0 && xt < 4096;
          end else begin
            ok = warp_pos(hs, xs, ys, px.d, xt, yt) && b == 0 && xt < 4096 && yt < 2160;
          end
          if (!ok) continue;
          if (!transpose) begin wi = xt - int'(vox); wj = yt - int'(voy); end
          else            begin wi = yt - int'(voy); wj = xt - int'(vox); end
          if (wi < 0 || wi > 7) continue;
          wj = wj - pat_off(pat, wi);
          if (wj < 0 || wj > 7) continue;
          if (lock[b][wi*8+wj]) begin n_locked++; continue; end
          if (mv[b][wi*8+wj]) n_collide++;
          if (!mv[b][wi*8+wj] || px.d > mb[b][wi*8+wj].d) begin
            mv[b][wi*8+wj] = 1; mb[b][wi*8+wj] = px;
          end
        end
      end
  endtask

  task automatic run(bit ps, bit par);
    int t0;
    for (int n = 0; n < 64; n++) begin
      src_blk[n] = pix_t'($urandom);
      if ($urandom % 2) src_blk[n].d = 8'(100 + $urandom % 4);
    end
    pass = ps; parallel = par;
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cyc - t0 != 16) begin failures++; $display("FAIL block time %0d", cyc - t0); end
    model_pass(ps, par);
    for (int b = 0; b < 3; b++)
      for (int p = 0; p < 64; p++) begin
        checks++;
        if (vmask[b][p] != mv[b][p] || (mv[b][p] && vbuf[b][p] !== mb[b][p])) begin
          failures++;
          if (failures < 10) $display("FAIL buf %0d pos %0d: %0d %h vs %0d %h", b, p, vmask[b][p], vbuf[b][p], mv[b][p], mb[b][p]);
        end
      end
  endtask

  function automatic coef_t rnd(int lo, int hi);
    return coef_t'(lo + int'($urandom % (hi - lo + 1)));
  endfunction

  initial begin
    start = 0; pass = 0; parallel = 0; dt_we = 0; dt_addr = 0; dt_data = 0;
    sox = 0; soy = 0; vox = 0; voy = 0; pat = PAT_0; transpose = 0; hs = '0;
    for (int b = 0; b < 3; b++) scale[b] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      disp[a] = a / 64;
      dt_we = 1; dt_addr = 8'(a); dt_data = 8'(disp[a]);
    end
    @(negedge clk); dt_we = 0;
    for (int t = 0; t < 60; t++) begin
      int tx, ty;
      bit par;
      par = (t % 3 == 2);
      pat = pattern_e'($urandom % 7); transpose = $urandom % 2;
      sox = crd_t'(200 + $urandom % 3000); soy = crd_t'(200 + $urandom % 1500);
      tx = int'($urandom % 7) - 3; ty = int'($urandom % 5) - 2;
      vox = sox + crd_t'(tx); voy = soy + crd_t'(ty);
      for (int s = 0; s < 2; s++) begin
        hs.base[s][0] = rnd(32768, 98304); hs.base[s][1] = rnd(-3000, 3000);
        hs.base[s][2] = coef_t'(-(int'(sox) * (int'(hs.base[s][0]) - 65536)) / 65536 * 65536) + rnd(-200000, 200000);
        hs.base[s][3] = rnd(-3000, 3000); hs.base[s][4] = rnd(32768, 98304);
        hs.base[s][5] = coef_t'(-(int'(soy) * (int'(hs.base[s][4]) - 65536)) / 65536 * 65536) + rnd(-200000, 200000);
        hs.base[s][6] = 0; hs.base[s][7] = 0;
        for (int k = 0; k < 8; k++) hs.inc[s][k] = (k < 6) ? rnd(-100, 100) : 0;
      end
      for (int b = 0; b < 3; b++) scale[b] = 8'(int'($urandom % 5) - 2);
      run(0, par);
      tx = int'($urandom % 7) - 3;
      sox = sox + crd_t'(tx);
      run(1, par);
    end
    $display("collisions %0d, locked %0d", n_collide, n_locked);
    checks++;
    if (n_collide == 0 || n_locked == 0) begin failures++; $display("FAIL depth select or hole lock never exercised"); end
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
