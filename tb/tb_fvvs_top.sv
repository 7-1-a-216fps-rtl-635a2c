// tb_fvvs_top: end-to-end test of the view synthesizer at its default (full 4096x2160) size.
//
// Two reference views live in a memory model on the view-synthesis bus; a second memory model
// sits on the decoder bus. Four phases of jobs are run, each job one virtual block:
//   A  general mode, DWRFS on: some blocks are fully covered by view 1 (second view skipped),
//      others leave holes that view 2 fills;
//   B  general mode, DWRFS off, a stretching homography and a scene with depth steps: cracks and
//      disocclusions go to the inpainting engine;
//   C  parallel mode: three views per source block through the disparity table;
//   D  full-utilization mode: nine views, written over the decoder bus.
// Patterns and scan orders are random. A sequential model (reorder, warp with depth select,
// DWRFS, inpainting, write-back with chroma of the first written pixel of each 2x2 group)
// predicts every written pixel, and the memory contents are compared with it at the end. Each
// mechanism must occur at least once: cache hits and misses, bus stalls, second-view loads and
// skips, each padding mode, parallel and full-utilization writes, the rotated scan order.
module tb_fvvs_top;
  import fvvs_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fvvs_mode_e mode; logic dwrfs_en; hset_t hset [2];
  logic signed [7:0] disp_off [2], disp_step [2];
  logic [31:0] src_base [2], dst_base [9];
  logic dt_we, cache_flush, job_valid, job_ready; logic [7:0] dt_addr, dt_data; job_t job;
  bus_req_t bus0_req, bus1_req; logic bus0_ready, bus1_ready; bus_rsp_t bus0_rsp, bus1_rsp;
  logic bus1_rvalid;
  assign bus1_rvalid = bus1_rsp.rvalid;
  logic busy;
  logic [31:0] blocks_done, view2_loads, view2_skips, cache_hits, cache_misses, rd_beats,
               wr_beats_bus0, wr_beats_bus1, n_gradient, n_foreground, n_raster;
  int checks = 0, failures = 0, cyc = 0;
  int t_ph [5];
  int disp [256];
  int n_transposed = 0, n_stall = 0, n_par_jobs = 0, n_full_jobs = 0;

  fvvs_top dut (.*);
  tb_dram #(.SRC_BASE0(64'h0), .SRC_BASE1(64'h0400_0000)) mem0 (.clk, .rst_n, .req(bus0_req), .ready(bus0_ready), .rsp(bus0_rsp));
  tb_dram #(.SRC_BASE0(64'h7000_0000), .SRC_BASE1(64'h7400_0000)) mem1 (.clk, .rst_n, .req(bus1_req), .ready(bus1_ready), .rsp(bus1_rsp));

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (bus0_req.valid && !bus0_ready) n_stall++;
  end

  // ---------------- reference model ----------------
  typedef struct { pix_t p; bit on_bus1; } exp_t;
  exp_t        ex_pix [longint];       // key: view, x, y
  logic [15:0] ex_chr [longint];       // key: view, x/2, y/2 group -> {V, U}
  bit          ex_chr_b1 [longint];

  function automatic longint pkey(int v, int x, int y);
    return (longint'(v) << 40) | (longint'(y) << 20) | longint'(x);
  endfunction

  function automatic int clampi(int a, int lo, int hi);
    return a < lo ? lo : a > hi ? hi : a;
  endfunction

  pix_t mb [3][64]; bit mv [3][64];

  task automatic model_warp(job_t j, bit ps, bit par, int g);
    bit lock [3][64];
    int ox, oy, r;
    r = ps;
    ox = ps ? int'(j.src2.x) : int'(j.src1.x);
    oy = ps ? int'(j.src2.y) : int'(j.src1.y);
    for (int b = 0; b < 3; b++)
      for (int p = 0; p < 64; p++) begin
        lock[b][p] = ps ? mv[b][p] : 0;
        if (!ps) mv[b][p] = 0;
      end
    for (int i = 0; i < 8; i++)
      for (int jj = 0; jj < 8; jj++) begin
        int xs, ys, xt, yt, wi, wj; bit ok; pix_t px;
        if (!j.transpose) begin xs = ox + i; ys = oy + jj + pat_off(j.pat, i); end
        else              begin xs = ox + jj + pat_off(j.pat, i); ys = oy + i; end
        px = mem_pix(r, clampi(xs, 0, 4095), clampi(ys, 0, 2159));
        for (int b = 0; b < 3; b++) begin
          if (par) begin
            int sc;
            sc = int'(disp_off[r]) + int'(disp_step[r]) * (3 * g + b + 1);
            xt = xs - sc * disp[px.d]; yt = ys; ok = xt >= 0 && xt < 4096;
          end else begin
            ok = warp_pos(hset[r], xs, ys, px.d, xt, yt) && b == 0 && xt < 4096 && yt < 2160;
          end
          if (!ok) continue;
          if (!j.transpose) begin wi = xt - int'(j.virt.x); wj = yt - int'(j.virt.y); end
          else              begin wi = yt - int'(j.virt.y); wj = xt - int'(j.virt.x); end
          if (wi < 0 || wi > 7) continue;
          wj = wj - pat_off(j.pat, wi);
          if (wj < 0 || wj > 7) continue;
          if (lock[b][wi*8+wj]) continue;
          if (!mv[b][wi*8+wj] || px.d > mb[b][wi*8+wj].d) begin
            mv[b][wi*8+wj] = 1; mb[b][wi*8+wj] = px;
          end
        end
      end
  endtask

  task automatic model_job(job_t j);
    int ng, nv; bit par, b1;
    ng = (mode == MODE_FULL) ? 3 : 1; nv = (mode == MODE_GENERAL) ? 1 : 3;
    par = (mode != MODE_GENERAL); b1 = (mode == MODE_FULL);
    for (int g = 0; g < ng; g++) begin
      bit holes;
      model_warp(j, 0, par, g);
      holes = 0;
      for (int b = 0; b < nv; b++) for (int p = 0; p < 64; p++) if (!mv[b][p]) holes = 1;
      if (dwrfs_en && holes) model_warp(j, 1, par, g);
      for (int b = 0; b < nv; b++) begin
        blk_t blk; logic [63:0] m; int cg, cf, cr, v;
        bit grp_done [longint];
        for (int p = 0; p < 64; p++) begin blk[p] = mb[b][p]; m[p] = mv[b][p]; end
        inpaint(blk, m, 16, cg, cf, cr);
        v = (mode == MODE_GENERAL) ? 0 : 3 * g + b;
        // write-back: luma/depth per pixel; chroma of a 2x2 group from the block's first pixel
        // in the order (0,0),(1,0),(0,1),(1,1)
        for (int i = 0; i < 8; i++)
          for (int jj = 0; jj < 8; jj++) begin
            int x, y;
            if (!j.transpose) begin x = int'(j.virt.x) + i; y = int'(j.virt.y) + jj + pat_off(j.pat, i); end
            else              begin x = int'(j.virt.x) + jj + pat_off(j.pat, i); y = int'(j.virt.y) + i; end
            ex_pix[pkey(v, x, y)] = '{blk[i*8+jj], b1};
          end
        for (int i = 0; i < 8; i++)
          for (int jj = 0; jj < 8; jj++) begin
            int x, y; longint gk;
            if (!j.transpose) begin x = int'(j.virt.x) + i; y = int'(j.virt.y) + jj + pat_off(j.pat, i); end
            else              begin x = int'(j.virt.x) + jj + pat_off(j.pat, i); y = int'(j.virt.y) + i; end
            gk = pkey(v, x / 2, y / 2);
            if (grp_done.exists(gk)) continue;
            grp_done[gk] = 1;
            for (int q = 0; q < 4; q++) begin
              int qx, qy; bit f;
              qx = x - x % 2 + q % 2; qy = y - y % 2 + q / 2; f = 0;
              for (int i2 = 0; i2 < 8 && !f; i2++)
                for (int j2 = 0; j2 < 8 && !f; j2++) begin
                  int bx, by;
                  if (!j.transpose) begin bx = int'(j.virt.x) + i2; by = int'(j.virt.y) + j2 + pat_off(j.pat, i2); end
                  else              begin bx = int'(j.virt.x) + j2 + pat_off(j.pat, i2); by = int'(j.virt.y) + i2; end
                  if (bx == qx && by == qy) begin ex_chr[gk] = {blk[i2*8+j2].v, blk[i2*8+j2].u}; ex_chr_b1[gk] = b1; f = 1; end
                end
              if (f) break;
            end
          end
      end
    end
  endtask

  // ---------------- stimulus ----------------
  task automatic run_job(int vx, int vy, int s1x, int s1y, int s2x, int s2y, bit rnd_geom);
    job_t j;
    j.virt.x = 13'(vx); j.virt.y = 13'(vy);
    j.src1.x = 13'(s1x); j.src1.y = 13'(s1y);
    j.src2.x = 13'(s2x); j.src2.y = 13'(s2y);
    j.pat = rnd_geom ? pattern_e'($urandom % 7) : PAT_0;
    j.transpose = rnd_geom ? 1'($urandom % 2) : 1'b0;
    if (j.transpose) begin   // keep the same geometry relation along the rotated scan
      j.src1.x = 13'(s1x); j.src2.x = 13'(s2x);
      n_transposed++;
    end
    if (mode == MODE_PARALLEL) n_par_jobs++;
    if (mode == MODE_FULL) n_full_jobs++;
    @(negedge clk);
    while (!job_ready) @(negedge clk);
    job_valid = 1; job = j;
    @(negedge clk); job_valid = 0;
    model_job(j);
    while (busy) @(negedge clk);
  endtask

  function automatic hset_t h_shift(int tx, int zinc, real sx);
    hset_t h;
    h = h_translate(tx, 0);
    for (int s = 0; s < 2; s++) begin
      h.base[s][0] = coef_t'($rtoi(sx * 65536.0));
      h.inc[s][2]  = coef_t'(zinc);
      // keep the second segment continuous: base1 = base0 + 128*inc0
      if (s == 1) h.base[1][2] = h.base[0][2] + coef_t'(128 * zinc);
    end
    return h;
  endfunction

  task automatic check_memory();
    foreach (ex_pix[k]) begin
      int v, x, y; longint a; logic [7:0] by, bd; int p;
      v = int'(k >> 40); y = int'((k >> 20) & 20'hFFFFF); x = int'(k & 20'hFFFFF);
      a = longint'(dst_base[v]) + (longint'(y / 2) * 1024 + x / 4) * 32;
      p = (y % 2) * 4 + x % 4;
      checks++;
      if (ex_pix[k].on_bus1) begin
        if (!mem1.byte_written(a + p)) begin failures++; if (failures < 20) $display("FAIL v%0d (%0d,%0d) not written on bus 1", v, x, y); continue; end
        by = mem1.get_byte(a + p); bd = mem1.get_byte(a + 8 + p);
      end else begin
        if (!mem0.byte_written(a + p)) begin failures++; if (failures < 20) $display("FAIL v%0d (%0d,%0d) not written", v, x, y); continue; end
        by = mem0.get_byte(a + p); bd = mem0.get_byte(a + 8 + p);
      end
      if (by != ex_pix[k].p.y || bd != ex_pix[k].p.d) begin
        failures++;
        if (failures < 20) $display("FAIL v%0d (%0d,%0d): Y %0d/%0d D %0d/%0d", v, x, y, by, ex_pix[k].p.y, bd, ex_pix[k].p.d);
      end
    end
    foreach (ex_chr[k]) begin
      int v, gx, gy; longint a; logic [7:0] u, vv; int kk;
      v = int'(k >> 40); gy = int'((k >> 20) & 20'hFFFFF); gx = int'(k & 20'hFFFFF);
      a = longint'(dst_base[v]) + (longint'(gy) * 1024 + (2 * gx) / 4) * 32;
      kk = gx % 2;
      u = ex_chr_b1[k] ? mem1.get_byte(a + 16 + kk) : mem0.get_byte(a + 16 + kk);
      vv = ex_chr_b1[k] ? mem1.get_byte(a + 18 + kk) : mem0.get_byte(a + 18 + kk);
      checks++;
      if ({vv, u} != ex_chr[k]) begin
        failures++; if (failures < 20) $display("FAIL chroma v%0d group (%0d,%0d)", v, gx, gy);
      end
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL %s never happened", what); end
  endtask

  initial begin
    mode = MODE_GENERAL; dwrfs_en = 1; job_valid = 0; job = '0; dt_we = 0; dt_addr = 0; dt_data = 0;
    cache_flush = 0;
    src_base[0] = 32'h0; src_base[1] = 32'h0400_0000;
    for (int v = 0; v < 9; v++) dst_base[v] = 32'h1000_0000 + 32'(v) * 32'h0400_0000;
    disp_off[0] = 0; disp_step[0] = 1; disp_off[1] = -4; disp_step[1] = 1;
    hset[0] = h_shift(0, 512, 1.0);   // view 1: x + 0.78..0.85 px from depth -> +1
    hset[1] = h_shift(-9, 512, 1.0);  // view 2: x - 8.2 -> -8
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      disp[a] = a / 50;
      dt_we = 1; dt_addr = 8'(a); dt_data = 8'(disp[a]);
    end
    @(negedge clk); dt_we = 0;

    // phase A: general mode, DWRFS on
    t_ph[0] = cyc;
    scene_sel = 0;
    for (int k = 0; k < 6; k++) begin
      int vx;
      vx = 256 + 8 * k;
      if (k % 2 == 0) run_job(vx, 128, vx - 1, 128, vx + 8, 128, k >= 2);   // covered by view 1
      else            run_job(vx, 128, vx + 2, 128, vx + 8, 128, k >= 2);   // holes -> view 2
    end
    // phase B: DWRFS off, stretching warp, depth steps
    t_ph[1] = cyc;
    dwrfs_en = 0; scene_sel = 1;
    hset[0] = h_shift(-400, 256, 1.25);
    for (int k = 0; k < 8; k++) begin
      int vx;
      vx = 1600 + 8 * k;
      run_job(vx, 300 + 2 * k, (vx + 400) * 4 / 5, 300 + 2 * k, 0, 0, 1);
    end
    // phase C: parallel mode, DWRFS on
    t_ph[2] = cyc;
    mode = MODE_PARALLEL; dwrfs_en = 1; scene_sel = 0;
    for (int k = 0; k < 4; k++) begin
      int vx;
      vx = 800 + 8 * k;
      run_job(vx, 640, vx + 4, 640, vx - 6, 640, k >= 2);
    end
    // phase D: full-utilization mode (nine views)
    t_ph[3] = cyc;
    mode = MODE_FULL; scene_sel = 1;
    for (int k = 0; k < 3; k++) begin
      int vx;
      vx = 2000 + 8 * k;
      run_job(vx, 1000, vx + 8, 1000, vx - 8, 1000, 1);
    end
    wait (!busy);
    t_ph[4] = cyc;
    repeat (60) @(negedge clk);

    check_memory();
    $display("mechanisms:");
    need("cache hits", cache_hits);
    need("cache misses", cache_misses);
    need("bus stalls", n_stall);
    need("second view loaded (DWRFS)", view2_loads);
    need("second view skipped (DWRFS)", view2_skips);
    need("gradient padding pixels", n_gradient);
    need("foreground padding pixels", n_foreground);
    need("raster-scan padding pixels", n_raster);
    need("parallel-mode jobs", n_par_jobs);
    need("full-utilization jobs", n_full_jobs);
    need("decoder-bus write beats", wr_beats_bus1);
    need("rotated scan-order jobs", n_transposed);
    checks++;
    if (int'(blocks_done) != 21) begin failures++; $display("FAIL blocks_done %0d", blocks_done); end
    $display("cycles per block: A %0d, B %0d, C %0d, D %0d", (t_ph[1] - t_ph[0]) / 6,
             (t_ph[2] - t_ph[1]) / 8, (t_ph[3] - t_ph[2]) / 4, (t_ph[4] - t_ph[3]) / 3);
    $display("blocks %0d, cycles %0d, pixels checked %0d", blocks_done, cyc, ex_pix.num());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
