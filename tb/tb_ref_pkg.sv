// tb_ref_pkg: reference models for the testbenches, written as plain sequential code
// independently of the RTL structure.
//   scene_pix   deterministic test texture and depth of reference view v at (x,y)
//   unit_word   the same scene as 64-bit memory beats of a 4x2 unit
//   pat_off     column offsets of the seven access patterns, as a literal table
//   warp_pos    homography with linearly interpolated matrix, round half up (64-bit integers)
//   inpaint     the single-pass three-mode hole filling, pixel by pixel
package tb_ref_pkg;
  import fvvs_pkg::*;

  int scene_sel = 0;   // 0: smooth texture; 1: depth steps that create occlusions

  const int PAT_TAB [7][8] = '{
    '{0, 0, 0, 0, 0, 0, 0, 0},
    '{0, 0, 0, 0, -1, -1, -1, -1},
    '{0, 0, 0, 0, 1, 1, 1, 1},
    '{0, 0, -1, -1, -2, -2, -3, -3},
    '{0, 0, 1, 1, 2, 2, 3, 3},
    '{0, -1, -2, -3, -4, -5, -6, -7},
    '{0, 1, 2, 3, 4, 5, 6, 7}
  };

  function automatic int pat_off(int p, int i);
    return PAT_TAB[p][i];
  endfunction

  function automatic pix_t scene_pix(int v, int x, int y);
    pix_t p;
    p.y = 8'(x * 3 + y * 5 + v * 101);
    p.u = 8'((x / 2) * 7 + (y / 2) * 11 + v * 50);
    p.v = 8'((x / 2) * 13 + (y / 2) * 5 + v * 29);
    if (scene_sel == 0) p.d = 8'(100 + ((x / 8) % 4) * 3);
    else                p.d = ((x / 5 + y / 7 + v) % 3 == 0) ? 8'd200 : 8'(40 + (x % 16));
    return p;
  endfunction

  function automatic logic [63:0] unit_word(int v, int ux, int uy, int beat);
    logic [63:0] w;
    w = '0;
    for (int p = 0; p < 8; p++) begin
      pix_t q;
      q = scene_pix(v, 4 * ux + p % 4, 2 * uy + p / 4);
      if (beat == 0) w[8*p +: 8] = q.y;
      if (beat == 1) w[8*p +: 8] = q.d;
    end
    if (beat == 2) begin
      w[7:0]   = scene_pix(v, 4 * ux,     2 * uy).u;
      w[15:8]  = scene_pix(v, 4 * ux + 2, 2 * uy).u;
      w[23:16] = scene_pix(v, 4 * ux,     2 * uy).v;
      w[31:24] = scene_pix(v, 4 * ux + 2, 2 * uy).v;
    end
    return w;
  endfunction

  // pixel as the cache delivers it: luma/depth of (x,y), chroma of its 2x2 group's left sample
  function automatic pix_t mem_pix(int v, int x, int y);
    pix_t p;
    p   = scene_pix(v, x, y);
    p.u = scene_pix(v, x - x % 2, y - y % 2).u;
    p.v = scene_pix(v, x - x % 2, y - y % 2).v;
    return p;
  endfunction

  function automatic bit warp_pos(hset_t h, int x, int y, int z, output int ox, output int oy);
    longint c[8]; longint xp, yp, wp, nx, ny, d;
    for (int k = 0; k < 8; k++)
      c[k] = longint'(h.base[z / 128][k]) + longint'(h.inc[z / 128][k]) * longint'(z % 128);
    xp = c[0] * x + c[1] * y + c[2];
    yp = c[3] * x + c[4] * y + c[5];
    wp = c[6] * x + c[7] * y + 65536;
    nx = 2 * xp + wp; ny = 2 * yp + wp; d = 2 * wp;
    ox = 0; oy = 0;
    if (!(wp > 0 && nx >= 0 && ny >= 0)) return 0;
    if (nx / d > 8191 || ny / d > 8191) return 0;
    ox = int'(nx / d); oy = int'(ny / d);
    return 1;
  endfunction

  function automatic hset_t h_translate(int tx, int ty);
    hset_t h;
    h = '0;
    for (int s = 0; s < 2; s++) begin
      h.base[s][0] = 65536; h.base[s][4] = 65536;
      h.base[s][2] = coef_t'(tx * 65536); h.base[s][5] = coef_t'(ty * 65536);
    end
    return h;
  endfunction

  typedef pix_t blk_t [64];

  function automatic pix_t lerp(pix_t a, pix_t b, int da, int db);
    pix_t r;
    r.y = 8'((int'(a.y) * db + int'(b.y) * da) / (da + db));
    r.u = 8'((int'(a.u) * db + int'(b.u) * da) / (da + db));
    r.v = 8'((int'(a.v) * db + int'(b.v) * da) / (da + db));
    r.d = 8'((int'(a.d) * db + int'(b.d) * da) / (da + db));
    return r;
  endfunction

  // inpainting reference; index n = 8*i + j (column i, row j); counts: filled pixels per mode
  function automatic void inpaint(ref blk_t b, input logic [63:0] mask, input int th,
                                  output int c_grad, output int c_fg, output int c_ras);
    bit m[64]; bit m0[64]; pix_t bg; bit have_bg;
    c_grad = 0; c_fg = 0; c_ras = 0; have_bg = 0; bg = '0;
    for (int n = 0; n < 64; n++) begin
      m[n] = mask[n]; m0[n] = mask[n];
      if (m0[n] && (!have_bg || b[n].d < bg.d)) begin bg = b[n]; have_bg = 1; end
    end
    // gradient padding, per row
    for (int j = 0; j < 8; j++)
      for (int i = 0; i < 8; i++) if (!m0[i*8+j]) begin
        int l, r;
        l = -1; r = -1;
        for (int s = 1; s <= 3 && l < 0; s++) if (i - s >= 0 && m0[(i-s)*8+j]) l = i - s;
        for (int s = 1; s <= 3 && r < 0; s++) if (i + s < 8 && m0[(i+s)*8+j]) r = i + s;
        if (l >= 0 && r >= 0) begin
          int dd;
          dd = int'(b[l*8+j].d) - int'(b[r*8+j].d);
          if (dd <= th && dd >= -th) begin
            b[i*8+j] = lerp(b[l*8+j], b[r*8+j], i - l, r - i);
            m[i*8+j] = 1; c_grad++;
          end
        end
      end
    // foreground padding, per column, looking at the state after the row pass
    for (int i = 0; i < 8; i++) begin
      bit mc[8];
      for (int j = 0; j < 8; j++) mc[j] = m[i*8+j];
      for (int j = 0; j < 8; j++) if (!mc[j]) begin
        int u, d;
        u = -1; d = -1;
        for (int s = 1; s <= 3 && u < 0; s++) if (j - s >= 0 && mc[j-s]) u = j - s;
        for (int s = 1; s <= 3 && d < 0; s++) if (j + s < 8 && mc[j+s]) d = j + s;
        if (u >= 0 || d >= 0) begin
          if (u < 0) b[i*8+j] = b[i*8+d];
          else if (d < 0) b[i*8+j] = b[i*8+u];
          else if (b[i*8+d].d > b[i*8+u].d) b[i*8+j] = b[i*8+d];
          else b[i*8+j] = b[i*8+u];
          m[i*8+j] = 1; c_fg++;
        end
      end
    end
    // depth-based raster scan
    for (int j = 0; j < 8; j++)
      for (int i = 0; i < 8; i++) if (!m[i*8+j]) begin
        if (i == 0 && j == 0) b[0] = bg;
        else if (i == 0) b[j] = b[j-1];
        else if (j == 0) b[i*8] = b[(i-1)*8];
        else if (b[i*8+j-1].d < b[(i-1)*8+j].d) b[i*8+j] = b[i*8+j-1];
        else b[i*8+j] = b[(i-1)*8+j];
        m[i*8+j] = 1; c_ras++;
      end
  endfunction
endpackage
