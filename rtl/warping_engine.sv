// warping_engine: warps one reordered source block into up to three virtual block buffers.
//
// Eight warping PEs work side by side, one per pixel of a block column (scan line), so a block
// of 64 pixels enters in 8 cycles: the document's 8-pixel-per-cycle rate. Two warping modes:
//   * homographic (parallel = 0): each pixel goes through warp_pe with the view's matrix set
//     (6D: 3D translation and rotation); results go to virtual buffer 0.
//   * parallel disparity (parallel = 1, 3D-translation cases): the same source pixel is shifted
//     horizontally into three neighbouring virtual views at once, x_v = x_s - scale[b]*disp[Z],
//     where disp is a 256-entry table written by the host and scale[b] the signed distance of
//     virtual view b (the source pixels also pass the PE pipeline so both modes have one latency).
// A warped pixel is kept when it falls inside the slanted virtual block window (same access
// pattern as the source block, origin vox/voy). Depth select: when several pixels land on one
// position the one with the larger depth (closer to the camera) wins; on equal depth the pixel
// that came first wins. These rules, the table format and the window test are this design's.
//
// Reference view selection: pass 0 (main reference) clears the buffers first. Pass 1 (second
// reference view) may only write the positions that were still holes when it started, as the
// DWRFS scheme loads the second view only for the occlusion regions.
//
// Timing: start pulses with the block and its geometry; done is high 16 cycles after the start
// cycle (1 to take the job, 8 input cycles, 6 PE pipeline cycles, 1 to write the buffers), when
// vbuf/vmask hold the result (vmask bit p set where position p received a pixel).
module warping_engine
  import fvvs_pkg::*;
#(
  parameter int NPE     = BLK,          // 8 PEs, one per scan-line pixel
  parameter int NV      = N_PAR_VIEWS,  // 3 virtual block buffers
  parameter int FRAME_W = 4096,
  parameter int FRAME_H = 2160
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              pass,
  input  logic              parallel,
  input  pix_t              src_blk [BLK*BLK],
  input  crd_t              sox,
  input  crd_t              soy,
  input  crd_t              vox,
  input  crd_t              voy,
  input  pattern_e          pat,
  input  logic              transpose,
  input  hset_t             hs,
  input  logic signed [7:0] scale [NV],
  // disparity table write port
  input  logic              dt_we,
  input  logic [7:0]        dt_addr,
  input  logic [7:0]        dt_data,
  output logic              busy,
  output logic              done,
  output pix_t              vbuf  [NV][BLK*BLK],
  output logic [63:0]       vmask [NV]
);
  localparam int LAT   = 6;
  localparam int TAG_W = 32 + 2 * CRD_W;

  logic [7:0] disp_q [256];
  always_ff @(posedge clk) if (dt_we) disp_q[dt_addr] <= dt_data;

  logic [4:0]  cnt;
  logic        pass_q, par_q, tr_q;
  crd_t        sox_q, soy_q, vox_q, voy_q;
  pattern_e    pat_q;
  logic [63:0] lock_q [NV];

  // ---------------- feed: one block column per cycle ----------------
  logic             pe_in_valid;
  crd_t             pe_xs [NPE];
  crd_t             pe_ys [NPE];
  logic [7:0]       pe_z  [NPE];
  logic [TAG_W-1:0] pe_tag [NPE];

  always_comb begin
    pe_in_valid = busy && (cnt < 5'd8);
    for (int j = 0; j < NPE; j++) begin
      pix_t p;
      crd_t off;
      p   = src_blk[(int'(cnt[2:0]) * BLK + j)];
      off = crd_t'(pattern_offset(pat_q, int'(cnt[2:0])));
      if (!tr_q) begin
        pe_xs[j] = sox_q + crd_t'(cnt[2:0]);
        pe_ys[j] = soy_q + crd_t'(j) + off;
      end else begin
        pe_xs[j] = sox_q + crd_t'(j) + off;
        pe_ys[j] = soy_q + crd_t'(cnt[2:0]);
      end
      pe_z[j]   = p.d;
      pe_tag[j] = {p, pe_xs[j], pe_ys[j]};
    end
  end

  logic             pe_out_valid [NPE];
  logic             pe_ok [NPE];
  crd_t             pe_xv [NPE];
  crd_t             pe_yv [NPE];
  logic [TAG_W-1:0] pe_out_tag [NPE];

  for (genvar k = 0; k < NPE; k++) begin : g_pe
    warp_pe #(.TAG_W(TAG_W)) u_pe (
      .clk, .rst_n,
      .in_valid (pe_in_valid),
      .xs       (pe_xs[k]),
      .ys       (pe_ys[k]),
      .z        (pe_z[k]),
      .in_tag   (pe_tag[k]),
      .hs,
      .out_valid(pe_out_valid[k]),
      .out_ok   (pe_ok[k]),
      .xv       (pe_xv[k]),
      .yv       (pe_yv[k]),
      .out_tag  (pe_out_tag[k])
    );
  end

  // ---------------- target position of every PE result in every buffer ----------------
  logic       c_ok  [NV][NPE];
  logic [5:0] c_pos [NV][NPE];
  pix_t       c_pix [NPE];

  always_comb begin
    for (int k = 0; k < NPE; k++) begin
      crd_t xs_o, ys_o;
      {c_pix[k], xs_o, ys_o} = pe_out_tag[k];
      for (int b = 0; b < NV; b++) begin
        logic signed [CRD_W+9:0] xt, yt, wi, wj;
        logic ok;
        if (par_q) begin
          xt = (CRD_W+10)'(xs_o) - (CRD_W+10)'(scale[b]) * (CRD_W+10)'({1'b0, disp_q[c_pix[k].d]});
          yt = (CRD_W+10)'(ys_o);
          ok = pe_out_valid[k] && xt >= 0 && xt < (CRD_W+10)'(FRAME_W);
        end else begin
          xt = (CRD_W+10)'(pe_xv[k]);
          yt = (CRD_W+10)'(pe_yv[k]);
          ok = pe_out_valid[k] && pe_ok[k] && (b == 0) && xt < (CRD_W+10)'(FRAME_W) && yt < (CRD_W+10)'(FRAME_H);
        end
        if (!tr_q) begin
          wi = xt - (CRD_W+10)'(vox_q);
          wj = yt - (CRD_W+10)'(voy_q);
        end else begin
          wi = yt - (CRD_W+10)'(voy_q);
          wj = xt - (CRD_W+10)'(vox_q);
        end
        if (wi >= 0 && wi < (CRD_W+10)'(BLK))
          wj = wj - (CRD_W+10)'(pattern_offset(pat_q, int'(wi[2:0])));
        c_ok[b][k]  = ok && wi >= 0 && wi < (CRD_W+10)'(BLK) && wj >= 0 && wj < (CRD_W+10)'(BLK);
        c_pos[b][k] = {wi[2:0], wj[2:0]};
      end
    end
  end

  // ---------------- depth select ----------------
  logic       w_en  [NV][BLK*BLK];
  pix_t       w_pix [NV][BLK*BLK];

  always_comb begin
    for (int b = 0; b < NV; b++) begin
      for (int p = 0; p < BLK*BLK; p++) begin
        logic found;
        found = 1'b0;
        w_pix[b][p] = '0;
        for (int k = 0; k < NPE; k++) begin
          if (c_ok[b][k] && c_pos[b][k] == 6'(p) && (!found || c_pix[k].d > w_pix[b][p].d)) begin
            found       = 1'b1;
            w_pix[b][p] = c_pix[k];
          end
        end
        w_en[b][p] = found && !(pass_q && lock_q[b][p]) &&
                     (!vmask[b][p] || w_pix[b][p].d > vbuf[b][p].d);
      end
    end
  end

  // ---------------- control and buffers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      cnt    <= '0;
      pass_q <= 1'b0;
      par_q  <= 1'b0;
      tr_q   <= 1'b0;
      sox_q  <= '0;
      soy_q  <= '0;
      vox_q  <= '0;
      voy_q  <= '0;
      pat_q  <= PAT_0;
      for (int b = 0; b < NV; b++) begin
        vmask[b]  <= '0;
        lock_q[b] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        cnt    <= '0;
        pass_q <= pass;
        par_q  <= parallel;
        tr_q   <= transpose;
        sox_q  <= sox;
        soy_q  <= soy;
        vox_q  <= vox;
        voy_q  <= voy;
        pat_q  <= pat;
        for (int b = 0; b < NV; b++) begin
          lock_q[b] <= pass ? vmask[b] : '0;
          if (!pass) vmask[b] <= '0;
        end
      end else if (busy) begin
        cnt <= cnt + 5'd1;
        if (cnt == 5'(8 + LAT)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        for (int b = 0; b < NV; b++)
          for (int p = 0; p < BLK*BLK; p++)
            if (w_en[b][p]) vmask[b][p] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int b = 0; b < NV; b++)
      for (int p = 0; p < BLK*BLK; p++)
        if (busy && w_en[b][p]) vbuf[b][p] <= w_pix[b][p];
  end
endmodule
