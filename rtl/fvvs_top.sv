// fvvs_top: free-viewpoint view synthesizer of a 3DTV set-top box.
//
// Generates virtual views of a scene from two decoded reference views (texture plus depth) in
// external memory, block by block along epipolar lines:
//   texture_reorder_cache + texture_reorder  slanted source block -> regular 8x8 block
//   warping_engine (8 x warp_pe)             homographic or parallel-disparity warping with
//                                            depth select into up to 3 virtual block buffers
//   fvvs_ctrl                                stage sequencing and DWRFS (second reference view
//                                            read only for the holes of the main one)
//   inpaint_engine                           single-pass, 24-cycle hole filling
//   inverse_reorder                          8x8 block -> 4x2-pixel unit writes
//   bus_if                                   dual 64-bit bus interface (view-synthesis bus and
//                                            decoder bus)
// The H.264/MVC decoder that produces the reference views shares the two buses on the chip and
// is outside this module; both buses are brought out as ports.
//
// Host interface: mode and matrices are static while jobs run. hset[r] is the linear-interpolation
// matrix set of reference view r; the disparity table is written through dt_*; src_base/dst_base
// place the views in memory. Each job names the source blocks of both reference views and the
// virtual block to produce; the host derives them from the camera geometry. Status counters show
// the work done (blocks, second-view loads and skips, cache hits and misses, bus beats, pixels
// filled per inpainting mode).
//
// Timing: job_ready is high while idle; a job then runs the stages one after another (reorder,
// warp, optionally reorder and warp of the second view, inpaint and write-back for each virtual
// view) and busy falls when its last unit write has been accepted on the bus. The stage list,
// the 8-wide warping array, the three-matrix interpolation, the 16-line cache, the 16x24 write-back
// buffer, the three and nine view modes and the use of the decoder bus follow the document. Running
// the stages one block at a time instead of as a block pipeline, the job interface, the memory
// map and the bus handshake are this design's own choices.
module fvvs_top
  import fvvs_pkg::*;
#(
  parameter int FRAME_W     = 4096,
  parameter int FRAME_H     = 2160,
  parameter int CACHE_LINES = 16,
  parameter int IRB_W       = 16,
  parameter int IRB_H       = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  fvvs_mode_e        mode,
  input  logic              dwrfs_en,
  input  hset_t             hset [2],
  input  logic signed [7:0] disp_off  [2],
  input  logic signed [7:0] disp_step [2],
  input  logic [31:0]       src_base [2],
  input  logic [31:0]       dst_base [N_DST_VIEWS],
  input  logic              dt_we,
  input  logic [7:0]        dt_addr,
  input  logic [7:0]        dt_data,
  input  logic              cache_flush,
  // jobs
  input  logic              job_valid,
  output logic              job_ready,
  input  job_t              job,
  // buses
  output bus_req_t          bus0_req,
  input  logic              bus0_ready,
  input  bus_rsp_t          bus0_rsp,
  output bus_req_t          bus1_req,
  input  logic              bus1_ready,
  input  logic              bus1_rvalid,  // bus 1 carries writes only
  // status
  output logic              busy,
  output logic [31:0]       blocks_done,
  output logic [31:0]       view2_loads,
  output logic [31:0]       view2_skips,
  output logic [31:0]       cache_hits,
  output logic [31:0]       cache_misses,
  output logic [31:0]       rd_beats,
  output logic [31:0]       wr_beats_bus0,
  output logic [31:0]       wr_beats_bus1,
  output logic [31:0]       n_gradient,
  output logic [31:0]       n_foreground,
  output logic [31:0]       n_raster
);
  localparam int UX_W = $clog2(FRAME_W / 4);
  localparam int UY_W = $clog2(FRAME_H / 2);

  job_t cur_job;

  // ---------------- controller ----------------
  logic              tr_start, tr_view, tr_done, tr_busy;
  logic              we_start, we_pass, we_parallel, we_done, we_busy;
  logic signed [7:0] we_scale [N_PAR_VIEWS];
  logic              ip_start, ip_done, ip_busy;
  logic [1:0]        ip_sel;
  logic              ir_start, ir_done, ir_busy;
  logic [3:0]        ir_view;
  pix_t              vbuf  [N_PAR_VIEWS][BLK*BLK];
  logic [63:0]       vmask [N_PAR_VIEWS];

  fvvs_ctrl u_ctrl (
    .clk, .rst_n, .mode, .dwrfs_en, .disp_off, .disp_step,
    .job_valid, .job_ready, .job, .cur_job,
    .tr_start, .tr_view, .tr_done,
    .we_start, .we_pass, .we_parallel, .we_scale, .we_done, .vmask,
    .ip_start, .ip_sel, .ip_done,
    .ir_start, .ir_view, .ir_done,
    .busy, .blocks_done, .view2_loads, .view2_skips
  );

  // ---------------- texture reorder ----------------
  logic            c_req_valid, c_req_ready, c_req_view, c_rsp_valid;
  logic [UX_W+1:0] c_req_x;
  logic [UY_W:0]   c_req_y;
  pix_t            c_rsp_pix;
  pix_t            src_blk [BLK*BLK];
  logic            lr_valid, lr_ready, lr_view, lf_valid;
  logic [UX_W-1:0] lr_ux;
  logic [UY_W-1:0] lr_uy;
  unit_t           lf_data;
  xy_t             src_xy;

  assign src_xy = tr_view ? cur_job.src2 : cur_job.src1;

  texture_reorder #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .UX_W(UX_W), .UY_W(UY_W)) u_tr (
    .clk, .rst_n,
    .start(tr_start), .view(tr_view),
    .ox(crd_t'(src_xy.x)), .oy(crd_t'(src_xy.y)),
    .pat(cur_job.pat), .transpose(cur_job.transpose),
    .busy(tr_busy), .done(tr_done), .blk(src_blk),
    .req_valid(c_req_valid), .req_ready(c_req_ready), .req_view(c_req_view),
    .req_x(c_req_x), .req_y(c_req_y), .rsp_valid(c_rsp_valid), .rsp_pix(c_rsp_pix)
  );

  texture_reorder_cache #(.LINES(CACHE_LINES), .UX_W(UX_W), .UY_W(UY_W)) u_cache (
    .clk, .rst_n, .flush(cache_flush),
    .req_valid(c_req_valid), .req_ready(c_req_ready), .req_view(c_req_view),
    .req_x(c_req_x), .req_y(c_req_y), .rsp_valid(c_rsp_valid), .rsp_pix(c_rsp_pix),
    .lr_valid, .lr_ready, .lr_view, .lr_ux, .lr_uy, .lf_valid, .lf_data,
    .hits(cache_hits), .misses(cache_misses)
  );

  // ---------------- warping ----------------
  warping_engine #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_warp (
    .clk, .rst_n,
    .start(we_start), .pass(we_pass), .parallel(we_parallel),
    .src_blk,
    .sox(crd_t'(src_xy.x)), .soy(crd_t'(src_xy.y)),
    .vox(crd_t'(cur_job.virt.x)), .voy(crd_t'(cur_job.virt.y)),
    .pat(cur_job.pat), .transpose(cur_job.transpose),
    .hs(hset[we_pass]), .scale(we_scale),
    .dt_we, .dt_addr, .dt_data,
    .busy(we_busy), .done(we_done), .vbuf, .vmask
  );

  // ---------------- inpainting ----------------
  pix_t fill_blk [BLK*BLK];

  inpaint_engine u_inp (
    .clk, .rst_n, .start(ip_start),
    .blk_in(vbuf[ip_sel]), .mask_in(vmask[ip_sel]),
    .busy(ip_busy), .done(ip_done), .blk_out(fill_blk),
    .n_gradient, .n_foreground, .n_raster
  );

  // ---------------- inverse reorder and bus ----------------
  logic            uw_valid, uw_ready;
  logic [3:0]      uw_view;
  logic [UX_W-1:0] uw_ux;
  logic [UY_W-1:0] uw_uy;
  unit_t           uw_data;
  logic [7:0]      uw_mask;

  inverse_reorder #(.IRB_W(IRB_W), .IRB_H(IRB_H), .UX_W(UX_W), .UY_W(UY_W)) u_irb (
    .clk, .rst_n, .start(ir_start), .blk(fill_blk),
    .vox(crd_t'(cur_job.virt.x)), .voy(crd_t'(cur_job.virt.y)),
    .pat(cur_job.pat), .transpose(cur_job.transpose), .view(ir_view),
    .busy(ir_busy), .done(ir_done),
    .uw_valid, .uw_ready, .uw_view, .uw_ux, .uw_uy, .uw_data, .uw_mask
  );

  bus_if #(.UX_W(UX_W), .UY_W(UY_W), .UNITS_ROW(FRAME_W / 4)) u_bus (
    .clk, .rst_n, .mode_full(mode == MODE_FULL), .src_base, .dst_base,
    .lr_valid, .lr_ready, .lr_view, .lr_ux, .lr_uy, .lf_valid, .lf_data,
    .uw_valid, .uw_ready, .uw_view, .uw_ux, .uw_uy, .uw_data, .uw_mask,
    .bus0_req, .bus0_ready, .bus0_rsp, .bus1_req, .bus1_ready, .bus1_rvalid,
    .rd_beats, .wr_beats_bus0, .wr_beats_bus1
  );

  // the stages run one at a time under the controller
  always_comb
    if (rst_n) assert ($onehot0({tr_busy, we_busy, ip_busy, ir_busy}));
endmodule
