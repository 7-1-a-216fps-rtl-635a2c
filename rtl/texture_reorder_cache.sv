// texture_reorder_cache: pixel cache of 4x2-pixel texture units in front of the system bus.
//
// The texture reorder stage asks for single pixels along slanted block columns, while external
// memory is organised in 4x2-pixel units fetched in bursts. This cache keeps LINES recently used
// units (16 in the document); a line is one unit: Y 64 bits, U 16, V 16, depth 64 bits, as the
// document's line format gives. Its address field is the unit address {view, unit row, unit
// column} (22 bits for two 4096x2160 views, where the document's line shows 20 bits).
// Direct mapping with index {uy[1:0], ux[1:0]} (so a slanted column of a block, which covers 4
// unit rows and up to 2 unit columns, never evicts itself) is this design's choice.
//
// Interface and timing: a pixel request (req_*) is accepted when req_ready is high. On a hit the
// pixel appears on rsp_* in the next cycle and a new request can be accepted in that same cycle,
// so hits stream at one pixel per cycle. On a miss req_ready stays low, one line read is issued
// on lr_* (valid/ready), and the request completes the cycle after the fill (lf_valid) arrives.
// Responses come back in request order. flush invalidates every line (new frame).
module texture_reorder_cache
  import fvvs_pkg::*;
#(
  parameter int LINES = 16,
  parameter int UX_W  = 10,    // unit columns: 4096 / 4 = 1024
  parameter int UY_W  = 11     // unit rows:    2160 / 2 = 1080
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            flush,
  // pixel request / response
  input  logic            req_valid,
  output logic            req_ready,
  input  logic            req_view,
  input  logic [UX_W+1:0] req_x,
  input  logic [UY_W:0]   req_y,
  output logic            rsp_valid,
  output pix_t            rsp_pix,
  // line read towards the bus
  output logic            lr_valid,
  input  logic            lr_ready,
  output logic            lr_view,
  output logic [UX_W-1:0] lr_ux,
  output logic [UY_W-1:0] lr_uy,
  input  logic            lf_valid,
  input  unit_t           lf_data,
  // statistics
  output logic [31:0]     hits,
  output logic [31:0]     misses
);
  localparam int IDX_W = $clog2(LINES);
  localparam int TAG_W = 1 + UX_W + UY_W;

  logic [LINES-1:0] valid_q;
  logic [TAG_W-1:0] tag_q  [LINES];
  unit_t            data_q [LINES];

  // accepted request
  logic            s_valid, s_view;
  logic [UX_W+1:0] s_x;
  logic [UY_W:0]   s_y;
  logic            miss_issued;

  logic [UX_W-1:0]  s_ux;
  logic [UY_W-1:0]  s_uy;
  logic [IDX_W-1:0] s_idx;
  logic [TAG_W-1:0] s_tag;
  logic             s_hit;

  always_comb begin
    s_ux  = s_x[UX_W+1:2];
    s_uy  = s_y[UY_W:1];
    s_idx = IDX_W'({s_uy, s_ux[1:0]});
    s_tag = {s_view, s_uy, s_ux};
    s_hit = valid_q[s_idx] && (tag_q[s_idx] == s_tag);
  end

  assign rsp_valid = s_valid && s_hit;
  assign rsp_pix   = unit_pixel(data_q[s_idx], {29'd0, s_y[0], s_x[1:0]});
  assign req_ready = !s_valid || s_hit;

  assign lr_valid = s_valid && !s_hit && !miss_issued;
  assign lr_view  = s_view;
  assign lr_ux    = s_ux;
  assign lr_uy    = s_uy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_valid     <= 1'b0;
      s_view      <= 1'b0;
      s_x         <= '0;
      s_y         <= '0;
      miss_issued <= 1'b0;
      valid_q     <= '0;
      hits        <= '0;
      misses      <= '0;
    end else begin
      if (req_valid && req_ready) begin
        s_valid <= 1'b1;
        s_view  <= req_view;
        s_x     <= req_x;
        s_y     <= req_y;
      end else if (rsp_valid) begin
        s_valid <= 1'b0;
      end
      if (rsp_valid) hits <= hits + 1;
      if (lr_valid && lr_ready) begin
        miss_issued <= 1'b1;
        misses      <= misses + 1;
      end
      if (lf_valid) begin
        assert (miss_issued);   // a fill only arrives for an outstanding miss
        miss_issued    <= 1'b0;
        valid_q[s_idx] <= 1'b1;
      end
      if (flush) valid_q <= '0;
    end
  end

  always_ff @(posedge clk) begin
    if (lf_valid) begin
      tag_q[s_idx]  <= s_tag;
      data_q[s_idx] <= lf_data;
    end
  end
endmodule
