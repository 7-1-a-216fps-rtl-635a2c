// inverse_reorder: writes a finished virtual block back to the frame in 4x2-pixel units.
//
// The finished block lives in reordered form (column i along the epipolar line, row j), but the
// virtual view in external memory is stored as 4x2-pixel units written in bursts. This stage
// stacks the slanted block into a buffer of IRB_W x IRB_H = 16 x 24 pixels (the document's size),
// addressed by frame position: the buffer column is the frame x modulo 16 (circular along the
// scan direction) and the buffer row is y relative to the block's topmost even row. With the
// rotated scan order (transpose) the roles of x and y in the buffer are swapped, so the 15-pixel
// slanted extent of a 45-degree block always falls along the 24-row side. It then walks every
// 4x2 unit that the block touches and emits one unit write with an 8-bit pixel mask per unit;
// units the block only partly covers are written with the mask, so neighbouring blocks do not
// overwrite each other. Filling and draining one block at a time is this design's choice.
//
// Interface and timing: start loads blk (one cycle), then unit writes leave on uw_* with
// valid/ready, one per cycle while uw_ready is high; done pulses after the last unit. Each unit
// carries all 8 pixels; chroma sample k of a unit is taken from the first masked pixel of its
// 2x2 pixel group.
module inverse_reorder
  import fvvs_pkg::*;
#(
  parameter int IRB_W = 16,
  parameter int IRB_H = 24,
  parameter int UX_W  = 10,
  parameter int UY_W  = 11
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  pix_t            blk [BLK*BLK],
  input  crd_t            vox,
  input  crd_t            voy,
  input  pattern_e        pat,
  input  logic            transpose,
  input  logic [3:0]      view,
  output logic            busy,
  output logic            done,
  output logic            uw_valid,
  input  logic            uw_ready,
  output logic [3:0]      uw_view,
  output logic [UX_W-1:0] uw_ux,
  output logic [UY_W-1:0] uw_uy,
  output unit_t           uw_data,
  output logic [7:0]      uw_mask
);
  pix_t                 buf_q  [IRB_H][IRB_W];
  logic [IRB_W-1:0]     bval_q [IRB_H];

  logic       tr_q;
  logic [3:0] view_q;
  crd_t       base_q;               // first buffer row in frame coordinates (y, or x if transposed)
  crd_t       ux_lo, ux_hi, uy_hi, ux_c, uy_c;

  // geometry of the incoming block
  crd_t mino, maxo;
  always_comb begin
    mino = 0;
    maxo = 0;
    for (int i = 0; i < BLK; i++) begin
      if (crd_t'(pattern_offset(pat, i)) < mino) mino = crd_t'(pattern_offset(pat, i));
      if (crd_t'(pattern_offset(pat, i)) > maxo) maxo = crd_t'(pattern_offset(pat, i));
    end
  end

  // current unit gathered from the buffer
  pix_t u_px [8];
  always_comb begin
    uw_mask = '0;
    uw_data = '0;
    for (int p = 0; p < 8; p++) begin
      crd_t fx, fy, r;
      logic [3:0] c;
      fx = 4 * ux_c + crd_t'(p % 4);
      fy = 2 * uy_c + crd_t'(p / 4);
      if (!tr_q) begin r = fy - base_q; c = fx[3:0]; end
      else       begin r = fx - base_q; c = fy[3:0]; end
      u_px[p] = '0;
      if (r >= 0 && r < crd_t'(IRB_H) && bval_q[r[4:0]][c]) begin
        u_px[p]    = buf_q[r[4:0]][c];
        uw_mask[p] = 1'b1;
      end
      uw_data.y[8*p +: 8] = u_px[p].y;
      uw_data.d[8*p +: 8] = u_px[p].d;
    end
    // chroma sample k: first masked pixel of the group {2k, 2k+1, 2k+4, 2k+5}
    for (int k = 0; k < 2; k++) begin
      for (int q = 3; q >= 0; q--) begin
        if (uw_mask[2 * k + (q % 2) + 4 * (q / 2)]) begin
          uw_data.u[8*k +: 8] = u_px[2 * k + (q % 2) + 4 * (q / 2)].u;
          uw_data.v[8*k +: 8] = u_px[2 * k + (q % 2) + 4 * (q / 2)].v;
        end
      end
    end
  end

  assign uw_valid = busy && (uw_mask != 8'd0);
  assign uw_view  = view_q;
  assign uw_ux    = UX_W'(ux_c);
  assign uw_uy    = UY_W'(uy_c);

  // placement of the incoming block: first buffer row, unit range, buffer cell of every pixel
  crd_t       g_b, g_lx, g_hx, g_ly, g_hy;
  logic [4:0] g_row [BLK*BLK];
  logic [3:0] g_col [BLK*BLK];
  always_comb begin
    if (!transpose) begin
      g_b  = (voy + mino) & ~crd_t'(1);
      g_lx = vox >>> 2;             g_hx = (vox + crd_t'(BLK - 1)) >>> 2;
      g_ly = g_b >>> 1;             g_hy = (voy + maxo + crd_t'(BLK - 1)) >>> 1;
    end else begin
      g_b  = (vox + mino) & ~crd_t'(3);
      g_lx = g_b >>> 2;             g_hx = (vox + maxo + crd_t'(BLK - 1)) >>> 2;
      g_ly = voy >>> 1;             g_hy = (voy + crd_t'(BLK - 1)) >>> 1;
    end
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++) begin
        crd_t fx, fy;
        logic [4:0] rr;
        if (!transpose) begin
          fx = vox + crd_t'(i);
          fy = voy + crd_t'(j) + crd_t'(pattern_offset(pat, i));
          rr = 5'(fy - g_b);
          g_col[i * BLK + j] = fx[3:0];
        end else begin
          fx = vox + crd_t'(j) + crd_t'(pattern_offset(pat, i));
          fy = voy + crd_t'(i);
          rr = 5'(fx - g_b);
          g_col[i * BLK + j] = fy[3:0];
        end
        g_row[i * BLK + j] = rr;
      end
  end

  logic last_unit;
  assign last_unit = (ux_c == ux_hi) && (uy_c == uy_hi);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      tr_q   <= 1'b0;
      view_q <= '0;
      base_q <= '0;
      ux_lo  <= '0; ux_hi <= '0; uy_hi <= '0; ux_c <= '0; uy_c <= '0;
      for (int r = 0; r < IRB_H; r++) bval_q[r] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        tr_q   <= transpose;
        view_q <= view;
        base_q <= g_b;
        ux_lo  <= g_lx; ux_hi <= g_hx; uy_hi <= g_hy;
        ux_c   <= g_lx; uy_c  <= g_ly;
        for (int r = 0; r < IRB_H; r++) bval_q[r] <= '0;
        for (int n = 0; n < BLK*BLK; n++) bval_q[g_row[n]][g_col[n]] <= 1'b1;
      end else if (busy) begin
        if (!uw_valid || uw_ready) begin
          if (last_unit) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else if (ux_c == ux_hi) begin
            ux_c <= ux_lo;
            uy_c <= uy_c + 1;
          end else begin
            ux_c <= ux_c + 1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (start && !busy)
      for (int n = 0; n < BLK*BLK; n++) buf_q[g_row[n]][g_col[n]] <= blk[n];
  end
endmodule
