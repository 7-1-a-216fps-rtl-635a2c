// inpaint_engine: single-pass hole filling of an 8x8 virtual block in 24 cycles.
//
// After warping, positions of a virtual block that received no pixel (holes: disocclusions and
// cracks) must be filled. Instead of the iterative gradient inpainting of the reference software,
// every hole is filled once, by a rule picked from the neighbourhood that tells why the hole is
// there. The document gives the three padding modes by name (gradient padding, foreground
// padding with a 3-pixel search range, depth-based raster scan), the single iteration and the
// cost of 24 cycles per block; the rules below are this design's reading of them:
//   phase 1, cycles 0-7, one block row per cycle - gradient padding: a hole with valid pixels on
//     both sides within SEARCH positions whose depths differ by at most TH lies inside one
//     surface; it is filled by linear interpolation between the two, weighted by distance.
//   phase 2, cycles 8-15, one block column per cycle - foreground padding: a remaining hole with
//     a valid pixel within SEARCH positions above or below takes the nearest one above or below;
//     if both exist the depths are compared and the closer (larger depth) one is taken.
//   phase 3, cycles 16-23, rows in raster order - depth-based raster scan: every remaining hole
//     compares its left and upper neighbours (already final) and copies the farther one (smaller
//     depth, i.e. background); the very first position falls back to the block's farthest valid
//     pixel, or to zero when the block is empty.
// Rows and columns are those of the reordered block: pixel n = 8*i + j is column i (along the
// epipolar line) and row j. The gradient-vector calculator with its look-up table is not part of
// this design.
//
// Interface and timing: start with blk_in/mask_in (bit n set = valid pixel); done is high 25
// cycles after the start cycle (one to take the block, 24 to fill it) with blk_out complete. The mode counters accumulate filled pixels per mode.
module inpaint_engine
  import fvvs_pkg::*;
#(
  parameter int TH     = 16,   // depth difference still seen as one surface
  parameter int SEARCH = 3     // search range in pixels
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  pix_t        blk_in [BLK*BLK],
  input  logic [63:0] mask_in,
  output logic        busy,
  output logic        done,
  output pix_t        blk_out [BLK*BLK],
  output logic [31:0] n_gradient,
  output logic [31:0] n_foreground,
  output logic [31:0] n_raster
);
  logic [4:0]  cnt;
  logic [63:0] m0, m;
  pix_t        bg;

  function automatic logic [7:0] interp(logic [7:0] a, logic [7:0] b, int da, int db);
    return 8'((int'(a) * db + int'(b) * da) / (da + db));
  endfunction

  // background pixel of the incoming block: the valid pixel with the smallest depth
  pix_t bg_in;
  always_comb begin
    logic f;
    f = 1'b0;
    bg_in = '0;
    for (int n = 0; n < BLK*BLK; n++)
      if (mask_in[n] && (!f || blk_in[n].d < bg_in.d)) begin
        f = 1'b1;
        bg_in = blk_in[n];
      end
  end

  // fills computed for the current cycle
  pix_t        f_pix [BLK];
  logic [7:0]  f_en;
  logic [5:0]  f_idx [BLK];
  logic [1:0]  phase;

  always_comb begin
    logic [2:0] r;
    r = cnt[2:0];
    phase = cnt[4:3];
    f_en = '0;
    for (int k = 0; k < BLK; k++) begin
      f_pix[k] = '0;
      f_idx[k] = '0;
    end
    if (busy) begin
      case (phase)
        2'd0: begin  // gradient padding along row r
          for (int i = 0; i < BLK; i++) begin
            int li, ri;
            li = -1; ri = -1;
            for (int s = SEARCH; s >= 1; s--) begin
              if (i - s >= 0 && m0[(i - s) * BLK + int'(r)]) li = i - s;
              if (i + s < BLK && m0[(i + s) * BLK + int'(r)]) ri = i + s;
            end
            f_idx[i] = 6'(i * BLK + int'(r));
            if (!m[i * BLK + int'(r)] && li >= 0 && ri >= 0) begin
              pix_t a, b;
              int dd;
              a = blk_out[li * BLK + int'(r)];
              b = blk_out[ri * BLK + int'(r)];
              dd = int'(a.d) - int'(b.d);
              if (dd <= TH && dd >= -TH) begin
                f_en[i]    = 1'b1;
                f_pix[i].y = interp(a.y, b.y, i - li, ri - i);
                f_pix[i].u = interp(a.u, b.u, i - li, ri - i);
                f_pix[i].v = interp(a.v, b.v, i - li, ri - i);
                f_pix[i].d = interp(a.d, b.d, i - li, ri - i);
              end
            end
          end
        end
        2'd1: begin  // foreground padding along column r
          for (int j = 0; j < BLK; j++) begin
            int ui, di;
            ui = -1; di = -1;
            for (int s = SEARCH; s >= 1; s--) begin
              if (j - s >= 0 && m[int'(r) * BLK + j - s]) ui = j - s;
              if (j + s < BLK && m[int'(r) * BLK + j + s]) di = j + s;
            end
            f_idx[j] = 6'(int'(r) * BLK + j);
            if (!m[int'(r) * BLK + j] && (ui >= 0 || di >= 0)) begin
              f_en[j] = 1'b1;
              if (ui < 0)      f_pix[j] = blk_out[int'(r) * BLK + di];
              else if (di < 0) f_pix[j] = blk_out[int'(r) * BLK + ui];
              else if (blk_out[int'(r) * BLK + di].d > blk_out[int'(r) * BLK + ui].d)
                               f_pix[j] = blk_out[int'(r) * BLK + di];
              else             f_pix[j] = blk_out[int'(r) * BLK + ui];
            end
          end
        end
        default: begin  // depth-based raster scan along row r
          pix_t left;
          left = '0;
          for (int i = 0; i < BLK; i++) begin
            pix_t cur;
            f_idx[i] = 6'(i * BLK + int'(r));
            cur = blk_out[i * BLK + int'(r)];
            if (!m[i * BLK + int'(r)]) begin
              f_en[i] = 1'b1;
              if (i == 0 && r == 0)  cur = bg;
              else if (i == 0)       cur = blk_out[int'(r) - 1];
              else if (r == 0)       cur = left;
              else if (blk_out[i * BLK + int'(r) - 1].d < left.d)
                                     cur = blk_out[i * BLK + int'(r) - 1];
              else                   cur = left;
              f_pix[i] = cur;
            end
            left = cur;
          end
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      done         <= 1'b0;
      cnt          <= '0;
      m0           <= '0;
      m            <= '0;
      bg           <= '0;
      n_gradient   <= '0;
      n_foreground <= '0;
      n_raster     <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        cnt  <= '0;
        m0   <= mask_in;
        m    <= mask_in;
        bg   <= bg_in;
      end else if (busy) begin
        cnt <= cnt + 5'd1;
        for (int k = 0; k < BLK; k++)
          if (f_en[k]) m[f_idx[k]] <= 1'b1;
        case (phase)
          2'd0:    n_gradient   <= n_gradient   + 32'($countones(f_en));
          2'd1:    n_foreground <= n_foreground + 32'($countones(f_en));
          default: n_raster     <= n_raster     + 32'($countones(f_en));
        endcase
        if (cnt == 5'd23) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (start && !busy) begin
      for (int n = 0; n < BLK*BLK; n++) blk_out[n] <= blk_in[n];
    end else if (busy) begin
      for (int k = 0; k < BLK; k++)
        if (f_en[k]) blk_out[f_idx[k]] <= f_pix[k];
    end
  end
endmodule
