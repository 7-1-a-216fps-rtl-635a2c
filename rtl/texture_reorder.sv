// texture_reorder: gathers a slanted source block into a regular 8x8 block buffer.
//
// The synthesizer processes blocks along epipolar lines, so a source block is not aligned to the
// memory grid: column i of the block is shifted by the access pattern (see access_pattern). This
// stage walks the 64 pixels column by column (pixel index n = 8*i + j), asks the texture reorder
// cache for each of them, and stores the answers at blk[n], so that the following stages see a
// plain 8x8 block. Positions outside the frame are clamped to the frame edge (this design's
// choice; the document does not describe frame borders).
//
// Interface and timing: pulse start with the block geometry; requests go out at one per cycle
// while the cache accepts them, and done pulses for one cycle when the 64th pixel has been
// stored, so an all-hit block takes 66 cycles from start to done. blk holds its value until the next start.
module texture_reorder
  import fvvs_pkg::*;
#(
  parameter int FRAME_W = 4096,
  parameter int FRAME_H = 2160,
  parameter int UX_W    = 10,
  parameter int UY_W    = 11
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            view,
  input  crd_t            ox,
  input  crd_t            oy,
  input  pattern_e        pat,
  input  logic            transpose,
  output logic            busy,
  output logic            done,
  output pix_t            blk [BLK*BLK],
  // cache side
  output logic            req_valid,
  input  logic            req_ready,
  output logic            req_view,
  output logic [UX_W+1:0] req_x,
  output logic [UY_W:0]   req_y,
  input  logic            rsp_valid,
  input  pix_t            rsp_pix
);
  logic [6:0] n_iss, n_rcv;
  logic       view_q, tr_q;
  crd_t       ox_q, oy_q;
  pattern_e   pat_q;
  crd_t       px, py;

  access_pattern u_pat (
    .ox(ox_q), .oy(oy_q), .pat(pat_q), .transpose(tr_q),
    .i(n_iss[5:3]), .j(n_iss[2:0]), .pos_x(px), .pos_y(py)
  );

  always_comb begin
    req_x = (px < 0) ? '0 : (px > crd_t'(FRAME_W - 1)) ? (UX_W+2)'(FRAME_W - 1) : (UX_W+2)'(px);
    req_y = (py < 0) ? '0 : (py > crd_t'(FRAME_H - 1)) ? (UY_W+1)'(FRAME_H - 1) : (UY_W+1)'(py);
    req_view  = view_q;
    req_valid = busy && (n_iss < 7'd64);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      n_iss  <= '0;
      n_rcv  <= '0;
      view_q <= 1'b0;
      tr_q   <= 1'b0;
      ox_q   <= '0;
      oy_q   <= '0;
      pat_q  <= PAT_0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        n_iss  <= '0;
        n_rcv  <= '0;
        view_q <= view;
        tr_q   <= transpose;
        ox_q   <= ox;
        oy_q   <= oy;
        pat_q  <= pat;
      end else if (busy) begin
        if (req_valid && req_ready) n_iss <= n_iss + 7'd1;
        if (rsp_valid) begin
          n_rcv <= n_rcv + 7'd1;
          if (n_rcv == 7'd63) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (busy && rsp_valid) blk[n_rcv[5:0]] <= rsp_pix;
  end
endmodule
