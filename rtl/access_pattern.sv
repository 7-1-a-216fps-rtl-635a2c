// access_pattern: frame position of pixel (i,j) of a slanted 8x8 block.
//
// Blocks are walked along epipolar lines. Column i (0..7) of a block is shifted vertically by
// pattern_offset(pat, i) (see fvvs_pkg), so the 8 columns follow one of seven slopes between
// -45 and +45 degrees; j (0..7) is the row inside the shifted column. For steeper epipolar lines
// the scan order is rotated (transpose=1): i then runs along y and the shift is applied in x,
// which extends the supported rotation to +-180 degrees as the document describes. The exact
// offsets per slope are this design's choice. Purely combinational.
//
//   pos_x = ox + i,              pos_y = oy + j + off(i)     (transpose = 0)
//   pos_x = ox + j + off(i),     pos_y = oy + i              (transpose = 1)
module access_pattern
  import fvvs_pkg::*;
(
  input  crd_t       ox,
  input  crd_t       oy,
  input  pattern_e   pat,
  input  logic       transpose,
  input  logic [2:0] i,
  input  logic [2:0] j,
  output crd_t       pos_x,
  output crd_t       pos_y
);
  crd_t off;

  always_comb begin
    off = crd_t'(pattern_offset(pat, int'(i)));
    if (!transpose) begin
      pos_x = ox + crd_t'(i);
      pos_y = oy + crd_t'(j) + off;
    end else begin
      pos_x = ox + crd_t'(j) + off;
      pos_y = oy + crd_t'(i);
    end
  end
endmodule
