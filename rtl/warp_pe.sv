// warp_pe: one pixel warping processing element (homographic transform with linearly
// interpolated matrices).
//
// For a source pixel (xs,ys) with depth Z the PE computes [x' y' w'] = H(Z) * [xs ys 1] and
// returns the virtual position (x'/w', y'/w') rounded to the nearest integer. As in the document,
// H(Z) is not stored for all 256 depth values: only three matrices (at Z = 0, 128, 255) are kept,
// in the form of two base/increment pairs, and H(Z) = Hbase[Z[7]] + Hinc[Z[7]] * Z[6:0]. The
// element h_tt is fixed at 1. The division runs in a 4-stage pipeline as in the document.
//
// Pipeline (LAT = 6 cycles, one pixel per cycle):
//   stage 1  linear interpolation of the 8 coefficients
//   stage 2  3x3 matrix times vector
//   stage 3-6  restoring division, QW quotient bits spread over four stages
// Coefficients are Q16.16 two's complement (coef_t); that format, the round-half-up rule and the
// "ok" flag (w' > 0 and a result inside 0..2^QW-1) are this design's choices. A tag travels with
// each pixel so the caller can keep pixel data aligned with the result.
module warp_pe
  import fvvs_pkg::*;
#(
  parameter int TAG_W = 40,
  parameter int QW    = 13     // quotient bits: 0..8191 covers a 4096-wide frame
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  crd_t             xs,
  input  crd_t             ys,
  input  logic [7:0]       z,
  input  logic [TAG_W-1:0] in_tag,
  input  hset_t            hs,
  output logic             out_valid,
  output logic             out_ok,
  output crd_t             xv,
  output crd_t             yv,
  output logic [TAG_W-1:0] out_tag
);
  localparam int LAT  = 6;
  localparam int HW   = 48;    // interpolated coefficient width
  localparam int PW   = 72;    // product / sum width
  localparam int DW   = 96;    // divider width
  localparam int S0   = QW - 1;            // first quotient bit of stage 3
  localparam int BPS  = (QW + 3) / 4;      // quotient bits per division stage

  typedef logic signed [HW-1:0] hcoef_t;
  typedef logic signed [PW-1:0] prod_t;

  // ---------------- stage 1: linear interpolation ----------------
  logic               v1;
  hcoef_t [7:0]       h1;
  crd_t               xs1, ys1;
  logic [TAG_W-1:0]   t1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
    end else begin
      v1 <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < 8; k++) begin
      h1[k] <= hcoef_t'(hs.base[z[7]][k]) +
               hcoef_t'(hs.inc[z[7]][k]) * hcoef_t'({1'b0, z[6:0]});
    end
    xs1 <= xs;
    ys1 <= ys;
    t1  <= in_tag;
  end

  // ---------------- stage 2: matrix times vector ----------------
  logic             v2;
  prod_t            xp2, yp2, wp2;
  logic [TAG_W-1:0] t2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
  end

  always_ff @(posedge clk) begin
    xp2 <= prod_t'(h1[0]) * prod_t'(xs1) + prod_t'(h1[1]) * prod_t'(ys1) + prod_t'(h1[2]);
    yp2 <= prod_t'(h1[3]) * prod_t'(xs1) + prod_t'(h1[4]) * prod_t'(ys1) + prod_t'(h1[5]);
    wp2 <= prod_t'(h1[6]) * prod_t'(xs1) + prod_t'(h1[7]) * prod_t'(ys1) +
           (prod_t'(1) <<< COEF_FRAC);
    t2  <= t1;
  end

  // ---------------- stages 3-6: vector division ----------------
  // round(n/w) = floor((2n + w) / 2w); the remainders start as 2n + w, the divisor is 2w.
  typedef struct packed {
    logic             valid;
    logic             ok;
    logic [DW-1:0]    rx, ry, den;
    logic [QW-1:0]    qx, qy;
    logic [TAG_W-1:0] tag;
  } div_t;

  div_t d0;         // combinational input of stage 3
  div_t nxt [4];    // combinational result of each division stage
  div_t dreg [4];   // pipeline register after each division stage

  always_comb begin
    logic signed [PW:0] nx, ny, w2;
    nx = (PW+1)'(xp2) * 2 + (PW+1)'(wp2);
    ny = (PW+1)'(yp2) * 2 + (PW+1)'(wp2);
    w2 = (PW+1)'(wp2) * 2;
    d0.valid = v2;
    d0.tag   = t2;
    d0.qx    = '0;
    d0.qy    = '0;
    d0.ok    = (wp2 > 0) && (nx >= 0) && (ny >= 0);
    d0.rx    = d0.ok ? DW'(nx) : '0;
    d0.ry    = d0.ok ? DW'(ny) : '0;
    d0.den   = d0.ok ? DW'(w2) : DW'(1);
    // a result of 2^QW or more does not fit the quotient
    if (d0.ok && ((d0.rx >= (d0.den << QW)) || (d0.ry >= (d0.den << QW))))
      d0.ok = 1'b0;
  end

  always_comb begin
    for (int s = 0; s < 4; s++) begin
      nxt[s] = (s == 0) ? d0 : dreg[s-1];
      for (int b = S0 - s * BPS; b > S0 - (s + 1) * BPS; b--) begin
        if (b >= 0) begin
          if (nxt[s].rx >= (nxt[s].den << b)) begin
            nxt[s].rx    = nxt[s].rx - (nxt[s].den << b);
            nxt[s].qx[b] = 1'b1;
          end
          if (nxt[s].ry >= (nxt[s].den << b)) begin
            nxt[s].ry    = nxt[s].ry - (nxt[s].den << b);
            nxt[s].qy[b] = 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 4; s++) dreg[s] <= '0;
    end else begin
      for (int s = 0; s < 4; s++) dreg[s] <= nxt[s];
    end
  end

  assign out_valid = dreg[3].valid;
  assign out_ok    = dreg[3].ok;
  assign xv        = crd_t'(dreg[3].qx);
  assign yv        = crd_t'(dreg[3].qy);
  assign out_tag   = dreg[3].tag;

  initial assert (LAT == 6);
endmodule
