// fvvs_pkg: types and constants shared by the free-viewpoint view synthesis (FVVS) datapath.
//
// A pixel carries 8-bit luma, 8-bit chroma (U,V, upsampled to every pixel inside the engines) and
// an 8-bit depth value; a larger depth value means a point closer to the camera. External memory
// holds each view as 4x2-pixel texture units; one unit is the 160-bit cache line of the texture
// reorder cache: 64 bits of Y (8 pixels), 16 bits of U, 16 bits of V (4:2:0, one sample per 2x2
// pixels) and 64 bits of depth. Those field widths are the document's; the byte order inside a
// field (pixel p = 4*(y%2) + x%4 at bits 8p+7:8p, chroma sample k = (x%4)/2) is this design's.
// A unit occupies 32 bytes of address space and is moved as three 64-bit beats: Y, depth, and
// {32'b0, V, U}.
//
// The seven block access patterns are the document's slopes 0, +-11.25, +-22.5 and +-45 degrees.
// Their column offsets (floor(i/4), floor(i/2), i for column i of 8) are this design's reading of
// those slopes as 1/4, 1/2 and 1 pixel of vertical shift per column.
package fvvs_pkg;

  localparam int PIX_W   = 8;          // bits per sample
  localparam int CRD_W   = 15;         // signed frame coordinate width inside the engines
  localparam int BLK     = 8;          // block edge in pixels
  localparam int UNIT_BYTES = 32;      // address space of one 4x2 unit
  localparam int N_PAR_VIEWS = 3;      // virtual block buffers (parallel views)
  localparam int N_DST_VIEWS = 9;      // virtual views in full-utilization mode
  localparam int COEF_W  = 32;         // homography coefficient width
  localparam int COEF_FRAC = 16;       // fractional bits of a coefficient

  typedef logic signed [CRD_W-1:0] crd_t;

  typedef struct packed {
    logic [PIX_W-1:0] y;
    logic [PIX_W-1:0] u;
    logic [PIX_W-1:0] v;
    logic [PIX_W-1:0] d;
  } pix_t;

  // One 4x2 texture unit (the data part of a texture reorder cache line)
  typedef struct packed {
    logic [63:0] y;
    logic [15:0] u;
    logic [15:0] v;
    logic [63:0] d;
  } unit_t;

  typedef enum logic [2:0] {
    PAT_0   = 3'd0,
    PAT_P11 = 3'd1,
    PAT_N11 = 3'd2,
    PAT_P22 = 3'd3,
    PAT_N22 = 3'd4,
    PAT_P45 = 3'd5,
    PAT_N45 = 3'd6
  } pattern_e;

  typedef enum logic [1:0] {
    MODE_GENERAL  = 2'd0,  // one virtual view, 6D homographic warping
    MODE_PARALLEL = 2'd1,  // three views per source block, disparity warping
    MODE_FULL     = 2'd2   // nine views (three groups of three), writes on the decoder bus
  } fvvs_mode_e;

  typedef logic signed [COEF_W-1:0] coef_t;

  // 3x3 homography with h_tt fixed at 1: {h_xx,h_xy,h_xt,h_yx,h_yy,h_yt,h_tx,h_ty}, index 0..7
  typedef coef_t [7:0] hmat_t;

  // Linear-interpolation set of one reference view: segment s (depth bit 7) uses
  // H(Z) = base[s] + inc[s] * Z[6:0]
  typedef struct packed {
    hmat_t [1:0] base;
    hmat_t [1:0] inc;
  } hset_t;

  typedef struct packed {
    logic [12:0] x;
    logic [12:0] y;
  } xy_t;

  // One virtual block to synthesize
  typedef struct packed {
    xy_t      src1;       // origin of the main reference (view 1) source block
    xy_t      src2;       // origin of the second reference (view 2) source block
    xy_t      virt;       // origin of the virtual block
    pattern_e pat;        // access pattern of both
    logic     transpose;  // rotated block scan order (slopes beyond +-45 degrees)
  } job_t;

  // One beat request on a 64-bit system bus (a request is taken when the bus raises ready).
  // Reads return their data with rvalid in request order; writes are posted.
  typedef struct packed {
    logic        valid;
    logic        we;
    logic [31:0] addr;
    logic [63:0] wdata;
    logic [7:0]  wstrb;
  } bus_req_t;

  typedef struct packed {
    logic        rvalid;
    logic [63:0] rdata;
  } bus_rsp_t;

  // Vertical shift of column i of a block for pattern p (the skew of the slanted block)
  function automatic int pattern_offset(pattern_e p, int i);
    case (p)
      PAT_P11: return -(i / 4);
      PAT_N11: return  (i / 4);
      PAT_P22: return -(i / 2);
      PAT_N22: return  (i / 2);
      PAT_P45: return -i;
      PAT_N45: return  i;
      default: return 0;
    endcase
  endfunction

  function automatic pix_t unit_pixel(unit_t u, int unsigned p);
    pix_t r;
    int unsigned k;
    k   = (p % 4) / 2;
    r.y = u.y[8*p +: 8];
    r.d = u.d[8*p +: 8];
    r.u = u.u[8*k +: 8];
    r.v = u.v[8*k +: 8];
    return r;
  endfunction

endpackage
