// fvvs_ctrl: block sequencer of the view synthesizer, including the DWRFS decision.
//
// For every virtual block (one job) the controller runs the four FVVS stages in order:
//   1. texture reorder of the main reference block (view 1) and warping pass 0;
//   2. dynamic warping reference frame selection (DWRFS): only if the warped block still has
//      holes in an active view buffer and DWRFS is enabled, the co-located block of the second
//      reference view is reordered and warped into the holes (pass 1); otherwise the second view
//      is never read. With DWRFS disabled the holes go to the inpainting engine as they are;
//   3. inpainting of each active view buffer in turn;
//   4. inverse reorder and write-back of each inpainted view.
// Modes (document's configurations): general = one view with homographic warping; parallel =
// three views per source block with disparity warping; full utilization = nine views, run as
// three groups of three (the source block is read again for each group, normally from the
// cache), with the writes on the decoder bus. Virtual view k (1..9) uses disparity scale
// disp_off[r] + disp_step[r]*k for reference view r. Running the stages one after another,
// rather than block-pipelined as in the document, and the per-group repetition are this design's.
//
// Interface and timing: a job is taken when job_valid and job_ready are high; each *_start is a
// one-cycle pulse, and the controller waits for the matching *_done pulse.
module fvvs_ctrl
  import fvvs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  fvvs_mode_e        mode,
  input  logic              dwrfs_en,
  input  logic signed [7:0] disp_off  [2],
  input  logic signed [7:0] disp_step [2],
  input  logic              job_valid,
  output logic              job_ready,
  input  job_t              job,
  output job_t              cur_job,
  // texture reorder
  output logic              tr_start,
  output logic              tr_view,
  input  logic              tr_done,
  // warping engine
  output logic              we_start,
  output logic              we_pass,
  output logic              we_parallel,
  output logic signed [7:0] we_scale [N_PAR_VIEWS],
  input  logic              we_done,
  input  logic [63:0]       vmask [N_PAR_VIEWS],
  // inpainting
  output logic              ip_start,
  output logic [1:0]        ip_sel,
  input  logic              ip_done,
  // inverse reorder
  output logic              ir_start,
  output logic [3:0]        ir_view,
  input  logic              ir_done,
  // status
  output logic              busy,
  output logic [31:0]       blocks_done,
  output logic [31:0]       view2_loads,
  output logic [31:0]       view2_skips
);
  typedef enum logic [2:0] {S_IDLE, S_TR1, S_W1, S_TR2, S_W2, S_INP, S_INV} state_e;

  state_e     st;
  logic       issued;
  logic [1:0] grp, vb;
  logic [1:0] n_grp, n_vw;
  logic       holes;

  always_comb begin
    n_grp = (mode == MODE_FULL) ? 2'd3 : 2'd1;
    n_vw  = (mode == MODE_GENERAL) ? 2'd1 : 2'd3;
    holes = 1'b0;
    for (int b = 0; b < N_PAR_VIEWS; b++)
      if (b < int'(n_vw) && vmask[b] != '1) holes = 1'b1;
  end

  assign job_ready   = (st == S_IDLE);
  assign busy        = (st != S_IDLE);
  assign tr_start    = !issued && (st == S_TR1 || st == S_TR2);
  assign tr_view     = (st == S_TR2) || (st == S_W2);   // reference view of the running pass
  assign we_start    = !issued && (st == S_W1 || st == S_W2);
  assign we_pass     = (st == S_W2);
  assign we_parallel = (mode != MODE_GENERAL);
  assign ip_start    = !issued && (st == S_INP);
  assign ip_sel      = vb;
  assign ir_start    = !issued && (st == S_INV);
  assign ir_view     = (mode == MODE_GENERAL) ? 4'd0 : 4'(3 * int'(grp) + int'(vb));

  always_comb begin
    for (int b = 0; b < N_PAR_VIEWS; b++) begin
      int k;
      k = 3 * int'(grp) + b + 1;
      we_scale[b] = 8'(int'(disp_off[tr_view]) + int'(disp_step[tr_view]) * k);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_IDLE;
      issued      <= 1'b0;
      grp         <= '0;
      vb          <= '0;
      cur_job     <= '0;
      blocks_done <= '0;
      view2_loads <= '0;
      view2_skips <= '0;
    end else begin
      if (tr_start || we_start || ip_start || ir_start) issued <= 1'b1;
      case (st)
        S_IDLE: if (job_valid) begin
          cur_job <= job;
          grp     <= '0;
          st      <= S_TR1;
        end
        S_TR1: if (tr_done) begin issued <= 1'b0; st <= S_W1; end
        S_W1: if (we_done) begin
          issued <= 1'b0;
          vb     <= '0;
          if (dwrfs_en && holes) begin
            st          <= S_TR2;
            view2_loads <= view2_loads + 1;
          end else begin
            st <= S_INP;
            if (dwrfs_en) view2_skips <= view2_skips + 1;
          end
        end
        S_TR2: if (tr_done) begin issued <= 1'b0; st <= S_W2; end
        S_W2:  if (we_done) begin issued <= 1'b0; st <= S_INP; end
        S_INP: if (ip_done) begin issued <= 1'b0; st <= S_INV; end
        S_INV: if (ir_done) begin
          issued <= 1'b0;
          if (vb + 2'd1 < n_vw) begin
            vb <= vb + 2'd1;
            st <= S_INP;
          end else if (grp + 2'd1 < n_grp) begin
            grp <= grp + 2'd1;
            st  <= S_TR1;
          end else begin
            st          <= S_IDLE;
            blocks_done <= blocks_done + 1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
