// bus_if: dual 64-bit bus interface of the view synthesizer.
//
// Turns the two kinds of external traffic of the synthesizer into 64-bit bus beats: line reads of
// the texture reorder cache (one 4x2-pixel unit, read as three beats) and unit writes of the
// inverse reorder stage (three beats with byte strobes from the pixel mask). Both normally share
// the view-synthesis bus (bus 0), with reads given priority beat by beat. In full-utilization
// mode the writes move to the decoder bus (bus 1), which the decoder does not use in that mode,
// so reads and writes proceed in parallel: the document's way of raising the output bandwidth.
//
// Memory map (this design's): unit (ux,uy) of a view starts at base + 32*(uy*UNITS_ROW + ux);
// beat 0 holds Y, beat 1 depth, beat 2 {32'b0, V, U}. Source views use src_base[0..1], virtual
// views dst_base[0..8]. A bus request is a bus_req_t held until its ready; read data returns on
// rvalid in order. The decoder bus is written only, so of its response just rvalid comes in,
// and an assertion checks that it stays low. Line fill (lf_valid) pulses one cycle after the
// third read beat returns.
module bus_if
  import fvvs_pkg::*;
#(
  parameter int UX_W      = 10,
  parameter int UY_W      = 11,
  parameter int UNITS_ROW = 1024
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            mode_full,
  input  logic [31:0]     src_base [2],
  input  logic [31:0]     dst_base [N_DST_VIEWS],
  // cache line reads
  input  logic            lr_valid,
  output logic            lr_ready,
  input  logic            lr_view,
  input  logic [UX_W-1:0] lr_ux,
  input  logic [UY_W-1:0] lr_uy,
  output logic            lf_valid,
  output unit_t           lf_data,
  // unit writes
  input  logic            uw_valid,
  output logic            uw_ready,
  input  logic [3:0]      uw_view,
  input  logic [UX_W-1:0] uw_ux,
  input  logic [UY_W-1:0] uw_uy,
  input  unit_t           uw_data,
  input  logic [7:0]      uw_mask,
  // bus 0: view-synthesis bus, bus 1: decoder bus
  output bus_req_t        bus0_req,
  input  logic            bus0_ready,
  input  bus_rsp_t        bus0_rsp,
  output bus_req_t        bus1_req,
  input  logic            bus1_ready,
  input  logic            bus1_rvalid,  // bus 1 carries writes only; checked to stay low
  // statistics
  output logic [31:0]     rd_beats,
  output logic [31:0]     wr_beats_bus0,
  output logic [31:0]     wr_beats_bus1
);
  // ---------------- read engine ----------------
  logic        r_busy;
  logic [1:0]  r_iss, r_got;
  logic [31:0] r_addr;
  unit_t       r_line;
  bus_req_t    r_req;

  assign lr_ready = !r_busy && !lf_valid;

  always_comb begin
    r_req       = '0;
    r_req.valid = r_busy && (r_iss < 2'd3);
    r_req.addr  = r_addr + 32'(r_iss) * 32'd8;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_busy   <= 1'b0;
      r_iss    <= '0;
      r_got    <= '0;
      r_addr   <= '0;
      lf_valid <= 1'b0;
      rd_beats <= '0;
    end else begin
      lf_valid <= 1'b0;
      if (lr_valid && lr_ready) begin
        r_busy <= 1'b1;
        r_iss  <= '0;
        r_got  <= '0;
        r_addr <= src_base[lr_view] + (32'(lr_uy) * 32'(UNITS_ROW) + 32'(lr_ux)) * 32'(UNIT_BYTES);
      end else if (r_busy) begin
        if (r_req.valid && bus0_ready) begin
          r_iss    <= r_iss + 2'd1;
          rd_beats <= rd_beats + 1;
        end
        if (bus0_rsp.rvalid) begin
          r_got <= r_got + 2'd1;
          if (r_got == 2'd2) begin
            r_busy   <= 1'b0;
            lf_valid <= 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (r_busy && bus0_rsp.rvalid) begin
      case (r_got)
        2'd0:    r_line.y <= bus0_rsp.rdata;
        2'd1:    r_line.d <= bus0_rsp.rdata;
        default: begin
          r_line.u <= bus0_rsp.rdata[15:0];
          r_line.v <= bus0_rsp.rdata[31:16];
        end
      endcase
    end
  end

  assign lf_data = r_line;

  // ---------------- write engine ----------------
  logic        w_busy, w_bus1;
  logic [1:0]  w_iss;
  logic [31:0] w_addr;
  unit_t       w_data;
  logic [7:0]  w_mask;
  bus_req_t    w_req;
  logic        w_take;

  assign uw_ready = !w_busy;

  always_comb begin
    logic [1:0] cm;
    cm[0] = |{w_mask[0], w_mask[1], w_mask[4], w_mask[5]};
    cm[1] = |{w_mask[2], w_mask[3], w_mask[6], w_mask[7]};
    w_req       = '0;
    w_req.valid = w_busy;
    w_req.we    = 1'b1;
    w_req.addr  = w_addr + 32'(w_iss) * 32'd8;
    case (w_iss)
      2'd0:    begin w_req.wdata = w_data.y; w_req.wstrb = w_mask; end
      2'd1:    begin w_req.wdata = w_data.d; w_req.wstrb = w_mask; end
      default: begin
        w_req.wdata = {32'd0, w_data.v, w_data.u};
        w_req.wstrb = {4'd0, cm[1], cm[0], cm[1], cm[0]};
      end
    endcase
  end

  // bus 0 carries the read beats first; writes use it only in the other modes
  always_comb begin
    bus0_req = r_req.valid ? r_req : (w_bus1 ? '0 : w_req);
    bus1_req = w_bus1 ? w_req : '0;
    w_take   = w_busy && (w_bus1 ? bus1_ready : (!r_req.valid && bus0_ready));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_busy        <= 1'b0;
      w_bus1        <= 1'b0;
      w_iss         <= '0;
      w_addr        <= '0;
      w_data        <= '0;
      w_mask        <= '0;
      wr_beats_bus0 <= '0;
      wr_beats_bus1 <= '0;
    end else begin
      // only writes travel on bus 1, so no read data may come back on it
      assert (!bus1_rvalid);
      if (uw_valid && uw_ready) begin
        w_busy <= 1'b1;
        w_bus1 <= mode_full;
        w_iss  <= '0;
        w_addr <= dst_base[uw_view] + (32'(uw_uy) * 32'(UNITS_ROW) + 32'(uw_ux)) * 32'(UNIT_BYTES);
        w_data <= uw_data;
        w_mask <= uw_mask;
      end else if (w_take) begin
        w_iss <= w_iss + 2'd1;
        if (w_bus1) wr_beats_bus1 <= wr_beats_bus1 + 1;
        else        wr_beats_bus0 <= wr_beats_bus0 + 1;
        if (w_iss == 2'd2) w_busy <= 1'b0;
      end
    end
  end

endmodule
