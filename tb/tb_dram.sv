// tb_dram: behavioural model of external memory on one 64-bit bus (testbench only).
// Unwritten addresses inside the two source-view areas return the test scene of tb_ref_pkg;
// written bytes are kept in a sparse array. Requests are accepted with random stalls; read data
// returns in order, a few cycles later.
module tb_dram
  import fvvs_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter longint SRC_BASE0 = 64'h0000_0000,
  parameter longint SRC_BASE1 = 64'h0400_0000,
  parameter longint SRC_SIZE  = 64'h0400_0000,
  parameter int     UNITS_ROW = 1024,
  parameter int     STALL_PCT = 20
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output logic     ready,
  output bus_rsp_t rsp
);
  logic [7:0] wmem [longint];
  typedef struct { logic [63:0] d; int due; } rd_t;
  rd_t rq[$];
  int cyc = 0;
  int n_reads = 0, n_writes = 0;

  function automatic logic [63:0] read_word(longint a);
    logic [63:0] w;
    longint off;
    int v;
    w = '0;
    v = -1;
    if (a >= SRC_BASE0 && a < SRC_BASE0 + SRC_SIZE) begin v = 0; off = a - SRC_BASE0; end
    if (a >= SRC_BASE1 && a < SRC_BASE1 + SRC_SIZE) begin v = 1; off = a - SRC_BASE1; end
    if (v >= 0) begin
      longint unit;
      unit = off / 32;
      w = unit_word(v, int'(unit % UNITS_ROW), int'(unit / UNITS_ROW), int'((off % 32) / 8));
    end
    for (int b = 0; b < 8; b++)
      if (wmem.exists(a + b)) w[8*b +: 8] = wmem[a + b];
    return w;
  endfunction

  function automatic bit byte_written(longint a);
    return wmem.exists(a);
  endfunction

  function automatic logic [7:0] get_byte(longint a);
    return wmem[a];
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    ready <= ($urandom % 100) >= STALL_PCT;
  end

  always @(posedge clk) begin
    rsp.rvalid <= 1'b0;
    rsp.rdata  <= '0;
    if (rst_n) begin
      if (req.valid && ready) begin
        if (req.we) begin
          n_writes++;
          for (int b = 0; b < 8; b++)
            if (req.wstrb[b]) wmem[longint'(req.addr) + b] = req.wdata[8*b +: 8];
        end else begin
          rd_t r;
          n_reads++;
          r.d = read_word(longint'(req.addr));
          r.due = cyc + 2 + int'($urandom % 3);
          if (rq.size() > 0 && rq[$].due >= r.due) r.due = rq[$].due + 1;
          rq.push_back(r);
        end
      end
      if (rq.size() > 0 && rq[0].due <= cyc) begin
        rd_t r;
        r = rq.pop_front();
        rsp.rvalid <= 1'b1;
        rsp.rdata  <= r.d;
      end
    end
  end

  initial begin
    ready = 1'b0;
    rsp   = '0;
  end
endmodule
