// tb_bus_if: line reads and masked unit writes run concurrently against two memory models.
// Every line fill is compared with the test scene; every written unit is read back byte by byte
// from the memory of the bus it should use (bus 0, or bus 1 in full-utilization mode), and bytes
// outside the mask must stay unwritten. The beat counters are checked at the end.
module tb_bus_if;
  import fvvs_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic mode_full; logic [31:0] src_base [2]; logic [31:0] dst_base [9];
  logic lr_valid, lr_ready, lr_view, lf_valid; logic [9:0] lr_ux; logic [10:0] lr_uy; unit_t lf_data;
  logic uw_valid, uw_ready; logic [3:0] uw_view; logic [9:0] uw_ux; logic [10:0] uw_uy; unit_t uw_data; logic [7:0] uw_mask;
  bus_req_t bus0_req, bus1_req; logic bus0_ready, bus1_ready; bus_rsp_t bus0_rsp, bus1_rsp;
  logic bus1_rvalid;
  assign bus1_rvalid = bus1_rsp.rvalid;
  logic [31:0] rd_beats, wr_beats_bus0, wr_beats_bus1;
  int checks = 0, failures = 0;
  int n_lines = 0, n_w0 = 0, n_w1 = 0;
  bit rd_done = 0, wr_done = 0;

  bus_if dut (.*);
  tb_dram #(.SRC_BASE0(64'h0), .SRC_BASE1(64'h0400_0000)) m0 (.clk, .rst_n, .req(bus0_req), .ready(bus0_ready), .rsp(bus0_rsp));
  tb_dram #(.SRC_BASE0(64'h7000_0000), .SRC_BASE1(64'h7400_0000)) m1 (.clk, .rst_n, .req(bus1_req), .ready(bus1_ready), .rsp(bus1_rsp));

  initial begin
    src_base[0] = 32'h0; src_base[1] = 32'h0400_0000;
    for (int v = 0; v < 9; v++) dst_base[v] = 32'h1000_0000 + 32'(v) * 32'h0200_0000;
  end

  // line reads
  initial begin
    lr_valid = 0; lr_view = 0; lr_ux = 0; lr_uy = 0;
    wait (rst_n);
    for (int n = 0; n < 150; n++) begin
      int v, ux, uy;
      unit_t e;
      @(negedge clk);
      v = $urandom % 2; ux = $urandom % 1024; uy = $urandom % 1080;
      lr_valid = 1; lr_view = v[0]; lr_ux = 10'(ux); lr_uy = 11'(uy);
      @(posedge clk); while (!lr_ready) @(posedge clk);
      @(negedge clk); lr_valid = 0;
      while (!lf_valid) @(negedge clk);
      e.y = unit_word(v, ux, uy, 0); e.d = unit_word(v, ux, uy, 1);
      e.u = unit_word(v, ux, uy, 2)[15:0]; e.v = unit_word(v, ux, uy, 2)[31:16];
      checks++; n_lines++;
      if (lf_data !== e) begin failures++; $display("FAIL line v%0d (%0d,%0d)", v, ux, uy); end
    end
    rd_done = 1;
  end

  // unit writes
  typedef struct { longint a; unit_t d; logic [7:0] m; bit b1; } w_t;
  w_t wl[$];
  initial begin
    uw_valid = 0; uw_view = 0; uw_ux = 0; uw_uy = 0; uw_data = '0; uw_mask = 0; mode_full = 0;
    wait (rst_n);
    for (int n = 0; n < 200; n++) begin
      w_t w; int v, ux, uy;
      @(negedge clk);
      if (n == 100) mode_full = 1;
      v = $urandom % 9; ux = $urandom % 1024; uy = $urandom % 1080;
      uw_valid = 1; uw_view = 4'(v); uw_ux = 10'(ux); uw_uy = 11'(uy);
      uw_data = {$urandom, $urandom, $urandom, $urandom, $urandom};
      uw_mask = 8'($urandom); if (uw_mask == 0) uw_mask = 8'h81;
      w.a = longint'(dst_base[v]) + (longint'(uy) * 1024 + ux) * 32; w.d = uw_data; w.m = uw_mask; w.b1 = mode_full;
      wl.push_back(w);
      @(posedge clk); while (!uw_ready) @(posedge clk);
      @(negedge clk); uw_valid = 0;
      if (w.b1) n_w1++; else n_w0++;
      repeat ($urandom % 4) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    wr_done = 1;
  end

  function automatic bit mem_byte(bit b1, longint a, output logic [7:0] v);
    if (b1) begin if (!m1.byte_written(a)) return 0; v = m1.get_byte(a); end
    else    begin if (!m0.byte_written(a)) return 0; v = m0.get_byte(a); end
    return 1;
  endfunction

  initial begin
    wait (rst_n);
    wait (rd_done && wr_done);
    foreach (wl[n]) begin
      logic [7:0] b; bit c0, c1;
      c0 = |{wl[n].m[0], wl[n].m[1], wl[n].m[4], wl[n].m[5]};
      c1 = |{wl[n].m[2], wl[n].m[3], wl[n].m[6], wl[n].m[7]};
      for (int p = 0; p < 8; p++) begin
        checks++;
        if (wl[n].m[p]) begin
          if (!mem_byte(wl[n].b1, wl[n].a + p, b) || b != wl[n].d.y[8*p +: 8]) begin failures++; $display("FAIL Y write %0d/%0d", n, p); end
          if (!mem_byte(wl[n].b1, wl[n].a + 8 + p, b) || b != wl[n].d.d[8*p +: 8]) begin failures++; $display("FAIL D write %0d/%0d", n, p); end
        end else if (mem_byte(wl[n].b1, wl[n].a + p, b) || mem_byte(!wl[n].b1, wl[n].a + p, b)) begin
          failures++; $display("FAIL unmasked byte written %0d/%0d", n, p);
        end
      end
      checks++;
      if (c0 && (!mem_byte(wl[n].b1, wl[n].a + 16, b) || b != wl[n].d.u[7:0])) begin failures++; $display("FAIL U0 %0d", n); end
      if (c1 && (!mem_byte(wl[n].b1, wl[n].a + 19, b) || b != wl[n].d.v[15:8])) begin failures++; $display("FAIL V1 %0d", n); end
      if (!c1 && mem_byte(wl[n].b1, wl[n].a + 17, b)) begin failures++; $display("FAIL U1 written %0d", n); end
    end
    checks++;
    if (int'(rd_beats) != 3 * n_lines || int'(wr_beats_bus0) != 3 * n_w0 || int'(wr_beats_bus1) != 3 * n_w1) begin
      failures++; $display("FAIL beat counters %0d %0d %0d", rd_beats, wr_beats_bus0, wr_beats_bus1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
