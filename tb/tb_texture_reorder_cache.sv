// tb_texture_reorder_cache: random pixel requests in a small window of both views. A line-read
// responder supplies units of the test scene after random delays. Every returned pixel is
// compared with the scene, hit/miss totals with a direct-mapped model, and hits must answer one
// cycle after acceptance. A flush in the middle must make the next access miss.
module tb_texture_reorder_cache;
  import fvvs_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic flush, req_valid, req_ready, req_view, rsp_valid;
  logic [11:0] req_x; logic [11:0] req_y; pix_t rsp_pix;
  logic lr_valid, lr_ready, lr_view, lf_valid; logic [9:0] lr_ux; logic [10:0] lr_uy; unit_t lf_data;
  logic [31:0] hits, misses;
  int checks = 0, failures = 0, cyc = 0;

  texture_reorder_cache dut (.*);

  typedef struct { int v, x, y, acc; bit hit; } q_t;
  q_t q[$];
  int mt_tag[16]; bit mt_val[16];
  int exp_miss = 0, exp_hit = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // line read responder
  initial begin
    lf_valid = 0; lf_data = '0; lr_ready = 0;
    forever begin
      @(posedge clk);
      lf_valid <= 0;
      lr_ready <= ($urandom % 3) != 0;
      if (lr_valid && lr_ready) begin
        int v, ux, uy;
        v = lr_view; ux = lr_ux; uy = lr_uy;
        repeat (2 + $urandom % 5) @(posedge clk);
        lf_data.y <= unit_word(v, ux, uy, 0);
        lf_data.d <= unit_word(v, ux, uy, 1);
        lf_data.u <= unit_word(v, ux, uy, 2)[15:0];
        lf_data.v <= unit_word(v, ux, uy, 2)[31:16];
        lf_valid  <= 1;
        lr_ready  <= 0;
      end
    end
  end

  always @(posedge clk) if (rst_n && rsp_valid) begin
    q_t e;
    pix_t ex;
    e = q.pop_front();
    ex = mem_pix(e.v, e.x, e.y);
    checks++;
    if (rsp_pix !== ex) begin failures++; $display("FAIL pixel v%0d (%0d,%0d): %h vs %h", e.v, e.x, e.y, rsp_pix, ex); end
    if (e.hit) begin
      checks++;
      if (cyc != e.acc + 1) begin failures++; $display("FAIL hit latency %0d", cyc - e.acc); end
    end
  end

  initial begin
    flush = 0; req_valid = 0; req_view = 0; req_x = 0; req_y = 0;
    for (int k = 0; k < 16; k++) mt_val[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n == 1500) begin
        flush = 1; @(negedge clk); flush = 0;
        for (int k = 0; k < 16; k++) mt_val[k] = 0;
      end
      req_valid = ($urandom % 4) != 0;
      req_view  = ($urandom % 8) == 0;
      req_x     = 12'(100 + $urandom % 24);
      req_y     = 12'(40 + $urandom % 20);
      @(posedge clk);
      if (req_valid && req_ready) begin
        q_t e; int ux, uy, idx, tag;
        ux = int'(req_x) / 4; uy = int'(req_y) / 2;
        idx = (uy % 4) * 4 + ux % 4; tag = int'(req_view) * 1000000 + uy * 1024 + ux;
        e.v = req_view; e.x = req_x; e.y = req_y; e.acc = cyc;
        e.hit = mt_val[idx] && mt_tag[idx] == tag;
        if (e.hit) exp_hit++; else begin exp_miss++; mt_val[idx] = 1; mt_tag[idx] = tag; end
        q.push_back(e);
      end else if (req_valid) begin
        // held request: retry the same one
        while (!req_ready) @(posedge clk);
        begin
          q_t e; int ux, uy, idx, tag;
          ux = int'(req_x) / 4; uy = int'(req_y) / 2;
          idx = (uy % 4) * 4 + ux % 4; tag = int'(req_view) * 1000000 + uy * 1024 + ux;
          e.v = req_view; e.x = req_x; e.y = req_y; e.acc = cyc;
          e.hit = mt_val[idx] && mt_tag[idx] == tag;
          if (e.hit) exp_hit++; else begin exp_miss++; mt_val[idx] = 1; mt_tag[idx] = tag; end
          q.push_back(e);
        end
      end
      #1 req_valid = 0;
    end
    repeat (30) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d responses missing", q.size()); end
    checks++;
    if (int'(misses) != exp_miss || int'(hits) != exp_hit + exp_miss) begin
      failures++; $display("FAIL counters: misses %0d/%0d hits %0d/%0d", misses, exp_miss, hits, exp_hit + exp_miss);
    end
    $display("cache: %0d hits, %0d misses", exp_hit, exp_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
