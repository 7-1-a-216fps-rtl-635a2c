// tb_texture_reorder: the testbench plays the cache. For random blocks, patterns and scan orders
// (some at the frame border, to exercise clamping) it checks the requested positions, the 64
// pixels in the block buffer, and - with a cache that always hits - the 66-cycle block time.
module tb_texture_reorder;
  import fvvs_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, view, transpose, busy, done; crd_t ox, oy; pattern_e pat;
  pix_t blk [64];
  logic req_valid, req_ready, req_view, rsp_valid; logic [11:0] req_x; logic [11:0] req_y; pix_t rsp_pix;
  int checks = 0, failures = 0, cyc = 0;
  bit always_hit = 0;

  texture_reorder dut (.*);

  typedef struct { int v, x, y; } r_t;
  r_t q[$];
  always @(posedge clk) cyc <= cyc + 1;

  // cache model: accepts when ready, answers in order one or more cycles later
  always @(posedge clk) begin
    rsp_valid <= 0;
    if (rst_n) begin
      if (req_valid && req_ready) begin
        r_t r; r.v = req_view; r.x = req_x; r.y = req_y; q.push_back(r);
      end
      if (q.size() > 0 && (always_hit || ($urandom % 3) != 0)) begin
        r_t r; r = q.pop_front();
        rsp_valid <= 1; rsp_pix <= mem_pix(r.v, r.x, r.y);
      end
      req_ready <= always_hit || (($urandom % 4) != 0 && q.size() < 2);
    end
  end

  function automatic int clampi(int a, int lo, int hi);
    return a < lo ? lo : a > hi ? hi : a;
  endfunction

  initial begin
    start = 0; view = 0; transpose = 0; ox = 0; oy = 0; pat = PAT_0; req_ready = 0; rsp_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 40; b++) begin
      int t0;
      always_hit = (b % 4 == 0);
      @(negedge clk);
      view = $urandom % 2; transpose = $urandom % 2; pat = pattern_e'($urandom % 7);
      ox = crd_t'($urandom % 4100); oy = crd_t'($urandom % 2170);
      if (b == 1) begin ox = 0; oy = 0; end
      start = 1; t0 = cyc;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      if (always_hit) begin
        checks++;
        if (cyc - t0 != 66) begin failures++; $display("FAIL block time %0d", cyc - t0); end
      end
      for (int n = 0; n < 64; n++) begin
        int i, j, x, y;
        i = n / 8; j = n % 8;
        if (!transpose) begin x = int'(ox) + i; y = int'(oy) + j + pat_off(pat, i); end
        else            begin x = int'(ox) + j + pat_off(pat, i); y = int'(oy) + i; end
        x = clampi(x, 0, 4095); y = clampi(y, 0, 2159);
        checks++;
        if (blk[n] !== mem_pix(view, x, y)) begin
          failures++; $display("FAIL blk %0d n %0d: %h vs %h", b, n, blk[n], mem_pix(view, x, y));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
