// tb_fvvs_ctrl: the stages are replaced by models that answer each start with a done after a
// random delay. For every mode, with DWRFS on and off and with and without holes left by the main
// view, the recorded stage sequence, the disparity scales handed to the warping engine, the
// destination views and the status counters are compared with the expected schedule.
module tb_fvvs_ctrl;
  import fvvs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fvvs_mode_e mode; logic dwrfs_en;
  logic signed [7:0] disp_off [2], disp_step [2];
  logic job_valid, job_ready; job_t job, cur_job;
  logic tr_start, tr_view, tr_done, we_start, we_pass, we_parallel, we_done;
  logic signed [7:0] we_scale [3];
  logic [63:0] vmask [3];
  logic ip_start, ip_done, ir_start, ir_done, busy; logic [1:0] ip_sel; logic [3:0] ir_view;
  logic [31:0] blocks_done, view2_loads, view2_skips;
  int checks = 0, failures = 0;
  bit holes_after_w0;

  fvvs_ctrl dut (.*);

  int ev[$];   // event codes: 100+view (TR), 200+pass (W), 300+sel (IP), 400+view (IR)

  // stage models
  initial begin
    tr_done = 0; we_done = 0; ip_done = 0; ir_done = 0;
    for (int b = 0; b < 3; b++) vmask[b] = '1;
    forever begin
      @(posedge clk);
      tr_done <= 0; we_done <= 0; ip_done <= 0; ir_done <= 0;
      if (tr_start) begin
        ev.push_back(100 + tr_view);
        repeat (1 + $urandom % 4) @(posedge clk);
        tr_done <= 1;
      end else if (we_start) begin
        ev.push_back(200 + we_pass);
        for (int b = 0; b < 3; b++) ev.push_back(1000 + int'(we_scale[b]));
        checks++;
        if (we_parallel != (mode != MODE_GENERAL)) begin failures++; $display("FAIL parallel flag"); end
        repeat (1 + $urandom % 4) @(posedge clk);
        for (int b = 0; b < 3; b++) vmask[b] <= (!we_pass && holes_after_w0) ? 64'hFFFF_0FFF_FFFF_FFFF : '1;
        we_done <= 1;
      end else if (ip_start) begin
        ev.push_back(300 + ip_sel);
        repeat (1 + $urandom % 4) @(posedge clk);
        ip_done <= 1;
      end else if (ir_start) begin
        ev.push_back(400 + ir_view);
        repeat (1 + $urandom % 4) @(posedge clk);
        ir_done <= 1;
      end
    end
  end

  initial begin
    int exp_blocks = 0, exp_loads = 0, exp_skips = 0;
    job_valid = 0; job = '0; mode = MODE_GENERAL; dwrfs_en = 0;
    disp_off[0] = 0; disp_step[0] = 1; disp_off[1] = -10; disp_step[1] = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 36; t++) begin
      int e[$]; int ng, nv; bit two;
      mode = fvvs_mode_e'(t % 3); dwrfs_en = (t / 3) % 2; holes_after_w0 = (t / 6) % 2;
      ng = (mode == MODE_FULL) ? 3 : 1; nv = (mode == MODE_GENERAL) ? 1 : 3;
      two = dwrfs_en && holes_after_w0;
      e.delete();
      for (int g = 0; g < ng; g++) begin
        e.push_back(100); e.push_back(200);
        for (int b = 0; b < 3; b++) e.push_back(1000 + int'(disp_off[0]) + int'(disp_step[0]) * (3*g + b + 1));
        if (two) begin
          e.push_back(101); e.push_back(201);
          for (int b = 0; b < 3; b++) e.push_back(1000 + int'(disp_off[1]) + int'(disp_step[1]) * (3*g + b + 1));
          exp_loads++;
        end else if (dwrfs_en) exp_skips++;
        for (int b = 0; b < nv; b++) begin
          e.push_back(300 + b);
          e.push_back(400 + ((mode == MODE_GENERAL) ? 0 : 3*g + b));
        end
      end
      exp_blocks++;
      ev.delete();
      @(negedge clk);
      job_valid = 1; job = job_t'({$urandom, $urandom, $urandom});
      @(negedge clk); job_valid = 0;
      while (busy) @(negedge clk);
      checks++;
      if (ev.size() != e.size()) begin failures++; $display("FAIL t %0d: %0d events, expected %0d", t, ev.size(), e.size()); end
      else foreach (e[k]) if (ev[k] != e[k]) begin failures++; $display("FAIL t %0d event %0d: %0d vs %0d", t, k, ev[k], e[k]); break; end
      checks++;
      if (int'(blocks_done) != exp_blocks || int'(view2_loads) != exp_loads || int'(view2_skips) != exp_skips) begin
        failures++; $display("FAIL counters %0d %0d %0d", blocks_done, view2_loads, view2_skips);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
