// tb_approx_module -- drives the approximate module the way the controller
// does (vertical walk per row, then shift/issue every clock along the row)
// for several enlargement and reduction ratios, and checks the window sizes,
// the source coordinates (m,n) and left/right/top/bottom of every target
// pixel against the closed-form grid positions of scaler_ref_pkg, and the
// two-clock latency from issue to out_valid.
`timescale 1ns/1ps
module tb_approx_module;
  import scaler_pkg::*;
  import scaler_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  frame_cfg_t cfg;
  logic init = 0, param_ready, v_start = 0, v_next = 0, v_step = 0, v_latch = 0, v_need;
  logic h_start = 0, h_shift = 0, h_emit = 0, h_need_shift, h_can_emit, h_done, out_valid;
  wlog_t winw_log2, winh_log2;
  coord_t v_n, cur_n, h_m;
  sides_t out_sides;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  approx_module dut (.clk, .rst_n, .cfg, .init, .param_ready, .winw_log2, .winh_log2,
    .v_start, .v_next, .v_step, .v_latch, .v_need, .v_n, .cur_n,
    .h_start, .h_shift, .h_emit, .h_need_shift, .h_can_emit, .h_done, .h_m,
    .out_valid, .out_sides);

  int mx[], lx[], ny[], ty[];
  int exp_k[$];
  int cur_l, winw, winh;

  // stage-2 outputs, two clocks after issue
  logic emit_d1, emit_d2;
  always @(posedge clk) begin
    emit_d1 <= h_emit;
    emit_d2 <= emit_d1;
    if (rst_n && out_valid !== emit_d2) begin
      failures++;
      $display("FAIL: out_valid not two clocks after issue");
    end
    if (rst_n && out_valid) begin
      int k;
      k = exp_k.pop_front();
      checks++;
      if (int'(out_sides.left) != lx[k] || int'(out_sides.right) != winw - lx[k] ||
          int'(out_sides.top) != ty[cur_l] || int'(out_sides.bottom) != winh - ty[cur_l]) begin
        failures++;
        $display("FAIL: (%0d,%0d) sides %p expected l=%0d t=%0d", k, cur_l, out_sides, lx[k],
                 ty[cur_l]);
      end
    end
  end

  task automatic run(int sw, int sh, int tw, int th);
    walk(sw, tw, mx, lx);
    walk(sh, th, ny, ty);
    winw = 1 << wlog(sw, tw);
    winh = 1 << wlog(sh, th);
    cfg = '{sw: coord_t'(sw), sh: coord_t'(sh), tw: coord_t'(tw), th: coord_t'(th)};
    @(negedge clk) init = 1'b1;
    @(negedge clk) init = 1'b0;
    while (!param_ready) @(negedge clk);
    checks++;
    if (int'(winw_log2) != wlog(sw, tw) || int'(winh_log2) != wlog(sh, th)) begin
      failures++;
      $display("FAIL: window logs %0d %0d", winw_log2, winh_log2);
    end
    v_start = 1'b1;
    @(negedge clk) v_start = 1'b0;
    for (int l = 0; l < th; l++) begin
      if (l > 0) begin
        v_next = 1'b1;
        @(negedge clk) v_next = 1'b0;
      end
      while (v_need) begin
        v_step = 1'b1;
        @(negedge clk) v_step = 1'b0;
      end
      v_latch = 1'b1;
      @(negedge clk) v_latch = 1'b0;
      repeat (3) @(negedge clk);   // let the previous row leave stage 2
      cur_l = l;
      checks++;
      if (int'(cur_n) != ny[l]) begin
        failures++;
        $display("FAIL: row %0d n=%0d expected %0d", l, cur_n, ny[l]);
      end
      h_start = 1'b1;
      @(negedge clk) h_start = 1'b0;
      begin
        int k;
        k = 0;
        while (!h_done) begin
          h_shift = h_need_shift;
          h_emit = h_can_emit;
          if (h_emit) begin
            int m_eff;
            m_eff = int'(h_m) + (h_shift ? 1 : 0);
            checks++;
            if (m_eff != mx[k]) begin
              failures++;
              $display("FAIL: (%0d,%0d) m=%0d expected %0d", k, l, m_eff, mx[k]);
            end
            exp_k.push_back(k);
            k++;
          end
          @(negedge clk);
          h_shift = 1'b0;
          h_emit = 1'b0;
        end
        checks++;
        if (k != tw) begin failures++; $display("FAIL: %0d pixels in row", k); end
      end
    end
    repeat (4) @(negedge clk);
  endtask

  initial begin
    cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(8, 8, 11, 11);
    run(8, 8, 13, 13);
    run(640, 4, 1920, 9);
    run(100, 60, 13, 23);
    run(37, 19, 290, 151);
    run(1920, 3, 241, 2);
    run(7, 1080, 9, 240);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
