// tb_scaler_controller -- checks the sequencing done by the controller.
//
// The controller runs with the approximate module it commands; the source,
// the line buffer and the register bank are modelled here with pixel "tags"
// (row << 12 | column) instead of grey values, so the tb can see exactly which
// source pixel sits where. For every target pixel the modelled register bank,
// two clocks after the pixel is issued, must hold columns m-1..m+2 (clamped)
// of source rows n and n+1 (clamped) as given by scaler_ref_pkg. Also checked:
// source reads stay inside the image, every row issues TW pixels, the frame
// issues TW*TH pixels and then pulses done, the bit-shift control equals
// log2(winw*winh), and each pass clock of an enlargement issues a pixel.
`timescale 1ns/1ps
module tb_scaler_controller;
  import scaler_pkg::*;
  import scaler_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  frame_cfg_t cfg;
  logic busy, done, am_init, param_ready, v_start, v_next, v_step, v_latch, v_need;
  logic h_start, h_shift, h_emit, h_need_shift, h_can_emit, h_done, am_valid;
  wlog_t winw_log2, winh_log2;
  coord_t v_n, cur_n, h_m, src_x, src_y, lb_raddr, lb_waddr;
  logic src_rd, lb_re, lb_we, rb_shift, rb_dup;
  logic [3:0] shamt;
  sides_t am_sides;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  scaler_controller dut (
    .clk, .rst_n, .start, .cfg, .busy, .done,
    .am_init, .param_ready, .winw_log2, .winh_log2,
    .v_start, .v_next, .v_step, .v_latch, .v_need, .v_n, .cur_n,
    .h_start, .h_shift, .h_emit, .h_need_shift, .h_can_emit, .h_done, .h_m,
    .src_rd, .src_x, .src_y, .lb_re, .lb_raddr, .lb_we, .lb_waddr,
    .rb_shift, .rb_dup, .shamt);

  approx_module u_am (
    .clk, .rst_n, .cfg, .init(am_init), .param_ready, .winw_log2, .winh_log2,
    .v_start, .v_next, .v_step, .v_latch, .v_need, .v_n, .cur_n,
    .h_start, .h_shift, .h_emit, .h_need_shift, .h_can_emit, .h_done, .h_m,
    .out_valid(am_valid), .out_sides(am_sides));

  int mx[], lx[], ny[], ty[];
  int src_tag, lb_tag;
  int lbm[4096];
  int up[4], lo[4];
  int emits, sw_i, sh_i, tw_i;
  logic e1, e2;
  int e1_idx, e2_idx;

  function automatic int tag(int x, int y); return (y << 12) | x; endfunction
  function automatic int cl(int v, int hi); return v < 0 ? 0 : (v > hi ? hi : v); endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      e1 <= 1'b0; e2 <= 1'b0;
    end else begin
      // check the window of the pixel issued two clocks ago
      if (e2) begin
        int k, l, m, n, n1;
        k = e2_idx % tw_i; l = e2_idx / tw_i;
        m = mx[k]; n = ny[l]; n1 = cl(n + 1, sh_i - 1);
        checks++;
        for (int i = 0; i < 4; i++) begin
          if (up[i] != tag(cl(m - 1 + i, sw_i - 1), n) || lo[i] != tag(cl(m - 1 + i, sw_i - 1), n1)) begin
            failures++;
            $display("FAIL: pixel (%0d,%0d) window slot %0d holds %h/%h", k, l, i, up[i], lo[i]);
            break;
          end
        end
      end
      e2 <= e1; e2_idx <= e1_idx;
      e1 <= h_emit; e1_idx <= emits;
      if (h_emit) emits <= emits + 1;
      if (busy && dut.st == dut.S_PASS && !h_done && cfg.tw >= cfg.sw) begin
        checks++;
        if (!h_emit) begin failures++; $display("FAIL: idle pass clock in an enlargement"); end
      end
      // register bank model
      if (rb_shift) begin
        for (int j = 0; j < 3; j++) begin up[j] <= up[j+1]; lo[j] <= lo[j+1]; end
        up[3] <= rb_dup ? up[3] : lb_tag;
        lo[3] <= rb_dup ? lo[3] : src_tag;
      end
      // line buffer model, written with the source pixel read one clock ago
      if (lb_we) lbm[lb_waddr] <= src_tag;
      if (lb_re) lb_tag <= lbm[lb_raddr];
      // source model
      if (src_rd) begin
        if (int'(src_x) >= sw_i || int'(src_y) >= sh_i) begin
          failures++;
          $display("FAIL: source read outside image (%0d,%0d)", src_x, src_y);
        end
        src_tag <= tag(int'(src_x), int'(src_y));
      end
    end
  end

  task automatic run(int sw, int sh, int tw, int th);
    walk(sw, tw, mx, lx);
    walk(sh, th, ny, ty);
    sw_i = sw; sh_i = sh; tw_i = tw;
    cfg = '{sw: coord_t'(sw), sh: coord_t'(sh), tw: coord_t'(tw), th: coord_t'(th)};
    emits = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done);
    @(negedge clk);
    checks++;
    if (int'(shamt) != wlog(sw, tw) + wlog(sh, th)) begin
      failures++; $display("FAIL: shamt %0d", shamt);
    end
    checks++;
    if (emits != tw * th) begin
      failures++;
      $display("FAIL: %0dx%0d->%0dx%0d issued %0d pixels", sw, sh, tw, th, emits);
    end
  endtask

  initial begin
    cfg = '0;
    foreach (up[i]) begin up[i] = 0; lo[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(8, 8, 11, 11);
    run(8, 8, 13, 13);
    run(16, 12, 7, 5);
    run(5, 7, 37, 50);
    run(40, 33, 6, 5);
    run(2, 2, 15, 15);
    run(20, 16, 9, 29);
    run(9, 17, 30, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
