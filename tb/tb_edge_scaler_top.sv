// tb_edge_scaler_top -- end-to-end test of the scaler.
//
// Scales a series of frames, enlargements and reductions in each axis, with
// grey images made of random pixels and of sharp vertical/horizontal/diagonal
// edges, and compares every target pixel with scaler_ref_pkg. It also checks
// the seven-clock latency from issue to output, that the source is only read
// inside the image, and that each mechanism of the design was exercised:
// line-buffer fill passes, line-buffer updates during a pass, reuse of a row
// pair for several target rows, replicated border columns, regulated column
// and row steps of both signs, both edge-catcher row choices, LA > 0 / < 0 / 0,
// and all six window sizes.
`timescale 1ns/1ps
module tb_edge_scaler_top;
  import scaler_pkg::*;
  import scaler_ref_pkg::*;

  localparam int MAXPIX = 64 * 64;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  frame_cfg_t cfg;
  logic busy, done, src_rd, ft_valid;
  coord_t src_x, src_y;
  pix_t src_pix, ft_pix;

  always #5 clk = ~clk;

  edge_scaler_top #(.LB_DEPTH(64)) dut (
    .clk, .rst_n, .start, .cfg, .busy, .done,
    .src_rd, .src_x, .src_y, .src_pix, .ft_valid, .ft_pix);

  int checks = 0, failures = 0;
  byte unsigned src[];
  byte unsigned exp_img[];
  int out_cnt;
  longint cyc = 0;
  longint emit_q[$];
  ref_stats_t rs;

  // mechanism counters
  int n_fill, n_update, n_reuse, n_dup, n_regp, n_regn, n_vregp, n_vregn;
  int n_wlog[6];

  always @(posedge clk) cyc <= cyc + 1;

  // source frame memory, one clock read latency
  int sw_i, sh_i, rd_idx;
  assign sw_i = int'(cfg.sw);
  assign sh_i = int'(cfg.sh);
  assign rd_idx = int'(src_y) * sw_i + int'(src_x);

  always @(posedge clk) begin
    if (src_rd) begin
      if (int'(src_x) >= sw_i || int'(src_y) >= sh_i) begin
        failures++;
        $display("FAIL: source read outside image at (%0d,%0d)", src_x, src_y);
        src_pix <= '0;
      end else src_pix <= src[rd_idx];
    end
  end

  // issue times, and output check
  always @(posedge clk) begin
    if (rst_n && dut.h_emit) emit_q.push_back(cyc);
    if (rst_n && ft_valid) begin
      longint t0;
      t0 = emit_q.pop_front();
      checks++;
      if (cyc - t0 != 7) begin
        failures++;
        $display("FAIL: latency %0d, expected 7", cyc - t0);
      end
      checks++;
      if (out_cnt >= exp_img.size() || ft_pix != exp_img[out_cnt]) begin
        failures++;
        if (failures < 20)
          $display("FAIL: pixel %0d (x=%0d y=%0d) got %0d expected %0d", out_cnt,
                   out_cnt % int'(cfg.tw), out_cnt / int'(cfg.tw), ft_pix,
                   (out_cnt < exp_img.size()) ? exp_img[out_cnt] : -1);
      end
      out_cnt++;
    end
  end

  // mechanism monitors
  always @(posedge clk) begin
    if (dut.u_ctrl.st == dut.u_ctrl.S_ROW) begin
      if (!(dut.u_ctrl.lb_valid && dut.u_ctrl.lb_row == dut.cur_n)) n_fill++;
      else if (!(dut.u_ctrl.has_next && dut.u_ctrl.next_n > dut.cur_n)) n_reuse++;
      if (dut.u_ctrl.has_next && dut.u_ctrl.next_n > dut.cur_n) n_update++;
    end
    if (dut.rb_shift && dut.rb_dup) n_dup++;
    // one target pixel per clock inside a pass whenever the image is not
    // reduced horizontally
    if (rst_n && dut.u_ctrl.st == dut.u_ctrl.S_PASS && !dut.h_done && cfg.tw >= cfg.sw) begin
      checks++;
      if (!dut.h_emit) begin
        failures++;
        $display("FAIL: no target pixel issued in a pass clock of an enlargement");
      end
    end
    if (dut.h_shift && dut.u_am.h_reg && dut.u_am.rw_abs != 0) begin
      if (dut.u_am.rw_neg) n_regn++; else n_regp++;
    end
    if (dut.v_step && dut.u_am.v_reg && dut.u_am.rh_abs != 0) begin
      if (dut.u_am.rh_neg) n_vregn++; else n_vregp++;
    end
  end

  task automatic make_image(int sw, int sh, int kind);
    src = new[sw * sh];
    for (int y = 0; y < sh; y++)
      for (int x = 0; x < sw; x++) begin
        int v;
        case (kind)
          0: v = $urandom_range(0, 255);
          1: v = (x < sw / 2) ? 20 : 230;                     // vertical edge
          2: v = (y < sh / 3) ? 240 : ((y < 2 * sh / 3) ? 128 : 10);
          3: v = ((x + y) < (sw + sh) / 2) ? 30 + x : 200 - y; // diagonal ramp edge
          default: v = ((x / 3 + y / 2) % 2) ? 250 : 5;        // checker
        endcase
        src[y * sw + x] = byte'(v);
      end
  endtask

  task automatic run_frame(int sw, int sh, int tw, int th, int kind);
    int t_start;
    make_image(sw, sh, kind);
    scale(sw, sh, tw, th, src, exp_img, rs);
    n_wlog[wlog(sw, tw)]++;
    n_wlog[wlog(sh, th)]++;
    cfg = '{sw: coord_t'(sw), sh: coord_t'(sh), tw: coord_t'(tw), th: coord_t'(th)};
    out_cnt = 0;
    emit_q.delete();
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done);
    @(negedge clk);
    checks++;
    if (out_cnt != tw * th) begin
      failures++;
      $display("FAIL: %0dx%0d->%0dx%0d produced %0d pixels, expected %0d", sw, sh, tw, th,
               out_cnt, tw * th);
    end
    checks++;
    if (busy) begin
      failures++;
      $display("FAIL: busy after done");
    end
  endtask

  initial begin
    cfg = '0;
    src_pix = '0;
    rs = '{default: 0};
    n_fill = 0; n_update = 0; n_reuse = 0; n_dup = 0;
    n_regp = 0; n_regn = 0; n_vregp = 0; n_vregn = 0;
    foreach (n_wlog[i]) n_wlog[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    run_frame(4, 4, 5, 5, 0);       // the 4x4 -> 5x5 example
    run_frame(8, 8, 11, 11, 0);     // rounding down: positive regulation
    run_frame(8, 8, 13, 13, 1);     // rounding up: negative regulation
    run_frame(10, 10, 10, 10, 2);   // identity
    run_frame(16, 12, 7, 5, 3);     // reduction
    run_frame(12, 9, 40, 30, 0);    // x3.3
    run_frame(40, 33, 6, 5, 4);     // about 1/7
    run_frame(5, 7, 37, 50, 3);     // about x7
    run_frame(20, 16, 9, 29, 0);    // reduce x, enlarge y
    run_frame(9, 17, 30, 3, 1);     // enlarge x, reduce y
    run_frame(24, 24, 64, 5, 4);    // wide
    run_frame(2, 2, 15, 15, 0);     // smallest source
    run_frame(33, 20, 18, 40, 3);

    // mechanism coverage
    begin
      int cov[string];
      cov["line-buffer fill pass"]      = n_fill;
      cov["line-buffer update in pass"] = n_update;
      cov["row pair reused"]            = n_reuse;
      cov["replicated border column"]   = n_dup;
      cov["column regulation +1"]       = n_regp;
      cov["column regulation -1"]       = n_regn;
      cov["row regulation +1"]          = n_vregp;
      cov["row regulation -1"]          = n_vregn;
      cov["upper row chosen (U_GE=1)"]  = rs.uge1;
      cov["lower row chosen (U_GE=0)"]  = rs.uge0;
      cov["LA > 0"]                     = rs.la_pos;
      cov["LA < 0"]                     = rs.la_neg;
      cov["LA = 0"]                     = rs.la_zero;
      cov["area tuned"]                 = rs.tuned;
      for (int i = 0; i < 6; i++) cov[$sformatf("window %0d", 1 << i)] = n_wlog[i];
      foreach (cov[s]) begin
        $display("coverage: %-28s %0d", s, cov[s]);
        checks++;
        if (cov[s] == 0) begin
          failures++;
          $display("FAIL: mechanism never exercised: %s", s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
