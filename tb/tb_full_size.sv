// tb_full_size -- the scaler at its default parameters on full-size frames.
//
// Frame 1 enlarges a 640 x 480 (VGA) grey image to 1920 x 1080 (full HD);
// frame 2 reduces a 1920 x 1080 image to 320 x 240. Every target pixel is
// compared with scaler_ref_pkg, the seven-clock latency is checked, and the
// clocks per frame are reported. The enlargement must issue at least 0.9
// target pixels per clock over the frame (one per clock inside a row pass).
`timescale 1ns/1ps
module tb_full_size;
  import scaler_pkg::*;
  import scaler_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  frame_cfg_t cfg;
  logic busy, done, src_rd, ft_valid;
  coord_t src_x, src_y;
  pix_t src_pix, ft_pix;

  always #5 clk = ~clk;

  edge_scaler_top dut (
    .clk, .rst_n, .start, .cfg, .busy, .done,
    .src_rd, .src_x, .src_y, .src_pix, .ft_valid, .ft_pix);

  int checks = 0, failures = 0;
  byte unsigned src[];
  byte unsigned exp_img[];
  int out_cnt;
  longint cyc = 0;
  longint emit_q[$];
  ref_stats_t rs;
  int sw_i, rd_idx;

  assign sw_i   = int'(cfg.sw);
  assign rd_idx = int'(src_y) * sw_i + int'(src_x);

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (src_rd) src_pix <= src[rd_idx];

  always @(posedge clk) begin
    if (rst_n && dut.h_emit) emit_q.push_back(cyc);
    if (rst_n && ft_valid) begin
      longint t0;
      t0 = emit_q.pop_front();
      checks++;
      if (cyc - t0 != 7) failures++;
      checks++;
      if (ft_pix != exp_img[out_cnt]) begin
        failures++;
        if (failures < 10) $display("FAIL: pixel %0d got %0d expected %0d", out_cnt, ft_pix,
                                    exp_img[out_cnt]);
      end
      out_cnt++;
    end
  end

  task automatic run_frame(int sw, int sh, int tw, int th, output longint clocks);
    longint c0;
    src = new[sw * sh];
    // random texture with a few strong edges
    for (int y = 0; y < sh; y++)
      for (int x = 0; x < sw; x++)
        src[y * sw + x] = byte'((((x / 37) + (y / 23)) % 3 == 0) ? $urandom_range(0, 255)
                                : (((x * 7 + y * 3) % 200 < 100) ? 16 : 235));
    scale(sw, sh, tw, th, src, exp_img, rs);
    cfg = '{sw: coord_t'(sw), sh: coord_t'(sh), tw: coord_t'(tw), th: coord_t'(th)};
    out_cnt = 0;
    emit_q.delete();
    @(negedge clk) start = 1'b1;
    c0 = cyc;
    @(negedge clk) start = 1'b0;
    wait (done);
    clocks = cyc - c0;
    @(negedge clk);
    checks++;
    if (out_cnt != tw * th) begin
      failures++;
      $display("FAIL: produced %0d pixels, expected %0d", out_cnt, tw * th);
    end
    $display("%0dx%0d -> %0dx%0d: %0d clocks, %0.3f target pixels per clock", sw, sh, tw, th,
             clocks, real'(tw * th) / real'(clocks));
  endtask

  initial begin
    longint clk_up, clk_down;
    cfg = '0;
    src_pix = '0;
    rs = '{default: 0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    run_frame(640, 480, 1920, 1080, clk_up);
    checks++;
    if (real'(1920 * 1080) / real'(clk_up) < 0.9) begin
      failures++;
      $display("FAIL: enlargement rate below 0.9 pixel per clock");
    end
    run_frame(1920, 1080, 320, 240, clk_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
