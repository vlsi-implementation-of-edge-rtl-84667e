// tb_roundtrip -- image-quality workload.
//
// A 512 x 512 synthetic grey image (smooth shading with discs, bars and
// sharp rectangles) is resized with plain bilinear interpolation by the
// testbench, and the scaler then brings it back to 512 x 512:
//   512 -> 256 -> 512, 512 -> 384 -> 512 (enlargement by the scaler)
//   512 -> 1024 -> 512, 512 -> 700 -> 512 (reduction by the scaler)
// Every output pixel is checked against scaler_ref_pkg, and the PSNR of the
// reconstruction against the original is printed next to that of nearest-
// neighbour and bilinear reconstruction of the same intermediate image. A
// reconstruction below 20 dB counts as a failure.
`timescale 1ns/1ps
module tb_roundtrip;
  import scaler_pkg::*;
  import scaler_ref_pkg::*;

  localparam int N = 512;

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
  byte unsigned orig[], mid[], exp_img[], got[];
  int out_cnt, sw_i, rd_idx;
  ref_stats_t rs;

  assign sw_i   = int'(cfg.sw);
  assign rd_idx = int'(src_y) * sw_i + int'(src_x);

  always @(posedge clk) if (src_rd) src_pix <= mid[rd_idx];

  always @(posedge clk) if (rst_n && ft_valid) begin
    got[out_cnt] = ft_pix;
    checks++;
    if (ft_pix != exp_img[out_cnt]) begin
      failures++;
      if (failures < 10) $display("FAIL: pixel %0d got %0d expected %0d", out_cnt, ft_pix,
                                  exp_img[out_cnt]);
    end
    out_cnt++;
  end

  function automatic int sat(real v);
    int i = int'(v);
    return (i < 0) ? 0 : (i > 255) ? 255 : i;
  endfunction

  // bilinear resize with corner-aligned sampling
  function automatic void bilinear(ref byte unsigned s[], input int sw, int sh,
                                   ref byte unsigned d[], input int dw, int dh);
    d = new[dw * dh];
    for (int y = 0; y < dh; y++)
      for (int x = 0; x < dw; x++) begin
        real fx, fy, ax, ay, v;
        int x0, y0, x1, y1;
        fx = real'(x) * real'(sw - 1) / real'(dw - 1);
        fy = real'(y) * real'(sh - 1) / real'(dh - 1);
        x0 = int'($floor(fx)); y0 = int'($floor(fy));
        x1 = (x0 + 1 < sw) ? x0 + 1 : x0; y1 = (y0 + 1 < sh) ? y0 + 1 : y0;
        ax = fx - x0; ay = fy - y0;
        v = (1 - ax) * (1 - ay) * s[y0 * sw + x0] + ax * (1 - ay) * s[y0 * sw + x1]
          + (1 - ax) * ay * s[y1 * sw + x0] + ax * ay * s[y1 * sw + x1];
        d[y * dw + x] = byte'(sat(v + 0.5));
      end
  endfunction

  function automatic void nearest(ref byte unsigned s[], input int sw, int sh,
                                  ref byte unsigned d[], input int dw, int dh);
    d = new[dw * dh];
    for (int y = 0; y < dh; y++)
      for (int x = 0; x < dw; x++) begin
        int sx, sy;
        sx = int'(real'(x) * real'(sw - 1) / real'(dw - 1) + 0.5);
        sy = int'(real'(y) * real'(sh - 1) / real'(dh - 1) + 0.5);
        d[y * dw + x] = s[sy * sw + sx];
      end
  endfunction

  function automatic real psnr(ref byte unsigned a[], ref byte unsigned b[]);
    real mse = 0.0;
    foreach (a[i]) mse += (real'(a[i]) - real'(b[i])) ** 2;
    mse /= a.size();
    return (mse == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 / mse);
  endfunction

  task automatic roundtrip(int m);
    byte unsigned nn[], bl[];
    real p_ours, p_nn, p_bl;
    bilinear(orig, N, N, mid, m, m);
    scale(m, m, N, N, mid, exp_img, rs);
    got = new[N * N];
    cfg = '{sw: coord_t'(m), sh: coord_t'(m), tw: coord_t'(N), th: coord_t'(N)};
    out_cnt = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done);
    @(negedge clk);
    checks++;
    if (out_cnt != N * N) begin failures++; $display("FAIL: %0d pixels", out_cnt); end
    nearest(mid, m, m, nn, N, N);
    bilinear(mid, m, m, bl, N, N);
    p_ours = psnr(orig, got);
    p_nn = psnr(orig, nn);
    p_bl = psnr(orig, bl);
    $display("%0d -> %0d -> %0d: PSNR scaler %0.2f dB, nearest %0.2f dB, bilinear %0.2f dB",
             N, m, N, p_ours, p_nn, p_bl);
    checks++;
    if (p_ours < 20.0) begin failures++; $display("FAIL: reconstruction below 20 dB"); end
  endtask

  initial begin
    cfg = '0;
    src_pix = '0;
    rs = '{default: 0};
    orig = new[N * N];
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        real v;
        v = 60.0 + 0.15 * x + 0.1 * y + 25.0 * $sin(x / 23.0) * $cos(y / 31.0);
        if ((x - 150) ** 2 + (y - 170) ** 2 < 70 ** 2) v = 220.0 - 0.2 * (y - 100);
        if (x > 300 && x < 460 && y > 60 && y < 200) v = 25.0;
        if ((x + 2 * y) % 97 < 12 && y > 300) v = 245.0;
        if ((x - 380) ** 2 + (y - 380) ** 2 < 90 ** 2 && (x / 16 + y / 16) % 2 == 0) v = 10.0;
        orig[y * N + x] = byte'(sat(v));
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    roundtrip(256);
    roundtrip(384);
    roundtrip(1024);
    roundtrip(700);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
