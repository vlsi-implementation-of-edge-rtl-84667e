// tb_target_generator -- random pixels and random area splits of a
// winw x winh window, one per clock; checks FT = sum(F*A) >> log2(winw*winh)
// and the two-clock latency.
`timescale 1ns/1ps
module tb_target_generator;
  import scaler_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  quad_t in_pix;
  areas_t in_areas;
  logic [3:0] shamt;
  pix_t out_pix;
  int checks = 0, failures = 0, sent = 0, got = 0;
  int exp_q[$];
  longint cyc = 0, t_q[$];
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  target_generator dut (.clk, .rst_n, .in_valid, .in_pix, .in_areas, .shamt, .out_valid, .out_pix);

  always @(posedge clk) begin
    if (rst_n && in_valid) t_q.push_back(cyc);
    if (rst_n && out_valid) begin
      int e;
      longint t0;
      e = exp_q.pop_front();
      t0 = t_q.pop_front();
      got++;
      checks += 2;
      if (int'(out_pix) != e) begin failures++; $display("FAIL: got %0d expected %0d", out_pix, e); end
      if (cyc - t0 != 2) begin failures++; $display("FAIL: latency %0d", cyc - t0); end
    end
  end

  initial begin
    in_pix = '0; in_areas = '0; shamt = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      int wl, hl, tot, a[4], f[4], s;
      wl = $urandom_range(0, 5); hl = $urandom_range(0, 5);
      tot = 1 << (wl + hl);
      a[0] = $urandom_range(0, tot);
      a[1] = $urandom_range(0, tot - a[0]);
      a[2] = $urandom_range(0, tot - a[0] - a[1]);
      a[3] = tot - a[0] - a[1] - a[2];
      s = 0;
      for (int j = 0; j < 4; j++) begin f[j] = $urandom_range(0, 255); s += f[j] * a[j]; end
      @(negedge clk);
      in_valid = (i % 9 != 4);
      shamt = 4'(wl + hl);
      in_pix = '{f00: pix_t'(f[0]), f10: pix_t'(f[1]), f01: pix_t'(f[2]), f11: pix_t'(f[3])};
      in_areas = '{a00: area_t'(a[0]), a10: area_t'(a[1]), a01: area_t'(a[2]), a11: area_t'(a[3])};
      if (in_valid) begin exp_q.push_back(s >> (wl + hl)); sent++; end
      // the shift amount is a frame constant: hold it until this result is out
      @(negedge clk) in_valid = 1'b0;
      @(negedge clk);
    end
    repeat (4) @(negedge clk);
    checks++;
    if (got != sent) begin failures++; $display("FAIL: %0d of %0d results", got, sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
