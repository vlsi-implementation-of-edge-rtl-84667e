// tb_area_tuner -- random window areas and edge parameters, streamed one per
// clock; checks eq. (23)/(25): the pixel pair of the chosen row trades
// |LA|*AC/256 of area (AC = left area if LA > 0, right area if LA < 0), the
// other pair is untouched, the total area is kept, and the latency is two.
`timescale 1ns/1ps
module tb_area_tuner;
  import scaler_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_u_ge, out_valid;
  areas_t in_areas, out_areas;
  la_t in_la;
  int checks = 0, failures = 0;
  areas_t exp_q[$];
  always #5 clk = ~clk;

  area_tuner dut (.clk, .rst_n, .in_valid, .in_areas, .in_u_ge, .in_la, .out_valid, .out_areas);

  int sent = 0, got = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    areas_t e;
    e = exp_q.pop_front();
    got++;
    checks++;
    if (out_areas != e) begin
      failures++;
      $display("FAIL: got %p expected %p", out_areas, e);
    end
  end

  initial begin
    in_areas = '0; in_u_ge = 1'b0; in_la = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      int wl, hl, l, t, la, a[4], d;
      bit uge;
      wl = $urandom_range(0, 5); hl = $urandom_range(0, 5);
      l = $urandom_range(0, 1 << wl); t = $urandom_range(0, 1 << hl);
      a[0] = l * t; a[1] = ((1 << wl) - l) * t;
      a[2] = l * ((1 << hl) - t); a[3] = ((1 << wl) - l) * ((1 << hl) - t);
      la = (i % 5 == 0) ? 0 : $urandom_range(0, 510) - 255;
      uge = $urandom_range(0, 1);
      @(negedge clk);
      in_valid = (i % 7 != 3);
      in_areas = '{a00: area_t'(a[0]), a10: area_t'(a[1]), a01: area_t'(a[2]), a11: area_t'(a[3])};
      in_la = la_t'(la);
      in_u_ge = uge;
      if (in_valid) begin
        int base;
        base = uge ? 0 : 2;
        d = (((la < 0) ? -la : la) * ((la < 0) ? a[base + 1] : a[base])) >> 8;
        if (la < 0) d = -d;
        a[base] -= d;
        a[base + 1] += d;
        exp_q.push_back('{a00: area_t'(a[0]), a10: area_t'(a[1]), a01: area_t'(a[2]),
                          a11: area_t'(a[3])});
        sent++;
      end
    end
    @(negedge clk) in_valid = 1'b0;
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
