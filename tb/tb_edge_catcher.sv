// tb_edge_catcher -- random 2 x 4 windows, window heights and tops; checks
// U_GE = (top >= winh/2) and LA = |E(m+1)-E(m-1)| - |E(m+2)-E(m)| on the chosen
// row, with one clock of latency.
`timescale 1ns/1ps
module tb_edge_catcher;
  import scaler_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid, out_u_ge;
  side_t in_top;
  wlog_t winh_log2;
  rb_t in_rb;
  la_t out_la;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  edge_catcher dut (.clk, .rst_n, .in_valid, .in_top, .winh_log2, .in_rb,
                    .out_valid, .out_u_ge, .out_la);

  function automatic int iabs(int a); return a < 0 ? -a : a; endfunction

  initial begin
    in_top = '0; winh_log2 = '0; in_rb = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      int hl, t, e[4], la;
      bit uge;
      hl = $urandom_range(0, 5);
      t = $urandom_range(0, 1 << hl);
      @(negedge clk);
      in_valid = 1'b1;
      winh_log2 = wlog_t'(hl);
      in_top = side_t'(t);
      in_rb = rb_t'({$urandom, $urandom});
      if (i % 4 == 0) in_rb.r2 = in_rb.r0;   // force some flat neighbourhoods
      uge = (t >= ((1 << hl) >> 1));
      e[0] = uge ? in_rb.r0 : in_rb.r4;
      e[1] = uge ? in_rb.r1 : in_rb.r5;
      e[2] = uge ? in_rb.r2 : in_rb.r6;
      e[3] = uge ? in_rb.r3 : in_rb.r7;
      la = iabs(e[2] - e[0]) - iabs(e[3] - e[1]);
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid || out_u_ge != uge || int'(out_la) != la) begin
        failures++;
        $display("FAIL: top=%0d winh=%0d got u_ge=%0d la=%0d expected %0d %0d",
                 t, 1 << hl, out_u_ge, out_la, uge, la);
      end
    end
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
