// tb_area_generator -- random overlap widths; checks the four products
// left*top, right*top, left*bottom, right*bottom and the one-clock latency.
`timescale 1ns/1ps
module tb_area_generator;
  import scaler_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  sides_t in_sides;
  areas_t out_areas;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  area_generator dut (.clk, .rst_n, .in_valid, .in_sides, .out_valid, .out_areas);

  initial begin
    in_sides = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      int wl, hl, l, t;
      wl = $urandom_range(0, 5); hl = $urandom_range(0, 5);
      l = $urandom_range(0, 1 << wl); t = $urandom_range(0, 1 << hl);
      @(negedge clk);
      in_valid = 1'b1;
      in_sides = '{left: side_t'(l), right: side_t'((1 << wl) - l),
                   top: side_t'(t), bottom: side_t'((1 << hl) - t)};
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid ||
          out_areas.a00 != area_t'(l * t) ||
          out_areas.a10 != area_t'(((1 << wl) - l) * t) ||
          out_areas.a01 != area_t'(l * ((1 << hl) - t)) ||
          out_areas.a11 != area_t'(((1 << wl) - l) * ((1 << hl) - t))) begin
        failures++;
        $display("FAIL: sides l=%0d t=%0d w=%0d h=%0d -> %p", l, t, 1 << wl, 1 << hl, out_areas);
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL: valid held"); end
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
