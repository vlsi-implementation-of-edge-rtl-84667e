// area_generator (AG) -- pipeline stage 3 of the scaler.
//
// Forms the four approximated overlap areas of the current target-pixel
// window with the source pixels around it, eq. (4):
//   A(m,n) = left*top      A(m+1,n)   = right*top
//   A(m,n+1) = left*bottom A(m+1,n+1) = right*bottom
// with four small integer multipliers (6-bit x 6-bit, as the sides are 6-bit
// integers) followed by one pipeline register, as in the published drawing
// of AG. One result per clock; latency one cycle (in_valid -> out_valid).
module area_generator
  import scaler_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  sides_t in_sides,
  output logic   out_valid,
  output areas_t out_areas
);

  areas_t prod;

  always_comb begin
    prod.a00 = AREA_W'(in_sides.left)  * AREA_W'(in_sides.top);
    prod.a10 = AREA_W'(in_sides.right) * AREA_W'(in_sides.top);
    prod.a01 = AREA_W'(in_sides.left)  * AREA_W'(in_sides.bottom);
    prod.a11 = AREA_W'(in_sides.right) * AREA_W'(in_sides.bottom);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_areas <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_areas <= prod;
    end
  end

endmodule
