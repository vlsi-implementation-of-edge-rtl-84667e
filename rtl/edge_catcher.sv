// edge_catcher (EC) -- pipeline stage 3 of the scaler, in parallel with AG.
//
// Decides which of the two source rows in the window matters more for edge
// detection and measures the local edge shape along that row.
//   U_GE = (top >= winh/2): the upper row n covers at least half the window.
//   LA   = |E(m+1) - E(m-1)| - |E(m+2) - E(m)|   on the chosen row  (eq. 22/24)
// Four 2:1 multiplexers steered by U_GE pick the row, two absolute-difference
// units and one subtractor form LA, and LA and U_GE are registered. LA > 0
// means the edge is more homogeneous to the right, LA < 0 to the left.
// The first-level units are absolute differences, as the published equations
// define LA. Latency one cycle.
module edge_catcher
  import scaler_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  side_t in_top,       // top'(k,l)
  input  wlog_t winh_log2,    // log2(winh)
  input  rb_t   in_rb,        // register-bank contents for this pixel
  output logic  out_valid,
  output logic  out_u_ge,
  output la_t   out_la
);

  logic  u_ge;
  pix_t  e_m1, e_0, e_p1, e_p2;     // E(m-1), E(m), E(m+1), E(m+2) of chosen row
  logic [PIX_W:0] half_winh;
  logic [PIX_W:0] d_right, d_left;  // |E(m+1)-E(m-1)|, |E(m+2)-E(m)|

  function automatic logic [PIX_W:0] absdiff(pix_t a, pix_t b);
    return (a >= b) ? {1'b0, a - b} : {1'b0, b - a};
  endfunction

  always_comb begin
    half_winh = ((PIX_W+1)'(1) << winh_log2) >> 1;
    u_ge = ({{(PIX_W+1-SIDE_W){1'b0}}, in_top} >= half_winh);
    e_m1 = u_ge ? in_rb.r0 : in_rb.r4;
    e_0  = u_ge ? in_rb.r1 : in_rb.r5;
    e_p1 = u_ge ? in_rb.r2 : in_rb.r6;
    e_p2 = u_ge ? in_rb.r3 : in_rb.r7;
    d_right = absdiff(e_p1, e_m1);
    d_left  = absdiff(e_p2, e_0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_u_ge  <= 1'b0;
      out_la    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_u_ge <= u_ge;
        out_la   <= $signed({1'b0, d_right}) - $signed({1'b0, d_left});
      end
    end
  end

endmodule
