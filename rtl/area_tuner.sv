// area_tuner (AT) -- pipeline stages 4 and 5 of the scaler.
//
// Moves part of the area between the two pixels of the row chosen by the edge
// catcher (eq. 23 when U_GE = 1, eq. 25 when U_GE = 0):
//   left pixel  -= LA*AC/2^8      right pixel += LA*AC/2^8
// where AC is the left pixel's area when LA > 0 and the right pixel's area when
// LA < 0. The sum of the four areas, and with it the normalising shift of the
// target generator, stays unchanged, and no area can become negative since
// |LA| < 2^8. Stage 4 forms |LA|*AC, stage 5 scales it by 2^-8 (the product's
// magnitude is truncated, so the correction rounds toward zero; the rounding
// is this design's choice) and adds/subtracts it. Latency two cycles.
module area_tuner
  import scaler_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  areas_t in_areas,
  input  logic   in_u_ge,
  input  la_t    in_la,
  output logic   out_valid,
  output areas_t out_areas
);

  localparam int PROD_W = AREA_W + PIX_W + 1;

  // stage 4
  logic [PIX_W:0]  la_mag;
  area_t           ac;
  logic            v4, u_ge4, pos4, zero4;
  areas_t          areas4;
  logic [PROD_W-1:0] prod4;

  always_comb begin
    la_mag = in_la[LA_W-1] ? (PIX_W+1)'(-in_la) : (PIX_W+1)'(in_la);
    if (in_u_ge) ac = in_la[LA_W-1] ? in_areas.a10 : in_areas.a00;
    else         ac = in_la[LA_W-1] ? in_areas.a11 : in_areas.a01;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v4 <= 1'b0; u_ge4 <= 1'b0; pos4 <= 1'b0; zero4 <= 1'b1;
      areas4 <= '0; prod4 <= '0;
    end else begin
      v4 <= in_valid;
      if (in_valid) begin
        u_ge4  <= in_u_ge;
        pos4   <= ~in_la[LA_W-1];
        zero4  <= (in_la == '0);
        areas4 <= in_areas;
        prod4  <= PROD_W'(la_mag) * PROD_W'(ac);
      end
    end
  end

  // stage 5
  area_t  delta;
  areas_t tuned;

  always_comb begin
    delta = zero4 ? '0 : AREA_W'(prod4 >> PIX_W);
    tuned = areas4;
    if (u_ge4) begin
      if (pos4) begin tuned.a00 = areas4.a00 - delta; tuned.a10 = areas4.a10 + delta; end
      else      begin tuned.a00 = areas4.a00 + delta; tuned.a10 = areas4.a10 - delta; end
    end else begin
      if (pos4) begin tuned.a01 = areas4.a01 - delta; tuned.a11 = areas4.a11 + delta; end
      else      begin tuned.a01 = areas4.a01 + delta; tuned.a11 = areas4.a11 - delta; end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_areas <= '0;
    end else begin
      out_valid <= v4;
      if (v4) out_areas <= tuned;
    end
  end

endmodule
