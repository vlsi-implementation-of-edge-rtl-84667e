// target_generator (TG) -- pipeline stages 6 and 7 of the scaler.
//
// Computes the target pixel as the area-weighted mean of its four source
// pixels, eqs. (1)-(2):
//   FT = (F00*A00 + F10*A10 + F01*A01 + F11*A11) >> shamt
// Stage 6 holds four multipliers and a pipeline register; stage 7 adds the
// products in a tree of three adders (F00/F10 pair, F01/F11 pair, then both)
// and divides by Asum = winw*winh with a shifter, since Asum is a power of
// two. shamt = log2(winw) + log2(winh) is the bit-shift control supplied by
// the controller; it is constant over a frame. The quotient is truncated.
// Latency two cycles; one pixel per clock.
module target_generator
  import scaler_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  quad_t  in_pix,
  input  areas_t in_areas,
  input  logic [3:0] shamt,
  output logic   out_valid,
  output pix_t   out_pix
);

  localparam int MP_W  = PIX_W + AREA_W;   // one product
  localparam int SUM_W = MP_W + 2;         // sum of four

  logic [MP_W-1:0] p00, p10, p01, p11;
  logic            v6;

  // stage 6
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v6 <= 1'b0;
      p00 <= '0; p10 <= '0; p01 <= '0; p11 <= '0;
    end else begin
      v6 <= in_valid;
      if (in_valid) begin
        p00 <= MP_W'(in_pix.f00) * MP_W'(in_areas.a00);
        p10 <= MP_W'(in_pix.f10) * MP_W'(in_areas.a10);
        p01 <= MP_W'(in_pix.f01) * MP_W'(in_areas.a01);
        p11 <= MP_W'(in_pix.f11) * MP_W'(in_areas.a11);
      end
    end
  end

  // stage 7
  logic [SUM_W-1:0] s_up, s_low, s_all, q;

  always_comb begin
    s_up  = SUM_W'(p00) + SUM_W'(p10);
    s_low = SUM_W'(p01) + SUM_W'(p11);
    s_all = s_up + s_low;
    q     = s_all >> shamt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= v6;
      if (v6) out_pix <= (q > SUM_W'({PIX_W{1'b1}})) ? {PIX_W{1'b1}} : q[PIX_W-1:0];
    end
  end

endmodule
