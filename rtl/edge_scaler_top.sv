// edge_scaler_top -- edge-oriented area-pixel image scaler.
//
// Scales a grey-level source image of SW x SH pixels to TW x TH pixels
// (magnification 1/8 .. 8 per axis, chosen per frame through `cfg`). Each
// target pixel is the area-weighted mean of the 2 x 2 source pixels its
// window covers; the areas come from integer grid arithmetic instead of
// floating point, and are then tuned toward the side on which a nearby edge
// is more homogeneous, which keeps edges sharp.
//
// Seven pipeline stages, one target pixel issued per clock at most:
//   1-2  approx_module     source coordinate and overlap widths
//   3    area_generator    four overlap areas     | edge_catcher  LA, U_GE
//   4-5  area_tuner        areas tuned by LA
//   6-7  target_generator  weighted sum and shift by log2(winw*winh)
// The register bank (2 x 4 source pixels) and the single line buffer deliver
// the source pixels; scaler_controller sequences everything. A register-bank
// shift requested together with (or before) a target pixel in stage 1 reaches
// the bank two clocks later (one clock of source/line-buffer read latency), so
// while that pixel is in stage 3 the bank holds exactly its 2 x 4 window: the
// edge catcher reads the bank there, and the four pixels TG needs are copied
// into pipeline registers that carry them to stage 6.
//
// Interface: pulse `start` with `cfg` valid while `busy` is low. The scaler
// requests source pixels with `src_rd`/`src_x`/`src_y` and expects each on
// `src_pix` one clock later (a synchronous frame memory or a row FIFO that can
// replay a row). Target pixels leave on `ft_valid`/`ft_pix` in raster order,
// seven clocks after they are issued; `done` pulses after the last one.
// There is no output back-pressure.
module edge_scaler_top
  import scaler_pkg::*;
#(
  parameter int LB_DEPTH = 1920    // widest source row
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  frame_cfg_t cfg,
  output logic       busy,
  output logic       done,
  output logic       src_rd,
  output coord_t     src_x,
  output coord_t     src_y,
  input  pix_t       src_pix,
  output logic       ft_valid,
  output pix_t       ft_pix
);

  // controller <-> AM
  logic   am_init, param_ready, v_start, v_next, v_step, v_latch, v_need;
  logic   h_start, h_shift, h_emit, h_need_shift, h_can_emit, h_done;
  coord_t v_n, cur_n, h_m;
  wlog_t  winw_log2, winh_log2;
  logic [3:0] shamt;
  // memories
  logic   lb_re, lb_we, rb_shift, rb_dup;
  coord_t lb_raddr, lb_waddr;
  pix_t   lb_rdata;
  rb_t    rb;

  scaler_controller u_ctrl (
    .clk, .rst_n, .start, .cfg, .busy, .done,
    .am_init, .param_ready, .winw_log2, .winh_log2,
    .v_start, .v_next, .v_step, .v_latch, .v_need, .v_n, .cur_n,
    .h_start, .h_shift, .h_emit, .h_need_shift, .h_can_emit, .h_done, .h_m,
    .src_rd, .src_x, .src_y,
    .lb_re, .lb_raddr, .lb_we, .lb_waddr,
    .rb_shift, .rb_dup, .shamt);

  // stages 1-2
  logic   am_valid;
  sides_t am_sides;

  approx_module u_am (
    .clk, .rst_n, .cfg, .init(am_init), .param_ready, .winw_log2, .winh_log2,
    .v_start, .v_next, .v_step, .v_latch, .v_need, .v_n, .cur_n,
    .h_start, .h_shift, .h_emit, .h_need_shift, .h_can_emit, .h_done, .h_m,
    .out_valid(am_valid), .out_sides(am_sides));

  line_buffer #(.DEPTH(LB_DEPTH)) u_lb (
    .clk, .re(lb_re), .raddr(lb_raddr), .rdata(lb_rdata),
    .we(lb_we), .waddr(lb_waddr), .wdata(src_pix));

  register_bank u_rb (
    .clk, .rst_n, .shift(rb_shift), .dup(rb_dup),
    .in_row_n(lb_rdata), .in_row_n1(src_pix), .regs(rb));

  // carry the four pixels TG needs from stage 3 to stage 6
  quad_t q4, q5, q6;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q4 <= '0; q5 <= '0; q6 <= '0;
    end else begin
      q4 <= '{f00: rb.r1, f10: rb.r2, f01: rb.r5, f11: rb.r6};
      q5 <= q4;
      q6 <= q5;
    end
  end

  // stage 3
  logic   ag_valid, ec_valid, ec_u_ge;
  areas_t ag_areas;
  la_t    ec_la;

  area_generator u_ag (
    .clk, .rst_n, .in_valid(am_valid), .in_sides(am_sides),
    .out_valid(ag_valid), .out_areas(ag_areas));

  edge_catcher u_ec (
    .clk, .rst_n, .in_valid(am_valid), .in_top(am_sides.top), .winh_log2,
    .in_rb(rb), .out_valid(ec_valid), .out_u_ge(ec_u_ge), .out_la(ec_la));

  // stages 4-5
  logic   at_valid;
  areas_t at_areas;

  area_tuner u_at (
    .clk, .rst_n, .in_valid(ag_valid && ec_valid), .in_areas(ag_areas),
    .in_u_ge(ec_u_ge), .in_la(ec_la), .out_valid(at_valid), .out_areas(at_areas));

  // stages 6-7
  target_generator u_tg (
    .clk, .rst_n, .in_valid(at_valid), .in_pix(q6), .in_areas(at_areas),
    .shamt, .out_valid(ft_valid), .out_pix(ft_pix));

endmodule
