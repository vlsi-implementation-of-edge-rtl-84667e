// approx_module (AM) -- pipeline stages 1 and 2 of the scaler.
//
// Replaces the floating-point area-pixel geometry by integer walks on a grid
// where one target pixel is 2^n x 2^n cells (n = GRID_LOG2 = 3).
//
// Per frame (`init`, about 18 clocks until `param_ready`):
//   * winw = 2^(n+j) with 2^j <= TW/SW < 2^(j+1), j limited to -3..2, so
//     winw is one of 1,2,4,8,16,32 (likewise winh from TH/SH);
//   * sw = round(2^n*(TW-1)/(SW-1)), the grid width of a source pixel
//     (eq. 15; a fraction of one half rounds up), and the number of
//     regulations per row rw = 2^n*(TW-1) - sw*(SW-1) (eq. 17). rw is
//     positive when sw was rounded down and negative when it was rounded up;
//   * sh and rh likewise from TH and SH (eq. 16).
// The two divisions share a sequential divider each.
//
// Horizontal walk (stage 1, commanded by the controller every clock):
//   h_start : k = 0, m = 0, winleft = (sw - winw)/2, srcright = sw
//   h_shift : m = m+1, srcright += sw + Tw                        (eq. 11)
//   h_emit  : issue target k, then k = k+1, winleft += 2^n       (eq. 10)
// h_need_shift says that the window starts at or right of the right edge of
// source pixel m (and m is not the last column), so m must advance before k
// can be issued. h_can_emit says that k can be issued in this clock: either
// no shift is needed, or one shift (done in the same clock) is enough. The
// controller may then assert h_shift and h_emit together; target k then uses
// the advanced m. This gives one target pixel per clock when enlarging. Tw is +1 or -1 (sign of rw) for |rw| of the SW-1 column
// steps of a row and 0 otherwise; the regulated steps are spread evenly by an
// error accumulator, so srcright of the last column lands exactly at
// sw + 2^n*(TW-1) and the image borders stay aligned.
// Vertical walk (once per target row): v_start/v_next/v_step do the same for
// wintop/srcbtm/n with sh and Th, v_latch copies the result to the row that
// is being output. The walk can run one row ahead of the output.
//
// Stage 2 (one clock after h_emit): left = min(srcright - winleft, winw)
// (eq. 9), right = winw - left (eq. 7), top = min(srcbtm - wintop, winh)
// (eq. 12), bottom = winh - top (eq. 8), registered into out_sides.
module approx_module
  import scaler_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  frame_cfg_t cfg,
  input  logic       init,
  output logic       param_ready,
  output wlog_t      winw_log2,
  output wlog_t      winh_log2,
  // vertical walk
  input  logic       v_start,
  input  logic       v_next,
  input  logic       v_step,
  input  logic       v_latch,
  output logic       v_need,
  output coord_t     v_n,
  output coord_t     cur_n,
  // horizontal walk
  input  logic       h_start,
  input  logic       h_shift,
  input  logic       h_emit,
  output logic       h_need_shift,
  output logic       h_can_emit,
  output logic       h_done,
  output coord_t     h_m,
  // stage 2 output
  output logic       out_valid,
  output sides_t     out_sides
);

  localparam int DVD_W = COORD_W + GRID_LOG2 + 2;   // 2*2^n*(T-1) + (S-1)
  localparam int DVS_W = COORD_W + 1;               // 2*(S-1)
  localparam int ACC_W = COORD_W + 1;

  frame_cfg_t c;
  coord_t     den_w, den_h;            // SW-1, SH-1

  assign den_w = c.sw - 1'b1;
  assign den_h = c.sh - 1'b1;

  // ---------------- window sizes ----------------
  function automatic wlog_t win_log2(coord_t s, coord_t t);
    wlog_t r;
    r = 3'd0;
    for (int j = 1; j <= 5; j++)
      if (((COORD_W+6)'(t) << GRID_LOG2) >= ((COORD_W+6)'(s) << j)) r = wlog_t'(j);
    return r;
  endfunction

  // ---------------- per-frame constants ----------------
  logic             div_start, dw_busy, dh_busy, dw_done, dh_done, got_w, got_h;
  logic [DVD_W-1:0] qw, qh;
  logic [DVS_W-1:0] remw, remh;
  pos_t             sw, sh;            // grid size of a source pixel
  logic [ACC_W-1:0] rw_abs, rh_abs;
  logic             rw_neg, rh_neg;
  side_t            winw, winh;

  seq_divider #(.N(DVD_W), .D(DVS_W)) u_div_w (
    .clk, .rst_n, .start(div_start),
    .dividend((DVD_W'(c.tw - 1'b1) << (GRID_LOG2 + 1)) + DVD_W'(den_w)),
    .divisor({den_w, 1'b0}),
    .busy(dw_busy), .done(dw_done), .quotient(qw), .remainder(remw));

  seq_divider #(.N(DVD_W), .D(DVS_W)) u_div_h (
    .clk, .rst_n, .start(div_start),
    .dividend((DVD_W'(c.th - 1'b1) << (GRID_LOG2 + 1)) + DVD_W'(den_h)),
    .divisor({den_h, 1'b0}),
    .busy(dh_busy), .done(dh_done), .quotient(qh), .remainder(remh));

  // rw = 2^n(TW-1) - sw(SW-1) = (remainder - (SW-1)) / 2
  logic signed [DVS_W+1:0] rw_full, rh_full;
  assign rw_full = ($signed({2'b00, remw}) - $signed({3'b000, den_w})) >>> 1;
  assign rh_full = ($signed({2'b00, remh}) - $signed({3'b000, den_h})) >>> 1;

  assign winw = side_t'(7'd1 << winw_log2);
  assign winh = side_t'(7'd1 << winh_log2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= '0; div_start <= 1'b0; got_w <= 1'b0; got_h <= 1'b0;
      param_ready <= 1'b0; winw_log2 <= '0; winh_log2 <= '0;
      sw <= '0; sh <= '0; rw_abs <= '0; rh_abs <= '0; rw_neg <= 1'b0; rh_neg <= 1'b0;
    end else begin
      div_start <= 1'b0;
      if (init) begin
        c           <= cfg;
        div_start   <= 1'b1;
        got_w       <= 1'b0;
        got_h       <= 1'b0;
        param_ready <= 1'b0;
        winw_log2   <= win_log2(cfg.sw, cfg.tw);
        winh_log2   <= win_log2(cfg.sh, cfg.th);
      end else begin
        if (dw_done) begin
          got_w  <= 1'b1;
          sw     <= pos_t'(qw);
          rw_neg <= rw_full[DVS_W+1];
          rw_abs <= ACC_W'(rw_full[DVS_W+1] ? -rw_full : rw_full);
        end
        if (dh_done) begin
          got_h  <= 1'b1;
          sh     <= pos_t'(qh);
          rh_neg <= rh_full[DVS_W+1];
          rh_abs <= ACC_W'(rh_full[DVS_W+1] ? -rh_full : rh_full);
        end
        if (got_w && got_h && !div_start && !dw_busy && !dh_busy) param_ready <= 1'b1;
      end
    end
  end

  // ---------------- horizontal walk (stage 1) ----------------
  coord_t           hk, hm;
  pos_t             winleft, srcright;
  logic [ACC_W-1:0] hacc, hacc_sum;
  logic             h_reg;             // this column step is regulated
  pos_t             srcright_next;     // srcright after one column step

  assign hacc_sum     = hacc + rw_abs;
  assign h_reg        = (hacc_sum >= ACC_W'(den_w));
  assign srcright_next = !h_reg ? srcright + sw : rw_neg ? srcright + sw - 1 : srcright + sw + 1;
  assign h_need_shift  = (srcright <= winleft) && (hm < den_w);
  assign h_can_emit    = !h_need_shift || (srcright_next > winleft) || (hm + 1'b1 >= den_w);
  assign h_done       = (hk == c.tw);
  assign h_m          = hm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hk <= '0; hm <= '0; winleft <= '0; srcright <= '0; hacc <= '0;
    end else if (h_start) begin
      hk       <= '0;
      hm       <= '0;
      winleft  <= (sw - pos_t'(winw)) >>> 1;
      srcright <= sw;
      hacc     <= '0;
    end else begin
      if (h_shift) begin
        hm       <= hm + 1'b1;
        hacc     <= h_reg ? hacc_sum - ACC_W'(den_w) : hacc_sum;
        srcright <= srcright_next;
      end
      if (h_emit) begin
        hk      <= hk + 1'b1;
        winleft <= winleft + pos_t'(GRID);
      end
    end
  end

  // ---------------- vertical walk ----------------
  coord_t           vn;
  pos_t             wintop, srcbtm;
  logic [ACC_W-1:0] vacc, vacc_sum;
  logic             v_reg;
  pos_t             vdiff;
  side_t            v_top, cur_top;

  assign vacc_sum = vacc + rh_abs;
  assign v_reg    = (vacc_sum >= ACC_W'(den_h));
  assign v_need   = (srcbtm <= wintop) && (vn < den_h);
  assign v_n      = vn;
  assign vdiff    = srcbtm - wintop;
  assign v_top    = (vdiff <= 0) ? '0 : (vdiff >= pos_t'(winh)) ? winh : side_t'(vdiff);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vn <= '0; wintop <= '0; srcbtm <= '0; vacc <= '0;
      cur_n <= '0; cur_top <= '0;
    end else begin
      if (v_start) begin
        vn     <= '0;
        wintop <= (sh - pos_t'(winh)) >>> 1;
        srcbtm <= sh;
        vacc   <= '0;
      end else if (v_next) begin
        wintop <= wintop + pos_t'(GRID);
      end else if (v_step) begin
        vn <= vn + 1'b1;
        if (v_reg) begin
          vacc   <= vacc_sum - ACC_W'(den_h);
          srcbtm <= rh_neg ? srcbtm + sh - 1 : srcbtm + sh + 1;
        end else begin
          vacc   <= vacc_sum;
          srcbtm <= srcbtm + sh;
        end
      end
      if (v_latch) begin
        cur_n   <= vn;
        cur_top <= v_top;
      end
    end
  end

  // ---------------- stage 2 ----------------
  logic  s2_valid;
  pos_t  s2_diff;
  side_t left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_diff  <= '0;
    end else begin
      s2_valid <= h_emit;
      if (h_emit) s2_diff <= (h_shift ? srcright_next : srcright) - winleft;
    end
  end

  assign left = (s2_diff <= 0) ? '0 : (s2_diff >= pos_t'(winw)) ? winw : side_t'(s2_diff);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sides <= '0;
    end else begin
      out_valid <= s2_valid;
      if (s2_valid) begin
        out_sides.left   <= left;
        out_sides.right  <= winw - left;
        out_sides.top    <= cur_top;
        out_sides.bottom <= winh - cur_top;
      end
    end
  end

endmodule
