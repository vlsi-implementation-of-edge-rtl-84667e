// scaler_controller -- finite-state machine that sequences the scaler.
//
// The target image is produced row by row. For target row l the approximate
// module (AM) has found the upper source row n; the lower row is n+1 (the last
// source row is repeated at the bottom border). The line buffer must hold row
// n while row n+1 is read from the source, pixel by pixel from column 0:
//   FILL  - if the line buffer does not hold row n, read row n once and store
//           it (no output); needed for the first row and when a reduction
//           skips source rows.
//   PRE   - four register-bank shifts load columns -1..2 (column -1 is the
//           replicated column 0).
//   PASS  - every clock shift the register bank by one column if AM says
//           the window lies right of source pixel m, and issue the next
//           target pixel into the pipeline if at most that one shift was
//           needed. Enlargement therefore issues one target pixel per clock;
//           reduction is paced by the source reads (one column per clock).
//           Columns past SW-1 are not read but replicated (`rb_dup`).
//   TAIL  - read any source columns the pass did not need, so that the line
//           buffer is complete.
// While row n+1 passes through, it overwrites row n in the line buffer
// column by column, but only if the next target row starts at a lower source
// row (`lb_update`); an enlarged image reuses the same pair of rows for several
// target rows without re-reading row n. The vertical AM walk runs one target
// row ahead so that this is known before the pass starts.
//
// Source interface: `src_rd` with (`src_x`,`src_y`) requests one pixel, which
// must be on `src_pix` in the next clock. Line-buffer reads have the same
// one-clock latency, so every register-bank shift and line-buffer write is
// issued one clock after its read. The bit-shift control for the target
// generator, log2(winw)+log2(winh), is held in `shamt` for the frame.
// `done` pulses once the last target pixel has left the seven-stage pipeline.
module scaler_controller
  import scaler_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  frame_cfg_t cfg,
  output logic       busy,
  output logic       done,
  // approximate module
  output logic       am_init,
  input  logic       param_ready,
  input  wlog_t      winw_log2,
  input  wlog_t      winh_log2,
  output logic       v_start,
  output logic       v_next,
  output logic       v_step,
  output logic       v_latch,
  input  logic       v_need,
  input  coord_t     v_n,
  input  coord_t     cur_n,
  output logic       h_start,
  output logic       h_shift,
  output logic       h_emit,
  input  logic       h_need_shift,
  input  logic       h_can_emit,
  input  logic       h_done,
  input  coord_t     h_m,
  // source pixels
  output logic       src_rd,
  output coord_t     src_x,
  output coord_t     src_y,
  // line buffer
  output logic       lb_re,
  output coord_t     lb_raddr,
  output logic       lb_we,
  output coord_t     lb_waddr,
  // register bank
  output logic       rb_shift,
  output logic       rb_dup,
  // target generator bit-shift control
  output logic [3:0] shamt
);

  typedef enum logic [3:0] {
    S_IDLE, S_PARAM, S_VWALK0, S_VNEXT, S_VWALK1, S_ROW,
    S_FILL, S_PRE, S_PASS, S_TAIL, S_NEXTROW, S_DRAIN
  } state_t;

  localparam int PIPE_DEPTH = 7;

  state_t     st;
  frame_cfg_t c;                      // c.tw is used by the approximate module only
  coord_t     row, next_n, lb_row, low_row;
  logic       has_next, lb_valid, lb_update;
  logic [COORD_W:0] rd_col;           // next source column to read this pass
  coord_t     fcol;
  logic [1:0] pcnt;
  logic [3:0] dcnt;

  // reads issued this clock
  logic       rd_now, shift_now, dup_now, we_now;
  coord_t     col_now;
  // and their delayed effects
  logic       shift_d, dup_d, we_d;
  coord_t     col_d;

  logic [COORD_W:0] sw_ext;
  logic [COORD_W+1:0] pre_v;          // virtual column pcnt-1, clamped at 0
  logic [COORD_W+1:0] pass_v;         // m+3

  assign sw_ext  = {1'b0, c.sw};
  assign low_row = (cur_n < c.sh - 1'b1) ? cur_n + 1'b1 : cur_n;
  assign pre_v   = (pcnt == 2'd0) ? '0 : (COORD_W+2)'(pcnt - 2'd1);
  assign pass_v  = (COORD_W+2)'(h_m) + 3;
  assign busy    = (st != S_IDLE);

  always_comb begin
    am_init = 1'b0; v_start = 1'b0; v_next = 1'b0; v_step = 1'b0; v_latch = 1'b0;
    h_start = 1'b0; h_shift = 1'b0; h_emit = 1'b0;
    rd_now = 1'b0; shift_now = 1'b0; dup_now = 1'b0; we_now = 1'b0;
    col_now = '0;
    src_y = low_row;
    unique case (st)
      S_IDLE:   am_init = start;
      S_PARAM:  v_start = param_ready;
      S_VWALK0: if (v_need) v_step = 1'b1; else v_latch = 1'b1;
      S_VNEXT:  v_next = 1'b1;
      S_VWALK1: v_step = v_need;
      S_ROW:    h_start = 1'b1;
      S_FILL: begin
        rd_now  = 1'b1;
        we_now  = 1'b1;
        col_now = fcol;
        src_y   = cur_n;
      end
      S_PRE: begin
        shift_now = 1'b1;
        if (rd_col < sw_ext && pre_v == (COORD_W+2)'(rd_col)) begin
          rd_now  = 1'b1;
          we_now  = lb_update;
          col_now = coord_t'(rd_col);
        end else begin
          dup_now = 1'b1;
        end
      end
      S_PASS: begin
        if (!h_done) begin
          h_emit = h_can_emit;
          if (h_need_shift) begin
            h_shift   = 1'b1;
            shift_now = 1'b1;
            if (rd_col < sw_ext && pass_v == (COORD_W+2)'(rd_col)) begin
              rd_now  = 1'b1;
              we_now  = lb_update;
              col_now = coord_t'(rd_col);
            end else begin
              dup_now = 1'b1;
            end
          end
        end
      end
      S_TAIL: begin
        if (lb_update && rd_col < sw_ext) begin
          rd_now  = 1'b1;
          we_now  = 1'b1;
          col_now = coord_t'(rd_col);
        end
      end
      S_NEXTROW: v_latch = (row != c.th - 1'b1);
      default: ;
    endcase
  end

  assign src_rd   = rd_now;
  assign src_x    = col_now;
  assign lb_re    = rd_now && (st != S_FILL) && (st != S_TAIL);
  assign lb_raddr = col_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_d <= 1'b0; dup_d <= 1'b0; we_d <= 1'b0; col_d <= '0;
    end else begin
      shift_d <= shift_now;
      dup_d   <= dup_now;
      we_d    <= we_now;
      col_d   <= col_now;
    end
  end

  // Interface rules: the source is only asked for pixels inside the image, a
  // target pixel is never issued past the end of its row, and the line buffer
  // is never read and written at the same column in one clock.
  a_src_in_image: assert property (@(posedge clk) disable iff (!rst_n)
    src_rd |-> (src_x < c.sw) && (src_y < c.sh));
  a_emit_in_row: assert property (@(posedge clk) disable iff (!rst_n)
    h_emit |-> !h_done);
  a_lb_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    (lb_re && lb_we) |-> (lb_raddr != lb_waddr));

  assign rb_shift = shift_d;
  assign rb_dup   = dup_d;
  assign lb_we    = we_d;
  assign lb_waddr = col_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; c <= '0; row <= '0; next_n <= '0; lb_row <= '0;
      has_next <= 1'b0; lb_valid <= 1'b0; lb_update <= 1'b0;
      rd_col <= '0; fcol <= '0; pcnt <= '0; dcnt <= '0; done <= 1'b0; shamt <= '0;
    end else begin
      done <= 1'b0;
      if (rd_now) rd_col <= rd_col + 1'b1;
      unique case (st)
        S_IDLE: if (start) begin
          c        <= cfg;
          lb_valid <= 1'b0;
          st       <= S_PARAM;
        end
        S_PARAM: if (param_ready) begin
          shamt <= 4'(winw_log2) + 4'(winh_log2);
          st    <= S_VWALK0;
        end
        S_VWALK0: if (!v_need) begin
          row <= '0;
          if (c.th > 1) st <= S_VNEXT;
          else begin has_next <= 1'b0; st <= S_ROW; end
        end
        S_VNEXT: st <= S_VWALK1;
        S_VWALK1: if (!v_need) begin
          has_next <= 1'b1;
          next_n   <= v_n;
          st       <= S_ROW;
        end
        S_ROW: begin
          lb_update <= has_next && (next_n > cur_n);
          rd_col    <= '0;
          pcnt      <= '0;
          if (lb_valid && lb_row == cur_n) st <= S_PRE;
          else begin
            fcol <= '0;
            st   <= S_FILL;
          end
        end
        S_FILL: begin
          fcol <= fcol + 1'b1;
          if (fcol == c.sw - 1'b1) begin
            lb_valid <= 1'b1;
            lb_row   <= cur_n;
            rd_col   <= '0;
            st       <= S_PRE;
          end
        end
        S_PRE: begin
          pcnt <= pcnt + 1'b1;
          if (pcnt == 2'd3) st <= S_PASS;
        end
        S_PASS: if (h_done) st <= S_TAIL;
        S_TAIL: if (!(lb_update && rd_col < sw_ext)) begin
          if (lb_update) lb_row <= low_row;
          st <= S_NEXTROW;
        end
        S_NEXTROW: begin
          if (row == c.th - 1'b1) begin
            dcnt <= '0;
            st   <= S_DRAIN;
          end else begin
            row <= row + 1'b1;
            if (32'(row) + 2 < 32'(c.th)) st <= S_VNEXT;
            else begin has_next <= 1'b0; st <= S_ROW; end
          end
        end
        S_DRAIN: begin
          dcnt <= dcnt + 1'b1;
          if (dcnt == 4'(PIPE_DEPTH)) begin
            done <= 1'b1;
            st   <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
