// scaler_ref_pkg -- behavioural reference of the edge-oriented area-pixel
// scaler, used by the testbenches to compute expected target images.
//
// Written from the equations, not from the RTL: grid positions use closed
// forms (srcright(m) = sw*(m+1) + sign(rw)*floor(m*|rw|/(SW-1)), winleft(k) =
// (sw-winw)/2 + 8k) instead of the RTL's incremental walks, and the whole
// computation is done in plain integers.
package scaler_ref_pkg;

  localparam int GRID = 8;

  function automatic int wlog(int s, int t);
    int r = 0;
    for (int j = 1; j <= 5; j++) if (GRID * t >= (s << j)) r = j;
    return r;
  endfunction

  function automatic int floor_div2(int a);
    return (a >= 0) ? a / 2 : -((-a + 1) / 2);
  endfunction

  function automatic int iabs(int a);
    return (a < 0) ? -a : a;
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // grid step of a source pixel and per-row regulation count
  function automatic void steps(int s, int t, output int st, output int r);
    st = (2 * GRID * (t - 1) + (s - 1)) / (2 * (s - 1));
    r  = GRID * (t - 1) - st * (s - 1);
  endfunction

  function automatic int edge_pos(int st, int r, int s, int m);
    int sg = (r < 0) ? -1 : 1;
    return st * (m + 1) + sg * ((m * iabs(r)) / (s - 1));
  endfunction

  // Source index (m) and overlap width (left or top) for every target index.
  function automatic void walk(int s, int t, ref int idx[], ref int first[]);
    int st, r, win, wstart, m;
    steps(s, t, st, r);
    win = 1 << wlog(s, t);
    wstart = floor_div2(st - win);
    idx = new[t];
    first = new[t];
    m = 0;
    for (int k = 0; k < t; k++) begin
      int wpos = wstart + GRID * k;
      while (m < s - 1 && edge_pos(st, r, s, m) <= wpos) m++;
      idx[k] = m;
      first[k] = clampi(edge_pos(st, r, s, m) - wpos, 0, win);
    end
  endfunction

  // Statistics a testbench may want to see covered
  typedef struct {
    int la_pos, la_neg, la_zero, uge1, uge0, tuned;
  } ref_stats_t;

  // Expected target image, raster order.
  function automatic void scale(int sw, int sh, int tw, int th, ref byte unsigned src[],
                                ref byte unsigned tgt[], inout ref_stats_t stats);
    int mx[], lx[], ny[], ty[];
    int winw, winh, shamt;
    winw = 1 << wlog(sw, tw);
    winh = 1 << wlog(sh, th);
    shamt = wlog(sw, tw) + wlog(sh, th);
    walk(sw, tw, mx, lx);
    walk(sh, th, ny, ty);
    tgt = new[tw * th];
    for (int l = 0; l < th; l++) begin
      for (int k = 0; k < tw; k++) begin
        int m = mx[k], n = ny[l];
        int left = lx[k], right = winw - lx[k], top = ty[l], bottom = winh - ty[l];
        int a00 = left * top, a10 = right * top, a01 = left * bottom, a11 = right * bottom;
        int r, la, d, sum;
        int p[4];
        bit uge = (top >= (winh >> 1));
        r = uge ? n : n + 1;
        r = clampi(r, 0, sh - 1);
        for (int i = 0; i < 4; i++) p[i] = src[r * sw + clampi(m - 1 + i, 0, sw - 1)];
        la = iabs(p[2] - p[0]) - iabs(p[3] - p[1]);
        if (uge) stats.uge1++; else stats.uge0++;
        if (la > 0) stats.la_pos++; else if (la < 0) stats.la_neg++; else stats.la_zero++;
        if (uge) begin
          d = (iabs(la) * ((la < 0) ? a10 : a00)) >> 8;
          if (la < 0) d = -d;
          a00 -= d; a10 += d;
        end else begin
          d = (iabs(la) * ((la < 0) ? a11 : a01)) >> 8;
          if (la < 0) d = -d;
          a01 -= d; a11 += d;
        end
        if (d != 0) stats.tuned++;
        sum = src[clampi(n, 0, sh-1) * sw + clampi(m, 0, sw-1)] * a00
            + src[clampi(n, 0, sh-1) * sw + clampi(m+1, 0, sw-1)] * a10
            + src[clampi(n+1, 0, sh-1) * sw + clampi(m, 0, sw-1)] * a01
            + src[clampi(n+1, 0, sh-1) * sw + clampi(m+1, 0, sw-1)] * a11;
        sum = sum >> shamt;
        tgt[l * tw + k] = byte'((sum > 255) ? 255 : sum);
      end
    end
  endfunction

endpackage
