// dwt_ref_pkg: reference model for the testbenches.
//
// A plain, non-streaming multi-level 2-D DWT on whole arrays: every level
// filters all rows of its input (lowpass at even, highpass at odd centre
// columns), then all columns of both half-bands (lowpass at even, highpass at
// odd centre rows), with zero extension at the edges and the fixed-point
// rule of the hardware: sum of coefficient x sample, then
// (sum + 2^(FRAC-1)) >>> FRAC, saturated to 16 bits. The HH band of a level
// is the next level's input. Results are stored by key(band, level, row, col).
package dwt_ref_pkg;
  import dwt_pkg::*;

  function automatic longint key(int band, int lvl, int row, int col);
    return ((longint'(lvl) * 4 + band) * 65536 + row) * 65536 + col;
  endfunction

  function automatic int round_sat(longint acc, int frac);
    longint r;
    r = (acc + (longint'(1) << (frac - 1))) >>> frac;
    if (r > 32767)  r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  // One output of a symmetric odd-length filter on seq[0..len-1], centred at c.
  function automatic int fir(const ref int seq[], input int len, int c, bit hp,
                             input coef_t hc[], input coef_t gc[], input int frac);
    int     half;
    longint acc;
    half = hc.size() - 1;
    acc  = 0;
    for (int k = -half; k <= half; k++) begin
      int  idx, ci;
      idx = c + k;
      ci  = half - (k < 0 ? -k : k);
      if (idx >= 0 && idx < len)
        acc += longint'(seq[idx]) * longint'(hp ? gc[ci] : hc[ci]);
    end
    return round_sat(acc, frac);
  endfunction

  // img: n*n pixels in raster order. Fills exp with every coefficient the
  // hardware emits (HH of every level included).
  function automatic void dwt2d(input int img[], input int n, input int levels,
                                input coef_t hc[], input coef_t gc[], input int frac,
                                ref int exp[longint]);
    int x[];
    int s;
    x = img;
    s = n;
    for (int lvl = 1; lvl <= levels; lvl++) begin
      int lo[], hi[], seq[], nx[];
      int h = s / 2;
      lo = new[s * h];
      hi = new[s * h];
      seq = new[s];
      for (int y = 0; y < s; y++) begin
        for (int j = 0; j < s; j++) seq[j] = x[y*s + j];
        for (int j = 0; j < s; j++) begin
          int v = fir(seq, s, j, j[0], hc, gc, frac);
          if (j[0]) hi[y*h + j/2] = v; else lo[y*h + j/2] = v;
        end
      end
      nx = new[h * h];
      for (int b = 0; b < 2; b++) begin
        for (int k = 0; k < h; k++) begin
          for (int i = 0; i < s; i++) seq[i] = (b == 0) ? lo[i*h + k] : hi[i*h + k];
          for (int i = 0; i < s; i++) begin
            int v    = fir(seq, s, i, i[0], hc, gc, frac);
            int band = (b == 0) ? (i[0] ? SB_HG : SB_HH) : (i[0] ? SB_GG : SB_GH);
            exp[key(band, lvl, i/2, k)] = v;
            if (b == 0 && !i[0]) nx[(i/2)*h + k] = v;
          end
        end
      end
      x = nx;
      s = h;
    end
  endfunction

endpackage
