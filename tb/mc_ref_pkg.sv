// mc_ref_pkg: reference model of HEVC fractional-sample interpolation and weighted
// sample prediction, written straight from the standard's equations (the four
// integer/fractional cases kept apart) for the testbenches to compare against.
//
// A reference area is a flat array, row-major with stride `stride`, holding the
// (w + T - 1) x (h + T - 1) samples around a block; its sample (T/2-1, T/2-1) is the
// block's integer position (0, 0).
package mc_ref_pkg;

  const int LUMA_C [4][8] = '{
    '{ 0, 0,   0, 64,  0,   0, 0,  0},
    '{-1, 4, -10, 58, 17,  -5, 1,  0},
    '{-1, 4, -11, 40, 40, -11, 4, -1},
    '{ 0, 1,  -5, 17, 58, -10, 4, -1}};

  const int CHROMA_C [8][4] = '{
    '{ 0, 64,  0,  0},
    '{-2, 58, 10, -2},
    '{-4, 54, 16, -2},
    '{-6, 46, 28, -4},
    '{-4, 36, 36, -4},
    '{-4, 28, 46, -6},
    '{-2, 16, 54, -4},
    '{-2, 10, 58, -2}};

  function automatic int c(int taps, int frac, int i);
    return (taps == 8) ? LUMA_C[frac][i] : CHROMA_C[frac][i];
  endfunction

  // Arithmetic shift right (floor division by 2^s).
  function automatic int asr(int v, int s);
    return v >>> s;
  endfunction

  // Intermediate prediction sample (14-bit precision) at block position (x, y).
  function automatic int pred(int taps, int area[], int stride, int x, int y,
                              int xf, int yf, int bd);
    int h0 = taps / 2 - 1;
    int shift1 = bd - 8;
    int shift3 = 14 - bd;
    int s, t;
    if (xf == 0 && yf == 0) return area[(y + h0) * stride + x + h0] <<< shift3;
    if (yf == 0) begin
      s = 0;
      for (int i = 0; i < taps; i++) s += c(taps, xf, i) * area[(y + h0) * stride + x + i];
      return asr(s, shift1);
    end
    if (xf == 0) begin
      s = 0;
      for (int i = 0; i < taps; i++) s += c(taps, yf, i) * area[(y + i) * stride + x + h0];
      return asr(s, shift1);
    end
    s = 0;
    for (int j = 0; j < taps; j++) begin
      t = 0;
      for (int i = 0; i < taps; i++) t += c(taps, xf, i) * area[(y + j) * stride + x + i];
      s += c(taps, yf, j) * asr(t, shift1);
    end
    return asr(s, 6);
  endfunction

  function automatic int clip(int v, int bd);
    int m = (1 << bd) - 1;
    return (v < 0) ? 0 : (v > m) ? m : v;
  endfunction

  // Final sample; explicit = 0 uses the default weighted prediction equations.
  function automatic int weighted(int p0, int p1, bit bi, bit explicit, int bd,
                                  int denom, int w0, int w1, int o0, int o1);
    int sh, lw;
    if (!explicit) begin
      if (bi) begin
        sh = 15 - bd;
        return clip(asr(p0 + p1 + (1 << (sh - 1)), sh), bd);
      end
      sh = 14 - bd;
      return clip(asr(p0 + (1 << (sh - 1)), sh), bd);
    end
    lw = denom + 14 - bd;
    if (bi) return clip(asr(p0 * w0 + p1 * w1 + ((o0 + o1 + 1) << lw), lw + 1), bd);
    if (lw >= 1) return clip(asr(p0 * w0 + (1 << (lw - 1)), lw) + o0, bd);
    return clip(p0 * w0 + o0, bd);
  endfunction

  // The samples of an area the hardware reads for one reference block, in order.
  function automatic void stream(int taps, int area[], int stride, int w, int h,
                                 int xf, int yf, ref int q[$]);
    int h0 = taps / 2 - 1;
    int x0 = (xf != 0) ? 0 : h0;
    int y0 = (yf != 0) ? 0 : h0;
    int nx = w + ((xf != 0) ? taps - 1 : 0);
    int ny = h + ((yf != 0) ? taps - 1 : 0);
    q.delete();
    for (int yy = 0; yy < ny; yy++)
      for (int xx = 0; xx < nx; xx++) q.push_back(area[(y0 + yy) * stride + x0 + xx]);
  endfunction

endpackage
