// dctq_ref_pkg - reference models for the DCTQ testbenches, written
// independently of the RTL: floating-point 8-point DCT/IDCT from the cosine
// definition, the MPEG-4 H.263-style quantizer and inverse quantizer with
// plain integer division, the MPEG-4 DC scaler table and the MPEG-4 scan
// orders as scan-position -> raster-index lists.
package dctq_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic real cosk(input int k, input int n);
    real c;
    c = (k == 0) ? (1.0 / $sqrt(2.0)) : 1.0;
    return 0.5 * c * $cos((2.0 * n + 1.0) * k * PI / 16.0);
  endfunction

  // 1-D forward: X[k] = sum_n c(k)/2 x[n] cos((2n+1)k pi/16)
  function automatic void fdct8(input real x[8], output real y[8]);
    for (int k = 0; k < 8; k++) begin
      y[k] = 0.0;
      for (int n = 0; n < 8; n++) y[k] += cosk(k, n) * x[n];
    end
  endfunction

  // 1-D inverse: x[n] = sum_k c(k)/2 X[k] cos((2n+1)k pi/16)
  function automatic void idct8(input real x[8], output real y[8]);
    for (int n = 0; n < 8; n++) begin
      y[n] = 0.0;
      for (int k = 0; k < 8; k++) y[n] += cosk(k, n) * x[k];
    end
  endfunction

  // 2-D transforms on a block b[r][c] (first index vertical).
  function automatic void fdct2(input real b[8][8], output real o[8][8]);
    real t[8][8];
    real v[8], w[8];
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) v[c] = b[r][c];
      fdct8(v, w);
      for (int c = 0; c < 8; c++) t[r][c] = w[c];
    end
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) v[r] = t[r][c];
      fdct8(v, w);
      for (int r = 0; r < 8; r++) o[r][c] = w[r];
    end
  endfunction

  function automatic void idct2(input real b[8][8], output real o[8][8]);
    real t[8][8];
    real v[8], w[8];
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) v[c] = b[r][c];
      idct8(v, w);
      for (int c = 0; c < 8; c++) t[r][c] = w[c];
    end
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) v[r] = t[r][c];
      idct8(v, w);
      for (int r = 0; r < 8; r++) o[r][c] = w[r];
    end
  endfunction

  function automatic int rnd(input real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int clip(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // MPEG-4 DC scaler (ISO/IEC 14496-2 table)
  function automatic int dcs_ref(input int qp, input bit chroma);
    if (!chroma) begin
      if (qp <= 4) return 8;
      if (qp <= 8) return 2 * qp;
      if (qp <= 24) return qp + 8;
      return 2 * qp - 16;
    end else begin
      if (qp <= 4) return 8;
      if (qp <= 24) return (qp + 13) / 2;
      return qp - 6;
    end
  endfunction

  function automatic int quant_ref(input int f, input int qp, input bit intra,
                                   input bit dc, input bit chroma);
    int m, d, q;
    m = (f < 0) ? -f : f;
    if (intra && dc) begin
      d = dcs_ref(qp, chroma);
      q = (m + d / 2) / d;
    end else if (intra) begin
      q = m / (2 * qp);
    end else begin
      q = (m - qp / 2) / (2 * qp);
      if (m < qp / 2) q = 0;
    end
    return (f < 0) ? -q : q;
  endfunction

  function automatic int dequant_ref(input int qf, input int qp, input bit intra,
                                     input bit dc, input bit chroma);
    int m, f;
    m = (qf < 0) ? -qf : qf;
    if (qf == 0) return 0;
    if (intra && dc) f = m * dcs_ref(qp, chroma);
    else if (qp % 2 == 1) f = qp * (2 * m + 1);
    else f = qp * (2 * m + 1) - 1;
    f = (qf < 0) ? -f : f;
    return clip(f, -2048, 2047);
  endfunction

  // scan position -> raster index
  localparam int ZIGZAG [64] = '{
     0,  1,  8, 16,  9,  2,  3, 10, 17, 24, 32, 25, 18, 11,  4,  5,
    12, 19, 26, 33, 40, 48, 41, 34, 27, 20, 13,  6,  7, 14, 21, 28,
    35, 42, 49, 56, 57, 50, 43, 36, 29, 22, 15, 23, 30, 37, 44, 51,
    58, 59, 52, 45, 38, 31, 39, 46, 53, 60, 61, 54, 47, 55, 62, 63};
  localparam int ALT_H [64] = '{
     0,  1,  2,  3,  8,  9, 16, 17, 10, 11,  4,  5,  6,  7, 15, 14,
    13, 12, 19, 18, 24, 25, 32, 33, 26, 27, 20, 21, 22, 23, 28, 29,
    30, 31, 34, 35, 40, 41, 48, 49, 42, 43, 36, 37, 38, 39, 44, 45,
    46, 47, 50, 51, 56, 57, 58, 59, 52, 53, 54, 55, 60, 61, 62, 63};
  localparam int ALT_V [64] = '{
     0,  8, 16, 24,  1,  9,  2, 10, 17, 25, 32, 40, 48, 56, 57, 49,
    41, 33, 26, 18,  3, 11,  4, 12, 19, 27, 34, 42, 50, 58, 35, 43,
    51, 59, 20, 28,  5, 13,  6, 14, 21, 29, 36, 44, 52, 60, 37, 45,
    53, 61, 22, 30,  7, 15, 23, 31, 38, 46, 54, 62, 39, 47, 55, 63};

  // sel: 0 zig-zag, 1 alternate-horizontal, 2 alternate-vertical
  function automatic int scan_raster(input int sel, input int pos);
    case (sel)
      1:       return ALT_H[pos];
      2:       return ALT_V[pos];
      default: return ZIGZAG[pos];
    endcase
  endfunction

endpackage
