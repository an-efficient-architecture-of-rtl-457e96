// dctq_pkg - shared types, widths and constants of the MPEG-4 transform and
// quantization (DCTQ) datapath.
//
// Holds the word widths of the pipeline (16-bit transform words, 12-bit
// quantized coefficients, 9-bit pixels), the distributed-arithmetic (DA)
// coefficients of the 8-point DCT in Chen's even/odd form, the scan tables of
// MPEG-4 (zig-zag, alternate-horizontal, alternate-vertical) stored as
// raster-index -> scan-position maps, and the MPEG-4 DC scaler rule.
//
// Index convention used throughout: a coefficient's raster index is u*8+v,
// u the vertical and v the horizontal frequency, so raster indices 1..7 form
// the first row (horizontal AC) and 8,16,..,56 the first column (vertical AC).
// Pixel ports carry one 8-pixel column at a time: pixel index x*8+y.
package dctq_pkg;

  // ---------------------------------------------------------------- widths
  localparam int unsigned W      = 16;  // internal transform word (16 bit per the document)
  localparam int unsigned FRAC   = 4;   // fraction bits carried between the two 1-D passes
  localparam int unsigned CW     = 12;  // quantized / transform coefficient width
  localparam int unsigned PW     = 9;   // pixel or residual width (signed)
  localparam int unsigned ROMF   = 15;  // fraction bits of the DA ROM contents
  localparam int unsigned NBLK   = 6;   // blocks per 4:2:0 macroblock
  localparam int unsigned MB_COLS = 22; // CIF: 352 / 16 macroblocks per row

  typedef logic signed [CW-1:0] coef_t;
  typedef logic signed [PW-1:0] pix_t;
  typedef logic signed [W-1:0]  word_t;

  typedef enum logic { MODE_ENC = 1'b0, MODE_DEC = 1'b1 } mode_e;
  typedef enum logic [1:0] { SCAN_ZZ = 2'd0, SCAN_ALTH = 2'd1, SCAN_ALTV = 2'd2 } scan_e;

  // -------------------------------------------- DA coefficients, 2^15 scale
  // Ck = round(2^15 * cos(k*pi/16) / 2)
  localparam int C1 = 16069;
  localparam int C2 = 15137;
  localparam int C3 = 13623;
  localparam int C4 = 11585;
  localparam int C5 = 9102;
  localparam int C6 = 6270;
  localparam int C7 = 3196;

  // Even part: X[2j] = sum_i ME[j][i] * (x[i] + x[7-i]).
  function automatic int me(input int j, input int i);
    case (j)
      0: me = C4;
      1: me = (i == 0) ? C2 : (i == 1) ? C6 : (i == 2) ? -C6 : -C2;
      2: me = (i == 0 || i == 3) ? C4 : -C4;
      default: me = (i == 0) ? C6 : (i == 1) ? -C2 : (i == 2) ? C2 : -C6;
    endcase
  endfunction

  // Odd part: X[2j+1] = sum_i MO[j][i] * (x[i] - x[7-i]).
  function automatic int mo(input int j, input int i);
    case (j)
      0: mo = (i == 0) ? C1 : (i == 1) ? C3 : (i == 2) ? C5 : C7;
      1: mo = (i == 0) ? C3 : (i == 1) ? -C7 : (i == 2) ? -C1 : -C5;
      2: mo = (i == 0) ? C5 : (i == 1) ? -C1 : (i == 2) ? C7 : C3;
      default: mo = (i == 0) ? C7 : (i == 1) ? -C5 : (i == 2) ? C3 : -C1;
    endcase
  endfunction

  // Weight of DA input i (0..3) in DA output o (0..7). Outputs 0..3 use the
  // even bank, 4..7 the odd bank. The forward transform uses the rows of the
  // matrices, the inverse one their columns.
  function automatic int da_coef(input bit inverse, input int o, input int i);
    if (o < 4) da_coef = inverse ? me(i, o) : me(o, i);
    else       da_coef = inverse ? mo(i, o - 4) : mo(o - 4, i);
  endfunction

  // DA ROM: sum of the weights selected by one bit of each of the 4 inputs.
  function automatic logic signed [17:0] da_rom(input bit inverse, input int o,
                                                input logic [3:0] addr);
    int s;
    s = 0;
    for (int i = 0; i < 4; i++)
      if (addr[i]) s += da_coef(inverse, o, i);
    da_rom = 18'(s);
  endfunction

  // ------------------------------------------------------------ scan tables
  // Scan position of raster index r (inverse of the MPEG-4 scan orders).
  localparam logic [5:0] ZZ_POS [64] = '{
     0,  1,  5,  6, 14, 15, 27, 28,  2,  4,  7, 13, 16, 26, 29, 42,
     3,  8, 12, 17, 25, 30, 41, 43,  9, 11, 18, 24, 31, 40, 44, 53,
    10, 19, 23, 32, 39, 45, 52, 54, 20, 22, 33, 38, 46, 51, 55, 60,
    21, 34, 37, 47, 50, 56, 59, 61, 35, 36, 48, 49, 57, 58, 62, 63};
  localparam logic [5:0] ALTV_POS [64] = '{
     0,  4,  6, 20, 22, 36, 38, 52,  1,  5,  7, 21, 23, 37, 39, 53,
     2,  8, 19, 24, 34, 40, 50, 54,  3,  9, 18, 25, 35, 41, 51, 55,
    10, 17, 26, 30, 42, 46, 56, 60, 11, 16, 27, 31, 43, 47, 57, 61,
    12, 15, 28, 32, 44, 48, 58, 62, 13, 14, 29, 33, 45, 49, 59, 63};

  // The alternate-horizontal scan is the transpose of the alternate-vertical one.
  function automatic logic [5:0] scan_pos(input scan_e sel, input logic [5:0] r);
    case (sel)
      SCAN_ALTV: scan_pos = ALTV_POS[r];
      SCAN_ALTH: scan_pos = ALTV_POS[{r[2:0], r[5:3]}];
      default:   scan_pos = ZZ_POS[r];
    endcase
  endfunction

  // ------------------------------------------------------- MPEG-4 DC scaler
  function automatic logic [5:0] dc_scaler(input logic [4:0] qp, input logic chroma);
    int q;
    q = int'(qp);
    if (q <= 4)       dc_scaler = 6'd8;
    else if (!chroma) dc_scaler = (q <= 8) ? 6'(2 * q) : (q <= 24) ? 6'(q + 8) : 6'(2 * q - 16);
    else              dc_scaler = (q <= 24) ? 6'((q + 13) / 2) : 6'(q - 6);
  endfunction

endpackage
