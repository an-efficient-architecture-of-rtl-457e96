// acdc_pred - MPEG-4 intra AC/DC prediction with a one-line prediction memory.
//
// For every block the predictor first reads three DC levels from pred_mem:
// B (top-left) from LT_DC_VALUE, A (left) from the vertical memory and C
// (top) from the horizontal memory, one per clock. The prediction direction
// follows the MPEG-4 gradient rule: if |A-B| < |B-C| the block is predicted
// from C (top, "vertical" prediction), otherwise from A (left). The DC level
// is always predicted; with ac_pred_en the first row (raster 1..7, from C)
// or the first column (raster 8,16..56, from A) is predicted as well.
//
// Memory trick of the design: a block's top neighbour DC is copied into
// LT_DC_VALUE[block] right after it is read, because it is exactly the
// top-left DC that a later block needs (table below). With this, one line of
// horizontal memory is enough instead of two.
//   block index            0 1 2 3 4 5
//   LT_DC_VALUE written    0 1 2 3 4 5
//   LT_DC_VALUE read       1 0 3 2 4 5
//
// Stream: levels arrive in raster order (in_valid/in_idx/in_data). The
// predictor for a position is read from pred_mem in the clock the level
// arrives, and the output leaves two clocks later. Encoder (mode MODE_ENC):
// out = level - prediction. Decoder (MODE_DEC): out = difference +
// prediction. The block's own levels (encoder input, decoder output) are saved
// back: DC and first row to the horizontal memory, DC and first column to the
// vertical memory (the second DC write waits for a free write clock). Inter
// blocks pass unchanged and save the MPEG-4 default (DC 1024/dc_scaler,
// AC 0), so that later intra neighbours see them as unavailable. Neighbours
// outside the picture (mb_x = 0 or mb_y = 0) are replaced by the same default.
//
// Timing: blk_start with blk, mb_x, mb_y, intra, ac_pred_en, qp valid starts
// the DC read phase; dir_top and scan_sel are valid from the 5th clock after
// blk_start until the next blk_start, and the first level may arrive then.
// Levels are held at the quantizer scale of the whole picture: prediction is
// not rescaled between macroblocks of different qp.
//
// From the document: the three memories and their sizes, the LT_DC_VALUE
// scheme and its table, the B, A, C read order, gradient before the data.
// This design's own choices: the exact clocks, saturation of differences to
// 12 bits, the default values and the inter-block handling (MPEG-4 rules).
module acdc_pred
  import dctq_pkg::*;
#(
  parameter int unsigned COLS = MB_COLS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  mode_e      mode,
  input  logic [4:0] qp,
  input  logic       intra,
  input  logic       ac_pred_en,
  input  logic [4:0] mb_x,
  input  logic [4:0] mb_y,
  input  logic       blk_start,
  input  logic [2:0] blk,
  output logic       dir_top,
  output scan_e      scan_sel,
  input  logic       in_valid,
  input  logic [5:0] in_idx,
  input  coef_t      in_data,
  output logic       out_valid,
  output logic [2:0] out_blk,
  output logic [5:0] out_idx,
  output coef_t      out_data
);

  localparam int unsigned DEPTH   = COLS * 32 + 6 + 32;
  localparam int unsigned AW      = $clog2(DEPTH);
  localparam int unsigned LT_BASE = COLS * 32;
  localparam int unsigned V_BASE  = COLS * 32 + 6;

  // -------------------------------------------------- per-block constants
  logic [2:0]    blk_r;
  logic          av_a, av_b, av_c;
  logic [2:0]    ph;
  logic [AW-1:0] hbase, vbase, ltrd, ltwr;
  logic [1:0]    hslot, vslot;
  coef_t         dcdef;
  logic [5:0]    dcs;
  logic [11:0]   dcdef_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ph    <= '0;
      blk_r <= '0;
      av_a  <= 1'b0;
      av_b  <= 1'b0;
      av_c  <= 1'b0;
    end else if (blk_start) begin
      ph    <= 3'd1;
      blk_r <= blk;
      av_a  <= (blk == 3'd1 || blk == 3'd3) || (mb_x != 5'd0);
      av_c  <= (blk == 3'd2 || blk == 3'd3) || (mb_y != 5'd0);
      case (blk)
        3'd3:    av_b <= 1'b1;
        3'd1:    av_b <= (mb_y != 5'd0);
        3'd2:    av_b <= (mb_x != 5'd0);
        default: av_b <= (mb_x != 5'd0) && (mb_y != 5'd0);
      endcase
    end else if (ph == 3'd4) begin
      ph <= 3'd0;
    end else if (ph != 3'd0) begin
      ph <= ph + 3'd1;
    end

  always_comb begin
    case (blk_r)
      3'd0, 3'd2: hslot = 2'd0;
      3'd1, 3'd3: hslot = 2'd1;
      3'd4:       hslot = 2'd2;
      default:    hslot = 2'd3;
    endcase
    case (blk_r)
      3'd0, 3'd1: vslot = 2'd0;
      3'd2, 3'd3: vslot = 2'd1;
      3'd4:       vslot = 2'd2;
      default:    vslot = 2'd3;
    endcase
    case (blk_r)
      3'd0:    ltrd = AW'(LT_BASE + 1);
      3'd1:    ltrd = AW'(LT_BASE + 0);
      3'd2:    ltrd = AW'(LT_BASE + 3);
      3'd3:    ltrd = AW'(LT_BASE + 2);
      3'd4:    ltrd = AW'(LT_BASE + 4);
      default: ltrd = AW'(LT_BASE + 5);
    endcase
  end

  assign hbase = AW'(mb_x) * AW'(32) + AW'({hslot, 3'b000});
  assign vbase = AW'(V_BASE) + AW'({vslot, 3'b000});
  assign ltwr  = AW'(LT_BASE) + AW'(blk_r);

  // Default DC level: round(1024 / dc_scaler).
  assign dcs = dc_scaler(qp, blk_r >= 3'd4);
  udiv_recip u_div (.n(12'd1024 + 12'(dcs >> 1)), .d(dcs), .q(dcdef_q));
  assign dcdef = coef_t'(dcdef_q);

  // ------------------------------------------------------------ memory
  logic          rd_en, we;
  logic [AW-1:0] raddr, waddr;
  coef_t         rdata, wdata;

  pred_mem #(.COLS(COLS)) u_mem (
    .clk  (clk),
    .we   (we),
    .waddr(waddr),
    .wdata(wdata),
    .rd_en(rd_en),
    .raddr(raddr),
    .rdata(rdata)
  );

  // ------------------------------------------------- DC read and direction
  coef_t      b_val, a_val, c_val, a_now, dc_pred;
  logic [12:0] grad_ab, grad_bc;

  function automatic logic [12:0] absdiff(input coef_t x, input coef_t y);
    logic signed [12:0] d;
    d = 13'(x) - 13'(y);
    absdiff = d[12] ? 13'(-d) : 13'(d);
  endfunction

  assign a_now = av_a ? rdata : dcdef;
  assign c_val = av_c ? rdata : dcdef;
  assign grad_bc = absdiff(b_val, c_val);

  always_ff @(posedge clk) begin
    if (ph == 3'd2) b_val <= av_b ? rdata : dcdef;
    if (ph == 3'd3) begin
      a_val   <= a_now;
      grad_ab <= absdiff(a_now, b_val);
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dir_top <= 1'b0;
      dc_pred <= '0;
    end else if (ph == 3'd4) begin
      dir_top <= (grad_ab < grad_bc);
      dc_pred <= (grad_ab < grad_bc) ? c_val : a_val;
    end

  assign scan_sel = (!intra || !ac_pred_en) ? SCAN_ZZ : (dir_top ? SCAN_ALTH : SCAN_ALTV);

  // ------------------------------------------------------------- stream
  logic       in_row, in_col;
  logic       s1_valid;
  logic [5:0] s1_idx;
  coef_t      s1_data, pred, result, save_val;
  logic       s1_row, s1_col;

  assign in_row = (in_idx[5:3] == 3'd0) && (in_idx != 6'd0);
  assign in_col = (in_idx[2:0] == 3'd0) && (in_idx != 6'd0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;

  always_ff @(posedge clk) begin
    s1_idx  <= in_idx;
    s1_data <= in_data;
  end

  assign s1_row = (s1_idx[5:3] == 3'd0) && (s1_idx != 6'd0);
  assign s1_col = (s1_idx[2:0] == 3'd0) && (s1_idx != 6'd0);

  function automatic coef_t sat12(input logic signed [12:0] v);
    if (v > 13'sd2047)       sat12 = 12'sh7ff;
    else if (v < -13'sd2048) sat12 = 12'sh800;
    else                     sat12 = coef_t'(v);
  endfunction

  always_comb begin
    pred = '0;
    if (intra) begin
      if (s1_idx == 6'd0)                        pred = dc_pred;
      else if (ac_pred_en && s1_row && dir_top && av_c)   pred = rdata;
      else if (ac_pred_en && s1_col && !dir_top && av_a)  pred = rdata;
    end
    if (mode == MODE_ENC) result = sat12(13'(s1_data) - 13'(pred));
    else                  result = sat12(13'(s1_data) + 13'(pred));
    if (!intra)                save_val = (s1_idx == 6'd0) ? dcdef : '0;
    else if (mode == MODE_ENC) save_val = s1_data;
    else                       save_val = result;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s1_valid;

  always_ff @(posedge clk) begin
    out_blk  <= blk_r;
    out_idx  <= s1_idx;
    out_data <= result;
  end

  // ------------------------------------------------ memory port control
  logic  stream_we, pend_v;
  coef_t pend_data;

  assign stream_we = s1_valid && (s1_idx[5:3] == 3'd0 || s1_idx[2:0] == 3'd0);

  always_comb begin
    rd_en = 1'b0;
    raddr = '0;
    case (ph)
      3'd1: begin rd_en = 1'b1; raddr = ltrd; end
      3'd2: begin rd_en = 1'b1; raddr = vbase; end
      3'd3: begin rd_en = 1'b1; raddr = hbase; end
      default: begin
        rd_en = in_valid && (in_row || in_col);
        raddr = in_row ? hbase + AW'(in_idx[2:0]) : vbase + AW'(in_idx[5:3]);
      end
    endcase
    we    = 1'b0;
    waddr = '0;
    wdata = save_val;
    if (ph == 3'd4) begin
      we    = 1'b1;
      waddr = ltwr;
      wdata = c_val;
    end else if (stream_we) begin
      we    = 1'b1;
      waddr = (s1_idx[5:3] == 3'd0) ? hbase + AW'(s1_idx[2:0]) : vbase + AW'(s1_idx[5:3]);
    end else if (pend_v) begin
      we    = 1'b1;
      waddr = vbase;
      wdata = pend_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pend_v <= 1'b0;
    else if (s1_valid && s1_idx == 6'd0) pend_v <= 1'b1;
    else if (!stream_we && ph != 3'd4) pend_v <= 1'b0;

  always_ff @(posedge clk)
    if (s1_valid && s1_idx == 6'd0) pend_data <= save_val;

  // The DC read phase and the level stream share the read port.
  assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && ph != 3'd0))
    else $error("acdc_pred: level arrived during the DC read phase");
  assert property (@(posedge clk) disable iff (!rst_n) !(s1_valid && ph == 3'd4))
    else $error("acdc_pred: level save collides with the LT save");

endmodule
