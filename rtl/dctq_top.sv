// dctq_top - transform and quantization (DCTQ) module of an MPEG-4 video
// codec for CIF pictures, processing one 4:2:0 macroblock (6 blocks of 8x8)
// per start.
//
// Encoder path (mode MODE_ENC):
//   pixels -> 2-D FDCT -> Q -> AC/DC prediction -> scan -> QCO buffer -> VLC
//                          \-> IQ -> 2-D IDCT -> reconstructed residual/pixels
// Decoder path (mode MODE_DEC):
//   VLD -> QCO buffer -> inverse scan -> AC/DC prediction -> IQ -> 2-D IDCT
// The two paths share every block; encoding and decoding alternate per
// picture, so the prediction memory holds the state of one path at a time.
//
// Interface:
//   start/mode/intra/ac_pred_en/qp/mb_x/mb_y  one macroblock; hold the
//       parameters from start to done. Macroblocks of a picture must be
//       started in raster order (mb_x, then mb_y).
//   pix_ready/pix_blk/pix_idx/pix_data  encoder input: pix_data (signed 9
//       bit: intra pixels 0..255 or inter residuals) must be valid in every
//       clock pix_ready is high; pix_idx = x*8+y (one pixel column per 8
//       clocks, every other 8-clock slot).
//   rec_valid/rec_blk/rec_idx/rec_data  IDCT output, same pixel order.
//   qco_*  second port of the QCO buffer for the entropy coder: address
//       block*64 + scan position; read data one clock after a read.
//       Encoder: read the macroblock after done, before the next start.
//       Decoder: write the levels of a macroblock before its start.
//
// Timing: encoder done 1066 clocks after start, decoder done 923 clocks
// after start (see dctq_ctrl).
module dctq_top
  import dctq_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  mode_e      mode,
  input  logic       intra,
  input  logic       ac_pred_en,
  input  logic [4:0] qp,
  input  logic [4:0] mb_x,
  input  logic [4:0] mb_y,
  output logic       busy,
  output logic       done,
  // encoder pixel input
  output logic       pix_ready,
  output logic [2:0] pix_blk,
  output logic [5:0] pix_idx,
  input  pix_t       pix_data,
  // reconstruction output
  output logic       rec_valid,
  output logic [2:0] rec_blk,
  output logic [5:0] rec_idx,
  output pix_t       rec_data,
  // QCO buffer, entropy coder side
  input  logic       qco_en,
  input  logic       qco_we,
  input  logic [8:0] qco_addr,
  input  coef_t      qco_wdata,
  output coef_t      qco_rdata
);

  // --------------------------------------------------------- sequencer
  logic       fdct_start, idct_start, blk_start;
  logic [2:0] blk;
  logic       rd_valid;
  logic [2:0] rd_blk;
  logic [5:0] rd_idx;

  dctq_ctrl u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .mode      (mode),
    .busy      (busy),
    .done      (done),
    .fdct_start(fdct_start),
    .idct_start(idct_start),
    .blk_start (blk_start),
    .blk       (blk),
    .rd_valid  (rd_valid),
    .rd_blk    (rd_blk),
    .rd_idx    (rd_idx)
  );

  // ------------------------------------------------------------- FDCT
  logic       f_valid;
  logic [2:0] f_blk;
  logic [5:0] f_idx;
  coef_t      f_data;
  logic       f_busy, f_done;

  dct2d #(.INVERSE(1'b0)) u_fdct (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (fdct_start),
    .busy     (f_busy),
    .done     (f_done),
    .in_ready (pix_ready),
    .in_blk   (pix_blk),
    .in_idx   (pix_idx),
    .in_data  (pix_data),
    .out_valid(f_valid),
    .out_blk  (f_blk),
    .out_idx  (f_idx),
    .out_data (f_data)
  );

  // ------------------------------------------------------------ Q / IQ
  logic       q_valid, iq_in_valid, iq_valid;
  logic [2:0] q_blk, iq_in_blk, iq_blk;
  logic [5:0] q_idx, iq_in_idx, iq_idx;
  coef_t      q_data, iq_in_data, iq_data;

  // acdc / scan signals
  logic       p_in_valid, p_valid;
  logic [5:0] p_in_idx, p_idx;
  coef_t      p_in_data, p_data;
  logic [2:0] p_blk;
  logic       dir_top;
  scan_e      scan_sel;
  logic       dq_valid;
  logic [2:0] dq_blk;
  logic [5:0] dq_idx;
  coef_t      dq_data;

  q_iq u_qiq (
    .clk         (clk),
    .rst_n       (rst_n),
    .qp          (qp),
    .intra       (intra),
    .q_in_valid  (f_valid),
    .q_in_blk    (f_blk),
    .q_in_idx    (f_idx),
    .q_in_data   (f_data),
    .q_out_valid (q_valid),
    .q_out_blk   (q_blk),
    .q_out_idx   (q_idx),
    .q_out_data  (q_data),
    .iq_in_valid (iq_in_valid),
    .iq_in_blk   (iq_in_blk),
    .iq_in_idx   (iq_in_idx),
    .iq_in_data  (iq_in_data),
    .iq_out_valid(iq_valid),
    .iq_out_blk  (iq_blk),
    .iq_out_idx  (iq_idx),
    .iq_out_data (iq_data)
  );

  // The encoder reconstructs from the quantizer output, the decoder from the
  // prediction output.
  assign iq_in_valid = (mode == MODE_ENC) ? q_valid : p_valid;
  assign iq_in_blk   = (mode == MODE_ENC) ? q_blk   : p_blk;
  assign iq_in_idx   = (mode == MODE_ENC) ? q_idx   : p_idx;
  assign iq_in_data  = (mode == MODE_ENC) ? q_data  : p_data;

  // ---------------------------------------------------- AC/DC prediction
  assign p_in_valid = (mode == MODE_ENC) ? q_valid : dq_valid;
  assign p_in_idx   = (mode == MODE_ENC) ? q_idx   : dq_idx;
  assign p_in_data  = (mode == MODE_ENC) ? q_data  : dq_data;

  acdc_pred u_acdc (
    .clk       (clk),
    .rst_n     (rst_n),
    .mode      (mode),
    .qp        (qp),
    .intra     (intra),
    .ac_pred_en(ac_pred_en),
    .mb_x      (mb_x),
    .mb_y      (mb_y),
    .blk_start (blk_start),
    .blk       (blk),
    .dir_top   (dir_top),
    .scan_sel  (scan_sel),
    .in_valid  (p_in_valid),
    .in_idx    (p_in_idx),
    .in_data   (p_in_data),
    .out_valid (p_valid),
    .out_blk   (p_blk),
    .out_idx   (p_idx),
    .out_data  (p_data)
  );

  // ------------------------------------------------- scan and QCO buffer
  logic       qa_en, qa_we;
  logic [8:0] qa_addr;
  coef_t      qa_wdata, qa_rdata;

  scan_ctrl u_scan (
    .clk      (clk),
    .rst_n    (rst_n),
    .mode     (mode),
    .scan_sel (scan_sel),
    .enc_valid(p_valid && (mode == MODE_ENC)),
    .enc_blk  (p_blk),
    .enc_idx  (p_idx),
    .enc_data (p_data),
    .dec_valid(rd_valid),
    .dec_blk  (rd_blk),
    .dec_idx  (rd_idx),
    .dq_valid (dq_valid),
    .dq_blk   (dq_blk),
    .dq_idx   (dq_idx),
    .dq_data  (dq_data),
    .qa_en    (qa_en),
    .qa_we    (qa_we),
    .qa_addr  (qa_addr),
    .qa_wdata (qa_wdata),
    .qa_rdata (qa_rdata)
  );

  qco_buf u_qco (
    .clk    (clk),
    .a_en   (qa_en),
    .a_we   (qa_we),
    .a_addr (qa_addr),
    .a_wdata(qa_wdata),
    .a_rdata(qa_rdata),
    .b_en   (qco_en),
    .b_we   (qco_we),
    .b_addr (qco_addr),
    .b_wdata(qco_wdata),
    .b_rdata(qco_rdata)
  );

  // ------------------------------------------------------------- IDCT
  logic       i_ready, i_busy, i_done;
  logic [2:0] i_blk;
  logic [5:0] i_idx;

  dct2d #(.INVERSE(1'b1)) u_idct (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (idct_start),
    .busy     (i_busy),
    .done     (i_done),
    .in_ready (i_ready),
    .in_blk   (i_blk),
    .in_idx   (i_idx),
    .in_data  (iq_data),
    .out_valid(rec_valid),
    .out_blk  (rec_blk),
    .out_idx  (rec_idx),
    .out_data (rec_data)
  );

  // The schedule delivers every level to the IDCT exactly in its input window.
  assert property (@(posedge clk) disable iff (!rst_n)
                   i_ready |-> (iq_valid && iq_blk == i_blk && iq_idx == i_idx))
    else $error("dctq_top: IDCT input window without the matching level");
  assert property (@(posedge clk) disable iff (!rst_n) iq_valid |-> i_ready)
    else $error("dctq_top: level reached the IDCT outside its input window");

endmodule
