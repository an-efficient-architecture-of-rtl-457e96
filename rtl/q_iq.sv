// q_iq - quantizer (Q) and inverse quantizer (IQ) of the DCTQ module, two
// independent one-clock pipelines that share the quantizer scale qp.
//
// Q takes transform coefficients F and produces quantized levels QF; IQ
// takes levels and reconstructs coefficients. Both follow the MPEG-4 /
// H.263 quantization method:
//   intra DC      QF = F // dc_scaler (rounded)    F = QF * dc_scaler
//   intra AC      |QF| = |F| / (2*qp)             |F| = qp*(2|QF|+1) - (qp even)
//   inter         |QF| = (|F| - qp/2) / (2*qp)    same as intra AC
// with the sign restored and F saturated to [-2048, 2047]; QF = 0 gives F = 0.
// dc_scaler follows the MPEG-4 table for luma (blocks 0..3) and chroma
// (blocks 4, 5). Division uses exact reciprocal multiplication (udiv_recip).
//
// Each stream carries a valid flag, the block number (0..5) and the raster
// index (0 = DC) with its data; the outputs are registered, one clock later.
// The document names the Q/IQ block and places it in the data flow; the
// quantization method, the widths and the one-clock latency are this
// design's choices.
module q_iq
  import dctq_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] qp,
  input  logic       intra,
  // quantizer
  input  logic       q_in_valid,
  input  logic [2:0] q_in_blk,
  input  logic [5:0] q_in_idx,
  input  coef_t      q_in_data,
  output logic       q_out_valid,
  output logic [2:0] q_out_blk,
  output logic [5:0] q_out_idx,
  output coef_t      q_out_data,
  // inverse quantizer
  input  logic       iq_in_valid,
  input  logic [2:0] iq_in_blk,
  input  logic [5:0] iq_in_idx,
  input  coef_t      iq_in_data,
  output logic       iq_out_valid,
  output logic [2:0] iq_out_blk,
  output logic [5:0] iq_out_idx,
  output coef_t      iq_out_data
);

  // ----------------------------------------------------------------- Q
  logic        q_dc, q_neg;
  logic [5:0]  q_dcs, q_div;
  logic [11:0] q_mag, q_num, q_quo;
  logic [4:0]  q_half;

  assign q_dc   = intra && (q_in_idx == 6'd0);
  assign q_dcs  = dc_scaler(qp, q_in_blk >= 3'd4);
  assign q_neg  = q_in_data[CW-1];
  assign q_mag  = q_neg ? 12'(-q_in_data) : 12'(q_in_data);  // 2048 -> 12'h800
  assign q_half = qp >> 1;

  always_comb begin
    if (q_dc) begin
      q_div = q_dcs;
      q_num = q_mag + 12'(q_dcs >> 1);
    end else begin
      q_div = {qp, 1'b0};
      if (intra)                 q_num = q_mag;
      else if (q_mag > 12'(q_half)) q_num = q_mag - 12'(q_half);
      else                       q_num = '0;
    end
  end

  udiv_recip u_qdiv (.n(q_num), .d(q_div), .q(q_quo));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q_out_valid <= 1'b0;
    else        q_out_valid <= q_in_valid;

  always_ff @(posedge clk) begin
    q_out_blk  <= q_in_blk;
    q_out_idx  <= q_in_idx;
    q_out_data <= q_neg ? -coef_t'(q_quo) : coef_t'(q_quo);
  end

  // ---------------------------------------------------------------- IQ
  logic        iq_dc, iq_neg;
  logic [5:0]  iq_dcs;
  logic [11:0] iq_mag;
  logic [18:0] iq_full;

  assign iq_dc  = intra && (iq_in_idx == 6'd0);
  assign iq_dcs = dc_scaler(qp, iq_in_blk >= 3'd4);
  assign iq_neg = iq_in_data[CW-1];
  assign iq_mag = iq_neg ? 12'(-iq_in_data) : 12'(iq_in_data);

  always_comb begin
    if (iq_mag == 12'd0)
      iq_full = '0;
    else if (iq_dc)
      iq_full = 19'(iq_mag) * 19'(iq_dcs);
    else
      iq_full = 19'(qp) * (19'(iq_mag) * 19'd2 + 19'd1) - 19'(!qp[0]);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) iq_out_valid <= 1'b0;
    else        iq_out_valid <= iq_in_valid;

  always_ff @(posedge clk) begin
    iq_out_blk <= iq_in_blk;
    iq_out_idx <= iq_in_idx;
    if (!iq_neg) iq_out_data <= (iq_full > 19'd2047) ? 12'sd2047 : coef_t'(iq_full);
    else         iq_out_data <= (iq_full > 19'd2048) ? -12'sd2048 : -coef_t'(iq_full);
  end

endmodule
