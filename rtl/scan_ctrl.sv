// scan_ctrl - scan and inverse-scan logic between the AC/DC predictor and the
// QCO buffer.
//
// Both directions use the same map from a coefficient's raster index to its
// position in the selected MPEG-4 scan (zig-zag, alternate-horizontal or
// alternate-vertical, chosen per block by the predictor) and the buffer
// address block*64 + scan position:
//   encoder  each prediction result (enc_valid) is written to the buffer, so
//            the buffer ends up holding the macroblock in scan order for the
//            VLC;
//   decoder  a read request for raster index dec_idx (dec_valid) reads the
//            level the VLD left in scan order; the level leaves on dq_* one
//            clock later (synchronous buffer read), still in raster order.
// The document gives the function (scan into the QCO buffer, inverse scan out
// of it, after the direction is known); the table form and the one-clock
// read are this design's choices.
module scan_ctrl
  import dctq_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  mode_e      mode,
  input  scan_e      scan_sel,
  // encoder: prediction results in raster order
  input  logic       enc_valid,
  input  logic [2:0] enc_blk,
  input  logic [5:0] enc_idx,
  input  coef_t      enc_data,
  // decoder: raster-order read requests and the levels read
  input  logic       dec_valid,
  input  logic [2:0] dec_blk,
  input  logic [5:0] dec_idx,
  output logic       dq_valid,
  output logic [2:0] dq_blk,
  output logic [5:0] dq_idx,
  output coef_t      dq_data,
  // QCO buffer port A
  output logic       qa_en,
  output logic       qa_we,
  output logic [8:0] qa_addr,
  output coef_t      qa_wdata,
  input  coef_t      qa_rdata
);

  logic [2:0] blk;
  logic [5:0] idx;

  assign blk      = (mode == MODE_ENC) ? enc_blk : dec_blk;
  assign idx      = (mode == MODE_ENC) ? enc_idx : dec_idx;
  assign qa_en    = (mode == MODE_ENC) ? enc_valid : dec_valid;
  assign qa_we    = (mode == MODE_ENC);
  assign qa_addr  = {blk, scan_pos(scan_sel, idx)};
  assign qa_wdata = enc_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dq_valid <= 1'b0;
    else        dq_valid <= dec_valid && (mode == MODE_DEC);

  always_ff @(posedge clk) begin
    dq_blk <= dec_blk;
    dq_idx <= dec_idx;
  end

  assign dq_data = qa_rdata;

endmodule
