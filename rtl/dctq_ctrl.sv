// dctq_ctrl - macroblock sequencer of the DCTQ module.
//
// A start pulse (ignored while busy) begins one macroblock in the mode given
// by `mode`, which must stay stable, like the macroblock parameters, until
// done. All events are fixed offsets from the start clock (t = 0):
//
//   encoder  fdct_start at t=0; FDCT results leave from t=153, the quantizer
//            adds 1 clock, the inverse quantizer 1 more, so idct_start is at
//            t=154 and reconstructed pixels leave from t=307. blk_start for
//            block b at t=148+128b, 6 clocks before its first level reaches
//            the AC/DC predictor. done at t=1066 (last IDCT output).
//   decoder  inverse-scan read requests for block b, raster index u*8+v, at
//            t=8+128b+16u+v, i.e. 8 levels in every other 8-clock slot so the
//            IDCT receives them exactly in its input windows; blk_start at
//            t=2+128b; idct_start at t=11; done at t=923.
//
// The 16-clock rhythm and the 152-clock transform latency come from the
// document's timing; the document's macroblock period of 1064 clocks
// (912 + 152) grows here by the two pipeline registers of Q and IQ.
module dctq_ctrl
  import dctq_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  mode_e      mode,
  output logic       busy,
  output logic       done,
  output logic       fdct_start,
  output logic       idct_start,
  output logic       blk_start,
  output logic [2:0] blk,
  output logic       rd_valid,
  output logic [2:0] rd_blk,
  output logic [5:0] rd_idx
);

  localparam int unsigned ENC_LAST   = 1066;
  localparam int unsigned DEC_LAST   = 923;
  localparam int unsigned ENC_IDCT   = 154;
  localparam int unsigned DEC_IDCT   = 11;
  localparam int unsigned ENC_BLK0   = 148;
  localparam int unsigned DEC_BLK0   = 2;
  localparam int unsigned DEC_RD0    = 8;

  logic [10:0] t;
  logic [10:0] tb, tr;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy <= 1'b0;
      t    <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        t    <= '0;
      end
    end else if (done) begin
      busy <= 1'b0;
    end else begin
      t <= t + 11'd1;
    end

  assign done       = busy && (t == 11'((mode == MODE_ENC) ? ENC_LAST : DEC_LAST));
  assign fdct_start = busy && (mode == MODE_ENC) && (t == 11'd0);
  assign idct_start = busy && (t == 11'((mode == MODE_ENC) ? ENC_IDCT : DEC_IDCT));

  // block starts every 128 clocks
  assign tb        = t - 11'((mode == MODE_ENC) ? ENC_BLK0 : DEC_BLK0);
  assign blk_start = busy && (t >= 11'((mode == MODE_ENC) ? ENC_BLK0 : DEC_BLK0))
                   && (tb[6:0] == 7'd0) && (tb[10:7] < 4'(NBLK));
  assign blk       = tb[9:7];

  // decoder read requests: first 8 clocks of every 16
  assign tr       = t - 11'(DEC_RD0);
  assign rd_valid = busy && (mode == MODE_DEC) && (t >= 11'(DEC_RD0))
                  && (tr[10:7] < 4'(NBLK)) && !tr[3];
  assign rd_blk   = tr[9:7];
  assign rd_idx   = {tr[6:4], tr[2:0]};

endmodule
