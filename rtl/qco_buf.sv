// qco_buf - quantized coefficient (QCO) buffer: 384 x 12-bit RAM holding the
// levels of one macroblock (6 blocks x 64) in scan order, address
// block*64 + scan position.
//
// Port A belongs to the scan logic (the encoder writes prediction results in
// scan order; the decoder's inverse scan reads them), port B to the entropy
// coder outside this module (the VLC reads, the VLD writes). Each port has an
// enable, a write enable, and synchronous read data (one clock). When both
// ports write one address in the same clock, port A wins. Size and width are
// the document's; the two ports are this design's choice.
module qco_buf
  import dctq_pkg::*;
#(
  parameter int unsigned DEPTH = NBLK * 64,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  coef_t         a_wdata,
  output coef_t         a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  coef_t         b_wdata,
  output coef_t         b_rdata
);

  coef_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_en && b_we && !(a_en && a_we && a_addr == b_addr)) mem[b_addr] <= b_wdata;
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (a_en && !a_we) a_rdata <= mem[a_addr];
    if (b_en && !b_we) b_rdata <= mem[b_addr];
  end

endmodule
