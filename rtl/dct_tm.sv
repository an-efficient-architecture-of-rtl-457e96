// dct_tm - transposition memory (TM) of a 2-D DCT/IDCT unit: 64 words of 16
// bits holding one 8x8 block of first-pass (row) results until the second
// (column) pass reads them back.
//
// One write port and one synchronous read port (read data appears the clock
// after rd_en). A read and a write to the same address in one clock return
// the old word. Size and width follow the document's area table (64 x 16);
// the two-port organisation is this design's choice. The row/column address
// pattern is generated by dct2d, which lets a new block's rows overwrite the
// columns the previous block has already given up, so one 64-word array is
// enough.
module dct_tm
  import dctq_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  word_t                    wdata,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output word_t                    rdata
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (rd_en) rdata <= mem[raddr];
  end

endmodule
