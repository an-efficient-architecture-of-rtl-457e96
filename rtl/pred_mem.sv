// pred_mem - AC/DC prediction memory: one 12-bit wide two-port RAM of
// MB_COLS*32 + 6 + 32 words (742 for CIF) holding three regions:
//   horizontal memory  [0, MB_COLS*32)   per macroblock column 4 slots of 8
//                      words (luma left column Y1/Y3, luma right column
//                      Y2/Y4, U, V): DC and the 7 horizontal AC levels of the
//                      last block coded in that block column
//   LT_DC_VALUE        [MB_COLS*32, +6)  one top-left DC candidate per block
//                      index (see acdc_pred)
//   vertical memory    [MB_COLS*32+6, +32) 4 slots of 8 (luma rows R1 and R2,
//                      U, V): DC and the 7 vertical AC levels of the last block
//                      coded on the left
// One write port and one synchronous read port (data the clock after rd_en;
// a read and a write of one address in the same clock return the old word).
// The size and the three regions follow the document's memory figure; the
// position of the DC in the vertical slots and the two-port organisation are
// this design's choices. Contents are not reset: the predictor replaces any
// neighbour outside the picture by its default value.
module pred_mem
  import dctq_pkg::*;
#(
  parameter int unsigned COLS  = MB_COLS,
  parameter int unsigned DEPTH = COLS * 32 + 6 + 32,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  coef_t         wdata,
  input  logic          rd_en,
  input  logic [AW-1:0] raddr,
  output coef_t         rdata
);

  coef_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (waddr < AW'(DEPTH))) mem[waddr] <= wdata;
    if (rd_en) rdata <= (raddr < AW'(DEPTH)) ? mem[raddr] : '0;
  end

endmodule
