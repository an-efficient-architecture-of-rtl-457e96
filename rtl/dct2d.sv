// dct2d - 2-D 8x8 forward DCT (INVERSE=0) or inverse DCT (INVERSE=1) of a
// whole macroblock (NBLK blocks) with a single 1-D core, an input multiplexer
// and a 64-word transposition memory (TM), by row-column decomposition.
//
// Schedule (16 clocks per period, 8-clock slots): in the first 8 clocks of a
// period the MUX passes an external 8-sample input vector to the core, in the
// last 8 clocks a column read back from the TM. First-pass results are
// written to the TM, second-pass results leave on out_*. With slots counted
// from 0 after start:
//   external vector r of block b      enters in slot 16b+2r
//   TM column c of block b            enters in slot 17+16b+2c
//   each vector leaves the core two slots after it entered
// so the first result leaves 152 clocks after start, a result vector follows
// every other slot, and a 6-block macroblock takes (16*6+18)*8 = 912 clocks,
// as in the document's operation table. Block b+1 writes its row r into the
// TM places freed by column r of block b, so the TM alternates between
// row-major and column-major addressing from block to block.
//
// Interface: a start pulse (ignored while busy) begins a run. in_ready marks
// the clocks on which in_data is sampled (no back-pressure: the source must
// deliver then); in_blk/in_idx tell which sample is taken. Samples of a block
// enter as 8 vectors of 8; out_idx = 8*(second-pass vector) + element.
// For the forward transform feed each pixel column as one vector (pixel index
// x*8+y); the coefficients then leave in raster order u*8+v. The inverse
// transform takes coefficients in raster order and returns pixels as columns.
// Input words are scaled by 2^FRAC before the first pass; outputs are rounded
// and saturated to OW bits. The data ordering and rounding are this design's
// choices; the schedule follows the document.
module dct2d
  import dctq_pkg::*;
#(
  parameter bit          INVERSE = 1'b0,
  parameter int unsigned NB      = NBLK,
  parameter int unsigned IW      = INVERSE ? CW : PW,
  parameter int unsigned OW      = INVERSE ? PW : CW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic                 in_ready,
  output logic [2:0]           in_blk,
  output logic [5:0]           in_idx,
  input  logic signed [IW-1:0] in_data,
  output logic                 out_valid,
  output logic [2:0]           out_blk,
  output logic [5:0]           out_idx,
  output logic signed [OW-1:0] out_data
);

  localparam int unsigned TOT = (16 * NB + 18) * 8;
  localparam int unsigned CB  = $clog2(TOT + 1);

  logic [CB-1:0] cyc, nxt;
  logic [CB-4:0] slot, nslot;
  logic [2:0]    j, nj;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy <= 1'b0;
      cyc  <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        cyc  <= '0;
      end
    end else if (cyc == CB'(TOT - 1)) begin
      busy <= 1'b0;
    end else begin
      cyc <= cyc + 1'b1;
    end

  assign done  = busy && (cyc == CB'(TOT - 1));
  assign slot  = cyc[CB-1:3];
  assign j     = cyc[2:0];
  assign nxt   = cyc + 1'b1;
  assign nslot = nxt[CB-1:3];
  assign nj    = nxt[2:0];

  // ------------------------------------------------------- external input
  assign in_ready = busy && !slot[0] && (slot < (CB-3)'(16 * NB));
  assign in_blk   = 3'(slot >> 4);
  assign in_idx   = {slot[3:1], j};

  // ------------------------------------------ TM column read (1 clock ahead)
  logic          rd_en, col_valid;
  logic [CB-4:0] nsc;
  logic [5:0]    raddr;
  word_t         tm_rdata;

  assign nsc   = nslot - (CB-3)'(17);
  assign rd_en = busy && (cyc != CB'(TOT - 1)) && nslot[0] && (nslot >= (CB-3)'(17))
               && (nsc < (CB-3)'(16 * NB));
  // block parity nsc[4], column nsc[3:1], element nj
  assign raddr = nsc[4] ? {nsc[3:1], nj} : {nj, nsc[3:1]};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) col_valid <= 1'b0;
    else        col_valid <= rd_en;

  // ----------------------------------------------------------- MUX + core
  logic  core_in_valid, core_out_valid;
  word_t core_in, core_out;

  assign core_in_valid = in_ready || col_valid;
  assign core_in       = col_valid ? tm_rdata : word_t'(in_data) <<< FRAC;

  dct1d_core #(.INVERSE(INVERSE)) u_core (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (core_in_valid),
    .in_data  (core_in),
    .out_valid(core_out_valid),
    .out_data (core_out)
  );

  // -------------------------------------------------- first pass -> TM
  logic          tm_we;
  logic [CB-4:0] rs, cs;
  logic [5:0]    waddr;

  assign rs    = slot - (CB-3)'(2);
  assign tm_we = core_out_valid && !slot[0];
  // block parity rs[4], row rs[3:1], element j
  assign waddr = rs[4] ? {j, rs[3:1]} : {rs[3:1], j};

  dct_tm u_tm (
    .clk  (clk),
    .we   (tm_we),
    .waddr(waddr),
    .wdata(core_out),
    .rd_en(rd_en),
    .raddr(raddr),
    .rdata(tm_rdata)
  );

  // ------------------------------------------------ second pass -> output
  localparam logic signed [W-1:0] OMAX = W'((1 <<< (OW - 1)) - 1);
  localparam logic signed [W-1:0] OMIN = -W'(1 <<< (OW - 1));

  word_t rounded;
  assign rounded = word_t'(($signed({core_out[W-1], core_out}) + (17'sd1 <<< (FRAC - 1))) >>> FRAC);
  assign cs      = slot - (CB-3)'(19);

  assign out_valid = core_out_valid && slot[0];
  assign out_blk   = 3'(cs >> 4);
  assign out_idx   = {cs[3:1], j};
  assign out_data  = (rounded > OMAX) ? OMAX[OW-1:0] :
                     (rounded < OMIN) ? OMIN[OW-1:0] : rounded[OW-1:0];

endmodule
