// dct1d_core - 8-point 1-D DCT (INVERSE=0) or IDCT (INVERSE=1) by bit-serial
// distributed arithmetic, built as the three-step pipeline of the design:
//
//   SPC  serial-to-parallel: 8 words arrive one per clock and are gathered.
//   RAC  shuffle and ROM-accumulate: the forward transform first forms the
//        Chen butterfly (x[i]+x[7-i], x[i]-x[7-i]); the inverse transform feeds
//        even and odd coefficients straight in. Each of the 8 outputs owns a
//        16-entry DA ROM addressed by one bit of each of its 4 inputs and a
//        shift accumulator. The 16-bit input words are consumed MSB first in 8
//        clocks: every clock one ROM/accumulator pair takes bit 15-t and a second
//        pair bit 7-t (the sign bit 15 is subtracted). The inverse transform
//        ends with the output butterfly E[n] +/- O[n].
//   PSC  parallel-to-serial: the 8 results leave one per clock.
//
// Timing: the 8 samples of a vector are taken on 8 in_valid clocks (normally
// consecutive); the RAC runs the next 8 clocks and the results appear on
// out_valid exactly 16 clocks after the first input sample, i.e. one 8-clock
// step per pipeline stage. A new vector may follow every 8 clocks.
//
// Arithmetic: ROM weights are cos(k*pi/16)/2 scaled by 2^15 (dctq_pkg);
// results are rounded to odd and saturated to 16 bits. The DA structure,
// Chen's algorithm, the three steps and the 16-bit word follow the document;
// the two-bit-per-clock split of the 16-bit word (needed to finish in 8 clocks)
// and the rounding are this design's choices.
module dct1d_core
  import dctq_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t in_data,
  output logic  out_valid,
  output word_t out_data
);

  localparam int AW = 36;  // accumulator width

  // ------------------------------------------------------------------ SPC
  logic [2:0] spc_cnt;
  word_t      spc_reg [7];
  word_t      vec     [8];
  logic       spc_full;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) spc_cnt <= '0;
    else if (in_valid) spc_cnt <= spc_cnt + 3'd1;

  always_ff @(posedge clk)
    if (in_valid && spc_cnt != 3'd7) spc_reg[spc_cnt] <= in_data;

  assign spc_full = in_valid && (spc_cnt == 3'd7);

  always_comb begin
    for (int i = 0; i < 7; i++) vec[i] = spc_reg[i];
    vec[7] = in_data;
  end

  // -------------------------------------------------------------- shuffle
  function automatic word_t sat16(input logic signed [W:0] v);
    if (v > 17'sd32767)       sat16 = 16'sh7fff;
    else if (v < -17'sd32768) sat16 = 16'sh8000;
    else                      sat16 = word_t'(v);
  endfunction

  word_t shuf_e [4];
  word_t shuf_o [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      if (!INVERSE) begin
        shuf_e[i] = sat16({vec[i][W-1], vec[i]} + {vec[7-i][W-1], vec[7-i]});
        shuf_o[i] = sat16({vec[i][W-1], vec[i]} - {vec[7-i][W-1], vec[7-i]});
      end else begin
        shuf_e[i] = vec[2*i];
        shuf_o[i] = vec[2*i+1];
      end
    end
  end

  // ------------------------------------------------------------------ RAC
  word_t      da_e [4];
  word_t      da_o [4];
  logic       rac_busy;
  logic [2:0] step;
  logic signed [AW-1:0] acc_lo [8];
  logic signed [AW-1:0] acc_hi [8];
  logic signed [AW-1:0] nxt_lo [8];
  logic signed [AW-1:0] nxt_hi [8];
  logic signed [AW-1:0] total  [8];
  logic       rac_done;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rac_busy <= 1'b0;
      step     <= '0;
    end else if (spc_full) begin
      rac_busy <= 1'b1;
      step     <= '0;
    end else if (rac_busy) begin
      step     <= step + 3'd1;
      if (step == 3'd7) rac_busy <= 1'b0;
    end

  assign rac_done = rac_busy && (step == 3'd7);

  always_ff @(posedge clk)
    if (spc_full)
      for (int i = 0; i < 4; i++) begin
        da_e[i] <= shuf_e[i];
        da_o[i] <= shuf_o[i];
      end

  always_comb begin
    for (int o = 0; o < 8; o++) begin
      logic [3:0] a_lo, a_hi;
      logic signed [17:0] r_lo, r_hi;
      for (int i = 0; i < 4; i++) begin
        a_lo[i] = (o < 4) ? da_e[i][7 - step]  : da_o[i][7 - step];
        a_hi[i] = (o < 4) ? da_e[i][15 - step] : da_o[i][15 - step];
      end
      r_lo = da_rom(INVERSE, o, a_lo);
      r_hi = da_rom(INVERSE, o, a_hi);
      nxt_lo[o] = ((step == 3'd0) ? AW'(0) : (acc_lo[o] <<< 1)) + AW'(r_lo);
      nxt_hi[o] = (step == 3'd0) ? -AW'(r_hi) : ((acc_hi[o] <<< 1) + AW'(r_hi));
      total[o]  = (nxt_hi[o] <<< 8) + nxt_lo[o];
    end
  end

  always_ff @(posedge clk)
    if (rac_busy)
      for (int o = 0; o < 8; o++) begin
        acc_lo[o] <= nxt_lo[o];
        acc_hi[o] <= nxt_hi[o];
      end

  // Rounding and (for the IDCT) the output butterfly. Results are rounded to
  // odd (truncate, then set the LSB if any dropped bit was set): unbiased, and
  // free of double-rounding bias when the 2-D unit later rounds them again to
  // whole numbers.
  function automatic word_t rnd(input logic signed [AW-1:0] v);
    logic signed [AW-1:0] t;
    t = v >>> ROMF;
    if (v[ROMF-1:0] != '0) t[0] = 1'b1;
    if (t > AW'(32767))       rnd = 16'sh7fff;
    else if (t < -AW'(32768)) rnd = 16'sh8000;
    else                      rnd = word_t'(t);
  endfunction

  word_t res [8];
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      if (!INVERSE) begin
        res[2*k]   = rnd(total[k]);
        res[2*k+1] = rnd(total[4+k]);
      end else begin
        res[k]     = rnd(total[k] + total[4+k]);
        res[7-k]   = rnd(total[k] - total[4+k]);
      end
    end
  end

  // ------------------------------------------------------------------ PSC
  word_t      psc_reg [8];
  logic [3:0] psc_left;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) psc_left <= '0;
    else if (rac_done) psc_left <= 4'd8;
    else if (psc_left != 0) psc_left <= psc_left - 4'd1;

  always_ff @(posedge clk)
    if (rac_done)
      for (int k = 0; k < 8; k++) psc_reg[k] <= res[k];
    else
      for (int k = 0; k < 7; k++) psc_reg[k] <= psc_reg[k+1];

  assign out_valid = (psc_left != 0);
  assign out_data  = psc_reg[0];

endmodule
