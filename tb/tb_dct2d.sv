// tb_dct2d - runs the 2-D forward and inverse transform units side by side
// on NMB macroblocks of random data and checks:
//   * FDCT coefficients within 1 of the rounded floating-point 2-D DCT;
//   * IDCT accuracy in the manner of IEEE Std 1180: input blocks are the
//     rounded exact DCT of random pixels in [-256, 255]; the peak error, the
//     worst per-pixel mean square and mean errors and the overall mean
//     square and mean errors against the rounded exact IDCT must stay within
//     1, 0.06, 0.015, 0.02 and 0.0015;
//   * the schedule: first result 152 clocks after the first input sample,
//     8 results per 16 clocks, a macroblock in 912 clocks, every output once
//     with the right block and index.
module tb_dct2d;
  import dctq_pkg::*;
  import dctq_ref_pkg::*;

  localparam int NMB = 167;   // 1002 blocks

  logic clk = 1'b0, rst_n = 1'b1;
  logic start = 1'b0;
  int   checks = 0, failures = 0;
  int   cyc = 0;

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always @(posedge clk) cyc <= cyc + 1;

  // DUT signals
  logic       f_busy, f_done, f_rdy, f_ov;
  logic [2:0] f_iblk, f_oblk;
  logic [5:0] f_iidx, f_oidx;
  pix_t       f_in;
  coef_t      f_out;
  logic       i_busy, i_done, i_rdy, i_ov;
  logic [2:0] i_iblk, i_oblk;
  logic [5:0] i_iidx, i_oidx;
  coef_t      i_in;
  pix_t       i_out;

  dct2d #(.INVERSE(1'b0)) dut_f (
    .clk, .rst_n, .start, .busy(f_busy), .done(f_done), .in_ready(f_rdy),
    .in_blk(f_iblk), .in_idx(f_iidx), .in_data(f_in), .out_valid(f_ov),
    .out_blk(f_oblk), .out_idx(f_oidx), .out_data(f_out));
  dct2d #(.INVERSE(1'b1)) dut_i (
    .clk, .rst_n, .start, .busy(i_busy), .done(i_done), .in_ready(i_rdy),
    .in_blk(i_iblk), .in_idx(i_iidx), .in_data(i_in), .out_valid(i_ov),
    .out_blk(i_oblk), .out_idx(i_oidx), .out_data(i_out));

  // stimulus of the current macroblock
  int  pix  [6][8][8];   // FDCT input P[y][x]
  real fref [6][8][8];   // exact DCT of pix
  int  coef [6][8][8];   // IDCT input C[u][v]
  int  iref [6][8][8];   // rounded exact IDCT of coef, p[y][x]
  bit  seen_f [6][64], seen_i [6][64];

  assign f_in = pix_t'(pix[f_iblk][f_iidx[2:0]][f_iidx[5:3]]);
  assign i_in = coef_t'(coef[i_iblk][i_iidx[5:3]][i_iidx[2:0]]);

  // IEEE-1180 style statistics
  real sq [8][8], me [8][8];
  int  peak = 0, nblocks = 0;

  initial begin : watchdog
    repeat (NMB * 1000 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int first_in, first_out, done_cyc, nout_f, nout_i;
  int last_f_cyc, gap_bad;

  always @(posedge clk) begin
    if (f_rdy && first_in < 0) first_in = cyc;
    if (f_ov) begin
      int e, g;
      if (first_out < 0) first_out = cyc;
      e = clip(rnd(fref[f_oblk][f_oidx[5:3]][f_oidx[2:0]]), -2048, 2047);
      g = int'(f_out);
      checks++;
      if (seen_f[f_oblk][f_oidx] || g - e > 1 || e - g > 1) begin
        failures++;
        if (failures < 10) $display("FDCT blk %0d idx %0d got %0d exp %0d", f_oblk, f_oidx, g, e);
      end
      seen_f[f_oblk][f_oidx] = 1'b1;
      nout_f++;
    end
    if (i_ov) begin
      int e, g, d, y, x;
      x = int'(i_oidx[5:3]);
      y = int'(i_oidx[2:0]);
      e = iref[i_oblk][y][x];
      g = int'(i_out);
      d = g - e;
      sq[y][x] += real'(d * d);
      me[y][x] += real'(d);
      if ((d < 0 ? -d : d) > peak) peak = (d < 0 ? -d : d);
      if (seen_i[i_oblk][i_oidx]) begin
        failures++;
        $display("IDCT blk %0d idx %0d delivered twice", i_oblk, i_oidx);
      end
      seen_i[i_oblk][i_oidx] = 1'b1;
      nout_i++;
    end
    if (f_done) done_cyc = cyc;
  end

  task automatic make_mb();
    real b[8][8], o[8][8];
    for (int k = 0; k < 6; k++) begin
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++) begin
          pix[k][y][x] = int'($urandom_range(511, 0)) - 256;
          b[y][x] = real'(pix[k][y][x]);
        end
      fdct2(b, o);
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          fref[k][u][v] = o[u][v];
          coef[k][u][v] = clip(rnd(o[u][v]), -2048, 2047);
        end
      // an independent block for the IDCT: exact DCT of other random pixels
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++) b[y][x] = real'(int'($urandom_range(511, 0)) - 256);
      fdct2(b, o);
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) b[u][v] = real'(clip(rnd(o[u][v]), -2048, 2047));
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) coef[k][u][v] = int'(b[u][v]);
      idct2(b, o);
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++) iref[k][y][x] = clip(rnd(o[y][x]), -256, 255);
      for (int i = 0; i < 64; i++) begin
        seen_f[k][i] = 1'b0;
        seen_i[k][i] = 1'b0;
      end
    end
  endtask

  initial begin
    real pmse, pme, omse, ome;
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++) begin
        sq[y][x] = 0.0;
        me[y][x] = 0.0;
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < NMB; m++) begin
      make_mb();
      first_in = -1; first_out = -1; done_cyc = -1; nout_f = 0; nout_i = 0;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      wait (!f_busy && !i_busy);
      @(posedge clk);
      nblocks += 6;
      if (m < 3) begin
        checks += 4;
        if (first_out - first_in != 152) begin
          failures++;
          $display("first result %0d clocks after first input, expected 152", first_out - first_in);
        end
        if (done_cyc - first_in + 1 != 912) begin
          failures++;
          $display("macroblock took %0d clocks, expected 912", done_cyc - first_in + 1);
        end
        if (nout_f != 384) begin failures++; $display("FDCT gave %0d results", nout_f); end
        if (nout_i != 384) begin failures++; $display("IDCT gave %0d results", nout_i); end
      end
    end
    pmse = 0.0; pme = 0.0; omse = 0.0; ome = 0.0;
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++) begin
        real a, m2;
        a  = sq[y][x] / nblocks;
        m2 = me[y][x] / nblocks;
        if (a > pmse) pmse = a;
        if ((m2 < 0 ? -m2 : m2) > pme) pme = (m2 < 0 ? -m2 : m2);
        omse += sq[y][x];
        ome  += me[y][x];
      end
    omse = omse / (64.0 * nblocks);
    ome  = ome / (64.0 * nblocks);
    if (ome < 0) ome = -ome;
    $display("IDCT accuracy over %0d blocks: peak %0d pmse %f omse %f pme %f ome %f",
             nblocks, peak, pmse, omse, pme, ome);
    checks += 5;
    if (peak > 1)       begin failures++; $display("peak error too large"); end
    if (pmse > 0.06)    begin failures++; $display("peak mse too large"); end
    if (omse > 0.02)    begin failures++; $display("overall mse too large"); end
    if (pme > 0.015)    begin failures++; $display("peak mean error too large"); end
    if (ome > 0.0015)   begin failures++; $display("overall mean error too large"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
