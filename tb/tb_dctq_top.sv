// tb_dctq_top - end-to-end test of the DCTQ module at its default size.
//
// Two pictures of 3x3 macroblocks (quantizer 6 and 13) are encoded and then
// decoded. Each picture mixes intra macroblocks with and without AC
// prediction and one inter macroblock. Checked:
//   * FDCT output (observed inside the design) within 1 of the exact DCT;
//   * QCO buffer contents after every encoded macroblock against a
//     reference model written from the MPEG-4 rules over a whole-picture
//     array: quantization of the observed coefficients, DC gradient
//     direction, DC/AC prediction with picture-edge and inter defaults, and
//     the scan order chosen by direction and AC prediction flag;
//   * encoder reconstruction within 1 of the exact IDCT of the dequantized
//     reference levels;
//   * decoder: the levels rebuilt from the QCO contents equal the encoder's
//     levels, and its reconstruction equals the encoder's bit for bit;
//   * timing: 152 + 2 + 152 clocks from the first pixel in to the first
//     reconstructed pixel, encoder macroblock 1067 clocks, decoder 924.
// Each mechanism (prediction from top and from left, each scan order, AC
// prediction off, picture-edge defaults, inter macroblock, decoding) is
// counted; one that never happens counts as a failure.
module tb_dctq_top;
  import dctq_pkg::*;
  import dctq_ref_pkg::*;

  localparam int MBX = 3, MBY = 3, NMB = MBX * MBY, NPIC = 2;

  logic       clk = 1'b0, rst_n = 1'b1;
  logic       start = 1'b0;
  mode_e      mode = MODE_ENC;
  logic       intra = 1'b1, ac_pred_en = 1'b1;
  logic [4:0] qp = 5'd6, mb_x = '0, mb_y = '0;
  logic       busy, done;
  logic       pix_ready;
  logic [2:0] pix_blk;
  logic [5:0] pix_idx;
  pix_t       pix_data;
  logic       rec_valid;
  logic [2:0] rec_blk;
  logic [5:0] rec_idx;
  pix_t       rec_data;
  logic       qco_en = 1'b0, qco_we = 1'b0;
  logic [8:0] qco_addr = '0;
  coef_t      qco_wdata = '0, qco_rdata;

  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always @(posedge clk) cyc <= cyc + 1;

  dctq_top dut (.*);

  // --------------------------------------------------------------- data
  int pix   [NMB][6][8][8];   // input P[y][x]
  int fco   [NMB][6][64];     // FDCT output observed, raster u*8+v
  int qf    [NMB][6][64];     // reference levels
  int qco   [NMB][384];       // QCO contents read after encoding
  int erec  [NMB][6][64];     // encoder reconstruction, index x*8+y
  int drec  [NMB][6][64];     // decoder reconstruction
  int dqf   [NMB][6][64];     // levels rebuilt by the decoder
  bit mb_intra [NMB], mb_acp [NMB];
  int cur = 0;

  assign pix_data = pix_t'(pix[cur][pix_blk][pix_idx[2:0]][pix_idx[5:3]]);

  // mechanism counters
  int n_top = 0, n_left = 0, n_zz = 0, n_alth = 0, n_altv = 0, n_noacp = 0;
  int n_edge = 0, n_inter = 0, n_dec = 0;

  initial begin : watchdog
    repeat (NPIC * NMB * 3000 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observation of internal streams and outputs
  int first_pix, first_rec;
  always @(posedge clk) begin
    if (pix_ready && first_pix < 0) first_pix = cyc;
    if (rec_valid) begin
      if (first_rec < 0) first_rec = cyc;
      if (mode == MODE_ENC) erec[cur][rec_blk][rec_idx] = int'(rec_data);
      else                  drec[cur][rec_blk][rec_idx] = int'(rec_data);
    end
    if (mode == MODE_ENC && dut.f_valid) fco[cur][dut.f_blk][dut.f_idx] = int'(dut.f_data);
    if (mode == MODE_DEC && dut.p_valid) dqf[cur][dut.p_blk][dut.p_idx] = int'(dut.p_data);
  end

  // ---------------------------------------------------------- stimulus
  task automatic make_picture(input int pic);
    for (int m = 0; m < NMB; m++) begin
      mb_intra[m] = !(m == 4);
      mb_acp[m]   = !(m == 2 || (pic == 1 && m == 7));
      for (int b = 0; b < 6; b++) begin
        int base, gx, gy;
        base = int'($urandom_range(200, 40));
        gx   = int'($urandom_range(12, 0)) - 6;
        gy   = int'($urandom_range(12, 0)) - 6;
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++) begin
            int v;
            if (mb_intra[m]) begin
              v = base + gx * x + gy * y + int'($urandom_range(16, 0)) - 8;
              pix[m][b][y][x] = clip(v, 0, 255);
            end else begin
              pix[m][b][y][x] = int'($urandom_range(120, 0)) - 60;
            end
          end
      end
    end
  endtask

  task automatic run_mb(input mode_e md, input int m, input int q);
    int t0;
    cur        = m;
    mode       = md;
    mb_x       = 5'(m % MBX);
    mb_y       = 5'(m / MBX);
    intra      = mb_intra[m];
    ac_pred_en = mb_acp[m];
    qp         = 5'(q);
    first_pix  = -1;
    first_rec  = -1;
    @(negedge clk) start = 1'b1;
    t0 = cyc;
    @(negedge clk) start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (md == MODE_ENC && cyc - t0 != 1067) begin
      failures++;
      $display("encoder macroblock took %0d clocks, expected 1067", cyc - t0);
    end
    if (md == MODE_DEC && cyc - t0 != 924) begin
      failures++;
      $display("decoder macroblock took %0d clocks, expected 924", cyc - t0);
    end
    if (md == MODE_ENC) begin
      checks++;
      if (first_rec - first_pix != 306) begin
        failures++;
        $display("first reconstructed pixel %0d clocks after first input, expected 306",
                 first_rec - first_pix);
      end
    end
    @(negedge clk);
  endtask

  task automatic read_qco(input int m);
    for (int a = 0; a <= 384; a++) begin
      @(negedge clk);
      if (a > 0) qco[m][a-1] = int'(qco_rdata);
      qco_en   = (a < 384);
      qco_we   = 1'b0;
      qco_addr = 9'(a);
    end
    qco_en = 1'b0;
  endtask

  task automatic write_qco(input int m);
    for (int a = 0; a < 384; a++) begin
      @(negedge clk);
      qco_en    = 1'b1;
      qco_we    = 1'b1;
      qco_addr  = 9'(a);
      qco_wdata = coef_t'(qco[m][a]);
    end
    @(negedge clk);
    qco_en = 1'b0;
    qco_we = 1'b0;
  endtask

  // ------------------------------------------------- reference checks
  // position of a block in its plane: plane 0 luma (2*MBX x 2*MBY), 1 U, 2 V
  function automatic void blk_pos(input int m, input int b, output int pl, output int px, output int py);
    int mx, my;
    mx = m % MBX;
    my = m / MBX;
    if (b < 4) begin
      pl = 0; px = 2 * mx + (b % 2); py = 2 * my + (b / 2);
    end else begin
      pl = b - 3; px = mx; py = my;
    end
  endfunction

  // block at plane position, or -1 if outside the picture / inter
  function automatic int find_blk(input int pl, input int px, input int py, output int fm);
    int w, h;
    w = (pl == 0) ? 2 * MBX : MBX;
    h = (pl == 0) ? 2 * MBY : MBY;
    fm = -1;
    if (px < 0 || py < 0 || px >= w || py >= h) return -1;
    if (pl == 0) begin
      fm = (py / 2) * MBX + (px / 2);
      if (!mb_intra[fm]) return -1;
      return (py % 2) * 2 + (px % 2);
    end
    fm = py * MBX + px;
    if (!mb_intra[fm]) return -1;
    return pl + 3;
  endfunction

  task automatic check_picture(input int q);
    for (int m = 0; m < NMB; m++)
      for (int b = 0; b < 6; b++) begin
        real blk[8][8], o[8][8];
        int  diff[64];
        int  sel, pl, px, py;
        int  ba, bb, bc, ma, mbb, mc, dca, dcb, dcc, dflt, dcsv;
        bit  top;
        bit  chroma;
        chroma = (b >= 4);
        // FDCT accuracy and quantization
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++) blk[y][x] = real'(pix[m][b][y][x]);
        fdct2(blk, o);
        for (int i = 0; i < 64; i++) begin
          int e;
          e = clip(rnd(o[i / 8][i % 8]), -2048, 2047);
          checks++;
          if (fco[m][b][i] - e > 1 || e - fco[m][b][i] > 1) begin
            failures++;
            if (failures < 20) $display("FDCT mb %0d blk %0d idx %0d got %0d exp %0d", m, b, i, fco[m][b][i], e);
          end
          qf[m][b][i] = quant_ref(fco[m][b][i], q, mb_intra[m], i == 0, chroma);
        end
      end
    // prediction, scan, reconstruction
    for (int m = 0; m < NMB; m++)
      for (int b = 0; b < 6; b++) begin
        real blk[8][8], o[8][8];
        int  diff[64];
        int  sel, pl, px, py;
        int  ba, bb, bc, ma, mbb, mc, dca, dcb, dcc, dflt, dcsv;
        bit  top;
        for (int i = 0; i < 64; i++) diff[i] = qf[m][b][i];
        sel = 0;
        if (mb_intra[m]) begin
          dcsv = dcs_ref(q, b >= 4);
          dflt = (1024 + dcsv / 2) / dcsv;
          blk_pos(m, b, pl, px, py);
          ba = find_blk(pl, px - 1, py, ma);
          bb = find_blk(pl, px - 1, py - 1, mbb);
          bc = find_blk(pl, px, py - 1, mc);
          if (ba < 0 || bb < 0 || bc < 0) n_edge++;
          dca = (ba < 0) ? dflt : qf[ma][ba][0];
          dcb = (bb < 0) ? dflt : qf[mbb][bb][0];
          dcc = (bc < 0) ? dflt : qf[mc][bc][0];
          top = ((dca > dcb ? dca - dcb : dcb - dca) < (dcb > dcc ? dcb - dcc : dcc - dcb));
          if (top) n_top++; else n_left++;
          diff[0] = qf[m][b][0] - (top ? dcc : dca);
          if (mb_acp[m]) begin
            sel = top ? 1 : 2;
            for (int k = 1; k < 8; k++) begin
              if (top)  diff[k]     = qf[m][b][k]     - ((bc < 0) ? 0 : qf[mc][bc][k]);
              else      diff[k * 8] = qf[m][b][k * 8] - ((ba < 0) ? 0 : qf[ma][ba][k * 8]);
            end
          end else n_noacp++;
          for (int i = 0; i < 64; i++) diff[i] = clip(diff[i], -2048, 2047);
        end else n_inter++;
        if (sel == 0) n_zz++; else if (sel == 1) n_alth++; else n_altv++;
        for (int p = 0; p < 64; p++) begin
          checks++;
          if (qco[m][b * 64 + p] != diff[scan_raster(sel, p)]) begin
            failures++;
            if (failures < 20) $display("QCO mb %0d blk %0d pos %0d got %0d exp %0d (scan %0d)",
                                        m, b, p, qco[m][b * 64 + p], diff[scan_raster(sel, p)], sel);
          end
        end
        // reconstruction
        for (int i = 0; i < 64; i++)
          blk[i / 8][i % 8] = real'(dequant_ref(qf[m][b][i], q, mb_intra[m], i == 0, b >= 4));
        idct2(blk, o);
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++) begin
            int e, g;
            e = clip(rnd(o[y][x]), -256, 255);
            g = erec[m][b][x * 8 + y];
            checks++;
            if (g - e > 1 || e - g > 1) begin
              failures++;
              if (failures < 20) $display("REC mb %0d blk %0d y %0d x %0d got %0d exp %0d", m, b, y, x, g, e);
            end
          end
      end
  endtask

  task automatic check_decode();
    for (int m = 0; m < NMB; m++)
      for (int b = 0; b < 6; b++)
        for (int i = 0; i < 64; i++) begin
          checks += 2;
          if (dqf[m][b][i] != qf[m][b][i]) begin
            failures++;
            if (failures < 20) $display("DEC level mb %0d blk %0d idx %0d got %0d exp %0d", m, b, i, dqf[m][b][i], qf[m][b][i]);
          end
          if (drec[m][b][i] != erec[m][b][i]) begin
            failures++;
            if (failures < 20) $display("DEC rec mb %0d blk %0d idx %0d got %0d exp %0d", m, b, i, drec[m][b][i], erec[m][b][i]);
          end
        end
  endtask

  initial begin
    int qps[NPIC];
    qps[0] = 6;
    qps[1] = 13;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int pic = 0; pic < NPIC; pic++) begin
      make_picture(pic);
      for (int m = 0; m < NMB; m++) begin
        run_mb(MODE_ENC, m, qps[pic]);
        read_qco(m);
      end
      check_picture(qps[pic]);
      for (int m = 0; m < NMB; m++) begin
        write_qco(m);
        run_mb(MODE_DEC, m, qps[pic]);
        n_dec++;
      end
      check_decode();
    end
    $display("mechanisms: top %0d left %0d zigzag %0d alt-h %0d alt-v %0d no-acpred %0d edge %0d inter %0d decoded %0d",
             n_top, n_left, n_zz, n_alth, n_altv, n_noacp, n_edge, n_inter, n_dec);
    checks += 9;
    if (n_top == 0)   begin failures++; $display("no prediction from top"); end
    if (n_left == 0)  begin failures++; $display("no prediction from left"); end
    if (n_zz == 0)    begin failures++; $display("no zig-zag scan"); end
    if (n_alth == 0)  begin failures++; $display("no alternate-horizontal scan"); end
    if (n_altv == 0)  begin failures++; $display("no alternate-vertical scan"); end
    if (n_noacp == 0) begin failures++; $display("no block without AC prediction"); end
    if (n_edge == 0)  begin failures++; $display("no unavailable neighbour"); end
    if (n_inter == 0) begin failures++; $display("no inter block"); end
    if (n_dec == 0)   begin failures++; $display("nothing decoded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
