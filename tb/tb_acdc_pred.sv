// tb_acdc_pred - AC/DC predictor on its own, on a 4x3-macroblock picture of
// random levels (intra with and without AC prediction, two inter
// macroblocks), at a denser schedule than the full module uses: each block's
// 64 levels arrive on consecutive clocks, 5 clocks after blk_start.
// Encoder pass: the raster-order output and the scan selection of every
// block are compared with a reference written from the MPEG-4 rules over a
// whole-picture array. Decoder pass: the encoder's outputs are fed back and
// the original levels must come out. Output latency (2 clocks) is checked,
// and prediction from top and from left, each scan selection, picture-edge
// defaults, inter neighbours and a saturated difference must each occur.
module tb_acdc_pred;
  import dctq_pkg::*;
  import dctq_ref_pkg::*;

  localparam int MBX = 4, MBY = 3, NMB = MBX * MBY, QP = 9;

  logic       clk = 1'b0, rst_n = 1'b1;
  mode_e      mode = MODE_ENC;
  logic [4:0] qp = 5'(QP);
  logic       intra = 1'b1, ac_pred_en = 1'b1;
  logic [4:0] mb_x = '0, mb_y = '0;
  logic       blk_start = 1'b0;
  logic [2:0] blk = '0;
  logic       dir_top;
  scan_e      scan_sel;
  logic       in_valid = 1'b0;
  logic [5:0] in_idx = '0;
  coef_t      in_data = '0;
  logic       out_valid;
  logic [2:0] out_blk;
  logic [5:0] out_idx;
  coef_t      out_data;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always @(posedge clk) cyc <= cyc + 1;

  acdc_pred dut (.*);

  int qf   [NMB][6][64];
  int enc  [NMB][6][64];
  int dec  [NMB][6][64];
  int ssel [NMB][6];
  bit mb_intra [NMB], mb_acp [NMB];
  int cur = 0, last_in_cyc = 0, lat_bad = 0;
  int n_sat = 0, n_top = 0, n_left = 0, n_sel [3], n_edge = 0, n_inter_nb = 0;

  initial begin : watchdog
    repeat (NMB * 6 * 100 * 2 + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int in_cyc [64];
  always @(posedge clk) begin
    if (in_valid) in_cyc[in_idx] = cyc;
    if (out_valid) begin
      if (cyc - in_cyc[out_idx] != 2) lat_bad++;
      if (mode == MODE_ENC) enc[cur][out_blk][out_idx] = int'(out_data);
      else                  dec[cur][out_blk][out_idx] = int'(out_data);
    end
  end

  task automatic run_pass(input mode_e md);
    mode = md;
    for (int m = 0; m < NMB; m++) begin
      cur        = m;
      mb_x       = 5'(m % MBX);
      mb_y       = 5'(m / MBX);
      intra      = mb_intra[m];
      ac_pred_en = mb_acp[m];
      for (int b = 0; b < 6; b++) begin
        @(negedge clk);
        blk_start = 1'b1;
        blk       = 3'(b);
        @(negedge clk);
        blk_start = 1'b0;
        repeat (4) @(negedge clk);
        if (md == MODE_ENC) ssel[m][b] = int'(scan_sel);
        for (int i = 0; i < 64; i++) begin
          in_valid = 1'b1;
          in_idx   = 6'(i);
          in_data  = coef_t'((md == MODE_ENC) ? qf[m][b][i] : enc[m][b][i]);
          @(negedge clk);
        end
        in_valid = 1'b0;
        repeat (3) @(negedge clk);
      end
    end
    repeat (4) @(negedge clk);
  endtask

  // ----------------------------------------------------------- reference
  function automatic void blk_pos(input int m, input int b, output int pl, output int px, output int py);
    if (b < 4) begin
      pl = 0; px = 2 * (m % MBX) + (b % 2); py = 2 * (m / MBX) + (b / 2);
    end else begin
      pl = b - 3; px = m % MBX; py = m / MBX;
    end
  endfunction

  function automatic int find_blk(input int pl, input int px, input int py, output int fm, output bit inter_nb);
    int w, h;
    w = (pl == 0) ? 2 * MBX : MBX;
    h = (pl == 0) ? 2 * MBY : MBY;
    fm = -1;
    inter_nb = 1'b0;
    if (px < 0 || py < 0 || px >= w || py >= h) return -1;
    fm = (pl == 0) ? (py / 2) * MBX + (px / 2) : py * MBX + px;
    if (!mb_intra[fm]) begin
      inter_nb = 1'b1;
      return -1;
    end
    return (pl == 0) ? (py % 2) * 2 + (px % 2) : pl + 3;
  endfunction

  task automatic check_all();
    for (int m = 0; m < NMB; m++)
      for (int b = 0; b < 6; b++) begin
        int diff[64], pred[64], rec[64];
        int sel, pl, px, py, ba, bb, bc, ma, mb2, mc, dca, dcb, dcc, dflt, dcsv;
        bit top, ia, ib, ic;
        for (int i = 0; i < 64; i++) diff[i] = qf[m][b][i];
        sel = 0;
        if (mb_intra[m]) begin
          dcsv = dcs_ref(QP, b >= 4);
          dflt = (1024 + dcsv / 2) / dcsv;
          blk_pos(m, b, pl, px, py);
          ba = find_blk(pl, px - 1, py, ma, ia);
          bb = find_blk(pl, px - 1, py - 1, mb2, ib);
          bc = find_blk(pl, px, py - 1, mc, ic);
          if (ia || ib || ic) n_inter_nb++;
          else if (ba < 0 || bb < 0 || bc < 0) n_edge++;
          dca = (ba < 0) ? dflt : qf[ma][ba][0];
          dcb = (bb < 0) ? dflt : qf[mb2][bb][0];
          dcc = (bc < 0) ? dflt : qf[mc][bc][0];
          top = ((dca > dcb ? dca - dcb : dcb - dca) < (dcb > dcc ? dcb - dcc : dcc - dcb));
          if (top) n_top++; else n_left++;
          diff[0] = qf[m][b][0] - (top ? dcc : dca);
          if (mb_acp[m]) begin
            sel = top ? 1 : 2;
            for (int k = 1; k < 8; k++)
              if (top) diff[k]     = qf[m][b][k]     - ((bc < 0) ? 0 : qf[mc][bc][k]);
              else     diff[k * 8] = qf[m][b][k * 8] - ((ba < 0) ? 0 : qf[ma][ba][k * 8]);
          end
        end
        for (int i = 0; i < 64; i++) begin
          pred[i] = qf[m][b][i] - diff[i];
          diff[i] = clip(diff[i], -2048, 2047);
          rec[i]  = clip(diff[i] + pred[i], -2048, 2047);
          if (rec[i] != qf[m][b][i]) n_sat++;
        end
        n_sel[sel]++;
        checks++;
        if (ssel[m][b] != sel) begin
          failures++;
          $display("mb %0d blk %0d scan %0d exp %0d", m, b, ssel[m][b], sel);
        end
        for (int i = 0; i < 64; i++) begin
          checks += 2;
          if (enc[m][b][i] != diff[i]) begin
            failures++;
            if (failures < 20) $display("ENC mb %0d blk %0d idx %0d got %0d exp %0d", m, b, i, enc[m][b][i], diff[i]);
          end
          if (dec[m][b][i] != rec[i]) begin
            failures++;
            if (failures < 20) $display("DEC mb %0d blk %0d idx %0d got %0d exp %0d", m, b, i, dec[m][b][i], rec[i]);
          end
        end
      end
  endtask

  initial begin
    for (int m = 0; m < NMB; m++) begin
      mb_intra[m] = !(m == 5 || m == 10);
      mb_acp[m]   = !(m == 3 || m == 6);
      for (int b = 0; b < 6; b++)
        for (int i = 0; i < 64; i++) begin
          if (i == 0 && mb_intra[m]) qf[m][b][i] = int'($urandom_range(250, 5));
          else if (i < 8 || i % 8 == 0) qf[m][b][i] = int'($urandom_range(80, 0)) - 40;
          else qf[m][b][i] = ($urandom_range(3, 0) == 0) ? int'($urandom_range(20, 0)) - 10 : 0;
        end
    end
    // extreme levels in the last block of the picture, which no later block
    // predicts from: the encoder's difference saturates there
    qf[NMB-1][3][1] = -2048;
    qf[NMB-1][3][8] = -2048;
    qf[NMB-1][1][1] = 40;     // its top neighbour
    qf[NMB-1][2][8] = 40;     // its left neighbour
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_pass(MODE_ENC);
    run_pass(MODE_DEC);
    check_all();
    checks += 7;
    if (lat_bad != 0) begin failures++; $display("%0d outputs with latency other than 2", lat_bad); end
    if (n_top == 0 || n_left == 0) begin failures++; $display("a prediction direction never occurred"); end
    if (n_sel[0] == 0 || n_sel[1] == 0 || n_sel[2] == 0) begin failures++; $display("a scan selection never occurred"); end
    if (n_edge == 0) begin failures++; $display("no picture-edge neighbour"); end
    if (n_inter_nb == 0) begin failures++; $display("no inter neighbour"); end
    if (n_sat == 0) begin failures++; $display("no saturated difference"); end
    $display("top %0d left %0d zigzag %0d alt-h %0d alt-v %0d edge %0d inter-neighbour %0d saturated %0d",
             n_top, n_left, n_sel[0], n_sel[1], n_sel[2], n_edge, n_inter_nb, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
