// tb_dctq_ctrl - macroblock sequencer. Runs two encoder and two decoder
// macroblocks back to back and records the clock, counted from the first
// busy clock, of every control event. Expected (encoder): FDCT start at 0,
// IDCT start at 154, prediction block starts at 148 + 128*b, done at 1066;
// (decoder): block starts at 2 + 128*b, IDCT start at 11, buffer reads at
// 8 + 128*b + 16*u + v for u, v in 0..7 in raster order, done at 923.
// Also checks that start is ignored while busy.
module tb_dctq_ctrl;
  import dctq_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b1;
  logic       start = 1'b0;
  mode_e      mode = MODE_ENC;
  logic       busy, done, fdct_start, idct_start, blk_start, rd_valid;
  logic [2:0] blk, rd_blk;
  logic [5:0] rd_idx;
  int checks = 0, failures = 0;
  int t = -1;

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset

  dctq_ctrl dut (.*);

  initial begin : watchdog
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ev_f [$], ev_i [$], ev_b [$], ev_bn [$], ev_r [$], ev_rn [$], ev_d [$];

  always @(posedge clk) begin
    if (busy) begin
      t = t + 1;
      if (fdct_start) ev_f.push_back(t);
      if (idct_start) ev_i.push_back(t);
      if (blk_start) begin ev_b.push_back(t); ev_bn.push_back(int'(blk)); end
      if (rd_valid) begin ev_r.push_back(t); ev_rn.push_back(int'(rd_blk) * 64 + int'(rd_idx)); end
      if (done) ev_d.push_back(t);
    end
  end

  task automatic expect_q(input string what, ref int q [$], input int e [$]);
    checks++;
    if (q != e) begin
      failures++;
      $display("%s: %0d events, first %0d, expected %0d events, first %0d", what, q.size(),
               q.size() ? q[0] : -1, e.size(), e.size() ? e[0] : -1);
    end
  endtask

  task automatic run_mb(input mode_e md);
    int eb [$], ebn [$], er [$], ern [$];
    ev_f.delete(); ev_i.delete(); ev_b.delete(); ev_bn.delete();
    ev_r.delete(); ev_rn.delete(); ev_d.delete();
    t = -1;
    @(negedge clk);
    mode  = md;
    start = 1'b1;
    @(negedge clk);
    // held high: must not restart a busy sequencer
    repeat (20) @(negedge clk);
    start = 1'b0;
    wait (!busy);
    @(negedge clk);
    for (int b = 0; b < 6; b++) begin
      eb.push_back(((md == MODE_ENC) ? 148 : 2) + 128 * b);
      ebn.push_back(b);
    end
    expect_q("block starts", ev_b, eb);
    expect_q("block numbers", ev_bn, ebn);
    if (md == MODE_ENC) begin
      expect_q("fdct start", ev_f, '{0});
      expect_q("idct start", ev_i, '{154});
      expect_q("reads", ev_r, er);
      expect_q("done", ev_d, '{1066});
    end else begin
      for (int b = 0; b < 6; b++)
        for (int u = 0; u < 8; u++)
          for (int v = 0; v < 8; v++) begin
            er.push_back(8 + 128 * b + 16 * u + v);
            ern.push_back(b * 64 + u * 8 + v);
          end
      expect_q("fdct start", ev_f, '{});
      expect_q("idct start", ev_i, '{11});
      expect_q("reads", ev_r, er);
      expect_q("read addresses", ev_rn, ern);
      expect_q("done", ev_d, '{923});
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_mb(MODE_ENC);
    run_mb(MODE_DEC);
    run_mb(MODE_ENC);
    run_mb(MODE_DEC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
