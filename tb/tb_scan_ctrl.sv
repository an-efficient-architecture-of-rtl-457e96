// tb_scan_ctrl - scan address generation. Encoder mode: random raster-order
// levels of random blocks under each scan selection must be written to
// address blk*64 + scan position, where the position is looked up in the
// scan-order lists of the reference package (position -> raster index), so
// the check is independent of the RTL's inverse tables. Decoder mode: the
// read address must be the same, no write may happen, and the level read
// from a model of the synchronous buffer must come back with its block and
// raster index one clock after the request.
module tb_scan_ctrl;
  import dctq_pkg::*;
  import dctq_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b1;
  mode_e      mode = MODE_ENC;
  scan_e      scan_sel = SCAN_ZZ;
  logic       enc_valid = 1'b0, dec_valid = 1'b0;
  logic [2:0] enc_blk = '0, dec_blk = '0, dq_blk;
  logic [5:0] enc_idx = '0, dec_idx = '0, dq_idx;
  coef_t      enc_data = '0, dq_data;
  logic       dq_valid;
  logic       qa_en, qa_we;
  logic [8:0] qa_addr;
  coef_t      qa_wdata, qa_rdata;
  int checks = 0, failures = 0;
  coef_t buf_m [512];

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset

  scan_ctrl dut (.*);

  // synchronous-read buffer model
  always_ff @(posedge clk) if (qa_en && !qa_we) qa_rdata <= buf_m[qa_addr];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_addr(input int sel, input int b, input int r);
    for (int p = 0; p < 64; p++)
      if (scan_raster(sel, p) == r) return b * 64 + p;
    return -1;
  endfunction

  int pend_b, pend_r, pend_v;
  bit pend = 1'b0;

  initial begin
    for (int a = 0; a < 512; a++) buf_m[a] = coef_t'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 2; m++) begin
      mode = (m == 0) ? MODE_ENC : MODE_DEC;
      for (int n = 0; n < 3000; n++) begin
        int sel, b, r, e;
        @(negedge clk);
        // check the decoder return of the previous request
        checks++;
        if (dq_valid != pend) begin failures++; $display("dq_valid %0d exp %0d", dq_valid, pend); end
        if (pend) begin
          checks++;
          if (int'(dq_blk) != pend_b || int'(dq_idx) != pend_r || int'(dq_data) != pend_v) begin
            failures++;
            if (failures < 10) $display("dec return blk %0d idx %0d data %0d exp %0d %0d %0d",
                                        dq_blk, dq_idx, dq_data, pend_b, pend_r, pend_v);
          end
        end
        pend = 1'b0;
        sel = n % 3;
        b = int'($urandom_range(5, 0));
        r = int'($urandom_range(63, 0));
        scan_sel  = scan_e'(sel);
        enc_valid = (mode == MODE_ENC) && ($urandom_range(3, 0) != 0);
        dec_valid = (mode == MODE_DEC) && ($urandom_range(3, 0) != 0);
        enc_blk = 3'(b); dec_blk = 3'(b);
        enc_idx = 6'(r); dec_idx = 6'(r);
        enc_data = coef_t'($urandom);
        #1;
        e = exp_addr(sel, b, r);
        checks++;
        if (qa_en != (enc_valid || dec_valid) || (qa_en && (int'(qa_addr) != e || qa_we != (mode == MODE_ENC)
            || (qa_we && qa_wdata != enc_data)))) begin
          failures++;
          if (failures < 10) $display("mode %0d sel %0d blk %0d idx %0d: addr %0d exp %0d", mode, sel, b, r, qa_addr, e);
        end
        if (dec_valid) begin
          pend = 1'b1; pend_b = b; pend_r = r; pend_v = int'(buf_m[e]);
        end
      end
      @(negedge clk);
      enc_valid = 1'b0; dec_valid = 1'b0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
