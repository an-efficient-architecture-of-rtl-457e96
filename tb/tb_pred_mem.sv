// tb_pred_mem - AC/DC prediction line memory at its full CIF size: random
// writes and reads over every address against a model array, with reads and
// writes to addresses past the end. Reads return the stored word one clock
// after rd_en (the old word when the same address is written in that clock);
// writes past the end are dropped and reads there return 0.
module tb_pred_mem;
  import dctq_pkg::*;

  localparam int DEPTH = MB_COLS * 32 + 38;
  localparam int AW    = $clog2(DEPTH);

  logic          clk = 1'b0;
  logic          we = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  coef_t         wdata = '0, rdata;
  int checks = 0, failures = 0;
  int model [1 << AW];
  int exp_rd, n_oob = 0;
  bit pend = 1'b0;

  always #5 clk = ~clk;

  pred_mem dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << AW); a++) model[a] = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = coef_t'($urandom); model[a] = int'(wdata);
    end
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (int'(rdata) != exp_rd) begin
          failures++;
          if (failures < 10) $display("read got %0d exp %0d", rdata, exp_rd);
        end
      end
      we    = $urandom_range(1, 0);
      rd_en = $urandom_range(3, 0) != 0;
      waddr = AW'($urandom_range((1 << AW) - 1, 0));
      raddr = ($urandom_range(3, 0) == 0) ? waddr : AW'($urandom_range((1 << AW) - 1, 0));
      wdata = coef_t'($urandom);
      if (rd_en) begin
        exp_rd = (int'(raddr) < DEPTH) ? model[raddr] : 0;
        if (int'(raddr) >= DEPTH) n_oob++;
        pend = 1'b1;
      end
      if (we && int'(waddr) < DEPTH) model[waddr] = int'(wdata);
    end
    checks++;
    if (n_oob == 0) begin failures++; $display("no read past the end"); end
    $display("reads past the end %0d", n_oob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
