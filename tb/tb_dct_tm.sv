// tb_dct_tm - transposition memory: 2000 clocks of random writes and reads,
// some of them to the same address in the same clock, against a model array.
// A read returns the word stored before the clock edge (read-before-write),
// one clock after rd_en; with rd_en low the read register holds its value.
module tb_dct_tm;
  import dctq_pkg::*;

  logic       clk = 1'b0;
  logic       we = 1'b0, rd_en = 1'b0;
  logic [5:0] waddr = '0, raddr = '0;
  word_t      wdata = '0, rdata;
  int checks = 0, failures = 0;
  int model [64];
  int exp_rd;
  bit pend = 1'b0;
  int n_rw = 0;

  always #5 clk = ~clk;

  dct_tm dut (.*);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every address first
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 6'(a); wdata = word_t'($urandom); model[a] = int'(wdata);
    end
    @(negedge clk);
    we = 1'b0;
    for (int n = 0; n < 2000; n++) begin
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
      waddr = 6'($urandom);
      raddr = ($urandom_range(3, 0) == 0) ? waddr : 6'($urandom);
      wdata = word_t'($urandom);
      if (rd_en) begin
        exp_rd = model[raddr];
        pend   = 1'b1;
        if (we && raddr == waddr) n_rw++;
      end
      if (we) model[waddr] = int'(wdata);
    end
    checks++;
    if (n_rw == 0) begin failures++; $display("no read-during-write"); end
    $display("read-during-write cases %0d", n_rw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
