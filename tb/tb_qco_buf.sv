// tb_qco_buf - two-port quantized-coefficient buffer: random reads and writes
// on both ports against a model. Reads return the word stored before the
// clock edge one clock later; when both ports write one address in the same
// clock, port A's word is kept. Both the collision and a read on one port of
// the address the other port writes must occur.
module tb_qco_buf;
  import dctq_pkg::*;

  logic       clk = 1'b0;
  logic       a_en = 1'b0, a_we = 1'b0, b_en = 1'b0, b_we = 1'b0;
  logic [8:0] a_addr = '0, b_addr = '0;
  coef_t      a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  int checks = 0, failures = 0;
  int model [384];
  int ea, eb, n_coll = 0, n_cross = 0;
  bit pa = 1'b0, pb = 1'b0;

  always #5 clk = ~clk;

  qco_buf dut (.*);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 384; a++) begin
      @(negedge clk);
      a_en = 1'b1; a_we = 1'b1; a_addr = 9'(a); a_wdata = coef_t'($urandom); model[a] = int'(a_wdata);
    end
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      if (pa) begin
        checks++;
        if (int'(a_rdata) != ea) begin failures++; if (failures < 10) $display("A got %0d exp %0d", a_rdata, ea); end
      end
      if (pb) begin
        checks++;
        if (int'(b_rdata) != eb) begin failures++; if (failures < 10) $display("B got %0d exp %0d", b_rdata, eb); end
      end
      pa = 1'b0; pb = 1'b0;
      a_en = $urandom_range(3, 0) != 0; a_we = $urandom_range(1, 0);
      b_en = $urandom_range(3, 0) != 0; b_we = $urandom_range(1, 0);
      a_addr = 9'($urandom_range(383, 0));
      b_addr = ($urandom_range(3, 0) == 0) ? a_addr : 9'($urandom_range(383, 0));
      a_wdata = coef_t'($urandom); b_wdata = coef_t'($urandom);
      if (a_en && !a_we) begin ea = model[a_addr]; pa = 1'b1; end
      if (b_en && !b_we) begin eb = model[b_addr]; pb = 1'b1; end
      if (a_en && b_en && a_addr == b_addr && (a_we != b_we)) n_cross++;
      if (b_en && b_we) model[b_addr] = int'(b_wdata);
      if (a_en && a_we) model[a_addr] = int'(a_wdata);
      if (a_en && a_we && b_en && b_we && a_addr == b_addr) n_coll++;
    end
    checks += 2;
    if (n_coll == 0)  begin failures++; $display("no write collision"); end
    if (n_cross == 0) begin failures++; $display("no read of an address being written"); end
    $display("collisions %0d cross reads %0d", n_coll, n_cross);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
