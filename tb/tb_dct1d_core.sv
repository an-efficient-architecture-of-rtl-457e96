// tb_dct1d_core - checks the forward and the inverse 1-D DA core against a
// floating-point transform. 200 random vectors stream back to back (one
// vector per 8 clocks); every output must be within 1 LSB of the rounded
// exact result, and the first output must appear 16 clocks after the first
// input sample (one 8-clock step each for SPC and RAC).
module tb_dct1d_core;
  import dctq_pkg::*;
  import dctq_ref_pkg::*;

  localparam int NV = 200;

  logic  clk = 1'b0, rst_n = 1'b1;
  logic  in_valid = 1'b0;
  word_t in_data = '0;
  logic  fv, iv;
  word_t fo, io;
  int    checks = 0, failures = 0;
  word_t vecs [NV][8];
  int    cyc = 0, first_in = -1, first_out_f = -1, first_out_i = -1;
  int    nf = 0, ni = 0;

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always @(posedge clk) cyc <= cyc + 1;

  dct1d_core #(.INVERSE(1'b0)) dut_f (.clk, .rst_n, .in_valid, .in_data, .out_valid(fv), .out_data(fo));
  dct1d_core #(.INVERSE(1'b1)) dut_i (.clk, .rst_n, .in_valid, .in_data, .out_valid(iv), .out_data(io));

  initial begin : watchdog
    repeat (NV * 8 + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input bit inv, input int n, input word_t got);
    real x[8], y[8];
    int  v, e, tol;
    tol = 1;
    for (int i = 0; i < 8; i++) x[i] = real'(vecs[n / 8][i]);
    if (inv) idct8(x, y); else fdct8(x, y);
    e = clip(rnd(y[n % 8]), -32768, 32767);
    v = int'(got);
    checks++;
    if (v - e > tol || e - v > tol) begin
      failures++;
      if (failures < 10) $display("%s vec %0d out %0d: got %0d exp %0d",
                                  inv ? "IDCT" : "FDCT", n / 8, n % 8, v, e);
    end
  endfunction

  always @(posedge clk) begin
    if (fv) begin
      if (first_out_f < 0) first_out_f = cyc;
      check(1'b0, nf, fo);
      nf++;
    end
    if (iv) begin
      if (first_out_i < 0) first_out_i = cyc;
      check(1'b1, ni, io);
      ni++;
    end
  end

  initial begin
    for (int n = 0; n < NV; n++)
      for (int i = 0; i < 8; i++) begin
        int lim;
        lim = (n < 20) ? 16383 : 4096;  // a few vectors near full range
        vecs[n][i] = word_t'(int'($urandom_range(2 * lim, 0)) - lim);
      end
    // extremes
    for (int i = 0; i < 8; i++) begin
      vecs[0][i] = 16'sd16383;
      vecs[1][i] = -16'sd16384;
      vecs[2][i] = (i % 2 != 0) ? 16'sd11000 : -16'sd11000;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int n = 0; n < NV; n++)
      for (int i = 0; i < 8; i++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_data  = vecs[n][i];
        if (first_in < 0) first_in = cyc;
      end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (40) @(posedge clk);
    checks += 3;
    if (nf != NV * 8 || ni != NV * 8) begin
      failures++;
      $display("output count %0d/%0d, expected %0d", nf, ni, NV * 8);
    end
    if (first_out_f - first_in != 16) begin
      failures++;
      $display("FDCT latency %0d, expected 16", first_out_f - first_in);
    end
    if (first_out_i - first_in != 16) begin
      failures++;
      $display("IDCT latency %0d, expected 16", first_out_i - first_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
