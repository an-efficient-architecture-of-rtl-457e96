// tb_q_iq - random test of the quantizer and the inverse quantizer against
// the MPEG-4 H.263-style formulas computed with plain integer division.
// 20000 random (qp, intra, block, index, value) inputs stream through both
// pipelines back to back; every result must match exactly and arrive one
// clock after its input. Extreme values (+-2048, 2047, 0) are included.
module tb_q_iq;
  import dctq_pkg::*;
  import dctq_ref_pkg::*;

  localparam int N = 20000;

  logic       clk = 1'b0, rst_n = 1'b1;
  logic [4:0] qp = 5'd1;
  logic       intra = 1'b1;
  logic       q_in_valid = 1'b0, iq_in_valid = 1'b0;
  logic [2:0] q_in_blk = '0, iq_in_blk = '0;
  logic [5:0] q_in_idx = '0, iq_in_idx = '0;
  coef_t      q_in_data = '0, iq_in_data = '0;
  logic       q_out_valid, iq_out_valid;
  logic [2:0] q_out_blk, iq_out_blk;
  logic [5:0] q_out_idx, iq_out_idx;
  coef_t      q_out_data, iq_out_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset

  q_iq dut (.*);

  initial begin : watchdog
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q, exp_iq, prev_valid;
  logic [2:0] exp_blk;
  logic [5:0] exp_idx;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    prev_valid = 0;
    for (int n = 0; n <= N; n++) begin
      @(negedge clk);
      // check the previous clock's inputs
      if (prev_valid) begin
        checks += 2;
        if (!q_out_valid || int'(q_out_data) != exp_q || q_out_blk != exp_blk || q_out_idx != exp_idx) begin
          failures++;
          if (failures < 10) $display("Q qp %0d intra %0d blk %0d idx %0d: got %0d exp %0d",
                                      qp, intra, exp_blk, exp_idx, q_out_data, exp_q);
        end
        if (!iq_out_valid || int'(iq_out_data) != exp_iq) begin
          failures++;
          if (failures < 10) $display("IQ qp %0d intra %0d blk %0d idx %0d: got %0d exp %0d",
                                      qp, intra, exp_blk, exp_idx, iq_out_data, exp_iq);
        end
      end
      if (n == N) begin
        q_in_valid  = 1'b0;
        iq_in_valid = 1'b0;
        break;
      end
      qp        = 5'($urandom_range(31, 1));
      intra     = 1'($urandom_range(1, 0));
      q_in_blk  = 3'($urandom_range(5, 0));
      q_in_idx  = ($urandom_range(3, 0) == 0) ? 6'd0 : 6'($urandom_range(63, 0));
      iq_in_blk = q_in_blk;
      iq_in_idx = q_in_idx;
      case (n % 8)
        0: q_in_data = -12'sd2048;
        1: q_in_data = 12'sd2047;
        2: q_in_data = 12'sd0;
        default: q_in_data = coef_t'($urandom_range(4095, 0));
      endcase
      case (n % 7)
        0: iq_in_data = -12'sd2048;
        1: iq_in_data = 12'sd2047;
        default: iq_in_data = coef_t'(int'($urandom_range(400, 0)) - 200);
      endcase
      q_in_valid  = 1'b1;
      iq_in_valid = 1'b1;
      exp_blk = q_in_blk;
      exp_idx = q_in_idx;
      exp_q  = quant_ref(int'(q_in_data), int'(qp), intra, q_in_idx == 0, q_in_blk >= 4);
      exp_iq = dequant_ref(int'(iq_in_data), int'(qp), intra, iq_in_idx == 0, iq_in_blk >= 4);
      prev_valid = 1;
    end
    @(negedge clk);
    checks++;
    if (q_out_valid || iq_out_valid) begin
      failures++;
      $display("valid stays high after the last input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
