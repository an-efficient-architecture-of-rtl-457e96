// udiv_recip - combinational unsigned division q = n / d (n < 4096, 1 <= d <= 63)
// by multiplication with a reciprocal constant.
//
// The table holds R[d] = ceil(2^18 / d); q = (n * R[d]) >> 18 is the exact
// integer quotient for every n below 2^12, because the reciprocal's error
// R[d]*d - 2^18 < d and n*(d-1) < 2^18. The table is built from that formula
// at elaboration. d = 0 returns 0. Used by the quantizer and by the AC/DC
// predictor; the reciprocal method is this design's choice, the document does
// not say how the Q/IQ block divides.
module udiv_recip (
  input  logic [11:0] n,
  input  logic [5:0]  d,
  output logic [11:0] q
);

  localparam int unsigned K = 18;

  logic [K:0] recip [64];

  for (genvar g = 0; g < 64; g++) begin : g_rom
    if (g == 0) begin : g_zero
      assign recip[g] = '0;
    end else begin : g_val
      assign recip[g] = (K+1)'(((1 << K) + g - 1) / g);
    end
  end

  logic [K+12:0] prod;
  assign prod = n * recip[d];
  assign q    = prod[K+11:K];

endmodule
