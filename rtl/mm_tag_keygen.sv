// mm_tag_keygen: derives the shared stage-6 tag constants gamma_k from the tag key alpha.
//
// gamma_k = LIN_COEF[k] * alpha * alpha^(2^k), k = 0..7, where LIN_COEF are the coefficients
// of the AES affine map written as a linearised polynomial (mm_pkg). alpha^(2^k) is linear and
// is taken share by share; the product with alpha is one shared multiplication per k, and the
// constant factor is again applied share by share. mm_sbox uses gamma_k to carry the tag
// through the affine map. The whole unit is this design's own: the document does not say how
// the tag path handles the affine map.
// Timing: gamma is valid one cycle after alpha. rnd: 8 x n_rand(NS) bytes, fresh per use.
module mm_tag_keygen
  import mm_pkg::*;
#(
  parameter int NS = 3
) (
  input  logic                             clk,
  input  logic [NS-1:0][7:0]               alpha,
  input  logic [7:0][n_rand(NS)-1:0][7:0]  rnd,
  output logic [7:0][NS-1:0][7:0]          gamma
);

  logic [7:0][NS-1:0][7:0] a_pow, prod;

  always_comb begin
    for (int k = 0; k < 8; k++)
      for (int i = 0; i < NS; i++) begin
        a_pow[k][i] = gf256_frob(alpha[i], k);
        gamma[k][i] = gf256_mul(LIN_COEF[k], prod[k][i]);
      end
  end

  for (genvar k = 0; k < 8; k++) begin : g_mul
    mm_dom_mul #(.FIELD(FLD_GF256), .W(8), .NS(NS)) u_mul (
      .clk, .x(alpha), .y(a_pow[k]), .rnd(rnd[k]), .z(prod[k]));
  end

endmodule
