// mm_sbox: six-stage shared AES S-box with a data path and a parallel MAC-tag path.
//
// The data byte x and its tag tau = alpha * x (both NS Boolean shares) enter together. Each
// goes through its own mm_tower_inv (stages 1 to 5), so a fault in one path cannot be copied
// into the other. Stage 6 finishes each path:
//   data:  S(x) = L(x^-1) + 8'h63, applied share by share (constant on share 0 only).
//   tag:   tau' = sum_k gamma_k * (u)^(2^k) + 8'h63*alpha, with u = tau^-1 = (alpha x)^-1 and
//          gamma_k = LIN_COEF[k] * alpha^(1+2^k) (from mm_tag_keygen). Since
//          gamma_k * u^(2^k) = LIN_COEF[k] * alpha * (x^-1)^(2^k), the sum is alpha*L(x^-1) and
//          tau' = alpha * S(x), the tag of the output, without ever unmasking alpha.
// The tag arithmetic of stage 6 is this design's own way of keeping the tag relation through
// the affine map; the document states only that data and tag are computed in parallel.
//
// Taps lam*_d / lam*_t expose lambda, lambda^3 and lambda^-1 of both paths at stages 2, 3 and
// 4 for the lambda detectors, each with the valid bit of the byte it belongs to (v2, v3, v4).
// Timing: one byte per cycle, result (d_out, t_out, valid_out) 6 cycles after the input.
// rnd is fresh every cycle: data path 5 x n_rand(NS) x 4 bits, tag path the same, then
// 8 x n_rand(NS) x 8 bits for the stage-6 tag multiplications.
module mm_sbox
  import mm_pkg::*;
#(
  parameter int NS = 3
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               valid_in,
  input  logic [NS-1:0][7:0]                 d_in,
  input  logic [NS-1:0][7:0]                 t_in,
  input  logic [NS-1:0][7:0]                 alpha,
  input  logic [7:0][NS-1:0][7:0]            gamma,
  input  logic [4:0][n_rand(NS)-1:0][3:0]    rnd_d,
  input  logic [4:0][n_rand(NS)-1:0][3:0]    rnd_t,
  input  logic [7:0][n_rand(NS)-1:0][7:0]    rnd_6,
  output logic                               valid_out,
  output logic [NS-1:0][7:0]                 d_out,
  output logic [NS-1:0][7:0]                 t_out,
  output logic                               v2,
  output logic                               v3,
  output logic                               v4,
  output logic [NS-1:0][3:0]                 lam2_d,
  output logic [NS-1:0][3:0]                 lam2_t,
  output logic [NS-1:0][3:0]                 lam3_d,
  output logic [NS-1:0][3:0]                 lam3_t,
  output logic [NS-1:0][3:0]                 lam4_d,
  output logic [NS-1:0][3:0]                 lam4_t
);

  logic [6:1] v_q;
  logic [NS-1:0][7:0] inv_d, inv_t, d6_q, c63_q;
  logic [7:0][NS-1:0][7:0] u_pow;
  logic [7:0][NS-1:0][7:0] g_prod;

  mm_tower_inv #(.NS(NS)) u_inv_d (
    .clk, .x(d_in), .rnd(rnd_d), .lam2(lam2_d), .lam3(lam3_d), .lam14(lam4_d), .inv(inv_d));
  mm_tower_inv #(.NS(NS)) u_inv_t (
    .clk, .x(t_in), .rnd(rnd_t), .lam2(lam2_t), .lam3(lam3_t), .lam14(lam4_t), .inv(inv_t));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[5:1], valid_in};
  end

  assign v2 = v_q[2];
  assign v3 = v_q[3];
  assign v4 = v_q[4];
  assign valid_out = v_q[6];

  // stage 6, data path
  always_ff @(posedge clk) begin
    for (int i = 0; i < NS; i++) begin
      d6_q[i]  <= aes_lin(phi_inv(inv_d[i])) ^ ((i == 0) ? AFF_C : 8'h00);
      c63_q[i] <= gf256_mul(AFF_C, alpha[i]);
    end
  end

  // stage 6, tag path: powers u^(2^k) are linear, so they are taken share by share
  always_comb begin
    for (int k = 0; k < 8; k++)
      for (int i = 0; i < NS; i++)
        u_pow[k][i] = gf256_frob(phi_inv(inv_t[i]), k);
  end

  for (genvar k = 0; k < 8; k++) begin : g_tag6
    mm_dom_mul #(.FIELD(FLD_GF256), .W(8), .NS(NS)) u_mul6 (
      .clk, .x(gamma[k]), .y(u_pow[k]), .rnd(rnd_6[k]), .z(g_prod[k]));
  end

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      t_out[i] = c63_q[i];
      for (int k = 0; k < 8; k++) t_out[i] ^= g_prod[k][i];
    end
  end

  assign d_out = d6_q;

endmodule
