// mm_tower_inv: five-stage shared inversion in GF(2^8) through the tower field GF((2^4)^2).
//
// The input byte x (NS Boolean shares, AES polynomial basis) is mapped share by share to the
// tower field, x -> (a, b). The inverse is then (lambda^-1 * b, lambda^-1 * a) with
// lambda = a*b + (a+b)^2*NU, so the only non-linear work is in GF(2^4):
//   stage 1  (a, b) = PHI(x)                                   linear, registered
//   stage 2  lambda = a*b + (a+b)^2*NU                         one shared multiplication
//   stage 3  lambda^3 = lambda * lambda^2                      one shared multiplication
//   stage 4  lambda^14 = (lambda^3)^4 * lambda^2 = lambda^-1   one shared multiplication
//   stage 5  (c, d) = (lambda^-1 * b, lambda^-1 * a)           two shared multiplications
// Squarings are GF(2)-linear and are applied to each share. lambda^-1 is computed as
// lambda^14, which maps 0 to 0, so x = 0 gives (c, d) = (0, 0) as in the reference inversion.
// The structure of stages 1, 2 and 5 and the use of lambda follow the document; splitting the
// GF(2^4) inversion into stages 3 and 4 by the chain lambda^3, lambda^14 is this design's
// choice, made so that the value of every stage is a power of lambda and the lambda checks
// of stages 2 to 4 are multiplicative.
//
// Timing: fully pipelined, one byte per cycle. lam2, lam3 and lam14 belong to the byte that
// entered 2, 3 and 4 cycles earlier; inv (tower-field packing {c, d}) to the byte that entered
// 5 cycles earlier. rnd holds five groups of n_rand(NS) 4-bit words, one per multiplication
// (stages 2, 3, 4, 5c, 5d), fresh every cycle.
module mm_tower_inv
  import mm_pkg::*;
#(
  parameter int NS = 3
) (
  input  logic                               clk,
  input  logic [NS-1:0][7:0]                 x,
  input  logic [4:0][n_rand(NS)-1:0][3:0]    rnd,
  output logic [NS-1:0][3:0]                 lam2,
  output logic [NS-1:0][3:0]                 lam3,
  output logic [NS-1:0][3:0]                 lam14,
  output logic [NS-1:0][7:0]                 inv
);

  logic [NS-1:0][7:0] s1_q, ab2_q, ab3_q, ab4_q;
  logic [NS-1:0][3:0] a1, b1, lin2_q, lam2_q;
  logic [NS-1:0][3:0] lam2_sq, dom2_z, lam3_p4, lam2q_sq, a4, b4, c5, d5;

  always_ff @(posedge clk) begin
    for (int i = 0; i < NS; i++) begin
      s1_q[i]   <= phi(x[i]);
      lin2_q[i] <= lam_lin(s1_q[i]);
    end
    ab2_q  <= s1_q;
    ab3_q  <= ab2_q;
    ab4_q  <= ab3_q;
    lam2_q <= lam2;
  end

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      a1[i]       = s1_q[i][7:4];
      b1[i]       = s1_q[i][3:0];
      lam2[i]     = dom2_z[i] ^ lin2_q[i];
      lam2_sq[i]  = gf16_sq(lam2[i]);
      lam3_p4[i]  = gf16_sq(gf16_sq(lam3[i]));
      lam2q_sq[i] = gf16_sq(lam2_q[i]);
      a4[i]       = ab4_q[i][7:4];
      b4[i]       = ab4_q[i][3:0];
      inv[i]      = {c5[i], d5[i]};
    end
  end

  mm_dom_mul #(.FIELD(FLD_GF16), .W(4), .NS(NS)) u_mul2 (
    .clk, .x(a1), .y(b1), .rnd(rnd[0]), .z(dom2_z));
  mm_dom_mul #(.FIELD(FLD_GF16), .W(4), .NS(NS)) u_mul3 (
    .clk, .x(lam2), .y(lam2_sq), .rnd(rnd[1]), .z(lam3));
  mm_dom_mul #(.FIELD(FLD_GF16), .W(4), .NS(NS)) u_mul4 (
    .clk, .x(lam3_p4), .y(lam2q_sq), .rnd(rnd[2]), .z(lam14));
  mm_dom_mul #(.FIELD(FLD_GF16), .W(4), .NS(NS)) u_mul5c (
    .clk, .x(lam14), .y(b4), .rnd(rnd[3]), .z(c5));
  mm_dom_mul #(.FIELD(FLD_GF16), .W(4), .NS(NS)) u_mul5d (
    .clk, .x(lam14), .y(a4), .rnd(rnd[4]), .z(d5));

endmodule
