// mm_dom_mul: shared multiplication of two Boolean-shared field elements.
//
// z = x * y over GF(2) (bitwise AND), GF(2^4) or GF(2^8), each operand split into NS shares
// whose XOR is the value. It follows the domain-oriented masking pattern: share i forms the
// inner product x_i*y_i and the cross products x_i*y_j (j != i). Every cross product is
// blinded with a fresh random word r_{ij} that is used by both the (i,j) and the (j,i) term,
// and all NS*NS terms are stored in a register before they are combined. The output share
// z_i is the XOR of the registered terms of row i, so the result is ready one clock after
// the operands and the unit accepts new operands every cycle.
//
// rnd carries NS*(NS-1)/2 words of W bits, sampled in the same cycle as x and y. With NS = 1
// the unit is a plain registered multiplier (rnd then has one unused word). The document
// names consolidated masking as the scheme of the original S-box without giving its gates;
// this multiplier is a design choice that provides the same order of protection (NS-1).
module mm_dom_mul
  import mm_pkg::*;
#(
  parameter field_e FIELD = FLD_GF256,
  parameter int     W     = 8,
  parameter int     NS    = 3
) (
  input  logic                             clk,
  input  logic [NS-1:0][W-1:0]             x,
  input  logic [NS-1:0][W-1:0]             y,
  input  logic [n_rand(NS)-1:0][W-1:0]     rnd,
  output logic [NS-1:0][W-1:0]             z
);

  // index of the random word shared by the pair (i, j), i != j
  function automatic int pair_idx(input int i, input int j);
    int lo, hi, k;
    lo = (i < j) ? i : j;
    hi = (i < j) ? j : i;
    k = 0;
    for (int a = 0; a < NS; a++)
      for (int b = a + 1; b < NS; b++)
        if (a < lo || (a == lo && b < hi)) k++;
    return k;
  endfunction

  logic [NS-1:0][NS-1:0][W-1:0] prod, term_q;

  // all NS*NS share products
  for (genvar i = 0; i < NS; i++) begin : g_row
    for (genvar j = 0; j < NS; j++) begin : g_col
      if (FIELD == FLD_GF16) begin : g_f16
        assign prod[i][j] = W'(gf16_mul(4'(x[i]), 4'(y[j])));
      end else if (FIELD == FLD_GF256) begin : g_f256
        assign prod[i][j] = W'(gf256_mul(8'(x[i]), 8'(y[j])));
      end else begin : g_f2
        assign prod[i][j] = x[i] & y[j];
      end
      if (i == j) begin : g_inner
        always_ff @(posedge clk) term_q[i][j] <= prod[i][j];
      end else begin : g_cross
        localparam int P = pair_idx(i, j);
        always_ff @(posedge clk) term_q[i][j] <= prod[i][j] ^ rnd[P];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      z[i] = '0;
      for (int j = 0; j < NS; j++) z[i] ^= term_q[i][j];
    end
  end

  if (NS == 1) begin : g_unused
    logic unused_rnd;
    assign unused_rnd = ^rnd;
  end

  initial assert (W == 1 && FIELD == FLD_GF2 || W == 4 && FIELD == FLD_GF16 ||
                  W == 8 && FIELD == FLD_GF256 || FIELD == FLD_GF2 && W <= 8)
    else $error("mm_dom_mul: width does not fit the field");

endmodule
