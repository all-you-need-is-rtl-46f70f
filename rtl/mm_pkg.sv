// mm_pkg: field arithmetic and constants shared by the lambda-detection M&M AES.
//
// Three fields are used. GF(2^8) is the AES field (x^8+x^4+x^3+x+1). GF(2^4) uses the
// polynomial x^4+x+1. The S-box inverts in the tower field GF((2^4)^2) built as
// GF(2^4)[Y]/(Y^2+Y+NU) and written in the normal basis {Y^16, Y}: an element a*Y^16+b*Y is
// packed as {a, b}. In that basis the norm of (a,b) is lambda(a,b) = a*b + (a+b)^2*NU and
// the inverse of (a,b) is (lambda^-1 * b, lambda^-1 * a), the formulation the design follows.
//
// PHI maps an AES byte to the tower field. It is the field isomorphism that sends the AES
// generator x to the root g = 8'h02 of x^8+x^4+x^3+x+1 in the tower field, so column i of
// the bit matrix is g^i. PHI_INV is its inverse. NU = 4'h8 is the smallest element whose
// absolute trace is 1, which makes Y^2+Y+NU irreducible. These choices are this design's
// own; any other valid NU and root give an equivalent S-box.
//
// The AES affine map is S(x) = L(x^-1) + 8'h63. Its GF(2)-linear part is written as the
// linearised polynomial L(y) = sum_i LIN_COEF[i] * y^(2^i), which lets the tag path apply
// it in the tag domain (see mm_sbox).
package mm_pkg;

  typedef enum logic [1:0] {FLD_GF2, FLD_GF16, FLD_GF256} field_e;

  localparam logic [3:0] NU = 4'h8;
  localparam logic [7:0] AFF_C = 8'h63;

  localparam logic [7:0] PHI_COL     [8] = '{8'h11, 8'h02, 8'h62, 8'hc8, 8'hcf, 8'h58, 8'h47, 8'h5b};
  localparam logic [7:0] PHI_INV_COL [8] = '{8'ha2, 8'h02, 8'hb8, 8'hdb, 8'ha3, 8'h5e, 8'h58, 8'h8b};
  localparam logic [7:0] LIN_COEF    [8] = '{8'h05, 8'h09, 8'hf9, 8'h25, 8'hf4, 8'h01, 8'hb5, 8'h8f};

  function automatic logic [3:0] gf16_mul(input logic [3:0] a, input logic [3:0] b);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++) p ^= (7'(a) << i) & {7{b[i]}};
    for (int i = 6; i >= 4; i--) p ^= (7'(5'b10011) << (i - 4)) & {7{p[i]}};
    return p[3:0];
  endfunction

  function automatic logic [3:0] gf16_sq(input logic [3:0] a);
    return gf16_mul(a, a);
  endfunction

  function automatic logic [7:0] gf256_mul(input logic [7:0] a, input logic [7:0] b);
    logic [14:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) p ^= (15'(a) << i) & {15{b[i]}};
    for (int i = 14; i >= 8; i--) p ^= (15'(9'h11b) << (i - 8)) & {15{p[i]}};
    return p[7:0];
  endfunction

  function automatic logic [7:0] gf256_sq(input logic [7:0] a);
    return gf256_mul(a, a);
  endfunction

  // a^(2^k): k repeated squarings, a GF(2)-linear map
  function automatic logic [7:0] gf256_frob(input logic [7:0] a, input int k);
    logic [7:0] r;
    r = a;
    for (int i = 0; i < k; i++) r = gf256_sq(r);
    return r;
  endfunction

  function automatic logic [7:0] phi(input logic [7:0] x);
    logic [7:0] r;
    r = '0;
    for (int i = 0; i < 8; i++) if (x[i]) r ^= PHI_COL[i];
    return r;
  endfunction

  function automatic logic [7:0] phi_inv(input logic [7:0] y);
    logic [7:0] r;
    r = '0;
    for (int i = 0; i < 8; i++) if (y[i]) r ^= PHI_INV_COL[i];
    return r;
  endfunction

  // GF(2)-linear part of the AES affine transform (no constant)
  function automatic logic [7:0] aes_lin(input logic [7:0] x);
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      r[i] = x[i] ^ x[(i + 4) % 8] ^ x[(i + 5) % 8] ^ x[(i + 6) % 8] ^ x[(i + 7) % 8];
    return r;
  endfunction

  // (a+b)^2 * NU: the linear half of lambda, applied share by share
  function automatic logic [3:0] lam_lin(input logic [7:0] ab);
    return gf16_mul(gf16_sq(ab[7:4] ^ ab[3:0]), NU);
  endfunction

  // Unshared reference functions, used by testbenches
  function automatic logic [3:0] lambda_ref(input logic [7:0] ab);
    return gf16_mul(ab[7:4], ab[3:0]) ^ lam_lin(ab);
  endfunction

  function automatic logic [7:0] gf256_inv(input logic [7:0] x);
    logic [7:0] r, s;
    r = 8'h01;
    s = x;
    for (int i = 0; i < 8; i++) begin   // x^254
      if (((8'd254 >> i) & 8'd1) != 8'd0) r = gf256_mul(r, s);
      s = gf256_sq(s);
    end
    return r;
  endfunction

  function automatic logic [7:0] sbox_ref(input logic [7:0] x);
    return aes_lin(gf256_inv(x)) ^ AFF_C;
  endfunction

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Number of fresh random words a shared multiplication with NS shares consumes
  function automatic int n_rand(input int ns);
    return (ns * (ns - 1) / 2 > 0) ? ns * (ns - 1) / 2 : 1;
  endfunction

  // Width of the random input of mm_aes with ns shares: S-box data and tag paths, three
  // detectors, input tags of plaintext and key, tag constants, match check, delta and output
  // gating, each with its own random words (see the slices in mm_aes).
  function automatic int rnd_width(input int ns);
    return n_rand(ns) * (2 * 5 * 4 + 8 * 8 + 3 * 4 + 2 * 16 * 8 + 8 * 8 + 16 * 8 + 140 + 16 * 8);
  endfunction

endpackage
