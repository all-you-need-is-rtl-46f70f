// mm_tb_pkg: reference models for the testbenches, written independently of the RTL.
//
// Field multiplication by shift-and-add, the AES S-box from its definition (inverse found by
// search, then the affine map written bit by bit), a plain AES-128 encryption, and helpers
// that split a value into random Boolean shares or recombine shares.
package mm_tb_pkg;

  function automatic logic [7:0] r_mul8(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = {aa[6:0], 1'b0} ^ (aa[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic logic [3:0] r_mul4(input logic [3:0] a, input logic [3:0] b);
    logic [3:0] p, aa;
    p = '0;
    aa = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) p ^= aa;
      aa = {aa[2:0], 1'b0} ^ (aa[3] ? 4'h3 : 4'h0);
    end
    return p;
  endfunction

  function automatic logic [3:0] r_pow4(input logic [3:0] a, input int n);
    logic [3:0] r;
    r = 4'h1;
    for (int i = 0; i < n; i++) r = r_mul4(r, a);
    return r;
  endfunction

  function automatic logic [7:0] r_sbox(input logic [7:0] x);
    logic [7:0] inv, s, cst;
    cst = 8'h63;
    inv = 8'h00;
    for (int c = 1; c < 256; c++) if (r_mul8(x, 8'(c)) == 8'h01) inv = 8'(c);
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ cst[i];
    return s;
  endfunction

  // plain AES-128; byte b of a block is bits [127-8b -: 8]
  function automatic logic [127:0] r_aes(input logic [127:0] pt, input logic [127:0] key);
    logic [7:0] s [16];
    logic [7:0] k [16];
    logic [7:0] t [16];
    logic [7:0] rc, a0, a1, a2, a3;
    logic [127:0] r;
    rc = 8'h01;
    for (int b = 0; b < 16; b++) begin
      s[b] = pt[127-8*b -: 8] ^ key[127-8*b -: 8];
      k[b] = key[127-8*b -: 8];
    end
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int b = 0; b < 16; b++) s[b] = r_sbox(s[b]);
      for (int c = 0; c < 4; c++) for (int w = 0; w < 4; w++) t[c*4+w] = s[((c+w)%4)*4+w];
      for (int b = 0; b < 16; b++) s[b] = t[b];
      if (rnd != 10)
        for (int c = 0; c < 4; c++) begin
          a0 = s[c*4]; a1 = s[c*4+1]; a2 = s[c*4+2]; a3 = s[c*4+3];
          s[c*4]   = r_mul8(a0, 2) ^ r_mul8(a1, 3) ^ a2 ^ a3;
          s[c*4+1] = a0 ^ r_mul8(a1, 2) ^ r_mul8(a2, 3) ^ a3;
          s[c*4+2] = a0 ^ a1 ^ r_mul8(a2, 2) ^ r_mul8(a3, 3);
          s[c*4+3] = r_mul8(a0, 3) ^ a1 ^ a2 ^ r_mul8(a3, 2);
        end
      t[0] = k[0] ^ r_sbox(k[13]) ^ rc;
      t[1] = k[1] ^ r_sbox(k[14]);
      t[2] = k[2] ^ r_sbox(k[15]);
      t[3] = k[3] ^ r_sbox(k[12]);
      for (int b = 4; b < 16; b++) t[b] = k[b] ^ t[b-4];
      for (int b = 0; b < 16; b++) k[b] = t[b];
      rc = r_mul8(rc, 2);
      for (int b = 0; b < 16; b++) s[b] ^= k[b];
    end
    for (int b = 0; b < 16; b++) r[127-8*b -: 8] = s[b];
    return r;
  endfunction

  // last round key of AES-128
  function automatic logic [127:0] r_key10(input logic [127:0] key);
    logic [7:0] k [16];
    logic [7:0] t [16];
    logic [7:0] rc;
    logic [127:0] r;
    rc = 8'h01;
    for (int b = 0; b < 16; b++) k[b] = key[127-8*b -: 8];
    for (int rnd = 1; rnd <= 10; rnd++) begin
      t[0] = k[0] ^ r_sbox(k[13]) ^ rc;
      t[1] = k[1] ^ r_sbox(k[14]);
      t[2] = k[2] ^ r_sbox(k[15]);
      t[3] = k[3] ^ r_sbox(k[12]);
      for (int b = 4; b < 16; b++) t[b] = k[b] ^ t[b-4];
      for (int b = 0; b < 16; b++) k[b] = t[b];
      rc = r_mul8(rc, 2);
    end
    for (int b = 0; b < 16; b++) r[127-8*b -: 8] = k[b];
    return r;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

endpackage
