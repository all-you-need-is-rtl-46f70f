// tb_mm_dom_mul: checks the shared multiplier in all three fields with 3 shares.
//
// Each cycle new random operands are split into random shares and fresh random words are
// applied; one cycle later the XOR of the output shares must equal the product from the
// reference multiplier, and the first output share must not simply equal the unshared result
// every time (a sign that the randomness is missing).
module tb_mm_dom_mul;
  import mm_pkg::*;
  import mm_tb_pkg::*;

  localparam int NS = 3;
  localparam int NR = 3;
  localparam int N = 400;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NS-1:0][7:0] x8, y8, z8;
  logic [NS-1:0][3:0] x4, y4, z4;
  logic [NS-1:0][0:0] x1, y1, z1;
  logic [NR-1:0][7:0] r8;
  logic [NR-1:0][3:0] r4;
  logic [NR-1:0][0:0] r1;

  mm_dom_mul #(.FIELD(FLD_GF256), .W(8), .NS(NS)) u8 (.clk, .x(x8), .y(y8), .rnd(r8), .z(z8));
  mm_dom_mul #(.FIELD(FLD_GF16),  .W(4), .NS(NS)) u4 (.clk, .x(x4), .y(y4), .rnd(r4), .z(z4));
  mm_dom_mul #(.FIELD(FLD_GF2),   .W(1), .NS(NS)) u1 (.clk, .x(x1), .y(y1), .rnd(r1), .z(z1));

  int checks = 0, failures = 0, share_eq = 0;

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] un8(input logic [NS-1:0][7:0] v);
    return v[0] ^ v[1] ^ v[2];
  endfunction
  function automatic logic [3:0] un4(input logic [NS-1:0][3:0] v);
    return v[0] ^ v[1] ^ v[2];
  endfunction

  logic [7:0] ex8;
  logic [3:0] ex4;
  logic ex1;

  initial begin
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      if (n > 0) begin
        checks += 3;
        if (un8(z8) != ex8) begin failures++; $display("FAIL gf256 %h", un8(z8)); end
        if (un4(z4) != ex4) begin failures++; $display("FAIL gf16 %h", un4(z4)); end
        if ((z1[0] ^ z1[1] ^ z1[2]) != ex1) begin failures++; $display("FAIL gf2"); end
        if (z8[0] == ex8) share_eq++;
      end
      x8 = {$urandom(), $urandom()} ; y8 = {$urandom(), $urandom()};
      x4 = 12'($urandom()); y4 = 12'($urandom());
      x1 = 3'($urandom()); y1 = 3'($urandom());
      r8 = 24'($urandom()); r4 = 12'($urandom()); r1 = 3'($urandom());
      ex8 = r_mul8(un8(x8), un8(y8));
      ex4 = r_mul4(un4(x4), un4(y4));
      ex1 = (x1[0] ^ x1[1] ^ x1[2]) & (y1[0] ^ y1[1] ^ y1[2]);
    end
    checks++;
    if (share_eq > N / 8) begin failures++; $display("FAIL output share 0 not masked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
