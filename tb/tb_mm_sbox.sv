// tb_mm_sbox: checks the six-stage shared S-box, data and tag paths and the lambda taps.
//
// A random tag key alpha is fixed and the gamma constants are computed here from their
// definition. alpha itself is sent through first to learn lambda(alpha) and its powers.
// Then one random byte per cycle (all 256 values, then random ones) enters with valid set,
// as random shares, with its tag alpha*x. Six cycles later the recombined outputs must be
// S(x) and alpha*S(x); at stages 2, 3 and 4 the taps must satisfy the lambda homomorphism
// lam_t = lam_d * lam_alpha and lam4 = lam2^14, lam3 = lam2^3.
module tb_mm_sbox;
  import mm_pkg::*;
  import mm_tb_pkg::*;

  localparam int NS = 3;
  localparam int N = 600;
  localparam logic [7:0] COEF [8] = '{8'h05, 8'h09, 8'hf9, 8'h25, 8'hf4, 8'h01, 8'hb5, 8'h8f};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic valid_in, valid_out, v2, v3, v4;
  logic [NS-1:0][7:0] d_in, t_in, alpha, d_out, t_out;
  logic [7:0][NS-1:0][7:0] gamma;
  logic [4:0][2:0][3:0] rnd_d, rnd_t;
  logic [7:0][2:0][7:0] rnd_6;
  logic [NS-1:0][3:0] lam2_d, lam2_t, lam3_d, lam3_t, lam4_d, lam4_t;

  mm_sbox #(.NS(NS)) dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] a, xs [$];
  logic [3:0] la2, la3, la4;
  int cyc = 0, t_in_cyc [$];

  always @(negedge clk) begin
    rnd_d = {$urandom(), $urandom()};
    rnd_t = {$urandom(), $urandom()};
    rnd_6 = {$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
  end
  always @(posedge clk) cyc++;

  initial begin
    repeat (N + 300) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] un4(input logic [NS-1:0][3:0] v);
    return v[0] ^ v[1] ^ v[2];
  endfunction
  function automatic logic [7:0] un8(input logic [NS-1:0][7:0] v);
    return v[0] ^ v[1] ^ v[2];
  endfunction
  function automatic logic [NS-1:0][7:0] share8(input logic [7:0] v);
    logic [NS-1:0][7:0] s;
    s[1] = 8'($urandom()); s[2] = 8'($urandom()); s[0] = v ^ s[1] ^ s[2];
    return s;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // checker: taps and outputs of the valid bytes, in order
  logic [7:0] q2 [$], q3 [$], q4 [$];
  always @(negedge clk) if (rst_n) begin
    if (v2) begin
      chk(un4(lam2_t) == r_mul4(un4(lam2_d), la2), "stage 2 homomorphism");
      q3.push_back(8'(un4(lam2_d)));
    end
    if (v3) begin
      chk(un4(lam3_d) == r_pow4(4'(q3[0]), 3), "lambda^3");
      chk(un4(lam3_t) == r_mul4(un4(lam3_d), la3), "stage 3 homomorphism");
      q4.push_back(q3.pop_front());
    end
    if (v4) begin
      chk(un4(lam4_d) == r_pow4(4'(q4.pop_front()), 14), "lambda^-1");
      chk(un4(lam4_t) == r_mul4(un4(lam4_d), la4), "stage 4 homomorphism");
    end
    if (valid_out) begin
      chk(xs.size() > 0, "unexpected output");
      if (xs.size() > 0) begin
        chk(un8(d_out) == r_sbox(xs[0]), $sformatf("S(%h) = %h", xs[0], un8(d_out)));
        chk(un8(t_out) == r_mul8(a, r_sbox(xs[0])), "tag of S(x)");
        chk(cyc - t_in_cyc[0] == 6, $sformatf("latency %0d", cyc - t_in_cyc[0]));
        void'(xs.pop_front());
        void'(t_in_cyc.pop_front());
      end
    end
  end

  logic [7:0] x, ap;
  initial begin
    valid_in = 1'b0;
    do a = 8'($urandom()); while (a == 8'h00);
    alpha = share8(a);
    for (int k = 0; k < 8; k++) begin
      ap = a;
      for (int s = 0; s < k; s++) ap = r_mul8(ap, ap);
      gamma[k] = share8(r_mul8(COEF[k], r_mul8(a, ap)));
    end
    la2 = '0; la3 = '0; la4 = '0;
    d_in = '0; t_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // learn the lambda values of alpha from the taps (not marked valid)
    d_in = share8(a); t_in = share8(a);
    @(negedge clk); @(negedge clk);
    la2 = un4(lam2_d);
    @(negedge clk); la3 = un4(lam3_d);
    @(negedge clk); la4 = un4(lam4_d);
    chk(la2 != 4'h0, "lambda(alpha) non-zero");
    for (int n = 0; n < N; n++) begin
      x = (n < 256) ? 8'(n) : 8'($urandom());
      if (n % 7 == 3) begin
        valid_in = 1'b0;   // a bubble; its garbage must not appear at the output
        d_in = share8(8'($urandom())); t_in = share8(8'($urandom()));
      end else begin
        valid_in = 1'b1;
        d_in = share8(x);
        t_in = share8(r_mul8(a, x));
        xs.push_back(x);
        t_in_cyc.push_back(cyc);
      end
      @(negedge clk);
    end
    valid_in = 1'b0;
    repeat (10) @(negedge clk);
    chk(xs.size() == 0, "all bytes came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
