// tb_mm_tag_keygen: checks the stage-6 tag constants gamma_k = L_k * alpha^(1+2^k).
//
// A new random shared alpha is applied each cycle; one cycle later every recombined gamma_k
// must match the value computed here by repeated multiplication. The use the S-box makes of
// the constants is checked as well: for a random y,
//   sum_k gamma_k * ((alpha*y)^-1)^(2^k) + 63*alpha = alpha * S(y).
module tb_mm_tag_keygen;
  import mm_pkg::*;
  import mm_tb_pkg::*;

  localparam int NS = 3;
  localparam int N = 200;
  localparam logic [7:0] COEF [8] = '{8'h05, 8'h09, 8'hf9, 8'h25, 8'hf4, 8'h01, 8'hb5, 8'h8f};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NS-1:0][7:0] alpha;
  logic [7:0][2:0][7:0] rnd;
  logic [7:0][NS-1:0][7:0] gamma;

  mm_tag_keygen #(.NS(NS)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (N + 50) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] un8(input logic [NS-1:0][7:0] v);
    return v[0] ^ v[1] ^ v[2];
  endfunction

  function automatic logic [7:0] inv8(input logic [7:0] x);
    logic [7:0] r = 8'h00;
    for (int c = 1; c < 256; c++) if (r_mul8(x, 8'(c)) == 8'h01) r = 8'(c);
    return r;
  endfunction

  logic [7:0] a, ap, g, y, u, up, sum;

  initial begin
    for (int n = 0; n < N; n++) begin
      a = 8'($urandom());
      if (n % 10 == 0) a = 8'(n / 10);   // includes alpha = 0 and small values
      alpha[1] = 8'($urandom()); alpha[2] = 8'($urandom());
      alpha[0] = a ^ alpha[1] ^ alpha[2];
      rnd = {$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
      @(negedge clk);
      // gamma now belongs to the alpha applied one cycle ago
      y = 8'($urandom());
      u = inv8(r_mul8(a, y));
      sum = r_mul8(8'h63, a);
      for (int k = 0; k < 8; k++) begin
        ap = a;
        for (int s = 0; s < k; s++) ap = r_mul8(ap, ap);
        g = r_mul8(COEF[k], r_mul8(a, ap));
        checks++;
        if (un8(gamma[k]) != g) begin
          failures++;
          $display("FAIL alpha %h gamma_%0d %h expected %h", a, k, un8(gamma[k]), g);
        end
        up = u;
        for (int s = 0; s < k; s++) up = r_mul8(up, up);
        sum ^= r_mul8(un8(gamma[k]), up);
      end
      checks++;
      if (sum != r_mul8(a, r_sbox(y))) begin
        failures++;
        $display("FAIL tag identity alpha %h y %h", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
