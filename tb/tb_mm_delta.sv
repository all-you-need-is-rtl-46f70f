// tb_mm_delta: checks the shared Kronecker delta over 140 shared bits (the size used by the
// core) and its latency of clog2(140) = 8 cycles.
//
// Every cycle a new shared input is applied: all zero, a single set bit at a random or an
// edge position, or random bits. The recombined output 8 cycles later must be 1 exactly
// when the input was all zero.
module tb_mm_delta;
  import mm_pkg::*;

  localparam int NS = 3;
  localparam int N  = 140;
  localparam int LAT = 8;
  localparam int NT = 400;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0][NS-1:0] x;
  logic [N-1:0][2:0] rnd;
  logic [NS-1:0] y;

  mm_delta #(.NS(NS), .N(N)) dut (.*);

  int checks = 0, failures = 0, n_one = 0, n_zero = 0;

  initial begin
    repeat (NT + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit exp_q [$];
  logic [N-1:0] v;
  int mode, pos;

  initial begin
    for (int n = 0; n < NT; n++) begin
      if (n >= LAT) begin
        checks++;
        if ((^y) != exp_q[0]) begin
          failures++;
          $display("FAIL cycle %0d y=%0d expected %0d", n, ^y, exp_q[0]);
        end
        if (exp_q[0]) n_one++; else n_zero++;
        void'(exp_q.pop_front());
      end
      mode = $urandom() % 4;
      v = '0;
      if (mode == 1) begin pos = int'($urandom() % N); v[pos] = 1'b1; end
      if (mode == 2) v[(n % 2 == 0) ? 0 : N - 1] = 1'b1;
      if (mode == 3) for (int j = 0; j < N; j += 32) v[j +: 32] = $urandom();
      for (int j = 0; j < N; j++) begin
        x[j][1] = 1'($urandom());
        x[j][2] = 1'($urandom());
        x[j][0] = v[j] ^ x[j][1] ^ x[j][2];
      end
      for (int j = 0; j < N; j++) rnd[j] = 3'($urandom());
      exp_q.push_back(v == '0);
      @(negedge clk);
    end
    checks++;
    if (n_one == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
