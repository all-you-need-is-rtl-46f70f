// tb_mm_match_check: checks e_i = alpha*c_i + tau_i for 16 bytes in parallel.
//
// New random shared c, tau and alpha are applied every cycle; tau is the correct tag
// alpha*c except for a few randomly chosen bytes that get an error. Two cycles later each
// recombined e_i must equal the error of byte i (zero for the correct bytes).
module tb_mm_match_check;
  import mm_pkg::*;
  import mm_tb_pkg::*;

  localparam int NS = 3;
  localparam int NB = 16;
  localparam int N = 300;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NB-1:0][NS-1:0][7:0] c, tau, e;
  logic [NS-1:0][7:0] alpha;
  logic [NB-1:0][2:0][7:0] rnd;

  mm_match_check #(.NS(NS), .NB(NB)) dut (.*);

  int checks = 0, failures = 0, n_nz = 0;

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] un8(input logic [NS-1:0][7:0] v);
    return v[0] ^ v[1] ^ v[2];
  endfunction
  function automatic logic [NS-1:0][7:0] share8(input logic [7:0] v);
    logic [NS-1:0][7:0] s;
    s[1] = 8'($urandom()); s[2] = 8'($urandom()); s[0] = v ^ s[1] ^ s[2];
    return s;
  endfunction

  logic [NB-1:0][7:0] exp_q [$];
  logic [NB-1:0][7:0] ex;
  logic [7:0] a, cv;

  initial begin
    for (int n = 0; n < N; n++) begin
      if (n >= 2) begin
        for (int b = 0; b < NB; b++) begin
          checks++;
          if (un8(e[b]) != exp_q[0][b]) begin
            failures++;
            $display("FAIL cycle %0d byte %0d e=%h expected %h", n, b, un8(e[b]), exp_q[0][b]);
          end
          if (exp_q[0][b] != 8'h00) n_nz++;
        end
        void'(exp_q.pop_front());
      end
      a = 8'($urandom());
      alpha = share8(a);
      for (int b = 0; b < NB; b++) begin
        cv = 8'($urandom());
        ex[b] = ($urandom() % 8 == 0) ? 8'($urandom()) : 8'h00;
        c[b] = share8(cv);
        tau[b] = share8(r_mul8(a, cv) ^ ex[b]);
        rnd[b] = 24'($urandom());
      end
      exp_q.push_back(ex);
      @(negedge clk);
    end
    checks++;
    if (n_nz == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
