// tb_mm_lambda_detector: checks the shared lambda check and its accumulator.
//
// Random lam_d and a fixed random lam_a are shared; most cycles lam_t is the consistent
// value lam_d*lam_a, some cycles it carries an error. Cycles with valid low carry
// inconsistent values that must be ignored. The recombined accumulator must equal the XOR of
// the errors of the valid cycles, two cycles after they were applied, and clr must empty it.
module tb_mm_lambda_detector;
  import mm_pkg::*;
  import mm_tb_pkg::*;

  localparam int NS = 3;
  localparam int N = 500;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clr, valid;
  logic [NS-1:0][3:0] lam_d, lam_t, lam_a, acc;
  logic [2:0][3:0] rnd;

  mm_lambda_detector #(.NS(NS)) dut (.*);

  int checks = 0, failures = 0, n_err = 0;

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] un4(input logic [NS-1:0][3:0] v);
    return v[0] ^ v[1] ^ v[2];
  endfunction
  function automatic logic [NS-1:0][3:0] share4(input logic [3:0] v);
    logic [NS-1:0][3:0] s;
    s[1] = 4'($urandom()); s[2] = 4'($urandom()); s[0] = v ^ s[1] ^ s[2];
    return s;
  endfunction

  logic [3:0] la, ld, err;
  logic [3:0] acc_model, pend;

  initial begin
    clr = 1'b0; valid = 1'b0;
    do la = 4'($urandom()); while (la == 4'h0);
    lam_a = share4(la); lam_d = '0; lam_t = '0; rnd = '0;
    acc_model = 4'h0; pend = 4'h0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      checks++;
      if (un4(acc) != acc_model) begin
        failures++;
        $display("FAIL cycle %0d acc %h expected %h", n, un4(acc), acc_model);
      end
      rnd = 12'($urandom());
      ld = 4'($urandom());
      err = ($urandom() % 10 == 0) ? 4'($urandom()) : 4'h0;
      valid = ($urandom() % 4 != 0);
      clr = (n % 97 == 50);
      lam_d = share4(ld);
      lam_t = share4(r_mul4(ld, la) ^ (valid ? err : 4'($urandom() | 1)));
      lam_a = share4(la);
      // model of the end of this cycle: the error of the previous cycle is added (or the
      // register is cleared), the error of this cycle is formed
      acc_model = clr ? 4'h0 : acc_model ^ pend;
      pend = valid ? err : 4'h0;
      if (valid && err != 4'h0) n_err++;
      @(negedge clk);
    end
    checks++;
    if (n_err == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
