// tb_mm_aes: end-to-end test of the protected AES core at its default size (3 shares).
//
// Checks, each against a plain AES-128 model (mm_tb_pkg) with fresh random sharings:
//   * the FIPS-197 example vector and random plaintext/key/tag-key triples, and the
//     start-to-done latency;
//   * a zero-value fault: a bit flip of lambda in stage 2 of the data path while the S-box
//     input is zero. The fault is nullified in the data (match check stays zero) but the
//     lambda detectors see it, so the output must be all zero;
//   * a fault on a non-zero byte in stage 2 (output must be zero);
//   * a fault on a stored ciphertext tag after the last round, which only the match check
//     can see (output must be zero);
//   * a fault-free encryption after each faulty one (the detectors are cleared by start).
// Each mechanism is counted and a mechanism that never happened counts as a failure.
module tb_mm_aes;
  import mm_pkg::*;
  import mm_tb_pkg::*;

  localparam int NS = 3;
  localparam int LATENCY = 288;
  localparam int N_RANDOM = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [NS-1:0][127:0] pt, key, ct;
  logic [NS-1:0][7:0] alpha;
  logic [rnd_width(NS)-1:0] rnd;
  logic busy, done;

  int checks = 0, failures = 0;
  int n_clean = 0, n_zero_value = 0, n_zero_value_nullified = 0, n_nonzero_fault = 0;
  int n_match_only = 0, n_zeroed = 0, n_det2 = 0, n_det3 = 0, n_det4 = 0;

  mm_aes dut (.*);

  always #5 clk = ~clk;

  // fresh randomness every cycle
  always @(negedge clk)
    for (int w = 0; w < rnd_width(NS); w += 32) rnd[w +: 32] = $urandom();

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] unshare128(input logic [NS-1:0][127:0] v);
    logic [127:0] r = '0;
    for (int i = 0; i < NS; i++) r ^= v[i];
    return r;
  endfunction

  function automatic logic [3:0] unshare4(input logic [NS-1:0][3:0] v);
    logic [3:0] r = '0;
    for (int i = 0; i < NS; i++) r ^= v[i];
    return r;
  endfunction

  function automatic logic [7:0] unshare8(input logic [NS-1:0][7:0] v);
    logic [7:0] r = '0;
    for (int i = 0; i < NS; i++) r ^= v[i];
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // fault modes
  typedef enum {F_NONE, F_ZERO_VALUE, F_NONZERO, F_CT_TAG} fault_e;

  logic [7:0] e_or;

  // one encryption; returns the recombined output and the cycles from start to done
  task automatic encrypt(input logic [127:0] p, input logic [127:0] k, input logic [7:0] a,
                         input fault_e f, output logic [127:0] c, output int cycles,
                         output bit injected);
    logic [NS-1:0][127:0] ps, ks;
    logic [NS-1:0][7:0] as;
    logic [NS-1:0][3:0] l2;
    logic [15:0][NS-1:0][7:0] tmp;
    ps[0] = p; ks[0] = k; as[0] = a;
    for (int i = 1; i < NS; i++) begin
      ps[i] = rand128(); ks[i] = rand128(); as[i] = 8'($urandom());
      ps[0] ^= ps[i]; ks[0] ^= ks[i]; as[0] ^= as[i];
    end
    injected = 1'b0;
    @(negedge clk);
    pt = ps; key = ks; alpha = as; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin
      // S-box input of this cycle decides whether a stage-2 fault is injected 2 cycles later
      if (!injected && dut.sb_vin &&
          ((f == F_ZERO_VALUE && unshare8(dut.sb_din) == 8'h00) ||
           (f == F_NONZERO && unshare8(dut.sb_din) != 8'h00 && dut.round_q == 4'd5))) begin
        injected = 1'b1;
        @(negedge clk); cycles++;
        @(negedge clk); cycles++;
        l2 = dut.u_sbox.u_inv_d.lam2;
        l2[0][1] = ~l2[0][1];
        force dut.u_sbox.u_inv_d.lam2 = l2;
        @(negedge clk); cycles++;
        release dut.u_sbox.u_inv_d.lam2;
      end else if (!injected && f == F_CT_TAG && dut.state_q == 2'd3) begin
        injected = 1'b1;
        tmp = dut.st_t;
        tmp[7][1][3] = ~tmp[7][1][3];
        force dut.st_t = tmp;
        @(negedge clk); cycles++;
      end else begin
        @(negedge clk); cycles++;
      end
    end
    if (f == F_CT_TAG) release dut.st_t;
    c = unshare128(ct);
    e_or = 8'h00;
    for (int b = 0; b < 16; b++) e_or |= unshare8(dut.e[b]);
    if (unshare4(dut.acc2) != 4'h0) n_det2++;
    if (unshare4(dut.acc3) != 4'h0) n_det3++;
    if (unshare4(dut.acc4) != 4'h0) n_det4++;
    if (c == 128'h0) n_zeroed++;
  endtask

  logic [127:0] p, k, c, ref_c;
  logic [7:0] a;
  int cyc;
  bit inj;

  initial begin
    pt = '0; key = '0; alpha = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // FIPS-197 appendix C.1
    p = 128'h00112233445566778899aabbccddeeff;
    k = 128'h000102030405060708090a0b0c0d0e0f;
    encrypt(p, k, 8'h5a, F_NONE, c, cyc, inj);
    check(c == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 vector");
    check(cyc == LATENCY, $sformatf("latency %0d, expected %0d", cyc, LATENCY));
    check(r_aes(p, k) == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "reference model");
    n_clean++;

    for (int n = 0; n < N_RANDOM; n++) begin
      p = rand128(); k = rand128();
      do a = 8'($urandom()); while (a == 8'h00);
      encrypt(p, k, a, F_NONE, c, cyc, inj);
      check(c == r_aes(p, k), $sformatf("random encryption %0d: %h", n, c));
      check(e_or == 8'h00, "match check clean");
      n_clean++;
    end

    // zero-value fault: retry with new inputs until some S-box input is zero
    for (int n = 0; n < 40 && n_zero_value < 2; n++) begin
      p = rand128(); k = rand128();
      do a = 8'($urandom()); while (a == 8'h00);
      encrypt(p, k, a, F_ZERO_VALUE, c, cyc, inj);
      if (inj) begin
        n_zero_value++;
        check(c == 128'h0, "zero-value fault must zero the output");
        // the fault was multiplied by zero: the tag check alone sees nothing
        if (e_or == 8'h00) n_zero_value_nullified++;
        check(e_or == 8'h00, "zero-value fault is nullified before the match check");
        encrypt(p, k, a, F_NONE, c, cyc, inj);
        check(c == r_aes(p, k), "clean run after zero-value fault");
      end else begin
        check(c == r_aes(p, k), "run without zero S-box input");
      end
    end

    p = rand128(); k = rand128(); a = 8'h3c;
    encrypt(p, k, a, F_NONZERO, c, cyc, inj);
    if (inj) n_nonzero_fault++;
    check(inj && c == 128'h0, "fault on a non-zero byte must zero the output");

    encrypt(p, k, a, F_CT_TAG, c, cyc, inj);
    if (inj && e_or != 8'h00) n_match_only++;
    check(inj && c == 128'h0, "tag fault after the last round must zero the output");
    encrypt(p, k, a, F_NONE, c, cyc, inj);
    check(c == r_aes(p, k), "clean run after tag fault");

    $display("mechanisms: clean=%0d zero_value=%0d nullified=%0d nonzero=%0d match_only=%0d zeroed=%0d det2=%0d det3=%0d det4=%0d",
             n_clean, n_zero_value, n_zero_value_nullified, n_nonzero_fault, n_match_only,
             n_zeroed, n_det2, n_det3, n_det4);
    check(n_zero_value > 0, "zero-value fault happened");
    check(n_zero_value_nullified > 0, "nullification happened");
    check(n_nonzero_fault > 0, "non-zero fault happened");
    check(n_match_only > 0, "match-check detection happened");
    check(n_zeroed > 0, "output zeroing happened");
    check(n_det2 > 0 && n_det3 > 0 && n_det4 > 0, "every detector fired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
