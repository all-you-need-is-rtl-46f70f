// tb_mm_aes_fault_campaign: fault campaigns on the full core (3 shares), in the style of the
// zero-value attack experiments.
//
// Part A, last round: for each of S-box stages 2, 3 and 4, single-cycle bit flips are
// injected into the data-path value of that stage (lambda, lambda^3 or lambda^-1) for one byte
// of round 10. Bytes whose S-box input is zero (zero-value faults) and non-zero bytes are
// counted apart. For each class two detection ratios are reported: that of the final tag
// check alone (match check, what a core without lambda detectors relies on) and that of the
// complete core (output forced to zero). Expected: the tag check sees 0% of the zero-value
// faults and 100% of the others; the complete core detects 100% of both.
// Part B, first round, chosen plaintext: with a fixed key, plaintext byte 0 sweeps 0..255 and
// every encryption gets a stage-2 fault on byte 0 in round 1. The tag check alone passes
// exactly one plaintext, the one with P0 = K0, which would reveal the key byte; the complete
// core never releases a ciphertext.
// Part C, last round, statistical ineffective faults: at least 500 encryptions (more until
// two ciphertexts are released) with random plaintexts
// and a fixed key, each with a stage-2 fault on state byte 0 of round 10. A core that relies
// on the tag check releases exactly the ciphertexts whose faulted byte was zero; counting,
// for every candidate k, how often S^-1(c0 ^ k) = 0 over those ciphertexts ranks the correct
// last-round key byte first. The complete core releases nothing, so the histogram stays empty.
module tb_mm_aes_fault_campaign;
  import mm_pkg::*;
  import mm_tb_pkg::*;

  localparam int NS = 3;
  localparam int N_ZERO = 8;      // zero-value faults per stage
  localparam int N_NONZERO = 24;  // faults on non-zero bytes per stage

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [NS-1:0][127:0] pt, key, ct;
  logic [NS-1:0][7:0] alpha;
  logic [rnd_width(NS)-1:0] rnd;
  logic busy, done;

  int checks = 0, failures = 0;

  mm_aes dut (.*);

  always #5 clk = ~clk;

  always @(negedge clk)
    for (int w = 0; w < rnd_width(NS); w += 32) rnd[w +: 32] = $urandom();

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] unshare128(input logic [NS-1:0][127:0] v);
    logic [127:0] r = '0;
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
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // flip bit 0 of share 0 of the data-path value of `stage` for one cycle
  task automatic flip(input int stage);
    logic [NS-1:0][3:0] v;
    case (stage)
      2: begin
        v = dut.u_sbox.u_inv_d.lam2; v[0][0] = ~v[0][0];
        force dut.u_sbox.u_inv_d.lam2 = v;
        @(negedge clk);
        release dut.u_sbox.u_inv_d.lam2;
      end
      3: begin
        v = dut.u_sbox.u_inv_d.lam3; v[0][0] = ~v[0][0];
        force dut.u_sbox.u_inv_d.lam3 = v;
        @(negedge clk);
        release dut.u_sbox.u_inv_d.lam3;
      end
      default: begin
        v = dut.u_sbox.u_inv_d.lam14; v[0][0] = ~v[0][0];
        force dut.u_sbox.u_inv_d.lam14 = v;
        @(negedge clk);
        release dut.u_sbox.u_inv_d.lam14;
      end
    endcase
  endtask

  // Encrypt; inject into the first state byte of round `rnd_sel` that matches `want_zero`
  // (or byte `byte_sel` when it is >= 0). Reports the S-box input value of the faulted byte,
  // whether a fault was injected, the output and whether the tag check alone saw the fault.
  task automatic run(input logic [127:0] p, input logic [127:0] k, input logic [7:0] a,
                     input int stage, input int rnd_sel, input int byte_sel,
                     input bit want_zero, output bit injected, output logic [7:0] xin,
                     output logic [127:0] c, output bit tag_saw);
    logic [NS-1:0][127:0] ps, ks;
    logic [NS-1:0][7:0] as;
    logic [7:0] e_or;
    logic [7:0] din;
    ps[0] = p; ks[0] = k; as[0] = a;
    for (int i = 1; i < NS; i++) begin
      ps[i] = rand128(); ks[i] = rand128(); as[i] = 8'($urandom());
      ps[0] ^= ps[i]; ks[0] ^= ks[i]; as[0] ^= as[i];
    end
    injected = 1'b0;
    xin = 8'h00;
    @(negedge clk);
    pt = ps; key = ks; alpha = as; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      din = unshare8(dut.sb_din);
      if (!injected && dut.sb_vin && int'(dut.round_q) == rnd_sel && dut.cnt_q < 5'd16 &&
          ((byte_sel >= 0) ? (int'(dut.cnt_q) == byte_sel) : ((din == 8'h00) == want_zero))) begin
        injected = 1'b1;
        xin = din;
        repeat (stage) @(negedge clk);
        flip(stage);
      end else begin
        @(negedge clk);
      end
    end
    c = unshare128(ct);
    e_or = 8'h00;
    for (int b = 0; b < 16; b++) e_or |= unshare8(dut.e[b]);
    tag_saw = (e_or != 8'h00);
  endtask

  logic [127:0] p, k, c;
  logic [7:0] a, xin;
  bit inj, tag_saw;
  int hist_tag [256];
  int best, n_ops;
  logic [127:0] cref;
  int n_z, n_nz, z_tag, z_core, nz_tag, nz_core, tries, pass_tag, pass_core, pass_tag_p0;

  initial begin
    pt = '0; key = '0; alpha = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---------------- part A
    for (int stage = 2; stage <= 4; stage++) begin
      n_z = 0; n_nz = 0; z_tag = 0; z_core = 0; nz_tag = 0; nz_core = 0; tries = 0;
      while ((n_z < N_ZERO || n_nz < N_NONZERO) && tries < 1500) begin
        tries++;
        p = rand128(); k = rand128();
        do a = 8'($urandom()); while (a == 8'h00);
        run(p, k, a, stage, 10, -1, n_z < N_ZERO, inj, xin, c, tag_saw);
        if (!inj) continue;
        if (xin == 8'h00) begin
          n_z++;
          if (tag_saw) z_tag++;
          if (c == 128'h0) z_core++;
        end else begin
          n_nz++;
          if (tag_saw) nz_tag++;
          if (c == 128'h0) nz_core++;
        end
      end
      $display("stage %0d: zero-value faults %0d: tag check %0d%%, lambda-detection core %0d%%; other faults %0d: tag check %0d%%, core %0d%%",
               stage, n_z, (n_z > 0) ? 100 * z_tag / n_z : 0, (n_z > 0) ? 100 * z_core / n_z : 0,
               n_nz, (n_nz > 0) ? 100 * nz_tag / n_nz : 0, (n_nz > 0) ? 100 * nz_core / n_nz : 0);
      check(n_z == N_ZERO && n_nz == N_NONZERO, "enough faults injected");
      check(z_tag == 0, "zero-value faults are invisible to the tag check");
      check(z_core == n_z, "zero-value faults are all detected");
      check(nz_tag == n_nz, "other faults reach the tag check");
      check(nz_core == n_nz, "other faults are all detected");
    end

    // ---------------- part B
    k = rand128();
    p = rand128();
    a = 8'h9d;
    pass_tag = 0; pass_core = 0; pass_tag_p0 = -1;
    for (int v = 0; v < 256; v++) begin
      p[127:120] = 8'(v);
      run(p, k, a, 2, 1, 0, 1'b0, inj, xin, c, tag_saw);
      check(inj, "first-round fault injected");
      if (!tag_saw) begin pass_tag++; pass_tag_p0 = v; end
      if (c != 128'h0) pass_core++;
    end
    $display("first round sweep: tag check passes %0d plaintext(s) (P0=%02h, K0=%02h); core releases %0d",
             pass_tag, 8'(pass_tag_p0), k[127:120], pass_core);
    check(pass_tag == 1 && 8'(pass_tag_p0) == k[127:120], "tag check alone leaks the key byte");
    check(pass_core == 0, "core releases no ciphertext under faults");

    // ---------------- part C
    k = rand128();
    a = 8'h47;
    for (int h = 0; h < 256; h++) hist_tag[h] = 0;
    pass_tag = 0; pass_core = 0;
    n_ops = 0;
    while (n_ops < 500 || (pass_tag < 2 && n_ops < 4000)) begin
      n_ops++;
      p = rand128();
      run(p, k, a, 2, 10, 0, 1'b0, inj, xin, c, tag_saw);
      if (!tag_saw) begin
        pass_tag++;
        cref = r_aes(p, k);
        // S^-1(c0 ^ h) = 0  <=>  c0 ^ h = S(0)
        hist_tag[cref[127:120] ^ r_sbox(8'h00)]++;
      end
      if (c != 128'h0) pass_core++;
    end
    best = 0;
    for (int h = 1; h < 256; h++) if (hist_tag[h] > hist_tag[best]) best = h;
    $display("SIFA on byte 0: tag check releases %0d of %0d, best key guess %02h (count %0d), last-round key byte %02h; core releases %0d",
             pass_tag, n_ops, 8'(best), hist_tag[best], r_key10(k)[127:120], pass_core);
    check(pass_tag > 0 && 8'(best) == r_key10(k)[127:120], "tag check alone leaks the last-round key byte");
    check(pass_core == 0, "core releases no ciphertext under faults");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
