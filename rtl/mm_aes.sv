// mm_aes: AES-128 encryption protected by masks and MACs, with lambda detection.
//
// Every value is held in NS Boolean shares (NS = 3 gives second-order masking). Next to each
// data byte x the core carries its MAC tag tau = alpha * x in GF(2^8), also shared, where alpha
// is a secret, non-zero tag key supplied (shared) with every encryption. Linear steps
// (AddRoundKey, ShiftRows, MixColumns, the key schedule XORs) are applied to data and tags
// alike, share by share; the round constant enters the tags as rcon * alpha. The one S-box
// (mm_sbox) is time-shared by the state and the key schedule and processes data and tag in
// two independent six-stage paths.
//
// Fault detection has three parts, none of which ever unmasks anything or stops the core:
//   * lambda detectors on S-box stages 2, 3 and 4 (mm_lambda_detector), which compare
//     lambda(data) * lambda(alpha) with lambda(tag). They catch faults that the final tag check
//     cannot see: with an S-box input of zero a fault in stages 2 to 4 is multiplied by zero
//     in stage 5 and vanishes from both data and tag.
//   * the match check after the last round, e_i = alpha * c_i + tau_i (mm_match_check);
//   * a shared Kronecker delta over all e_i and the three detector accumulators (mm_delta),
//     giving one shared bit that is 1 only if everything is zero.
// The ciphertext shares are multiplied (shared AND) by that bit, so the output is the correct
// ciphertext, or zero after a detected fault, still in shares.
//
// Schedule (this design's own; the document gives only the total latency of its version):
//   IDLE   start latches pt, key and alpha shares and clears the detectors.
//   SETUP  5 cycles: tags of plaintext and key (one shared multiplication per byte), the
//          stage-6 constants gamma_k (mm_tag_keygen), and alpha is sent through the S-box once
//          (not marked valid) to capture lambda(alpha), lambda(alpha)^3 and lambda(alpha)^-1
//          for the detectors. The state becomes pt + k0 with tags.
//   ROUND  27 cycles per round: state bytes 0..15 and then the rotated last key word (bytes
//          13, 14, 15, 12) enter the S-box one per cycle; results come back 6 cycles later;
//          one cycle then applies ShiftRows, MixColumns (not in round 10), the next round key
//          and AddRoundKey.
//   CHECK  match check (2 cycles), delta (clog2(128+12) = 8 cycles), output gating (1 cycle).
// done pulses for one cycle with ct valid; ct holds until the next encryption ends. A
// complete encryption takes 1 + 5 + 10*27 + 12 = 288 cycles from the cycle start is sampled
// to the cycle done is high.
//
// Byte order: byte b of a 128-bit value is bits [127-8b -: 8] (FIPS-197 order, column-major
// state). rnd must be fresh, uniform random bits every cycle; its width is rnd_width(NS)
// from mm_pkg (2496 bits for NS = 3).
module mm_aes
  import mm_pkg::*;
#(
  parameter int NS = 3
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [NS-1:0][127:0]          pt,
  input  logic [NS-1:0][127:0]          key,
  input  logic [NS-1:0][7:0]            alpha,
  input  logic [rnd_width(NS)-1:0]      rnd,
  output logic                          busy,
  output logic                          done,
  output logic [NS-1:0][127:0]          ct
);

  localparam int NR       = n_rand(NS);
  localparam int N_CHK    = 128 + 12;
  localparam int DELTA_LV = $clog2(N_CHK);
  localparam int DONE_CNT = 3 + DELTA_LV;

  // random bus slices, one per consumer
  localparam int SBD_W  = 5 * NR * 4;
  localparam int SB6_W  = 8 * NR * 8;
  localparam int DET_W  = NR * 4;
  localparam int TAG_W  = 16 * NR * 8;
  localparam int KG_W   = 8 * NR * 8;
  localparam int MC_W   = 16 * NR * 8;
  localparam int DL_W   = N_CHK * NR;
  localparam int OFF_SBT = SBD_W;
  localparam int OFF_SB6 = 2 * SBD_W;
  localparam int OFF_DET = OFF_SB6 + SB6_W;
  localparam int OFF_TGP = OFF_DET + 3 * DET_W;
  localparam int OFF_TGK = OFF_TGP + TAG_W;
  localparam int OFF_KG  = OFF_TGK + TAG_W;
  localparam int OFF_MC  = OFF_KG + KG_W;
  localparam int OFF_DL  = OFF_MC + MC_W;
  localparam int OFF_GT  = OFF_DL + DL_W;

  typedef enum logic [1:0] {ST_IDLE, ST_SETUP, ST_ROUND, ST_CHECK} state_e;
  typedef logic [15:0][NS-1:0][7:0] blk_t;   // 16 shared bytes

  state_e state_q;
  logic [4:0] cnt_q;
  logic [4:0] oidx_q;
  logic [3:0] round_q;
  logic [7:0] rcon_q;

  blk_t st_d, st_t, rk_d, rk_t;
  logic [3:0][NS-1:0][7:0] ks_d, ks_t;
  logic [NS-1:0][7:0] alpha_q;
  logic [7:0][NS-1:0][7:0] gamma_q, gamma_w;
  logic [NS-1:0][3:0] lam_a2_q, lam_a3_q, lam_a4_q;
  logic [15:0][NS-1:0][7:0] ct_q;

  // ---------------------------------------------------------------- helpers
  function automatic blk_t to_blk(input logic [NS-1:0][127:0] v);
    blk_t r;
    for (int b = 0; b < 16; b++)
      for (int i = 0; i < NS; i++) r[b][i] = v[i][127-8*b -: 8];
    return r;
  endfunction

  function automatic blk_t shift_rows(input blk_t s);
    blk_t r;
    for (int c = 0; c < 4; c++)
      for (int rw = 0; rw < 4; rw++) r[c*4+rw] = s[((c + rw) % 4)*4 + rw];
    return r;
  endfunction

  // MixColumns is GF(2^8)-linear, so it applies to each share and to tags unchanged
  function automatic blk_t mix_columns(input blk_t s);
    blk_t r;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++)
      for (int i = 0; i < NS; i++) begin
        a0 = s[c*4][i]; a1 = s[c*4+1][i]; a2 = s[c*4+2][i]; a3 = s[c*4+3][i];
        r[c*4][i]   = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
        r[c*4+1][i] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
        r[c*4+2][i] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
        r[c*4+3][i] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
      end
    return r;
  endfunction

  function automatic blk_t blk_xor(input blk_t a, input blk_t b);
    blk_t r;
    for (int k = 0; k < 16; k++) r[k] = a[k] ^ b[k];
    return r;
  endfunction

  // next round key; sub = SubWord(RotWord(w3)), cadd = constant added to byte 0 (all shares)
  function automatic blk_t next_key(input blk_t k, input logic [3:0][NS-1:0][7:0] sub,
                                    input logic [NS-1:0][7:0] cadd);
    blk_t r;
    for (int rw = 0; rw < 4; rw++) r[rw] = k[rw] ^ sub[rw] ^ ((rw == 0) ? cadd : '0);
    for (int c = 1; c < 4; c++)
      for (int rw = 0; rw < 4; rw++) r[c*4+rw] = k[c*4+rw] ^ r[(c-1)*4+rw];
    return r;
  endfunction

  // ---------------------------------------------------------------- input tags
  blk_t tag_p, tag_k;
  for (genvar b = 0; b < 16; b++) begin : g_intag
    mm_dom_mul #(.FIELD(FLD_GF256), .W(8), .NS(NS)) u_tp (
      .clk, .x(alpha_q), .y(st_d[b]), .rnd(rnd[OFF_TGP + b*NR*8 +: NR*8]), .z(tag_p[b]));
    mm_dom_mul #(.FIELD(FLD_GF256), .W(8), .NS(NS)) u_tk (
      .clk, .x(alpha_q), .y(rk_d[b]), .rnd(rnd[OFF_TGK + b*NR*8 +: NR*8]), .z(tag_k[b]));
  end

  mm_tag_keygen #(.NS(NS)) u_keygen (
    .clk, .alpha(alpha_q), .rnd(rnd[OFF_KG +: KG_W]), .gamma(gamma_w));

  // ---------------------------------------------------------------- S-box and detectors
  logic sb_vin, sb_vout, sb_v2, sb_v3, sb_v4;
  logic [NS-1:0][7:0] sb_din, sb_tin, sb_dout, sb_tout;
  logic [NS-1:0][3:0] l2d, l2t, l3d, l3t, l4d, l4t;
  logic [NS-1:0][3:0] acc2, acc3, acc4;
  logic det_clr;

  always_comb begin
    sb_vin = 1'b0;
    sb_din = alpha_q;
    sb_tin = alpha_q;
    if (state_q == ST_ROUND && cnt_q < 5'd20) begin
      sb_vin = 1'b1;
      if (cnt_q < 5'd16) begin
        sb_din = st_d[cnt_q[3:0]];
        sb_tin = st_t[cnt_q[3:0]];
      end else begin
        sb_din = rk_d[{2'b11, 2'(cnt_q[1:0] + 2'd1)}];
        sb_tin = rk_t[{2'b11, 2'(cnt_q[1:0] + 2'd1)}];
      end
    end
  end

  mm_sbox #(.NS(NS)) u_sbox (
    .clk, .rst_n, .valid_in(sb_vin), .d_in(sb_din), .t_in(sb_tin), .alpha(alpha_q),
    .gamma(gamma_q),
    .rnd_d(rnd[0 +: SBD_W]), .rnd_t(rnd[OFF_SBT +: SBD_W]), .rnd_6(rnd[OFF_SB6 +: SB6_W]),
    .valid_out(sb_vout), .d_out(sb_dout), .t_out(sb_tout),
    .v2(sb_v2), .v3(sb_v3), .v4(sb_v4),
    .lam2_d(l2d), .lam2_t(l2t), .lam3_d(l3d), .lam3_t(l3t), .lam4_d(l4d), .lam4_t(l4t));

  assign det_clr = (state_q == ST_IDLE) && start;

  mm_lambda_detector #(.NS(NS)) u_det2 (
    .clk, .rst_n, .clr(det_clr), .valid(sb_v2), .lam_d(l2d), .lam_t(l2t), .lam_a(lam_a2_q),
    .rnd(rnd[OFF_DET +: DET_W]), .acc(acc2));
  mm_lambda_detector #(.NS(NS)) u_det3 (
    .clk, .rst_n, .clr(det_clr), .valid(sb_v3), .lam_d(l3d), .lam_t(l3t), .lam_a(lam_a3_q),
    .rnd(rnd[OFF_DET + DET_W +: DET_W]), .acc(acc3));
  mm_lambda_detector #(.NS(NS)) u_det4 (
    .clk, .rst_n, .clr(det_clr), .valid(sb_v4), .lam_d(l4d), .lam_t(l4t), .lam_a(lam_a4_q),
    .rnd(rnd[OFF_DET + 2*DET_W +: DET_W]), .acc(acc4));

  // ---------------------------------------------------------------- final checks
  logic [15:0][NS-1:0][7:0] e;
  logic [N_CHK-1:0][NS-1:0] chk_bits;
  logic [NS-1:0] delta;
  logic [15:0][NS-1:0][7:0] delta_rep, gated;

  mm_match_check #(.NS(NS), .NB(16)) u_match (
    .clk, .c(st_d), .tau(st_t), .alpha(alpha_q), .rnd(rnd[OFF_MC +: MC_W]), .e(e));

  always_comb begin
    for (int b = 0; b < 16; b++)
      for (int j = 0; j < 8; j++)
        for (int i = 0; i < NS; i++) chk_bits[b*8+j][i] = e[b][i][j];
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < NS; i++) begin
        chk_bits[128+j][i] = acc2[i][j];
        chk_bits[132+j][i] = acc3[i][j];
        chk_bits[136+j][i] = acc4[i][j];
      end
  end

  mm_delta #(.NS(NS), .N(N_CHK)) u_delta (
    .clk, .x(chk_bits), .rnd(rnd[OFF_DL +: DL_W]), .y(delta));

  always_comb begin
    for (int b = 0; b < 16; b++)
      for (int i = 0; i < NS; i++) delta_rep[b][i] = {8{delta[i]}};
  end

  for (genvar b = 0; b < 16; b++) begin : g_gate
    mm_dom_mul #(.FIELD(FLD_GF2), .W(8), .NS(NS)) u_gate (
      .clk, .x(st_d[b]), .y(delta_rep[b]), .rnd(rnd[OFF_GT + b*NR*8 +: NR*8]), .z(gated[b]));
  end

  // ---------------------------------------------------------------- control
  logic [NS-1:0][7:0] rcon_tag;
  logic [NS-1:0][7:0] rcon_dat;
  blk_t rk_d_next, rk_t_next, sr_d, sr_t;

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      rcon_tag[i] = gf256_mul(rcon_q, alpha_q[i]);
      rcon_dat[i] = (i == 0) ? rcon_q : 8'h00;
    end
    rk_d_next = next_key(rk_d, ks_d, rcon_dat);
    rk_t_next = next_key(rk_t, ks_t, rcon_tag);
    sr_d = shift_rows(st_d);
    sr_t = shift_rows(st_t);
    if (round_q != 4'd10) begin
      sr_d = mix_columns(sr_d);
      sr_t = mix_columns(sr_t);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      cnt_q   <= '0;
      oidx_q  <= '0;
      round_q <= '0;
      rcon_q  <= 8'h01;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        ST_IDLE: if (start) begin
          state_q <= ST_SETUP;
          cnt_q   <= '0;
        end
        ST_SETUP: begin
          cnt_q <= cnt_q + 5'd1;
          if (cnt_q == 5'd4) begin
            state_q <= ST_ROUND;
            cnt_q   <= '0;
            oidx_q  <= '0;
            round_q <= 4'd1;
            rcon_q  <= 8'h01;
          end
        end
        ST_ROUND: begin
          cnt_q <= cnt_q + 5'd1;
          if (sb_vout) oidx_q <= oidx_q + 5'd1;
          if (oidx_q == 5'd20) begin
            cnt_q   <= '0;
            oidx_q  <= '0;
            round_q <= round_q + 4'd1;
            rcon_q  <= xtime(rcon_q);
            if (round_q == 4'd10) state_q <= ST_CHECK;
          end
        end
        ST_CHECK: begin
          cnt_q <= cnt_q + 5'd1;
          if (cnt_q == 5'(DONE_CNT)) begin
            state_q <= ST_IDLE;
            done    <= 1'b1;
          end
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  // datapath registers (no reset: all are loaded before they are read)
  always_ff @(posedge clk) begin
    unique case (state_q)
      ST_IDLE: if (start) begin
        st_d    <= to_blk(pt);
        rk_d    <= to_blk(key);
        alpha_q <= alpha;
      end
      ST_SETUP: begin
        if (cnt_q == 5'd1) begin
          st_d    <= blk_xor(st_d, rk_d);
          st_t    <= blk_xor(tag_p, tag_k);
          rk_t    <= tag_k;
          gamma_q <= gamma_w;
        end
        if (cnt_q == 5'd2) lam_a2_q <= l2d;
        if (cnt_q == 5'd3) lam_a3_q <= l3d;
        if (cnt_q == 5'd4) lam_a4_q <= l4d;
      end
      ST_ROUND: begin
        if (sb_vout) begin
          if (oidx_q < 5'd16) begin
            st_d[oidx_q[3:0]] <= sb_dout;
            st_t[oidx_q[3:0]] <= sb_tout;
          end else begin
            ks_d[oidx_q[1:0]] <= sb_dout;
            ks_t[oidx_q[1:0]] <= sb_tout;
          end
        end
        if (oidx_q == 5'd20) begin
          rk_d <= rk_d_next;
          rk_t <= rk_t_next;
          st_d <= blk_xor(sr_d, rk_d_next);
          st_t <= blk_xor(sr_t, rk_t_next);
        end
      end
      ST_CHECK: if (cnt_q == 5'(DONE_CNT)) ct_q <= gated;
      default: ;
    endcase
  end

  always_comb begin
    for (int b = 0; b < 16; b++)
      for (int i = 0; i < NS; i++) ct[i][127-8*b -: 8] = ct_q[b][i];
  end

  assign busy = (state_q != ST_IDLE);

  // the S-box returns results only while a round is running, and never more than 20 per round
  a_sbox_out_in_round: assert property (@(posedge clk) disable iff (!rst_n)
    sb_vout |-> (state_q == ST_ROUND && oidx_q < 5'd20));

endmodule
