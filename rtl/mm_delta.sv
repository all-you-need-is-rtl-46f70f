// mm_delta: shared Kronecker delta, one shared bit that is 1 exactly when the input is 0.
//
// The N shared input bits are inverted (on share 0 only) and reduced by a balanced tree of
// shared AND gates (mm_dom_mul over GF(2)). Level l pairs neighbouring bits; an odd bit left
// over is registered so that every level is one cycle. The result is one bit in NS shares, so
// the size of a fault and its position are never recombined. Reducing a vector to a single
// shared bit by a delta function follows the document; the AND tree is this design's way of
// computing it.
// Timing: y is valid LEVELS = clog2(N) cycles after x. rnd: (N-1) x n_rand(NS) bits (one
// group per AND gate), fresh every cycle.
module mm_delta
  import mm_pkg::*;
#(
  parameter int NS = 3,
  parameter int N  = 140
) (
  input  logic                                 clk,
  input  logic [N-1:0][NS-1:0]                 x,
  input  logic [N-1:0][n_rand(NS)-1:0]         rnd,
  output logic [NS-1:0]                        y
);

  localparam int LEVELS = $clog2(N);

  // number of bits at level l
  function automatic int cnt(input int l);
    int c;
    c = N;
    for (int k = 0; k < l; k++) c = (c + 1) / 2;
    return c;
  endfunction

  // first AND gate of level l, used to pick its random bits
  function automatic int gate_off(input int l);
    int o, c;
    o = 0;
    c = N;
    for (int k = 0; k < l; k++) begin
      o += c / 2;
      c = (c + 1) / 2;
    end
    return o;
  endfunction

  logic [LEVELS:0][N-1:0][NS-1:0] lvl;

  always_comb begin
    lvl[0] = x;
    for (int j = 0; j < N; j++) lvl[0][j][0] = ~x[j][0];
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int C = cnt(l);
    for (genvar p = 0; p < C / 2; p++) begin : g_and
      mm_dom_mul #(.FIELD(FLD_GF2), .W(1), .NS(NS)) u_and (
        .clk, .x(lvl[l][2*p]), .y(lvl[l][2*p+1]), .rnd(rnd[gate_off(l) + p]),
        .z(lvl[l+1][p]));
    end
    if (C % 2 == 1) begin : g_odd
      logic [NS-1:0] odd_q;
      always_ff @(posedge clk) odd_q <= lvl[l][C-1];
      assign lvl[l+1][C/2] = odd_q;
    end
    for (genvar q = (C + 1) / 2; q < N; q++) begin : g_pad
      assign lvl[l+1][q] = '0;
    end
  end

  assign y = lvl[LEVELS][0];

  // the last random group is not used (N-1 gates)
  logic unused_rnd;
  assign unused_rnd = ^rnd[N-1];

endmodule
