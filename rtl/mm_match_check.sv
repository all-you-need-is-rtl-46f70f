// mm_match_check: final tag comparison of the ciphertext, e_i = alpha * c_i + tau_i.
//
// After the last round each ciphertext byte c_i must still satisfy tau_i = alpha * c_i.
// The unit recomputes alpha * c_i with one shared multiplication per byte and adds the stored
// tag. All NB bytes are checked in parallel; e stays in NS shares and is zero for every byte
// exactly when no fault reached the ciphertext or its tags.
// Timing: e is registered, so it is valid two cycles after c, tau and alpha (the document's
// latency for this unit). rnd: NB x n_rand(NS) bytes, fresh when c is sampled.
module mm_match_check
  import mm_pkg::*;
#(
  parameter int NS = 3,
  parameter int NB = 16
) (
  input  logic                                      clk,
  input  logic [NB-1:0][NS-1:0][7:0]                c,
  input  logic [NB-1:0][NS-1:0][7:0]                tau,
  input  logic [NS-1:0][7:0]                        alpha,
  input  logic [NB-1:0][n_rand(NS)-1:0][7:0]        rnd,
  output logic [NB-1:0][NS-1:0][7:0]                e
);

  logic [NB-1:0][NS-1:0][7:0] prod, tau_q;

  for (genvar b = 0; b < NB; b++) begin : g_byte
    mm_dom_mul #(.FIELD(FLD_GF256), .W(8), .NS(NS)) u_mul (
      .clk, .x(alpha), .y(c[b]), .rnd(rnd[b]), .z(prod[b]));
  end

  always_ff @(posedge clk) begin
    tau_q <= tau;
    e     <= prod ^ tau_q;
  end

endmodule
