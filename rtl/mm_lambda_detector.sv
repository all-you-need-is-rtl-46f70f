// mm_lambda_detector: fault check of one S-box stage by the homomorphism of lambda.
//
// lambda (and its powers lambda^3, lambda^-1) is multiplicative, and the tag of a byte is
// tau = x * alpha, so lambda(tau) = lambda(x) * lambda(alpha). Each cycle with valid set the
// detector forms err = lam_d * lam_a + lam_t in shared form (lam_a is the matching constant
// computed once from alpha) and adds err into a shared 4-bit accumulator. A fault on a byte that
// is zero is not nullified here the way it is in the tag check at the end of the encryption,
// because a faulty lambda of the data no longer matches lambda of the tag.
// Nothing is unmasked and the encryption is never stopped: the accumulator is read only
// after the last S-box operation, so a fault's timing and position stay hidden.
// Accumulating by XOR is this design's choice (the document says the results are
// accumulated and kept shared, not how); two faults whose errors cancel exactly are missed.
// Timing: err is formed one cycle after the inputs (shared multiplication register), acc
// includes it one cycle later. clr empties the accumulator; it wins over an update.
module mm_lambda_detector
  import mm_pkg::*;
#(
  parameter int NS = 3
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             clr,
  input  logic                             valid,
  input  logic [NS-1:0][3:0]               lam_d,
  input  logic [NS-1:0][3:0]               lam_t,
  input  logic [NS-1:0][3:0]               lam_a,
  input  logic [n_rand(NS)-1:0][3:0]       rnd,
  output logic [NS-1:0][3:0]               acc
);

  logic [NS-1:0][3:0] prod, lam_t_q, err;
  logic valid_q;

  mm_dom_mul #(.FIELD(FLD_GF16), .W(4), .NS(NS)) u_mul (
    .clk, .x(lam_d), .y(lam_a), .rnd, .z(prod));

  always_ff @(posedge clk) lam_t_q <= lam_t;

  always_comb begin
    for (int i = 0; i < NS; i++) err[i] = (prod[i] ^ lam_t_q[i]) & {4{valid_q}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      acc     <= '0;
    end else begin
      valid_q <= valid;
      if (clr) acc <= '0;
      else     acc <= acc ^ err;
    end
  end

endmodule
