// vnu: variable node processing unit.
//
// Computes, for one variable node, the posterior LLR
//   lambda = gamma + sum_j beta_j
// from the channel message gamma and the MB check-to-variable messages beta_j, the
// outgoing variable-to-check messages alpha_j = lambda - beta_j, and the hard decision
// sign(lambda). The structure follows the document's VNU: each beta is converted from
// sign-magnitude to two's complement, one adder tree forms lambda, MB subtractors form
// the alphas and each alpha is converted back to sign-magnitude.
//
// Formats (this design's choice where the document only gives the word length q):
//   beta, alpha : q-bit sign-magnitude, bit q-1 = 1 means negative, magnitude q-1 bits.
//   gamma       : q-bit two's complement (it enters the adder tree unconverted).
//   alpha saturates to +-(2^(q-1)-1); lambda is kept at full width.
//   decision    : 1 when lambda < 0, else 0.
//
// Timing: combinational, zero latency.
module vnu #(
  parameter int unsigned Q  = 4,  // message word length
  parameter int unsigned MB = 4   // column weight (number of block rows)
) (
  input  logic [MB-1:0][Q-1:0] beta,     // check-to-variable messages
  input  logic [Q-1:0]         gamma,    // channel message
  output logic [MB-1:0][Q-1:0] alpha,    // variable-to-check messages
  output logic                 decision  // hard decision bit
);

  localparam int unsigned LW = Q + $clog2(MB + 1) + 1;  // lambda width
  localparam int signed   MAXM = (1 << (Q - 1)) - 1;

  logic signed [LW-1:0] b2c [MB];
  logic signed [LW-1:0] lambda;
  logic signed [LW-1:0] diff;

  always_comb begin
    lambda = LW'($signed(gamma));
    for (int j = 0; j < MB; j++) begin
      b2c[j] = beta[j][Q-1] ? -LW'(beta[j][Q-2:0]) : LW'(beta[j][Q-2:0]);
      lambda = lambda + b2c[j];
    end
    for (int j = 0; j < MB; j++) begin
      diff = lambda - b2c[j];
      if (diff > LW'(MAXM))        alpha[j] = {1'b0, (Q-1)'(MAXM)};
      else if (diff < -LW'(MAXM))  alpha[j] = {1'b1, (Q-1)'(MAXM)};
      else if (diff < 0)           alpha[j] = {1'b1, (Q-1)'(-diff)};
      else                         alpha[j] = {1'b0, (Q-1)'(diff)};
    end
    decision = lambda[LW-1];
  end

endmodule
