// cyclic_shifter: cyclic permutation of N lanes of W-bit words.
//
// out[l] = in[(l + sh) mod N]. It realises the "p to p cyclic permutation" that connects a
// set of variable nodes with a set of check nodes of a quasi-cyclic code: since a
// circulant block maps consecutive variable nodes onto consecutive (cyclically wrapped)
// check nodes, moving s messages between s VNUs and s SCNUs is a rotation. The document
// gives the function only; this design builds a logarithmic barrel rotator, one stage per
// bit of the shift amount. N need not be a power of two: each stage rotates modulo N.
//
// Timing: combinational.
module cyclic_shifter #(
  parameter int unsigned N = 128,  // number of lanes
  parameter int unsigned W = 4     // bits per lane
) (
  input  logic [N-1:0][W-1:0]           in,
  input  logic [$clog2(N+1)-1:0]         sh,   // rotation amount, 0 .. N-1
  output logic [N-1:0][W-1:0]           out
);

  localparam int unsigned SW = $clog2(N + 1);

  logic [N-1:0][W-1:0] stage [SW+1];

  always_comb begin
    stage[0] = in;
    for (int b = 0; b < SW; b++) begin
      for (int l = 0; l < N; l++) begin
        if (sh[b]) stage[b+1][l] = stage[b][(l + ((1 << b) % N)) % N];
        else       stage[b+1][l] = stage[b][l];
      end
    end
    out = stage[SW];
  end

endmodule
