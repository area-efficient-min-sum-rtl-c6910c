// scnu: serial check node processing unit.
//
// A check node of the Min-Sum decoder only needs four numbers to reproduce all of its
// outgoing check-to-variable messages: the smallest and second smallest magnitude of the
// incoming variable-to-check messages (min1 <= min2), the XOR of their signs (the sign
// product S) and the block column I that supplied min1. The SCNU receives the incoming
// messages one at a time and sifts them into these four values, so no sorter is needed.
//
// Per message: with m = |alpha|,
//   m <  min1 : min2 <- min1, min1 <- m, I <- k   (min_id_update = 1)
//   m >= min1 and m < min2 : min2 <- m
//   S <- S xor sign(alpha)
// The compare/select network follows the document's SCNU structure (two subtractors used
// as comparators, a 2:1 selector for min1 and a two-level selector for min2, an XOR
// accumulator for the sign). In that structure the state sits in registers next to the
// logic; here the unit is purely combinational and the state lives in register array A
// of the check-to-variable storage, one entry per check node. With v = p/s = 1 that
// entry is exactly the SCNU's register; with v > 1 the same unit serves v check nodes in
// turn. Recording the block column (rather than the full variable index) as I is this
// design's choice: each check node meets exactly one variable per block column.
//
// Messages are q-bit sign-magnitude (bit q-1 = 1 means negative). The caller supplies the
// initial state (min1 = min2 = 2^(q-1)-1, S = 0) for the first message of an iteration;
// the largest magnitude acts as +infinity because magnitudes saturate there.
//
// Timing: combinational, zero latency.
module scnu #(
  parameter int unsigned Q  = 4,  // message word length
  parameter int unsigned IW = 6   // width of the min1 block-column index
) (
  input  logic [Q-1:0]  msg,       // incoming variable-to-check message
  input  logic [IW-1:0] k_idx,     // block column of the sender
  input  logic [Q-2:0]  min1_in,
  input  logic [Q-2:0]  min2_in,
  input  logic          sgn_in,    // sign product so far (1 = negative)
  input  logic [IW-1:0] idx_in,
  output logic [Q-2:0]  min1_out,
  output logic [Q-2:0]  min2_out,
  output logic          sgn_out,
  output logic [IW-1:0] idx_out,
  output logic          min_id_update  // the message became the new minimum
);

  logic [Q-2:0] mag;
  logic [Q-1:0] d1, d2;  // one extra bit: the borrow
  logic         lt1, lt2;

  always_comb begin
    mag = msg[Q-2:0];
    // comparators realised as subtraction, the borrow giving "less than"
    d1  = {1'b0, mag} - {1'b0, min1_in};
    d2  = {1'b0, mag} - {1'b0, min2_in};
    lt1 = d1[Q-1];
    lt2 = d2[Q-1];
    min_id_update = lt1;
    min1_out = lt1 ? mag : min1_in;
    min2_out = lt1 ? min1_in : (lt2 ? mag : min2_in);
    idx_out  = lt1 ? k_idx : idx_in;
    sgn_out  = sgn_in ^ msg[Q-1];
  end

endmodule
