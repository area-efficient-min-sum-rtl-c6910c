// sign_sram: storage of the signs of the variable-to-check messages of one check node group.
//
// The Min-Sum check-to-variable message to variable n is S * s(m,n) * min, where s(m,n)
// is the sign of the message that variable n sent in the previous iteration. These signs
// (one per edge, p*nb per group) are the only per-edge data the decoder keeps. Word
// k*v + t holds the s signs written while block column k, cycle t was processed, in VNU
// order, and is read back at the same point of the next iteration.
//
// Organisation (this design's choice, the document only says "one SRAM" per group):
// DEPTH words of S bits, one synchronous read port and one write port (1R1W). A read
// returns the data one cycle after the address. The decoder reads a word in pipeline
// stage 0 and rewrites it in stage 1, so a read and a write never hit the same word in
// the same cycle; a read of the word being written would return the old contents.
module sign_sram #(
  parameter int unsigned S     = 128,  // word width (decoder parallelism)
  parameter int unsigned DEPTH = 288   // nb * p / s words
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [S-1:0]             rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [S-1:0]             wdata
);

  logic [S-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end

endmodule
