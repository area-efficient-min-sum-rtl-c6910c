// c2v_storage: check-to-variable message storage block of one check node group.
//
// Holds everything the decoder keeps about the messages of one block row (p check nodes):
//   register array A : the state {min1, min2, S, I} of every check node while the SCNUs
//                      of the current iteration are still updating it;
//   register array B : the completed state of the previous iteration, read by the VNUs;
//   sign SRAM        : the sign of every variable-to-check message (sign_sram).
// When a pass ends, array A holds the finished state and is copied into array B in the
// same clock edge that writes A's last update (copy sees A's next value), so the VNUs of
// the following pass read complete data in its very first cycle. This double buffering is
// what lets check node and variable node processing run concurrently.
//
// Both arrays are organised as V rows by S lanes; lane l holds the check nodes r with
// r mod S = l, row r / S. Each lane has its own row address because one cycle touches s
// cyclically consecutive check nodes that may wrap into the next row. Reads of A and B
// are combinational (registers); writes happen at the clock edge. A state word is packed
// {min1[Q-2:0], min2[Q-2:0], S, I[IW-1:0]}. The arrays are not reset: every entry is
// written in a pass before it is read. The two-array structure and the sign SRAM follow
// the document; the row/lane organisation and the write-through copy are this design's.
module c2v_storage #(
  parameter int unsigned Q  = 4,
  parameter int unsigned IW = 6,
  parameter int unsigned S  = 128,   // lanes (SCNUs per group)
  parameter int unsigned V  = 8,     // rows, p / s
  parameter int unsigned NB = 36,    // block columns (sets the sign SRAM depth)
  localparam int unsigned SW = 2 * (Q - 1) + 1 + IW,
  localparam int unsigned RW = (V > 1) ? $clog2(V) : 1,
  localparam int unsigned DEPTH = NB * V,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                    clk,
  // register array A
  input  logic [S-1:0][RW-1:0]    a_row,
  output logic [S-1:0][SW-1:0]    a_rdata,
  input  logic                    a_we,
  input  logic [S-1:0][SW-1:0]    a_wdata,
  input  logic                    copy,     // A (including this cycle's write) -> B
  // register array B
  input  logic [S-1:0][RW-1:0]    b_row,
  output logic [S-1:0][SW-1:0]    b_rdata,
  // sign SRAM
  input  logic                    s_re,
  input  logic [AW-1:0]           s_raddr,
  output logic [S-1:0]            s_rdata,
  input  logic                    s_we,
  input  logic [AW-1:0]           s_waddr,
  input  logic [S-1:0]            s_wdata
);

  logic [SW-1:0] arr_a [V][S];
  logic [SW-1:0] arr_b [V][S];

  always_comb begin
    for (int l = 0; l < S; l++) begin
      a_rdata[l] = arr_a[a_row[l]][l];
      b_rdata[l] = arr_b[b_row[l]][l];
    end
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < S; l++) begin
      if (a_we) arr_a[a_row[l]][l] <= a_wdata[l];
      if (copy)
        for (int r = 0; r < V; r++)
          arr_b[r][l] <= (a_we && a_row[l] == RW'(r)) ? a_wdata[l] : arr_a[r][l];
    end
  end

  sign_sram #(.S(S), .DEPTH(DEPTH)) u_sram (
    .clk   (clk),
    .re    (s_re),
    .raddr (s_raddr),
    .rdata (s_rdata),
    .we    (s_we),
    .waddr (s_waddr),
    .wdata (s_wdata)
  );

endmodule
