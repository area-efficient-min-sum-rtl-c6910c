// cmmb: channel message memory block.
//
// Holds the q-bit channel messages (two's complement LLRs) of two codewords in two banks,
// so that one codeword can be loaded while the other is decoded, and so that the last
// iteration of one codeword can overlap the initial check node pass of the next. Word
// k*v + t of a bank holds the s channel messages of variables k*p + t*s .. k*p + t*s + s-1.
//
// Ports: one write port (loading) and two synchronous read ports, one for the VNUs and
// one for the SCNUs' initial pass; each selects its bank. Read data appear one cycle
// after the address. The document names the channel message SRAM blocks but gives no
// organisation; the two banks and the port set are this design's choice.
module cmmb #(
  parameter int unsigned Q     = 4,
  parameter int unsigned S     = 128,
  parameter int unsigned DEPTH = 288,   // nb * p / s words per bank
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic                 wbank,
  input  logic [AW-1:0]        waddr,
  input  logic [S-1:0][Q-1:0]  wdata,
  input  logic                 re_vn,
  input  logic                 bank_vn,
  input  logic [AW-1:0]        raddr_vn,
  output logic [S-1:0][Q-1:0]  rdata_vn,
  input  logic                 re_cn,
  input  logic                 bank_cn,
  input  logic [AW-1:0]        raddr_cn,
  output logic [S-1:0][Q-1:0]  rdata_cn
);

  logic [S-1:0][Q-1:0] mem [2][DEPTH];

  always_ff @(posedge clk) begin
    if (we)    mem[wbank][waddr] <= wdata;
    if (re_vn) rdata_vn <= mem[bank_vn][raddr_vn];
    if (re_cn) rdata_cn <= mem[bank_cn][raddr_cn];
  end

endmodule
