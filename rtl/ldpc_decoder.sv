// ldpc_decoder: partially parallel Min-Sum decoder for regular (mb, nb) QC-LDPC codes.
//
// The parity check matrix is an mb x nb array of p x p circulant permutation matrices
// (default 4 x 36 with p = 1024: the rate-8/9, 4096-byte-sector code). The decoder has
// s VNUs and mb groups of s SCNUs (cn_group), with v = p/s. Each cycle the VNUs process
// s consecutive variable nodes of one block column and hand their variable-to-check
// messages straight to the SCNUs, which sift them into per-check-node {min1, min2, sign
// product, index of min1}. Variable-to-check messages are therefore never stored; only
// the compressed check node state (register arrays A and B) and one sign bit per edge
// (sign SRAM) are kept. One iteration (a pass) takes nb*v cycles, and VNUs and SCNUs are
// busy concurrently: the VNUs read last iteration's state from array B while the SCNUs
// build this iteration's in array A.
//
// Pipeline: stage 0 (decoder_ctrl) issues the pass-control word and the synchronous reads
// of the CMMB and the sign SRAMs; stage 1 runs the VNUs and SCNUs and writes array A and
// the sign SRAMs; decisions are registered once more on the way out.
//
// Interface:
//   ld_valid/ld_ready/ld_data : channel messages, s q-bit two's-complement LLRs per word
//                               (positive = bit 0), nb*v words per codeword, word w holding
//                               variables (w/v)*p + (w%v)*s + i, i = 0..s-1.
//   dec_valid/dec_addr/dec_bits/dec_last : hard decisions after R iterations, same word
//                               order, one word per cycle during the last iteration;
//                               dec_last marks the codeword's last word. No back-pressure.
//   idle : nothing in flight.
// Timing: the first decision word of a codeword that finds the decoder idle appears
// R*nb*v + 4 cycles after the cycle in which its last input word is accepted (one cycle to
// start, the initial pass, R-1 iterations, two pipeline registers), and the decisions
// stream for nb*v cycles. With codewords loaded back to back, one codeword completes every
// R*nb*v cycles, giving
// (nb-mb)*s/(nb*R) information bits per clock.
//
// Parameter defaults are the document's (q = 4, column weight 4, row weight 36,
// s = 128, 16 iterations); of its four circulant sizes (128, 256, 512, 1024) the largest
// is the default. The message formats, the bank scheme of the CMMB, the overlap of
// consecutive codewords and the circulant shift values (ldpc_pkg::circ_shift) are this
// design's choices. Decoding always runs R iterations: no early stop on convergence.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned Q  = 4,     // message word length
  parameter int unsigned MB = 4,     // block rows (column weight)
  parameter int unsigned NB = 36,    // block columns (row weight)
  parameter int unsigned P  = 1024,  // circulant size
  parameter int unsigned S  = 128,   // parallelism: VNUs, SCNUs per group
  parameter int unsigned R  = 16,    // decoding iterations
  localparam int unsigned V  = P / S,
  localparam int unsigned IW = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned DEPTH = NB * V,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ld_valid,
  output logic                 ld_ready,
  input  logic [S-1:0][Q-1:0]  ld_data,
  output logic                 dec_valid,
  output logic [AW-1:0]        dec_addr,
  output logic [S-1:0]         dec_bits,
  output logic                 dec_last,
  output logic                 idle
);

  ctl_t                         ctl0, ctl1;
  logic                         ld_we, ld_bank;
  logic [AW-1:0]                ld_addr;
  logic [S-1:0][Q-1:0]          gamma_vn, gamma_cn;
  logic [MB-1:0][S-1:0][Q-1:0]  beta_g, alpha_g;   // [group][VNU]
  logic [S-1:0]                 dec_w;

  decoder_ctrl #(.NB(NB), .V(V), .R(R)) u_ctrl (
    .clk, .rst_n, .ld_valid, .ld_ready, .ld_we, .ld_bank, .ld_addr, .ctl0, .idle
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ctl1 <= '0;
    else        ctl1 <= ctl0;
  end

  cmmb #(.Q(Q), .S(S), .DEPTH(DEPTH)) u_cmmb (
    .clk      (clk),
    .we       (ld_we),
    .wbank    (ld_bank),
    .waddr    (ld_addr),
    .wdata    (ld_data),
    .re_vn    (ctl0.vn_en),
    .bank_vn  (ctl0.vn_bank),
    .raddr_vn (AW'(ctl0.addr)),
    .rdata_vn (gamma_vn),
    .re_cn    (ctl0.cn_bypass),
    .bank_cn  (ctl0.cn_bank),
    .raddr_cn (AW'(ctl0.addr)),
    .rdata_cn (gamma_cn)
  );

  for (genvar i = 0; i < S; i++) begin : g_vnu
    logic [MB-1:0][Q-1:0] beta_i, alpha_i;
    for (genvar j = 0; j < MB; j++) begin : g_edge
      assign beta_i[j]     = beta_g[j][i];
      assign alpha_g[j][i] = alpha_i[j];
    end
    vnu #(.Q(Q), .MB(MB)) u_vnu (
      .beta (beta_i), .gamma (gamma_vn[i]), .alpha (alpha_i), .decision (dec_w[i])
    );
  end

  for (genvar j = 0; j < MB; j++) begin : g_grp
    cn_group #(.Q(Q), .IW(IW), .S(S), .V(V), .NB(NB), .J(j)) u_grp (
      .clk       (clk),
      .ctl0      (ctl0),
      .ctl1      (ctl1),
      .alpha_vnu (alpha_g[j]),
      .gamma_cn  (gamma_cn),
      .beta_vnu  (beta_g[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_valid <= 1'b0;
      dec_addr  <= '0;
      dec_bits  <= '0;
      dec_last  <= 1'b0;
    end else begin
      dec_valid <= ctl1.valid && ctl1.vn_final;
      dec_addr  <= AW'(ctl1.addr);
      dec_bits  <= dec_w;
      dec_last  <= ctl1.valid && ctl1.vn_final && ctl1.last;
    end
  end

  // the parallelism must divide the circulant size
  initial assert (P % S == 0) else $error("P must be a multiple of S");

endmodule
