// cn_group: one group of s serial check node units with its message storage block.
//
// The decoder has mb such groups, one per block row of the parity check matrix; group J
// owns the p check nodes of block row J. In every cycle of a pass the s VNUs deliver one
// variable-to-check message each for block column k, variables k*p + t*s + i
// (i = 0..s-1). Through circulant (J,k) with shift c = a*s + b these reach the s
// cyclically consecutive check nodes r_i = (t*s + i - c) mod p, which sit in lanes
// (i - b) mod s. The group therefore
//   * rotates the messages by b (cyclic_shifter) so that lane l receives the message of
//     VNU (l + b) mod s, and addresses each lane's row: t - a, or t - a - 1 for the lanes
//     l >= s - b that wrapped (all modulo v);
//   * lets each lane's SCNU fold the message into that check node's state in register
//     array A (at block column 0 the SCNU starts from the initial state instead);
//   * writes the s message signs into the sign SRAM, in VNU order, at word k*v + t;
//   * at the same time reads the previous iteration's state of the same check nodes from
//     register array B, rotates it back by -b and rebuilds the check-to-variable message
//     of each VNU: magnitude min2 if the VNU's block column is the stored index I, min1
//     otherwise; sign S xor the stored sign of that VNU's previous message.
// In the initial pass of a codeword (cn_bypass) the SCNUs absorb the channel messages,
// converted to sign-magnitude and saturated, instead of the VNU outputs.
//
// Timing: stage-0 control (ctl0) only issues the sign SRAM read; all other work uses the
// stage-1 control word (ctl1). beta_vnu is combinational from ctl1 and the storage;
// array A, the sign SRAM and (on the pass's last cycle) array B update at the clock edge.
// The grouping and data flow follow the document; the lane/row mapping is this design's.
module cn_group
  import ldpc_pkg::*;
#(
  parameter int unsigned Q  = 4,
  parameter int unsigned IW = 6,
  parameter int unsigned S  = 128,
  parameter int unsigned V  = 8,
  parameter int unsigned NB = 36,
  parameter int unsigned J  = 0,     // block row handled by this group
  localparam int unsigned P  = S * V,
  localparam int unsigned SW = 2 * (Q - 1) + 1 + IW,
  localparam int unsigned RW = (V > 1) ? $clog2(V) : 1,
  localparam int unsigned DEPTH = NB * V,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned HW = $clog2(S + 1)
) (
  input  logic               clk,
  input  ctl_t               ctl0,
  input  ctl_t               ctl1,
  input  logic [S-1:0][Q-1:0] alpha_vnu,  // variable-to-check messages, VNU order
  input  logic [S-1:0][Q-1:0] gamma_cn,   // channel messages (two's complement), bypass pass
  output logic [S-1:0][Q-1:0] beta_vnu    // check-to-variable messages, VNU order
);

  localparam logic [Q-2:0] MAXM = '1;

  // circulant shifts of this block row, split into row offset a and lane rotation b
  logic [HW-1:0] rot_b  [NB];
  logic [RW-1:0] row_a  [NB];
  always_comb begin
    for (int k = 0; k < NB; k++) begin
      rot_b[k] = HW'(circ_shift(J, k, P) % S);
      row_a[k] = RW'(circ_shift(J, k, P) / S);
    end
  end

  logic [HW-1:0]         b_sh, b_inv;
  logic [S-1:0][RW-1:0]  row;
  logic [S-1:0][Q-1:0]   alpha_in, alpha_lane;
  logic [S-1:0][SW-1:0]  a_rdata, a_wdata, b_rdata, b_vnu;
  logic [S-1:0]          s_rdata, s_wdata;
  logic                  a_we;
  logic [IW-1:0]         kk;

  assign kk = ctl1.k[IW-1:0];

  always_comb begin
    int x;
    b_sh  = rot_b[kk];
    b_inv = (b_sh == '0) ? '0 : HW'(S) - b_sh;
    for (int l = 0; l < S; l++) begin
      x = int'(ctl1.t) - int'(row_a[kk]) - ((l >= S - int'(b_sh)) ? 1 : 0);
      if (x < 0) x = x + int'(V);
      if (x < 0) x = x + int'(V);
      row[l] = RW'(x);
    end
  end

  // message source: VNU outputs, or channel messages in a codeword's initial pass
  always_comb begin
    for (int i = 0; i < S; i++) begin
      if (!ctl1.cn_bypass)
        alpha_in[i] = alpha_vnu[i];
      else if (gamma_cn[i][Q-1])
        alpha_in[i] = {1'b1, (gamma_cn[i] == {1'b1, {(Q-1){1'b0}}}) ? MAXM
                                                                   : (Q-1)'(-gamma_cn[i])};
      else
        alpha_in[i] = gamma_cn[i];
      s_wdata[i] = alpha_in[i][Q-1];
    end
  end

  cyclic_shifter #(.N(S), .W(Q)) u_fwd (
    .in (alpha_in), .sh (b_sh), .out (alpha_lane)
  );

  for (genvar l = 0; l < S; l++) begin : g_scnu
    logic [Q-2:0]  min1_in, min2_in, min1_out, min2_out;
    logic          sgn_in, sgn_out, upd;
    logic [IW-1:0] idx_in, idx_out;
    always_comb begin
      if (ctl1.k == '0) begin
        min1_in = MAXM;
        min2_in = MAXM;
        sgn_in  = 1'b0;
        idx_in  = '0;
      end else begin
        {min1_in, min2_in, sgn_in, idx_in} = a_rdata[l];
      end
    end
    scnu #(.Q(Q), .IW(IW)) u_scnu (
      .msg (alpha_lane[l]), .k_idx (ctl1.k[IW-1:0]),
      .min1_in, .min2_in, .sgn_in, .idx_in,
      .min1_out, .min2_out, .sgn_out, .idx_out,
      .min_id_update (upd)
    );
    assign a_wdata[l] = {min1_out, min2_out, sgn_out, idx_out};
  end

  assign a_we = ctl1.valid && ctl1.cn_en;

  c2v_storage #(.Q(Q), .IW(IW), .S(S), .V(V), .NB(NB)) u_store (
    .clk     (clk),
    .a_row   (row),
    .a_rdata (a_rdata),
    .a_we    (a_we),
    .a_wdata (a_wdata),
    .copy    (a_we && ctl1.last),
    .b_row   (row),
    .b_rdata (b_rdata),
    .s_re    (ctl0.valid && ctl0.vn_en),
    .s_raddr (AW'(ctl0.addr)),
    .s_rdata (s_rdata),
    .s_we    (a_we),
    .s_waddr (AW'(ctl1.addr)),
    .s_wdata (s_wdata)
  );

  cyclic_shifter #(.N(S), .W(SW)) u_bwd (
    .in (b_rdata), .sh (b_inv), .out (b_vnu)
  );

  // rebuild the check-to-variable messages from the compressed state
  always_comb begin
    for (int i = 0; i < S; i++) begin
      logic [Q-2:0]  m1, m2;
      logic          sg;
      logic [IW-1:0] id;
      {m1, m2, sg, id} = b_vnu[i];
      beta_vnu[i] = {sg ^ s_rdata[i], (id == ctl1.k[IW-1:0]) ? m2 : m1};
    end
  end

endmodule
