// decoder_ctrl: decoding schedule and memory access control.
//
// Decoding proceeds in passes of nb*v clock cycles. A pass walks the block columns
// k = 0..nb-1 and, within each, the cycles t = 0..v-1, issuing one pass-control word
// (ctl_t) per cycle in pipeline stage 0. In a pass the VNUs process every variable node
// once, using the check node state completed in the previous pass, while the SCNUs build
// the check node state for the next pass from the messages the VNUs send them.
// A codeword decoded with R iterations takes R+1 passes:
//   initial pass   : the SCNUs absorb the channel messages (cn_bypass), the VNUs are idle
//                    or finish the previous codeword;
//   iterations 1..R-1 : VNUs and SCNUs both work on the codeword;
//   iteration R    : the VNUs produce the hard decisions (vn_final); the SCNUs are free
//                    and start the next codeword's initial pass if one is loaded.
// Because the last iteration of one codeword overlaps the initial pass of the next, a
// steady stream of codewords completes one every R*nb*v cycles, the rate of the
// document's throughput formula. The overlap and the bank handshake are this design's
// own; the pass structure follows the document's decoding schedule.
//
// Loading: channel messages arrive as words of s messages (ld_valid/ld_ready handshake,
// a word moves when both are high), nb*v words per codeword in word-address order, into
// the CMMB bank ld_bank. A bank is FREE, READY (loaded, waiting) or BUSY (decoding); it
// returns to FREE when the stage-0 part of its final iteration has issued its last read.
//
// Timing: ctl0 is combinational from registers; a new pass starts in the cycle after the
// previous one's last stage-0 cycle, or in the cycle after a bank becomes READY.
module decoder_ctrl
  import ldpc_pkg::*;
#(
  parameter int unsigned NB = 36,
  parameter int unsigned V  = 8,
  parameter int unsigned R  = 16,   // decoding iterations
  localparam int unsigned DEPTH = NB * V,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // load handshake
  input  logic           ld_valid,
  output logic           ld_ready,
  output logic           ld_we,
  output logic           ld_bank,
  output logic [AW-1:0]  ld_addr,
  // stage-0 control word
  output ctl_t           ctl0,
  output logic           idle     // no pass running and no codeword in flight
);

  bank_st_t        bank_st [2];
  logic            ld_ptr, dec_ptr;
  logic [AW-1:0]   ld_cnt;

  // pass registers
  logic            active;
  logic [K_W-1:0]  k;
  logic [T_W-1:0]  t;
  logic            vn_en, vn_final, vn_bank, cn_en, cn_bypass, cn_bank;
  // codeword whose check node state is (or will be at the end of this pass) in array B
  logic            have_cur, cur_bank;
  logic [7:0]      cur_iter;   // the VNU iteration that state feeds

  logic            last;
  // next-pass decision
  logic            n_go, n_vn_en, n_vn_final, n_cn_en, n_cn_bypass, n_cn_bank, n_start;

  assign last = active && (k == K_W'(NB - 1)) && (t == T_W'(V - 1));

  always_comb begin
    ctl0           = '0;
    ctl0.valid     = active;
    ctl0.k         = k;
    ctl0.t         = t;
    ctl0.addr      = T_W'(k) * T_W'(V) + t;
    ctl0.last      = last;
    ctl0.vn_en     = active && vn_en;
    ctl0.vn_final  = active && vn_final;
    ctl0.vn_bank   = vn_bank;
    ctl0.cn_en     = active && cn_en;
    ctl0.cn_bypass = active && cn_bypass;
    ctl0.cn_bank   = cn_bank;
  end

  always_comb begin
    n_vn_en     = have_cur;
    n_vn_final  = have_cur && (cur_iter == 8'(R));
    n_start     = 1'b0;
    n_cn_en     = 1'b0;
    n_cn_bypass = 1'b0;
    n_cn_bank   = cur_bank;
    if (have_cur && cur_iter != 8'(R)) begin
      n_cn_en = 1'b1;
    end else if (bank_st[dec_ptr] == BANK_READY) begin
      n_start     = 1'b1;
      n_cn_en     = 1'b1;
      n_cn_bypass = 1'b1;
      n_cn_bank   = dec_ptr;
    end
    n_go = n_vn_en || n_cn_en;
  end

  assign ld_ready = (bank_st[ld_ptr] == BANK_FREE);
  assign ld_we    = ld_valid && ld_ready;
  assign ld_bank  = ld_ptr;
  assign ld_addr  = ld_cnt;
  assign idle     = !active && !have_cur && bank_st[0] != BANK_BUSY && bank_st[1] != BANK_BUSY;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank_st[0] <= BANK_FREE;
      bank_st[1] <= BANK_FREE;
      ld_ptr     <= 1'b0;
      dec_ptr    <= 1'b0;
      ld_cnt     <= '0;
      active     <= 1'b0;
      k          <= '0;
      t          <= '0;
      vn_en      <= 1'b0;
      vn_final   <= 1'b0;
      vn_bank    <= 1'b0;
      cn_en      <= 1'b0;
      cn_bypass  <= 1'b0;
      cn_bank    <= 1'b0;
      have_cur   <= 1'b0;
      cur_bank   <= 1'b0;
      cur_iter   <= '0;
    end else begin
      // loading
      if (ld_we) begin
        if (ld_cnt == AW'(DEPTH - 1)) begin
          ld_cnt           <= '0;
          bank_st[ld_ptr]  <= BANK_READY;
          ld_ptr           <= !ld_ptr;
        end else begin
          ld_cnt <= ld_cnt + 1'b1;
        end
      end
      // release the bank of a codeword whose final iteration has issued its last read
      if (last && vn_final) bank_st[vn_bank] <= BANK_FREE;
      // pass sequencing
      if (!active || last) begin
        active    <= n_go;
        k         <= '0;
        t         <= '0;
        vn_en     <= n_vn_en;
        vn_final  <= n_vn_final;
        vn_bank   <= cur_bank;
        cn_en     <= n_cn_en;
        cn_bypass <= n_cn_bypass;
        cn_bank   <= n_cn_bank;
        if (n_go) begin
          have_cur <= n_cn_en;
          cur_bank <= n_cn_bank;
          cur_iter <= n_cn_bypass ? 8'd1 : cur_iter + 8'd1;
        end
        if (n_start) begin
          bank_st[dec_ptr] <= BANK_BUSY;
          dec_ptr          <= !dec_ptr;
        end
      end else if (t == T_W'(V - 1)) begin
        t <= '0;
        k <= k + 1'b1;
      end else begin
        t <= t + 1'b1;
      end
    end
  end

  // a VNU pass always works on a codeword that holds a bank
  a_vn_bank_busy: assert property (@(posedge clk) disable iff (!rst_n)
    ctl0.vn_en |-> bank_st[ctl0.vn_bank] == BANK_BUSY);
  // loading never writes into a bank that is in use
  a_ld_free: assert property (@(posedge clk) disable iff (!rst_n)
    ld_we |-> bank_st[ld_bank] == BANK_FREE);

endmodule
