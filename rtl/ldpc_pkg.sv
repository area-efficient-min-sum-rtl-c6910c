// ldpc_pkg: constants, the pass-control word and the code definition shared by the
// partially parallel QC-LDPC Min-Sum decoder.
//
// The decoder processes one block column of the parity check matrix (p variable nodes)
// in v = p/s clock cycles, s variable nodes per cycle. Every cycle is described by one
// pass-control word (ctl_t) that the controller issues in pipeline stage 0 and that is
// registered into stage 1, where the variable node units (VNUs) and serial check node
// units (SCNUs) do their work. The field widths of ctl_t are fixed upper bounds
// (up to 256 block columns and 65536 cycles per block column), chosen so that the word
// can be shared by modules of any legal parameter set.
//
// The parity check matrix is an mb x nb array of p x p circulant permutation matrices.
// Block (j,k) has a single 1 per row: row r of block row j is connected to variable
// k*p + ((r + c(j,k)) mod p). The document does not list the shift values c(j,k) of its
// codes; this design uses c(j,k) = (37*j*k) mod p (circ_shift below). For p >= 128 and
// the document's 4 x 36 base matrix this code has no 4-cycles, because 37 is odd and
// |(j1-j2)(k1-k2)| <= 105 < p. To decode another code, change circ_shift.
package ldpc_pkg;

  localparam int unsigned K_W = 8;   // block-column index width
  localparam int unsigned T_W = 16;  // cycle-within-block-column and word-address width

  // Pass-control word: one per clock cycle of a decoding pass.
  typedef struct packed {
    logic           valid;     // this cycle belongs to a pass
    logic [K_W-1:0] k;         // block column being processed
    logic [T_W-1:0] t;         // cycle within the block column (0 .. v-1)
    logic [T_W-1:0] addr;      // word address k*v + t (CMMB and sign SRAM)
    logic           last;      // last cycle of the pass
    logic           vn_en;     // VNUs work on a codeword (iteration >= 1)
    logic           vn_final;  // this is the codeword's last iteration: emit decisions
    logic           vn_bank;   // CMMB bank of the codeword seen by the VNUs
    logic           cn_en;     // SCNUs absorb messages in this pass
    logic           cn_bypass; // SCNUs absorb channel messages (initial pass of a codeword)
    logic           cn_bank;   // CMMB bank feeding the SCNUs when cn_bypass is set
  } ctl_t;

  // State of one channel-message bank.
  typedef enum logic [1:0] {
    BANK_FREE  = 2'd0,  // may be loaded
    BANK_READY = 2'd1,  // holds a complete codeword that has not started
    BANK_BUSY  = 2'd2   // codeword being decoded
  } bank_st_t;

  // Circulant shift of block (j,k) for circulant size p.
  function automatic int unsigned circ_shift(int unsigned j, int unsigned k, int unsigned p);
    return (37 * j * k) % p;
  endfunction

endpackage
