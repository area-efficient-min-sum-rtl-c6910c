# Min-Sum decoder for high-rate QC-LDPC codes

A hard disk sector protected by an LDPC code needs a decoder that is fast (beyond 2 Gbit/s),
handles long codewords (up to 4096 bytes of user data, 36864 code bits) and costs little
silicon. The main cost of an LDPC decoder is message storage, which grows with the codeword.
This decoder reduces that cost by exploiting one property of Min-Sum decoding: every message a
check node sends has one of only two magnitudes. It never stores variable-to-check messages,
and for each check node it keeps only four numbers plus one sign bit per edge.

The RTL is a partially parallel decoder for regular QC-LDPC codes. By default it decodes the
rate-8/9, column-weight-4, row-weight-36 code with 1024 x 1024 circulants. It uses 4-bit
messages and 16 iterations, with 128 variable node units and 4 x 128 serial check node units.
In steady state it completes one 36864-bit codeword every 4608 clock cycles. That is
7.1 information bits per cycle, or about 2.1 Gbit/s at a 300 MHz clock.

## The reformulated Min-Sum algorithm

Textbook Min-Sum alternates two phases over the whole parity check matrix:

* **Check node phase.** Check node m sends variable n the product of the signs of all other
  incoming messages. The magnitude is their smallest magnitude.
* **Variable node phase.** Variable n forms `lambda = gamma + sum of its incoming betas` and
  returns `alpha = lambda - beta` on each edge.

Done literally, this needs one stored message per edge and a sorter per check node.

The decoder reorders the work. The check node side is described by a running state per check
node m:

| field  | meaning                                                        | bits at q = 4 |
|--------|----------------------------------------------------------------|---------------|
| `min1` | smallest incoming magnitude so far                             | 3             |
| `min2` | second smallest                                                | 3             |
| `S`    | XOR of all incoming signs                                      | 1             |
| `I`    | block column of the variable that supplied `min1`              | 6             |

The state is built serially. Each new message is compared with `min1` and `min2`
(module `scnu`):

* If it is below `min1`, `min2` takes the old `min1`, the message becomes `min1`, and `I`
  records its block column.
* Otherwise, if it is below `min2`, it replaces `min2`.
* In either case its sign is XORed into `S`.

Once a check node has seen all its neighbours, the message to neighbour n is:

    magnitude = (n's block column == I) ? min2 : min1
    sign      = S xor (sign of the message n itself sent)

The only per-edge data the decoder keeps is that last sign. So a variable node can be
processed, and its fresh messages folded straight into the check node states, in a single
step. Variable node processing of iteration i and check node processing for iteration i+1
run together, over the same sweep of the matrix.

## The code and how the hardware walks it

The parity check matrix is an `MB x NB` array of `P x P` circulant permutation matrices.
The defaults are 4 x 36 and P = 1024. Block (j, k) has shift `c(j,k)`: check r of block
row j is connected to variable `k*P + (r + c) mod P`. The shift table is the function
`circ_shift` in `rtl/ldpc_pkg.sv`, defined as `c(j,k) = 37*j*k mod P`. Since 37 is odd and
`|(j1-j2)(k1-k2)| <= 105`, this code has no 4-cycles for P >= 128. To decode a different
code of the same shape, replace that function. It is evaluated at elaboration and becomes a
constant table per block row.

The decoder has `S` (default 128) variable node units (VNUs) and `v = P/S` cycles per block
column. One **pass** is one sweep of the matrix. It takes `NB*v` cycles (288 at the defaults):

* In cycle (k, t), the VNUs handle variables `k*P + t*S + i` for i = 0..S-1.
* For block row j, with `c = c(j,k) = a*S + b`, these variables meet the check nodes
  `r_i = (t*S + i - c) mod P`. These are S consecutive check nodes, cyclically wrapped.
* Each block row has its own group of S serial check node units (SCNUs, module
  `cn_group`). Its check node state is stored as v rows by S lanes: check r lives in lane
  `r mod S`, row `r / S`.
* The message of VNU i therefore goes to lane `(i - b) mod S`. The group rotates the S
  messages by b (`cyclic_shifter`).
* Lane l uses row `t - a` (mod v), or `t - a - 1` for the lanes `l >= S - b` whose check
  node wrapped. Each lane has its own row address, and no two messages in a cycle reach the
  same check node.
* In the same cycle, the group reads the previous iteration's state of the same check nodes.
  It rotates that state back by -b and rebuilds the S check-to-variable messages for the
  VNUs.

At block column 0 the SCNUs start from the initial state (`min1 = min2 = 7`, `S = 0`).
Because messages saturate at 7, the value 7 acts as infinity. Every check node has exactly
one neighbour in each block column, so after the pass each state holds all NB messages.

## Check node storage: two register arrays and a sign SRAM

Each group has a storage block (`c2v_storage`) with three parts:

* **Register array A.** Holds the states being built in the current pass. It is read and
  written by the SCNUs every cycle.
* **Register array B.** Holds the finished states of the previous pass. The VNUs read it.
* **Sign SRAM** (`sign_sram`). Holds `NB*v` words of S bits. Word `k*v + t` keeps the signs
  of the messages sent in cycle (k, t). It is read one cycle early (pipeline stage 0) and
  rewritten with the new signs in stage 1.

In the last cycle of a pass, array B loads array A's next value, which includes that cycle's
update. The next pass therefore starts without a gap. This double buffering lets VNUs and
SCNUs run in every cycle.

Storage at the defaults, all four groups together:

* Arrays A and B: 2 x 4 x 1024 x 13 = 106,496 flip-flops.
* Sign SRAMs: 4 x 288 x 128 = 147,456 bits, one per edge.
* Channel message memory (CMMB, two banks): 2 x 288 x 512 = 294,912 bits.

## Passes, iterations and overlapping codewords

A codeword decoded with R iterations goes through R+1 passes:

1. **Initial pass.** The SCNUs absorb the channel messages directly (`alpha = gamma`).
   The VNUs have nothing to do for this codeword.
2. **Iterations 1 .. R-1.** VNUs and SCNUs both work on the codeword.
3. **Iteration R.** The VNUs produce the hard decisions. The check node results would be
   unused.

The controller (`decoder_ctrl`) puts the free SCNUs of iteration R to work on the next
codeword's initial pass, if that codeword is already loaded. The two codewords sit in
different CMMB banks, and the CMMB has a read port for each side. A stream of codewords
therefore costs R passes each, which is the rate in the throughput figure above. The
controller chooses one of four pass types at each pass boundary:

| pass type          | VNUs                       | SCNUs                                |
|--------------------|----------------------------|--------------------------------------|
| initial only       | idle                       | channel messages of a new codeword   |
| iteration          | codeword c, iteration i<R  | messages from the VNUs, codeword c   |
| final + initial    | codeword c, iteration R    | channel messages of codeword c+1     |
| final only         | codeword c, iteration R    | idle                                 |

Each CMMB bank is in one of three states:

* FREE: it can be loaded.
* READY: it holds a loaded codeword that has not started.
* BUSY: its codeword is being decoded.

A bank returns to FREE as soon as its codeword's last pass has issued its last CMMB read. The
next codeword must be loaded before the codeword ahead of it reaches its final iteration,
15 passes later at the defaults; otherwise the decoder runs a "final only" pass and waits.

## Number formats

* **Channel messages (gamma).** q-bit two's complement; positive means bit 0. They enter
  the VNU adder tree directly. In the initial pass they are converted to sign-magnitude,
  and -8 saturates to -7.
* **Messages between VNUs and SCNUs (alpha, beta).** q-bit sign-magnitude.
* **VNU outputs.** `alpha = lambda - beta` saturates to +-(2^(q-1)-1). `lambda` is kept at
  full width.
* **Decisions.** 1 when `lambda < 0`.

## Interface and timing (`ldpc_decoder`)

| port                          | dir | meaning |
|-------------------------------|-----|---------|
| `clk`, `rst_n`                | in  | clock; asynchronous active-low reset |
| `ld_valid`, `ld_ready`        | in/out | a word is accepted in a cycle where both are high |
| `ld_data[S][Q]`               | in  | channel messages of variables `(w/v)*P + (w%v)*S + i`, for word w = 0 .. NB*v-1 in order |
| `dec_valid`, `dec_addr`, `dec_bits[S]`, `dec_last` | out | hard decisions, same word order, one word per cycle during the final iteration, no back-pressure; `dec_last` marks the last word |
| `idle`                        | out | no codeword in flight |

Timing:

* **Latency.** A codeword that finds the decoder idle has its first decision word appear
  `R*NB*v + 4` cycles after the cycle in which its last input word is accepted.
* **Throughput.** Back-to-back codewords complete every `R*NB*v` cycles.
* **Pipeline.** Stage 0 is the control word plus the synchronous CMMB and SRAM reads.
  Stage 1 is the VNUs, SCNUs and storage writes. The decisions then pass through one output
  register.

Parameters: `Q` (4), `MB` (4), `NB` (36), `P` (1024), `S` (128), `R` (16). `P` must be a
multiple of `S`. For the 512-, 1024- and 2048-byte codes, set `P` to 128, 256 or 512.

## Modules

| file                  | content |
|-----------------------|---------|
| `rtl/ldpc_pkg.sv`        | pass-control word `ctl_t`, bank state enum, `circ_shift` |
| `rtl/ldpc_decoder.sv`    | top: controller, CMMB, S VNUs, MB check node groups, output register |
| `rtl/decoder_ctrl.sv`    | pass sequencing, pass-type choice, bank states, load handshake |
| `rtl/cmmb.sv`            | two-bank channel message memory, 1 write / 2 read ports |
| `rtl/vnu.sv`             | variable node unit |
| `rtl/cn_group.sv`        | one block row: S SCNUs, rotations, row addressing, message rebuild |
| `rtl/scnu.sv`            | serial check node unit (combinational state update) |
| `rtl/c2v_storage.sv`     | register arrays A and B, sign SRAM |
| `rtl/sign_sram.sv`       | 1R1W sign memory |
| `rtl/cyclic_shifter.sv`  | logarithmic barrel rotator, any lane count |

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`.

* **`tb_ldpc_decoder`** decodes four codewords at a reduced size (nb = 6, p = 16, s = 4,
  3 iterations):
  * Three codewords are noisy versions of the all-zero codeword. One is fully random, to
    drive saturation.
  * Hard decisions are compared bit for bit with a textbook Min-Sum decoder written in the
    testbench, which works over the whole matrix with the same quantisation.
  * It checks the latency and the back-to-back codeword period.
  * It requires every pass type, a load stall, an idle wait and the A-to-B copy to occur.
* **`tb_ldpc_decoder_full`** runs one 36864-bit codeword through the decoder at its default
  parameters against the same reference. It takes about a minute, most of it compilation.
* **`tb_cn_group`** drives one group for three passes with a shift pattern that exercises
  both lane rotation and row wrap. It checks every rebuilt message against the check node
  equations.
* The other testbenches check the SCNU, VNU, rotator, memories and controller schedule
  against independent models.

To run a testbench with Verilator 5:

    verilator --binary --timing -Wno-fatal -Wno-lint -Wno-style -Irtl -Itb \
        rtl/ldpc_pkg.sv tb/tb_ldpc_decoder.sv --top-module tb_ldpc_decoder
    ./obj_dir/Vtb_ldpc_decoder

Bit-exact agreement shows that the hardware implements Min-Sum correctly. It says nothing
about coding performance. At the reduced test size (rate 1/3, 96 bits, 3 iterations) and
with strong injected errors, Min-Sum without scaling can even add errors. That is a property
of the algorithm on so short a code, and the reference shows the same behaviour. At the real
code length, with about 0.2 % of the channel values flipped, the decoder removes most errors.

* **`tb_ldpc_decoder_512b`** runs the 512-byte code (p = 128, s = 128, so v = 1) with
  16 iterations on four codewords. It checks the same properties as the reduced test,
  including the period of 576 cycles per codeword.

## What is this design's own

The following follow the published architecture:

* the algorithm reformulation;
* the unit structures (SCNU with two comparators and an XOR sign accumulator; VNU with
  sign-magnitude/two's-complement conversion around one adder);
* s VNUs and mb groups of s SCNUs;
* register arrays A and B per group plus a sign SRAM;
* the pass length of `NB*v` cycles and the parameter values.

These are choices made here, where the source is silent:

* the circulant shifts (the source's codes are not published);
* the lane/row mapping and per-lane row addressing;
* the two-stage pipeline and the write-through A-to-B copy;
* storing `I` as a block column;
* keeping the SCNU's state registers in register array A, so one combinational SCNU serves
  v check nodes in turn;
* the two-bank CMMB, the load/decision interfaces and the overlap of consecutive codewords;
* message formats and saturation;
* reset behaviour.

Not built:

* **Early termination on a satisfied syndrome.** Decoding always runs R iterations.
* **Physical SRAM macros.** The memories are behavioural arrays that synthesis can map to
  macros.
* **Anything timing- or area-specific**, such as the 300 MHz clock and the areas quoted for
  a 65 nm library. These cannot be checked in RTL.
