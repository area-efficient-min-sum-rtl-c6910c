// tb_ldpc_decoder_512b: the end-to-end test of tb_ldpc_decoder on the 512-byte code:
// rate-8/9 (4, 36)-regular, p = 128, with s = 128 (so v = 1: every SCNU serves a single
// check node) and 16 iterations. Four codewords (three noisy all-zero codewords, one
// random) are decoded: the first three back to back, the last after the decoder has gone
// idle. Decisions are compared bit for bit with the reference Min-Sum decoder; latency,
// the back-to-back period of 16*36 cycles (7.1 information bits per cycle) and every pass
// type, load stall and idle wait are checked.
module tb_ldpc_decoder_512b;
  import ldpc_pkg::*;
  localparam int Q = 4, MB = 4, NB = 36, P = 128, S = 128, R = 16;
  localparam int NCW = 4;
  localparam bit ALL_MECH = 1;       // require every pass type to occur
  localparam int V = P / S, DEPTH = NB * V, N = NB * P, AW = $clog2(DEPTH);
  localparam int WATCHDOG = 40 * R * DEPTH + 2000;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, ld_valid, ld_ready, dec_valid, dec_last, idle;
  logic [S-1:0][Q-1:0] ld_data;
  logic [AW-1:0] dec_addr;
  logic [S-1:0] dec_bits;

  ldpc_decoder #(.Q(Q), .MB(MB), .NB(NB), .P(P), .S(S), .R(R)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference Min-Sum decoder ----------------
  int gam [NCW][N];
  bit ref_bits [NCW][N];

  function automatic int sat7(int x);
    return (x > 7) ? 7 : (x < -7) ? -7 : x;
  endfunction

  task automatic reference(int cw);
    int alpha [MB][N];
    int beta  [MB][N];
    int lam   [N];
    for (int x = 0; x < N; x++)
      for (int j = 0; j < MB; j++) alpha[j][x] = sat7(gam[cw][x]);
    for (int it = 1; it <= R; it++) begin
      for (int j = 0; j < MB; j++)
        for (int r = 0; r < P; r++) begin
          int xs [NB];
          for (int k = 0; k < NB; k++) xs[k] = k * P + (r + int'(circ_shift(j, k, P))) % P;
          for (int k = 0; k < NB; k++) begin
            int neg, mn;
            neg = 0; mn = 1 << 30;
            for (int k2 = 0; k2 < NB; k2++) begin
              int m;
              if (k2 == k) continue;
              m = alpha[j][xs[k2]];
              if (m < 0) begin neg ^= 1; m = -m; end
              if (m < mn) mn = m;
            end
            beta[j][xs[k]] = neg ? -mn : mn;
          end
        end
      for (int x = 0; x < N; x++) begin
        lam[x] = gam[cw][x];
        for (int j = 0; j < MB; j++) lam[x] += beta[j][x];
        for (int j = 0; j < MB; j++) alpha[j][x] = sat7(lam[x] - beta[j][x]);
      end
    end
    for (int x = 0; x < N; x++) ref_bits[cw][x] = (lam[x] < 0);
  endtask

  // ---------------- stimulus ----------------
  int last_word_cycle [NCW];
  initial begin
    for (int cw = 0; cw < NCW; cw++) begin
      for (int x = 0; x < N; x++) begin
        if (cw == 2) gam[cw][x] = $urandom_range(0, 15) - 8;
        else gam[cw][x] = 3 + (($urandom_range(0, 999) < 2) ? -$urandom_range(4, 8)
                                                              : $urandom_range(0, 4) - 2);
        if (gam[cw][x] > 7) gam[cw][x] = 7;
        if (gam[cw][x] < -8) gam[cw][x] = -8;
      end
      reference(cw);
    end
    rst_n = 0; ld_valid = 0; ld_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int cw = 0; cw < NCW; cw++) begin
      if (cw == 3) begin
        // late arrival: wait until the decoder has gone idle
        @(negedge clk);
        while (!idle) @(negedge clk);
        repeat (5) @(negedge clk);
      end
      for (int w = 0; w < DEPTH; w++) begin
        int k, t;
        k = w / V; t = w % V;
        for (int i = 0; i < S; i++) ld_data[i] = Q'(gam[cw][k * P + t * S + i]);
        ld_valid = 1;
        @(posedge clk);
        while (!ld_ready) @(posedge clk);
        if (w == DEPTH - 1) last_word_cycle[cw] = cycle;
        @(negedge clk);
      end
      ld_valid = 0;
    end
  end

  // ---------------- response checking ----------------
  int out_cw = 0, first_dec [NCW], done_cycle [NCW];
  bit seen_first = 0;
  int in_err = 0, out_err = 0;
  always @(posedge clk) begin
    if (rst_n && dec_valid && out_cw < NCW) begin
      int k, t;
      if (!seen_first) begin first_dec[out_cw] = cycle; seen_first = 1; end
      k = int'(dec_addr) / V; t = int'(dec_addr) % V;
      for (int i = 0; i < S; i++) begin
        int x;
        x = k * P + t * S + i;
        checks++;
        if (dec_bits[i] != ref_bits[out_cw][x]) begin
          failures++;
          if (failures < 10) $display("cw %0d var %0d: got %0d expected %0d", out_cw, x, dec_bits[i], ref_bits[out_cw][x]);
        end
        if (out_cw != 2) begin
          out_err += dec_bits[i];
          in_err  += (gam[out_cw][x] < 0);
        end
      end
      if (dec_last) begin
        done_cycle[out_cw] = cycle;
        out_cw++;
        seen_first = 0;
      end
    end
  end

  // ---------------- mechanism coverage ----------------
  int n_init = 0, n_normal = 0, n_overlap = 0, n_final_only = 0, n_stall = 0, n_wait = 0, n_copy = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.ctl0.valid && dut.ctl0.k == 0 && dut.ctl0.t == 0) begin
      if (dut.ctl0.cn_bypass && !dut.ctl0.vn_en) n_init++;
      if (dut.ctl0.vn_en && dut.ctl0.cn_en && !dut.ctl0.cn_bypass) n_normal++;
      if (dut.ctl0.vn_final && dut.ctl0.cn_bypass) n_overlap++;
      if (dut.ctl0.vn_final && !dut.ctl0.cn_en) n_final_only++;
    end
    if (ld_valid && !ld_ready) n_stall++;
    if (!dut.ctl0.valid && out_cw > 0 && out_cw < NCW) n_wait++;
    if (dut.ctl1.valid && dut.ctl1.last && dut.ctl1.cn_en) n_copy++;
  end

  initial begin
    wait (out_cw == NCW);
    repeat (5) @(posedge clk);
    $display("passes: initial-only %0d, full %0d, final+initial overlap %0d, final-only %0d",
             n_init, n_normal, n_overlap, n_final_only);
    $display("load stall cycles %0d, idle wait cycles %0d, A->B copies %0d", n_stall, n_wait, n_copy);
    $display("hard-decision errors (all-zero codewords): channel %0d, decoded %0d", in_err, out_err);
    // latency of the first codeword
    checks++;
    if (first_dec[0] - last_word_cycle[0] != R * DEPTH + 4) begin
      failures++;
      $display("latency %0d, expected %0d", first_dec[0] - last_word_cycle[0], R * DEPTH + 4);
    end
    if (NCW > 1) begin
      checks++;
      if (done_cycle[1] - done_cycle[0] != R * DEPTH) begin
        failures++;
        $display("codeword period %0d, expected %0d", done_cycle[1] - done_cycle[0], R * DEPTH);
      end
    end
    checks++;
    if (n_copy == 0) failures++;
    if (ALL_MECH) begin
      checks += 6;
      if (n_init == 0)       begin failures++; $display("no initial-only pass"); end
      if (n_normal == 0)     begin failures++; $display("no full pass"); end
      if (n_overlap == 0)    begin failures++; $display("no overlapped pass"); end
      if (n_final_only == 0) begin failures++; $display("no final-only pass"); end
      if (n_stall == 0)      begin failures++; $display("no load stall"); end
      if (n_wait == 0)       begin failures++; $display("no idle wait"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
