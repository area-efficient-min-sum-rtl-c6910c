// tb_cn_group: self-checking test of one check node group (s SCNUs, permutations,
// register arrays A/B and sign SRAM) at s = 4, v = 3 (p = 12), nb = 6, block row 3,
// whose circulant shifts 3k mod 12 exercise both the lane rotation and the row wrap.
//
// Three passes are driven through the stage-0/stage-1 control words:
//   1. initial pass: random two's-complement channel messages enter through the bypass;
//   2. full pass: random variable-to-check messages stand in for the VNU outputs, while
//      the check-to-variable messages built from pass 1 are checked;
//   3. VNU-only pass: the messages built from pass 2 are checked.
// The expected check-to-variable message of variable x in block column k is computed
// directly from the code: its check node is r = (x - c(k)) mod p, and the message is the
// sign product and minimum magnitude of all other messages that reached r.
module tb_cn_group;
  import ldpc_pkg::*;
  localparam int Q = 4, IW = 3, S = 4, V = 3, NB = 6, J = 3, P = S * V;
  logic clk = 0;
  always #5 clk = ~clk;
  ctl_t ctl0, ctl1;
  logic [S-1:0][Q-1:0] alpha_vnu, gamma_cn, beta_vnu;
  int checks = 0, failures = 0;
  int msgs [3][NB][P];     // message values per pass, as signed integers

  cn_group #(.Q(Q), .IW(IW), .S(S), .V(V), .NB(NB), .J(J)) dut (.*);

  always_ff @(posedge clk) ctl1 <= ctl0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sm2i(logic [Q-1:0] x);
    return x[Q-1] ? -int'(x[Q-2:0]) : int'(x[Q-2:0]);
  endfunction

  function automatic logic [Q-1:0] i2sm(int x);
    return (x < 0) ? {1'b1, (Q-1)'(-x)} : {1'b0, (Q-1)'(x)};
  endfunction

  // expected check-to-variable message for variable x of block column k, from pass ps
  function automatic int exp_beta(int ps, int k, int x);
    int r, neg, mn;
    r = (x - int'(circ_shift(J, k, P)) + P) % P;
    neg = 0; mn = 7;
    for (int k2 = 0; k2 < NB; k2++) begin
      int x2, m;
      if (k2 == k) continue;
      x2 = (r + int'(circ_shift(J, k2, P))) % P;
      m = msgs[ps][k2][x2];
      if (m < 0) begin neg ^= 1; m = -m; end
      if (m < mn) mn = m;
    end
    return neg ? -mn : mn;
  endfunction

  task automatic run_pass(int ps, bit vn, bit cn, bit bypass);
    for (int k = 0; k < NB; k++)
      for (int t = 0; t < V; t++) begin
        ctl0 = '0;
        ctl0.valid = 1; ctl0.k = K_W'(k); ctl0.t = T_W'(t); ctl0.addr = T_W'(k * V + t);
        ctl0.last = (k == NB - 1 && t == V - 1);
        ctl0.vn_en = vn; ctl0.cn_en = cn; ctl0.cn_bypass = bypass;
        @(posedge clk);
        #1;
        // stage 1 of cycle (k,t): drive messages, check betas
        for (int i = 0; i < S; i++) begin
          int g, a;
          g = $urandom_range(0, 15) - 8;
          gamma_cn[i] = Q'(g);
          a = $urandom_range(0, 14) - 7;
          alpha_vnu[i] = i2sm(a);
          if (bypass) msgs[ps][k][t * S + i] = (g < -7) ? -7 : g;
          else if (cn) msgs[ps][k][t * S + i] = a;
        end
        #1;
        if (vn)
          for (int i = 0; i < S; i++) begin
            int e;
            e = exp_beta(ps - 1, k, t * S + i);
            checks++;
            if (sm2i(beta_vnu[i]) != e) begin
              failures++;
              if (failures < 10) $display("pass %0d k %0d t %0d i %0d: beta %0d expected %0d",
                                          ps, k, t, i, sm2i(beta_vnu[i]), e);
            end
          end
        @(negedge clk);
        ctl0 = '0;
      end
  endtask

  initial begin
    ctl0 = '0; alpha_vnu = '0; gamma_cn = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    // ctl0 is set at negedge, stage 1 is the following cycle; run_pass handles the offset
    fork
      begin
        run_pass(0, 0, 1, 1);
        run_pass(1, 1, 1, 0);
        run_pass(2, 1, 0, 0);
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
