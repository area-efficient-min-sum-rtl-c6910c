// tb_decoder_ctrl: self-checking test of the decoding schedule.
//
// nb = 3, v = 2, R = 3. Three codewords are offered back to back through the load
// handshake. Expected schedule, one pass of nb*v = 6 cycles each, with no gap:
//   0 initial pass of cw0 (bank 0)           1, 2  iterations 1, 2 of cw0
//   3 final iteration of cw0 + initial cw1    4, 5  iterations 1, 2 of cw1 (bank 1)
//   6 final iteration of cw1 + initial cw2    7, 8  iterations 1, 2 of cw2 (bank 0)
//   9 final iteration of cw2 alone
// Checked: the flags and banks of every pass, the (k, t, addr) walk inside each pass, the
// last flag, the load addresses and banks, the stall of the third load until bank 0 is
// released (ready again exactly one cycle after pass 3's last stage-0 cycle) and the
// return to idle.
module tb_decoder_ctrl;
  import ldpc_pkg::*;
  localparam int NB = 3, V = 2, R = 3, DEPTH = NB * V, AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, ld_valid, ld_ready, ld_we, ld_bank, idle;
  logic [AW-1:0] ld_addr;
  ctl_t ctl0;
  int checks = 0, failures = 0;

  decoder_ctrl #(.NB(NB), .V(V), .R(R)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("%0t: %s", $time, what);
    end
  endtask

  // expected pass table: vn_en, vn_final, vn_bank, cn_en, cn_bypass, cn_bank
  typedef struct { bit vn; bit fin; bit vb; bit cn; bit byp; bit cb; } pass_t;
  localparam int NP = 10;
  pass_t exp_pass [NP] = '{
    '{0, 0, 0, 1, 1, 0}, '{1, 0, 0, 1, 0, 0}, '{1, 0, 0, 1, 0, 0},
    '{1, 1, 0, 1, 1, 1}, '{1, 0, 1, 1, 0, 1}, '{1, 0, 1, 1, 0, 1},
    '{1, 1, 1, 1, 1, 0}, '{1, 0, 0, 1, 0, 0}, '{1, 0, 0, 1, 0, 0},
    '{1, 1, 0, 0, 0, 0}};

  // loader: three codewords, back to back
  int words = 0;
  initial begin
    rst_n = 0; ld_valid = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    ld_valid = 1;
    while (words < 3 * DEPTH) begin
      @(posedge clk);
      if (ld_ready) begin
        chk(ld_we, "ld_we missing");
        chk(int'(ld_addr) == words % DEPTH, "load address");
        chk(ld_bank == ((words / DEPTH) % 2), "load bank");
        words++;
      end
    end
    @(negedge clk) ld_valid = 0;
  end

  // monitor
  int pass_no = -1, cyc_in_pass = 0, cycle = 0, p3_last = -1, ready_back = -1, stall = 0;
  bit started = 0;
  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (ctl0.valid) begin
      if (ctl0.k == 0 && ctl0.t == 0) begin
        pass_no++;
        cyc_in_pass = 0;
        started = 1;
        if (pass_no < NP) begin
          pass_t e;
          e = exp_pass[pass_no];
          chk(ctl0.vn_en == e.vn && ctl0.vn_final == e.fin && ctl0.cn_en == e.cn &&
              ctl0.cn_bypass == e.byp, $sformatf("pass %0d flags", pass_no));
          if (e.vn) chk(ctl0.vn_bank == e.vb, $sformatf("pass %0d vn bank", pass_no));
          if (e.byp) chk(ctl0.cn_bank == e.cb, $sformatf("pass %0d cn bank", pass_no));
        end
      end
      chk(int'(ctl0.k) == cyc_in_pass / V && int'(ctl0.t) == cyc_in_pass % V &&
          int'(ctl0.addr) == cyc_in_pass, "k/t/addr walk");
      chk(ctl0.last == (cyc_in_pass == DEPTH - 1), "last flag");
      if (pass_no == 3 && ctl0.last) p3_last = cycle;
      cyc_in_pass++;
    end else if (started && pass_no < NP - 1) begin
      chk(0, "gap between passes");
    end
    if (ld_valid && !ld_ready) stall++;
    if (ld_valid && ld_ready && p3_last >= 0 && ready_back < 0 && stall > 0) ready_back = cycle;
  end

  initial begin
    wait (pass_no == NP - 1 && cyc_in_pass == DEPTH);
    repeat (4) @(posedge clk);
    chk(pass_no == NP - 1, "number of passes");
    chk(idle, "idle at the end");
    chk(!ctl0.valid, "no pass after the last codeword");
    chk(stall > 0, "third load stalled");
    chk(ready_back == p3_last + 1, $sformatf("bank release: ready at %0d, pass 3 ended %0d", ready_back, p3_last));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
