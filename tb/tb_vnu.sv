// tb_vnu: self-checking test of the variable node unit.
//
// Drives random sign-magnitude check-to-variable messages and two's-complement channel
// messages, plus the extreme corners, and compares each variable-to-check message
// (lambda - beta_j, saturated to +-7, sign-magnitude) and the decision with integer
// arithmetic done in the testbench.
module tb_vnu;
  localparam int Q = 4, MB = 4;
  logic [MB-1:0][Q-1:0] beta, alpha;
  logic [Q-1:0] gamma;
  logic decision;
  int checks = 0, failures = 0;

  vnu #(.Q(Q), .MB(MB)) dut (.*);

  function automatic int sm2i(logic [Q-1:0] x);
    return x[Q-1] ? -int'(x[Q-2:0]) : int'(x[Q-2:0]);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lam, b [MB], d;
    for (int it = 0; it < 20000; it++) begin
      for (int j = 0; j < MB; j++) beta[j] = Q'($urandom);
      gamma = Q'($urandom);
      if (it == 0) begin beta = '1; gamma = 4'b1000; end      // most negative
      if (it == 1) begin beta = {MB{4'b0111}}; gamma = 4'b0111; end  // most positive
      #1;
      lam = int'($signed(gamma));
      for (int j = 0; j < MB; j++) begin b[j] = sm2i(beta[j]); lam += b[j]; end
      for (int j = 0; j < MB; j++) begin
        d = lam - b[j];
        if (d > 7) d = 7;
        if (d < -7) d = -7;
        checks++;
        if (sm2i(alpha[j]) != d || (d == 0 && alpha[j][Q-1])) begin
          failures++;
          if (failures < 10) $display("alpha mismatch it %0d j %0d: %0d vs %0d", it, j, sm2i(alpha[j]), d);
        end
      end
      checks++;
      if (decision != (lam < 0)) failures++;
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
