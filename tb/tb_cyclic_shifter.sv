// tb_cyclic_shifter: self-checking test of the cyclic rotator for a power-of-two and a
// non-power-of-two lane count. Every shift amount is applied to random data and each
// output lane is compared with in[(l + sh) mod N].
module tb_cyclic_shifter;
  localparam int N1 = 16, N2 = 12, W = 5;
  logic [N1-1:0][W-1:0] in1, out1;
  logic [N2-1:0][W-1:0] in2, out2;
  logic [$clog2(N1+1)-1:0] sh1;
  logic [$clog2(N2+1)-1:0] sh2;
  int checks = 0, failures = 0;

  cyclic_shifter #(.N(N1), .W(W)) dut1 (.in(in1), .sh(sh1), .out(out1));
  cyclic_shifter #(.N(N2), .W(W)) dut2 (.in(in2), .sh(sh2), .out(out2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      for (int l = 0; l < N1; l++) in1[l] = W'($urandom);
      for (int l = 0; l < N2; l++) in2[l] = W'($urandom);
      sh1 = $bits(sh1)'(it % N1);
      sh2 = $bits(sh2)'(it % N2);
      #1;
      for (int l = 0; l < N1; l++) begin
        checks++;
        if (out1[l] != in1[(l + int'(sh1)) % N1]) failures++;
      end
      for (int l = 0; l < N2; l++) begin
        checks++;
        if (out2[l] != in2[(l + int'(sh2)) % N2]) failures++;
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
