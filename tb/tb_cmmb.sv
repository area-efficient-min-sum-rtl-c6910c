// tb_cmmb: self-checking test of the two-bank channel message memory. Fills both banks
// with random words, then reads random addresses of random banks on both read ports at
// once and checks the data one cycle later against a shadow copy.
module tb_cmmb;
  localparam int Q = 4, S = 8, DEPTH = 12, AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, wbank, re_vn, bank_vn, re_cn, bank_cn;
  logic [AW-1:0] waddr, raddr_vn, raddr_cn;
  logic [S-1:0][Q-1:0] wdata, rdata_vn, rdata_cn, e_vn, e_cn;
  logic [S-1:0][Q-1:0] shadow [2][DEPTH];
  int checks = 0, failures = 0;

  cmmb #(.Q(Q), .S(S), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re_vn = 0; re_cn = 0; bank_vn = 0; bank_cn = 0; raddr_vn = 0; raddr_cn = 0;
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        we = 1; wbank = b[0]; waddr = AW'(a);
        for (int i = 0; i < S; i++) wdata[i] = Q'($urandom);
        shadow[b][a] = wdata;
      end
    @(negedge clk);
    we = 0;
    for (int it = 0; it < 500; it++) begin
      re_vn = 1; re_cn = 1;
      bank_vn = $urandom_range(0, 1); bank_cn = $urandom_range(0, 1);
      raddr_vn = AW'($urandom_range(0, DEPTH - 1)); raddr_cn = AW'($urandom_range(0, DEPTH - 1));
      e_vn = shadow[bank_vn][raddr_vn]; e_cn = shadow[bank_cn][raddr_cn];
      @(negedge clk);
      checks += 2;
      if (rdata_vn !== e_vn) failures++;
      if (rdata_cn !== e_cn) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
