// tb_sign_sram: self-checking test of the 1R1W sign SRAM. Random reads and writes, with a
// shadow copy in the testbench; read data are checked one cycle after the address,
// including reads of the word written in the same cycle (old contents expected).
module tb_sign_sram;
  localparam int S = 16, DEPTH = 20, AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;
  logic re, we;
  logic [AW-1:0] raddr, waddr;
  logic [S-1:0] rdata, wdata;
  logic [S-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  sign_sram #(.S(S), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [S-1:0] expq;
    logic         pend;
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = 0; pend = 0; expq = 0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = S'($urandom); shadow[a] = wdata;
    end
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rdata !== expq) failures++;
      end
      re = $urandom_range(0, 1);
      raddr = AW'($urandom_range(0, DEPTH - 1));
      we = $urandom_range(0, 1);
      waddr = (it % 7 == 0) ? raddr : AW'($urandom_range(0, DEPTH - 1));
      wdata = S'($urandom);
      pend = re;
      if (re) expq = shadow[raddr];
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
