// tb_c2v_storage: self-checking test of the check-to-variable storage block.
//
// Random per-lane row addresses and write data go into register array A; now and then a
// copy into array B is requested in the same cycle as a write. A shadow model of both
// arrays checks the combinational read data of A and B every cycle, so the copy is
// verified to include the write of its own cycle. The sign SRAM port is exercised too.
module tb_c2v_storage;
  localparam int Q = 4, IW = 3, S = 4, V = 3, NB = 5;
  localparam int SW = 2 * (Q - 1) + 1 + IW, RW = 2, DEPTH = NB * V, AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;
  logic [S-1:0][RW-1:0] a_row, b_row;
  logic [S-1:0][SW-1:0] a_rdata, a_wdata, b_rdata;
  logic a_we, copy, s_re, s_we;
  logic [AW-1:0] s_raddr, s_waddr;
  logic [S-1:0] s_rdata, s_wdata;
  logic [SW-1:0] sa [V][S], sb [V][S];
  logic [S-1:0] ss [DEPTH];
  int checks = 0, failures = 0;

  c2v_storage #(.Q(Q), .IW(IW), .S(S), .V(V), .NB(NB)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [S-1:0] es;
    logic pend;
    pend = 0; es = 0;
    // initialise both arrays and the SRAM through the ports
    s_re = 0; s_raddr = 0;
    for (int r = 0; r < V; r++) begin
      @(negedge clk);
      for (int l = 0; l < S; l++) begin a_row[l] = RW'(r); a_wdata[l] = SW'($urandom); sa[r][l] = a_wdata[l]; end
      a_we = 1; copy = 0; s_we = 0; b_row = a_row; s_waddr = 0; s_wdata = 0;
    end
    @(negedge clk);
    a_we = 0; copy = 1;
    for (int r = 0; r < V; r++) for (int l = 0; l < S; l++) sb[r][l] = sa[r][l];
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      copy = 0; s_we = 1; s_waddr = AW'(a); s_wdata = S'($urandom); ss[a] = s_wdata;
    end
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      // check what the previous cycle set up
      for (int l = 0; l < S; l++) begin
        checks += 2;
        if (a_rdata[l] !== sa[a_row[l]][l]) failures++;
        if (b_rdata[l] !== sb[b_row[l]][l]) failures++;
      end
      if (pend) begin checks++; if (s_rdata !== es) failures++; end
      // new stimulus
      for (int l = 0; l < S; l++) begin
        a_row[l] = RW'($urandom_range(0, V - 1));
        b_row[l] = RW'($urandom_range(0, V - 1));
        a_wdata[l] = SW'($urandom);
      end
      a_we = $urandom_range(0, 1);
      copy = ($urandom_range(0, 9) == 0);
      s_re = $urandom_range(0, 1); s_raddr = AW'($urandom_range(0, DEPTH - 1));
      s_we = $urandom_range(0, 1); s_waddr = AW'($urandom_range(0, DEPTH - 1)); s_wdata = S'($urandom);
      #1;
      for (int l = 0; l < S; l++) begin
        checks++;
        if (a_rdata[l] !== sa[a_row[l]][l]) failures++;
      end
      pend = s_re;
      if (s_re) es = ss[s_raddr];
      if (s_we) ss[s_waddr] = s_wdata;
      if (a_we) for (int l = 0; l < S; l++) sa[a_row[l]][l] = a_wdata[l];
      if (copy) for (int r = 0; r < V; r++) for (int l = 0; l < S; l++) sb[r][l] = sa[r][l];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
