// tb_scnu: self-checking test of the serial check node unit.
//
// Feeds random sequences of 1..36 sign-magnitude messages into one SCNU, holding its state
// in testbench registers (as register array A would), and after every message compares
// min1, min2, sign product and min1 index with values computed from the whole sequence
// seen so far: min1/min2 are the two smallest magnitudes (by sorting), the index is the
// first position of the strict minimum, the sign is the parity of the negative messages.
module tb_scnu;
  localparam int Q = 4, IW = 6;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [Q-1:0]  msg;
  logic [IW-1:0] k_idx, idx_in, idx_out;
  logic [Q-2:0]  min1_in, min2_in, min1_out, min2_out;
  logic          sgn_in, sgn_out, upd;
  int checks = 0, failures = 0;

  scnu #(.Q(Q), .IW(IW)) dut (.*, .min_id_update(upd));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mags [$];
    int n, m1, m2, first_min, negs;
    for (int seq = 0; seq < 2000; seq++) begin
      n = $urandom_range(1, 36);
      mags.delete();
      negs = 0;
      min1_in = '1; min2_in = '1; sgn_in = 0; idx_in = 0;
      for (int k = 0; k < n; k++) begin
        msg   = Q'($urandom);
        if (seq < 20) msg = {msg[Q-1], Q'((k * 5 + seq) % 8) & 3'h7};  // many ties
        k_idx = IW'(k);
        #1;
        mags.push_back(int'(msg[Q-2:0]));
        negs += msg[Q-1];
        begin
          int sorted [$];
          sorted = mags;
          sorted.sort();
          m1 = sorted[0];
          m2 = (sorted.size() > 1) ? sorted[1] : 7;
          first_min = -1;
          for (int x = 0; x < mags.size(); x++)
            if (mags[x] == m1 && first_min < 0) first_min = x;
        end
        checks++;
        if (int'(min1_out) != m1 || int'(min2_out) != m2 || sgn_out != negs[0] ||
            (m1 < 7 && int'(idx_out) != first_min) || upd != (int'(msg[Q-2:0]) < int'(min1_in))) begin
          failures++;
          if (failures < 10)
            $display("mismatch seq %0d k %0d: got %0d %0d %0d %0d exp %0d %0d %0d %0d",
                     seq, k, min1_out, min2_out, sgn_out, idx_out, m1, m2, negs[0], first_min);
        end
        @(posedge clk);
        min1_in = min1_out; min2_in = min2_out; sgn_in = sgn_out; idx_in = idx_out;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
