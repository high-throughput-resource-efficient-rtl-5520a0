// Self-checking testbench for memory_block: drives it as the address
// generator would, with a random permutation as write order, natural-order
// reads and sel toggling every N clocks, for several block sizes. Block b's
// words must come out permuted during block b+1, one clock after each read
// address, including across every sel swap.
module tb_memory_block;
  logic clk = 1'b0;
  logic sel;
  logic [9:0] wa, ra;
  logic [5:0] din, dout;
  int checks = 0, failures = 0, swaps = 0;

  always #5 clk = ~clk;

  memory_block dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sizes[3] = '{52, 312, 648};
    foreach (sizes[si]) begin
      int n;
      int perm[][];
      logic [5:0] data[][];
      logic [5:0] expect_q[$];
      n = sizes[si];
      perm = new[4]; data = new[4];
      for (int b = 0; b < 4; b++) begin
        perm[b] = new[n]; data[b] = new[n];
        for (int k = 0; k < n; k++) begin perm[b][k] = k; data[b][k] = 6'($urandom); end
        perm[b].shuffle();
      end
      sel = 1'b0;
      for (int t = 0; t < 4 * n + 1; t++) begin
        int b, k;
        b = t / n; k = t % n;
        // present this cycle's addresses and data
        wa  = (b < 4) ? 10'(perm[b][k]) : '0;
        din = (b < 4) ? data[b][k] : '0;
        ra  = 10'(k);
        // dout now shows the word read one clock earlier
        if (t >= n + 1) begin
          int tp, bp, kp, src;
          tp = t - 1; bp = tp / n - 1; kp = tp % n;
          src = -1;
          for (int q = 0; q < n; q++) if (perm[bp][q] == kp) src = q;
          checks++;
          if (dout != data[bp][src]) begin
            failures++;
            if (failures < 20) $display("FAIL n%0d t%0d: got %0d want %0d", n, t, dout, data[bp][src]);
          end
        end
        @(posedge clk); #1;
        if (k == n - 1) begin sel = ~sel; swaps++; end
        #1;
      end
    end
    checks++;
    if (swaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
