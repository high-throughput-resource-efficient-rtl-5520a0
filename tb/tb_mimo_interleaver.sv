// End-to-end testbench for mimo_interleaver at its default parameters.
//
// For every bandwidth / modulation setting (eight mode switches, each made
// with a reset, as the design expects) it streams four blocks of random
// 6-bit words into all four spatial streams and checks that block b leaves
// each stream in interleaved order, out[n] = in[k] where n is the reference
// (floor-based) address of k, starting exactly N+1 clocks after the block's
// first word. Mechanisms are counted and each must occur at least once:
// mode switches, ping-pong swaps of the memory halves, read-counter wraps,
// row wraps (with column carry) and column wraps of the rotated write
// address, and use of each of the three write-address generators.
module tb_mimo_interleaver;
  import intlv_ref_pkg::*;

  localparam int BLOCKS = 4;

  logic clk = 1'b0;
  logic rst;
  logic bw;
  logic [1:0] nbpscs;
  logic [23:0] din;
  logic [3:0][5:0] dout;
  logic [3:0][9:0] int_add;
  logic [9:0] rd_add;
  logic [3:0] sel;

  int checks = 0, failures = 0;
  int n_mode = 0, n_swap = 0, n_rdwrap = 0, n_rowwrap = 0, n_colwrap = 0;
  int n_bq = 0, n_q16 = 0, n_q64 = 0;

  always #5 clk = ~clk;

  mimo_interleaver dut (.*);

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  // mechanism counters, sampled every clock
  always @(posedge clk) if (!rst) begin
    if (dut.u_agen.rd_last) n_rdwrap++;
    if (!dut.u_agen.g_stream[1].u_wa.j_lt) n_rowwrap++;
    if (!dut.u_agen.g_stream[1].u_wa.i_lt) n_colwrap++;
  end
  always @(sel[0]) n_swap++;

  initial begin
    int cfg_bw[8]  = '{0, 0, 0, 0, 1, 1, 1, 1};
    int cfg_mod[8] = '{0, 1, 2, 3, 3, 2, 1, 0};
    rst = 1'b1; bw = 1'b0; nbpscs = 2'b00; din = '0;
    foreach (cfg_bw[ci]) begin
      int b, m, n;
      logic [5:0] data [BLOCKS][4][648];
      int inv [4][648];
      b = cfg_bw[ci]; m = cfg_mod[ci]; n = n_of(b, m);
      for (int s = 0; s < 4; s++)
        for (int k = 0; k < n; k++) inv[s][ref_addr(b, m, s + 1, k)] = k;
      for (int blk = 0; blk < BLOCKS; blk++)
        for (int s = 0; s < 4; s++)
          for (int k = 0; k < n; k++) data[blk][s][k] = 6'($urandom);
      // mode switch: new BW / modulation with a reset
      rst = 1'b1; bw = 1'(b); nbpscs = 2'(m);
      repeat (2) @(posedge clk);
      #1 rst = 1'b0;
      n_mode++;
      if (m < 2) n_bq++; else if (m == 2) n_q16++; else n_q64++;
      // cycle t: present word t of the input, check the output of cycle t
      for (int t = 0; t < (BLOCKS + 1) * n + 1; t++) begin
        int blk_in, blk_out, pos;
        blk_in = t / n;
        for (int s = 0; s < 4; s++)
          din[s*6 +: 6] = (blk_in < BLOCKS) ? data[blk_in][s][t % n] : 6'd0;
        if (t >= n + 1) begin
          blk_out = (t - 1) / n - 1;
          pos = (t - 1) % n;
          for (int s = 0; s < 4; s++)
            check(dout[s] == data[blk_out][s][inv[s][pos]],
                  $sformatf("bw%0d mod%0d stream%0d block%0d out#%0d: got %0d want %0d",
                            b, m, s + 1, blk_out, pos, dout[s], data[blk_out][s][inv[s][pos]]));
        end
        @(posedge clk); #1;
      end
    end
    check(n_mode  > 0, "no mode switch");
    check(n_swap  > 0, "no ping-pong swap");
    check(n_rdwrap > 0, "no read-counter wrap");
    check(n_rowwrap > 0, "no row wrap");
    check(n_colwrap > 0, "no column wrap");
    check(n_bq > 0 && n_q16 > 0 && n_q64 > 0, "a write-address generator was never used");
    $display("mechanisms: mode switches %0d, swaps %0d, read wraps %0d, row wraps %0d, column wraps %0d, bpsk/qpsk %0d, 16qam %0d, 64qam %0d",
             n_mode, n_swap, n_rdwrap, n_rowwrap, n_colwrap, n_bq, n_q16, n_q64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
