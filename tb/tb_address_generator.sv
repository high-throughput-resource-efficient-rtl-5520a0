// Self-checking testbench for address_generator. For all eight bandwidth /
// modulation codes it resets the generator and runs three blocks, checking
// every cycle that
//   - each stream's write address equals the floor-based reference,
//   - the read address counts 0..N-1 and sel toggles exactly every N clocks,
// and records the first block's addresses so that they can be held against
// worked examples: the address tables for BPSK / 16-QAM / 64-QAM at 20 MHz
// and the first 19 (or 14) addresses of all four streams for BPSK at 20 MHz
// and 64-QAM at 40 MHz.
module tb_address_generator;
  import intlv_pkg::*;
  import intlv_ref_pkg::*;

  logic clk = 1'b0;
  logic rst;
  bw_e  bw;
  mod_e nbpscs;
  logic [3:0][9:0] wa, ra;
  logic [3:0] sel;
  int checks = 0, failures = 0, toggles = 0;
  int obs [2][4][4][648];       // [bw][mod][stream][k]

  always #5 clk = ~clk;

  address_generator dut (.*);

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
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

  // worked-example cell: stream iss, row j, column i (k = j*C + i)
  task automatic check_cell(input int b, input int m, input int iss, input int j, input int i, input int val);
    check(obs[b][m][iss-1][j * cols_of(b) + i] == val,
          $sformatf("example bw%0d mod%0d iss%0d row%0d col%0d: got %0d want %0d",
                    b, m, iss, j, i, obs[b][m][iss-1][j * cols_of(b) + i], val));
  endtask

  task automatic row(input int b, input int m, input int iss, input int j, input int cols[], input int vals[]);
    foreach (cols[x]) check_cell(b, m, iss, j, cols[x], vals[x]);
  endtask

  task automatic seq(input int b, input int m, input int iss, input int vals[]);
    foreach (vals[x])
      check(obs[b][m][iss-1][x] == vals[x],
            $sformatf("sequence bw%0d mod%0d iss%0d #%0d: got %0d want %0d", b, m, iss, x, obs[b][m][iss-1][x], vals[x]));
  endtask

  initial begin
    for (int b = 0; b < 2; b++) begin
      for (int m = 0; m < 4; m++) begin
        int n;
        logic sel_prev;
        bw = bw_e'(b); nbpscs = mod_e'(m); rst = 1'b1;
        n = n_of(b, m);
        @(posedge clk); #1 rst = 1'b0;
        sel_prev = sel[0];
        for (int t = 0; t < 3 * n; t++) begin
          int k;
          k = t % n;
          for (int s = 0; s < 4; s++) begin
            if (t < n) obs[b][m][s][k] = int'(wa[s]);
            check(int'(wa[s]) == ref_addr(b, m, s + 1, k),
                  $sformatf("wa bw%0d mod%0d iss%0d t%0d: got %0d want %0d", b, m, s + 1, t, wa[s], ref_addr(b, m, s + 1, k)));
            check(int'(ra[s]) == k, $sformatf("ra t%0d", t));
            check(sel[s] == 1'((t / n) % 2), $sformatf("sel t%0d", t));
          end
          @(posedge clk); #1;
          if (sel[0] != sel_prev) toggles++;
          sel_prev = sel[0];
        end
      end
    end
    // BPSK, 20 MHz, stream 4 (columns 0,1,2,9..12)
    row(0, 0, 4, 0, '{0, 1, 2, 9, 10, 11, 12}, '{13, 17, 21, 49, 1, 5, 9});
    row(0, 0, 4, 1, '{0, 1, 2, 9, 10, 11, 12}, '{14, 18, 22, 50, 2, 6, 10});
    row(0, 0, 4, 2, '{0, 1, 9, 10, 11, 12},    '{15, 19, 51, 3, 7, 11});
    row(0, 0, 4, 3, '{0, 1, 9, 10, 11, 12},    '{16, 20, 0, 4, 8, 12});
    // 16-QAM, 20 MHz, stream 2 (columns 0,1,2,6,7,8,12)
    row(0, 2, 2, 0,  '{0, 1, 2, 6, 7, 8, 12}, '{104, 121, 136, 200, 9, 24, 88});
    row(0, 2, 2, 1,  '{0, 1, 2, 6, 7, 8, 12}, '{105, 120, 137, 201, 8, 25, 89});
    row(0, 2, 2, 2,  '{0, 1, 2, 6, 7, 8, 12}, '{106, 123, 138, 202, 11, 26, 90});
    row(0, 2, 2, 7,  '{0, 1, 2, 6, 7, 8, 12}, '{111, 126, 143, 207, 14, 31, 95});
    row(0, 2, 2, 8,  '{0, 1, 2, 6, 7, 8, 12}, '{112, 129, 144, 0, 17, 32, 96});
    row(0, 2, 2, 9,  '{0, 1, 2, 6, 7, 8, 12}, '{113, 128, 145, 1, 16, 33, 97});
    row(0, 2, 2, 10, '{0, 1, 2, 6, 7, 8, 12}, '{114, 131, 146, 2, 19, 34, 98});
    row(0, 2, 2, 15, '{0, 1, 2, 6, 7, 8, 12}, '{119, 134, 151, 7, 22, 39, 103});
    // 64-QAM, 20 MHz, stream 3 (columns 0..6, 12)
    row(0, 3, 3, 0,  '{0, 1, 2, 3, 4, 5, 6, 12}, '{234, 260, 283, 306, 20, 43, 66, 210});
    row(0, 3, 3, 1,  '{0, 1, 2, 3, 4, 5, 6, 12}, '{235, 258, 284, 307, 18, 44, 67, 211});
    row(0, 3, 3, 2,  '{0, 1, 2, 3, 4, 5, 6, 12}, '{236, 259, 282, 308, 19, 42, 68, 212});
    row(0, 3, 3, 5,  '{0, 1, 2, 3, 4, 5, 6, 12}, '{239, 262, 285, 311, 22, 45, 71, 215});
    row(0, 3, 3, 6,  '{0, 1, 2, 3, 4, 5, 6, 12}, '{240, 266, 289, 0, 26, 49, 72, 216});
    row(0, 3, 3, 7,  '{0, 1, 2, 3, 4, 5, 6, 12}, '{241, 264, 290, 1, 24, 50, 73, 217});
    row(0, 3, 3, 8,  '{0, 1, 2, 3, 4, 5, 6, 12}, '{242, 265, 288, 2, 25, 48, 74, 218});
    row(0, 3, 3, 23, '{0, 1, 2, 3, 4, 5, 6, 12}, '{257, 280, 303, 17, 40, 63, 89, 233});
    // address sequences, BPSK at 20 MHz
    seq(0, 0, 1, '{0, 4, 8, 12, 16, 20, 24, 28, 32, 36, 40, 44, 48, 1});
    seq(0, 0, 2, '{26, 30, 34, 38, 42, 46, 50, 2, 6, 10, 14, 18, 22, 27});
    seq(0, 0, 3, '{39, 43, 47, 51, 3, 7, 11, 15, 19, 23, 27, 31, 35, 40});
    seq(0, 0, 4, '{13, 17, 21, 25, 29, 33, 37, 41, 45, 49, 1, 5, 9, 14});
    // address sequences, 64-QAM at 40 MHz
    seq(1, 3, 1, '{0, 38, 73, 108, 146, 181, 216, 254, 289, 324, 362, 397, 432, 470, 505, 540, 578, 613, 1});
    seq(1, 3, 2, '{300, 338, 373, 408, 446, 481, 516, 554, 589, 624, 14, 49, 84, 122, 157, 192, 230, 265, 301});
    seq(1, 3, 3, '{474, 512, 547, 582, 620, 7, 42, 80, 115, 150, 188, 223, 258, 296, 331, 366, 404, 439, 475});
    seq(1, 3, 4, '{126, 164, 199, 234, 272, 307, 342, 380, 415, 450, 488, 523, 558, 596, 631, 18, 56, 91, 127});
    check(toggles == 8 * 3, $sformatf("sel toggles %0d", toggles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
