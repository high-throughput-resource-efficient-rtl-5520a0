// Self-checking testbench for ra_gen: for all eight codes, checks that the
// read address counts 0..N-1 and wraps to 0 with no gap for three blocks,
// that "last" is high exactly at N-1, and that the period is N clocks.
module tb_ra_gen;
  import intlv_pkg::*;
  import intlv_ref_pkg::*;

  logic clk = 1'b0;
  logic rst;
  bw_e  bw;
  mod_e nbpscs;
  logic [9:0] ra;
  logic last;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ra_gen dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++) begin
      for (int m = 0; m < 4; m++) begin
        int n, last_cycles[$];
        bw = bw_e'(b); nbpscs = mod_e'(m); rst = 1'b1;
        n = n_of(b, m);
        last_cycles.delete();
        @(posedge clk); #1 rst = 1'b0;
        for (int t = 0; t < 3 * n; t++) begin
          checks++;
          if (int'(ra) != t % n || last != (t % n == n - 1)) begin
            failures++;
            if (failures < 20) $display("FAIL bw%0d mod%0d t%0d ra=%0d last=%0d", b, m, t, ra, last);
          end
          if (last) last_cycles.push_back(t);
          @(posedge clk); #1;
        end
        checks++;
        if (last_cycles.size() != 3 || last_cycles[1] - last_cycles[0] != n) begin
          failures++;
          $display("FAIL period bw%0d mod%0d", b, m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
