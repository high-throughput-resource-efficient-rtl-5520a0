// Self-checking testbench for rowcol_counter: for every block shape of the
// design (C = 13/18 by D = 4..36) it checks two full blocks of the column /
// row walk, the modulo-3 side counters and the end-of-block flag, then
// shrinks the limits while a counter is above them and checks that the
// counters come back to 0 and keep counting.
module tb_rowcol_counter;
  import intlv_pkg::*;
  import intlv_ref_pkg::*;

  logic clk = 1'b0;
  logic rst;
  cnt_t c_m1, d_m1, icount, jcount;
  logic [1:0] imod3, jmod3;
  logic blk_last;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rowcol_counter dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst = 1'b1; c_m1 = '0; d_m1 = '0;
    for (int bw = 0; bw < 2; bw++) begin
      for (int code = 0; code < 4; code++) begin
        int c, d;
        c = cols_of(bw); d = rows_of(bw, code);
        rst = 1'b1; c_m1 = cnt_t'(c - 1); d_m1 = cnt_t'(d - 1);
        @(posedge clk); #1 rst = 1'b0;
        for (int k = 0; k < 2 * c * d; k++) begin
          int kk;
          kk = k % (c * d);
          check(icount == cnt_t'(kk % c) && jcount == cnt_t'(kk / c),
                $sformatf("bw%0d mod%0d k%0d i=%0d j=%0d", bw, code, k, icount, jcount));
          check(imod3 == 2'((kk % c) % 3) && jmod3 == 2'((kk / c) % 3),
                $sformatf("mod3 k%0d", k));
          check(blk_last == (kk == c * d - 1), $sformatf("blk_last k%0d", k));
          @(posedge clk); #1;
        end
      end
    end
    // limits shrink while the counters are above them
    rst = 1'b1; c_m1 = 6'd17; d_m1 = 6'd35;
    @(posedge clk); #1 rst = 1'b0;
    while (!(icount == 6'd15 && jcount == 6'd20)) begin @(posedge clk); #1; end
    c_m1 = 6'd12; d_m1 = 6'd3;
    @(posedge clk); #1;
    check(icount == 0 && jcount == 0, "return to 0 after limits shrink");
    @(posedge clk); #1;
    check(icount == 1 && jcount == 0, "count resumes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
