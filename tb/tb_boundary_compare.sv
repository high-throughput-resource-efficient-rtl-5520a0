// Self-checking testbench for boundary_compare: random and exhaustive-corner
// operands, each output compared with the same comparison done on integers.
module tb_boundary_compare;
  import intlv_pkg::*;

  cnt_t icount, jcount, c, d, ix, jy;
  logic i_lt, i_lt1, j_lt;
  int checks = 0, failures = 0;

  boundary_compare dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int ci, di, ii, ji, xi, yi;
      ci = (t % 2) ? 18 : 13;
      di = 4 + $urandom_range(0, 32);
      xi = $urandom_range(0, 13);
      yi = $urandom_range(0, 18 < di - 1 ? 18 : di - 1);
      ii = $urandom_range(0, ci - 1);
      ji = $urandom_range(0, di - 1);
      if (t < 18) begin ii = t % ci; xi = 13 - (t % 5); end
      c = cnt_t'(ci); d = cnt_t'(di); ix = cnt_t'(xi); jy = cnt_t'(yi);
      icount = cnt_t'(ii); jcount = cnt_t'(ji);
      #1;
      checks++;
      if (i_lt != (ii < ci - xi) || i_lt1 != (ii < ci - xi - 1) || j_lt != (ji < di - yi)) begin
        failures++;
        $display("FAIL i=%0d j=%0d C=%0d D=%0d I=%0d J=%0d -> %b%b%b", ii, ji, ci, di, xi, yi, i_lt, i_lt1, j_lt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
