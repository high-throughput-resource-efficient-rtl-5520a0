// Self-checking testbench for frame_dims: checks D = N / C and C for all
// eight bandwidth / modulation codes against block sizes worked out from the
// standard's subcarrier counts (52 and 108 data subcarriers times Nbpscs).
module tb_frame_dims;
  import intlv_pkg::*;
  import intlv_ref_pkg::*;

  bw_e  bw;
  mod_e nbpscs;
  cnt_t d, c;
  int checks = 0, failures = 0;

  frame_dims dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++) begin
      for (int m = 0; m < 4; m++) begin
        int n, cc;
        bw = bw_e'(b); nbpscs = mod_e'(m);
        #1;
        n  = ((b != 0) ? 108 : 52) * nbpscs_of(m);
        cc = (b != 0) ? 18 : 13;
        checks++;
        if (int'(c) != cc || int'(d) * cc != n) begin
          failures++;
          $display("FAIL bw%0d mod%0d: C=%0d D=%0d, want C=%0d D=%0d", b, m, c, d, cc, n / cc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
