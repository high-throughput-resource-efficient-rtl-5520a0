// Self-checking testbench for wa_gen_qam64: for 64-QAM at both bandwidths and
// for all four spatial streams, walks every input index k of a block,
// presents i = k % C, j = k / C with the stream's offsets and boundary flags
// (worked out here with integers), and compares the write address with the
// three-step floor-based reference of intlv_ref_pkg.
module tb_wa_gen_qam64;
  import intlv_pkg::*;
  import intlv_ref_pkg::*;

  cnt_t icount, jcount, c, d, ix, jy;
  logic [1:0] imod3, jmod3;
  logic i_lt, i_lt1, j_lt;
  addr_t wa;
  int checks = 0, failures = 0;

  wa_gen_qam64 dut (.icount, .jcount, .imod3, .jmod3, .c, .d, .ix, .jy, .i_lt, .i_lt1, .j_lt, .wa);

  initial begin : watchdog
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mods[2] = '{3, 3};
    foreach (mods[mi]) begin
      for (int b = 0; b < 2; b++) begin
        for (int s = 1; s <= 4; s++) begin
          int cc, dd, xx, yy, n, m;
          m  = mods[mi];
          cc = cols_of(b); dd = rows_of(b, m); n = n_of(b, m);
          xx = table_ix(b, s); yy = table_jy(b, m, s);
          for (int k = 0; k < n; k++) begin
            int ii, jj, want;
            ii = k % cc; jj = k / cc;
            icount = cnt_t'(ii); jcount = cnt_t'(jj);
            imod3 = 2'(ii % 3); jmod3 = 2'(jj % 3);
            c = cnt_t'(cc); d = cnt_t'(dd); ix = cnt_t'(xx); jy = cnt_t'(yy);
            i_lt = (ii < cc - xx); i_lt1 = (ii < cc - xx - 1); j_lt = (jj < dd - yy);
            #1;
            want = ref_addr(b, m, s, k);
            checks++;
            if (int'(wa) != want) begin
              failures++;
              if (failures < 20)
                $display("FAIL mod%0d bw%0d iss%0d k%0d (i%0d j%0d): got %0d want %0d", m, b, s, k, ii, jj, wa, want);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
