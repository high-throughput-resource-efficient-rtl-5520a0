// Self-checking testbench for stream_offsets: for each of the four streams
// and all bandwidth / modulation codes, checks I_x and J_y against the
// offset table, and checks independently that D*I_x + J_y equals the
// frequency-rotation shift N - Jrot of the standard formula.
module tb_stream_offsets;
  import intlv_pkg::*;
  import intlv_ref_pkg::*;

  bw_e  bw;
  mod_e nbpscs;
  cnt_t ix [4];
  cnt_t jy [4];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < 4; g++) begin : g_ofs
    stream_offsets u (.iss(2'(g)), .bw, .nbpscs, .ix(ix[g]), .jy(jy[g]));
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++) begin
      for (int m = 0; m < 4; m++) begin
        bw = bw_e'(b); nbpscs = mod_e'(m);
        #1;
        for (int s = 1; s <= 4; s++) begin
          int n, shift;
          checks++;
          if (int'(ix[s-1]) != table_ix(b, s) || int'(jy[s-1]) != table_jy(b, m, s)) begin
            failures++;
            $display("FAIL table bw%0d mod%0d iss%0d: I=%0d J=%0d", b, m, s, ix[s-1], jy[s-1]);
          end
          n = n_of(b, m);
          shift = (n - jrot_of(b, m, s)) % n;
          checks++;
          if (rows_of(b, m) * int'(ix[s-1]) + int'(jy[s-1]) != shift) begin
            failures++;
            $display("FAIL shift bw%0d mod%0d iss%0d", b, m, s);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
