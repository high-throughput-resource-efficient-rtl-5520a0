// Self-checking testbench for wa_stream: four instances (streams 1..4) share
// the counter inputs, as in the address generator. For all eight bandwidth /
// modulation codes it walks every k of the block and compares each stream's
// address with the floor-based reference; C and D are driven from integers
// worked out here, not from frame_dims.
module tb_wa_stream;
  import intlv_pkg::*;
  import intlv_ref_pkg::*;

  bw_e  bw;
  mod_e nbpscs;
  cnt_t icount, jcount, c, d;
  logic [1:0] imod3, jmod3;
  addr_t wa [4];
  int checks = 0, failures = 0;

  for (genvar s = 0; s < 4; s++) begin : g
    wa_stream #(.STREAM(s + 1)) u (.bw, .nbpscs, .icount, .jcount, .imod3, .jmod3, .c, .d, .wa(wa[s]));
  end

  initial begin : watchdog
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++) begin
      for (int m = 0; m < 4; m++) begin
        int n, cc;
        bw = bw_e'(b); nbpscs = mod_e'(m);
        n = n_of(b, m); cc = cols_of(b);
        c = cnt_t'(cc); d = cnt_t'(rows_of(b, m));
        for (int k = 0; k < n; k++) begin
          icount = cnt_t'(k % cc); jcount = cnt_t'(k / cc);
          imod3 = 2'((k % cc) % 3); jmod3 = 2'((k / cc) % 3);
          #1;
          for (int s = 0; s < 4; s++) begin
            checks++;
            if (int'(wa[s]) != ref_addr(b, m, s + 1, k)) begin
              failures++;
              if (failures < 20)
                $display("FAIL bw%0d mod%0d iss%0d k%0d: got %0d want %0d", b, m, s + 1, k, wa[s], ref_addr(b, m, s + 1, k));
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
