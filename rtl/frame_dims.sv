// Block dimensions for the selected bandwidth and modulation.
//
// D, the number of rows, is N / C: 4, 8, 16, 24 rows at 20 MHz and 6, 12, 24,
// 36 rows at 40 MHz for BPSK, QPSK, 16-QAM and 64-QAM. As in the design, it is
// picked by two 4-input multiplexers on the modulation code followed by a
// 2-input multiplexer on BW. C, the number of columns, is 13 at 20 MHz and 18
// at 40 MHz. Purely combinational.
module frame_dims
  import intlv_pkg::*;
(
  input  bw_e        bw,
  input  mod_e       nbpscs,
  output cnt_t       d,
  output cnt_t       c
);

  cnt_t d20, d40;

  always_comb begin
    unique case (nbpscs)
      MOD_BPSK:  begin d20 = cnt_t'(4);  d40 = cnt_t'(6);  end
      MOD_QPSK:  begin d20 = cnt_t'(8);  d40 = cnt_t'(12); end
      MOD_QAM16: begin d20 = cnt_t'(16); d40 = cnt_t'(24); end
      default:   begin d20 = cnt_t'(24); d40 = cnt_t'(36); end
    endcase
  end

  assign d = (bw == BW_40MHZ) ? d40 : d20;
  assign c = (bw == BW_40MHZ) ? cnt_t'(COLS_40) : cnt_t'(COLS_20);

endmodule
