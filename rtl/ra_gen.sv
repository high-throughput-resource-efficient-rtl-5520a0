// Read-address generator.
//
// The block is read back in natural order, so the read address is a plain
// 10-bit up counter, rd_count. The block size N is chosen by four 2-input
// multiplexers on BW (52/108, 104/216, 208/432, 312/648 for BPSK, QPSK,
// 16-QAM, 64-QAM at 20/40 MHz) followed by a 4-input multiplexer (M1) on the
// modulation code. A comparator resets rd_count to 0 after it has produced
// address N-1, so it runs 0..N-1 and wraps without a gap; "last" is the
// comparator's pulse, high while RA = N-1 (this implementation compares with
// N-1 and uses ">=" so a smaller N after a mode change cannot strand it).
// Registered output; synchronous active-high reset to address 0.
module ra_gen
  import intlv_pkg::*;
#(
  parameter int unsigned ADDR_W = intlv_pkg::ADDR_WIDTH
) (
  input  logic              clk,
  input  logic              rst,
  input  bw_e               bw,
  input  mod_e              nbpscs,
  output logic [ADDR_W-1:0] ra,
  output logic              last
);

  logic [ADDR_W-1:0] n_bpsk, n_qpsk, n_q16, n_q64, n_sel;
  logic              wide;

  assign wide   = (bw == BW_40MHZ);
  assign n_bpsk = wide ? ADDR_W'(108) : ADDR_W'(52);
  assign n_qpsk = wide ? ADDR_W'(216) : ADDR_W'(104);
  assign n_q16  = wide ? ADDR_W'(432) : ADDR_W'(208);
  assign n_q64  = wide ? ADDR_W'(648) : ADDR_W'(312);

  always_comb begin
    unique case (nbpscs)
      MOD_BPSK:  n_sel = n_bpsk;
      MOD_QPSK:  n_sel = n_qpsk;
      MOD_QAM16: n_sel = n_q16;
      default:   n_sel = n_q64;
    endcase
  end

  assign last = ({1'b0, ra} + 1'b1 >= {1'b0, n_sel});

  always_ff @(posedge clk) begin
    if (rst || last) ra <= '0;
    else             ra <= ra + 1'b1;
  end

endmodule
