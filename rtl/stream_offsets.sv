// Column offset I_x and row offset J_y of one spatial stream.
//
// Frequency rotation of stream x shifts every address of the block by a
// constant, which in the C x D block layout is I_x whole columns plus J_y
// rows. The values are those of the original offset table:
//   stream      20 MHz (C = 13)         40 MHz (C = 18)
//   1           I = 0, J = 0            I = 0,  J = 0
//   2           I = 6, J = 2*Nbpscs     I = 8,  J = 2*Nbpscs
//   3           I = 9, J = 3*Nbpscs     I = 13, J = Nbpscs
//   4           I = 3, J = Nbpscs       I = 3,  J = 3*Nbpscs
// Nbpscs is the number of coded bits per subcarrier (1, 2, 4, 6); the small
// multiples of it are taken from a multiplexer, not a multiplier.
// Combinational. The stream is selected by the iss input (0..3 for streams
// 1..4); in the interleaver each stream's path ties it to a constant, so
// synthesis reduces each instance to that stream's multiplexers.
module stream_offsets
  import intlv_pkg::*;
(
  input  logic [1:0] iss,     // stream number minus one
  input  bw_e        bw,
  input  mod_e       nbpscs,
  output cnt_t       ix,
  output cnt_t       jy
);

  cnt_t nb;       // Nbpscs as a number
  logic [1:0] jmul;     // J_y / Nbpscs

  always_comb begin
    unique case (nbpscs)
      MOD_BPSK:  nb = cnt_t'(1);
      MOD_QPSK:  nb = cnt_t'(2);
      MOD_QAM16: nb = cnt_t'(4);
      default:   nb = cnt_t'(6);
    endcase
  end

  always_comb begin
    ix   = '0;
    jmul = 2'd0;
    unique case (iss)
      2'd1: begin ix = (bw == BW_40MHZ) ? cnt_t'(8)  : cnt_t'(6); jmul = 2'd2; end
      2'd2: begin ix = (bw == BW_40MHZ) ? cnt_t'(13) : cnt_t'(9); jmul = (bw == BW_40MHZ) ? 2'd1 : 2'd3; end
      2'd3: begin ix = cnt_t'(3);                                  jmul = (bw == BW_40MHZ) ? 2'd3 : 2'd1; end
      default: begin ix = '0; jmul = 2'd0; end
    endcase
  end

  always_comb begin
    unique case (jmul)
      2'd1:    jy = nb;
      2'd2:    jy = cnt_t'({nb, 1'b0});
      2'd3:    jy = cnt_t'({nb, 1'b0} + nb);
      default: jy = '0;
    endcase
  end

endmodule
