// Address generator of the 4-stream interleaver.
//
// One column/row counter pair walks the C x D block; the four stream paths
// turn (ICOUNT, JCOUNT) into each stream's permuted write address WA_x
// without any floor or division. A single read counter supplies the natural-
// order read address and a toggle flip-flop flips the ping-pong select at the
// end of every block. The design lists RA_x and sel_x per stream; since all
// four streams see the same values, one counter and one flip-flop drive all
// four outputs here (an implementation choice).
//
// Timing: WA_x is combinational from the registered counters, RA_x and sel_x
// are registered. After a synchronous reset, block 0 is written in cycles
// 0..N-1 with sel = 0, then sel toggles every N cycles. A change of BW or
// modulation takes effect cleanly only with a reset, as in the original
// hardware test, where reset, BW and modulation are driven together.
module address_generator
  import intlv_pkg::*;
#(
  parameter int unsigned ADDR_W = intlv_pkg::ADDR_WIDTH
) (
  input  logic                                clk,
  input  logic                                rst,
  input  bw_e                                 bw,
  input  mod_e                                nbpscs,
  output logic [NUM_STREAMS-1:0][ADDR_W-1:0]  wa,
  output logic [NUM_STREAMS-1:0][ADDR_W-1:0]  ra,
  output logic [NUM_STREAMS-1:0]              sel
);

  cnt_t              icount, jcount, c, d;
  logic [1:0]        imod3, jmod3;
  logic              blk_last, rd_last, sel_q;
  logic [ADDR_W-1:0] rd_count;

  frame_dims u_dims (.bw, .nbpscs, .d, .c);

  rowcol_counter u_cnt (
    .clk, .rst, .c_m1(c - 1'b1), .d_m1(d - 1'b1),
    .icount, .jcount, .imod3, .jmod3, .blk_last
  );

  for (genvar s = 0; s < NUM_STREAMS; s++) begin : g_stream
    addr_t wa_s;
    wa_stream #(.STREAM(s + 1)) u_wa (
      .bw, .nbpscs, .icount, .jcount, .imod3, .jmod3, .c, .d, .wa(wa_s)
    );
    assign wa[s]  = ADDR_W'(wa_s);
    assign ra[s]  = rd_count;
    assign sel[s] = sel_q;
  end

  ra_gen #(.ADDR_W(ADDR_W)) u_ra (
    .clk, .rst, .bw, .nbpscs, .ra(rd_count), .last(rd_last)
  );

  // toggle flip-flop: swap the write and read halves after every block
  always_ff @(posedge clk) begin
    if (rst)          sel_q <= 1'b0;
    else if (rd_last) sel_q <= ~sel_q;
  end

  // write side (C x D walk) and read side (N count) must end blocks together
  a_blocks_aligned: assert property (@(posedge clk) disable iff (rst) blk_last == rd_last)
    else $error("write and read block boundaries diverged");

endmodule
