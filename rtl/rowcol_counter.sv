// Row and column counters of the write-address generator.
//
// ICOUNT is the column index i and runs 0..C-1, one step per clock; JCOUNT is
// the row index j and advances by one each time ICOUNT wraps, running 0..D-1.
// Input bit k of a block is therefore seen at i = k % C, j = k / C, with no
// division in hardware. Each counter has a comparator against its limit
// (C-1 or D-1) that returns it to 0, as in the row/column counter scheme of
// the design. The comparators test ">=" rather than "==" so that a limit that
// shrinks at a mode change can never leave a counter stranded above it; this
// and the two modulo-3 side counters (imod3, jmod3, needed by the 64-QAM path
// for i % 3 and j % 3 without a divider) are this implementation's choices.
// i % 2 and j % 2 are simply bit 0 of the counters.
//
// Timing: all outputs are registered. A synchronous active-high reset clears
// everything; the first address of a block is presented in the cycle after
// reset is released. blk_last is high in the last cycle of a block.
module rowcol_counter
  import intlv_pkg::*;
#(
  parameter int unsigned CNT_W = intlv_pkg::CNT_WIDTH
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [CNT_W-1:0] c_m1,     // C - 1
  input  logic [CNT_W-1:0] d_m1,     // D - 1
  output logic [CNT_W-1:0] icount,
  output logic [CNT_W-1:0] jcount,
  output logic [1:0]       imod3,
  output logic [1:0]       jmod3,
  output logic             blk_last
);

  logic i_wrap, j_wrap;

  assign i_wrap   = (icount >= c_m1);
  assign j_wrap   = (jcount >= d_m1);
  assign blk_last = i_wrap & j_wrap;

  always_ff @(posedge clk) begin
    if (rst) begin
      icount <= '0;
      jcount <= '0;
      imod3  <= '0;
      jmod3  <= '0;
    end else begin
      if (i_wrap) begin
        icount <= '0;
        imod3  <= '0;
        if (j_wrap) begin
          jcount <= '0;
          jmod3  <= '0;
        end else begin
          jcount <= jcount + 1'b1;
          jmod3  <= (jmod3 == 2'd2) ? 2'd0 : jmod3 + 2'd1;
        end
      end else begin
        icount <= icount + 1'b1;
        imod3  <= (imod3 == 2'd2) ? 2'd0 : imod3 + 2'd1;
      end
    end
  end

endmodule
