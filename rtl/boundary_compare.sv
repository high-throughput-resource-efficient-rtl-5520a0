// Boundary comparators of one stream's write-address path.
//
// Adding the stream offset (I_x columns, J_y rows) to (i, j) can run past the
// last row, which carries one column, and past the last column, which wraps to
// column 0. Three comparisons decide which case applies:
//   i_lt  = ICOUNT < C - I_x        column does not wrap (no row carry)
//   i_lt1 = ICOUNT < C - I_x - 1    column does not wrap (with row carry)
//   j_lt  = JCOUNT < D - J_y        row does not wrap
// The ">=" signals of the design are the complements. Combinational.
module boundary_compare
  import intlv_pkg::*;
(
  input  cnt_t icount,
  input  cnt_t jcount,
  input  cnt_t c,
  input  cnt_t d,
  input  cnt_t ix,
  input  cnt_t jy,
  output logic i_lt,
  output logic i_lt1,
  output logic j_lt
);

  cnt_t c_m_ix, d_m_jy;

  assign c_m_ix = c - ix;
  assign d_m_jy = d - jy;

  assign i_lt  = (icount < c_m_ix);
  assign i_lt1 = ({1'b0, icount} + 7'd1 < {1'b0, c_m_ix});
  assign j_lt  = (jcount < d_m_jy);

endmodule
