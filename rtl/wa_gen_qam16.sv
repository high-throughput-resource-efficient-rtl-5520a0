// Write-address generator for 16-QAM (one spatial stream).
//
// 16-QAM adds the second permutation step: within each pair of rows, bits in
// odd columns swap rows (s = 2). On top of the BPSK/QPSK cases the row term
// gains +1 (j even) or -1 (j odd) in odd columns, before or after the row
// wrap. The case is coded, as in the design, by two 2-bit selects:
//   II4 = {column wraps, i % 2}     JJ4 = {row wraps, j % 2}
// The row term comes from one of four multiplexers (one per JJ4 value) driven
// by II4, then a multiplexer on JJ4; the column term from two multiplexers on
// II4 (without and with row carry) then one on JJ4. The product with D plus
// the row term (A2) is the address. "Column wraps" is ICOUNT >= C - I_x
// without a row carry and ICOUNT >= C - I_x - 1 with one; the original select
// table quotes only the first comparison, so the carry-side multiplexer here
// uses its own select II4c built from the second, which the address equations
// require. Combinational.
module wa_gen_qam16
  import intlv_pkg::*;
(
  input  cnt_t  icount,
  input  cnt_t  jcount,
  input  cnt_t  c,
  input  cnt_t  d,
  input  cnt_t  ix,
  input  cnt_t  jy,
  input  logic  i_lt,
  input  logic  i_lt1,
  input  logic  j_lt,
  output addr_t wa
);

  logic [1:0] ii4, jj4;
  logic       ii4c;                              // wrap bit of II4 on the carry side
  cnt_t col_nc, col_c, col, row;
  cnt_t row_jj [4];
  cnt_t jp, jp_p1, jp_m1, jw, jw_p1, jw_m1;     // row candidates
  cnt_t ip, ip1, iw, iw1;                        // column candidates
  logic [2*CNT_WIDTH-1:0] prod;

  assign ii4  = {~i_lt,  icount[0]};
  assign ii4c = ~i_lt1;
  assign jj4  = {~j_lt,  jcount[0]};

  // candidate terms
  assign jp    = jcount + jy;               // JCOUNT + J
  assign jp_p1 = jp + 1'b1;                 // JCOUNT + J + 1
  assign jp_m1 = jp - 1'b1;                 // JCOUNT + J - 1
  assign jw    = jcount - (d - jy);         // JCOUNT - (D - J)
  assign jw_p1 = jw + 1'b1;                 // JCOUNT - (D - J - 1)
  assign jw_m1 = jw - 1'b1;                 // JCOUNT - (D - J + 1)
  assign ip    = icount + ix;               // ICOUNT + I
  assign ip1   = ip + 1'b1;                 // ICOUNT + I + 1
  assign iw    = icount - (c - ix);         // ICOUNT - (C - I)
  assign iw1   = iw + 1'b1;                 // ICOUNT - (C - I - 1)

  // first-level row multiplexers, one per JJ4 code, selected by II4
  always_comb begin
    unique case (ii4)
      2'b00, 2'b10: begin
        row_jj[0] = jp;    row_jj[1] = jp;    row_jj[2] = jw;    row_jj[3] = jw;
      end
      default: begin      // odd column
        row_jj[0] = jp_p1; row_jj[1] = jp_m1; row_jj[2] = jw_p1; row_jj[3] = jw_m1;
      end
    endcase
  end

  // column multiplexers on II4 (no row carry) and II4c (row carry)
  assign col_nc = ii4[1]  ? iw  : ip;
  assign col_c  = ii4c    ? iw1 : ip1;

  // second level on JJ4
  assign row = row_jj[jj4];
  assign col = jj4[1] ? col_c : col_nc;

  assign prod = d * col;
  assign wa   = addr_t'(prod + {{CNT_WIDTH{1'b0}}, row});

endmodule
