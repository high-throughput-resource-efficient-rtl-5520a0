// Write-address generator for 64-QAM (one spatial stream).
//
// For 64-QAM the second permutation step rotates bits within each group of
// three rows by the column index (s = 3). Relative to BPSK/QPSK the row term
// gains an adjustment that depends on i % 3 and j % 3:
//   i % 3 = 0 : 0
//   i % 3 = 1 : +2 if j % 3 = 0, else -1
//   i % 3 = 2 : -2 if j % 3 = 2, else +1
// applied both before the row wrap (JCOUNT + J + adj) and after it
// (JCOUNT - (D - J - adj)). As in the design the cases are coded by 3-bit
// selects, values 0..2 for "no wrap" and 3..5 for "wrap" plus the residue:
//   II6 = column wrap and i % 3       JJ6 = row wrap and j % 3
// Six row multiplexers (one per JJ6 value) are driven by II6 and followed by
// a multiplexer on JJ6; two column multiplexers on II6 (without and with row
// carry) are followed by one on JJ6; then the product with D and adder A3.
// As for 16-QAM, the carry-side column select is built from
// ICOUNT < C - I_x - 1. i % 3 and j % 3 come from the modulo-3 counters that
// run beside ICOUNT and JCOUNT. Combinational.
module wa_gen_qam64
  import intlv_pkg::*;
(
  input  cnt_t       icount,
  input  cnt_t       jcount,
  input  logic [1:0] imod3,
  input  logic [1:0] jmod3,
  input  cnt_t       c,
  input  cnt_t       d,
  input  cnt_t       ix,
  input  cnt_t       jy,
  input  logic       i_lt,
  input  logic       i_lt1,
  input  logic       j_lt,
  output addr_t      wa
);

  logic [2:0] ii6, ii6c, jj6;
  cnt_t jp, jw, ip, ip1, iw, iw1;
  cnt_t row_jj [6];
  cnt_t col_nc, col_c, col, row;
  logic [2*CNT_WIDTH-1:0] prod;

  assign ii6  = (i_lt  ? 3'd0 : 3'd3) + {1'b0, imod3};
  assign ii6c = (i_lt1 ? 3'd0 : 3'd3) + {1'b0, imod3};
  assign jj6  = (j_lt  ? 3'd0 : 3'd3) + {1'b0, jmod3};

  assign jp  = jcount + jy;                 // JCOUNT + J
  assign jw  = jcount - (d - jy);           // JCOUNT - (D - J)
  assign ip  = icount + ix;                 // ICOUNT + I
  assign ip1 = ip + 1'b1;                   // ICOUNT + I + 1
  assign iw  = icount - (c - ix);           // ICOUNT - (C - I)
  assign iw1 = iw + 1'b1;                   // ICOUNT - (C - I - 1)

  // Row multiplexers: entry r is used when JJ6 = r; the input is chosen by
  // i % 3 (the II6 code modulo 3).
  always_comb begin
    unique case (ii6)
      3'd0, 3'd3: begin   // i % 3 = 0
        row_jj[0] = jp;          row_jj[1] = jp;          row_jj[2] = jp;
        row_jj[3] = jw;          row_jj[4] = jw;          row_jj[5] = jw;
      end
      3'd1, 3'd4: begin   // i % 3 = 1
        row_jj[0] = jp + 6'd2;   row_jj[1] = jp - 6'd1;   row_jj[2] = jp - 6'd1;
        row_jj[3] = jw + 6'd2;   row_jj[4] = jw - 6'd1;   row_jj[5] = jw - 6'd1;
      end
      default: begin      // i % 3 = 2
        row_jj[0] = jp + 6'd1;   row_jj[1] = jp + 6'd1;   row_jj[2] = jp - 6'd2;
        row_jj[3] = jw + 6'd1;   row_jj[4] = jw + 6'd1;   row_jj[5] = jw - 6'd2;
      end
    endcase
  end

  assign col_nc = (ii6  >= 3'd3) ? iw  : ip;
  assign col_c  = (ii6c >= 3'd3) ? iw1 : ip1;

  always_comb begin
    row = row_jj[0];
    unique case (jj6)
      3'd0: row = row_jj[0];
      3'd1: row = row_jj[1];
      3'd2: row = row_jj[2];
      3'd3: row = row_jj[3];
      3'd4: row = row_jj[4];
      3'd5: row = row_jj[5];
      default: row = row_jj[0];
    endcase
  end

  assign col  = (jj6 >= 3'd3) ? col_c : col_nc;
  assign prod = d * col;
  assign wa   = addr_t'(prod + {{CNT_WIDTH{1'b0}}, row});

endmodule
