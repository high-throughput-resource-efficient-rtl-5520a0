// Write-address generator for BPSK and QPSK (one spatial stream).
//
// For these modulations the second permutation step is the identity, so the
// address of input (i, j) is the rotated block position
//   D*(i + I) + (j + J)                 when j <  D-J, i <  C-I
//   D*(i - (C-I)) + (j + J)             when j <  D-J, i >= C-I
//   D*(i + I + 1) + (j - (D-J))         when j >= D-J, i <  C-I-1
//   D*(i - (C-I-1)) + (j - (D-J))       when j >= D-J, i >= C-I-1
// i.e. (D*(i+I) + j + J) mod N computed without a divider or floor. The
// structure follows the original BPSK/QPSK circuit: the row part forms
// JCOUNT + J_y (A4) and JCOUNT - (D - J_y) (S1, S2) and picks one (M2) on
// JCOUNT < D - J_y; the column part forms ICOUNT + I_x (A5), + 1 (A6),
// ICOUNT - (C - I_x) (S4, S3) and + 1 (A7), picks on the column comparators
// (M3, M4) and on the row carry (M5); ML1 multiplies by D and A1 adds.
// Intermediate sums are 6-bit and wrap in the branches not selected; the
// selected branch is always in range. Combinational.
module wa_gen_bq
  import intlv_pkg::*;
(
  input  cnt_t  icount,
  input  cnt_t  jcount,
  input  cnt_t  c,
  input  cnt_t  d,
  input  cnt_t  ix,
  input  cnt_t  jy,
  input  logic  i_lt,     // ICOUNT < C - I_x
  input  logic  i_lt1,    // ICOUNT < C - I_x - 1
  input  logic  j_lt,     // JCOUNT < D - J_y
  output addr_t wa
);

  cnt_t a4, s1, s2, m2;
  cnt_t a5, a6, s4, s3, a7, m3, m4, m5;
  logic [2*CNT_WIDTH-1:0] ml1;

  // row part
  assign a4 = jcount + jy;
  assign s1 = d - jy;
  assign s2 = jcount - s1;
  assign m2 = j_lt ? a4 : s2;

  // column part
  assign a5 = icount + ix;
  assign a6 = a5 + 1'b1;
  assign s4 = c - ix;
  assign s3 = icount - s4;
  assign a7 = s3 + 1'b1;
  assign m3 = i_lt  ? a5 : s3;
  assign m4 = i_lt1 ? a6 : a7;
  assign m5 = j_lt  ? m3 : m4;

  assign ml1 = d * m5;
  assign wa  = addr_t'(ml1 + {{CNT_WIDTH{1'b0}}, m2});

endmodule
