// Reference model for the interleaver testbenches.
//
// Computes interleaved addresses the long way, with the three permutation
// steps written with integer division (floor) and modulo, independently of
// the floor-free hardware:
//   m = (N/C) * (k % C) + k / C                         step 1
//   j = s * (m / s) + (m + N - (C * m) / N) % s         step 2, s = max(1, Nbpscs/2)
//   r = (j - Jrot) mod N                                step 3
//   Jrot = (((iss-1)*2) % 3 + 3*((iss-1)/3)) * Nrot * Nbpscs
// with C = 13 / 18 columns and Nrot = 13 / 29 for 20 / 40 MHz.
package intlv_ref_pkg;

  function automatic int nbpscs_of(input int code);
    case (code)
      0: return 1;
      1: return 2;
      2: return 4;
      default: return 6;
    endcase
  endfunction

  function automatic int cols_of(input int bw);
    return (bw != 0) ? 18 : 13;
  endfunction

  function automatic int rows_of(input int bw, input int code);
    return ((bw != 0) ? 6 : 4) * nbpscs_of(code);
  endfunction

  function automatic int n_of(input int bw, input int code);
    return cols_of(bw) * rows_of(bw, code);
  endfunction

  function automatic int jrot_of(input int bw, input int code, input int iss);
    int nrot;
    nrot = (bw != 0) ? 29 : 13;
    return ((((iss - 1) * 2) % 3) + 3 * ((iss - 1) / 3)) * nrot * nbpscs_of(code);
  endfunction

  function automatic int ref_addr(input int bw, input int code, input int iss, input int k);
    int n, c, s, m, j, r;
    n = n_of(bw, code);
    c = cols_of(bw);
    s = nbpscs_of(code) / 2;
    if (s < 1) s = 1;
    m = (n / c) * (k % c) + k / c;
    j = s * (m / s) + ((m + n - (c * m) / n) % s);
    r = (j - jrot_of(bw, code, iss)) % n;
    if (r < 0) r += n;
    return r;
  endfunction

  // Published offsets (I_x, J_y) of stream iss, J_y as a multiple of Nbpscs
  function automatic int table_ix(input int bw, input int iss);
    int t20[4] = '{0, 6, 9, 3};
    int t40[4] = '{0, 8, 13, 3};
    return (bw != 0) ? t40[iss-1] : t20[iss-1];
  endfunction

  function automatic int table_jy(input int bw, input int code, input int iss);
    int t20[4] = '{0, 2, 3, 1};
    int t40[4] = '{0, 2, 1, 3};
    return ((bw != 0) ? t40[iss-1] : t20[iss-1]) * nbpscs_of(code);
  endfunction

endpackage
