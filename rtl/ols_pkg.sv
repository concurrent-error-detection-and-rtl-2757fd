// ols_pkg -- shared constants and the parity-check structure of a
// single-error-correcting orthogonal Latin squares (SEC-OLS) code.
//
// A SEC-OLS code protects k = m*m data bits with 2m check bits. Its
// generator matrix is G = [M1; M2] (2m rows, k columns):
//   * M1 row r (check c(r+1), r = 0..m-1) covers the data bits of the r-th
//     consecutive group of m bits, i.e. data bit j with j / m == r;
//   * M2 row r (check c(m+r+1)) covers every m-th data bit starting at r,
//     i.e. data bit j with j % m == r (M2 = [I_m I_m ... I_m]).
// Every data bit therefore sits in exactly 2t = 2 checks, and two data bits
// share at most one check, which is what lets a simple parity prediction
// check the encoder and the syndrome computation.
//
// Bit numbering throughout the design: bit 0 of a data vector is d1, bit 0 of
// a check or syndrome vector is c1 / s1. Only t = 1 is built; larger t needs
// further mutually orthogonal Latin squares that are not constructed here.
package ols_pkg;

  // Code size used by the design as its default: k = 16, t = 1.
  localparam int unsigned M_DEFAULT = 4;

  // 1 when data bit j (0-based) takes part in check row r (0-based, 0..2m-1).
  function automatic bit g_entry(int unsigned m, int unsigned r, int unsigned j);
    if (r < m) return (j / m) == r;
    else       return (j % m) == (r - m);
  endfunction

  // Index of the M1 check (0..m-1) and of the M2 check (m..2m-1) that cover
  // data bit j.
  function automatic int unsigned row_check(int unsigned m, int unsigned j);
    return j / m;
  endfunction

  function automatic int unsigned col_check(int unsigned m, int unsigned j);
    return m + (j % m);
  endfunction

endpackage
