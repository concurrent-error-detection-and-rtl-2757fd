// tb_ols_ref_pkg -- reference model of a SEC-OLS code (t = 1) for the
// testbenches, written from the matrix definition rather than from the RTL.
//
// Vectors are held in fixed 256-bit (data) and 32-bit (check) containers so
// that one set of functions serves every code size up to k = 256 (m = 16);
// bit 0 is d1 / c1 / s1. Check row r < m covers the r-th consecutive group
// of m data bits (M1 = block diagonal of all-ones rows); row m + r covers
// data bits r, r+m, r+2m, ... (M2 = [I I ... I]).
package tb_ols_ref_pkg;

  typedef logic [255:0] data_t;
  typedef logic [31:0]  check_t;

  // Parity-check rows of G, as 256-bit masks over the data word.
  function automatic data_t g_row(int m, int r);
    data_t mask = '0;
    for (int j = 0; j < m*m; j++) begin
      if (r < m) begin
        if (j >= r*m && j < (r+1)*m) mask[j] = 1'b1;
      end else begin
        if ((j - (r - m)) % m == 0) mask[j] = 1'b1;
      end
    end
    return mask;
  endfunction

  function automatic check_t ref_check(int m, data_t d);
    check_t c = '0;
    for (int r = 0; r < 2*m; r++) c[r] = ^(d & g_row(m, r));
    return c;
  endfunction

  function automatic check_t ref_synd(int m, data_t d, check_t c);
    return ref_check(m, d) ^ c;
  endfunction

  function automatic data_t rand_data(int m);
    data_t d = '0;
    for (int w = 0; w < 8; w++) d[w*32 +: 32] = $urandom();
    if (m*m < 256) d &= (data_t'(1) << (m*m)) - 1;
    return d;
  endfunction

  function automatic check_t rand_check(int m);
    check_t c = check_t'($urandom());
    if (2*m < 32) c &= (check_t'(1) << (2*m)) - 1;
    return c;
  endfunction

endpackage
