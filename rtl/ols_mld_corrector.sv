// ols_mld_corrector -- one-step majority-logic data correction for a SEC-OLS
// code (t = 1).
//
// Each data bit d(j+1) is covered by exactly two checks: the M1 check of
// its row group (j / M) and the M2 check of its column (M + j % M). With
// t = 1 the bit is taken to be in error when both of those syndrome bits are
// 1 (a majority of the 2t = 2 checks together with the bit's own vote), and
// it is then inverted. A single error in a check bit sets only one syndrome
// bit and leaves the data untouched. The code structure (which checks
// cover which bit) is fixed by the OLS code; the voting rule and the err_o
// flag are choices of this design, the simplest single-error corrector.
//
// Interface: data_i (M*M bits), synd_i (2M bits, bit 0 = s1) -> data_o
// (corrected data), err_o (syndrome non-zero: some bit of the word was in
// error). Combinational.
module ols_mld_corrector #(
  parameter int unsigned M = ols_pkg::M_DEFAULT
) (
  input  logic [M*M-1:0] data_i,
  input  logic [2*M-1:0] synd_i,
  output logic [M*M-1:0] data_o,
  output logic           err_o
);

  for (genvar j = 0; j < M*M; j++) begin : g_bit
    localparam int unsigned RowChk = ols_pkg::row_check(M, j);
    localparam int unsigned ColChk = ols_pkg::col_check(M, j);
    assign data_o[j] = data_i[j] ^ (synd_i[RowChk] & synd_i[ColChk]);
  end

  assign err_o = |synd_i;

endmodule
