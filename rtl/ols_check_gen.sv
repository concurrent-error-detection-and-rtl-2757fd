// ols_check_gen -- check-bit generator of a SEC-OLS code (k = M*M, t = 1).
//
// Computes the 2M check bits c = G * d over GF(2), with G = [M1; M2] as
// defined in ols_pkg: check c(r+1), r < M, is the XOR of the r-th group of M
// consecutive data bits, and check c(M+r+1) is the XOR of data bits r, r+M,
// r+2M, ... Each check bit is its own XOR tree of M inputs (M-1 two-input
// gates); no gate is shared between check bits, so a single faulty node
// can corrupt at most one check bit. This matches the code definition and
// the gate rows drawn for the k = 16 encoder; the tree shape inside each
// check is left to synthesis.
//
// Interface: data_i[j] is d(j+1); check_o[r] is c(r+1). Purely
// combinational, no clock.
module ols_check_gen #(
  parameter int unsigned M = ols_pkg::M_DEFAULT
) (
  input  logic [M*M-1:0] data_i,
  output logic [2*M-1:0] check_o
);

  for (genvar r = 0; r < M; r++) begin : g_row
    // M1: consecutive group r of M data bits
    assign check_o[r] = ^data_i[r*M +: M];

    // M2: every M-th data bit starting at r
    logic [M-1:0] col_bits;
    for (genvar i = 0; i < M; i++) begin : g_pick
      assign col_bits[i] = data_i[i*M + r];
    end
    assign check_o[M + r] = ^col_bits;
  end

endmodule
