// ols_syndrome_gen -- syndrome computation of a SEC-OLS code (k = M*M, t = 1).
//
// Recomputes the 2M check bits from the data word read back and XORs each
// with the stored check bit: s(r+1) = c(r+1) xor (row r of G applied to d).
// A zero syndrome means the stored word is a code word. As in the
// check-bit generator, every syndrome bit has a private XOR tree (M data
// bits plus one stored check bit, M two-input gates), so no gate is shared
// between syndrome bits.
//
// Interface: data_i[j] is d(j+1), check_i[r] is the stored c(r+1),
// synd_o[r] is s(r+1). Purely combinational.
module ols_syndrome_gen #(
  parameter int unsigned M = ols_pkg::M_DEFAULT
) (
  input  logic [M*M-1:0] data_i,
  input  logic [2*M-1:0] check_i,
  output logic [2*M-1:0] synd_o
);

  logic [2*M-1:0] recomputed;

  ols_check_gen #(.M(M)) u_recompute (
    .data_i (data_i),
    .check_o(recomputed)
  );

  assign synd_o = recomputed ^ check_i;

endmodule
