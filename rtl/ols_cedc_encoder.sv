// ols_cedc_encoder -- self-checking and self-correcting SEC-OLS encoder.
//
// The original check-bit generator computes c1..c2m. Because every column
// of G holds exactly 2t = 2 ones, the XOR of all check bits of a correct
// encoding is zero; equivalently the parity of c1..cm equals the parity of
// c(m+1)..c2m (both equal the parity of the data word). A two-rail parity
// checker forms r1 = c1^..^cm and r2 = c(m+1)^..^c2m and raises e = r1^r2
// when they differ. A second, independent copy of the generator computes
// the same check bits from the same data word, and a 2:1 multiplexer selected
// by e outputs the original check bits while e = 0 and the duplicate's
// while e = 1: c_output = ~e & ci | e & cj.
//
// The generators share no gate between check bits, so any single stuck-at
// node in the original generator or in the checker flips an odd number of
// monitored bits (or one rail) and is both detected and corrected. The
// duplicate generator is not itself checked; a fault there only matters if
// the original is faulty at the same time.
//
// Interface: data_i (k = M*M bits, bit 0 = d1) -> check_o (2M bits, bit 0 =
// c1), err_o (e), r1_o / r2_o (the two rails, for observation).
// Purely combinational: the check and the correction add the checker and
// multiplexer delay to the encoder path.
module ols_cedc_encoder #(
  parameter int unsigned M = ols_pkg::M_DEFAULT
) (
  input  logic [M*M-1:0] data_i,
  output logic [2*M-1:0] check_o,
  output logic           err_o,
  output logic           r1_o,
  output logic           r2_o
);

  logic [2*M-1:0] check_orig;   // ci, checked
  logic [2*M-1:0] check_dup;    // cj, duplicate used for correction

  ols_check_gen #(.M(M)) u_orig (
    .data_i (data_i),
    .check_o(check_orig)
  );

  ols_check_gen #(.M(M)) u_dup (
    .data_i (data_i),
    .check_o(check_dup)
  );

  ols_parity_checker #(.WA(M), .WB(M)) u_checker (
    .a_i  (check_orig[M-1:0]),
    .b_i  (check_orig[2*M-1:M]),
    .r1_o (r1_o),
    .r2_o (r2_o),
    .err_o(err_o)
  );

  ols_corr_mux #(.W(2*M)) u_mux (
    .in0_i(check_orig),
    .in1_i(check_dup),
    .sel_i(err_o),
    .out_o(check_o)
  );

endmodule
