// ols_cedc_syndrome -- self-checking and self-correcting SEC-OLS syndrome
// computation.
//
// The original syndrome generator computes s1..s2m from the data and check
// bits read from memory. Since every data bit enters exactly two syndrome
// bits, the XOR of all syndrome bits equals the XOR of all stored check
// bits. A two-rail parity checker forms r1 = s1^..^s2m and r2 = c1^..^c2m
// (separate XOR trees) and raises f = r1^r2 when they differ. An
// independent duplicate syndrome generator fed by the same inputs supplies
// replacement bits, and a 2:1 multiplexer selected by f outputs
// S_output = ~f & si | f & sj.
//
// Any single stuck-at node in the original syndrome generator flips one
// syndrome bit, hence r1, and is corrected. A fault in the checker flips
// one rail and only causes the (equally correct) duplicate to be used.
// Errors in the stored word itself do not disturb the check: they change
// s and c together and keep r1 = r2.
//
// Interface: data_i (M*M bits, bit 0 = d1), check_i (2M stored check bits,
// bit 0 = c1) -> synd_o (2M bits, bit 0 = s1), err_o (f), r1_o / r2_o.
// Purely combinational.
module ols_cedc_syndrome #(
  parameter int unsigned M = ols_pkg::M_DEFAULT
) (
  input  logic [M*M-1:0] data_i,
  input  logic [2*M-1:0] check_i,
  output logic [2*M-1:0] synd_o,
  output logic           err_o,
  output logic           r1_o,
  output logic           r2_o
);

  logic [2*M-1:0] synd_orig;   // si, checked
  logic [2*M-1:0] synd_dup;    // sj, duplicate used for correction

  ols_syndrome_gen #(.M(M)) u_orig (
    .data_i (data_i),
    .check_i(check_i),
    .synd_o (synd_orig)
  );

  ols_syndrome_gen #(.M(M)) u_dup (
    .data_i (data_i),
    .check_i(check_i),
    .synd_o (synd_dup)
  );

  ols_parity_checker #(.WA(2*M), .WB(2*M)) u_checker (
    .a_i  (synd_orig),
    .b_i  (check_i),
    .r1_o (r1_o),
    .r2_o (r2_o),
    .err_o(err_o)
  );

  ols_corr_mux #(.W(2*M)) u_mux (
    .in0_i(synd_orig),
    .in1_i(synd_dup),
    .sel_i(err_o),
    .out_o(synd_o)
  );

endmodule
