// ols_parity_checker -- two-rail self-checking parity checker.
//
// The checker watches a set of inputs whose total parity must be even. The
// inputs are split into two disjoint groups; r1 is the parity of group A and
// r2 the parity of group B, each computed by its own XOR tree. For a
// correct input set the pair {r1, r2} is 00 or 11; an input set with wrong
// parity gives 01 or 10. A final XOR folds the pair into a single error
// flag err_o = r1 xor r2, 1 on an error. A single fault in either tree also
// shows up as 01 / 10 because the two trees share no gate.
//
// Used twice: in the encoder, group A is c1..cm and group B is
// c(m+1)..c2m; in the syndrome computation, group A is the syndrome s1..s2m
// and group B the stored check bits c1..c2m.
//
// Interface: a_i (WA bits), b_i (WB bits) -> r1_o, r2_o, err_o.
// Purely combinational.
module ols_parity_checker #(
  parameter int unsigned WA = 4,
  parameter int unsigned WB = 4
) (
  input  logic [WA-1:0] a_i,
  input  logic [WB-1:0] b_i,
  output logic          r1_o,
  output logic          r2_o,
  output logic          err_o
);

  assign r1_o  = ^a_i;
  assign r2_o  = ^b_i;
  assign err_o = r1_o ^ r2_o;

endmodule
