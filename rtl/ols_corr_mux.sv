// ols_corr_mux -- correction multiplexer of the CEDC scheme.
//
// A 2:1 word multiplexer: input 0 takes the bits of the original (checked)
// circuit, input 1 those of its duplicate, and the checker's error flag is
// the select. While the checker sees no error the original bits pass; when
// it flags an error the duplicate's bits replace them:
//   out = (~sel & in0) | (sel & in1).
//
// Interface: in0_i, in1_i, sel_i -> out_o, W bits wide. Combinational.
module ols_corr_mux #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] in0_i,
  input  logic [W-1:0] in1_i,
  input  logic         sel_i,
  output logic [W-1:0] out_o
);

  always_comb begin
    if (sel_i) out_o = in1_i;
    else       out_o = in0_i;
  end

endmodule
