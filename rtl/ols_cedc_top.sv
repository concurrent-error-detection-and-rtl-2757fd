// ols_cedc_top -- SEC-OLS memory protection path with concurrent error
// detection and correction of the encoder and the syndrome computation.
//
// Write side: the self-correcting encoder turns the data word into 2M check
// bits that are stored next to the data (the memory array is outside this
// module). Read side: the self-correcting syndrome computation recomputes
// the syndrome from the data and check bits read back, and the one-step
// majority-logic corrector repairs a single erroneous data bit. The
// checker flags of both halves (e for the encoder, f for the syndrome) are
// brought out; a 1 means an internal fault was seen and the duplicate's
// result was used instead. Placing both protected circuits around an
// external memory follows the intended use of the scheme; the port names,
// the exposed checker rails and the corrector are choices of this design.
//
// Interface:
//   wr_data_i (M*M) -> wr_check_o (2M), enc_err_o (e),
//     enc_rails_o ({r2, r1} of the encoder checker)
//   rd_data_i (M*M), rd_check_i (2M) -> rd_data_o (corrected, M*M),
//     rd_synd_o (2M), rd_err_o (stored word had an error), synd_fault_o (f),
//     synd_rails_o ({r2, r1} of the syndrome checker)
// Purely combinational; registering at the memory boundary is left to the
// surrounding design.
module ols_cedc_top #(
  parameter int unsigned M = ols_pkg::M_DEFAULT
) (
  input  logic [M*M-1:0] wr_data_i,
  output logic [2*M-1:0] wr_check_o,
  output logic           enc_err_o,
  output logic [1:0]     enc_rails_o,
  input  logic [M*M-1:0] rd_data_i,
  input  logic [2*M-1:0] rd_check_i,
  output logic [M*M-1:0] rd_data_o,
  output logic [2*M-1:0] rd_synd_o,
  output logic           rd_err_o,
  output logic           synd_fault_o,
  output logic [1:0]     synd_rails_o
);

  ols_cedc_encoder #(.M(M)) u_encoder (
    .data_i (wr_data_i),
    .check_o(wr_check_o),
    .err_o  (enc_err_o),
    .r1_o   (enc_rails_o[0]),
    .r2_o   (enc_rails_o[1])
  );

  ols_cedc_syndrome #(.M(M)) u_syndrome (
    .data_i (rd_data_i),
    .check_i(rd_check_i),
    .synd_o (rd_synd_o),
    .err_o  (synd_fault_o),
    .r1_o   (synd_rails_o[0]),
    .r2_o   (synd_rails_o[1])
  );

  ols_mld_corrector #(.M(M)) u_corrector (
    .data_i(rd_data_i),
    .synd_i(rd_synd_o),
    .data_o(rd_data_o),
    .err_o (rd_err_o)
  );

endmodule
