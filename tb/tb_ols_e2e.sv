// tb_ols_e2e -- end-to-end scenario for ols_cedc_top at a chosen code size,
// used by tb_ols_workloads to run the k = 64 and k = 256 codes.
//
// Same operations and checks as tb_ols_cedc_top: random writes through the
// encoder into a small array that stands in for the memory, single soft
// errors in the stored words, single stuck-at faults forced onto the
// original encoder generator, the original syndrome generator or a checker
// rail, and reads through the syndrome computation and majority-logic
// corrector. Reports its counts through the ports; done_o rises at the end.
module tb_ols_e2e #(
  parameter int M   = 8,
  parameter int OPS = 1000
) (
  output logic done_o,
  output int   checks_o,
  output int   failures_o
);
  import tb_ols_ref_pkg::*;

  localparam int K     = M*M;
  localparam int C     = 2*M;
  localparam int DEPTH = 32;

  int checks = 0, failures = 0;
  int n_enc_fix = 0, n_synd_fix = 0, n_rail = 0, n_data_fix = 0, n_chk_err = 0, n_clean = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [K-1:0] wr_data, rd_data, rd_data_out;
  logic [C-1:0] wr_check, rd_check, rd_synd;
  logic         enc_err, rd_err, synd_fault;
  logic [1:0]   enc_rails, synd_rails;

  logic [K-1:0] mem_data  [DEPTH];
  logic [K-1:0] mem_gold  [DEPTH];
  logic [C-1:0] mem_check [DEPTH];
  logic [C-1:0] forced;

  ols_cedc_top #(.M(M)) dut (
    .wr_data_i   (wr_data),
    .wr_check_o  (wr_check),
    .enc_err_o   (enc_err),
    .enc_rails_o (enc_rails),
    .rd_data_i   (rd_data),
    .rd_check_i  (rd_check),
    .rd_data_o   (rd_data_out),
    .rd_synd_o   (rd_synd),
    .rd_err_o    (rd_err),
    .synd_fault_o(synd_fault),
    .synd_rails_o(synd_rails)
  );

  task automatic check_eq(input logic ok, input string what, input int op);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL op %0d: %s", op, what);
    end
  endtask

  initial begin
    wr_data = '0;  rd_data = '0;  rd_check = '0;
    for (int op = 0; op < OPS; op++) begin
      automatic int     addr      = op % DEPTH;
      automatic int     enc_fault = $urandom_range(3);   // 0 none, 1 stuck check bit, 2 rail
      automatic int     syn_fault = $urandom_range(3);   // 0 none, 1 stuck syndrome bit, 2 rail
      automatic int     upset      = $urandom_range(2);   // 0 none, 1 data bit, 2 check bit
      automatic int     fb        = $urandom_range(C-1);
      automatic logic   fv        = logic'($urandom_range(1));
      automatic int     ub        = $urandom_range(K-1);   // upset bit position
      automatic logic [C-1:0] gold_c, gold_s;
      automatic logic   exp_e, exp_f;

      // ---- write through the encoder
      wr_data = rand_data(M)[K-1:0];
      gold_c  = ref_check(M, data_t'(wr_data))[C-1:0];
      exp_e   = 1'b0;
      if (enc_fault == 1) begin
        forced = gold_c;  forced[fb] = fv;
        force dut.u_encoder.check_orig = forced;
        exp_e = (fv != gold_c[fb]);
      end else if (enc_fault == 2) begin
        force dut.u_encoder.r1_o = fv;
        exp_e = (fv != ^gold_c[M-1:0]);
      end
      #1;
      check_eq(wr_check === gold_c, "stored check bits differ from the code", op);
      check_eq(enc_err === exp_e, "encoder error flag e", op);
      check_eq((enc_rails[0] ^ enc_rails[1]) === enc_err, "encoder rails disagree with e", op);
      if (enc_fault == 1 && exp_e) n_enc_fix++;
      if (enc_fault == 2 && exp_e) n_rail++;
      release dut.u_encoder.check_orig;
      release dut.u_encoder.r1_o;
      mem_data[addr]  = wr_data;
      mem_gold[addr]  = wr_data;
      mem_check[addr] = wr_check;

      // ---- soft error in the stored word
      if (upset == 1) mem_data[addr][ub] = ~mem_data[addr][ub];
      if (upset == 2) mem_check[addr][ub % C] = ~mem_check[addr][ub % C];

      // ---- read through the syndrome computation and corrector
      rd_data  = mem_data[addr];
      rd_check = mem_check[addr];
      gold_s   = ref_synd(M, data_t'(rd_data), check_t'(rd_check))[C-1:0];
      exp_f    = 1'b0;
      if (syn_fault == 1) begin
        forced = gold_s;  forced[fb] = ~fv;
        force dut.u_syndrome.synd_orig = forced;
        exp_f = (~fv != gold_s[fb]);
      end else if (syn_fault == 2) begin
        force dut.u_syndrome.r2_o = fv;
        exp_f = (fv != ^rd_check);
      end
      #1;
      check_eq(rd_synd === gold_s, "syndrome differs from reference", op);
      check_eq(synd_fault === exp_f, "syndrome error flag f", op);
      check_eq((synd_rails[0] ^ synd_rails[1]) === synd_fault, "syndrome rails disagree with f", op);
      check_eq(rd_data_out === mem_gold[addr], "read data not corrected", op);
      check_eq(rd_err === (upset != 0), "read error flag", op);
      if (syn_fault == 1 && exp_f) n_synd_fix++;
      if (syn_fault == 2 && exp_f) n_rail++;
      if (upset == 1) n_data_fix++;
      if (upset == 2) n_chk_err++;
      if (upset == 0 && syn_fault == 0 && enc_fault == 0) n_clean++;
      release dut.u_syndrome.synd_orig;
      release dut.u_syndrome.r2_o;
      #1;
    end

    $display("code size k = %0d:", K);
    $display("encoder faults corrected   : %0d", n_enc_fix);
    $display("syndrome faults corrected  : %0d", n_synd_fix);
    $display("checker rail faults        : %0d", n_rail);
    $display("data-bit errors corrected  : %0d", n_data_fix);
    $display("check-bit errors seen      : %0d", n_chk_err);
    $display("clean operations           : %0d", n_clean);
    check_eq(n_enc_fix  > 0, "no encoder fault was corrected", OPS);
    check_eq(n_synd_fix > 0, "no syndrome fault was corrected", OPS);
    check_eq(n_rail     > 0, "no checker rail fault was seen", OPS);
    check_eq(n_data_fix > 0, "no data-bit error was corrected", OPS);
    check_eq(n_chk_err  > 0, "no check-bit error was seen", OPS);
    check_eq(n_clean    > 0, "no clean operation", OPS);
    done_o = 1'b1;
  end

  assign checks_o   = checks;
  assign failures_o = failures;
  initial done_o = 1'b0;
endmodule
