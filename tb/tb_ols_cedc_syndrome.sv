// tb_ols_cedc_syndrome -- self-checking testbench for ols_cedc_syndrome
// (k = 16, t = 1).
//
// Stored words are made from the reference encoder and then given no
// error, a single data-bit error, a single check-bit error or random bits,
// so the syndrome under test is zero and non-zero alike. For each word:
//   * fault-free: syndrome equals the reference, f = 0, rails equal;
//   * stuck-at-0/1 on each syndrome bit of the original syndrome generator
//     (injected with force): output still equals the reference and f is 1
//     exactly when the stuck value differs from the correct bit;
//   * stuck-at on either checker rail: output still correct, f follows the
//     rail mismatch.
// Errors in the stored word alone must never raise f.
module tb_ols_cedc_syndrome;
  import tb_ols_ref_pkg::*;

  localparam int M = 4;

  int checks = 0, failures = 0, corrected = 0, masked = 0, nonzero = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [M*M-1:0] data;
  logic [2*M-1:0] check, synd, golden, forced;
  logic           err, r1, r2, rail_val;

  ols_cedc_syndrome #(.M(M)) dut (.data_i(data), .check_i(check), .synd_o(synd),
                                  .err_o(err), .r1_o(r1), .r2_o(r2));

  task automatic expect_out(input logic exp_err, input string what);
    checks += 2;
    if (synd !== golden) begin
      failures++;
      if (failures < 10) $display("FAIL %s d=%h c=%h s=%h exp=%h", what, data, check, synd, golden);
    end
    if (err !== exp_err) begin
      failures++;
      if (failures < 10) $display("FAIL %s d=%h c=%h f=%b exp=%b", what, data, check, err, exp_err);
    end
    if (exp_err) corrected++; else masked++;
  endtask

  initial begin
    for (int n = 0; n < 500; n++) begin
      automatic int ub = $urandom_range(M*M-1);
      data  = rand_data(M)[M*M-1:0];
      check = ref_check(M, data_t'(data))[2*M-1:0];
      case (n % 4)
        0: ;                                         // clean word
        1: data[ub] = ~data[ub];                     // single data error
        2: check[ub % (2*M)] = ~check[ub % (2*M)];   // single check error
        default: begin data = rand_data(M)[M*M-1:0]; check = rand_check(M)[2*M-1:0]; end
      endcase
      golden = ref_synd(M, data_t'(data), check_t'(check))[2*M-1:0];
      if (golden != '0) nonzero++;
      #1;
      expect_out(1'b0, "fault-free");
      checks++;
      if (r1 !== r2) failures++;

      for (int b = 0; b < 2*M; b++) begin
        for (int v = 0; v < 2; v++) begin
          forced    = golden;
          forced[b] = v[0];
          force dut.synd_orig = forced;
          #1;
          expect_out(golden[b] != v[0], "syndrome stuck-at");
          release dut.synd_orig;
        end
      end

      for (int v = 0; v < 2; v++) begin
        rail_val = v[0];
        force dut.r1_o = rail_val;
        #1;
        expect_out(rail_val != (^check), "rail r1 stuck-at");
        release dut.r1_o;
        force dut.r2_o = rail_val;
        #1;
        expect_out(rail_val != (^check), "rail r2 stuck-at");
        release dut.r2_o;
      end
      #1;
    end
    checks++;
    if (corrected == 0 || nonzero == 0) begin
      failures++;
      $display("FAIL corrected=%0d nonzero syndromes=%0d", corrected, nonzero);
    end
    $display("faults detected and corrected: %0d, without effect: %0d, non-zero syndromes: %0d",
             corrected, masked, nonzero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
