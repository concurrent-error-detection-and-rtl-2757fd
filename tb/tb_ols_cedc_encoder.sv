// tb_ols_cedc_encoder -- self-checking testbench for ols_cedc_encoder
// (k = 16, t = 1).
//
// For random data words three situations are applied:
//   * fault-free: the output check bits must equal the reference encoding,
//     e must be 0 and the two rails equal;
//   * single stuck-at fault on one check bit of the original generator
//     (every bit, stuck-at-0 and stuck-at-1, injected with force): the
//     output must still be the reference encoding, and e must be 1 exactly
//     when the stuck value differs from the correct bit;
//   * stuck-at fault on one checker rail (r1 or r2): the output must still
//     be correct and e must follow the rail mismatch.
// The number of detected-and-corrected faults is counted and must be
// non-zero.
module tb_ols_cedc_encoder;
  import tb_ols_ref_pkg::*;

  localparam int M = 4;

  int checks = 0, failures = 0, corrected = 0, masked = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [M*M-1:0] data;
  logic [2*M-1:0] check, golden, forced;
  logic           err, r1, r2, rail_val;

  ols_cedc_encoder #(.M(M)) dut (.data_i(data), .check_o(check), .err_o(err), .r1_o(r1), .r2_o(r2));

  task automatic expect_out(input logic exp_err, input string what);
    checks += 2;
    if (check !== golden) begin
      failures++;
      if (failures < 10) $display("FAIL %s d=%h check=%h exp=%h", what, data, check, golden);
    end
    if (err !== exp_err) begin
      failures++;
      if (failures < 10) $display("FAIL %s d=%h e=%b exp=%b", what, data, err, exp_err);
    end
    if (exp_err) corrected++; else masked++;
  endtask

  initial begin
    for (int n = 0; n < 500; n++) begin
      data   = rand_data(M)[M*M-1:0];
      golden = ref_check(M, data_t'(data))[2*M-1:0];
      #1;
      expect_out(1'b0, "fault-free");
      checks++;
      if (r1 !== r2) failures++;

      // stuck-at faults on the original generator's outputs
      for (int b = 0; b < 2*M; b++) begin
        for (int v = 0; v < 2; v++) begin
          forced    = golden;
          forced[b] = v[0];
          force dut.check_orig = forced;
          #1;
          expect_out(golden[b] != v[0], "generator stuck-at");
          release dut.check_orig;
        end
      end

      // stuck-at faults on the checker rails
      for (int v = 0; v < 2; v++) begin
        rail_val = v[0];
        force dut.r1_o = rail_val;
        #1;
        expect_out(rail_val != (^golden[M-1:0]), "rail r1 stuck-at");
        release dut.r1_o;
        force dut.r2_o = rail_val;
        #1;
        expect_out(rail_val != (^golden[2*M-1:M]), "rail r2 stuck-at");
        release dut.r2_o;
      end
      #1;
    end
    checks++;
    if (corrected == 0) begin
      failures++;
      $display("FAIL no fault was ever detected and corrected");
    end
    $display("faults detected and corrected: %0d, faults without effect: %0d", corrected, masked);
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
