// tb_ols_workloads -- runs the end-to-end scenario on the two larger code
// sizes of the evaluation: k = 64 (m = 8) and k = 256 (m = 16), t = 1.
// Both runs happen in parallel; the test passes when both finish with no
// failure. (k = 16 is covered by tb_ols_cedc_top at the default size.)
module tb_ols_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done8, done16;
  int   checks8, checks16, fail8, fail16;
  int   checks = 0, failures = 0;

  tb_ols_e2e #(.M(8),  .OPS(2000)) run_k64  (.done_o(done8),  .checks_o(checks8),  .failures_o(fail8));
  tb_ols_e2e #(.M(16), .OPS(2000)) run_k256 (.done_o(done16), .checks_o(checks16), .failures_o(fail16));

  initial begin
    wait (done8 && done16);
    checks   = checks8 + checks16;
    failures = fail8 + fail16;
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
