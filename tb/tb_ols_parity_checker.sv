// tb_ols_parity_checker -- self-checking testbench for ols_parity_checker.
//
// Applies random rails of 4 + 4 bits (the encoder's split at k = 16) and
// 8 + 8 bits (the syndrome checker at k = 16) and compares r1, r2 and the
// error flag with parities counted bit by bit. Both outcomes of the error
// flag must occur.
module tb_ols_parity_checker;
  int checks = 0, failures = 0, n_err = 0, n_ok = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] a4, b4;  logic r1a, r2a, ea;
  logic [7:0] a8, b8;  logic r1b, r2b, eb;

  ols_parity_checker #(.WA(4), .WB(4)) dut_a (.a_i(a4), .b_i(b4), .r1_o(r1a), .r2_o(r2a), .err_o(ea));
  ols_parity_checker #(.WA(8), .WB(8)) dut_b (.a_i(a8), .b_i(b8), .r1_o(r1b), .r2_o(r2b), .err_o(eb));

  function automatic logic count_odd(input logic [7:0] v);
    int ones = 0;
    for (int i = 0; i < 8; i++) ones += int'(v[i]);
    return logic'(ones % 2);
  endfunction

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      a8 = 8'($urandom());  b8 = 8'($urandom());
      #1;
      checks += 2;
      if ({r1a, r2a, ea} !== {count_odd({4'b0, a4}), count_odd({4'b0, b4}),
                              count_odd({4'b0, a4}) != count_odd({4'b0, b4})}) failures++;
      if ({r1b, r2b, eb} !== {count_odd(a8), count_odd(b8), count_odd(a8) != count_odd(b8)}) failures++;
      if (ea) n_err++; else n_ok++;
    end
    checks++;
    if (n_err == 0 || n_ok == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
