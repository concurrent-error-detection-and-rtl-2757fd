// tb_ols_syndrome_gen -- self-checking testbench for ols_syndrome_gen.
//
// Random data/check pairs are compared with the reference syndrome. Then
// code words are built with the reference encoder and must give a zero
// syndrome; a single flipped data bit must set exactly its two checks and a
// flipped check bit exactly that check. Run at k = 16 and k = 64.
module tb_ols_syndrome_gen;
  import tb_ols_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] d4;  logic [7:0]  c4, s4;
  logic [63:0] d8;  logic [15:0] c8, s8;

  ols_syndrome_gen #(.M(4)) dut4 (.data_i(d4), .check_i(c4), .synd_o(s4));
  ols_syndrome_gen #(.M(8)) dut8 (.data_i(d8), .check_i(c8), .synd_o(s8));

  task automatic expect4(input check_t exp, input string what);
    checks++;
    if (s4 !== exp[7:0]) begin
      failures++;
      if (failures < 10) $display("FAIL k=16 %s d=%h c=%h s=%h exp=%h", what, d4, c4, s4, exp[7:0]);
    end
  endtask

  task automatic expect8(input check_t exp, input string what);
    checks++;
    if (s8 !== exp[15:0]) begin
      failures++;
      if (failures < 10) $display("FAIL k=64 %s d=%h c=%h s=%h exp=%h", what, d8, c8, s8, exp[15:0]);
    end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      d4 = rand_data(4)[15:0];  c4 = rand_check(4)[7:0];
      d8 = rand_data(8)[63:0];  c8 = rand_check(8)[15:0];
      #1;
      expect4(ref_synd(4, data_t'(d4), check_t'(c4)), "random");
      expect8(ref_synd(8, data_t'(d8), check_t'(c8)), "random");
    end
    // code words and single errors, k = 16
    for (int n = 0; n < 200; n++) begin
      automatic data_t d = rand_data(4);
      automatic int j = n % 16;
      d4 = d[15:0];  c4 = ref_check(4, d)[7:0];
      #1 expect4('0, "codeword");
      d4[j] = ~d4[j];
      #1 expect4(check_t'((32'd1 << (j / 4)) | (32'd1 << (4 + j % 4))), "data error");
      d4[j] = ~d4[j];  c4[n % 8] = ~c4[n % 8];
      #1 expect4(check_t'(32'd1 << (n % 8)), "check error");
    end
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
