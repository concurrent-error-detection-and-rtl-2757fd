// tb_ols_check_gen -- self-checking testbench for ols_check_gen.
//
// At the default size (k = 16) every one of the 65,536 data words is applied
// and each check bit is compared with the parity-check matrix of the k = 16,
// t = 1 code written out row by row below (rows of M1 and M2, d1 leftmost).
// A second instance at m = 8 (k = 64) is checked against the reference
// model on random words. A watchdog ends the run if it stalls.
module tb_ols_check_gen;
  import tb_ols_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // H-matrix rows for k = 16 (data part), leftmost character = d1.
  localparam string HROWS [8] = '{
    "1111000000000000", "0000111100000000", "0000000011110000", "0000000000001111",
    "1000100010001000", "0100010001000100", "0010001000100010", "0001000100010001"};

  logic [15:0] d4;  logic [7:0]  c4;
  logic [63:0] d8;  logic [15:0] c8;
  logic [15:0] row_mask [8];

  ols_check_gen #(.M(4)) dut4 (.data_i(d4), .check_o(c4));
  ols_check_gen #(.M(8)) dut8 (.data_i(d8), .check_o(c8));

  initial begin
    for (int r = 0; r < 8; r++)
      for (int j = 0; j < 16; j++)
        row_mask[r][j] = (HROWS[r][j] == "1");

    for (int v = 0; v < 65536; v++) begin
      d4 = 16'(v);
      #1;
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (c4[r] !== ^(d4 & row_mask[r])) begin
          failures++;
          if (failures < 10) $display("FAIL k=16 d=%h c%0d=%b", d4, r+1, c4[r]);
        end
      end
    end

    for (int n = 0; n < 2000; n++) begin
      d8 = rand_data(8)[63:0];
      #1;
      checks++;
      if (c8 !== ref_check(8, data_t'(d8))[15:0]) begin
        failures++;
        if (failures < 10) $display("FAIL k=64 d=%h c=%h exp=%h", d8, c8, ref_check(8, data_t'(d8))[15:0]);
      end
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
