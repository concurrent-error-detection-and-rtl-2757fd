// tb_ols_mld_corrector -- self-checking testbench for ols_mld_corrector.
//
// Code words are made with the reference encoder. With a correct syndrome
// (from the reference model) the corrector must return the original data
// for: no error, any single data-bit error, any single check-bit error. The
// error flag must be 0 only for the error-free word.
module tb_ols_mld_corrector;
  import tb_ols_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] d_in, d_out;
  logic [7:0]  synd;
  logic        err;

  ols_mld_corrector #(.M(4)) dut (.data_i(d_in), .synd_i(synd), .data_o(d_out), .err_o(err));

  task automatic apply(input logic [15:0] good, input logic [15:0] rd, input logic [7:0] c_rd,
                       input string what);
    d_in = rd;
    synd = ref_synd(4, data_t'(rd), check_t'(c_rd))[7:0];
    #1;
    checks += 2;
    if (d_out !== good) begin
      failures++;
      if (failures < 10) $display("FAIL %s rd=%h out=%h exp=%h", what, rd, d_out, good);
    end
    if (err !== (rd != good || c_rd != ref_check(4, data_t'(good))[7:0])) begin
      failures++;
      if (failures < 10) $display("FAIL %s err flag=%b", what, err);
    end
  endtask

  initial begin
    for (int n = 0; n < 300; n++) begin
      automatic logic [15:0] d = rand_data(4)[15:0];
      automatic logic [7:0]  c = ref_check(4, data_t'(d))[7:0];
      apply(d, d, c, "clean");
      for (int j = 0; j < 16; j++) apply(d, d ^ (16'd1 << j), c, "data error");
      for (int r = 0; r < 8; r++)  apply(d, d, c ^ (8'd1 << r), "check error");
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
