// tb_ols_corr_mux -- self-checking testbench for ols_corr_mux.
//
// Random words on both inputs with either select value; the output must be
// input 0 when the select is 0 and input 1 when it is 1.
module tb_ols_corr_mux;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] in0, in1, out;
  logic       sel;

  ols_corr_mux #(.W(8)) dut (.in0_i(in0), .in1_i(in1), .sel_i(sel), .out_o(out));

  initial begin
    for (int n = 0; n < 1000; n++) begin
      in0 = 8'($urandom());  in1 = 8'($urandom());  sel = n[0];
      #1;
      checks++;
      if (out !== (sel ? in1 : in0)) begin
        failures++;
        $display("FAIL sel=%b in0=%h in1=%h out=%h", sel, in0, in1, out);
      end
    end
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
