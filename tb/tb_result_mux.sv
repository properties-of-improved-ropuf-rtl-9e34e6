// tb_result_mux: the value of the counter that did not overflow must be
// passed: res1 when only counter 1 overflowed (s0), res0 otherwise.
`timescale 1ps / 1ps
module tb_result_mux;
  logic [15:0] res0, res1, result;
  logic s0, s1;
  int checks = 0, failures = 0;

  result_mux dut (.res0(res0), .res1(res1), .s0(s0), .s1(s1), .result(result));

  initial begin
    #1_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] exp_r;
      res0 = 16'($urandom);
      res1 = 16'($urandom);
      {s1, s0} = 2'(i);
      #1;
      exp_r = (s0 == 1'b1 && s1 == 1'b0) ? res1 : res0;
      checks++;
      if (result !== exp_r) begin
        failures++;
        $display("s1s0=%b%b result=%h expected %h", s1, s0, result, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
