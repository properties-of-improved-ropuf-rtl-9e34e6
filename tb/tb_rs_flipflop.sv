// tb_rs_flipflop: set by a rising edge of S, cleared by R, R wins when both
// are active, Qn always the complement of Q, state held between events.
`timescale 1ps / 1ps
module tb_rs_flipflop;
  logic s = 0, r = 0, q, qn;
  int checks = 0, failures = 0;

  rs_flipflop dut (.s(s), .r(r), .q(q), .qn(qn));

  task automatic expect_q(input logic e, input string what);
    checks++;
    if (q !== e || qn !== ~e) begin
      failures++;
      $display("%s: q=%b qn=%b expected q=%b", what, q, qn, e);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5 r = 1;
    #10 expect_q(0, "reset");
    r = 0; #10 expect_q(0, "idle after reset");
    s = 1; #10 expect_q(1, "set");
    s = 0; #10 expect_q(1, "hold after set");
    s = 1; #10 expect_q(1, "second set");
    s = 0; r = 1; #10 expect_q(0, "reset");
    r = 0; #10 expect_q(0, "hold after reset");
    r = 1; #5 s = 1; #10 expect_q(0, "reset wins over set");
    s = 0; r = 0; #10 expect_q(0, "hold");
    for (int i = 0; i < 50; i++) begin
      logic exp_q;
      exp_q = q;
      if ($urandom % 2) begin s = 1; #10 exp_q = 1; s = 0; #10; end
      if ($urandom % 3 == 0) begin r = 1; #10 exp_q = 0; r = 0; #10; end
      expect_q(exp_q, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
