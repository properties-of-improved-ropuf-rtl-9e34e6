// tb_ro_counter: a 4-bit instance clocked by a testbench clock. Checks that
// it counts only with CE, that OF rises exactly when the 16th edge wraps the
// count to zero and then stays high, and that CLR clears asynchronously.
`timescale 1ps / 1ps
module tb_ro_counter;
  localparam int W = 4;
  logic c = 0, ce = 0, clr = 0;
  logic [W-1:0] q;
  logic of;
  int checks = 0, failures = 0;

  ro_counter #(.CNT_W(W)) dut (.c(c), .ce(ce), .clr(clr), .q(q), .of(of));

  always #5000 c = ~c;

  task automatic expect_state(input int exp_q, input logic exp_of, input string what);
    checks++;
    if (q !== W'(exp_q) || of !== exp_of) begin
      failures++;
      $display("%s: q=%0d of=%b, expected q=%0d of=%b", what, q, of, exp_q, exp_of);
    end
  endtask

  initial begin
    repeat (2000) @(posedge c);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000 clr = 1;
    repeat (3) @(negedge c);
    expect_state(0, 0, "in clear");
    clr = 0;
    repeat (3) @(negedge c);
    expect_state(0, 0, "ce low");
    ce = 1;
    for (int n = 1; n <= 15; n++) begin
      @(negedge c);
      expect_state(n, 0, "counting");
    end
    @(negedge c);
    expect_state(0, 1, "wrap sets OF");
    @(negedge c);
    expect_state(1, 1, "OF sticky");
    ce = 0;
    repeat (4) @(negedge c);
    expect_state(1, 1, "hold");
    // asynchronous clear in the middle of the clock high phase
    @(posedge c);
    #1000 clr = 1;
    #10;
    expect_state(0, 0, "async clear");
    @(negedge c);
    clr = 0;
    ce = 1;
    repeat (7) @(negedge c);
    expect_state(7, 0, "count after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
