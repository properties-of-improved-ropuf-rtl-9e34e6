// tb_response_register: 10 pairs of 4 bits. Random slot writes are
// compared with a reference vector built with pair 0 at the left (most
// significant) end; clear and reset must zero it.
`timescale 1ps / 1ps
module tb_response_register;
  localparam int P = 10, W = 4, AW = 4;
  logic clk = 0, rst_n = 0, clear = 0, we = 0;
  logic [AW-1:0] waddr = '0;
  logic [W-1:0] wbits = '0;
  logic [P*W-1:0] response, model;
  int checks = 0, failures = 0;

  response_register #(.NUM_PAIRS(P), .SEL_W(W)) dut (.clk(clk), .rst_n(rst_n), .clear(clear), .we(we),
                                                     .waddr(waddr), .wbits(wbits), .response(response));
  always #5000 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (response !== '0) failures++;
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      clear = (i % 97) == 96;
      we = !clear && ($urandom % 4 != 0);
      waddr = AW'($urandom % P);
      wbits = W'($urandom);
      @(posedge clk);
      if (clear) model = '0;
      else if (we) begin
        for (int b = 0; b < W; b++) model[P*W-1 - (int'(waddr)*W) - (W-1-b)] = wbits[b];
      end
      #1;
      checks++;
      if (response !== model) begin failures++; $display("step %0d: %h expected %h", i, response, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
