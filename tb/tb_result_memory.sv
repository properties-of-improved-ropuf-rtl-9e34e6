// tb_result_memory: 450 x 16 memory. Random writes and reads against a
// reference array, including the one-cycle read latency and a read of a
// word written in an earlier cycle.
`timescale 1ps / 1ps
module tb_result_memory;
  localparam int D = 450, W = 16, AW = 9;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model[D];
  bit valid[D];
  int checks = 0, failures = 0;

  result_memory #(.DEPTH(D), .CNT_W(W)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                                            .raddr(raddr), .rdata(rdata));
  always #5000 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word once
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = W'($urandom);
      model[a] = wdata; valid[a] = 1;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 3000; i++) begin
      int ra;
      ra = $urandom % D;
      @(negedge clk);
      raddr = AW'(ra);
      we = ($urandom % 2) == 1;
      waddr = AW'($urandom % D);
      wdata = W'($urandom);
      if (waddr == raddr) we = 0;
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== model[ra]) begin failures++; $display("addr %0d read %h expected %h", ra, rdata, model[ra]); end
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
