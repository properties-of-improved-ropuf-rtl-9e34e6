// tb_ro_pair_measure: drives four RO inputs with fixed testbench clocks and
// measures several pairs with 10-bit counters. For each pair it checks that
// the faster RO's overflow flag is the one set, that the result is
// 2^10 * T_fast / T_slow to within one count, that both counters stop after
// the overflow, and that dropping `enable` pauses counting.
`timescale 1ps / 1ps
module tb_ro_pair_measure;
  localparam int N = 4;
  localparam int W = 10;
  localparam int SW = 2;
  localparam int PER[N] = '{7000, 9100, 5300, 8000};

  logic [N-1:0] ro = '0;
  logic [SW-1:0] sel0, sel1;
  logic enable = 0, clr = 0;
  logic [W-1:0] result, q0, q1;
  logic ovf0, ovf1, done;
  int checks = 0, failures = 0;

  ro_pair_measure #(.N_RO(N), .CNT_W(W)) dut (
    .ro(ro), .sel0(sel0), .sel1(sel1), .enable(enable), .clr(clr),
    .result(result), .q0(q0), .q1(q1), .ovf0(ovf0), .ovf1(ovf1), .done(done));

  for (genvar g = 0; g < N; g++) begin : g_clk
    always #(PER[g] / 2) ro[g] = ~ro[g];
  end

  initial begin
    #1_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int a, input int b, input bit pause);
    real ratio;
    int expv, got;
    logic exp_ovf0;
    sel0 = SW'(a);
    sel1 = SW'(b);
    clr = 0;
    #1_000;
    clr = 1;
    #20_000;
    clr = 0;
    #1_000;
    enable = 1;
    if (pause) begin
      logic [W-1:0] h0, h1;
      #200_000;
      enable = 0;
      #20_000;
      h0 = q0; h1 = q1;
      #200_000;
      checks++;
      if (q0 !== h0 || q1 !== h1) begin failures++; $display("counting went on with enable low"); end
      enable = 1;
    end
    wait (done);
    #50_000;
    exp_ovf0 = PER[a] < PER[b];
    ratio = (PER[a] < PER[b]) ? real'(PER[a]) / real'(PER[b]) : real'(PER[b]) / real'(PER[a]);
    expv = int'(real'(1 << W) * ratio);
    got = int'(result);
    checks++;
    if (ovf0 !== exp_ovf0 || ovf1 !== !exp_ovf0) begin
      failures++; $display("pair (%0d,%0d): ovf0=%b ovf1=%b", a, b, ovf0, ovf1);
    end
    checks++;
    if (got < expv - 1 || got > expv + 1) begin
      failures++; $display("pair (%0d,%0d): result %0d expected %0d", a, b, got, expv);
    end
    begin
      logic [W-1:0] h0, h1;
      h0 = q0; h1 = q1;
      #300_000;
      checks++;
      if (q0 !== h0 || q1 !== h1) begin failures++; $display("counters did not stop after overflow"); end
    end
    enable = 0;
    clr = 1;
    #5_000;
    checks++;
    if (done || q0 != 0 || q1 != 0) begin failures++; $display("clear failed"); end
    $display("pair (%0d,%0d): result %0d (expected %0d)", a, b, got, expv);
  endtask

  initial begin
    sel0 = 0; sel1 = 1;
    #30_000;
    measure(0, 1, 0);
    measure(1, 0, 0);
    measure(2, 3, 1);
    measure(3, 2, 0);
    measure(0, 3, 0);
    measure(1, 2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
