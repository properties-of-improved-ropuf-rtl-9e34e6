// tb_ropuf_full: one complete readout of the PUF with every parameter at
// its default (300 ROs, 16-bit counters, 450 pairs, Gray positions 7-10,
// 1800 response bits), system clock 50 MHz.
//
// For every pair the stored raw value must be 2^16 * T_fast / T_slow of the
// two RO periods, recomputed here from the RO model's variation formula,
// within 3 counts, and the response slot must be the Gray-coded window of
// that value. The run time in clocks is compared with the sum of the
// expected measurement times, and both counters must have overflowed in
// some pairs (i.e. the faster RO was on either multiplexer).
`timescale 1ps / 1ps
module tb_ropuf_full;
  localparam int N = 300, W = 16, P = 450, POS = 10, SW = 4, AW = 9;
  localparam int SETTLE = 4;
  localparam int TCLK = 20_000;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy_a, done_a;
  logic [P*SW-1:0] resp_a;
  logic [AW-1:0] rd_addr = '0;
  logic [W-1:0] rd_a;
  int checks = 0, failures = 0;
  int n_ovf0 = 0, n_ovf1 = 0;

  ropuf_top dut_a (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy_a), .done(done_a),
    .response(resp_a), .rd_addr(rd_addr), .rd_data(rd_a));

  always #(TCLK / 2) clk = ~clk;

  always @(posedge dut_a.u_meas.ovf0) n_ovf0++;
  always @(posedge dut_a.u_meas.ovf1) n_ovf1++;

  function automatic int unsigned h32(input int unsigned x);
    int unsigned h = x;
    h ^= h >> 16; h *= 32'h7feb352d;
    h ^= h >> 15; h *= 32'h846ca68b;
    h ^= h >> 16;
    return h;
  endfunction

  function automatic int period_ps(input int idx, input int seed);
    return 2 * (5 * 800 + int'(h32(idx * 32'h9e3779b9 + seed) % 1000));
  endfunction

  function automatic void pair_of(input int k, output int a, output int b);
    if (k < N) begin a = k; b = (k + 1) % N; end
    else begin a = k - N; b = a + N / 2; end
  endfunction

  function automatic int expected_value(input int k, input int seed);
    int a, b, ta, tb;
    pair_of(k, a, b);
    ta = period_ps(a, seed);
    tb = period_ps(b, seed);
    if (ta < tb) return int'((real'(1 << W) * ta) / tb);
    return int'((real'(1 << W) * tb) / ta);
  endfunction

  function automatic logic [SW-1:0] ref_bits(input logic [W-1:0] v);
    logic [W-1:0] g;
    g = v ^ (v >> 1);
    return g[W-POS+:SW];
  endfunction

  // Check stored value and response slot of every pair of one chip.
  task automatic check_chip(input string name, input int seed, input logic [P*SW-1:0] resp);
    for (int k = 0; k < P; k++) begin
      int got, expv, d;
      logic [W-1:0] v;
      @(negedge clk);
      rd_addr = AW'(k);
      @(negedge clk);
      v = rd_a;
      got = int'(v);
      expv = expected_value(k, seed);
      d = (got - expv) % (1 << W);
      if (d < 0) d += (1 << W);
      if (d > (1 << W) / 2) d = (1 << W) - d;
      checks += 2;
      if (d > 3) begin failures++; $display("%s pair %0d: value %0d expected %0d", name, k, got, expv); end
      if (resp[(P-1-k)*SW+:SW] !== ref_bits(v)) begin
        failures++; $display("%s pair %0d: bits %b expected %b", name, k, resp[(P-1-k)*SW+:SW], ref_bits(v));
      end
    end
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, exp_cycles;
    exp_cycles = 0;
    for (int k = 0; k < P; k++) begin
      int a, b, tf;
      pair_of(k, a, b);
      tf = (period_ps(a, 1) < period_ps(b, 1)) ? period_ps(a, 1) : period_ps(b, 1);
      exp_cycles += SETTLE + 4 + int'((longint'(1 << W) * tf) / TCLK);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done_a) begin
      @(negedge clk);
      if (busy_a) cycles++;
    end
    checks++;
    if (cycles < exp_cycles - 2 * P || cycles > exp_cycles + 2 * P) begin
      failures++; $display("readout took %0d cycles, expected about %0d", cycles, exp_cycles);
    end
    $display("readout: %0d clock cycles (expected about %0d)", cycles, exp_cycles);
    check_chip("chip", 1, resp_a);
    $display("response: %h", resp_a);
    $display("mechanisms: counter1 overflow %0d, counter2 overflow %0d", n_ovf0, n_ovf1);
    checks += 2;
    if (n_ovf0 == 0) begin failures++; $display("counter 1 never overflowed"); end
    if (n_ovf1 == 0) begin failures++; $display("counter 2 never overflowed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
