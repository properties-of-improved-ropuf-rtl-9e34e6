// tb_ropuf_top: end-to-end run of the PUF at reduced size (10 ROs, 12-bit
// counters, 15 pairs, Gray positions 3-6, i.e. the same bits 9..6 that
// positions 7-10 give for 16-bit counters).
//
// Chip A (RO seed 1) is read out twice and chip B (seed 2) once. For every
// pair the stored raw value must be 2^12 * T_fast / T_slow of the two RO
// periods, recomputed here from the RO model's variation formula, within 3
// counts; the response slot must be the Gray-coded window of that value.
// The run time in clocks is compared with the sum of the expected
// measurement times. Mechanisms counted: overflow of counter 1, overflow of
// counter 2, restart after done; each must occur. The Hamming distances
// between the two readouts of chip A (intra) and between chips (inter) are
// printed; intra must be below inter.
`timescale 1ps / 1ps
module tb_ropuf_top;
  localparam int N = 10, W = 12, P = 15, POS = 6, SW = 4, AW = 4;
  localparam int SETTLE = 4;
  localparam int TCLK = 20_000;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy_a, done_a, busy_b, done_b;
  logic [P*SW-1:0] resp_a, resp_b, run1;
  logic [AW-1:0] rd_addr = '0;
  logic [W-1:0] rd_a, rd_b;
  int checks = 0, failures = 0;
  int n_ovf0 = 0, n_ovf1 = 0, n_restart = 0;

  ropuf_top #(.N_RO(N), .CNT_W(W), .NUM_PAIRS(P), .SEL_POS(POS), .SEL_W(SW), .RO_SEED(1)) dut_a (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy_a), .done(done_a),
    .response(resp_a), .rd_addr(rd_addr), .rd_data(rd_a));
  ropuf_top #(.N_RO(N), .CNT_W(W), .NUM_PAIRS(P), .SEL_POS(POS), .SEL_W(SW), .RO_SEED(2)) dut_b (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy_b), .done(done_b),
    .response(resp_b), .rd_addr(rd_addr), .rd_data(rd_b));

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
  task automatic check_chip(input string name, input int seed, input logic [P*SW-1:0] resp, input bit use_b);
    for (int k = 0; k < P; k++) begin
      int got, expv, d;
      logic [W-1:0] v;
      @(negedge clk);
      rd_addr = AW'(k);
      @(negedge clk);
      v = use_b ? rd_b : rd_a;
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
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, exp_cycles, hd_intra, hd_inter;
    exp_cycles = 0;
    for (int k = 0; k < P; k++) begin
      int a, b, tf;
      pair_of(k, a, b);
      tf = (period_ps(a, 1) < period_ps(b, 1)) ? period_ps(a, 1) : period_ps(b, 1);
      exp_cycles += SETTLE + 4 + (((1 << W) * tf) / TCLK);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      if (run == 1) n_restart++;
      cycles = 1;
      while (!(done_a && done_b)) begin
        @(negedge clk);
        if (busy_a) cycles++;
      end
      checks++;
      if (cycles < exp_cycles - 2 * P || cycles > exp_cycles + 2 * P) begin
        failures++; $display("run %0d took %0d cycles, expected about %0d", run, cycles, exp_cycles);
      end
      $display("run %0d: %0d clock cycles (expected about %0d)", run, cycles, exp_cycles);
      check_chip("chip A", 1, resp_a, 0);
      if (run == 0) begin
        check_chip("chip B", 2, resp_b, 1);
        run1 = resp_a;
      end
    end
    hd_intra = $countones(run1 ^ resp_a);
    hd_inter = $countones(resp_b ^ resp_a);
    $display("response A: %h", resp_a);
    $display("response B: %h", resp_b);
    $display("HD intra %0d of %0d bits, HD inter %0d of %0d bits", hd_intra, P * SW, hd_inter, P * SW);
    $display("mechanisms: counter1 overflow %0d, counter2 overflow %0d, restart %0d", n_ovf0, n_ovf1, n_restart);
    checks++;
    if (hd_intra >= hd_inter) begin failures++; $display("responses of one chip differ more than between chips"); end
    checks += 3;
    if (n_ovf0 == 0) begin failures++; $display("counter 1 never overflowed"); end
    if (n_ovf1 == 0) begin failures++; $display("counter 2 never overflowed"); end
    if (n_restart == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
