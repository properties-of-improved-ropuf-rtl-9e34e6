// tb_ropuf_stats: statistics workload with 300 ROs and 16-bit counters,
// limited to the first 150 pairs so that it runs in under two minutes.
// Chip A (RO seed 1) is read out twice and chip B (seed 2) once, both
// with the default 20 ps RO jitter. From the raw counter values the
// testbench forms the Gray-coded windows 6-7, 7-8, 7-9, 7-10 and 8-9 and
// prints, for each, the bit error rate between the readouts of chip A and
// the Hamming distance between the chips, in the layout of the usual
// position-selection tables; the binary-coded 7-10 window is printed for
// comparison. The noise numbers reflect the RO model, not real silicon.
//
// Checks: the response port equals the Gray 7-10 bits of the raw values in
// every readout of both chips; every window has an inter-chip distance
// between 30 % and 70 % and a readout-to-readout error rate below it.
`timescale 1ps / 1ps
module tb_ropuf_stats;
  localparam int P = 150, W = 16, AW = 8, R = 2;
  localparam int NSEL = 5;
  localparam int SEL_LO[NSEL] = '{6, 7, 7, 7, 8};
  localparam int SEL_HI[NSEL] = '{7, 8, 9, 10, 9};

  logic clk = 0, rst_n = 0, start = 0;
  logic busy_a, done_a, busy_b, done_b;
  logic [P*4-1:0] resp_a, resp_b;
  logic [AW-1:0] rd_addr = '0;
  logic [W-1:0] rd_a, rd_b;
  logic [W-1:0] raw_a[R][P];
  logic [W-1:0] raw_b[P];
  int checks = 0, failures = 0;

  ropuf_top #(.NUM_PAIRS(P)) dut_a (.clk(clk), .rst_n(rst_n), .start(start), .busy(busy_a), .done(done_a),
                   .response(resp_a), .rd_addr(rd_addr), .rd_data(rd_a));
  ropuf_top #(.NUM_PAIRS(P), .RO_SEED(2)) dut_b (.clk(clk), .rst_n(rst_n), .start(start), .busy(busy_b), .done(done_b),
                   .response(resp_b), .rd_addr(rd_addr), .rd_data(rd_b));

  always #10_000 clk = ~clk;

  // Gray (or binary) bits at positions lo..hi (1 = MSB), lo in the MSB
  function automatic logic [15:0] window(input logic [W-1:0] v, input int lo, input int hi, input bit gray);
    logic [W-1:0] c;
    logic [15:0] r = '0;
    c = gray ? (v ^ (v >> 1)) : v;
    for (int p = lo; p <= hi; p++) r = {r[14:0], c[W-p]};
    return r;
  endfunction

  function automatic int window_hd(input logic [W-1:0] x, input logic [W-1:0] y, input int lo, input int hi, input bit gray);
    return $countones(window(x, lo, hi, gray) ^ window(y, lo, hi, gray));
  endfunction

  task automatic read_out(input int run);
    for (int k = 0; k < P; k++) begin
      @(negedge clk);
      rd_addr = AW'(k);
      @(negedge clk);
      raw_a[run][k] = rd_a;
      if (run == 0) raw_b[k] = rd_b;
      checks++;
      if (resp_a[(P-1-k)*4+:4] !== window(rd_a, 7, 10, 1)) begin
        failures++; $display("run %0d pair %0d: response slot differs from raw value", run, k);
      end
      if (run == 0) begin
        checks++;
        if (resp_b[(P-1-k)*4+:4] !== window(rd_b, 7, 10, 1)) begin
          failures++; $display("chip B pair %0d: response slot differs from raw value", k);
        end
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
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < R; run++) begin
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      if (run == 0) wait (done_a && done_b);
      else wait (done_a);
      read_out(run);
      $display("readout %0d done", run);
    end
    $display("positions  w   BER(A)    HD inter");
    for (int s = 0; s <= NSEL; s++) begin
      int lo, hi, w, e, d;
      bit g;
      real ber, inter;
      lo = (s < NSEL) ? SEL_LO[s] : 7;
      hi = (s < NSEL) ? SEL_HI[s] : 10;
      g = (s < NSEL);
      w = hi - lo + 1;
      e = 0;
      d = 0;
      for (int k = 0; k < P; k++) begin
        for (int run = 1; run < R; run++) e += window_hd(raw_a[run][k], raw_a[0][k], lo, hi, g);
        d += window_hd(raw_a[0][k], raw_b[k], lo, hi, g);
      end
      ber = 100.0 * e / real'((R - 1) * P * w);
      inter = 100.0 * d / real'(P * w);
      $display("%0d-%0d %s   %0d   %6.2f %%  %6.2f %%", lo, hi, g ? "Gray  " : "binary", w, ber, inter);
      if (g) begin
        checks += 2;
        if (inter < 30.0 || inter > 70.0) begin failures++; $display("inter-chip distance out of range"); end
        if (ber >= inter) begin failures++; $display("readouts of one chip differ as much as two chips"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
