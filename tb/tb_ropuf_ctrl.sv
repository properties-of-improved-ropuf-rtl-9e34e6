// tb_ropuf_ctrl: runs the controller for 6 ROs and 9 pairs against a
// stand-in for the measurement circuit that reports "done" a random number
// of cycles after enable. Checks the pair sequence (i, i+1) then (i, i+3),
// that only the two selected ROs are switched on, the clear/enable/write
// protocol, the settle time, the write latency after done (3 cycles), the
// number of writes and a second run after a new start.
`timescale 1ps / 1ps
module tb_ropuf_ctrl;
  localparam int N = 6, P = 9, SETTLE = 3;
  localparam int SW = 3, AW = 4;
  logic clk = 0, rst_n = 0, start = 0, meas_done = 0;
  logic [N-1:0] ro_en;
  logic [SW-1:0] sel0, sel1;
  logic meas_clr, meas_enable, wr_en, resp_clear, busy, done;
  logic [AW-1:0] wr_addr;
  int checks = 0, failures = 0;
  int writes = 0, cycle = 0, done_cycle = 0, clr_cycles = 0, run_delay = 0, runs = 0;

  ropuf_ctrl #(.N_RO(N), .NUM_PAIRS(P), .SETTLE_CYCLES(SETTLE)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .meas_done(meas_done), .ro_en(ro_en),
    .sel0(sel0), .sel1(sel1), .meas_clr(meas_clr), .meas_enable(meas_enable), .wr_en(wr_en),
    .wr_addr(wr_addr), .resp_clear(resp_clear), .busy(busy), .done(done));

  always #5000 clk = ~clk;

  // measurement stand-in: done a random time after enable, cleared by clr
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (meas_clr) begin
      meas_done <= 0;
      run_delay <= 5 + $urandom % 20;
    end else if (meas_enable && !meas_done) begin
      if (run_delay == 0) begin meas_done <= 1; done_cycle <= cycle + 1; end
      else run_delay <= run_delay - 1;
    end
  end

  // protocol checks on every cycle
  always @(negedge clk) begin
    if (rst_n && busy) begin
      int a, b;
      logic [N-1:0] exp_en;
      if (meas_clr) clr_cycles++;
      a = (writes < N) ? writes : writes - N;
      b = (writes < N) ? (a + 1) % N : a + N / 2;
      checks++;
      if (int'(sel0) != a || int'(sel1) != b) begin
        failures++; $display("pair %0d: sel %0d,%0d expected %0d,%0d", writes, sel0, sel1, a, b);
      end
      exp_en = '0; exp_en[a] = 1; exp_en[b] = 1;
      if (!meas_clr || clr_cycles > 1) begin
        checks++;
        if (ro_en !== exp_en) begin failures++; $display("pair %0d: ro_en %b expected %b", writes, ro_en, exp_en); end
      end
      if (meas_enable && meas_clr) begin failures++; $display("enable while clear"); end
    end
    if (wr_en) begin
      checks += 4;
      if (int'(wr_addr) != writes) begin failures++; $display("write addr %0d expected %0d", wr_addr, writes); end
      if (meas_enable) begin failures++; $display("write while counting"); end
      if (cycle - done_cycle != 3) begin failures++; $display("write %0d cycles after done", cycle - done_cycle); end
      if (clr_cycles != SETTLE) begin failures++; $display("clear held %0d cycles, expected %0d", clr_cycles, SETTLE); end
      clr_cycles = 0;
      writes++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    checks++;
    if (busy || done || ro_en != 0) begin failures++; $display("not idle after reset"); end
    for (runs = 0; runs < 2; runs++) begin
      writes = 0;
      clr_cycles = 0;
      @(negedge clk);
      start = 1;
      #1;
      checks++;
      if (!resp_clear) begin failures++; $display("no response clear at start"); end
      @(negedge clk);
      start = 0;
      wait (done);
      repeat (2) @(negedge clk);  // ro_en is a registered output
      checks += 2;
      if (writes != P) begin failures++; $display("%0d writes, expected %0d", writes, P); end
      if (busy || ro_en != 0) begin failures++; $display("busy or ROs on after done"); end
      repeat (5) @(negedge clk);
      checks++;
      if (!done) begin failures++; $display("done not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
