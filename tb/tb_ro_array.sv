// tb_ro_array: enables the ROs of an 8-RO bank one at a time, checks that
// only the enabled one runs and that its period is 2 * (5 * 800 ps + v) with
// v = hash(index, seed) mod 1000 ps, the variation formula recomputed here.
// A second bank of 7-stage rings with +/- 100 ps jitter must keep its mean
// period, and a disabled ring must rest low.
`timescale 1ps / 1ps
module tb_ro_array;
  localparam int N = 8;
  localparam int SEED = 3;
  logic [N-1:0] en = '0, ro;
  int checks = 0, failures = 0;
  int edges[N];
  time t_first[N], t_last[N];

  ro_array #(.N_RO(N), .SEED(SEED), .JITTER_PS(0)) dut (.en(en), .ro(ro));

  logic [1:0] en_j = '0, ro_j;
  int edges_j = 0;
  ro_array #(.N_RO(2), .SEED(5), .JITTER_PS(100), .STAGES(7), .STAGE_DELAY_PS(700)) dut_j (.en(en_j), .ro(ro_j));
  always @(posedge ro_j[1]) edges_j++;

  function automatic int unsigned h32(input int unsigned x);
    int unsigned h = x;
    h ^= h >> 16; h *= 32'h7feb352d;
    h ^= h >> 15; h *= 32'h846ca68b;
    h ^= h >> 16;
    return h;
  endfunction

  for (genvar g = 0; g < N; g++) begin : g_mon
    always @(posedge ro[g]) begin
      if (edges[g] == 0) t_first[g] = $time;
      t_last[g] = $time;
      edges[g]++;
    end
  end

  initial begin
    #1_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp_period;
    int unsigned periods[N];
    for (int i = 0; i < N; i++) begin
      for (int k = 0; k < N; k++) edges[k] = 0;
      en = '0;
      en[i] = 1'b1;
      #2_000_000;
      en = '0;
      #20_000;
      exp_period = 2 * (5 * 800 + (h32(i * 32'h9e3779b9 + SEED) % 1000));
      periods[i] = exp_period;
      checks++;
      if (edges[i] < 2 || (t_last[i] - t_first[i]) != time'(exp_period) * time'(edges[i] - 1)) begin
        failures++;
        $display("RO %0d: %0d edges, span %0t, expected period %0d", i, edges[i], t_last[i] - t_first[i], exp_period);
      end
      for (int k = 0; k < N; k++) begin
        if (k != i) begin
          checks++;
          if (edges[k] != 0) begin failures++; $display("RO %0d ran while RO %0d was selected", k, i); end
        end
      end
    end
    // jittered 7-stage ring 1 of seed 5: mean period 2 * (7 * 700 + v)
    en_j = 2'b10;
    #10_000_000;
    en_j = 2'b00;
    #20_000;
    begin
      int exp_edges;
      exp_edges = 10_000_000 / (2 * (7 * 700 + int'(h32(1 * 32'h9e3779b9 + 5) % 1000)));
      checks++;
      if (edges_j < exp_edges - 4 || edges_j > exp_edges + 4) begin
        failures++; $display("jittered ring: %0d edges, expected about %0d", edges_j, exp_edges);
      end
      checks++;
      if (ro_j !== 2'b00 || ro !== '0) begin failures++; $display("disabled ring not resting low"); end
    end
    // the periods must differ between ROs (process variation)
    checks++;
    begin
      int same = 0;
      for (int i = 1; i < N; i++) if (periods[i] == periods[0]) same++;
      if (same == N - 1) begin failures++; $display("all ROs have the same period"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
