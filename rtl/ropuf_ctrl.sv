// ropuf_ctrl: system-clock controller that measures all RO pairs in turn.
//
// After `start` it clears the response and walks through NUM_PAIRS pairs.
// For each pair it
//   SETUP   : routes RO a to counter 1 and RO b to counter 2 (sel0, sel1),
//             switches those two ROs on (ro_en) and holds the counters and
//             RS flip-flops in clear for SETTLE_CYCLES cycles; clear is
//             raised only here, so every measurement starts with a rising
//             edge on the asynchronous clear;
//   RUN     : releases clear and raises `meas_enable` until the measurement
//             circuit reports, through a two-flop synchroniser, that one
//             counter has overflowed;
//   CAPTURE : drops `meas_enable` and pulses `wr_en` for one cycle with
//             wr_addr = pair index, so that the stopped result is stored.
// After the last pair `done` stays high until the next `start`.
//
// Pairing (own choice; the reference design uses 450 pairs of 300 ROs but
// does not list them): pairs 0 .. N_RO-1 are (i, i+1 mod N_RO); the next
// N_RO/2 pairs are (i, i+N_RO/2). Every RO is then in three pairs and no
// pair repeats, which requires NUM_PAIRS <= N_RO + N_RO/2.
//
// A measurement takes SETTLE_CYCLES + (2^CNT_W periods of the faster RO,
// in system clocks) + about 4 cycles of synchronisation and capture.
`timescale 1ps / 1ps
module ropuf_ctrl #(
  parameter int unsigned N_RO          = 300,
  parameter int unsigned NUM_PAIRS     = 450,
  parameter int unsigned SETTLE_CYCLES = 4,
  parameter int unsigned SEL_W         = (N_RO > 1) ? $clog2(N_RO) : 1,
  parameter int unsigned ADDR_W        = (NUM_PAIRS > 1) ? $clog2(NUM_PAIRS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              meas_done,    // asynchronous, from the RS flip-flops
  output logic [N_RO-1:0]   ro_en,
  output logic [SEL_W-1:0]  sel0,
  output logic [SEL_W-1:0]  sel1,
  output logic              meas_clr,
  output logic              meas_enable,
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic              resp_clear,
  output logic              busy,
  output logic              done
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_SETUP,
    S_RUN,
    S_CAPTURE,
    S_DONE
  } state_t;

  localparam int unsigned HALF = N_RO / 2;
  localparam int unsigned SC_W = (SETTLE_CYCLES > 1) ? $clog2(SETTLE_CYCLES + 1) : 1;

  state_t            state;
  logic [SEL_W-1:0]  ro_a, ro_b;
  logic              round2;
  logic [ADDR_W-1:0] pair_idx;
  logic [SC_W-1:0]   settle_cnt;
  logic              done_sync;

  sync2 u_sync (.clk(clk), .rst_n(rst_n), .d(meas_done), .q(done_sync));

  // Partner of RO a in the current pair.
  always_comb begin
    if (round2) ro_b = SEL_W'(32'(ro_a) + HALF);
    else if (32'(ro_a) == N_RO - 1) ro_b = '0;
    else ro_b = ro_a + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ro_a       <= '0;
      round2     <= 1'b0;
      pair_idx   <= '0;
      settle_cnt <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state      <= S_SETUP;
            ro_a       <= '0;
            round2     <= 1'b0;
            pair_idx   <= '0;
            settle_cnt <= '0;
          end
        end
        S_SETUP: begin
          if (32'(settle_cnt) >= SETTLE_CYCLES - 1) state <= S_RUN;
          else settle_cnt <= settle_cnt + 1'b1;
        end
        S_RUN: begin
          if (done_sync) state <= S_CAPTURE;
        end
        S_CAPTURE: begin
          settle_cnt <= '0;
          if (32'(pair_idx) == NUM_PAIRS - 1) begin
            state <= S_DONE;
          end else begin
            state    <= S_SETUP;
            pair_idx <= pair_idx + 1'b1;
            if (!round2 && 32'(ro_a) == N_RO - 1) begin
              round2 <= 1'b1;
              ro_a   <= '0;
            end else begin
              ro_a <= ro_a + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Only the two ROs of the current pair oscillate.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ro_en <= '0;
    else begin
      for (int i = 0; i < N_RO; i++) begin
        ro_en[i] <= (state == S_SETUP || state == S_RUN || state == S_CAPTURE) &&
                    (ro_a == SEL_W'(i) || ro_b == SEL_W'(i));
      end
    end
  end

  assign sel0        = ro_a;
  assign sel1        = ro_b;
  assign meas_clr    = (state == S_SETUP);
  assign meas_enable = (state == S_RUN);
  assign wr_en       = (state == S_CAPTURE);
  assign wr_addr     = pair_idx;
  assign resp_clear  = (state == S_IDLE || state == S_DONE) && start;
  assign busy        = (state != S_IDLE) && (state != S_DONE);
  assign done        = (state == S_DONE);

  initial begin
    assert (NUM_PAIRS >= 1 && NUM_PAIRS <= N_RO + HALF && N_RO >= 3)
    else $error("ropuf_ctrl: %0d pairs cannot be formed from %0d ROs", NUM_PAIRS, N_RO);
  end

endmodule
