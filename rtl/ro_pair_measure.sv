// ro_pair_measure: the measurement circuit for one pair of ring oscillators.
//
// Two multiplexers route RO sel0 and RO sel1 to the clock inputs of
// Counter 1 and Counter 2. Both counters count while `enable` is high and
// neither RS flip-flop is set. The overflow (OF) output of each counter sets
// its RS flip-flop; as soon as either flip-flop is set the clock enables of
// both counters drop, which stops the measurement. The result multiplexer
// then passes the value of the counter that did not overflow:
//   result = 2^CNT_W * f_slow / f_fast   (to within one count).
// `clr` clears both counters and both RS flip-flops asynchronously.
//
// Structure and pin names follow the reference measurement circuit. Two
// details are own choices: the stop condition is written as plain logic
// (counting allowed = enable and no overflow flag set), and the two overflow
// flags and both raw counter values are also brought out (ovf0, ovf1, q0,
// q1) so a controller can see when the measurement has ended.
//
// Timing: everything here is asynchronous to the system clock. The counters
// run on the RO clocks; `done` (= ovf0 | ovf1) must be synchronised by the
// reader, after which result is stable.
`timescale 1ps / 1ps
module ro_pair_measure #(
  parameter int unsigned N_RO  = 300,
  parameter int unsigned CNT_W = 16,
  parameter int unsigned SEL_W = (N_RO > 1) ? $clog2(N_RO) : 1
) (
  input  logic [N_RO-1:0]  ro,
  input  logic [SEL_W-1:0] sel0,
  input  logic [SEL_W-1:0] sel1,
  input  logic             enable,
  input  logic             clr,
  output logic [CNT_W-1:0] result,
  output logic [CNT_W-1:0] q0,
  output logic [CNT_W-1:0] q1,
  output logic             ovf0,
  output logic             ovf1,
  output logic             done
);

  logic f_ro_i, f_ro_j;
  logic of0, of1;
  logic ovf0_n, ovf1_n;
  logic ce;

  ro_mux #(.N_RO(N_RO), .SEL_W(SEL_W)) u_mux0 (.ro(ro), .sel(sel0), .y(f_ro_i));
  ro_mux #(.N_RO(N_RO), .SEL_W(SEL_W)) u_mux1 (.ro(ro), .sel(sel1), .y(f_ro_j));

  // Counting is allowed only while enabled and before any overflow.
  assign ce = enable & ovf0_n & ovf1_n;

  ro_counter #(.CNT_W(CNT_W)) u_cnt0 (.c(f_ro_i), .ce(ce), .clr(clr), .q(q0), .of(of0));
  ro_counter #(.CNT_W(CNT_W)) u_cnt1 (.c(f_ro_j), .ce(ce), .clr(clr), .q(q1), .of(of1));

  rs_flipflop u_rs0 (.s(of0), .r(clr), .q(ovf0), .qn(ovf0_n));
  rs_flipflop u_rs1 (.s(of1), .r(clr), .q(ovf1), .qn(ovf1_n));

  result_mux #(.CNT_W(CNT_W)) u_res (
    .res0  (q0),
    .res1  (q1),
    .s0    (ovf0),
    .s1    (ovf1),
    .result(result)
  );

  assign done = ovf0 | ovf1;

endmodule
