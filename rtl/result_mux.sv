// result_mux: picks the counter value that carries the PUF information.
//
// The faster RO of a pair fills its counter first and overflows, so the
// useful value, 2^CNT_W * f_slow / f_fast, is in the other counter. s0 / s1
// are the overflow flags of counter 1 / counter 2 (RS flip-flop outputs),
// res0 / res1 their values. If only counter 1 overflowed the result is res1,
// otherwise res0 (also when both overflowed at once, an own choice: both
// values are then zero). Purely combinational.
`timescale 1ps / 1ps
module result_mux #(
  parameter int unsigned CNT_W = 16
) (
  input  logic [CNT_W-1:0] res0,
  input  logic [CNT_W-1:0] res1,
  input  logic             s0,
  input  logic             s1,
  output logic [CNT_W-1:0] result
);

  assign result = (s0 && !s1) ? res1 : res0;

endmodule
