// rs_flipflop: set/reset flip-flop that remembers a counter overflow.
//
// A rising edge on `s` (the counter's OF output) sets q; a high level on `r`
// clears it asynchronously and has priority. qn is the complement. In the
// measurement circuit the two qn outputs stop both counters as soon as one
// of them overflows, and the q outputs steer the result multiplexer.
// Building the RS function from an edge-triggered set with asynchronous
// clear (so that it maps to one FPGA flip-flop) is an own choice.
`timescale 1ps / 1ps
module rs_flipflop (
  input  logic s,
  input  logic r,
  output logic q,
  output logic qn
);

  always_ff @(posedge s or posedge r) begin
    if (r) q <= 1'b0;
    else q <= 1'b1;
  end

  assign qn = ~q;

endmodule
