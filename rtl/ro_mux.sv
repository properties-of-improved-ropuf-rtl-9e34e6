// ro_mux: N_RO-to-1 multiplexer that routes one RO output to a counter clock.
//
// Two of these (select inputs sel0 and sel1 in the reference circuit) pick
// the two ROs of the pair being compared. Any RO can be routed to either
// counter, so a pair can be any two ROs. A select value of N_RO or above
// yields a constant low output (own choice).
//
// Interface: ro[N_RO] oscillator outputs, sel (binary RO index), y (selected
// RO). Purely combinational.
`timescale 1ps / 1ps
module ro_mux #(
  parameter int unsigned N_RO  = 300,
  parameter int unsigned SEL_W = (N_RO > 1) ? $clog2(N_RO) : 1
) (
  input  logic [N_RO-1:0]  ro,
  input  logic [SEL_W-1:0] sel,
  output logic             y
);

  always_comb begin
    if (32'(sel) < N_RO) y = ro[sel];
    else y = 1'b0;
  end

endmodule
