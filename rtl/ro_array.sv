// ro_array: BEHAVIOURAL MODEL of the bank of N_RO ring oscillators (not
// synthesizable).
//
// Each real RO is a combinational loop of one enable gate followed by
// inverters, STAGES elements in all (five as drawn in the reference
// circuit; seven-stage rings behave alike). Such a loop only oscillates in
// silicon, so every ring is modelled by a delay: while en[i] is high, ro[i]
// toggles every STAGES * STAGE_DELAY_PS + v_i picoseconds, where
// v_i = ropuf_pkg::ro_variation_ps(i, SEED) (0 .. 999 ps) stands for the
// random manufacturing differences between the ROs of one chip, and SEED
// stands for the chip. The ROs need not be mutually symmetric, as in the
// reference design. An optional uniform jitter of +/- JITTER_PS per half
// period (an xorshift32 sequence per ring) makes repeated measurements
// differ slightly. While en[i] is low the ring rests with its output low.
//
// Every RO has its own enable so that only the two ROs of the pair being
// measured run. The delay values, the jitter, the resting level and the
// per-RO enables are this model's own choices; the document gives only the
// ring's structure. Idle rings wait for a change of the whole enable vector.
//
// Interface: en[i] enables RO i, ro[i] is its output.
`timescale 1ps / 1ps
module ro_array
  import ropuf_pkg::*;
#(
  parameter int unsigned N_RO           = N_RO_DEFAULT,
  parameter int unsigned SEED           = 1,
  parameter int unsigned JITTER_PS      = 20,
  parameter int unsigned STAGES         = RO_STAGES,
  parameter int unsigned STAGE_DELAY_PS = RO_STAGE_DELAY_PS
) (
  input  logic [N_RO-1:0] en,
  output logic [N_RO-1:0] ro
);

  for (genvar g = 0; g < N_RO; g++) begin : g_ro
    localparam int unsigned HALF_PS = STAGES * STAGE_DELAY_PS + ro_variation_ps(g, SEED);

    logic        osc;
    int unsigned noise;
    int unsigned delay_ps;

    initial begin
      osc   = 1'b0;
      noise = mix32(g + 32'h1000 * SEED + 7) | 1;
    end

    always begin
      if (!en[g]) begin
        osc = 1'b0;
        @(en);
      end else begin
        // xorshift32 noise source for the period jitter
        noise = noise ^ (noise << 13);
        noise = noise ^ (noise >> 17);
        noise = noise ^ (noise << 5);
        if (JITTER_PS == 0) delay_ps = HALF_PS;
        else delay_ps = HALF_PS - JITTER_PS + (noise % (2 * JITTER_PS + 1));
        #(delay_ps);
        if (en[g]) osc = ~osc;
      end
    end

    assign ro[g] = osc;
  end

endmodule
