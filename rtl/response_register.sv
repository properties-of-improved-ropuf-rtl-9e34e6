// response_register: assembles the PUF response from the bits of all pairs.
//
// The SEL_W bits of pair k are written into slot k; the slots are
// concatenated with pair 0 at the most significant end, so the response
// reads pair 0, pair 1, ... from left to right. The response is at most
// NUM_PAIRS * SEL_W bits (C(n,2) * w when every possible pair of n ROs is
// used). `clear` zeroes all slots. Writes take effect on the rising edge of
// `clk`; the response is a plain register output.
`timescale 1ps / 1ps
module response_register #(
  parameter int unsigned NUM_PAIRS = 450,
  parameter int unsigned SEL_W     = 4,
  parameter int unsigned ADDR_W    = (NUM_PAIRS > 1) ? $clog2(NUM_PAIRS) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       we,
  input  logic [ADDR_W-1:0]          waddr,
  input  logic [SEL_W-1:0]           wbits,
  output logic [NUM_PAIRS*SEL_W-1:0] response
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      response <= '0;
    end else if (clear) begin
      response <= '0;
    end else if (we) begin
      for (int k = 0; k < NUM_PAIRS; k++) begin
        if (waddr == ADDR_W'(k)) response[(NUM_PAIRS-1-k)*SEL_W+:SEL_W] <= wbits;
      end
    end
  end

endmodule
