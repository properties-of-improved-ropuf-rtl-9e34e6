// sync2: two-flop synchroniser for a level that comes from the RO clock
// domain into the system clock domain. Output is low during reset and
// follows `d` two clock edges later.
`timescale 1ps / 1ps
module sync2 (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
