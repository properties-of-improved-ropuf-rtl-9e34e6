// ro_counter: CNT_W-bit counter clocked directly by a ring oscillator.
//
// This is Counter 1 / Counter 2 of the measurement circuit (pins C, CE, CLR,
// Q, OF). On every rising edge of the RO clock `c` while `ce` is high the
// count q increments. When it wraps from all ones to zero, i.e. after
// 2^CNT_W counted edges, the overflow flag `of` goes high and stays high
// until `clr`. `clr` is asynchronous, since the RO clock may be stopped
// while the counter is cleared. The wrap-to-zero overflow and the sticky
// flag are this design's reading of the OF pin; the document does not spell
// them out.
`timescale 1ps / 1ps
module ro_counter #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             c,
  input  logic             ce,
  input  logic             clr,
  output logic [CNT_W-1:0] q,
  output logic             of
);

  always_ff @(posedge c or posedge clr) begin
    if (clr) begin
      q  <= '0;
      of <= 1'b0;
    end else if (ce) begin
      q <= q + 1'b1;
      if (&q) of <= 1'b1;
    end
  end

endmodule
