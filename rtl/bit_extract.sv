// bit_extract: turns one measured counter value into SEL_W PUF bits.
//
// The value is Gray coded (gray_encoder) and SEL_W consecutive bits are
// taken, ending at position SEL_POS, where positions count from the MSB
// (1) to the LSB (CNT_W). The default, positions 7-10 of a 16-bit value,
// is the selection the reference design recommends with Gray code; the most
// significant selected position goes to the output MSB.
// Purely combinational.
`timescale 1ps / 1ps
module bit_extract #(
  parameter int unsigned CNT_W   = 16,
  parameter int unsigned SEL_POS = 10,
  parameter int unsigned SEL_W   = 4
) (
  input  logic [CNT_W-1:0] value,
  output logic [SEL_W-1:0] bits
);

  localparam int unsigned LSB = CNT_W - SEL_POS;

  logic [CNT_W-1:0] gray;

  gray_encoder #(.WIDTH(CNT_W)) u_gray (.bin(value), .gray(gray));

  assign bits = gray[LSB+:SEL_W];

  initial begin
    assert (SEL_POS >= SEL_W && SEL_POS <= CNT_W && SEL_W > 0)
    else $error("bit_extract: positions %0d-%0d outside a %0d-bit value",
                SEL_POS - SEL_W + 1, SEL_POS, CNT_W);
  end

endmodule
