// gray_encoder: binary to Gray code conversion of a counter value.
//
// With bit positions numbered from the MSB (position 1) the rule is
// g_1 = b_1 and g_i = b_i xor b_(i-1), i.e. every Gray bit is the binary
// bit xor its more significant neighbour. Consecutive values then differ in
// one bit only, so a counter value that crosses a power-of-two boundary
// between two measurements no longer flips a whole run of selected bits.
// Purely combinational.
`timescale 1ps / 1ps
module gray_encoder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] bin,
  output logic [WIDTH-1:0] gray
);

  always_comb begin
    gray[WIDTH-1] = bin[WIDTH-1];
    for (int i = WIDTH - 2; i >= 0; i--) gray[i] = bin[i] ^ bin[i+1];
  end

endmodule
