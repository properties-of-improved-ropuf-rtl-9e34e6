// tb_gray_encoder: exhaustive check of the 16-bit binary-to-Gray conversion.
// Every input value is compared with the positional rule g_1 = b_1,
// g_i = b_i xor b_(i-1) (position 1 = MSB), evaluated here bit by bit, and
// consecutive codes are checked to differ in exactly one bit.
`timescale 1ps / 1ps
module tb_gray_encoder;
  localparam int W = 16;
  logic [W-1:0] bin, gray, prev;
  int checks = 0, failures = 0;

  gray_encoder #(.WIDTH(W)) dut (.bin(bin), .gray(gray));

  function automatic logic [W-1:0] ref_gray(input logic [W-1:0] b);
    logic [W-1:0] g;
    // position p (1..W) lives at bit index W-p
    for (int p = 1; p <= W; p++) begin
      if (p == 1) g[W-p] = b[W-p];
      else g[W-p] = b[W-p] ^ b[W-p+1];
    end
    return g;
  endfunction

  initial begin
    #100_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = '0;
    for (int v = 0; v < (1 << W); v++) begin
      bin = W'(v);
      #1;
      checks++;
      if (gray !== ref_gray(bin)) begin
        failures++;
        if (failures < 10) $display("mismatch bin=%h gray=%h exp=%h", bin, gray, ref_gray(bin));
      end
      if (v > 0) begin
        checks++;
        if ($countones(gray ^ prev) != 1) begin
          failures++;
          if (failures < 10) $display("codes %h and %h differ in more than one bit", prev, gray);
        end
      end
      prev = gray;
    end
    // the document's 3-bit table: 100 -> 110, 111 -> 100 (checked on the MSBs)
    bin = 16'b1000_0000_0000_0000; #1; checks++;
    if (gray[15:13] !== 3'b110) failures++;
    bin = 16'b1110_0000_0000_0000; #1; checks++;
    if (gray[15:13] !== 3'b100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
