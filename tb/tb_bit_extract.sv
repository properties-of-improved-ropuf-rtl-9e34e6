// tb_bit_extract: checks the Gray-code bit window for three position
// selections of a 16-bit value (7-10, 7-9 and 7-8) with random and corner
// values. The reference converts to Gray code and picks positions here with
// its own loops.
`timescale 1ps / 1ps
module tb_bit_extract;
  localparam int W = 16;
  logic [W-1:0] value;
  logic [3:0] bits_a;
  logic [2:0] bits_b;
  logic [1:0] bits_c;
  int checks = 0, failures = 0;

  bit_extract dut_a (.value(value), .bits(bits_a));                                    // 7-10
  bit_extract #(.CNT_W(W), .SEL_POS(9), .SEL_W(3)) dut_b (.value(value), .bits(bits_b)); // 7-9
  bit_extract #(.CNT_W(W), .SEL_POS(8), .SEL_W(2)) dut_c (.value(value), .bits(bits_c)); // 7-8

  // Gray bit at position p (1 = MSB)
  function automatic logic gbit(input logic [W-1:0] v, input int p);
    if (p == 1) return v[W-1];
    return v[W-p] ^ v[W-p+1];
  endfunction

  // w bits ending at position pos, first position in the MSB of the result
  function automatic logic [7:0] ref_bits(input logic [W-1:0] v, input int pos, input int w);
    logic [7:0] r = '0;
    for (int m = 0; m < w; m++) r = {r[6:0], gbit(v, pos - w + 1 + m)};
    return r;
  endfunction

  task automatic check_one(input logic [W-1:0] v);
    value = v;
    #1;
    checks += 3;
    if (8'(bits_a) !== ref_bits(v, 10, 4)) begin failures++; $display("7-10 v=%h got %b", v, bits_a); end
    if (8'(bits_b) !== ref_bits(v, 9, 3)) begin failures++; $display("7-9 v=%h got %b", v, bits_b); end
    if (8'(bits_c) !== ref_bits(v, 8, 2)) begin failures++; $display("7-8 v=%h got %b", v, bits_c); end
  endtask

  initial begin
    #1_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the document's overflow example: 1001 1111 1111 1111 -> 1010 0000 0000 0000
    check_one(16'b1001_1111_1111_1111);
    check_one(16'b1010_0000_0000_0000);
    // in Gray code these two neighbours differ in one bit only, so at most
    // one of the selected bits changes
    value = 16'b1001_1111_1111_1111; #1; begin
      logic [3:0] a0;
      a0 = bits_a;
      value = 16'b1010_0000_0000_0000; #1;
      checks++;
      if ($countones(a0 ^ bits_a) > 1) failures++;
    end
    for (int i = 0; i < 5000; i++) check_one(W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
