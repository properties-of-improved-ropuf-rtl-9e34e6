// result_memory: stores the raw counter value measured for every RO pair.
//
// DEPTH words of CNT_W bits, one write port and one read port, both on
// `clk`. The read is registered: rdata shows word raddr one cycle after
// raddr is applied. Reading the raw values is what the statistical
// evaluation of the positions (stability, entropy, bias) needs. The
// organisation is an own choice: the document only shows that the result is
// stored.
`timescale 1ps / 1ps
module result_memory #(
  parameter int unsigned DEPTH  = 450,
  parameter int unsigned CNT_W  = 16,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [CNT_W-1:0]  wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [CNT_W-1:0]  rdata
);

  logic [CNT_W-1:0] mem[DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) mem[waddr] <= wdata;
    if (32'(raddr) < DEPTH) rdata <= mem[raddr];
    else rdata <= '0;
  end

endmodule
