// ropuf_top: ring-oscillator PUF that takes several output bits from every
// pair of ROs.
//
// A bank of N_RO ring oscillators (behavioural model, ro_array) feeds the
// pair measurement circuit (ro_pair_measure): two multiplexers, two CNT_W-bit
// counters clocked by the selected ROs, overflow RS flip-flops that stop
// both counters when the faster RO's counter overflows, and a result
// multiplexer that passes the slower counter's value
//   value = 2^CNT_W * f_slow / f_fast.
// The controller (ropuf_ctrl) measures NUM_PAIRS pairs one after another.
// Each value is stored raw in result_memory and, Gray coded, reduced to the
// SEL_W bits at positions SEL_POS-SEL_W+1 .. SEL_POS (counted from the MSB)
// by bit_extract; response_register concatenates those bits into the
// NUM_PAIRS*SEL_W-bit PUF response (pair 0 leftmost).
//
// Interface: pulse `start` for one cycle; `busy` is high while measuring;
// `done` rises when `response` is complete and stays high until the next
// start. rd_addr / rd_data read the raw value of pair rd_addr one cycle
// later.
//
// Defaults are the reference configuration (300 ROs, 16-bit counters, 450
// pairs, Gray-coded positions 7-10). RO_SEED selects the simulated chip and
// RO_JITTER_PS the RO period noise of the behavioural model.
`timescale 1ps / 1ps
module ropuf_top
  import ropuf_pkg::*;
#(
  parameter int unsigned N_RO          = N_RO_DEFAULT,
  parameter int unsigned CNT_W         = CNT_W_DEFAULT,
  parameter int unsigned NUM_PAIRS     = NUM_PAIRS_DEFAULT,
  parameter int unsigned SEL_POS       = SEL_POS_DEFAULT,
  parameter int unsigned SEL_W         = SEL_W_DEFAULT,
  parameter int unsigned SETTLE_CYCLES = 4,
  parameter int unsigned RO_SEED       = 1,
  parameter int unsigned RO_JITTER_PS  = 20,
  parameter int unsigned ADDR_W        = (NUM_PAIRS > 1) ? $clog2(NUM_PAIRS) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  output logic                       busy,
  output logic                       done,
  output logic [NUM_PAIRS*SEL_W-1:0] response,
  input  logic [ADDR_W-1:0]          rd_addr,
  output logic [CNT_W-1:0]           rd_data
);

  localparam int unsigned RO_SEL_W = $clog2(N_RO);

  logic [N_RO-1:0]     ro_en, ro;
  logic [RO_SEL_W-1:0] sel0, sel1;
  logic                meas_clr, meas_enable, meas_done;
  logic [CNT_W-1:0]    result, q0, q1;
  logic                ovf0, ovf1;
  logic                wr_en, resp_clear;
  logic [ADDR_W-1:0]   wr_addr;
  logic [SEL_W-1:0]    puf_bits;

  ro_array #(.N_RO(N_RO), .SEED(RO_SEED), .JITTER_PS(RO_JITTER_PS)) u_ro (
    .en(ro_en),
    .ro(ro)
  );

  ro_pair_measure #(.N_RO(N_RO), .CNT_W(CNT_W), .SEL_W(RO_SEL_W)) u_meas (
    .ro    (ro),
    .sel0  (sel0),
    .sel1  (sel1),
    .enable(meas_enable),
    .clr   (meas_clr),
    .result(result),
    .q0    (q0),
    .q1    (q1),
    .ovf0  (ovf0),
    .ovf1  (ovf1),
    .done  (meas_done)
  );

  ropuf_ctrl #(
    .N_RO         (N_RO),
    .NUM_PAIRS    (NUM_PAIRS),
    .SETTLE_CYCLES(SETTLE_CYCLES),
    .SEL_W        (RO_SEL_W),
    .ADDR_W       (ADDR_W)
  ) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .meas_done  (meas_done),
    .ro_en      (ro_en),
    .sel0       (sel0),
    .sel1       (sel1),
    .meas_clr   (meas_clr),
    .meas_enable(meas_enable),
    .wr_en      (wr_en),
    .wr_addr    (wr_addr),
    .resp_clear (resp_clear),
    .busy       (busy),
    .done       (done)
  );

  bit_extract #(.CNT_W(CNT_W), .SEL_POS(SEL_POS), .SEL_W(SEL_W)) u_bits (
    .value(result),
    .bits (puf_bits)
  );

  result_memory #(.DEPTH(NUM_PAIRS), .CNT_W(CNT_W), .ADDR_W(ADDR_W)) u_mem (
    .clk  (clk),
    .we   (wr_en),
    .waddr(wr_addr),
    .wdata(result),
    .raddr(rd_addr),
    .rdata(rd_data)
  );

  response_register #(.NUM_PAIRS(NUM_PAIRS), .SEL_W(SEL_W), .ADDR_W(ADDR_W)) u_resp (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (resp_clear),
    .we      (wr_en),
    .waddr   (wr_addr),
    .wbits   (puf_bits),
    .response(response)
  );

endmodule
