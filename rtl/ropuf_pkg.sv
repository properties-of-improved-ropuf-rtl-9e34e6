// ropuf_pkg: constants and helper functions shared by the ring-oscillator PUF.
//
// The PUF compares ring oscillators (ROs) in pairs. For every pair two
// counters run from the two ROs until the faster one overflows; the value
// left in the slower counter, 2^CNT_W * f_slow / f_fast, is converted to
// Gray code and a window of SEL_W bits ending at bit position SEL_POS
// (positions are numbered 1 = MSB .. CNT_W = LSB) is appended to the PUF
// response.
//
// Defaults follow the reference configuration: 300 ROs, 16-bit counters,
// 450 RO pairs and Gray-coded positions 7-10 (SEL_POS = 10, SEL_W = 4).
// The RO delay formula below only feeds the behavioural RO models; it is
// this design's own stand-in for the manufacturing variation of a real chip.
`timescale 1ps / 1ps
package ropuf_pkg;

  parameter int unsigned N_RO_DEFAULT      = 300;
  parameter int unsigned CNT_W_DEFAULT     = 16;
  parameter int unsigned NUM_PAIRS_DEFAULT = 450;
  parameter int unsigned SEL_POS_DEFAULT   = 10;
  parameter int unsigned SEL_W_DEFAULT     = 4;

  // Behavioural RO model: a ring of RO_STAGES elements of RO_STAGE_DELAY_PS
  // each, plus an index- and seed-dependent extra loop delay below
  // RO_SPREAD_PS. Half periods are then 4.0 .. 5.0 ns (100 .. 125 MHz).
  parameter int unsigned RO_STAGES        = 5;
  parameter int unsigned RO_STAGE_DELAY_PS = 800;
  parameter int unsigned RO_SPREAD_PS     = 1000;

  // Integer hash (xorshift-multiply) used as "process variation".
  function automatic int unsigned mix32(input int unsigned x);
    int unsigned h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Extra loop delay of RO number idx on the chip identified by seed.
  function automatic int unsigned ro_variation_ps(input int unsigned idx,
                                                  input int unsigned seed);
    return mix32(idx * 32'h9e3779b9 + seed) % RO_SPREAD_PS;
  endfunction

endpackage
