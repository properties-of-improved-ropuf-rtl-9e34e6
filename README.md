# Multi-bit ring-oscillator PUF

A physical unclonable function (PUF) turns the random manufacturing
differences of a chip into a fingerprint. This design does it with ring
oscillators (ROs): nominally identical loops of inverters whose frequencies
differ a little from chip to chip and from RO to RO. Classic RO PUFs compare
two ROs and keep one bit: which of the two is faster. This design keeps the
*ratio* of the two frequencies instead. It measures that ratio with two
counters and takes several bits out of the middle of the measured value.
It then gets `w` bits from each pair. The ROs do not have to be laid out
symmetrically, because the absolute ratio, not just its sign, carries the
information.

The default configuration is 300 ROs, 16-bit counters, 450 RO pairs and 4
bits per pair (Gray-coded bit positions 7 to 10). That gives a 1800-bit
response.

## Measuring one pair

`ro_pair_measure` is the core of the design:

```
 RO 0..n-1 ──► mux (sel0) ──► C  Counter 1  OF ──► S  RS-FF 1 ──┐ q: ovf0
                               CE     Q ─────────────── res0 ─┐  │
 RO 0..n-1 ──► mux (sel1) ──► C  Counter 2  OF ──► S  RS-FF 2 ──┤ q: ovf1
                               CE     Q ─────────────── res1 ─┤  │
                                                             result mux ──► result
 CE = enable and not ovf0 and not ovf1
```

1. `clr` zeroes both counters and both RS flip-flops.
2. `enable` goes high. Each counter counts rising edges of its own RO.
   Each counter is clocked by its RO, not by the system clock.
3. After 2^16 edges the counter of the faster RO wraps to zero and raises
   `OF`. `OF` sets that counter's RS flip-flop. The flip-flop output removes
   the count enable of **both** counters, and the measurement stops.
4. The slower RO's counter now holds

       value = 2^16 × f_slow / f_fast   (within about one count)

   The result multiplexer passes that counter: `res1` if counter 1
   overflowed, `res0` otherwise.

So the value does not depend on any reference clock. It depends only on the
frequency ratio of the two ROs. A ratio of 0.7 gives about 45 900. Noise
in the ROs moves the value by a few counts from one measurement to the
next. That is why the low bits cannot be used.

Stopping the measurement is asynchronous logic across two free-running RO
clock domains. The overflow flag reaches the system-clock controller
through a two-flop synchroniser (`sync2`). By then both counters have
stopped and `result` is stable.

## From a counter value to PUF bits

Bit positions are numbered from the most significant bit (position 1) to
the least significant bit (position 16):

- High positions are nearly the same for every pair, since all ratios are
  close to 1. They are stable but carry little entropy.
- Low positions change between measurements of the same pair. They have
  high entropy but are unstable.
- A window in between is both random across pairs and repeatable. The
  window is set by `SEL_POS` (last position taken) and `SEL_W` (number of
  bits). The defaults take positions 7, 8, 9 and 10, which are bits
  [9:6] of the 16-bit value.

A plain binary window has one weakness. Suppose a value sits just below a
power-of-two boundary. Then a one-count change flips every bit of the
window, for example `1001 1111 1111 1111` → `1010 0000 0000 0000`. The
value is therefore first Gray-coded (`gray_encoder`):

    g_1 = b_1,   g_i = b_i xor b_(i-1)      (i = 1 is the MSB)

so that neighbouring values differ in exactly one bit. With Gray code, a
wider window has about the same error rate that a narrower binary window
had. That is why the default is 4 bits per pair.

`bit_extract` does the Gray conversion and takes the window. The first
selected position goes to the output MSB. `response_register` places the
bits of pair k in slot k. Pair 0 is at the most significant end, so the
response reads pair 0, pair 1, ... from left to right.

## Which pairs

With n ROs, up to C(n,2) × w bits would be possible. The controller
(`ropuf_ctrl`) uses a fixed, simple pairing:

- pairs 0 … n-1: (i, i+1 mod n)
- pairs n … n + n/2 - 1: (i, i + n/2)

Every RO is then in exactly three pairs, and no pair repeats. For n = 300
this gives the 450 pairs of the default configuration. It supports at most
n + n/2 pairs; the controller asserts this at elaboration. Any other
pairing needs only a change to the pair arithmetic in `ropuf_ctrl`.

Only the two ROs being compared are switched on (`ro_en`). The idle ROs
stay quiet.

## Readout sequence and timing

Pulse `start` for one system clock cycle. The controller first clears the
response. Then, for each pair:

| state   | cycles | what happens |
|---------|--------|--------------|
| SETUP   | `SETTLE_CYCLES` (4) | select the pair, enable its two ROs, hold the counters in clear |
| RUN     | 2^16 × T_fast / T_clk | `enable` high until the synchronised overflow flag arrives |
| CAPTURE | 1 | `enable` low; write the raw value to `result_memory` and the bits to `response_register` |

The write follows the overflow by 3 clock cycles: 2 for the synchroniser and
1 for the state change. With ROs around 110 MHz and a 50 MHz system clock,
one pair takes about 28 000 cycles (0.56 ms). A full 450-pair readout takes
about 12.7 million cycles (0.25 s). `busy` is high during the readout.
`done` rises at the end and stays high until the next `start`. The raw
16-bit value of any pair can be read through `rd_addr`/`rd_data`, one
cycle after the address is applied. These raw values are what you need to
choose the bit window for a new FPGA family.

## Modules

| module | role |
|--------|------|
| `ropuf_top` | whole PUF; parameters `N_RO`, `CNT_W`, `NUM_PAIRS`, `SEL_POS`, `SEL_W`, `SETTLE_CYCLES`, `RO_SEED`, `RO_JITTER_PS` |
| `ropuf_pkg` | default sizes and the RO model's variation formula |
| `ro_array` | **behavioural model** of the RO bank |
| `ro_pair_measure` | pair measurement circuit (below) |
| `ro_mux` | n-to-1 RO selector (two instances, `sel0`, `sel1`) |
| `ro_counter` | RO-clocked counter with clock enable, async clear, sticky overflow |
| `rs_flipflop` | overflow latch, reset-dominant |
| `result_mux` | passes the non-overflowed counter |
| `gray_encoder`, `bit_extract` | Gray code and bit window |
| `ropuf_ctrl`, `sync2` | pair sequencer and overflow synchroniser |
| `result_memory` | raw value per pair (450 × 16) |
| `response_register` | concatenated response (1800 bits) |

## The ring oscillators are a model

An RO is a combinational loop: one enable gate and four inverters (five
stages; seven stages behave alike). It only oscillates in silicon. A
cycle-based, two-state simulator cannot run such a loop. So `ro_array`
models every ring as a delay and is not synthesizable:

- Half period of RO i = `STAGES × STAGE_DELAY_PS + v_i` (default
  5 × 800 ps + v_i).
- Each RO gets a variation v_i of 0–999 ps. It comes from a hash of
  the RO index and `RO_SEED`, and stands for process variation. A different
  seed is a different chip.
- The result is 100–125 MHz, similar to RO frequencies measured on
  Spartan-3E and Spartan-6 FPGAs.
- An optional jitter of ±`RO_JITTER_PS` per half period (default 20 ps)
  makes repeated readouts differ slightly, as real ones do.

For an FPGA build, replace `ro_array` with LUT-based loops behind the
same ports (`en`, `ro`). Keep the loops from being optimised away, and
place them by hand. Every other module is ordinary synthesizable RTL.
However, its counters and overflow latches are clocked by the RO outputs,
which tools need to be told about (one generated clock per RO multiplexer
output).

## What the RTL does not capture

- **Supply voltage.** The frequency ratio of two ROs shifts with the core
  voltage. Even inside the recommended supply range, the 2-bit response
  (positions 7–8) can change in 20 % or more of its bits. The change is
  much smaller when the ROs of a pair are placed symmetrically. This is a
  property of the silicon and the layout. The model only offers fixed
  delays.
- **Counter speed.** If an RO runs faster than a counter can count, real
  counters miss pulses. The RTL counter never does.
- **Statistics.** Bit stability, entropy, bias and Hamming distances are
  computed off-line from many readouts. The design provides the raw values
  and the response but no on-chip statistics or host interface.

## Choices made in this RTL

These points are not fixed by the underlying design and were chosen here:

- OF behaviour: OF rises on the wrap to zero and stays high.
- RS flip-flop: built from one flip-flop clocked by S with an asynchronous,
  dominant reset.
- Both-overflowed case: when both counters overflow together, the result
  multiplexer picks counter 1 (both values are then 0).
- Pairing: the scheme in "Which pairs".
- Idle ROs: switched off.
- Controller: states, settle time and synchroniser.
- Memories: organisation of the raw-value memory and bit order inside the
  response.
- All RO model values.
- Scope: Gray code is the only coding built. The plain-binary window is not
  built; its values can be taken from `result_memory`.

## Simulating

Every file in `rtl/` and `tb/` is one module or package of the same name.
Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own.
For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ropuf_top \
    -Irtl -Itb -y rtl -y tb rtl/ropuf_pkg.sv tb/tb_ropuf_top.sv --Mdir obj -o sim
obj/sim
```

| testbench | what it shows |
|-----------|---------------|
| `tb_gray_encoder` | all 65 536 codes against the positional rule, one-bit steps |
| `tb_bit_extract` | windows 7-10, 7-9, 7-8 |
| `tb_ro_mux`, `tb_result_mux`, `tb_rs_flipflop`, `tb_ro_counter` | the primitives, incl. overflow after exactly 2^W edges and async clear |
| `tb_ro_array` | model periods (5- and 7-stage), jitter, enables |
| `tb_ro_pair_measure` | six pairs of fixed clocks: right counter overflows, value = 2^10 × T_fast/T_slow ± 1, counters stop, enable pauses |
| `tb_ropuf_ctrl` | pair sequence, settle time, 3-cycle write latency, restart |
| `tb_result_memory`, `tb_response_register` | storage |
| `tb_ropuf_top` | 10 ROs / 12-bit counters / 15 pairs, two chips; checks every value against the RO periods, every response slot, the run time, both overflow directions, restart; prints intra/inter Hamming distance |
| `tb_ropuf_full` | the default 300 / 16 / 450 configuration, one readout |
| `tb_ropuf_stats` | 300 ROs, first 150 pairs, two chips: error rate between readouts and distance between chips for the Gray windows 6-7, 7-8, 7-9, 7-10, 8-9 |

The reduced top-level test runs in about two seconds. The full-size test
simulates about 0.25 s of chip time and takes about a minute.
`tb_ropuf_stats` takes about two minutes. With the default 20 ps jitter,
the two readouts of one chip differ in at most 0.7 % of the bits of any
window (0 % for the 2- and 3-bit windows). Two chips differ in about
45–53 %. The first figure only reflects the model's noise. On real FPGAs
the error rate of such windows is about 0.5–2.5 % at constant supply
voltage, rising with the window width.

## Trust

All modules pass lint with Verilator (`-Wall`) and elaborate in a second
SystemVerilog front end. Each testbench was also run against a copy of its
module with one deliberate bug, and each of those runs failed. The
testbenches check against independent calculations:

- the RO periods, from the variation formula;
- the Gray rule, bit by bit;
- the expected pair order.

The behaviour of the physical PUF is a different matter: voltage, layout
and real RO noise. The RTL and the models cannot show it.
