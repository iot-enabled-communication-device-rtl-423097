# Mixer-less QPSK transmitter

A QPSK transmitter normally needs a local oscillator and a mixer to put the
baseband symbols onto a carrier. This design has neither. It relies on one
fact: if you sample a QPSK carrier at exactly six times its frequency, all four
QPSK waveforms are made of the same six sample values. Only the order of those
values differs. So the transmitter only has to:

1. store six "keying sequences", one per sample value, in a tiny memory;
2. walk through that memory with a modulo-6 counter, forwards or backwards,
   starting at one of two addresses chosen by the symbol;
3. turn each keying sequence into a voltage with a transistor/resistor network
   (the *analog bank*);
4. smooth the resulting staircase with an RC low-pass filter.

The sampling clock sets the carrier: **fc = fs / 6**. A 1.25 MHz clock gives a
208.3 kHz carrier. A 720 MHz clock would give 120 MHz.

The digital part is a 3-bit counter, a 2-bit register, a change detector and a
6 x 8-bit ROM: 15 flip-flops plus the ROM. The analog bank and the filter are
provided as behavioural models, so the whole transmitter can be simulated from
the symbol bits to the filtered carrier.

## The symbol cycle

Each symbol is two bits, written `iq`. `i` is the in-phase bit (input `s0`) and
`q` the quadrature bit (input `s1`). A bit value of 1 means +1 and 0 means -1.
The transmitted waveform is

    s(t) = a_I * cos(2*pi*fc*t) + a_Q * sin(2*pi*fc*t)

Sampled at t = k / (6 fc), k = 0..5, the four waveforms are:

| symbol | waveform    | samples k = 0..5 (V)                       |
|--------|-------------|--------------------------------------------|
| 11     | cos + sin   | 1, 1.366, 0.366, -1, -1.366, -0.366        |
| 10     | cos - sin   | 1, -0.366, -1.366, -1, 0.366, 1.366        |
| 01     | -cos + sin  | -1, 0.366, 1.366, 1, -0.366, -1.366        |
| 00     | -cos - sin  | -1, -1.366, -0.366, 1, 1.366, 0.366        |

(1.366 = (1 + sqrt 3) / 2 and 0.366 = (sqrt 3 - 1) / 2.)

Laid on a circle, the six values form one fixed cycle:
1 -> 1.366 -> 0.366 -> -1 -> -1.366 -> -0.366 -> 1. Every symbol is that
cycle, started at +1 (when i = 1) or at -1 (when i = 0), and walked one way or
the other.

The keying memory holds the cycle in this order:

| address | keying sequence S[0:7] | analog bank output |
|---------|------------------------|--------------------|
| 0       | 10100110               | 1.36602 V          |
| 1       | 01101010               | 0.36602 V          |
| 2       | 01010010               | -1 V  (IS-2)       |
| 3       | 01010110               | -1.36602 V         |
| 4       | 01100101               | -0.36602 V         |
| 5       | 10100100               | 1 V   (IS-1)       |

S0 is the leftmost bit of each sequence. In the RTL it is `key[0]`, because
`key_t` is declared `logic [0:7]`.

## Initial states and counting direction

This is the part that needs care.

**Initial state.** When the symbol changes, the counter is loaded with one of
two *initial states*:

- IS-1, address 5 (sample +1), when i = 1;
- IS-2, address 2 (sample -1), when i = 0.

**Direction.** After loading, the counter steps once per clock. Incrementing
from address 5 gives 1, 1.366, 0.366, ..., which is symbol 11. So:

| symbol | start        | direction | sequence of addresses |
|--------|--------------|-----------|-----------------------|
| 11     | IS-1 (5)     | up        | 5 0 1 2 3 4           |
| 10     | IS-1 (5)     | down      | 5 4 3 2 1 0           |
| 01     | IS-2 (2)     | down      | 2 1 0 5 4 3           |
| 00     | IS-2 (2)     | up        | 2 3 4 5 0 1           |

From IS-1, q = 1 counts up. From IS-2 the sense is mirrored: q = 0 counts up.
In other words, the counter counts up when `q == i`. Inside the design this is
"q, taken relative to the initial state". The loader hands the counter
`ref_is1`, the `i` bit of the current symbol. The counter computes
`dir = (q == ref_is1) ? UP : DOWN`.

Note: a simpler rule, "q = 1 counts up, q = 0 counts down" whatever the initial
state, looks natural. It is wrong for this memory layout: it makes symbol 01
transmit the samples of 00 and the other way round. The counter testbench's
broken copy uses exactly that rule, and the testbench catches it.

**Symbol changes.** The loader keeps a copy of the last symbol. A reload happens
only when the input differs from that copy, or in the first clock after reset.
A symbol held for many clocks therefore keeps producing its carrier with
continuous phase: the cycle simply repeats every six clocks. A symbol may last
any number of clocks, even fewer than six.

## Structure and timing

    s0 (I) --+--> initial_state_loader --load, load_value, ref_is1--> up_down_counter
    s1 (Q) --+------------------------------------------------------> (q)
                                                                          |
                                                                     addr | count_valid
                                                                          v
                                                                    keying_memory
                                                                          | key[0:7]
                                                                          v
                                                   analog_bank (model) -> v_bank
                                                                          v
                                                low_pass_filter (model) -> v_mod

| module                 | kind        | what it is                                               |
|------------------------|-------------|----------------------------------------------------------|
| `qpsk_pkg`             | package     | types (`symbol_t`, `key_t`, `addr_t`, `dir_e`), memory contents, initial states |
| `initial_state_loader` | RTL         | change detector; chooses IS-1 or IS-2 from `i`            |
| `up_down_counter`      | RTL         | modulo-6 up/down counter with load                        |
| `keying_memory`        | RTL         | 6 x 8 ROM, registered output                              |
| `qpsk_baseband`        | RTL         | the three blocks above: the part that goes into an FPGA   |
| `analog_bank`          | model       | keying sequence -> voltage (`real`)                       |
| `low_pass_filter`      | model       | first-order RC filter on the staircase (`real`)           |
| `qpsk_transmitter`     | top         | baseband + analog bank + filter                           |

Timing of the digital part, with one clock per sample:

- **Symbol sampling.** The symbol is sampled at every rising edge. If a new
  symbol is present before edge k, the counter loads its initial state at edge
  k.
- **Latency.** The keying sequence of the symbol's first sample appears after
  edge k+1. The latency is therefore two clocks: one for the counter, one for
  the registered memory output.
- **Output rate.** From then on `key` changes at every edge. The staircase
  `v_bank` follows `key` with no delay. `v_mod` is updated at the next edge.
- **After reset.** `key` stays all zeros until the first sample. With all
  keying lines low, every stage of the bank is off and the output is 0 V. The
  counter's `count_valid` flag gates the memory read until the first load.

Reset is asynchronous and active low, `rst_n`, on every register. The memory
output is registered because the analog bank responds directly to the levels
of the keying lines. A decode glitch there would show up in the transmitted
waveform.

Top-level ports: `clk`, `rst_n`, `s0`, `s1` in; `key` (8), `addr` (3),
`sym_load`, `dir`, `bank_valid` and the `real` voltages `v_bank` and `v_mod`
out.

## The analog side

The **analog bank** is eight common-emitter transistor stages fed from ±3.3 V.
It uses 2N2222A NPN and 2N3702 PNP transistors. Their currents meet in a
0.718 kOhm output resistor R1. Each keying line switches one stage, and the
combination of lines sets the output level.

The bank stores nothing, which is why the keying sequence must be held for the
whole sample period. For example, 10100110 turns on only the S0 branch, which
has a 0.281 kOhm emitter resistor:

    (3.3 - 0.7 - 0.7) / (0.281k + 0.718k) * 0.718k = 1.366 V

`analog_bank.sv` does not model the circuit. It maps the six keying sequences
to their six voltages. Any other pattern gives 0 V and drops `valid`. A
settling delay parameter, `SETTLE`, defaults to 0.

The **low-pass filter** is a single RC. Between clock edges its input is
constant, so the model uses the exact discrete form:

    v[n+1] = v[n] + (1 - exp(-Ts/RC)) * (v_in[n] - v[n]),    RC = 1 / (2*pi*F_CUTOFF_HZ)

The cutoff is a parameter. Its default is 416.7 kHz, twice the 208.3 kHz
carrier. Scale it with the carrier if you change the clock.

The two models use `real` ports and delays. Simulators accept them, but
synthesis does not. For a chip or an FPGA, take `qpsk_baseband` as the top and
drive the analog bank from its 8 `key` outputs. In the original hardware these
are LVCMOS33 pins: 3.3 V for a 1, 0 V for a 0.

## Operating points

| carrier | sampling clock | status                                                    |
|---------|----------------|-----------------------------------------------------------|
| 208.3 kHz | 1.25 MHz     | default parameters; simulated end to end                  |
| 1 kHz   | 6 kHz          | simulated; no lower limit in the logic                    |
| 120 MHz | 720 MHz        | simulated (fc measured as 120.08 MHz: the 1 ps simulation precision rounds the clock period); whether a target closes timing at 720 MHz is not known |

The critical path is a 3-bit compare and increment or decrement, followed by the
ROM read.

## How far to trust it, and where it departs

**What the source description fixes.** The following are the published design:

- the memory contents and their addresses;
- the 8-bit by 6-word memory size;
- the modulo-6 counter, with fs = 6 fc;
- initial states chosen by the in-phase bit alone;
- the block structure;
- the prototype's 1.25 MHz clock.

**Design choices where the description is silent or inconsistent:**

- **Initial-state addresses 5 and 2.** Its prose places the initial states at
  addresses 0 and 3. Those addresses hold ±1.366, and every waveform in the
  description starts at ±1. Addresses 5 and 2 hold ±1 and give exactly the
  tabulated waveforms. The choice is the `IS1` and `IS2` parameters of
  `initial_state_loader` (defaults from `qpsk_pkg`).
- **Counting direction `q == i`** rather than `q` alone (see above).
- **Change detection by comparison with the stored symbol.** There is no
  symbol strobe. Two equal consecutive symbols therefore form one long symbol.
  That is harmless, because the carrier for that symbol is simply continuous.
- **Registered memory output, the `count_valid` gate and the reset behaviour.**
- **The filter cutoff**, and the behaviour of both analog models outside the
  six published levels.

**Not built:**

- A pulse-shaping filter, which is mentioned only as a possible addition.
- BPSK, FSK or QAM variants. These are said to need only different sample
  tables; none is specified.
- The conventional oscillator-plus-mixer transmitter, which is only the point
  of comparison.

## Simulating

Every testbench checks its own results and prints
`TB_RESULT checks=N failures=M`. Each one also has a watchdog. With Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
        rtl/qpsk_pkg.sv tb/qpsk_transmitter_tb.sv --top-module qpsk_transmitter_tb
    ./obj_dir/Vqpsk_transmitter_tb

Replace the testbench name for the others:

| testbench                  | what it checks |
|----------------------------|----------------|
| `initial_state_loader_tb`  | reload exactly on a change and after reset; IS-1/IS-2 choice; `ref_is1` |
| `up_down_counter_tb`       | random loads and directions against a reference; both wraps; six-step period; `count_valid` |
| `keying_memory_tb`         | every word and the S0 bit order; one-clock read latency; zeros for addresses 6-7 and with `rd_en` low |
| `analog_bank_tb`           | the six levels, against sqrt-3 values and the transistor formula; 0 V for other patterns |
| `low_pass_filter_tb`       | step response against 1 - exp(-t/RC); smoothing of a six-sample square wave |
| `qpsk_baseband_tb`         | keying sequence against cos/sin samples, with two-clock latency; six-clock period; counts every mechanism (loads into each initial state, up and down counting, both wraps, each symbol, a held symbol) |
| `qpsk_transmitter_tb`      | the whole transmitter at default parameters (1.25 MHz clock): the sample table, bank voltages, filter output against a reference RC, carrier period 6/fs measured from zero crossings of the filtered output |
| `qpsk_carrier_sweep_tb`    | three transmitters at 1 kHz, 208.3 kHz and 120 MHz carriers; measured fc = fs/6 within 0.2 % |

Each runs in well under a second.

## Changing it

- **A different carrier.** Change the clock. Nothing in the RTL depends on the
  clock frequency. For the models, pass `F_SAMPLE_HZ` and `F_CUTOFF_HZ` to the
  top.
- **A different output network.** Pass a new `CONTENTS` array to
  `keying_memory`, or edit `KEY_ROM` in `qpsk_pkg`. Keep the circular order of
  the levels, and keep `IS1_ADDR`/`IS2_ADDR` pointing at the +1 and -1 words.
- **A different number of samples per period** (`NSAMP` on `qpsk_baseband`, up
  to 8 with the 3-bit address). This needs a new table of levels, and the
  initial states must be recomputed. With N samples per period the levels are
  a_I cos(2πk/N) + a_Q sin(2πk/N).
