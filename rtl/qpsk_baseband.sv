// qpsk_baseband: the digital part of the mixer-less QPSK transmitter.
//
// It turns a 2-bit message symbol (s0 = in-phase bit, s1 = quadrature bit) into
// a stream of 8-bit keying sequences, one per sampling clock, six per carrier
// period. The initial state loader notices a new symbol and loads the up/down
// counter with IS-1 (address 5, sample +1) or IS-2 (address 2, sample -1); the
// counter then walks the six addresses up or down, and the keying memory reads
// out the sequence for each address. The analog bank, outside this module,
// converts each keying sequence into a voltage.
//
// Resulting sample orders (volts, from the first sample of a new symbol):
//   11:  1,  1.366,  0.366, -1, -1.366, -0.366   (cos + sin)
//   10:  1, -0.366, -1.366, -1,  0.366,  1.366   (cos - sin)
//   01: -1,  0.366,  1.366,  1, -0.366, -1.366   (-cos + sin)
//   00: -1, -1.366, -0.366,  1,  1.366,  0.366   (-cos - sin)
//
// Timing: the symbol is sampled at every rising clock edge. A new symbol
// present before edge k loads the counter at edge k; the keying sequence of its
// first sample is on `key` after edge k+1 (two clocks of latency). From then on
// `key` changes at every edge, with period 6 clocks, so fc = fs / 6. A symbol
// held for any number of clocks keeps the carrier running with continuous phase.
// After reset `key` stays all zeros (0 V) until the first symbol's first sample.
// The partition into loader, counter and memory is the published one; the
// latency and the output register are this design's.
module qpsk_baseband
  import qpsk_pkg::*;
#(
  parameter int unsigned NSAMP = NUM_SAMPLES
) (
  input  logic  clk,       // sampling clock, fs = 6 * fc
  input  logic  rst_n,     // asynchronous reset, active low
  input  logic  s0,        // in-phase bit of the message symbol
  input  logic  s1,        // quadrature bit of the message symbol
  output key_t  key,       // keying sequence S[0:7] to the analog bank
  output addr_t addr,      // current memory address (counter value)
  output logic  sym_load,  // a new symbol restarted the cycle this clock
  output dir_e  dir        // counting direction in use
);

  symbol_t sym;
  logic    load;
  addr_t   load_value;
  logic    ref_is1;
  logic    count_valid;

  assign sym = '{i: s0, q: s1};

  initial_state_loader u_loader (
    .clk        (clk),
    .rst_n      (rst_n),
    .sym        (sym),
    .load       (load),
    .load_value (load_value),
    .ref_is1    (ref_is1)
  );

  up_down_counter #(
    .MODULUS (NSAMP)
  ) u_counter (
    .clk        (clk),
    .rst_n      (rst_n),
    .load       (load),
    .load_value (load_value),
    .q          (sym.q),
    .ref_is1    (ref_is1),
    .count       (addr),
    .count_valid (count_valid),
    .dir         (dir)
  );

  keying_memory #(
    .DEPTH (NSAMP)
  ) u_memory (
    .clk   (clk),
    .rst_n (rst_n),
    .rd_en (count_valid),
    .addr  (addr),
    .key   (key)
  );

  assign sym_load = load;

endmodule
