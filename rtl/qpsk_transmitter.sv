// qpsk_transmitter: complete mixer-less QPSK transmitter.
//
// A 2-bit message symbol (s0 = I, s1 = Q) selects one of four QPSK carriers
// s(t) = a_I*cos(2*pi*fc*t) + a_Q*sin(2*pi*fc*t), a_I, a_Q = +-1 for bit 1/0.
// No oscillator or mixer is used: the digital baseband (initial state loader,
// up/down counter, keying memory) emits, once per sampling clock, the keying
// sequence of the next of six carrier samples, the analog bank turns it into a
// voltage, and an RC low-pass filter removes the steps. The sampling clock sets
// the carrier: fc = fs / 6 (F_SAMPLE_HZ = 1.25 MHz gives 208.3 kHz, the
// prototype's operating point; 720 MHz would give 120 MHz).
//
// Interface: `key` is the 8-bit digital output that drives the analog bank;
// `v_bank` is the staircase carrier and `v_mod` the filtered carrier, both in
// volts (model outputs). `sym_load` and `dir` show when a new symbol restarted
// the cycle and which way the counter runs.
//
// Timing: two clocks from a symbol change to its first sample on `key` and
// `v_bank`; `v_mod` follows one clock later through the filter. The structure
// follows the published block diagram; F_CUTOFF_HZ is this design's choice.
module qpsk_transmitter
  import qpsk_pkg::*;
#(
  parameter real F_SAMPLE_HZ = 1.25e6,
  parameter real F_CUTOFF_HZ = 416.7e3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s0,
  input  logic  s1,
  output key_t  key,
  output addr_t addr,
  output logic  sym_load,
  output dir_e  dir,
  output real   v_bank,
  output logic  bank_valid,
  output real   v_mod
);

  qpsk_baseband u_baseband (
    .clk      (clk),
    .rst_n    (rst_n),
    .s0       (s0),
    .s1       (s1),
    .key      (key),
    .addr     (addr),
    .sym_load (sym_load),
    .dir      (dir)
  );

  analog_bank u_bank (
    .s     (key),
    .v_out (v_bank),
    .valid (bank_valid)
  );

  low_pass_filter #(
    .F_SAMPLE_HZ (F_SAMPLE_HZ),
    .F_CUTOFF_HZ (F_CUTOFF_HZ)
  ) u_lpf (
    .clk   (clk),
    .rst_n (rst_n),
    .v_in  (v_bank),
    .v_out (v_mod)
  );

endmodule
