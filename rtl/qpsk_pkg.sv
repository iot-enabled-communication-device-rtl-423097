// qpsk_pkg: types and constants shared by the mixer-less QPSK transmitter.
//
// The transmitter makes a QPSK carrier without a local oscillator or mixer. With
// the sample clock at six times the carrier (fs = 6*fc), every one of the four
// QPSK waveforms s(t) = a_I*cos(wt) + a_Q*sin(wt), a_I,a_Q in {+1,-1}, takes the
// same six sample values {1, 1.366, 0.366, -1, -1.366, -0.366}; only their order
// differs. The six values are kept as 8-bit keying sequences in a small memory
// and a resistor/transistor network (the analog bank) turns a keying sequence
// into the voltage. This package holds the memory contents, the two initial
// states and the symbol type.
//
// The six keying sequences, their addresses and the amplitudes they produce are
// those of the published design. The keying sequence is S[0:7] with S0 the
// leftmost bit of the literal, as in the published table. The initial-state
// addresses are this design's reading: they are the addresses that hold the
// samples +1 (IS-1) and -1 (IS-2).
package qpsk_pkg;

  // Samples per carrier period: fs = 6 * fc.
  localparam int unsigned NUM_SAMPLES = 6;
  localparam int unsigned ADDR_W      = 3;
  localparam int unsigned KEY_W       = 8;

  typedef logic [ADDR_W-1:0] addr_t;
  // Keying sequence S[0:7]; index 0 is S0, the leftmost bit of a literal.
  typedef logic [0:KEY_W-1] key_t;

  // One QPSK message symbol: i is the in-phase bit (S0 input of the
  // transmitter), q the quadrature bit (S1 input). Written "iq", e.g. 10.
  typedef struct packed {
    logic i;
    logic q;
  } symbol_t;

  typedef enum logic {
    DIR_DOWN = 1'b0,
    DIR_UP   = 1'b1
  } dir_e;

  // Keying memory contents, address 0..5.
  //   addr 0: 10100110 ->  1.36602 V
  //   addr 1: 01101010 ->  0.36602 V
  //   addr 2: 01010010 -> -1       V   (IS-2)
  //   addr 3: 01010110 -> -1.36602 V
  //   addr 4: 01100101 -> -0.36602 V
  //   addr 5: 10100100 ->  1       V   (IS-1)
  localparam key_t KEY_ROM [NUM_SAMPLES] = '{
    8'b10100110,
    8'b01101010,
    8'b01010010,
    8'b01010110,
    8'b01100101,
    8'b10100100
  };

  // Initial state 1 (first sample +1, symbols 11 and 10) and initial
  // state 2 (first sample -1, symbols 01 and 00).
  localparam addr_t IS1_ADDR = 3'd5;
  localparam addr_t IS2_ADDR = 3'd2;

endpackage
