// analog_bank: behavioural model of the BJT analog bank (not synthesizable
// logic; it stands for a transistor/resistor network).
//
// The real part is eight common-emitter transistor stages (2N2222A NPN and
// 2N3702 PNP, +-3.3 V supplies) whose currents meet in the output resistor R1
// (0.718 kOhm). Each keying input S0..S7 switches one stage; the combination
// sets the current through R1 and so the output voltage. The network holds no
// state: the output follows the keying lines after a settling time.
//
// This model reproduces the published input/output table: each of the six
// keying sequences gives its amplitude. For the first one, 10100110, only the
// S0 branch (Q1 with R2 = 0.281 kOhm) conducts, and
//   V_out = (3.3 - 0.7 - 0.7) / (0.281k + 0.718k) * 0.718k = 1.366 V.
// Any other pattern is outside the published table; the model gives 0 V for it
// (no stage driving R1), which is this design's assumption, and flags it in
// `valid`. An optional settling delay (SETTLE, in time units) is this design's
// addition; it is 0 by default.
//
// Interface: s[0:7] keying lines (S0 = s[0]); v_out in volts.
module analog_bank
  import qpsk_pkg::*;
#(
  parameter int unsigned SETTLE = 0
) (
  input  key_t s,       // keying sequence S[0:7]
  output real  v_out,   // voltage across R1, volts
  output logic valid    // s is one of the six published sequences
);

  real  v_ideal;
  logic known;

  always_comb begin
    known = 1'b1;
    unique case (s)
      8'b10100110: v_ideal =  1.36602;
      8'b01101010: v_ideal =  0.36602;
      8'b01010010: v_ideal = -1.0;
      8'b01010110: v_ideal = -1.36602;
      8'b01100101: v_ideal = -0.36602;
      8'b10100100: v_ideal =  1.0;
      default: begin
        v_ideal = 0.0;
        known   = 1'b0;
      end
    endcase
  end

  always @(v_ideal, known) begin
    #(SETTLE);
    v_out = v_ideal;
    valid = known;
  end

endmodule
