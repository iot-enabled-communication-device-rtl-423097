// low_pass_filter: behavioural model of the first-order RC low-pass filter that
// smooths the staircase from the analog bank into a continuous carrier (not
// synthesizable logic; it stands for a resistor and a capacitor).
//
// The input is piecewise constant between sampling-clock edges (each analog
// bank level is held for one sample period Ts). For such an input the RC
// filter's output at the next edge is exactly
//   v[n+1] = v[n] + (1 - exp(-Ts / RC)) * (v_in[n] - v[n]),
// which the model computes at every rising edge of `clk`, with
// Ts = 1 / F_SAMPLE_HZ and RC = 1 / (2*pi*F_CUTOFF_HZ). Between edges v_out
// holds the value at the last edge.
//
// Only the kind of filter (a simple RC) is published; the cutoff is this
// design's choice: twice the 208.3 kHz carrier of the prototype, which passes
// the carrier and attenuates the sample-rate steps. Reset sets the capacitor
// voltage to 0 V.
module low_pass_filter #(
  parameter real F_SAMPLE_HZ = 1.25e6,
  parameter real F_CUTOFF_HZ = 416.7e3
) (
  input  logic clk,     // sampling clock
  input  logic rst_n,   // active low, discharges the capacitor
  input  real  v_in,    // volts
  output real  v_out    // volts
);

  localparam real PI    = 3.14159265358979;
  localparam real RC    = 1.0 / (2.0 * PI * F_CUTOFF_HZ);
  localparam real TS    = 1.0 / F_SAMPLE_HZ;
  localparam real ALPHA = 1.0 - $exp(-TS / RC);

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_out <= 0.0;
    else        v_out <= v_out + ALPHA * (v_in - v_out);
  end

endmodule
