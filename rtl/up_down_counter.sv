// up_down_counter: modulo-MODULUS up/down counter that walks the symbol cycle.
//
// The counter runs at the sampling clock, so the carrier frequency is
// fc = fs / MODULUS (fs / 6 by default). Each cycle it either loads
// `load_value` (when `load` is high) or steps once, up or down, wrapping
// between 0 and MODULUS-1. Its value addresses the keying memory.
//
// Direction: the quadrature bit `q` sets the direction relative to the initial
// state the symbol started from. From IS-1 (`ref_is1` = 1) q = 1 counts up and
// q = 0 counts down; from IS-2 the sense is mirrored. This gives all four
// sample orders of the published sample table, with the memory laid out as
// published. A direction taken from q alone would give symbol 01 the samples of
// symbol 00; this is this design's reading of a point on which the published
// text and its sample table disagree.
//
// Timing: one step per clock; a load takes effect at the next clock edge.
// Reset clears the count to 0 and `count_valid` to 0; `count_valid` rises with
// the first load, so the memory can keep its output off until then.
module up_down_counter
  import qpsk_pkg::*;
#(
  parameter int unsigned MODULUS = NUM_SAMPLES
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  addr_t load_value,
  input  logic  q,        // quadrature bit of the current symbol
  input  logic  ref_is1,  // current symbol started from IS-1
  output addr_t count,
  output logic  count_valid,  // count has been loaded since reset
  output dir_e  dir           // direction used for the next step
);

  localparam addr_t LAST = addr_t'(MODULUS - 1);

  always_comb dir = (q == ref_is1) ? DIR_UP : DIR_DOWN;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count       <= '0;
      count_valid <= 1'b0;
    end else if (load) begin
      count_valid <= 1'b1;
      count <= load_value;
    end else if (dir == DIR_UP) begin
      count <= (count == LAST) ? '0 : count + addr_t'(1);
    end else begin
      count <= (count == '0) ? LAST : count - addr_t'(1);
    end
  end

  initial assert (MODULUS >= 2 && MODULUS <= 2 ** ADDR_W)
    else $error("MODULUS %0d does not fit the address width", MODULUS);

  a_in_range: assert property (@(posedge clk) count < addr_t'(MODULUS));

endmodule
