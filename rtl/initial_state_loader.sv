// initial_state_loader: restarts the symbol cycle whenever the message symbol
// changes.
//
// The loader keeps the symbol that is being transmitted. In a clock cycle where
// the input symbol differs from it, and in the first cycle after reset, it
// raises `load` and offers `load_value`: IS1 when the in-phase bit is 1, IS2
// when it is 0. The counter takes that value at the same clock edge, and the
// loader takes the new symbol as the current one. `ref_is1` tells the counter
// which initial state the current symbol started from; the counter uses it as
// the reference for its counting direction.
//
// Timing: `load` and `load_value` are combinational from `sym`; `ref_is1` is
// registered. A held symbol never reloads, so repeating a symbol continues the
// carrier without a phase jump.
//
// Choosing the initial state from the in-phase bit alone follows the published
// design. Detecting the change by comparing with a stored copy of the symbol,
// and loading after reset, are this design's choices.
module initial_state_loader
  import qpsk_pkg::*;
#(
  parameter addr_t IS1 = IS1_ADDR,
  parameter addr_t IS2 = IS2_ADDR
) (
  input  logic    clk,
  input  logic    rst_n,
  input  symbol_t sym,         // incoming message symbol
  output logic    load,        // load the counter this cycle
  output addr_t   load_value,  // initial state for the new symbol
  output logic    ref_is1      // current symbol started from IS1
);

  symbol_t cur_sym;
  logic    cur_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_sym   <= '0;
      cur_valid <= 1'b0;
    end else begin
      cur_sym   <= sym;
      cur_valid <= 1'b1;
    end
  end

  always_comb begin
    load       = !cur_valid || (sym != cur_sym);
    load_value = sym.i ? IS1 : IS2;
  end

  assign ref_is1 = cur_sym.i;

endmodule
