// initial_state_loader_tb: self-checking test of the initial state loader.
//
// Drives random symbols, held for random lengths, and checks every cycle that
// `load` is high exactly on the first cycle after reset and when the symbol
// differs from the one of the previous cycle, that `load_value` is 5 (IS-1) for
// an in-phase bit of 1 and 2 (IS-2) for 0, and that `ref_is1` reports the
// in-phase bit of the symbol accepted at the previous edge.
module initial_state_loader_tb;
  import qpsk_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b1;
  symbol_t sym = '0;
  logic    load;
  addr_t   load_value;
  logic    ref_is1;

  int checks = 0;
  int failures = 0;
  int loads = 0;

  initial_state_loader dut (.*);

  always #5 clk = ~clk;

  initial #1 rst_n = 1'b0;  // falling edge starts the asynchronous reset

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference model: previous symbol, reset flag.
  symbol_t prev;
  bit      first;

  initial begin
    int hold;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    first = 1'b1;
    prev  = sym;
    for (int n = 0; n < 300; n++) begin
      hold = 1 + ($urandom % 4);
      sym  = symbol_t'($urandom % 4);
      repeat (hold) begin
        #1;
        // sym changes only at falling edges
        check(load == (first || sym != prev), "load");
        check(load_value == (sym.i ? addr_t'(5) : addr_t'(2)), "load_value");
        if (!first) check(ref_is1 == prev.i, "ref_is1");
        if (load) loads++;
        @(posedge clk);
        first = 1'b0;
        prev  = sym;
        @(negedge clk);
      end
    end
    check(loads > 100, "enough loads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
