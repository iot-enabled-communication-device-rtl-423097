// up_down_counter_tb: self-checking test of the modulo-6 up/down counter.
//
// Applies random loads and random (q, ref_is1) pairs and compares the count
// after each edge with a reference that counts up when q equals ref_is1 and down
// otherwise, wrapping between 0 and 5. Also checks that a run of six steps in
// one direction returns to the start (fc = fs / 6) and that both wraps occur.
module up_down_counter_tb;
  import qpsk_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b1;
  logic  load = 1'b0;
  addr_t load_value = '0;
  logic  q = 1'b0;
  logic  ref_is1 = 1'b0;
  addr_t count;
  logic  count_valid;
  dir_e  dir;

  int checks = 0;
  int failures = 0;
  int wrap_up = 0, wrap_down = 0;
  bit seen_load = 1'b0;

  up_down_counter dut (.*);

  always #5 clk = ~clk;

  initial #1 rst_n = 1'b0;  // falling edge starts the asynchronous reset

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: count=%0d", what, $time, count);
    end
  endtask

  initial begin
    int expected;
    int start;
    int steps;
    #2;
    check(count == 0 && !count_valid, "reset value");
    @(posedge clk);
    rst_n = 1'b1;
    expected = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      load       = ($urandom % 8) == 0;
      load_value = addr_t'($urandom % 6);
      q          = 1'($urandom);
      ref_is1    = 1'($urandom);
      #1;
      check(dir == ((q == ref_is1) ? DIR_UP : DIR_DOWN), "dir");
      if (load) expected = int'(load_value);
      else if (q == ref_is1) begin
        if (expected == 5) wrap_up++;
        expected = (expected + 1) % 6;
      end else begin
        if (expected == 0) wrap_down++;
        expected = (expected + 5) % 6;
      end
      @(posedge clk);
      #1;
      check(count == addr_t'(expected), "count");
      if (load) seen_load = 1'b1;
      check(count_valid == seen_load, "count_valid");
    end
    // Period: six steps in one direction come back to the start.
    for (int d = 0; d < 2; d++) begin
      @(negedge clk);
      load = 1'b0;
      q = d[0];
      ref_is1 = 1'b1;
      start = int'(count);
      steps = 0;
      do begin
        @(posedge clk);
        #1;
        steps++;
      end while (count != addr_t'(start) && steps < 12);
      check(steps == 6, "period of six steps");
    end
    check(wrap_up > 0 && wrap_down > 0, "both wraps seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
