// qpsk_baseband_tb: self-checking test of the digital baseband.
//
// Drives random message symbols held for random numbers of clocks (1 to 20) and
// checks, every clock, the keying sequence against a reference worked out from
// the QPSK waveform itself: the k-th sample of a symbol (k counted from the
// clock the symbol arrived) is a_I*cos(k*60deg) + a_Q*sin(k*60deg) with
// a = +1 for bit 1 and -1 for bit 0, and it must appear two clocks after the
// clock it belongs to, encoded with the published keying sequence of that
// amplitude. Also checks the 6-clock carrier period of a held symbol and counts
// the mechanisms: a load into each initial state, each counting direction,
// each wrap, each of the four symbols, and a symbol held past a full period.
module qpsk_baseband_tb;
  import qpsk_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b1;
  logic  s0 = 1'b0;
  logic  s1 = 1'b0;
  key_t  key;
  addr_t addr;
  logic  sym_load;
  dir_e  dir;

  int checks = 0;
  int failures = 0;
  int n_load_is1 = 0, n_load_is2 = 0, n_up = 0, n_down = 0;
  int n_wrap_up = 0, n_wrap_down = 0, n_held = 0;
  int n_sym [4] = '{0, 0, 0, 0};

  qpsk_baseband dut (.*);

  always #5 clk = ~clk;

  initial #1 rst_n = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: key=%b addr=%0d", what, $time, key, addr);
    end
  endtask

  // Published keying sequence for each amplitude, S0 leftmost.
  function automatic logic [7:0] key_of(input real v);
    if (v > 1.2)       return 8'b10100110;   //  1.366
    else if (v > 0.7)  return 8'b10100100;   //  1
    else if (v > 0.0)  return 8'b01101010;   //  0.366
    else if (v > -0.7) return 8'b01100101;   // -0.366
    else if (v > -1.2) return 8'b01010010;   // -1
    else               return 8'b01010110;   // -1.366
  endfunction

  function automatic real sample(input logic i, input logic q, input int k);
    real ph;
    ph = 3.14159265358979 / 3.0 * real'(k);
    return (i ? 1.0 : -1.0) * $cos(ph) + (q ? 1.0 : -1.0) * $sin(ph);
  endfunction

  logic [7:0] hist [$];

  initial begin
    logic [7:0] pending;
    bit         have_pending;
    logic       pi, pq;
    bit         first;
    int         k, hold;
    addr_t      prev_addr;
    dir_e       prev_dir;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    have_pending = 1'b0;
    first = 1'b1;
    k = 0;
    pi = 1'b0;
    pq = 1'b0;
    for (int n = 0; n < 400; n++) begin
      hold = ($urandom % 3 == 0) ? 13 + ($urandom % 8) : 1 + ($urandom % 7);
      s0 = 1'($urandom);
      s1 = 1'($urandom);
      repeat (hold) begin
        #1;
        if (first || s0 != pi || s1 != pq) begin
          k = 0;
          check(sym_load == 1'b1, "load on symbol change");
          if (s0) n_load_is1++;
          else n_load_is2++;
          n_sym[{s0, s1}]++;
        end else begin
          k++;
          check(sym_load == 1'b0, "no load while symbol held");
          if (k == 6) n_held++;
        end
        prev_addr = addr;
        prev_dir  = dir;
        @(posedge clk);
        #1;
        if (k > 0) begin
          if (prev_dir == DIR_UP) begin
            n_up++;
            if (prev_addr == 3'd5) n_wrap_up++;
          end else begin
            n_down++;
            if (prev_addr == 3'd0) n_wrap_down++;
          end
        end
        // Output for the previous clock's sample (two-clock latency).
        if (have_pending) begin
          check(key == key_t'(pending), "keying sequence");
          hist.push_back(pending);
        end else begin
          check(key == '0, "keying lines off before the first sample");
        end
        if (k >= 7) begin
          // Carrier period: six clocks.
          check(hist[hist.size() - 1] == hist[hist.size() - 7], "period of six samples");
        end
        pending      = key_of(sample(s0, s1, k));
        have_pending = 1'b1;
        first        = 1'b0;
        pi           = s0;
        pq           = s1;
        @(negedge clk);
      end
    end
    $display("mechanisms: load_is1=%0d load_is2=%0d up=%0d down=%0d wrap_up=%0d wrap_down=%0d held_full_period=%0d sym00=%0d sym01=%0d sym10=%0d sym11=%0d",
             n_load_is1, n_load_is2, n_up, n_down, n_wrap_up, n_wrap_down, n_held,
             n_sym[0], n_sym[1], n_sym[2], n_sym[3]);
    check(n_load_is1 > 0, "IS-1 load seen");
    check(n_load_is2 > 0, "IS-2 load seen");
    check(n_up > 0, "up counting seen");
    check(n_down > 0, "down counting seen");
    check(n_wrap_up > 0, "up wrap seen");
    check(n_wrap_down > 0, "down wrap seen");
    check(n_held > 0, "held symbol seen");
    for (int s = 0; s < 4; s++) check(n_sym[s] > 0, "each symbol seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
