// qpsk_transmitter_tb: end-to-end test of the transmitter at its default
// parameters (the 208.3 kHz carrier of the prototype, sampling clock 1.25 MHz,
// i.e. an 800 ns clock period).
//
// Part 1 holds each symbol 11, 10, 00, 01 for 16 samples and compares the first
// six voltages of each with the published sample table, typed in here.
// Part 2 drives random symbols for random lengths and checks every clock:
//   - the keying sequence and the analog-bank voltage against the waveform
//     a_I*cos(k*60deg) + a_Q*sin(k*60deg), two clocks after sample k's clock;
//   - the filtered voltage against an RC recursion computed here from the
//     measured clock period;
//   - for a symbol held long enough, the time between rising zero crossings of
//     the filtered carrier, which must be 6 clock periods (fc = fs / 6).
// Mechanisms counted (each must occur): loads into IS-1 and IS-2, up and down
// counting, both wraps, each symbol, a symbol held past one period, a
// measured carrier period.
module qpsk_transmitter_tb;
  import qpsk_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real FCUT = 416.7e3;     // the top's default filter cutoff

  logic  clk = 1'b0;
  logic  rst_n = 1'b1;
  logic  s0 = 1'b0;
  logic  s1 = 1'b0;
  key_t  key;
  addr_t addr;
  logic  sym_load;
  dir_e  dir;
  real   v_bank;
  logic  bank_valid;
  real   v_mod;

  int checks = 0;
  int failures = 0;
  int n_load_is1 = 0, n_load_is2 = 0, n_up = 0, n_down = 0;
  int n_wrap_up = 0, n_wrap_down = 0, n_held = 0, n_period = 0;
  int n_sym [4] = '{0, 0, 0, 0};

  qpsk_transmitter dut (.*);

  localparam realtime TCLK = 800ns;   // 1.25 MHz sampling clock

  always #(TCLK / 2) clk = ~clk;

  initial #1ns rst_n = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: key=%b v_bank=%f v_mod=%f ref=%f", what, $time, key, v_bank, v_mod, ref_filt);
    end
  endtask

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic logic [7:0] key_of(input real v);
    if (v > 1.2)       return 8'b10100110;
    else if (v > 0.7)  return 8'b10100100;
    else if (v > 0.0)  return 8'b01101010;
    else if (v > -0.7) return 8'b01100101;
    else if (v > -1.2) return 8'b01010010;
    else               return 8'b01010110;
  endfunction

  function automatic real sample(input logic i, input logic q, input int k);
    real ph;
    ph = PI / 3.0 * real'(k);
    return (i ? 1.0 : -1.0) * $cos(ph) + (q ? 1.0 : -1.0) * $sin(ph);
  endfunction

  // Published sample sets, symbols 11, 10, 01, 00.
  real table2 [4][6] = '{
    '{ 1.0,  1.366,  0.366, -1.0, -1.366, -0.366},
    '{ 1.0, -0.366, -1.366, -1.0,  0.366,  1.366},
    '{-1.0,  0.366,  1.366,  1.0, -0.366, -1.366},
    '{-1.0, -1.366, -0.366,  1.0,  1.366,  0.366}
  };
  logic [1:0] table2_sym [4] = '{2'b11, 2'b10, 2'b01, 2'b00};

  // Reference state.
  real    ref_filt = 0.0;
  real    alpha;
  real    exp_v;
  real    bank_before = 0.0;
  bit     have_exp = 1'b0;
  logic   pi_, pq_;
  bit     first = 1'b1;
  int     k = 0;
  realtime t_prev_edge, t_cross;
  bit     have_cross;
  real    prev_mod;

  // One sampling clock with symbol (a, b); returns the sample index k.
  task automatic step(input logic a, input logic b);
    addr_t pa;
    dir_e  pd;
    realtime t_edge;
    s0 = a;
    s1 = b;
    #1ns;
    if (first || a != pi_ || b != pq_) begin
      k = 0;
      have_cross = 1'b0;
      check(sym_load, "load on symbol change");
      if (a) n_load_is1++;
      else n_load_is2++;
      n_sym[{a, b}]++;
    end else begin
      k++;
      check(!sym_load, "no load while symbol held");
      if (k == 6) n_held++;
    end
    pa = addr;
    pd = dir;
    prev_mod = v_mod;
    @(posedge clk);
    t_edge = $realtime;
    #1ns;
    if (k > 0) begin
      if (pd == DIR_UP) begin
        n_up++;
        if (pa == 3'd5) n_wrap_up++;
      end else begin
        n_down++;
        if (pa == 3'd0) n_wrap_down++;
      end
    end
    // The filter took, at this edge, the bank voltage held during the
    // previous clock (0 V right after reset, when the keying lines are zero).
    ref_filt = ref_filt + alpha * (bank_before - ref_filt);
    check(absr(v_mod - ref_filt) < 1e-3, "filtered voltage");
    bank_before = have_exp ? exp_v : 0.0;
    if (have_exp) begin
      check(key == key_t'(key_of(exp_v)), "keying sequence");
      check(bank_valid, "bank input valid");
      check(absr(v_bank - exp_v) < 1e-4, "analog bank voltage");
    end
    // Rising zero crossing of the filtered carrier, well inside a held symbol.
    if (k >= 8 && prev_mod < 0.0 && v_mod >= 0.0) begin
      if (have_cross) begin
        check(absr((t_edge - t_cross) - 6.0 * TCLK) < 1e-6 * TCLK, "carrier period 6 / fs");
        n_period++;
      end
      t_cross = t_edge;
      have_cross = 1'b1;
    end
    exp_v    = sample(a, b, k);
    have_exp = 1'b1;
    first    = 1'b0;
    pi_      = a;
    pq_      = b;
    t_prev_edge = t_edge;
    @(negedge clk);
  endtask

  initial begin
    int hold;
    logic a, b;
    realtime t0;
    alpha = 1.0 - $exp(-(1.0 / 1.25e6) * 2.0 * PI * FCUT);
    // Check, during reset, that the clock is 800 ns: fs = 1.25 MHz, fc = 208.3 kHz.
    @(posedge clk);
    t0 = $realtime;
    @(posedge clk);
    check(absr(($realtime - t0) - TCLK) < 1e-6 * TCLK, "sampling clock 1.25 MHz");
    @(negedge clk);
    rst_n = 1'b1;
    // Part 1: the published sample table, each symbol held 16 samples.
    for (int s = 0; s < 4; s++) begin
      for (int n = 0; n < 16; n++) begin
        step(table2_sym[s][1], table2_sym[s][0]);
        if (n >= 1 && n <= 6) begin
          check(absr(v_bank - table2[s][n - 1]) < 1e-3, "published sample table");
        end
      end
    end
    // Part 2: random symbols.
    for (int n = 0; n < 300; n++) begin
      hold = ($urandom % 3 == 0) ? 20 + ($urandom % 10) : 1 + ($urandom % 7);
      a = 1'($urandom);
      b = 1'($urandom);
      repeat (hold) step(a, b);
    end
    $display("mechanisms: load_is1=%0d load_is2=%0d up=%0d down=%0d wrap_up=%0d wrap_down=%0d held_full_period=%0d carrier_periods=%0d sym00=%0d sym01=%0d sym10=%0d sym11=%0d",
             n_load_is1, n_load_is2, n_up, n_down, n_wrap_up, n_wrap_down, n_held, n_period,
             n_sym[0], n_sym[1], n_sym[2], n_sym[3]);
    check(n_load_is1 > 0, "IS-1 load seen");
    check(n_load_is2 > 0, "IS-2 load seen");
    check(n_up > 0, "up counting seen");
    check(n_down > 0, "down counting seen");
    check(n_wrap_up > 0, "up wrap seen");
    check(n_wrap_down > 0, "down wrap seen");
    check(n_held > 0, "held symbol seen");
    check(n_period > 0, "carrier period measured");
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
