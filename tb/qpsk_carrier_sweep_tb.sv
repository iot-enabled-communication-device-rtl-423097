// qpsk_carrier_sweep_tb: runs the transmitter at the carrier frequencies the
// design is meant for and measures the carrier it produces.
//
// Three transmitters run side by side, clocked at fs = 6 kHz, 1.25 MHz and
// 720 MHz, which should give fc = fs / 6 = 1 kHz, 208.3 kHz and 120 MHz. Each
// filter's cutoff is set to 2 * fc. Every instance transmits the four symbols
// 11, 10, 01, 00, each held for 48 samples (8 carrier periods). For each held
// symbol the test measures the time between rising zero crossings of the
// filtered carrier and checks the frequency within 0.2 % of fs / 6 (the clock
// period is rounded to the 1 ps time precision), and checks that the staircase
// from the analog bank repeats every 6 clock periods.
module qpsk_carrier_sweep_tb;
  import qpsk_pkg::*;

  localparam int NCFG = 3;
  localparam real FC [NCFG] = '{1.0e3, 208.333e3, 120.0e6};

  int checks = 0;
  int failures = 0;
  int measured [NCFG] = '{0, 0, 0};
  bit done [NCFG] = '{0, 0, 0};

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam real FS_HZ = 6.0 * FC[g];
    // Half clock period in ns (the time unit of this test).
    localparam real HALF_NS = 1.0e9 / FS_HZ / 2.0;

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

    qpsk_transmitter #(
      .F_SAMPLE_HZ (FS_HZ),
      .F_CUTOFF_HZ (2.0 * FC[g])
    ) dut (.*);

    always #(HALF_NS) clk = ~clk;

    initial begin
      real     prev_mod, fc_meas, clk_ns;
      realtime t_cross, t_edge, t_last_edge;
      bit      have_cross;
      real     bank_hist [$];
      logic [1:0] syms [4];
      syms = '{2'b11, 2'b10, 2'b01, 2'b00};
      #1;
      rst_n = 1'b0;
      repeat (2) @(posedge clk);
      @(negedge clk);
      rst_n = 1'b1;
      t_last_edge = 0;
      for (int s = 0; s < 4; s++) begin
        {s0, s1} = syms[s];
        have_cross = 1'b0;
        bank_hist.delete();
        for (int n = 0; n < 48; n++) begin
          prev_mod = v_mod;
          @(posedge clk);
          t_edge = $realtime;
          clk_ns = t_edge - t_last_edge;
          t_last_edge = t_edge;
          #(HALF_NS / 2.0);
          bank_hist.push_back(v_bank);
          if (n >= 8 && bank_hist.size() > 6) begin
            checks++;
            if (absr(bank_hist[bank_hist.size() - 1] - bank_hist[bank_hist.size() - 7]) > 1e-9) begin
              failures++;
              $display("FAIL cfg %0d symbol %b: staircase not periodic at sample %0d", g, syms[s], n);
            end
          end
          if (n >= 12 && prev_mod < 0.0 && v_mod >= 0.0) begin
            if (have_cross) begin
              fc_meas = 1.0e9 / (t_edge - t_cross);
              checks++;
              measured[g]++;
              if (absr(fc_meas - FS_HZ / 6.0) > 0.002 * FS_HZ / 6.0) begin
                failures++;
                $display("FAIL cfg %0d: carrier %f Hz, expected %f Hz", g, fc_meas, FS_HZ / 6.0);
              end
            end
            t_cross = t_edge;
            have_cross = 1'b1;
          end
          @(negedge clk);
        end
      end
      $display("fs = %0.1f Hz (clock period %0.3f ns): %0d carrier periods measured, fc = %0.1f Hz",
               FS_HZ, clk_ns, measured[g], fc_meas);
      done[g] = 1'b1;
    end
  end

  initial begin
    wait (done[0] && done[1] && done[2]);
    for (int g = 0; g < NCFG; g++) begin
      checks++;
      if (measured[g] == 0) begin
        failures++;
        $display("FAIL cfg %0d: no carrier period measured", g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: far beyond 4 x 48 samples at the slowest clock (about 32 ms).
  initial begin
    #1.0e8;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
