// low_pass_filter_tb: self-checking test of the RC low-pass filter model.
//
// Applies a 1 V step and checks the output at each sampling edge against the
// analytic RC step response 1 - exp(-t / RC) with t = n / fs and
// RC = 1 / (2*pi*fc_cut). Then applies a 3-sample-high/3-sample-low square
// wave (period 6 samples, as the carrier) and checks that the steady-state
// peak-to-peak output is below that of the input.
module low_pass_filter_tb;
  localparam real FS = 1.25e6;
  localparam real FCUT = 416.7e3;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  real  v_in = 0.0;
  real  v_out;

  int checks = 0;
  int failures = 0;

  low_pass_filter #(.F_SAMPLE_HZ(FS), .F_CUTOFF_HZ(FCUT)) dut (.*);

  always #5 clk = ~clk;

  initial #1 rst_n = 1'b0;  // falling edge starts the asynchronous reset

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: v_out=%f", what, $time, v_out);
    end
  endtask

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin
    real rc, expect_v, vmax, vmin;
    rc = 1.0 / (2.0 * 3.14159265358979 * FCUT);
    repeat (2) @(posedge clk);
    #1;
    check(v_out == 0.0, "reset");
    rst_n = 1'b1;
    @(negedge clk);
    v_in = 1.0;
    for (int n = 1; n <= 30; n++) begin
      @(posedge clk);
      #1;
      expect_v = 1.0 - $exp(-(real'(n) / FS) / rc);
      check(absr(v_out - expect_v) < 1e-6, "step response");
    end
    vmax = -10.0;
    vmin = 10.0;
    for (int n = 0; n < 120; n++) begin
      @(negedge clk);
      v_in = ((n % 6) < 3) ? 1.0 : -1.0;
      @(posedge clk);
      #1;
      if (n >= 60) begin
        if (v_out > vmax) vmax = v_out;
        if (v_out < vmin) vmin = v_out;
      end
    end
    check(vmax - vmin < 2.0 && vmax - vmin > 0.5, "square wave smoothed");
    check(absr(vmax + vmin) < 1e-3, "no offset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
