// analog_bank_tb: self-checking test of the analog bank model.
//
// Applies each published keying sequence and checks the output voltage against
// the published amplitude (the sine/cosine values 1 + sqrt(3)/2 - 1/2 etc. are
// recomputed here), checks the first entry against the transistor-network
// formula (3.3 - 2*0.7) / (0.281k + 0.718k) * 0.718k, and checks that an
// unlisted pattern gives 0 V and drops `valid`.
module analog_bank_tb;
  import qpsk_pkg::*;

  key_t s = '0;
  real  v_out;
  logic valid;

  int checks = 0;
  int failures = 0;

  analog_bank dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: s=%b v=%f", what, s, v_out);
    end
  endtask

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin
    real r3;
    real amp [6];
    logic [7:0] pat [6];
    int a;
    r3 = $sqrt(3.0);
    amp = '{(1.0 + r3) / 2.0, (r3 - 1.0) / 2.0, -1.0, -(1.0 + r3) / 2.0, -(r3 - 1.0) / 2.0, 1.0};
    pat = '{8'b10100110, 8'b01101010, 8'b01010010, 8'b01010110, 8'b01100101, 8'b10100100};
    for (int n = 0; n < 60; n++) begin
      a = n % 6;
      s = key_t'(pat[a]);
      #10;
      check(valid == 1'b1, "valid");
      check(absr(v_out - amp[a]) < 1e-4, "amplitude");
    end
    s = key_t'(pat[0]);
    #10;
    check(absr(v_out - (3.3 - 0.7 - 0.7) / (281.0 + 718.0) * 718.0) < 2e-3, "eq5");
    for (int n = 0; n < 40; n++) begin
      s = key_t'($urandom);
      #10;
      if (s != pat[0] && s != pat[1] && s != pat[2] && s != pat[3] && s != pat[4] && s != pat[5]) begin
        check(valid == 1'b0 && v_out == 0.0, "unlisted pattern");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
