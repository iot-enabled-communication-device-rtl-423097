// keying_memory_tb: self-checking test of the keying-sequence memory.
//
// Reads every address, in order and at random, and compares the word that
// appears one clock later with the published table of keying sequences, typed
// here independently of the package. Addresses 6 and 7, and any read with
// rd_en low, must give zero.
module keying_memory_tb;
  import qpsk_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b1;
  addr_t addr = '0;
  logic  rd_en = 1'b1;
  key_t  key;

  int checks = 0;
  int failures = 0;

  // Keying sequences S[0:7], written with S0 leftmost.
  localparam logic [7:0] REF [8] = '{
    8'b10100110, 8'b01101010, 8'b01010010, 8'b01010110,
    8'b01100101, 8'b10100100, 8'b00000000, 8'b00000000
  };

  keying_memory dut (.*);

  always #5 clk = ~clk;

  initial #1 rst_n = 1'b0;  // falling edge starts the asynchronous reset

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: addr=%0d key=%b", what, $time, addr, key);
    end
  endtask

  initial begin
    int a;
    #2;
    check(key == '0, "reset clears output");
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      a = (n < 8) ? n : int'($urandom % 8);
      @(negedge clk);
      addr = addr_t'(a);
      @(posedge clk);
      #1;
      check(key == key_t'(REF[a]), "word");
      // S0 is the leftmost bit of the published literal.
      check(key[0] == REF[a][7] && key[7] == REF[a][0], "bit order");
    end
    // Read disabled: all zeros.
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      rd_en = 1'($urandom);
      addr  = addr_t'($urandom % 6);
      @(posedge clk);
      #1;
      check(key == (rd_en ? key_t'(REF[addr]) : '0), "read enable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
