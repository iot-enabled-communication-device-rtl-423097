// keying_memory: 6 x 8-bit read-only memory of keying sequences.
//
// Each word is the 8-bit keying sequence that makes the analog bank produce one
// of the six carrier sample values. The address comes from the up/down
// counter. The contents and the 8-bit by 6-word size are the published ones.
//
// Timing: synchronous read, the word for `addr` appears on `key` one clock
// later. The output register keeps the keying lines free of decode glitches,
// since the analog bank responds to their levels directly; that register is
// this design's choice. An address beyond the last word, or a cycle with
// `rd_en` low, gives all zeros, which switches every transistor of the bank
// off (0 V). Reset clears the output to all zeros.
module keying_memory
  import qpsk_pkg::*;
#(
  parameter int unsigned DEPTH = NUM_SAMPLES,
  parameter key_t CONTENTS [DEPTH] = KEY_ROM
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rd_en,  // read; when low the output goes to all zeros
  input  addr_t addr,
  output key_t  key
);

  key_t rom [DEPTH];

  always_comb begin
    for (int a = 0; a < int'(DEPTH); a++) rom[a] = CONTENTS[a];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key <= '0;
    end else if (rd_en && int'(addr) < int'(DEPTH)) begin
      key <= rom[addr];
    end else begin
      key <= '0;
    end
  end

endmodule
