// Symbol-to-chip (S2C) generation unit.
//
// Every symbol is replaced by one chip of the pseudo-random 15-bit word of
// its value: 09AF (hex) for symbol 0 and 7650 (hex) for symbol 1 (bpsk_pkg).
// Chips are produced at the symbol rate: a chip counter steps through the
// 15 chip positions, one position per valid symbol, and the chip sent for a
// symbol is the bit of that symbol's word at the current position. The chip
// then selects the carrier polarity in the BPSK modulator.
//
// The two chip words and the one-chip-per-symbol rate follow the document;
// the order of the bits (bit 0 first) is this design's choice. chip and
// chip_valid are combinational from sym, sym_valid and the counter, which
// advances at the clock edge of each valid symbol and is reset to position 0.
module sym2chip
  import bpsk_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      sym,
  input  logic      sym_valid,
  output logic      chip,
  output logic      chip_valid,
  output chip_idx_t idx
);

  assign chip       = chip_of(sym, idx);
  assign chip_valid = sym_valid;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)            idx <= '0;
    else if (sym_valid) idx <= next_idx(idx);
  end

endmodule
