// Shared constants of the BPSK IEEE 802.15.4 transceiver.
//
// The two 15-bit chip words are the symbol-to-chip table of the design:
// symbol 0 is sent as 09AF (hex) and symbol 1 as 7650 (hex). The two words
// are bitwise complements of each other over 15 bits, which is what lets the
// receiver decide a symbol from a single chip. Chip k of a word is bit k,
// so bit 0 is sent first (the bit order is this design's choice).
// TX_W is the width of the transmitted and received samples.
package bpsk_pkg;

  localparam int unsigned CHIP_LEN = 15;
  typedef logic [CHIP_LEN-1:0] chip_word_t;

  localparam chip_word_t CHIP0 = 15'h09AF;  // chip word of symbol 0
  localparam chip_word_t CHIP1 = 15'h7650;  // chip word of symbol 1

  localparam int unsigned TX_W = 12;
  typedef logic signed [TX_W-1:0] sample_t;

  typedef logic [$clog2(CHIP_LEN)-1:0] chip_idx_t;

  // Chip number idx of the word that stands for symbol sym.
  function automatic logic chip_of(input logic sym, input chip_idx_t idx);
    return sym ? CHIP1[idx] : CHIP0[idx];
  endfunction

  // Next chip index, wrapping after the last chip of a word.
  function automatic chip_idx_t next_idx(input chip_idx_t idx);
    return (idx == chip_idx_t'(CHIP_LEN - 1)) ? '0 : idx + 1'b1;
  endfunction

endpackage
