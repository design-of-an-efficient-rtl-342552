// Chip-to-symbol (C2S) generation unit.
//
// The receiver keeps its own chip counter, stepped once per valid chip and
// therefore in step with the transmitter's counter. A received chip is
// compared with the chip the word of symbol 1 (7650 hex) has at the current
// position: if they agree the symbol is 1, otherwise 0, which is the same as
// agreeing with the word of symbol 0 (09AF hex), the bitwise complement.
//
// Using the same chip words as the transmitter follows the document; the
// bit order and the counter alignment by valid chips are this design's
// choices. sym and sym_valid are combinational; the counter advances at
// the clock edge and is reset (asynchronous, active high) to position 0.
module chip2sym
  import bpsk_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      chip,
  input  logic      chip_valid,
  output logic      sym,
  output logic      sym_valid,
  output chip_idx_t idx
);

  assign sym       = (chip == chip_of(1'b1, idx));
  assign sym_valid = chip_valid;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)             idx <= '0;
    else if (chip_valid) idx <= next_idx(idx);
  end

endmodule
