// IEEE 802.15.4 BPSK transmitter.
//
// Data bits from the MAC layer enter the FIFO interface; whenever the FIFO
// holds a bit it is popped (one bit per clock), differentially encoded,
// mapped to a chip by the symbol-to-chip unit and sent by the BPSK modulator
// as one TX_W-bit sample. x/x_valid expose the bit entering the encoder so
// that the bit-error counter can compare it with the received bit.
//
// The chain (FIFO, differential encoding, symbol-to-chip, BPSK modulator
// with DFS) is the document's. There is no framing: when the FIFO runs empty
// the transmitter sends nothing valid and holds the encoder and chip
// counter, and the validity travels alongside the samples (tx_valid); this
// is this design's choice, as is the one-bit-per-clock drain rate.
//
// Timing: a bit written in cycle n is at the FIFO head in cycle n+1, goes
// through the encoder and symbol-to-chip unit in that cycle and is on
// tx_data in cycle n+2.
module transmitter
  import bpsk_pkg::*;
#(
  parameter int unsigned PHASE_W    = 16,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               din,
  input  logic               din_valid,
  output logic               din_ready,
  input  logic [PHASE_W-1:0] fcw,
  output logic               x,
  output logic               x_valid,
  output sample_t            tx_data,
  output logic               tx_valid
);

  logic full, empty;
  logic sym, sym_valid, chip, chip_valid;
  chip_idx_t idx_unused;

  assign din_ready = !full;
  assign x_valid   = !empty;

  tx_fifo #(.WIDTH(1), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk     (clk),
    .rst     (rst),
    .wr_en   (din_valid && !full),
    .wr_data (din),
    .full    (full),
    .rd_en   (!empty),
    .rd_data (x),
    .empty   (empty)
  );

  diff_encoder u_de (
    .clk     (clk),
    .rst     (rst),
    .x       (x),
    .x_valid (x_valid),
    .s       (sym),
    .s_valid (sym_valid)
  );

  sym2chip u_s2c (
    .clk        (clk),
    .rst        (rst),
    .sym        (sym),
    .sym_valid  (sym_valid),
    .chip       (chip),
    .chip_valid (chip_valid),
    .idx        (idx_unused)
  );

  bpsk_mod #(.PHASE_W(PHASE_W)) u_mod (
    .clk        (clk),
    .rst        (rst),
    .fcw        (fcw),
    .chip       (chip),
    .chip_valid (chip_valid),
    .tx_data    (tx_data),
    .tx_valid   (tx_valid)
  );

endmodule
