// IEEE 802.15.4 BPSK receiver.
//
// The corrupted samples from the channel are demodulated to chips against
// the local DFS carrier, mapped back to symbols by the chip-to-symbol unit
// and differentially decoded into the output bits. The chain is the
// document's; see the submodules for the choices made inside them.
//
// Timing: a sample on rx_in in cycle n gives its bit on dout in cycle n+2.
// The local DFS must be reset together with the transmitter's and run with
// the same fcw.
module receiver
  import bpsk_pkg::*;
#(
  parameter int unsigned PHASE_W = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [PHASE_W-1:0] fcw,
  input  sample_t            rx_in,
  input  logic               rx_valid,
  output logic               dout,
  output logic               dout_valid
);

  logic chip, chip_valid, sym, sym_valid;
  chip_idx_t idx_unused;

  bpsk_demod #(.PHASE_W(PHASE_W)) u_demod (
    .clk        (clk),
    .rst        (rst),
    .fcw        (fcw),
    .rx_in      (rx_in),
    .rx_valid   (rx_valid),
    .chip       (chip),
    .chip_valid (chip_valid)
  );

  chip2sym u_c2s (
    .clk        (clk),
    .rst        (rst),
    .chip       (chip),
    .chip_valid (chip_valid),
    .sym        (sym),
    .sym_valid  (sym_valid),
    .idx        (idx_unused)
  );

  diff_decoder u_dd (
    .clk     (clk),
    .rst     (rst),
    .s       (sym),
    .s_valid (sym_valid),
    .y       (dout),
    .y_valid (dout_valid)
  );

endmodule
