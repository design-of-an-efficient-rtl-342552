// BPSK IEEE 802.15.4 digital transceiver with channel model and BER counter.
//
// Data bits from the MAC side enter the transmitter FIFO, are differentially
// encoded, spread to chips, BPSK-modulated on the DFS carrier and sent as
// 12-bit samples (tx_out). The channel model corrupts them with scaled
// LFSR-based Gaussian noise through an OR, the receiver demodulates and
// decodes them back to bits (dout), and the BER unit compares dout with the
// input delayed to match (delayed_in), raising error and counting errors
// (error_cnt) and transmitted bits (total_din).
//
// Interface: din/din_valid/din_ready is the MAC-side write port of the FIFO
// (a bit is taken when din_valid and din_ready are both high). fcw sets the
// carrier frequency f_o = f_clk * fcw / 2^PHASE_W for both DFS units;
// change it only while rst is high. scale is the noise scaling factor s
// (SNR = s^2/4, 0 turns the noise off). rst is asynchronous and active high.
//
// Timing: one bit per clock; a bit written in cycle n appears on dout in
// cycle n+4 (three clocks from the encoder input to the decoder output).
// The block structure follows the document; the handshake, the validity
// signals that travel with the samples and the latencies are this design's.
module transceiver_top
  import bpsk_pkg::*;
#(
  parameter int unsigned PHASE_W    = 16,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned TOTAL_W    = 18,
  parameter int unsigned ERR_W      = 16,
  parameter logic [63:0] NOISE_SEED = 64'h1234_5678_9ABC_DEF1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               din,
  input  logic               din_valid,
  output logic               din_ready,
  input  logic [PHASE_W-1:0] fcw,
  input  logic [7:0]         scale,
  output sample_t            tx_out,
  output logic               tx_valid,
  output sample_t            rx_in,
  output logic               dout,
  output logic               dout_valid,
  output logic               delayed_in,
  output logic               error,
  output logic [TOTAL_W-1:0] total_din,
  output logic [ERR_W-1:0]   error_cnt
);

  // Encoder input to decoder output: modulator, demodulator, decoder registers.
  localparam int unsigned CHAIN_LATENCY = 3;

  logic    x, x_valid;
  logic    rx_valid;
  sample_t noise_unused;

  transmitter #(.PHASE_W(PHASE_W), .FIFO_DEPTH(FIFO_DEPTH)) u_tx (
    .clk       (clk),
    .rst       (rst),
    .din       (din),
    .din_valid (din_valid),
    .din_ready (din_ready),
    .fcw       (fcw),
    .x         (x),
    .x_valid   (x_valid),
    .tx_data   (tx_out),
    .tx_valid  (tx_valid)
  );

  awgn_channel #(.SEED(NOISE_SEED)) u_chan (
    .clk         (clk),
    .rst         (rst),
    .scale       (scale),
    .m           (tx_out),
    .m_valid     (tx_valid),
    .d_out       (rx_in),
    .d_out_valid (rx_valid),
    .noise       (noise_unused)
  );

  receiver #(.PHASE_W(PHASE_W)) u_rx (
    .clk        (clk),
    .rst        (rst),
    .fcw        (fcw),
    .rx_in      (rx_in),
    .rx_valid   (rx_valid),
    .dout       (dout),
    .dout_valid (dout_valid)
  );

  ber_calc #(.LATENCY(CHAIN_LATENCY), .TOTAL_W(TOTAL_W), .ERR_W(ERR_W)) u_ber (
    .clk        (clk),
    .rst        (rst),
    .x          (x),
    .x_valid    (x_valid),
    .y          (dout),
    .y_valid    (dout_valid),
    .delayed_in (delayed_in),
    .error      (error),
    .total_din  (total_din),
    .error_cnt  (error_cnt)
  );

endmodule
