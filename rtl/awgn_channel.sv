// Channel model between transmitter and receiver: d'(t) = a(t)/s | m(t).
//
// The noise a(t) from awgn_gen (unit variance, 8 fractional bits) goes to the
// divider module, which divides it by the scaling factor s and keeps the
// integer part, truncated toward zero, as the noise d(t) in transmitter
// LSBs. The noise variance is therefore 1/s^2 and the signal-to-noise ratio
// is taken as s^2/4 (s = 4 gives 6 dB). The OR operation then combines the
// transmitter output m(t) bitwise with d(t) to give the corrupted sample.
// Because of the OR, a non-negative sample turns negative exactly when d(t)
// is negative (a(t) <= -s), and a negative sample keeps its sign.
//
// The divider, the OR operation and the SNR rule follow the document. Taking
// the integer part of the quotient and treating s = 0 as a noiseless channel
// are this design's choices.
//
// Timing: combinational from m and the registered noise sample; valid passes
// through unchanged.
module awgn_channel
  import bpsk_pkg::*;
#(
  parameter logic [63:0] SEED = 64'h1234_5678_9ABC_DEF1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] scale,
  input  sample_t    m,
  input  logic       m_valid,
  output sample_t    d_out,
  output logic       d_out_valid,
  output sample_t    noise
);

  logic signed [11:0] a;

  awgn_gen #(.SEED(SEED)) u_gen (
    .clk (clk),
    .rst (rst),
    .a   (a)
  );

  // Divider module: a / (s * 2^8), truncated toward zero.
  // |a| <= 1530, so the quotient always fits the sample width.
  logic signed [17:0] divisor;
  assign divisor = $signed({2'b00, scale, 8'h00});
  assign noise   = (scale == '0) ? '0 : sample_t'(18'(a) / divisor);

  // OR operation.
  assign d_out       = m | noise;
  assign d_out_valid = m_valid;

endmodule
