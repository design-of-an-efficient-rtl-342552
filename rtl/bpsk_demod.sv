// BPSK demodulator: chip decision against a local copy of the carrier.
//
// The receiver runs its own DFS with the same frequency control word,
// reset together with the transmitter's, so the two carriers are in step
// (the loopback arrangement of the design; there is no carrier recovery).
// Two D flip-flops delay the local DFS output by one and two clocks to line
// it up with the received sample, which left the transmitter's DFS two
// clocks earlier. From them the demodulator rebuilds the noiseless chip-1
// sample: D-FF1 is the I value, the ones complement of D-FF2 the Q value,
// summed and halved exactly as in the modulator. The comparator declares
// chip 1 when the received sample Rx_in and this reference have the same
// polarity (sign bit) and chip 0 otherwise.
//
// The DFS, the two D flip-flops and the comparator follow the document.
// Comparing polarity rather than requiring the two 12-bit values to be
// exactly equal is this design's choice: with noise on the channel exact
// equality would almost never hold.
//
// Timing: chip and chip_valid are registered: the decision on the sample
// present in cycle n is available in cycle n+1. Asynchronous active-high
// reset clears the flip-flops and the DFS phase.
module bpsk_demod
  import bpsk_pkg::*;
#(
  parameter int unsigned PHASE_W = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [PHASE_W-1:0] fcw,
  input  sample_t            rx_in,
  input  logic               rx_valid,
  output logic               chip,
  output logic               chip_valid
);

  sample_t carrier, dff1, dff2;
  logic [PHASE_W-1:0] phase_unused;

  dfs #(.PHASE_W(PHASE_W), .OUT_W(TX_W)) u_dfs (
    .clk   (clk),
    .rst   (rst),
    .fcw   (fcw),
    .phase (phase_unused),
    .sine  (carrier)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      dff1 <= '0;
      dff2 <= '0;
    end else begin
      dff1 <= carrier;
      dff2 <= dff1;
    end
  end

  // Reference sample for chip 1.
  logic signed [TX_W:0] sum;
  sample_t              ref_s;
  assign sum   = (TX_W+1)'(dff1) + (TX_W+1)'(sample_t'(~dff2));
  assign ref_s = sample_t'(sum >>> 1);

  // Comparator.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      chip       <= 1'b0;
      chip_valid <= 1'b0;
    end else begin
      chip       <= (rx_in[TX_W-1] == ref_s[TX_W-1]);
      chip_valid <= rx_valid;
    end
  end

endmodule
