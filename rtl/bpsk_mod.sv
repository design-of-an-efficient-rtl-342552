// BPSK modulator built on the digital frequency synthesizer.
//
// The DFS produces a sine carrier sample every clock. The in-phase branch I
// takes the DFS output directly; the quadrature branch Q takes the inverted
// (ones-complement) DFS output delayed by one clock, which is a quarter
// period at f_o = f_clk/4. The adder sums I and Q (one extra bit, then an
// arithmetic shift right by one so the sum fits TX_W bits). The chip selects
// the polarity: chip 1 sends the sum, chip 0 its ones complement, which is
// the carrier shifted by 180 degrees and always of the opposite sign.
//
// The DFS, the I path, the delayed inverted Q path, the adder and the
// chip-driven multiplexer follow the document. This design puts the
// polarity multiplexer after the adder instead of between the DFS and the
// I/Q paths. Because one chip lasts one clock, a multiplexer ahead of the Q
// delay would mix two chips in each output sample; after the adder every
// sample carries exactly one chip. The halving of the sum is also this
// design's choice.
//
// Timing: tx_data and tx_valid are registered, so a chip presented in cycle
// n appears on tx_data in cycle n+1, modulated by carrier sample n.
// Asynchronous active-high reset clears the outputs and the DFS phase.
module bpsk_mod
  import bpsk_pkg::*;
#(
  parameter int unsigned PHASE_W = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [PHASE_W-1:0] fcw,
  input  logic               chip,
  input  logic               chip_valid,
  output sample_t            tx_data,
  output logic               tx_valid
);

  sample_t carrier_i, carrier_q;
  logic [PHASE_W-1:0] phase_unused;

  dfs #(.PHASE_W(PHASE_W), .OUT_W(TX_W)) u_dfs (
    .clk   (clk),
    .rst   (rst),
    .fcw   (fcw),
    .phase (phase_unused),
    .sine  (carrier_i)
  );

  // Q branch: inverted DFS output, one clock late.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) carrier_q <= '1;   // ones complement of the reset sample 0
    else     carrier_q <= ~carrier_i;
  end

  // Adder, one bit wider, then halved.
  logic signed [TX_W:0] sum;
  sample_t              iq;
  assign sum = (TX_W+1)'(carrier_i) + (TX_W+1)'(carrier_q);
  assign iq  = sample_t'(sum >>> 1);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      tx_data  <= '0;
      tx_valid <= 1'b0;
    end else begin
      tx_data  <= chip ? iq : ~iq;
      tx_valid <= chip_valid;
    end
  end

endmodule
