// Bit-error-rate calculation unit.
//
// The transmitted bit x(t) is delayed by LATENCY clocks, the latency of the
// transmit/receive chain, so that it lines up with the received bit y(t)
// (delayed_in). The comparator raises error when a valid received bit
// differs from the delayed input, e(t) = (x(t) != y(t)). Two counters
// accumulate the result: total_din counts the bits that entered the
// transmitter and error_cnt the bit errors. BER = error_cnt / total_din once
// the chain has drained.
//
// The delayed input, the comparator and the two counters with the names
// delayed_in, error, total_din and error_cnt follow the document, as do the
// 16-bit error counter and an input counter wide enough for 150,000 bits.
// The error counter saturating at its maximum is this design's choice.
//
// Timing: error is combinational from y/y_valid and the delay line; the
// counters update at the clock edge. Asynchronous active-high reset clears
// the delay line and both counters. An assertion checks that the delayed
// input and the received bit are valid in the same cycles.
module ber_calc #(
  parameter int unsigned LATENCY = 3,
  parameter int unsigned TOTAL_W = 18,
  parameter int unsigned ERR_W   = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               x,
  input  logic               x_valid,
  input  logic               y,
  input  logic               y_valid,
  output logic               delayed_in,
  output logic               error,
  output logic [TOTAL_W-1:0] total_din,
  output logic [ERR_W-1:0]   error_cnt
);

  logic [LATENCY-1:0] dly_bit, dly_vld;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      dly_bit <= '0;
      dly_vld <= '0;
    end else begin
      dly_bit <= {dly_bit[LATENCY-2:0], x};
      dly_vld <= {dly_vld[LATENCY-2:0], x_valid};
    end
  end

  assign delayed_in = dly_bit[LATENCY-1];
  assign error      = y_valid && (y != delayed_in);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      total_din <= '0;
      error_cnt <= '0;
    end else begin
      if (x_valid) total_din <= total_din + 1'b1;
      if (error && error_cnt != '1) error_cnt <= error_cnt + 1'b1;
    end
  end

  initial assert (LATENCY >= 2) else $error("ber_calc: LATENCY must be at least 2");

  a_aligned: assert property (@(posedge clk) disable iff (rst) y_valid == dly_vld[LATENCY-1])
    else $error("ber_calc: received bit and delayed input are out of step");

endmodule
