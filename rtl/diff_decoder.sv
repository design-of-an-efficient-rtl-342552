// Differential decoder: y_i = S_i xor S_(i-1).
//
// The recovered bit is the modulo-2 difference of the received symbol and
// the one before it, so an inversion of the whole symbol stream does not
// change it. The previous symbol is stored at every valid symbol and reset
// to 0, matching the differential encoder's reset state. The rule is the
// document's; the registered output and the reset value are this design's
// choices.
//
// Timing: y and y_valid are registered, one clock after S and S_valid.
module diff_decoder (
  input  logic clk,
  input  logic rst,
  input  logic s,
  input  logic s_valid,
  output logic y,
  output logic y_valid
);

  logic s_prev;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      s_prev  <= 1'b0;
      y       <= 1'b0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= s_valid;
      if (s_valid) begin
        y      <= s ^ s_prev;
        s_prev <= s;
      end
    end
  end

endmodule
