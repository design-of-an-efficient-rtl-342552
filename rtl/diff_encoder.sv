// Differential encoder: s_i = s_(i-1) xor x_i.
//
// Each data bit x_i is added modulo 2 to the previously sent symbol, so the
// information sits in the change between consecutive symbols and survives a
// polarity inversion of the whole symbol stream. The encoded symbol s is
// combinational from x and the stored previous symbol; the stored symbol is
// updated at the clock edge of every cycle in which x_valid is high. s_valid
// equals x_valid. The rule is the document's; resetting the stored symbol to
// 0 (asynchronous, active high) is this design's choice.
module diff_encoder (
  input  logic clk,
  input  logic rst,
  input  logic x,
  input  logic x_valid,
  output logic s,
  output logic s_valid
);

  logic s_prev;

  assign s       = s_prev ^ x;
  assign s_valid = x_valid;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)          s_prev <= 1'b0;
    else if (x_valid) s_prev <= s;
  end

endmodule
