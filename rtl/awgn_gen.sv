// Noise source a(t) of the AWGN channel model.
//
// A 64-bit Galois linear feedback shift register (polynomial
// x^64 + x^63 + x^61 + x^60 + 1, maximal length) is advanced 96 steps per
// clock. The 96 bits it shifts out are cut into twelve 8-bit uniform numbers
// and summed; subtracting the mean 12*127.5 (rounded to 1530) leaves an
// approximately Gaussian value with zero mean and a standard deviation of
// 256, i.e. unit variance in a fixed-point format with 8 fractional bits
// (the sum of twelve uniforms is the classic central-limit approximation;
// its tails end at about 6 sigma).
//
// That an LFSR drives the generator and that a(t) has zero mean and unit
// variance follows the document; the LFSR polynomial, the twelve-term sum
// and the fixed-point format are this design's choices.
//
// Timing: a is registered and takes a new value every clock. Asynchronous
// active-high reset loads SEED into the LFSR and clears a.
module awgn_gen #(
  parameter logic [63:0] SEED = 64'h1234_5678_9ABC_DEF1
) (
  input  logic               clk,
  input  logic               rst,
  output logic signed [11:0] a
);

  localparam logic [63:0] TAPS  = 64'hD800_0000_0000_0000;
  localparam int unsigned STEPS = 96;

  logic [63:0]      lfsr, lfsr_next;
  logic [STEPS-1:0] bits;

  always_comb begin
    logic [63:0] st;
    st = lfsr;
    for (int i = 0; i < STEPS; i++) begin
      bits[i] = st[0];
      st = st[0] ? ((st >> 1) ^ TAPS) : (st >> 1);
    end
    lfsr_next = st;
  end

  logic [11:0] usum;
  always_comb begin
    usum = '0;
    for (int k = 0; k < 12; k++) usum = usum + 12'(bits[8*k +: 8]);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      lfsr <= (SEED == '0) ? 64'h1 : SEED;
      a    <= '0;
    end else begin
      lfsr <= lfsr_next;
      a    <= $signed(usum) - 12'sd1530;
    end
  end

endmodule
