// Digital frequency synthesizer (DFS): a sine carrier without a look-up table.
//
// A PHASE_W-bit phase accumulator adds the frequency control word fcw every
// clock, giving a saw-tooth phase; the output frequency is
//   f_o = f_clk * fcw / 2^PHASE_W.
// The two top phase bits split a period into quarters. Bit PHASE_W-2 drives a
// ones-complement unit that inverts the lower phase bits in the second and
// fourth quarters, turning the saw-tooth into a triangle. A multiplexer tree,
// addressed by the two top triangle bits, picks a segment base value and a
// set of shifted copies of the position inside the segment; an adder sums
// them. This is a four-segment piecewise-linear approximation of one quarter
// of a sine, and over a half period it gives the half-sine |sin|. The format
// converter then negates the half-sine in the second half period (phase MSB
// set) to give a full two's-complement sine of OUT_W bits.
//
// The structure (accumulator, ones-complement triangle, multiplexer tree with
// adder, format converter) and the 12-bit output width follow the
// architecture; the accumulator width, the four segments and their shift-add
// slopes are this design's choices. Peak amplitude is 2043 for OUT_W = 12.
//
// Timing: the phase register is reset to 0 by the asynchronous active-high
// rst and then advances by fcw every clock; sine is a combinational function
// of the phase register, so sample n appears in the n-th cycle after reset.
module dfs #(
  parameter int unsigned PHASE_W = 16,
  parameter int unsigned OUT_W   = 12
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [PHASE_W-1:0]        fcw,
  output logic [PHASE_W-1:0]        phase,
  output logic signed [OUT_W-1:0]   sine
);

  // Fractional width of the position inside one of the four segments.
  localparam int unsigned RW = 12;
  // Magnitude scale: the tables below are for a peak of 2047 at OUT_W = 12.
  localparam int unsigned MAG_W = OUT_W - 1;

  initial begin
    assert (PHASE_W >= RW + 4) else $error("dfs: PHASE_W must be at least %0d", RW + 4);
    assert (OUT_W >= 12) else $error("dfs: OUT_W must be at least 12");
  end

  // Phase accumulator.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) phase <= '0;
    else     phase <= phase + fcw;
  end

  // Ones-complement unit: triangle over a half period.
  logic [PHASE_W-3:0] tri_w;
  assign tri_w = phase[PHASE_W-2] ? ~phase[PHASE_W-3:0] : phase[PHASE_W-3:0];

  logic [1:0]    seg;
  logic [RW-1:0] r;
  assign seg = tri_w[PHASE_W-3 -: 2];
  assign r   = tri_w[PHASE_W-5 -: RW];

  // Multiplexer tree: base value and enabled shifts of r for each segment.
  // Knots are 2047*sin(k*pi/8), k = 0..3; slopes are sums of powers of two.
  logic [10:0] base;
  logic [9:0]  shift_en;   // bit j enables the term r >> j
  always_comb begin
    unique case (seg)
      2'd0: begin base = 11'd0;    shift_en = 10'b01_0001_1000; end // 1/8+1/16+1/256
      2'd1: begin base = 11'd783;  shift_en = 10'b11_0010_1000; end // 1/8+1/32+1/256+1/512
      2'd2: begin base = 11'd1447; shift_en = 10'b00_0111_0000; end // 1/16+1/32+1/64
      default: begin base = 11'd1891; shift_en = 10'b11_0010_0000; end // 1/32+1/256+1/512
    endcase
  end

  // Adder: base plus the selected shifted copies of r.
  logic [MAG_W-1:0] mag;
  always_comb begin
    logic [11:0] acc;
    acc = 12'(base);
    for (int j = 3; j <= 9; j++)
      if (shift_en[j]) acc = acc + 12'(r >> j);
    mag = MAG_W'(acc);
  end

  // Format converter: half-sine to signed full sine.
  logic signed [OUT_W-1:0] mag_s;
  assign mag_s = OUT_W'(mag);
  assign sine  = phase[PHASE_W-1] ? -mag_s : mag_s;

endmodule
