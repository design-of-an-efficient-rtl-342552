// Self-checking testbench of awgn_gen.
//
// Collects 40,000 noise samples and checks the statistics expected of a
// zero-mean, unit-variance Gaussian in a format with 8 fractional bits:
// mean within 8 LSB of 0, standard deviation within 4 % of 256, about 68 %
// of the samples within one sigma and about 95 % within two, the range
// limited to +-1530, and a new value on most clocks. The statistics are
// computed here from the samples, independently of the generator's
// structure. Ends with a TB_RESULT line.
module tb_awgn_gen;
  logic clk = 0, rst = 1;
  logic signed [11:0] a;
  int checks = 0, failures = 0;

  awgn_gen dut (.clk, .rst, .a);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  localparam int N = 40000;
  real sum, sumsq, mean, sd;
  int in1, in2, same, prev, lo, hi;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    @(posedge clk); #1;
    sum = 0; sumsq = 0; in1 = 0; in2 = 0; same = 0; prev = 9999; lo = 0; hi = 0;
    for (int n = 0; n < N; n++) begin
      sum += a;
      sumsq += real'(a) * real'(a);
      if (a >= -256 && a <= 256) in1++;
      if (a >= -512 && a <= 512) in2++;
      if (a == prev) same++;
      if (a < lo) lo = a;
      if (a > hi) hi = a;
      prev = a;
      check(a >= -1530 && a <= 1530, "range");
      @(posedge clk); #1;
    end
    mean = sum / N;
    sd = $sqrt(sumsq / N - mean * mean);
    $display("mean=%f sd=%f within1=%0d within2=%0d min=%0d max=%0d", mean, sd, in1, in2, lo, hi);
    check(mean > -8.0 && mean < 8.0, "mean");
    check(sd > 245.0 && sd < 267.0, "standard deviation");
    check(in1 > int'(0.65 * N) && in1 < int'(0.71 * N), "one-sigma fraction");
    check(in2 > int'(0.935 * N) && in2 < int'(0.965 * N), "two-sigma fraction");
    check(same < N / 50, "value repeats too often");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
