// Self-checking testbench of awgn_channel.
//
// A second noise generator with the same seed, reset together with the
// channel, gives the testbench the same a(t). For random transmitter samples
// and scaling factors s = 0..8 it checks d'(t) = m(t) | trunc(a(t)/(256*s))
// (no noise for s = 0) and the valid pass-through. It also measures, for
// s = 1 and s = 2, the fraction of samples whose noise is negative (the
// ones that can flip a non-negative sample), which for a unit Gaussian is
// about 15.9 % and 2.3 %. Ends with a TB_RESULT line.
module tb_awgn_channel;
  import bpsk_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] scale = 0;
  sample_t m = 0, d_out, noise;
  logic m_valid = 0, d_out_valid;
  logic signed [11:0] a_ref;
  int checks = 0, failures = 0;

  awgn_channel dut (.clk, .rst, .scale, .m, .m_valid, .d_out, .d_out_valid, .noise);
  awgn_gen ref_gen (.clk, .rst, .a(a_ref));

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

  int q, neg1, neg2, cnt1, cnt2;
  sample_t exp_d;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    neg1 = 0; neg2 = 0; cnt1 = 0; cnt2 = 0;
    for (int n = 0; n < 20000; n++) begin
      scale = 8'($urandom_range(8));
      m = sample_t'($urandom);
      m_valid = 1'($urandom);
      #1;
      if (scale == 0) q = 0;
      else begin
        q = int'(a_ref) / (256 * int'(scale));   // truncates toward zero
      end
      exp_d = m | sample_t'(q);
      check(d_out == exp_d, $sformatf("n=%0d s=%0d a=%0d m=%0d d'=%0d exp %0d", n, scale, a_ref, m, d_out, exp_d));
      check(d_out_valid == m_valid, "valid");
      if (m >= 0 && q < 0) check(d_out < 0, "flip of a non-negative sample");
      if (m < 0) check(d_out < 0, "negative sample keeps its sign");
      if (scale == 1) begin cnt1++; if (q < 0) neg1++; end
      if (scale == 2) begin cnt2++; if (q < 0) neg2++; end
      @(posedge clk); #1;
    end
    $display("negative noise: s=1 %0d/%0d, s=2 %0d/%0d", neg1, cnt1, neg2, cnt2);
    check(neg1 * 100 > cnt1 * 13 && neg1 * 100 < cnt1 * 19, "s=1 negative fraction");
    check(neg2 * 1000 > cnt2 * 12 && neg2 * 1000 < cnt2 * 35, "s=2 negative fraction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
