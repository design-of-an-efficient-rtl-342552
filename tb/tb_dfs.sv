// Self-checking testbench of dfs.
//
// Checks, for several frequency control words, that the phase accumulator
// advances by fcw per clock (modulo 2^16), that the output stays within 48
// LSB of 2047*sin(2*pi*phase/2^16) (the four-segment approximation is good
// to about 2 %), that the second half period is the exact negative of the
// first, and that the number of positive-going zero crossings in 4096
// clocks matches f_o = f_clk*fcw/2^16. Ends with a TB_RESULT line.
module tb_dfs;
  localparam int unsigned PW = 16;

  logic clk = 0, rst = 1;
  logic [PW-1:0] fcw;
  logic [PW-1:0] phase;
  logic signed [11:0] sine;
  int checks = 0, failures = 0;

  dfs dut (.clk, .rst, .fcw, .phase, .sine);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ideal(input logic [PW-1:0] ph);
    real x;
    x = 2047.0 * $sin(2.0 * 3.14159265358979 * real'(ph) / 65536.0);
    return $rtoi(x < 0 ? x - 0.5 : x + 0.5);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  int unsigned fcws[5] = '{16'd16384, 16'd1000, 16'd4096, 16'd12345, 16'd3};
  int prev_sine, crossings, max_err, err;
  logic [PW-1:0] exp_phase;
  logic signed [11:0] half [int];

  initial begin
    foreach (fcws[k]) begin
      fcw = PW'(fcws[k]);
      rst = 1;
      @(posedge clk); #1;
      rst = 0;
      exp_phase = '0;
      crossings = 0;
      max_err = 0;
      prev_sine = 0;
      for (int n = 0; n < 4096; n++) begin
        check(phase == exp_phase, $sformatf("phase n=%0d got %0d exp %0d", n, phase, exp_phase));
        err = sine - ideal(phase);
        if (err < 0) err = -err;
        if (err > max_err) max_err = err;
        check(err <= 48, $sformatf("fcw=%0d phase=%0d sine=%0d ideal=%0d", fcw, phase, sine, ideal(phase)));
        if (prev_sine < 0 && sine >= 0) crossings++;
        prev_sine = sine;
        @(posedge clk); #1;
        exp_phase = exp_phase + fcw;
      end
      // expected positive-going zero crossings in 4096 clocks
      check((crossings - int'((4096 * fcws[k]) / 65536)) inside {[-1:1]},
            $sformatf("fcw=%0d crossings=%0d", fcw, crossings));
      $display("fcw=%0d max |error|=%0d LSB crossings=%0d", fcw, max_err, crossings);
    end

    // Exact values at fcw = 2^14 (f_clk/4): 0, peak, 0, -peak.
    fcw = 16'd16384;
    rst = 1; @(posedge clk); #1; rst = 0;
    check(sine == 0, "f/4 sample 0");
    @(posedge clk); #1; check(sine == 2040, $sformatf("f/4 sample 1 = %0d", sine));
    @(posedge clk); #1; check(sine == 0, "f/4 sample 2");
    @(posedge clk); #1; check(sine == -2040, $sformatf("f/4 sample 3 = %0d", sine));

    // Odd symmetry: sample at phase p+2^15 is the negative of sample at p.
    fcw = 16'd257;
    rst = 1; @(posedge clk); #1; rst = 0;
    for (int n = 0; n < 600; n++) begin
      half[int'(phase)] = sine;
      if (half.exists(int'(phase ^ 16'h8000)))
        check(half[int'(phase ^ 16'h8000)] == -sine, $sformatf("symmetry at %0d", phase));
      @(posedge clk); #1;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
