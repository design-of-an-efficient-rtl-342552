// Self-checking testbench of ber_calc.
//
// Feeds a random bit stream x with gaps and, as the received stream y, the
// same bits delayed three clocks in the testbench with one in 13 inverted.
// Checks delayed_in, error and both counters every cycle against counts kept
// here. A 4-bit error counter is used so that its saturation at 15 is
// reached and checked. Ends with a TB_RESULT line.
module tb_ber_calc;
  localparam int LAT = 3;
  logic clk = 0, rst = 1;
  logic x = 0, x_valid = 0, y = 0, y_valid = 0, delayed_in, error;
  logic [17:0] total_din;
  logic [3:0] error_cnt;
  int checks = 0, failures = 0;

  ber_calc #(.LATENCY(LAT), .TOTAL_W(18), .ERR_W(4)) dut (
    .clk, .rst, .x, .x_valid, .y, .y_valid, .delayed_in, .error, .total_din, .error_cnt);

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

  logic hx[$], hv[$];
  int total, errs, sat_seen;
  logic flip;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    total = 0; errs = 0; sat_seen = 0;
    for (int k = 0; k < LAT; k++) begin hx.push_back(0); hv.push_back(0); end
    for (int n = 0; n < 2000; n++) begin
      x = 1'($urandom);
      x_valid = ($urandom_range(4) != 0);
      flip = (n % 13 == 7);
      y_valid = hv[0];
      y = hx[0] ^ flip;
      #1;
      check(delayed_in == hx[0] || !hv[0], "delayed_in");
      check(error == (y_valid && flip), $sformatf("error n=%0d", n));
      check(total_din == 18'(total), "total_din");
      check(error_cnt == 4'((errs > 15) ? 15 : errs), $sformatf("error_cnt %0d exp %0d", error_cnt, errs));
      if (errs >= 15) sat_seen++;
      @(posedge clk);
      if (x_valid) total++;
      if (y_valid && flip) errs++;
      void'(hx.pop_front()); void'(hv.pop_front());
      hx.push_back(x); hv.push_back(x_valid);
      #1;
    end
    check(sat_seen > 0, "error counter never saturated");
    $display("bits=%0d errors=%0d", total, errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
