// Self-checking testbench of diff_decoder.
//
// Drives random symbols with gaps and checks each decoded bit, one clock
// later, against y_i = S_i xor S_(i-1) computed in the testbench. Then it
// feeds the differential encoder's output in both polarities and checks
// that the decoder returns the original bits either way (apart from the
// first bit after the inversion). Ends with a TB_RESULT line.
module tb_diff_decoder;
  logic clk = 0, rst = 1;
  logic s = 0, s_valid = 0, y, y_valid;
  logic prev_model = 0, exp_y = 0, exp_v = 0;
  int checks = 0, failures = 0;

  diff_decoder dut (.clk, .rst, .s, .s_valid, .y, .y_valid);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
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

  logic enc, bits[$];
  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      s = 1'($urandom);
      s_valid = ($urandom_range(3) != 0);
      @(posedge clk);
      if (s_valid) begin
        exp_y = s ^ prev_model;
        prev_model = s;
      end
      exp_v = s_valid;
      #1;
      check(y_valid == exp_v, "valid");
      if (exp_v) check(y == exp_y, $sformatf("n=%0d y=%0b exp %0b", n, y, exp_y));
    end
    // encoder/decoder pair, inverted symbol stream
    for (int inv = 0; inv < 2; inv++) begin
      rst = 1; #1; rst = 0;
      enc = 0;
      for (int n = 0; n < 200; n++) begin
        logic b;
        b = 1'($urandom);
        enc = enc ^ b;
        s = enc ^ 1'(inv);
        s_valid = 1;
        @(posedge clk); #1;
        if (n > 0) check(y == b, $sformatf("inv=%0d n=%0d", inv, n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
