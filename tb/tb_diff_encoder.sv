// Self-checking testbench of diff_encoder.
//
// Drives random bits with random gaps in x_valid and checks every valid
// output symbol against s_i = s_(i-1) xor x_i computed in the testbench,
// and that the state does not move on cycles without x_valid.
// Ends with a TB_RESULT line.
module tb_diff_encoder;
  logic clk = 0, rst = 1;
  logic x = 0, x_valid = 0, s, s_valid;
  logic prev_model = 0;
  int checks = 0, failures = 0;

  diff_encoder dut (.clk, .rst, .x, .x_valid, .s, .s_valid);

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

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      x = 1'($urandom);
      x_valid = ($urandom_range(3) != 0);
      #1;
      check(s_valid == x_valid, "valid");
      check(s == (prev_model ^ x), $sformatf("n=%0d s=%0b", n, s));
      @(posedge clk);
      if (x_valid) prev_model = prev_model ^ x;
      #1;
    end
    // a run of ones toggles the symbol every bit
    x = 1; x_valid = 1;
    for (int n = 0; n < 8; n++) begin
      #1 check(s == (prev_model ^ 1'b1), "toggle on one");
      @(posedge clk); prev_model = ~prev_model; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
