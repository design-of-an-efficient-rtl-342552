// Self-checking testbench of chip2sym.
//
// Sends the chips of random symbols, taken from the literal chip words
// 0x09AF / 0x7650 at a position the testbench counts itself, with gaps in
// chip_valid, and checks the recovered symbol. Every seventh chip is
// inverted, and the symbol must then come out inverted as well.
// Ends with a TB_RESULT line.
module tb_chip2sym;
  import bpsk_pkg::*;
  logic clk = 0, rst = 1;
  logic chip = 0, chip_valid = 0, sym, sym_valid;
  chip_idx_t idx;
  int checks = 0, failures = 0, pos = 0;
  logic [15:0] word0 = 16'h09AF, word1 = 16'h7650;

  chip2sym dut (.clk, .rst, .chip, .chip_valid, .sym, .sym_valid, .idx);

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

  logic b, flip;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      b = 1'($urandom);
      flip = (n % 7 == 3);
      chip = (b ? word1[pos] : word0[pos]) ^ flip;
      chip_valid = ($urandom_range(4) != 0);
      #1;
      check(sym_valid == chip_valid, "valid");
      if (chip_valid) check(sym == (b ^ flip), $sformatf("n=%0d pos=%0d", n, pos));
      @(posedge clk);
      if (chip_valid) pos = (pos == 14) ? 0 : pos + 1;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
