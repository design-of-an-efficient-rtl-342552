// Self-checking testbench of sym2chip.
//
// Sends random symbols with gaps and checks each chip against the chip
// words 0x09AF (symbol 0) and 0x7650 (symbol 1), written out here as
// literals, at a position that the testbench counts itself (bit 0 first,
// wrapping after 15 valid symbols). Also checks that a constant symbol
// reproduces its whole word. Ends with a TB_RESULT line.
module tb_sym2chip;
  import bpsk_pkg::*;
  logic clk = 0, rst = 1;
  logic sym = 0, sym_valid = 0, chip, chip_valid;
  chip_idx_t idx;
  int checks = 0, failures = 0, pos = 0, wraps = 0;
  logic [15:0] word0 = 16'h09AF, word1 = 16'h7650;
  logic [14:0] seen;

  sym2chip dut (.clk, .rst, .sym, .sym_valid, .chip, .chip_valid, .idx);

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
    for (int n = 0; n < 2000; n++) begin
      sym = 1'($urandom);
      sym_valid = ($urandom_range(4) != 0);
      #1;
      check(chip_valid == sym_valid, "valid");
      if (sym_valid)
        check(chip == (sym ? word1[pos] : word0[pos]), $sformatf("n=%0d pos=%0d sym=%0b chip=%0b", n, pos, sym, chip));
      @(posedge clk);
      if (sym_valid) begin
        pos = (pos == 14) ? 0 : pos + 1;
        if (pos == 0) wraps++;
      end
      #1;
    end
    // whole words from a constant symbol, starting at position 0
    rst = 1; #1; rst = 0;
    for (int b = 0; b < 2; b++) begin
      sym = 1'(b); sym_valid = 1;
      for (int k = 0; k < 15; k++) begin
        #1 seen[k] = chip;
        @(posedge clk); #1;
      end
      check(seen == (b ? 15'h7650 : 15'h09AF), $sformatf("word for %0d = %h", b, seen));
    end
    check(wraps > 10, "position counter never wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
