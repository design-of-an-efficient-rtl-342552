// Self-checking testbench of bpsk_mod.
//
// A second DFS in the testbench, reset together with the modulator and fed
// the same fcw, supplies the carrier samples s(n). For random chips with
// gaps the testbench works out the expected output one clock later:
// h = floor((s(n) + ~s(n-1)) / 2), sent as h for chip 1 and ~h for chip 0.
// It also checks the exact f_clk/4 sequence for a run of chip-1 values
// (-1, 1019, -1021, -1021, 1019, ...) and that chip 0 always gives the
// opposite sign of chip 1. Ends with a TB_RESULT line.
module tb_bpsk_mod;
  import bpsk_pkg::*;
  localparam int unsigned PW = 16;
  logic clk = 0, rst = 1;
  logic [PW-1:0] fcw = 16'd16384;
  logic chip = 0, chip_valid = 0, tx_valid;
  sample_t tx_data;
  logic [PW-1:0] ref_phase;
  logic signed [11:0] s_ref;
  int checks = 0, failures = 0;

  bpsk_mod dut (.clk, .rst, .fcw, .chip, .chip_valid, .tx_data, .tx_valid);
  dfs #(.PHASE_W(PW), .OUT_W(12)) ref_dfs (.clk, .rst, .fcw, .phase(ref_phase), .sine(s_ref));

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

  function automatic int expected(input int s, input int s_prev, input logic c);
    int sum, h;
    sum = s + (-s_prev - 1);
    h = sum >>> 1;
    return c ? h : -h - 1;
  endfunction

  int unsigned fcws[4] = '{16'd16384, 16'd2731, 16'd9999, 16'd30000};
  int s_prev, exp_tx, seq[6] = '{-1, 1019, -1021, -1021, 1019, 1019};
  logic exp_v;
  initial begin
    foreach (fcws[k]) begin
      fcw = PW'(fcws[k]);
      rst = 1;
      @(posedge clk); #1 rst = 0;
      s_prev = 0;
      for (int n = 0; n < 1500; n++) begin
        chip = 1'($urandom);
        chip_valid = ($urandom_range(5) != 0);
        exp_tx = expected(s_ref, s_prev, chip);
        exp_v = chip_valid;
        check(expected(s_ref, s_prev, 1'b1) < 0 != expected(s_ref, s_prev, 1'b0) < 0, "polarity");
        s_prev = s_ref;
        @(posedge clk); #1;
        check(tx_valid == exp_v, "valid");
        check(int'(tx_data) == exp_tx, $sformatf("fcw=%0d n=%0d tx=%0d exp %0d", fcw, n, tx_data, exp_tx));
      end
    end
    fcw = 16'd16384;
    rst = 1; @(posedge clk); #1 rst = 0;
    chip = 1; chip_valid = 1;
    for (int n = 0; n < 6; n++) begin
      @(posedge clk); #1;
      check(int'(tx_data) == seq[n], $sformatf("f/4 sample %0d = %0d", n, tx_data));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
