// Self-checking testbench of bpsk_demod.
//
// A bpsk_mod instance, reset together with the demodulator and fed the same
// fcw, sends random chips. The testbench checks that each chip comes back
// one clock after its sample (two after it entered the modulator) for
// several frequency control words, that gaps in validity are passed on, and
// that a sample whose sign is forced the other way is decided as the other
// chip. Ends with a TB_RESULT line.
module tb_bpsk_demod;
  import bpsk_pkg::*;
  localparam int unsigned PW = 16;
  logic clk = 0, rst = 1;
  logic [PW-1:0] fcw = 16'd16384;
  logic chip_in = 0, chip_in_valid = 0, tx_valid, chip, chip_valid, corrupt = 0;
  sample_t tx_data, rx_in;
  int checks = 0, failures = 0;

  bpsk_mod #(.PHASE_W(PW)) u_mod (.clk, .rst, .fcw, .chip(chip_in), .chip_valid(chip_in_valid), .tx_data, .tx_valid);
  assign rx_in = corrupt ? ~tx_data : tx_data;
  bpsk_demod dut (.clk, .rst, .fcw, .rx_in, .rx_valid(tx_valid), .chip, .chip_valid);

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

  int unsigned fcws[5] = '{16'd16384, 16'd4000, 16'd21845, 16'd777, 16'd32767};
  logic hc[2000], hv[2000], hx[2000];
  initial begin
    foreach (fcws[k]) begin
      fcw = PW'(fcws[k]);
      rst = 1; @(posedge clk); #1 rst = 0;
      for (int n = 0; n < 2000; n++) begin
        chip_in = 1'($urandom);
        chip_in_valid = ($urandom_range(6) != 0);
        corrupt = (n % 11 == 5);
        hc[n] = chip_in; hv[n] = chip_in_valid; hx[n] = corrupt;
        #1;
        // the decision now visible is on the sample of cycle n-1, which
        // carries the chip of cycle n-2
        if (n >= 2) begin
          check(chip_valid == hv[n-2], "valid");
          if (hv[n-2]) check(chip == (hc[n-2] ^ hx[n-1]), $sformatf("fcw=%0d n=%0d", fcw, n));
        end
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
