// Self-checking testbench of receiver.
//
// A transmitter instance, reset together with the receiver and fed the same
// fcw, sends random bits with gaps. Without corruption every bit that enters
// the transmitter's encoder (x) must come out on dout exactly three clocks
// later, for several frequency control words. In a second pass one sample
// in 97 is inverted on the way; because of the differential decoding that
// must turn exactly the two bits whose symbols straddle it into errors.
// Ends with a TB_RESULT line.
module tb_receiver;
  import bpsk_pkg::*;
  localparam int unsigned PW = 16;
  localparam int N = 3000;
  logic clk = 0, rst = 1;
  logic [PW-1:0] fcw = 16'd16384;
  logic din = 0, din_valid = 0, din_ready, x, x_valid, tx_valid, dout, dout_valid, corrupt = 0;
  sample_t tx_data, rx_in;
  int checks = 0, failures = 0;

  transmitter #(.PHASE_W(PW)) u_tx (.clk, .rst, .din, .din_valid, .din_ready, .fcw, .x, .x_valid, .tx_data, .tx_valid);
  assign rx_in = corrupt ? ~tx_data : tx_data;
  receiver dut (.clk, .rst, .fcw, .rx_in, .rx_valid(tx_valid), .dout, .dout_valid);

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

  int unsigned fcws[3] = '{16'd16384, 16'd5461, 16'd29000};
  logic hx[N], hv[N], hc[N];
  int errs, hits, exp_errs;
  initial begin
    for (int pass = 0; pass < 4; pass++) begin
      fcw = PW'(fcws[pass % 3]);
      rst = 1; @(posedge clk); #1 rst = 0;
      errs = 0; exp_errs = 0;
      for (int n = 0; n < N; n++) begin
        din = 1'($urandom);
        din_valid = ($urandom_range(7) != 0);
        corrupt = (pass == 3) && (n % 97 == 50) && tx_valid;
        hc[n] = corrupt;
        #1;
        hx[n] = x; hv[n] = x_valid;
        if (n >= 3) begin
          check(dout_valid == hv[n-3], $sformatf("valid n=%0d", n));
          if (hv[n-3]) begin
            if (pass < 3) check(dout == hx[n-3], $sformatf("pass=%0d n=%0d", pass, n));
            else if (dout != hx[n-3]) errs++;
          end
        end
        if (pass == 3 && corrupt) exp_errs += 2;
        @(posedge clk); #1;
      end
      if (pass == 3) begin
        $display("inverted samples gave %0d bit errors, expected %0d (+-2 at the end)", errs, exp_errs);
        check(errs <= exp_errs && errs >= exp_errs - 2 && exp_errs > 0, "two bit errors per inverted sample");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
