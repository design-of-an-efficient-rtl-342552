// Bit-error-rate run of transceiver_top at its default parameters.
//
// Sends 150,000 random bits back to back through the transceiver with the
// noise scaling factor s = 4 (SNR s^2/4 = 4, 6 dB) and the carrier at
// f_clk/4, waits for the chain to drain and reports error_cnt, total_din
// and the bit error rate. The testbench keeps its own count of mismatches
// between the bits it sent and dout, which error_cnt must equal; total_din
// must be 150,000. For this noise model the expected rate at s = 4 is about
// 9e-6 (about 1.3 errors in 150,000 bits); the run fails if it exceeds 1e-4.
// A second run of 150,000 bits at s = 3 (3.5 dB), where about 1e-3 is
// expected, must land between 6e-4 and 1.5e-3, which shows the noise path
// is active at the default sizes. Both runs must take exactly one clock per
// bit plus the 4-clock latency. Ends with a TB_RESULT line.
module tb_ber_run;
  import bpsk_pkg::*;
  localparam int NBITS = 150_000;
  logic clk = 0, rst = 1;
  logic din = 0, din_valid = 0, din_ready, tx_valid, dout, dout_valid, delayed_in, error;
  logic [15:0] fcw = 16'd16384;
  logic [7:0] scale = 8'd4;
  sample_t tx_out, rx_in;
  logic [17:0] total_din;
  logic [15:0] error_cnt;
  int checks = 0, failures = 0;

  transceiver_top dut (
    .clk, .rst, .din, .din_valid, .din_ready, .fcw, .scale, .tx_out, .tx_valid, .rx_in,
    .dout, .dout_valid, .delayed_in, .error, .total_din, .error_cnt);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
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

  logic q[$];
  int errs, got, sent, cycles;

  task automatic ber_run(input logic [7:0] s);
    scale = s;
    rst = 1; @(posedge clk); #1 rst = 0;
    q.delete();
    errs = 0; got = 0; sent = 0; cycles = 0;
    while (got < NBITS) begin
      din = 1'($urandom);
      din_valid = (sent < NBITS);
      #1;
      if (dout_valid) begin
        if (dout != q[0]) errs++;
        void'(q.pop_front());
        got++;
      end
      @(posedge clk);
      cycles++;
      if (din_valid) begin q.push_back(din); sent++; end
      #1;
    end
    din_valid = 0;
    repeat (6) @(posedge clk);
    #1;
    $display("s=%0d: total_din=%0d error_cnt=%0d BER=%e", s, total_din, error_cnt,
             real'(error_cnt) / real'(total_din));
    check(int'(total_din) == NBITS, "total_din");
    // one bit per clock: the last bit is out 4 clocks after the last write
    check(cycles == NBITS + 4, $sformatf("%0d bits took %0d clocks", NBITS, cycles));
    check(int'(error_cnt) == errs, $sformatf("error_cnt %0d, counted %0d", error_cnt, errs));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    ber_run(8'd4);
    check(errs * 10_000 <= NBITS, "BER above 1e-4 at 6 dB");
    ber_run(8'd3);
    check(errs * 10_000 >= NBITS * 6 && errs * 10_000 <= NBITS * 15, "BER at 3.5 dB out of range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
