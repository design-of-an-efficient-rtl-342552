// Self-checking testbench of transmitter.
//
// Writes random bits with random gaps and compares every output sample with
// a model built in the testbench: a queue for the FIFO (one bit leaves per
// clock while it holds any), s_i = s_(i-1) xor x_i, the chip words
// 0x09AF / 0x7650 indexed by a counted position, and the modulator rule
// tx = chip ? h : ~h with h = floor((s(n) + ~s(n-1))/2) on the carrier of a
// second DFS in the testbench. Also checks the two-clock latency from a
// write into an empty FIFO to the sample on tx_data, and that din_ready
// stays high (the FIFO drains as fast as it can be written).
// Ends with a TB_RESULT line.
module tb_transmitter;
  import bpsk_pkg::*;
  localparam int unsigned PW = 16;
  logic clk = 0, rst = 1;
  logic din = 0, din_valid = 0, din_ready, x, x_valid, tx_valid;
  logic [PW-1:0] fcw = 16'd16384, ref_phase;
  logic signed [11:0] s_ref;
  sample_t tx_data;
  int checks = 0, failures = 0;
  logic [15:0] word0 = 16'h09AF, word1 = 16'h7650;

  transmitter dut (
    .clk, .rst, .din, .din_valid, .din_ready, .fcw, .x, .x_valid, .tx_data, .tx_valid);
  dfs #(.PHASE_W(PW), .OUT_W(12)) ref_dfs (.clk, .rst, .fcw, .phase(ref_phase), .sine(s_ref));

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

  function automatic int expected(input int s, input int s_prev, input logic c);
    int h;
    h = (s + (-s_prev - 1)) >>> 1;
    return c ? h : -h - 1;
  endfunction

  logic q[$];
  logic enc_prev, sym, c, exp_v;
  int pos, s_prev, exp_tx, lat;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    enc_prev = 0; pos = 0; s_prev = 0;
    // latency: one bit into the empty FIFO
    din = 1; din_valid = 1;
    @(posedge clk); #1 din_valid = 0;
    lat = 1;
    while (!tx_valid && lat < 10) begin @(posedge clk); #1 lat++; end
    check(lat == 2, $sformatf("write-to-sample latency %0d", lat));
    // restart on a clock boundary with both DFS units at phase 0
    rst = 1; @(posedge clk); #1 rst = 0;
    s_prev = 0;
    for (int n = 0; n < 5000; n++) begin
      din = 1'($urandom);
      din_valid = ($urandom_range(9) < ((n / 500) % 2 ? 3 : 9));
      check(din_ready, "din_ready low");
      check(x_valid == (q.size() > 0), "x_valid");
      exp_v = (q.size() > 0);
      if (exp_v) begin
        check(x == q[0], "fifo head");
        sym = enc_prev ^ q[0];
        c = sym ? word1[pos] : word0[pos];
        exp_tx = expected(s_ref, s_prev, c);
      end
      s_prev = s_ref;
      @(posedge clk);
      if (exp_v) begin
        void'(q.pop_front());
        enc_prev = sym;
        pos = (pos == 14) ? 0 : pos + 1;
      end
      if (din_valid) q.push_back(din);
      #1;
      check(tx_valid == exp_v, $sformatf("tx_valid n=%0d", n));
      if (exp_v) check(int'(tx_data) == exp_tx, $sformatf("n=%0d tx=%0d exp %0d", n, tx_data, exp_tx));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
