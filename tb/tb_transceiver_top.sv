// End-to-end testbench of transceiver_top at its default parameters.
//
// Phase 1, noiseless channel (s = 0): one bit into the idle design must
// reach dout four clocks after it was written, and a random stream with
// gaps must come back without a single error. Phase 2 repeats the noiseless
// stream at two other carrier frequencies (a change of fcw under reset).
// Phase 3 uses s = 1, where about 8 % of the chips flip and the bit error
// rate is near 15 %; phase 4 uses s = 4 (6 dB). In every phase the
// testbench compares dout with its own queue of the bits it wrote, and
// error_cnt and total_din must equal its own counts; the error output must
// pulse once per counted error. The mechanisms exercised are counted and
// each must have happened: FIFO running empty (gaps), chip-counter wrap,
// noise-caused bit errors, error-free noiseless operation, the carrier
// frequency change. Ends with a TB_RESULT line.
module tb_transceiver_top;
  import bpsk_pkg::*;
  logic clk = 0, rst = 1;
  logic din = 0, din_valid = 0, din_ready, tx_valid, dout, dout_valid, delayed_in, error;
  logic [15:0] fcw = 16'd16384;
  logic [7:0] scale = 0;
  sample_t tx_out, rx_in;
  logic [17:0] total_din;
  logic [15:0] error_cnt;
  int checks = 0, failures = 0;

  transceiver_top dut (
    .clk, .rst, .din, .din_valid, .din_ready, .fcw, .scale, .tx_out, .tx_valid, .rx_in,
    .dout, .dout_valid, .delayed_in, .error, .total_din, .error_cnt);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
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

  int gaps = 0, wraps = 0, noise_errors = 0, clean_runs = 0, fcw_changes = 0;
  int sent, got, errs, pulses;
  logic q[$];

  // Run nbits through the design with the given settings and check it.
  task automatic run(input logic [15:0] f, input logic [7:0] s, input int nbits, input int gap_pct,
                     output int e_out, output int n_out);
    int lat;
    if (f != fcw) fcw_changes++;
    fcw = f; scale = s;
    rst = 1; @(posedge clk); #1 rst = 0;
    q.delete();
    sent = 0; got = 0; errs = 0; pulses = 0;
    while (got < nbits) begin
      din = 1'($urandom);
      din_valid = (sent < nbits) && ($urandom_range(99) >= gap_pct);
      #1;
      check(din_ready, "din_ready");
      if (dout_valid) begin
        check(q.size() > 0, "output without input");
        if (q.size() > 0) begin
          check(delayed_in == q[0], "delayed_in");
          if (dout != q[0]) errs++;
          void'(q.pop_front());
        end
        got++;
        if (got % 15 == 0) wraps++;
      end
      if (error) pulses++;
      if (!dut.u_tx.x_valid && sent > 0 && got < nbits) gaps++;
      @(posedge clk);
      if (din_valid) begin q.push_back(din); sent++; end
      #1;
    end
    din_valid = 0;
    repeat (8) @(posedge clk);
    #1;
    check(int'(total_din) == nbits, $sformatf("total_din %0d exp %0d", total_din, nbits));
    check(int'(error_cnt) == errs, $sformatf("error_cnt %0d exp %0d", error_cnt, errs));
    check(pulses == errs, "error pulses");
    e_out = errs; n_out = nbits;
  endtask

  int e, n, lat;
  initial begin
    // Phase 1a: latency of a single bit through the idle design.
    scale = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    din = 1; din_valid = 1;
    @(posedge clk); #1 din_valid = 0;
    lat = 1;
    while (!dout_valid && lat < 20) begin @(posedge clk); #1 lat++; end
    check(lat == 4, $sformatf("din-to-dout latency %0d", lat));
    check(dout == 1'b1, "single bit");
    $display("latency din -> dout: %0d clocks", lat);

    // Phase 1b/2: noiseless channel at three carrier frequencies.
    run(16'd16384, 8'd0, 4000, 20, e, n);
    check(e == 0, "noiseless errors"); if (e == 0) clean_runs++;
    run(16'd8875, 8'd0, 3000, 10, e, n);
    check(e == 0, "noiseless errors f2"); if (e == 0) clean_runs++;
    run(16'd9363, 8'd0, 3000, 0, e, n);
    check(e == 0, "noiseless errors f3"); if (e == 0) clean_runs++;

    // Phase 3: strong noise.
    run(16'd16384, 8'd1, 6000, 5, e, n);
    $display("s=1: %0d errors in %0d bits (BER %f)", e, n, real'(e) / n);
    check(e * 100 > n * 8 && e * 100 < n * 22, "BER at s=1 out of range");
    noise_errors += e;

    // Phase 4: s = 4 (6 dB).
    run(16'd16384, 8'd4, 20000, 0, e, n);
    $display("s=4: %0d errors in %0d bits", e, n);
    check(e * 1000 < n, "BER at s=4 above 1e-3");

    $display("mechanisms: gaps=%0d chip-word wraps=%0d noise errors=%0d clean runs=%0d fcw changes=%0d",
             gaps, wraps, noise_errors, clean_runs, fcw_changes);
    check(gaps > 0, "FIFO never ran empty");
    check(wraps > 0, "chip counter never wrapped");
    check(noise_errors > 0, "noise never caused an error");
    check(clean_runs == 3, "noiseless runs not clean");
    check(fcw_changes > 0, "carrier frequency never changed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
