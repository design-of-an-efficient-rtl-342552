// Self-checking testbench of tx_fifo.
//
// Random writes and reads, with write enables that respect full and read
// enables that respect empty, against a queue model: checks the head word,
// full and empty every cycle. Bursts of writes without reads fill the FIFO
// to make full happen, bursts of reads drain it. A 4-bit word width is used
// so that ordering errors show. Ends with a TB_RESULT line.
module tb_tx_fifo;
  localparam int unsigned W = 4, D = 16;

  logic clk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0, full_seen = 0, empty_seen = 0;
  logic [W-1:0] model[$];

  tx_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst, .wr_en, .wr_data, .full, .rd_en, .rd_data, .empty);

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

  int pw, pr;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 6000; n++) begin
      // phases: fill-biased, drain-biased, balanced
      case ((n / 300) % 3)
        0: begin pw = 90; pr = 20; end
        1: begin pw = 20; pr = 90; end
        default: begin pw = 50; pr = 50; end
      endcase
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      if (model.size() > 0) check(rd_data == model[0], $sformatf("head %0h exp %0h", rd_data, model[0]));
      if (full) full_seen++;
      if (empty) empty_seen++;
      wr_en   = !full && ($urandom_range(99) < pw);
      rd_en   = !empty && ($urandom_range(99) < pr);
      wr_data = W'($urandom);
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      #1;
    end
    check(full_seen > 0, "full never reached");
    check(empty_seen > 0, "empty never reached");
    $display("full cycles=%0d empty cycles=%0d", full_seen, empty_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
