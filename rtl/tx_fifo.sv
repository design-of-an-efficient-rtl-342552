// FIFO interface between the MAC layer and the transmitter.
//
// The MAC layer hands the data bits to the differential encoder through this
// first-in first-out buffer. It is a circular buffer of DEPTH one-bit words
// (WIDTH is a parameter) with show-ahead reading: rd_data always holds the
// oldest word while empty is low, and rd_en pops it at the clock edge.
// A write while full and a read while empty are ignored (and flagged by the
// assertions). Writing and reading in the same cycle is allowed.
//
// The document names the FIFO but gives neither its depth nor its handshake;
// the depth of 16, the show-ahead read and the full/empty flags are this
// design's choices. Asynchronous active-high reset empties the buffer.
module tx_fifo #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      count;

  logic do_wr, do_rd;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign rd_data = mem[rptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= inc(wptr);
      if (do_rd) rptr <= inc(rptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  // The storage needs no reset: a word is only read after it was written.
  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) wr_en |-> !full)
    else $error("tx_fifo: write while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) rd_en |-> !empty)
    else $error("tx_fifo: read while empty");

endmodule
