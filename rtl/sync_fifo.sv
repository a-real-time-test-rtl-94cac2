// sync_fifo: first-in first-out buffer used for the UNI Tx and Rx cell FIFOs,
// the emulator board FIFOs and small internal queues.
//
// Show-ahead (first-word-fall-through): rdata always presents the oldest word
// while the FIFO is not empty, and `rd` removes it at the clock edge. A write
// to a full FIFO or a read from an empty one is ignored. `count` gives the
// fill level so that controllers can wait for a whole cell (24 words) of data
// or of free space. The document gives the FIFOs' width (16 bits) but not
// their depth; the depth is a parameter. One clock for both sides is a
// simplification of the separate write and read clocks of the board.
module sync_fifo #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 256,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign rdata = mem[rptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= inc(wptr);
      if (do_rd) rptr <= inc(rptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  // A controller never overflows or underflows a FIFO on purpose
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr && full && !rd));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd && empty));
endmodule
