// tb_sync_fifo: random pushes and pops against a queue reference model;
// checks show-ahead data, count, empty and full, including filling to full.
module tb_sync_fifo;
`include "tb_common.svh"
  localparam int DEPTH = 256;
  logic wr = 0, rd = 0, empty, full;
  logic [15:0] wdata = 0, rdata;
  logic [8:0] count;
  logic [15:0] ref_q [$];
  sync_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (.*);
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(count == 9'(ref_q.size()), "count");
      check(empty == (ref_q.size() == 0), "empty");
      check(full == (ref_q.size() == DEPTH), "full");
      if (ref_q.size() > 0) check(rdata == ref_q[0], "show-ahead data");
      // phase 1 fills, phase 2 random, phase 3 drains
      wr = (i < 400) ? !full : (i < 2000) ? (($urandom % 2) == 1 && !full) : 1'b0;
      rd = (i < 400) ? 1'b0 : (($urandom % 2) == 1 && !empty);
      wdata = 16'($urandom);
      @(posedge clk);
      if (rd) void'(ref_q.pop_front());
      if (wr) ref_q.push_back(wdata);
    end
    check(ref_q.size() == 0 && empty, "drained");
    finish_tb();
  end
endmodule
