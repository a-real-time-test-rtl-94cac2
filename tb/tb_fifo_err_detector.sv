// tb_fifo_err_detector: streams cells through a FIFO model with the
// detector watching both sides; corrupts one word of chosen cells on the
// read side and checks that exactly those cells raise err.
module tb_fifo_err_detector;
`include "tb_common.svh"
  logic wr = 0, rd = 0, err;
  logic [15:0] wdata = 0, rdata, err_count;
  logic [15:0] q [$];
  int rcnt = 0, cellr = 0, errs_seen = 0, errs_made = 0;
  bit bad [200];
  fifo_err_detector #(.WORDS(24)) dut (.*);
  initial begin
    for (int i = 0; i < 200; i++) bad[i] = ($urandom % 4) == 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200 * 24 * 8; i++) begin
      @(negedge clk);
      wr = ($urandom % 2) && (i < 200 * 24 * 6) && (q.size() < 200);
      rd = ($urandom % 2) && q.size() > 0;
      wdata = 16'($urandom);
      rdata = (q.size() > 0) ? (q[0] ^ ((bad[cellr] && rcnt == 7) ? 16'h0100 : 16'h0)) : 16'h0;
      #1;
      if (rd && rcnt == 23) begin
        check(err == bad[cellr], "error flag of the cell");
        if (bad[cellr]) errs_made++;
      end else check(!err, "no flag before the last word");
      @(posedge clk);
      if (rd) begin
        void'(q.pop_front());
        if (rcnt == 23) begin rcnt = 0; cellr++; end else rcnt++;
      end
      if (wr) q.push_back(wdata);
      if (cellr == 200) break;
    end
    @(negedge clk);
    check(cellr == 200, "all cells read");
    check(int'(err_count) == errs_made && errs_made > 0, "error count");
    finish_tb();
  end
endmodule
