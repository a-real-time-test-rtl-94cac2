// tb_tx_dma: transfers cells from randomly chosen TA positions; checks the
// board select, the bus clock at clk/2, 24 FIFO writes carrying the TA's
// words in order, the done pulse and 48 clocks per cell.
module tb_tx_dma;
`include "tb_common.svh"
  logic start = 0, bus_clk, fifo_wr, busy, done;
  logic [2:0] ta = 0;
  logic [7:0] bus_en;
  logic [15:0] bus_data, fifo_wdata;
  int wptr = 0, nwr = 0, ncyc = 0, cur = 0;
  tx_dma #(.N(8), .WORDS(24)) dut (.*);
  // TA model: position p presents word p*256 + wptr while selected
  always_comb bus_data = (bus_en != 0) ? 16'(cur * 256 + wptr) : 16'hDEAD;
  always @(posedge clk) if (bus_clk) wptr <= wptr + 1;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 20; c++) begin
      @(negedge clk);
      cur = $urandom % 8; ta = 3'(cur); start = 1; wptr = 0; nwr = 0; ncyc = 0;
      @(negedge clk); start = 0;
      while (1) begin
        ncyc++;
        check(busy && bus_en == 8'(1 << cur), "board select held");
        if (fifo_wr) begin
          check(fifo_wdata == 16'(cur * 256 + nwr), "word order");
          check(bus_clk && (ncyc % 2 == 0), "bus clock on every second clock");
          nwr++;
        end
        if (done) break;
        @(negedge clk);
      end
      check(nwr == 24, "24 words per cell");
      check(ncyc == 48, "48 clocks per cell");
      @(negedge clk);
      check(!busy && bus_en == 0, "released after the cell");
    end
    finish_tb();
  end
endmodule
