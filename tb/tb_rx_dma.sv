// tb_rx_dma: moves cells from a FIFO model onto the RxBus for random
// destinations; checks the select, 24 reads, the words in order on the bus
// when bus_clk is high, and 48 clocks per cell.
module tb_rx_dma;
`include "tb_common.svh"
  logic start = 0, fifo_rd, bus_clk, busy, done;
  logic [2:0] ta = 0;
  logic [15:0] fifo_rdata, bus_data;
  logic [7:0] bus_en;
  int rptr = 0, nrd = 0, ncyc = 0, cur = 0, c;
  rx_dma #(.N(8), .WORDS(24)) dut (.*);
  always_comb fifo_rdata = 16'(c * 1000 + rptr);
  always @(posedge clk) if (fifo_rd) rptr <= rptr + 1;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (c = 0; c < 20; c++) begin
      @(negedge clk);
      cur = $urandom % 8; ta = 3'(cur); start = 1; rptr = 0; nrd = 0; ncyc = 0;
      @(negedge clk); start = 0;
      while (1) begin
        ncyc++;
        check(bus_en == 8'(1 << cur), "destination selected");
        if (bus_clk) begin
          check(fifo_rd && bus_data == 16'(c * 1000 + nrd), "word on bus");
          nrd++;
        end
        if (done) break;
        @(negedge clk);
      end
      check(nrd == 24 && ncyc == 48, "24 words in 48 clocks");
    end
    finish_tb();
  end
endmodule
