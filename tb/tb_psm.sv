// tb_psm: writes a header into every block, then reads each block back
// through the 2-bit counter, one byte per advance, in header byte order.
module tb_psm;
`include "tb_common.svh"
  logic wr = 0, adv = 0, last_byte;
  logic [2:0] wr_blk = 0, rd_blk = 0;
  logic [31:0] wr_hdr = 0, hdrs [8];
  logic [7:0] rd_byte;
  logic [1:0] byte_cnt;
  psm #(.BLOCKS(8)) dut (.*);
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      hdrs[k] = $urandom;
      @(negedge clk); wr = 1; wr_blk = 3'(k); wr_hdr = hdrs[k];
    end
    @(negedge clk); wr = 0;
    for (int r = 0; r < 3; r++)
      for (int k = 7; k >= 0; k--) begin
        rd_blk = 3'((k * 5 + r) % 8);
        for (int b = 0; b < 4; b++) begin
          @(negedge clk);
          adv = 1;
          #1;
          check(byte_cnt == 2'(b), "counter");
          check(last_byte == (b == 3), "last byte flag");
          check(rd_byte == hdrs[rd_blk][8*(3-b) +: 8], "header byte");
        end
        @(negedge clk); adv = 0;
      end
    finish_tb();
  end
endmodule
