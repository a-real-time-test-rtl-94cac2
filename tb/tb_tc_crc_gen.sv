// tb_tc_crc_gen: HEC of random headers, against long division, and the
// two known I.432 values (header 0 -> 0x55, idle header 00000001 -> 0x52).
module tb_tc_crc_gen;
`include "tb_common.svh"
`include "tb_ref.svh"
  logic en = 0, first = 0;
  logic [7:0] din = 0, hec;
  tc_crc_gen dut (.*);
  task automatic feed(logic [31:0] h);
    for (int b = 0; b < 4; b++) begin
      @(negedge clk); en = 1; first = (b == 0); din = h[8*(3-b) +: 8];
    end
    @(negedge clk); en = 0; first = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    feed(32'h0); check(hec == 8'h55, "HEC of zero header");
    feed(32'h1); check(hec == 8'h52, "HEC of idle header");
    for (int i = 0; i < 500; i++) begin
      logic [31:0] h;
      h = $urandom;
      feed(h);
      check(hec == ref_hec(h), "HEC of random header");
      repeat ($urandom % 3) @(negedge clk);
      check(hec == ref_hec(h), "HEC held");
    end
    finish_tb();
  end
endmodule
