// tb_atm_spi: checks the address decode of PSM and CAM writes, the control
// register and the status read map.
module tb_atm_spi;
`include "tb_common.svh"
  logic cpu_we = 0, psm_wr, cam_wr, cam_valid, unassigned_en;
  logic [4:0] cpu_addr = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata, psm_hdr, last_header;
  logic [2:0] psm_blk, cam_idx;
  logic [23:0] cam_key;
  logic [15:0] user_cells, unassigned_cells, rx_accepted, rx_unmatched, rx_overflow, tx_fifo_errs, rx_fifo_errs;
  atm_spi #(.N(8)) dut (.*);
  initial begin
    user_cells = 16'h1111; unassigned_cells = 16'h2222; rx_accepted = 16'h3333;
    rx_unmatched = 16'h4444; rx_overflow = 16'h5555; tx_fifo_errs = 16'h6666;
    rx_fifo_errs = 16'h7777; last_header = 32'h89AB_CDEF;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 32; a++) begin
      @(negedge clk);
      cpu_we = 1; cpu_addr = 5'(a); cpu_wdata = $urandom;
      #1;
      check(psm_wr == (a < 8), "PSM decode");
      check(cam_wr == (a >= 8 && a < 16), "CAM decode");
      if (a < 8) check(psm_blk == 3'(a) && psm_hdr == cpu_wdata, "PSM block and data");
      if (a >= 8 && a < 16) check(cam_idx == 3'(a - 8) && cam_key == cpu_wdata[23:0] &&
                                  cam_valid == cpu_wdata[24], "CAM entry and data");
      if (a == 16) cpu_wdata[0] = 1'b1;
    end
    @(negedge clk); cpu_we = 0;
    check(unassigned_en, "control bit set");
    cpu_addr = 5'h10; #1; check(cpu_rdata == 32'd1, "control read");
    cpu_addr = 5'h11; #1; check(cpu_rdata == 32'h2222_1111, "tx counters");
    cpu_addr = 5'h12; #1; check(cpu_rdata == 32'h4444_3333, "rx counters");
    cpu_addr = 5'h13; #1; check(cpu_rdata == 32'h0000_5555, "overflow");
    cpu_addr = 5'h14; #1; check(cpu_rdata == 32'h7777_6666, "fifo errors");
    cpu_addr = 5'h15; #1; check(cpu_rdata == 32'h89AB_CDEF, "last header");
    @(negedge clk); cpu_we = 1; cpu_addr = 5'h10; cpu_wdata = 0;
    @(negedge clk); cpu_we = 0; check(!unassigned_en, "control bit cleared");
    finish_tb();
  end
endmodule
