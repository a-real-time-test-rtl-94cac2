// tb_atm_rx_ctrl: the Rx Control Unit with the real CAM, Rx FIFO (48 words,
// two cells) and Rx DMA. Cells are fed as the TC receiver delivers them
// (2 header words, 24 payload words). Checks: cells whose VPI/VCI is in the
// CAM reach the right TA position intact and in order; unknown VPI/VCI are
// dropped and counted; cells arriving faster than the DMA drains them are
// dropped whole when the FIFO lacks room and counted as overflow, and no
// partial cell ever reaches a TA.
module tb_atm_rx_ctrl;
  import atm_pkg::*;
`include "tb_common.svh"
  localparam int FD = 48;
  logic [15:0] rx_data = 0, fifo_wdata, fifo_rdata, bus_data;
  logic rx_valid = 0, rx_hdr = 0, cam_hit, fifo_wr, fifo_rd, dma_start, dma_busy, dma_done, bus_clk;
  logic [23:0] cam_key;
  logic [2:0] cam_idx, dma_ta;
  logic [6:0] fifo_count;
  logic fifo_empty, fifo_full;
  logic [7:0] bus_en;
  logic [15:0] acc, unm, ovf;
  logic [31:0] last_header;
  logic cam_wr = 0, cam_wvalid = 0;
  logic [2:0] cam_widx = 0;
  logic [23:0] cam_wkey = 0;

  cam #(.N(8)) u_cam (.clk, .rst_n, .wr(cam_wr), .wr_idx(cam_widx), .wr_valid(cam_wvalid),
    .wr_key(cam_wkey), .key(cam_key), .hit(cam_hit), .hit_idx(cam_idx));
  sync_fifo #(.WIDTH(16), .DEPTH(FD)) u_fifo (.clk, .rst_n, .wr(fifo_wr), .wdata(fifo_wdata),
    .rd(fifo_rd), .rdata(fifo_rdata), .empty(fifo_empty), .full(fifo_full), .count(fifo_count));
  rx_dma #(.N(8), .WORDS(24)) u_dma (.clk, .rst_n, .start(dma_start), .ta(dma_ta), .fifo_rdata,
    .fifo_rd, .bus_en, .bus_clk, .bus_data, .busy(dma_busy), .done(dma_done));
  atm_rx_ctrl #(.N(8), .FIFO_DEPTH(FD)) dut (.clk, .rst_n, .rx_data, .rx_valid, .rx_hdr,
    .cam_key, .cam_hit, .cam_idx, .fifo_wr, .fifo_wdata, .fifo_count,
    .dma_start, .dma_ta, .dma_busy, .cells_accepted(acc), .cells_unmatched(unm),
    .cells_overflow(ovf), .last_header);

  // TA receivers: stream of TA p is p; check word by word
  int rx_cnt [8], rx_w [8], bad = 0, delivered = 0;
  int cur;
  always @(posedge clk) if (rst_n && bus_clk) begin
    cur = 0;
    for (int p = 0; p < 8; p++) if (bus_en[p]) cur = p;
    if (bus_data != tb_pkg::tb_payload(cur, rx_cnt[cur], rx_w[cur])) bad++;
    if (rx_w[cur] == 23) begin rx_w[cur] = 0; rx_cnt[cur]++; delivered++; end
    else rx_w[cur]++;
  end

  int sent [8];
  task automatic send_cell(int vpi, int vci, int stream, int n, int gap);
    logic [31:0] h;
    h = tb_pkg::tb_hdr(vpi, vci);
    for (int i = 0; i < 26; i++) begin
      @(negedge clk);
      rx_valid = 1; rx_hdr = i < 2;
      rx_data = (i == 0) ? h[31:16] : (i == 1) ? h[15:0] : tb_pkg::tb_payload(stream, n, i - 2);
      for (int g = 0; g < gap; g++) begin @(negedge clk); rx_valid = 0; end
    end
    @(negedge clk); rx_valid = 0;
  endtask

  initial begin
    for (int p = 0; p < 8; p++) begin rx_cnt[p] = 0; rx_w[p] = 0; sent[p] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 8; p++) begin
      @(negedge clk); cam_wr = 1; cam_widx = 3'(p); cam_wvalid = (p != 5);
      cam_wkey = {8'(p + 1), 16'h200 + 16'(p)};
    end
    @(negedge clk); cam_wr = 0;
    // slow arrivals (one word per 2 clocks): nothing lost
    for (int c = 0; c < 40; c++) begin
      int p;
      p = $urandom % 8;
      if (p == 5) p = 2;
      send_cell(p + 1, 'h200 + p, p, sent[p], 1);
      sent[p]++;
    end
    // unknown VPI/VCI, and the invalid entry of position 5
    send_cell(9, 'h999, 0, 0, 1);
    send_cell(6, 'h205, 5, 0, 1);
    repeat (200) @(posedge clk);
    check(bad == 0, "delivered words correct");
    for (int p = 0; p < 8; p++) check(rx_cnt[p] == sent[p], "cells per TA");
    check(acc == 16'd40 && unm == 16'd2 && ovf == 16'd0, "counters after slow traffic");
    check(last_header == tb_pkg::tb_hdr(6, 'h205), "last header");
    // fast arrivals (a word per clock) to position 3: the DMA needs 48 clocks a cell
    for (int c = 0; c < 20; c++) send_cell(4, 'h203, 3, sent[3] + c, 0);
    repeat (300) @(posedge clk);
    check(ovf > 0, "overflow drops happened");
    check(int'(acc) == 40 + 20 - int'(ovf), "accepted + overflow = offered");
    check(delivered == int'(acc) && rx_w[3] == 0, "only whole accepted cells delivered");
    finish_tb();
  end
endmodule
