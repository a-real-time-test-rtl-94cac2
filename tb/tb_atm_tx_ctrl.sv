// tb_atm_tx_ctrl: the Tx Control Unit with the real arbiter, Tx DMA, PSM
// and Tx FIFO around it, and a TC model that pulls cells.
// Phase 1: three TAs with many cells, TC not pulling: checks one cell is
// loaded every 50 clocks (400 kcell/s at 20 MHz) until the FIFO is full.
// Phase 2: the TC pulls; checks every cell's four header bytes come from the
// PSM block of its TA and its 24 payload words are the TA's, in order.
// Phase 3: no TA has cells and the unassigned mode is on: checks unassigned
// cells (zero header, 0x6A6A payload) are served; with the mode off c_rdy
// falls.
module tb_atm_tx_ctrl;
  import atm_pkg::*;
`include "tb_common.svh"
  localparam int FD = 256;
  logic [7:0] avail, bus_en;
  logic bus_clk, take, arb_valid, dma_start, dma_done, dma_busy, fifo_wr, fifo_rd, psm_adv, psm_last;
  logic [2:0] arb_ta, dma_ta, psm_blk;
  logic [15:0] bus_data, fifo_wdata, fifo_rdata, tc_data, user_cells, unassigned_cells;
  logic [8:0] fifo_count;
  logic fifo_empty, fifo_full, c_rdy;
  logic head_en = 0, info_en = 0, unassigned_en = 0, psm_wr = 0;
  logic [7:0] psm_byte;
  logic [1:0] psm_cnt;
  logic [2:0] psm_wblk = 0;
  logic [31:0] psm_whdr = 0;

  atm_arbiter #(.N(8)) u_arb (.clk, .rst_n, .avail, .take, .next_valid(arb_valid), .next_ta(arb_ta));
  tx_dma #(.N(8), .WORDS(24)) u_dma (.clk, .rst_n, .start(dma_start), .ta(dma_ta), .bus_en,
    .bus_clk, .bus_data, .fifo_wr, .fifo_wdata, .busy(dma_busy), .done(dma_done));
  psm #(.BLOCKS(8)) u_psm (.clk, .rst_n, .wr(psm_wr), .wr_blk(psm_wblk), .wr_hdr(psm_whdr),
    .rd_blk(psm_blk), .adv(psm_adv), .rd_byte(psm_byte), .byte_cnt(psm_cnt), .last_byte(psm_last));
  sync_fifo #(.WIDTH(16), .DEPTH(FD)) u_fifo (.clk, .rst_n, .wr(fifo_wr), .wdata(fifo_wdata),
    .rd(fifo_rd), .rdata(fifo_rdata), .empty(fifo_empty), .full(fifo_full), .count(fifo_count));
  atm_tx_ctrl #(.N(8), .FIFO_DEPTH(FD)) dut (.clk, .rst_n, .unassigned_en,
    .arb_valid, .arb_ta, .arb_take(take), .dma_start, .dma_ta, .dma_done,
    .fifo_count, .fifo_rdata, .fifo_rd, .psm_blk, .psm_adv, .psm_byte, .psm_cnt,
    .c_rdy, .head_en, .info_en, .tc_data, .user_cells, .unassigned_cells);

  // three TAs (positions 1, 4, 7), each with a cell counter and word pointer
  int left [8], sent [8], wp [8];
  int cur;
  always_comb begin
    for (int p = 0; p < 8; p++) avail[p] = left[p] > 0;
    cur = 0;
    for (int p = 0; p < 8; p++) if (bus_en[p]) cur = p;
    bus_data = tb_pkg::tb_payload(cur, sent[cur], wp[cur]);
  end
  always @(posedge clk) if (rst_n && bus_clk) begin
    if (wp[cur] == 23) begin wp[cur] <= 0; sent[cur] <= sent[cur] + 1; left[cur] <= left[cur] - 1; end
    else wp[cur] <= wp[cur] + 1;
  end

  logic [31:0] hdrs [8];
  int starts [$];
  always @(posedge clk) if (dma_start) starts.push_back($time / 10);
  int got [8];

  task automatic pull_cell(output logic [31:0] h, output logic [15:0] w [24]);
    for (int b = 0; b < 4; b++) begin
      @(negedge clk); head_en = 1; #1; h[8*(3-b) +: 8] = tc_data[7:0];
    end
    @(negedge clk); head_en = 0;
    for (int i = 0; i < 24; i++) begin
      @(negedge clk); info_en = 1; #1; w[i] = tc_data;
    end
    @(negedge clk); info_en = 0;
  endtask

  initial begin
    for (int p = 0; p < 8; p++) begin left[p] = 0; sent[p] = 0; wp[p] = 0; got[p] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 8; p++) begin
      hdrs[p] = tb_pkg::tb_hdr(p + 1, 16'h100 + p);
      @(negedge clk); psm_wr = 1; psm_wblk = 3'(p); psm_whdr = hdrs[p];
    end
    @(negedge clk); psm_wr = 0;
    check(!c_rdy, "no cell ready at start");
    // ---- phase 1: loading rate ----
    left[1] = 20; left[4] = 20; left[7] = 20;
    repeat (800) @(posedge clk);
    check(fifo_count == 9'(24 * (FD / 24)), "FIFO filled with whole cells");
    for (int i = 1; i < starts.size(); i++) check(starts[i] - starts[i-1] == 50, "50 clocks per cell");
    check(c_rdy, "cell ready");
    // ---- phase 2: pull all cells ----
    for (int c = 0; c < 60; c++) begin
      logic [31:0] h; logic [15:0] w [24]; int p; bit found;
      wait (c_rdy);
      pull_cell(h, w);
      found = 0;
      for (int q = 0; q < 8; q++) if (h == hdrs[q]) begin p = q; found = 1; end
      check(found && (p == 1 || p == 4 || p == 7), "header from the PSM block of a sending TA");
      if (found) begin
        bit ok = 1;
        for (int i = 0; i < 24; i++) if (w[i] != tb_pkg::tb_payload(p, got[p], i)) ok = 0;
        if (!ok) $display("p=%0d got=%0d w0=%h exp=%h w1=%h exp=%h", p, got[p], w[0], tb_pkg::tb_payload(p, got[p], 0), w[1], tb_pkg::tb_payload(p, got[p], 1));
        check(ok, "payload of the TA next cell");
        got[p]++;
      end
    end
    check(got[1] == 20 && got[4] == 20 && got[7] == 20, "all cells served");
    check(user_cells == 16'd60, "user cell count");
    // ---- phase 3: unassigned cells ----
    repeat (5) @(posedge clk);
    check(!c_rdy, "nothing to send");
    unassigned_en = 1; #1;
    check(c_rdy, "unassigned mode offers a cell");
    for (int c = 0; c < 3; c++) begin
      logic [31:0] h; logic [15:0] w [24]; bit ok;
      pull_cell(h, w);
      ok = (h == UNASSIGNED_HDR);
      for (int i = 0; i < 24; i++) if (w[i] != UNASSIGNED_PAYLOAD) ok = 0;
      check(ok, "unassigned cell contents");
    end
    check(unassigned_cells == 16'd3, "unassigned count");
    // a user cell takes precedence again
    left[2] = 1;
    repeat (60) @(posedge clk);
    begin
      logic [31:0] h; logic [15:0] w [24];
      pull_cell(h, w);
      check(h == hdrs[2] && w[0] == tb_pkg::tb_payload(2, 0, 0), "user cell before unassigned");
    end
    unassigned_en = 0; #1;
    check(!c_rdy, "mode off: no cell");
    finish_tb();
  end
endmodule
