// atm_controller: the ATM layer FPGA of the UNI board.
//
// Transmit direction: the ATM Arbiter and Decision Unit pick the next
// terminal adapter (TA) with a cell; the Tx DMA clocks its 24-word payload
// from the TxBus into the external Tx FIFO; the Tx Control Unit then queues
// the TA's position, which selects its header block in the Position
// Selectable Memory (PSM). The TC transmitter pulls the four header bytes
// from the PSM and the payload words from the Tx FIFO (or an unassigned
// cell when enabled and nothing waits). One cell is loaded every 50 clocks.
//
// Receive direction: header words from the TC receiver are looked up in the
// CAM; payloads of matching cells go into the external Rx FIFO and the
// Adapter Selector queues the TA position; the Rx DMA then moves each
// payload onto the RxBus with that TA selected.
//
// Two Error Detector Units check every payload across the external FIFOs.
// The local CPU programs PSM, CAM and the control bit and reads statistics
// through the SPI register port (map in atm_spi). The block structure is the
// document's (its Fig. 5); signal-level timing is this design's.
module atm_controller
  import atm_pkg::*;
#(
  parameter int N          = N_TA,
  parameter int FIFO_DEPTH = 256,
  localparam int IW = $clog2(N),
  localparam int CW = $clog2(FIFO_DEPTH) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // TxBus (from the TAs)
  input  logic [N-1:0]  ta_avail,
  output logic [N-1:0]  txb_en,
  output logic          txb_clk,
  input  logic [15:0]   txb_data,
  // external Tx FIFO
  output logic          txfifo_wr,
  output logic [15:0]   txfifo_wdata,
  output logic          txfifo_rd,
  input  logic [15:0]   txfifo_rdata,
  input  logic [CW-1:0] txfifo_count,
  // TC transmitter
  output logic          c_rdy,
  input  logic          head_en,
  input  logic          info_en,
  output logic [15:0]   tc_tx_data,
  // TC receiver
  input  logic [15:0]   rx_data,
  input  logic          rx_valid,
  input  logic          rx_hdr,
  // external Rx FIFO
  output logic          rxfifo_wr,
  output logic [15:0]   rxfifo_wdata,
  output logic          rxfifo_rd,
  input  logic [15:0]   rxfifo_rdata,
  input  logic [CW-1:0] rxfifo_count,
  // RxBus (to the TAs)
  output logic [N-1:0]  rxb_en,
  output logic          rxb_clk,
  output logic [15:0]   rxb_data,
  // local CPU (SPI port)
  input  logic          cpu_we,
  input  logic [4:0]    cpu_addr,
  input  logic [31:0]   cpu_wdata,
  output logic [31:0]   cpu_rdata,
  // FIFO integrity errors
  output logic          tx_fifo_err,
  output logic          rx_fifo_err
);
  // ---- SPI ----
  logic          psm_wr, cam_wr, cam_wvalid, unassigned_en;
  logic [IW-1:0] psm_wblk, cam_widx;
  logic [31:0]   psm_whdr, last_header;
  logic [23:0]   cam_wkey;
  logic [15:0]   user_cells, unassigned_cells, rx_acc, rx_unm, rx_ovf, tx_errs, rx_errs;

  atm_spi #(.N(N)) u_spi (
    .clk, .rst_n, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata,
    .psm_wr, .psm_blk(psm_wblk), .psm_hdr(psm_whdr),
    .cam_wr, .cam_idx(cam_widx), .cam_valid(cam_wvalid), .cam_key(cam_wkey),
    .unassigned_en,
    .user_cells, .unassigned_cells, .rx_accepted(rx_acc), .rx_unmatched(rx_unm),
    .rx_overflow(rx_ovf), .tx_fifo_errs(tx_errs), .rx_fifo_errs(rx_errs), .last_header);

  // ---- transmit direction ----
  logic          arb_valid, arb_take, dma_start, dma_done, dma_busy, psm_adv;
  logic [IW-1:0] arb_ta, dma_ta, psm_rblk;
  logic [7:0]    psm_byte;
  logic [1:0]    psm_cnt;
  logic          psm_last;

  atm_arbiter #(.N(N)) u_arb (
    .clk, .rst_n, .avail(ta_avail), .take(arb_take), .next_valid(arb_valid), .next_ta(arb_ta));

  tx_dma #(.N(N), .WORDS(PAYLOAD_WORDS)) u_txdma (
    .clk, .rst_n, .start(dma_start), .ta(dma_ta), .bus_en(txb_en), .bus_clk(txb_clk),
    .bus_data(txb_data), .fifo_wr(txfifo_wr), .fifo_wdata(txfifo_wdata),
    .busy(dma_busy), .done(dma_done));

  psm #(.BLOCKS(N)) u_psm (
    .clk, .rst_n, .wr(psm_wr), .wr_blk(psm_wblk), .wr_hdr(psm_whdr),
    .rd_blk(psm_rblk), .adv(psm_adv), .rd_byte(psm_byte), .byte_cnt(psm_cnt),
    .last_byte(psm_last));

  atm_tx_ctrl #(.N(N), .FIFO_DEPTH(FIFO_DEPTH)) u_txctl (
    .clk, .rst_n, .unassigned_en,
    .arb_valid, .arb_ta, .arb_take,
    .dma_start, .dma_ta, .dma_done,
    .fifo_count(txfifo_count), .fifo_rdata(txfifo_rdata), .fifo_rd(txfifo_rd),
    .psm_blk(psm_rblk), .psm_adv, .psm_byte, .psm_cnt,
    .c_rdy, .head_en, .info_en, .tc_data(tc_tx_data),
    .user_cells, .unassigned_cells);

  fifo_err_detector #(.WORDS(PAYLOAD_WORDS)) u_txed (
    .clk, .rst_n, .wr(txfifo_wr), .wdata(txfifo_wdata), .rd(txfifo_rd),
    .rdata(txfifo_rdata), .err(tx_fifo_err), .err_count(tx_errs));

  // ---- receive direction ----
  logic [23:0]   cam_key;
  logic          cam_hit, rdma_start, rdma_busy, rdma_done;
  logic [IW-1:0] cam_idx, rdma_ta;

  cam #(.N(N)) u_cam (
    .clk, .rst_n, .wr(cam_wr), .wr_idx(cam_widx), .wr_valid(cam_wvalid), .wr_key(cam_wkey),
    .key(cam_key), .hit(cam_hit), .hit_idx(cam_idx));

  atm_rx_ctrl #(.N(N), .FIFO_DEPTH(FIFO_DEPTH)) u_rxctl (
    .clk, .rst_n, .rx_data, .rx_valid, .rx_hdr,
    .cam_key, .cam_hit, .cam_idx,
    .fifo_wr(rxfifo_wr), .fifo_wdata(rxfifo_wdata), .fifo_count(rxfifo_count),
    .dma_start(rdma_start), .dma_ta(rdma_ta), .dma_busy(rdma_busy),
    .cells_accepted(rx_acc), .cells_unmatched(rx_unm), .cells_overflow(rx_ovf),
    .last_header);

  rx_dma #(.N(N), .WORDS(PAYLOAD_WORDS)) u_rxdma (
    .clk, .rst_n, .start(rdma_start), .ta(rdma_ta), .fifo_rdata(rxfifo_rdata),
    .fifo_rd(rxfifo_rd), .bus_en(rxb_en), .bus_clk(rxb_clk), .bus_data(rxb_data),
    .busy(rdma_busy), .done(rdma_done));

  fifo_err_detector #(.WORDS(PAYLOAD_WORDS)) u_rxed (
    .clk, .rst_n, .wr(rxfifo_wr), .wdata(rxfifo_wdata), .rd(rxfifo_rd),
    .rdata(rxfifo_rdata), .err(rx_fifo_err), .err_count(rx_errs));
endmodule
