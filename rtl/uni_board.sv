// uni_board: the User-Network Interface board (the digital part).
//
// Joins the ATM controller, its two external 16-bit FIFOs (Tx and Rx) and
// the two TC sublayer FPGAs. Towards the node's internal bus it has the
// TxBus and RxBus of up to eight terminal adapters; towards the STM-1 frame
// controller it has an 8-bit transmit byte stream (taken one byte per clock
// in which txf_en is high) and an 8-bit receive byte stream (valid when
// rxf_en is high). The STM-1 frame controller, the PMD card and the local
// CPU are outside: the CPU's register port is brought out as cpu_*.
// Everything runs on one clock; the board's separate FIFO and line clocks
// are a simplification of this design.
module uni_board
  import atm_pkg::*;
#(
  parameter int N          = N_TA,
  parameter int FIFO_DEPTH = 256,
  parameter int ALPHA      = 7,
  parameter int DELTA      = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  // internal bus: TxBus
  input  logic [N-1:0] ta_avail,
  output logic [N-1:0] txb_en,
  output logic         txb_clk,
  input  logic [15:0]  txb_data,
  // internal bus: RxBus
  output logic [N-1:0] rxb_en,
  output logic         rxb_clk,
  output logic [15:0]  rxb_data,
  // STM-1 frame controller side
  input  logic         txf_en,
  output logic [7:0]   txf_data,
  output logic         txf_sop,
  input  logic         rxf_en,
  input  logic [7:0]   rxf_data,
  // local CPU
  input  logic         cpu_we,
  input  logic [4:0]   cpu_addr,
  input  logic [31:0]  cpu_wdata,
  output logic [31:0]  cpu_rdata,
  // status
  output logic         in_sync,
  output logic         fifo_err,
  output logic [15:0]  tc_idle_tx,
  output logic [15:0]  tc_rx_ok,
  output logic [15:0]  tc_rx_corrected,
  output logic [15:0]  tc_rx_discarded,
  output logic [15:0]  tc_rx_idle
);
  localparam int CW = $clog2(FIFO_DEPTH) + 1;

  logic          txq_wr, txq_rd, rxq_wr, rxq_rd;
  logic [15:0]   txq_wdata, txq_rdata, rxq_wdata, rxq_rdata;
  logic [CW-1:0] txq_count, rxq_count;
  logic          txq_empty, txq_full, rxq_empty, rxq_full;
  logic          c_rdy, head_en, info_en, rx_valid, rx_hdr, tx_err, rx_err;
  logic [15:0]   tc_tx_data, rx_data, tc_user_tx, sync_losses;

  atm_controller #(.N(N), .FIFO_DEPTH(FIFO_DEPTH)) u_atm (
    .clk, .rst_n,
    .ta_avail, .txb_en, .txb_clk, .txb_data,
    .txfifo_wr(txq_wr), .txfifo_wdata(txq_wdata), .txfifo_rd(txq_rd),
    .txfifo_rdata(txq_rdata), .txfifo_count(txq_count),
    .c_rdy, .head_en, .info_en, .tc_tx_data,
    .rx_data, .rx_valid, .rx_hdr,
    .rxfifo_wr(rxq_wr), .rxfifo_wdata(rxq_wdata), .rxfifo_rd(rxq_rd),
    .rxfifo_rdata(rxq_rdata), .rxfifo_count(rxq_count),
    .rxb_en, .rxb_clk, .rxb_data,
    .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata,
    .tx_fifo_err(tx_err), .rx_fifo_err(rx_err));

  sync_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk, .rst_n, .wr(txq_wr), .wdata(txq_wdata), .rd(txq_rd), .rdata(txq_rdata),
    .empty(txq_empty), .full(txq_full), .count(txq_count));

  sync_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk, .rst_n, .wr(rxq_wr), .wdata(rxq_wdata), .rd(rxq_rd), .rdata(rxq_rdata),
    .empty(rxq_empty), .full(rxq_full), .count(rxq_count));

  tc_transmitter u_tctx (
    .clk, .rst_n, .txf_en, .txf_data, .txf_sop,
    .c_rdy, .head_en, .info_en, .data_in(tc_tx_data),
    .user_cells(tc_user_tx), .idle_cells(tc_idle_tx));

  tc_receiver #(.ALPHA(ALPHA), .DELTA(DELTA)) u_tcrx (
    .clk, .rst_n, .rxf_en, .rxf_data, .rx_data, .rx_valid, .rx_hdr, .in_sync,
    .cells_ok(tc_rx_ok), .cells_corrected(tc_rx_corrected),
    .cells_discarded(tc_rx_discarded), .idle_cells(tc_rx_idle), .sync_losses);

  assign fifo_err = tx_err || rx_err;
endmodule
