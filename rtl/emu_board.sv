// emu_board: Emulator Board (EB) configured as the emulator of one virtual
// channel in one direction.
//
// The board sits on two internal buses: it receives the channel's cells as
// a terminal adapter of the first UNI's RxBus and sends them on as a
// terminal adapter of the second UNI's TxBus. Inside:
//   * the AAL-ATM interface controller writes each received payload (24
//     words, one per bus clock) into the Rx FIFO and the cell's arrival time
//     (free-running clock counter at its first word) into the Rx timing
//     FIFO; the time stamp is pushed only once the last word is in, so a
//     cell is never scheduled (even with zero delay) before it is complete;
//     a cell that finds no room is dropped whole and counted;
//   * the cell delay generator turns arrival times into departure times;
//   * when a departure time is reached and the Tx FIFO has room, the cell is
//     copied word by word from the Rx FIFO to the Tx FIFO through the XOR
//     plane, where the error rate control inserts bit errors, or is dropped
//     if the error rate control rejects it;
//   * tx_avail tells the second UNI's arbiter that a complete cell waits; its
//     Tx DMA then clocks the words out of the Tx FIFO.
// The delay and error settings (cfg) come from the board's local CPU, which
// is outside this module. Structure follows the document's EB; sizes, the
// time base (one clock) and signal timing are this design's.
module emu_board
  import atm_pkg::*;
#(
  parameter int FIFO_DEPTH = 256,
  parameter int T_DEPTH    = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  emu_cfg_t     cfg,
  // as receiving TA on the first UNI's RxBus
  input  logic         rx_en,
  input  logic         rx_clk,
  input  logic [15:0]  rx_data,
  // as transmitting TA on the second UNI's TxBus
  output logic         tx_avail,
  input  logic         tx_en,
  input  logic         tx_clk,
  output logic [15:0]  tx_data,
  // statistics
  output logic [15:0]  cells_in,
  output logic [15:0]  cells_out,
  output logic [15:0]  cells_dropped,
  output logic [15:0]  cells_rejected,
  output logic [15:0]  bit_errors,
  output logic [31:0]  last_delay
);
  localparam int CW = $clog2(FIFO_DEPTH) + 1;
  localparam int WW = $clog2(PAYLOAD_WORDS);

  logic [31:0] timer_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) timer_q <= '0;
    else        timer_q <= timer_q + 32'd1;
  end

  // ---------------- AAL-ATM interface controller ----------------
  logic          rx_word, rx_first, rx_last, keep_q, keep;
  logic [31:0]   arr_q;
  logic [WW-1:0] rx_cnt_q;
  logic          rq_wr, rq_rd, rq_empty, rq_full;
  logic [15:0]   rq_rdata;
  logic [CW-1:0] rq_count;
  logic          tf_wr, tf_empty, tf_full, tf_pop;
  logic [31:0]   tf_rdata;
  logic [$clog2(T_DEPTH):0] tf_count;

  assign rx_word  = rx_en && rx_clk;
  assign rx_first = rx_word && (rx_cnt_q == '0);
  assign rx_last  = rx_word && (rx_cnt_q == WW'(PAYLOAD_WORDS-1));
  assign keep     = rx_first ? (!tf_full && int'(rq_count) + PAYLOAD_WORDS <= FIFO_DEPTH) : keep_q;
  assign rq_wr    = rx_word && keep;
  assign tf_wr    = rx_last && keep;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_cnt_q      <= '0;
      keep_q        <= 1'b0;
      arr_q         <= '0;
      cells_in      <= '0;
      cells_dropped <= '0;
    end else if (rx_word) begin
      rx_cnt_q <= (rx_cnt_q == WW'(PAYLOAD_WORDS-1)) ? '0 : rx_cnt_q + 1'b1;
      if (rx_first) begin
        keep_q <= keep;
        arr_q  <= timer_q;
        if (keep) cells_in      <= cells_in + 16'd1;
        else      cells_dropped <= cells_dropped + 16'd1;
      end
    end
  end

  sync_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk, .rst_n, .wr(rq_wr), .wdata(rx_data), .rd(rq_rd), .rdata(rq_rdata),
    .empty(rq_empty), .full(rq_full), .count(rq_count));

  sync_fifo #(.WIDTH(32), .DEPTH(T_DEPTH)) u_timing_fifo (
    .clk, .rst_n, .wr(tf_wr), .wdata(arr_q), .rd(tf_pop), .rdata(tf_rdata),
    .empty(tf_empty), .full(tf_full), .count(tf_count));

  // ---------------- cell delay generator ----------------
  logic go, go_ack;
  cell_delay_gen #(.Q_DEPTH(T_DEPTH)) u_delay (
    .clk, .rst_n, .timer(timer_q), .mean_delay(cfg.mean_delay), .jitter(cfg.jitter),
    .jitter_en(cfg.jitter_en), .arr_valid(!tf_empty), .arr_time(tf_rdata), .arr_pop(tf_pop),
    .go, .go_ack, .last_delay);

  // ---------------- Rx FIFO -> XOR plane -> Tx FIFO ----------------
  logic          mv_q, rej_q, reject, cell_start;
  logic [WW-1:0] mv_cnt_q;
  logic [15:0]   mask, moved;
  logic          tq_wr, tq_rd, tq_empty, tq_full;
  logic [15:0]   tq_rdata;
  logic [CW-1:0] tq_count;

  assign cell_start = !mv_q && go && (int'(tq_count) + PAYLOAD_WORDS <= FIFO_DEPTH);
  assign go_ack     = cell_start;
  assign rq_rd      = mv_q;
  assign tq_wr      = mv_q && !rej_q;

  error_rate_ctrl u_erc (
    .clk, .rst_n, .word_err_p(cfg.word_err_p), .cell_rej_p(cfg.cell_rej_p),
    .cell_start, .reject, .word_en(mv_q && !rej_q), .mask, .bit_errors, .cells_rejected);

  xor_plane #(.WIDTH(16)) u_xor (.din(rq_rdata), .mask, .dout(moved));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mv_q     <= 1'b0;
      rej_q    <= 1'b0;
      mv_cnt_q <= '0;
    end else if (cell_start) begin
      mv_q     <= 1'b1;
      rej_q    <= reject;
      mv_cnt_q <= '0;
    end else if (mv_q) begin
      mv_cnt_q <= mv_cnt_q + 1'b1;
      if (mv_cnt_q == WW'(PAYLOAD_WORDS-1)) mv_q <= 1'b0;
    end
  end

  sync_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk, .rst_n, .wr(tq_wr), .wdata(moved), .rd(tq_rd), .rdata(tq_rdata),
    .empty(tq_empty), .full(tq_full), .count(tq_count));

  // ---------------- TxBus side ----------------
  logic [7:0]    tx_cells_q;
  logic [WW-1:0] tx_cnt_q;
  logic          cell_in_tq, tx_last;

  assign tq_rd      = tx_en && tx_clk;
  assign tx_data    = tq_rdata;
  assign tx_avail   = (tx_cells_q != 8'd0);
  assign cell_in_tq = mv_q && !rej_q && (mv_cnt_q == WW'(PAYLOAD_WORDS-1));
  assign tx_last    = tq_rd && (tx_cnt_q == WW'(PAYLOAD_WORDS-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_cells_q <= '0;
      tx_cnt_q   <= '0;
      cells_out  <= '0;
    end else begin
      tx_cells_q <= tx_cells_q + 8'(cell_in_tq) - 8'(tx_last);
      if (tq_rd) tx_cnt_q <= tx_last ? '0 : tx_cnt_q + 1'b1;
      if (tx_last) cells_out <= cells_out + 16'd1;
    end
  end
endmodule
