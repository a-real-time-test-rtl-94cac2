// atm_rx_ctrl: Rx Control Unit and Adapter Selector of the ATM controller.
//
// The TC receiver delivers each cell as 26 words: two header words (flagged
// by rx_hdr, first word = header bytes 0-1) and 24 payload words. On the
// second header word the VPI/VCI field (header bits 27:4) is looked up in the
// CAM in the same clock. A cell is accepted when the CAM matches, the Rx
// FIFO has room for its whole payload and the destination queue has room;
// its payload words are then written into the Rx FIFO (its write clock) and
// the matching TA position is queued by the Adapter Selector. Cells without
// a match, or arriving when there is no room, are dropped and counted.
// The Rx DMA is started for the queued destination once the whole payload is
// in the Rx FIFO (fill level >= 24) and the DMA is idle.
module atm_rx_ctrl
  import atm_pkg::*;
#(
  parameter int N          = 8,
  parameter int FIFO_DEPTH = 256,
  parameter int DQ_DEPTH   = 16,
  localparam int IW = $clog2(N),
  localparam int CW = $clog2(FIFO_DEPTH) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the TC receiver
  input  logic [15:0]   rx_data,
  input  logic          rx_valid,
  input  logic          rx_hdr,
  // CAM lookup
  output logic [23:0]   cam_key,
  input  logic          cam_hit,
  input  logic [IW-1:0] cam_idx,
  // Rx FIFO write side and fill level
  output logic          fifo_wr,
  output logic [15:0]   fifo_wdata,
  input  logic [CW-1:0] fifo_count,
  // Rx DMA
  output logic          dma_start,
  output logic [IW-1:0] dma_ta,
  input  logic          dma_busy,
  // statistics
  output logic [15:0]   cells_accepted,
  output logic [15:0]   cells_unmatched,
  output logic [15:0]   cells_overflow,
  output logic [31:0]   last_header
);
  logic        hdr_second_q;   // next header word is the second one
  logic [15:0] hi_q;
  logic        accept_q;
  logic        at_lookup, room, accept;
  logic        dq_push, dq_pop, dq_empty, dq_full;
  logic [IW-1:0] dq_head;
  logic [$clog2(DQ_DEPTH):0] dq_count;
  logic          dma_start_q;
  logic [CW-1:0] committed_q;   // payload words accepted but not yet written

  sync_fifo #(.WIDTH(IW), .DEPTH(DQ_DEPTH)) u_dq (
    .clk, .rst_n, .wr(dq_push), .wdata(cam_idx), .rd(dq_pop),
    .rdata(dq_head), .empty(dq_empty), .full(dq_full), .count(dq_count));

  always_comb begin
    at_lookup  = rx_valid && rx_hdr && hdr_second_q;
    cam_key    = {hi_q[11:0], rx_data[15:4]};
    room       = (int'(fifo_count) + int'(committed_q) + PAYLOAD_WORDS <= FIFO_DEPTH);
    accept     = at_lookup && cam_hit && room && !dq_full;
    dq_push    = accept;
    fifo_wr    = rx_valid && !rx_hdr && accept_q;
    fifo_wdata = rx_data;
    dq_pop     = !dq_empty && !dma_busy && !dma_start_q &&
                 (int'(fifo_count) >= PAYLOAD_WORDS);
    dma_start  = dq_pop;
    dma_ta     = dq_head;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr_second_q    <= 1'b0;
      hi_q            <= '0;
      accept_q        <= 1'b0;
      committed_q     <= '0;
      dma_start_q     <= 1'b0;
      cells_accepted  <= '0;
      cells_unmatched <= '0;
      cells_overflow  <= '0;
      last_header     <= '0;
    end else begin
      dma_start_q <= dma_start;
      if (rx_valid && rx_hdr) begin
        hdr_second_q <= !hdr_second_q;
        if (!hdr_second_q) hi_q <= rx_data;
      end
      if (at_lookup) begin
        accept_q    <= accept;
        last_header <= {hi_q, rx_data};
        if (accept)        cells_accepted  <= cells_accepted + 1'b1;
        else if (!cam_hit) cells_unmatched <= cells_unmatched + 1'b1;
        else               cells_overflow  <= cells_overflow + 1'b1;
      end
      committed_q <= committed_q + (accept ? CW'(PAYLOAD_WORDS) : '0) - CW'(fifo_wr);
    end
  end
endmodule
