// tc_receiver: Transmission Convergence sublayer receiver ("Rx PHYS").
//
// Takes the byte stream from the STM-1 frame controller (rxf_en marks a
// valid byte) and delivers each good user cell to the ATM layer as 26
// 16-bit words: two header words (rx_hdr high; HEC removed) and 24 payload
// words. Inside:
//   * tc_delineation finds the cell boundaries from the HEC;
//   * at the HEC byte of a cell received in SYNC, tc_single_err turns the
//     syndrome into an error position; a single-bit error is corrected by an
//     XOR plane on the four buffered header bytes, a multiple error makes the
//     cell discarded;
//   * a corrected header equal to 00 00 00 01 is an idle cell and is dropped;
//   * payload bytes are descrambled (x^43+1) and paired into words that wait
//     in the payload buffer, a small FIFO, while the header words go out
//     first through the 32:16 output multiplexer.
// Output words are registered; at most one word per clock leaves, and a cell
// takes at least 53 byte clocks to arrive, so the payload buffer never holds
// more than a couple of words. Structure follows the document; the I.432
// details (ALPHA, DELTA, idle header, coset) are this design's choice.
module tc_receiver
  import atm_pkg::*;
#(
  parameter int ALPHA = 7,
  parameter int DELTA = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rxf_en,
  input  logic [7:0]  rxf_data,
  output logic [15:0] rx_data,
  output logic        rx_valid,
  output logic        rx_hdr,
  output logic        in_sync,
  // statistics
  output logic [15:0] cells_ok,
  output logic [15:0] cells_corrected,
  output logic [15:0] cells_discarded,
  output logic [15:0] idle_cells,
  output logic [15:0] sync_losses
);
  logic [1:0]  dstate;
  logic [5:0]  pos;
  logic        at_hec, payload;
  logic [7:0]  syn, descr;
  logic [31:0] hdr_raw, hdr_fix;
  logic        no_err, single, multi;
  logic [2:0]  err_byte, err_bit;
  logic [39:0] err_mask;
  logic        check, accept;

  tc_delineation #(.ALPHA(ALPHA), .DELTA(DELTA)) u_del (
    .clk, .rst_n, .en(rxf_en), .din(rxf_data), .state(dstate), .pos, .at_hec,
    .syn, .hdr(hdr_raw), .payload, .sync_losses);

  tc_single_err u_sed (
    .syn, .no_err, .single, .multi, .err_byte, .err_bit, .err_mask);

  // header correction: XOR plane over the header buffer
  xor_plane #(.WIDTH(32)) u_hcorr (.din(hdr_raw), .mask(err_mask[39:8]), .dout(hdr_fix));

  tc_scrambler #(.DESCRAMBLE(1'b1)) u_descr (
    .clk, .rst_n, .en(payload), .din(rxf_data), .dout(descr));

  assign in_sync = (dstate == 2'd2);
  assign check   = at_hec && in_sync;
  assign accept  = check && !multi && (hdr_fix != IDLE_HDR);

  // payload buffer
  logic        cell_q;          // current cell is being delivered
  logic [7:0]  hi_byte_q;
  logic        pb_wr, pb_rd, pb_empty, pb_full;
  logic [15:0] pb_rdata;
  logic [3:0]  pb_count;
  logic [31:0] hdr_q;
  logic [1:0]  hdr_pend_q;

  assign pb_wr = payload && cell_q && !pos[0];   // odd payload byte index: word complete
  assign pb_rd = (hdr_pend_q == 2'd0) && !pb_empty;

  sync_fifo #(.WIDTH(16), .DEPTH(8)) u_pbuf (
    .clk, .rst_n, .wr(pb_wr), .wdata({hi_byte_q, descr}), .rd(pb_rd),
    .rdata(pb_rdata), .empty(pb_empty), .full(pb_full), .count(pb_count));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cell_q          <= 1'b0;
      hi_byte_q       <= '0;
      hdr_q           <= '0;
      hdr_pend_q      <= '0;
      rx_data         <= '0;
      rx_valid        <= 1'b0;
      rx_hdr          <= 1'b0;
      cells_ok        <= '0;
      cells_corrected <= '0;
      cells_discarded <= '0;
      idle_cells      <= '0;
    end else begin
      if (payload && pos[0]) hi_byte_q <= descr;
      if (at_hec) cell_q <= accept;
      if (check) begin
        if (multi)                       cells_discarded <= cells_discarded + 16'd1;
        else if (hdr_fix == IDLE_HDR)    idle_cells      <= idle_cells + 16'd1;
        else begin
          cells_ok <= cells_ok + 16'd1;
          if (single) cells_corrected <= cells_corrected + 16'd1;
        end
      end
      // 32:16 output multiplexer
      rx_valid <= 1'b0;
      rx_hdr   <= 1'b0;
      if (accept) begin
        hdr_q      <= hdr_fix;
        hdr_pend_q <= 2'd2;
      end else if (hdr_pend_q != 2'd0) begin
        rx_valid   <= 1'b1;
        rx_hdr     <= 1'b1;
        rx_data    <= (hdr_pend_q == 2'd2) ? hdr_q[31:16] : hdr_q[15:0];
        hdr_pend_q <= hdr_pend_q - 2'd1;
      end else if (pb_rd) begin
        rx_valid <= 1'b1;
        rx_data  <= pb_rdata;
      end
    end
  end

  a_pbuf_drained: assert property (@(posedge clk) disable iff (!rst_n) accept |-> pb_empty);
endmodule
