// atm_tx_ctrl: Tx Control Unit of the ATM controller, with the Unassigned
// Cell Generator.
//
// Loading side: when the arbiter offers a TA and the Tx FIFO has room for a
// whole payload, the unit starts the Tx DMA for that TA. When the DMA ends it
// records the TA's bus position, which is also its header block in the PSM,
// in a small header-position queue (one clock). A cell therefore costs
// 1 + 48 + 1 = 50 clocks, 400 kcell/s at 20 MHz as the document reports.
//
// Serving side (towards the TC transmitter, which pulls data): c_rdy tells
// the TC that a complete cell is waiting. For each header byte the TC pulses
// head_en and takes the PSM byte on tc_data[7:0]; the PSM's 2-bit counter
// steps with every pulse and the position is dropped from the queue after
// the fourth byte. For each payload word the TC pulses info_en and takes the
// Tx FIFO's head word on tc_data. If no user cell is waiting and the
// unassigned mode bit is set, c_rdy stays high and an unassigned cell
// (all-zero header, 0x6A6A payload words) is served instead, so the ATM layer
// fills the stream itself; with the bit clear the TC inserts idle cells.
// Serving data combinationally on the strobes is this design's choice.
module atm_tx_ctrl
  import atm_pkg::*;
#(
  parameter int N          = 8,
  parameter int FIFO_DEPTH = 256,
  parameter int HQ_DEPTH   = 16,
  localparam int IW = $clog2(N),
  localparam int CW = $clog2(FIFO_DEPTH) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          unassigned_en,
  // arbiter
  input  logic          arb_valid,
  input  logic [IW-1:0] arb_ta,
  output logic          arb_take,
  // Tx DMA
  output logic          dma_start,
  output logic [IW-1:0] dma_ta,
  input  logic          dma_done,
  // Tx FIFO read side and fill level
  input  logic [CW-1:0] fifo_count,
  input  logic [15:0]   fifo_rdata,
  output logic          fifo_rd,
  // PSM
  output logic [IW-1:0] psm_blk,
  output logic          psm_adv,
  input  logic [7:0]    psm_byte,
  input  logic [1:0]    psm_cnt,
  // TC transmitter
  output logic          c_rdy,
  input  logic          head_en,
  input  logic          info_en,
  output logic [15:0]   tc_data,
  // statistics
  output logic [15:0]   user_cells,
  output logic [15:0]   unassigned_cells
);
  typedef enum logic [1:0] {S_IDLE, S_DMA, S_HDR} state_t;
  state_t        state_q;
  logic [IW-1:0] ta_q;

  logic          hq_push, hq_pop, hq_empty, hq_full;
  logic [IW-1:0] hq_head;
  logic [$clog2(HQ_DEPTH):0] hq_count;
  logic          cur_user_q, user_now;

  sync_fifo #(.WIDTH(IW), .DEPTH(HQ_DEPTH)) u_hq (
    .clk, .rst_n, .wr(hq_push), .wdata(ta_q), .rd(hq_pop),
    .rdata(hq_head), .empty(hq_empty), .full(hq_full), .count(hq_count));

  // ---------------- loading side ----------------
  always_comb begin
    arb_take  = (state_q == S_IDLE) && arb_valid && !hq_full &&
                (int'(fifo_count) + PAYLOAD_WORDS <= FIFO_DEPTH);
    dma_start = arb_take;
    dma_ta    = arb_ta;
    hq_push   = (state_q == S_HDR);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      ta_q    <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (arb_take) begin state_q <= S_DMA; ta_q <= arb_ta; end
        S_DMA:  if (dma_done) state_q <= S_HDR;
        S_HDR:  state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // ---------------- serving side ----------------
  // the kind of cell is decided on its first header byte and then held
  assign user_now = (psm_cnt == 2'd0) ? !hq_empty : cur_user_q;

  always_comb begin
    c_rdy   = !hq_empty || unassigned_en;
    psm_blk = hq_head;
    psm_adv = head_en;
    hq_pop  = head_en && user_now && (psm_cnt == 2'd3);
    fifo_rd = info_en && cur_user_q;
    if (head_en) tc_data = user_now ? {8'h00, psm_byte} : {8'h00, UNASSIGNED_HDR[8*(3-int'(psm_cnt)) +: 8]};
    else         tc_data = cur_user_q ? fifo_rdata : UNASSIGNED_PAYLOAD;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_user_q       <= 1'b0;
      user_cells       <= '0;
      unassigned_cells <= '0;
    end else if (head_en && psm_cnt == 2'd0) begin
      cur_user_q <= !hq_empty;
      if (!hq_empty) user_cells       <= user_cells + 1'b1;
      else           unassigned_cells <= unassigned_cells + 1'b1;
    end
  end

  a_dma_done_in_dma: assert property (@(posedge clk) disable iff (!rst_n) dma_done |-> state_q == S_DMA);
  a_head_needs_cell: assert property (@(posedge clk) disable iff (!rst_n) (head_en && psm_cnt == 2'd0) |-> c_rdy);
endmodule
