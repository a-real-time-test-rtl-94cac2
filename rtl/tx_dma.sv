// tx_dma: fixed-length transmit DMA of the ATM controller.
//
// There is no address bus on the TxBus: a transfer is a board select (one
// enable line per TA position) and a fixed number of bus clock cycles, one
// per 16-bit payload word. The bus clock is generated here at clk/2 (one low
// and one high clock period per word), so 24 words take 48 clocks; at a
// 20 MHz system clock this is the document's 20 Mbyte/s bus rate. The TA
// presents the current word while its enable is active and moves to the next
// one when bus_clk is high at a clock edge; the same edge writes the word into
// the Tx FIFO. `done` pulses with the last word.
// Interface timing (word per bus clock, enable held for the whole cell)
// is this design's reading of the document's "board selection ... with a
// number of read/write cycles".
module tx_dma #(
  parameter int N     = 8,
  parameter int WORDS = 24,
  localparam int IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [IW-1:0] ta,
  output logic [N-1:0]  bus_en,
  output logic          bus_clk,
  input  logic [15:0]   bus_data,
  output logic          fifo_wr,
  output logic [15:0]   fifo_wdata,
  output logic          busy,
  output logic          done
);
  logic [IW-1:0]              ta_q;
  logic [$clog2(WORDS)-1:0]   word_q;
  logic                       phase_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      ta_q    <= '0;
      word_q  <= '0;
      phase_q <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        busy    <= 1'b1;
        ta_q    <= ta;
        word_q  <= '0;
        phase_q <= 1'b0;
      end
    end else begin
      phase_q <= ~phase_q;
      if (phase_q) begin
        if (word_q == ($clog2(WORDS))'(WORDS-1)) busy <= 1'b0;
        word_q <= word_q + 1'b1;
      end
    end
  end

  always_comb begin
    bus_en     = '0;
    if (busy) bus_en[ta_q] = 1'b1;
    bus_clk    = busy && phase_q;
    fifo_wr    = bus_clk;
    fifo_wdata = bus_data;
    done       = bus_clk && (word_q == ($clog2(WORDS))'(WORDS-1));
  end
endmodule
