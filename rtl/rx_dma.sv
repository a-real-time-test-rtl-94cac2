// rx_dma: fixed-length receive DMA of the ATM controller.
//
// When started with a destination TA it selects that TA on the RxBus and
// moves one cell payload (24 words of 16 bits) from the Rx FIFO onto the
// bus, one word per bus clock. As on the transmit side the bus clock runs at
// clk/2: a word is on the bus for two clocks and is taken by the TA at the
// edge where bus_clk is high, which is also the edge that reads it out of the
// (show-ahead) Rx FIFO. A cell takes 48 clocks; `done` pulses with its last
// word. There is no handshake: the selected TA must take every word, as the
// document states for the internal bus.
module rx_dma #(
  parameter int N     = 8,
  parameter int WORDS = 24,
  localparam int IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [IW-1:0] ta,
  input  logic [15:0]   fifo_rdata,
  output logic          fifo_rd,
  output logic [N-1:0]  bus_en,
  output logic          bus_clk,
  output logic [15:0]   bus_data,
  output logic          busy,
  output logic          done
);
  logic [IW-1:0]            ta_q;
  logic [$clog2(WORDS)-1:0] word_q;
  logic                     phase_q;

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
    bus_en   = '0;
    if (busy) bus_en[ta_q] = 1'b1;
    bus_clk  = busy && phase_q;
    bus_data = busy ? fifo_rdata : 16'h0000;
    fifo_rd  = bus_clk;
    done     = bus_clk && (word_q == ($clog2(WORDS))'(WORDS-1));
  end
endmodule
