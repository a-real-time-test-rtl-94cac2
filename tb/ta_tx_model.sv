// ta_tx_model: behavioural model of the transmit side of a terminal adapter
// on a node's TxBus (testbench only; terminal adapters are user equipment).
//
// Offers `n_cells` cells once `enable` is high. Word w of cell n carries
// tb_payload(stream, n, w). `avail` is high while a cell waits. While the
// board select `sel` is high the current word is driven on `data` (zero
// otherwise, so several models can be ORed onto one bus); the word pointer
// advances at each clock edge with `bus_clk` high. `gap` idle clocks are
// inserted after each cell before the next one is offered.
module ta_tx_model #(
  parameter int STREAM = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  int          n_cells,
  input  int          gap,
  output logic        avail,
  input  logic        sel,
  input  logic        bus_clk,
  output logic [15:0] data,
  output int          sent
);
  int word, wait_cnt;

  assign avail = enable && (sent < n_cells) && (wait_cnt == 0);
  assign data  = sel ? tb_pkg::tb_payload(STREAM, sent, word) : 16'h0000;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word <= 0; sent <= 0; wait_cnt <= 0;
    end else begin
      if (wait_cnt > 0) wait_cnt <= wait_cnt - 1;
      if (sel && bus_clk) begin
        if (word == 23) begin
          word     <= 0;
          sent     <= sent + 1;
          wait_cnt <= gap;
        end else word <= word + 1;
      end
    end
  end
endmodule
