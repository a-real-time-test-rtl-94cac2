// ta_rx_model: behavioural model of the receive side of a terminal adapter
// on a node's RxBus (testbench only).
//
// Collects the words clocked to it (sel and bus_clk high) into cells of 24
// words and checks each cell against tb_payload(STREAM, n, w). Cells may be
// missing (n jumps forward) only if ALLOW_LOSS is set; words that differ from
// the expected value in exactly one bit are counted as bit errors if
// ALLOW_ERRORS is set, and any other difference is a failure. Words seen
// while rst_n is low (bus state not yet reset) are ignored.
module ta_rx_model #(
  parameter int STREAM       = 0,
  parameter bit ALLOW_LOSS   = 1'b0,
  parameter bit ALLOW_ERRORS = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel,
  input  logic        bus_clk,
  input  logic [15:0] data,
  output int          cells,
  output int          bit_errors,
  output int          failures,
  output int          next_n
);
  logic [15:0] buf_q [24];
  int word = 0;
  initial begin cells = 0; bit_errors = 0; failures = 0; next_n = 0; end

  function automatic bit cell_matches(int n, output int errs);
    errs = 0;
    for (int w = 0; w < 24; w++) begin
      logic [15:0] d;
      d = buf_q[w] ^ tb_pkg::tb_payload(STREAM, n, w);
      if ($countones(d) == 1 && ALLOW_ERRORS) errs++;
      else if (d != 0) return 1'b0;
    end
    return 1'b1;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) word = 0;
    else if (sel && bus_clk) begin
      buf_q[word] = data;
      if (word == 23) begin
        int errs, n;
        bit ok;
        word = 0;
        ok = 0;
        n = next_n;
        while (n < next_n + (ALLOW_LOSS ? 64 : 1)) begin
          if (cell_matches(n, errs)) begin ok = 1; break; end
          n++;
        end
        if (ok) begin
          cells++;
          bit_errors += errs;
          next_n = n + 1;
        end else begin
          failures++;
          $display("ta_rx_model stream %0d: cell %0d wrong, first word %h", STREAM, next_n, buf_q[0]);
          next_n++;
        end
      end else word++;
    end
  end
endmodule
