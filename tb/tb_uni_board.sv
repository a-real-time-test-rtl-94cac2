// tb_uni_board: one UNI board with its line output looped back to its line
// input through a byte queue with random framer pauses. TA 1 and TA 2 send
// on two connections whose CAM entries point back to TA 4 and TA 7. Checks:
// the receiver reaches SYNC on idle cells, every cell comes back intact and
// in order at the right TA, idle cells were inserted and removed, and the
// line carries one 53-byte cell per 53 accepted bytes (txf_sop spacing).
module tb_uni_board;
  import atm_pkg::*;
`include "tb_common.svh"
  localparam int NC = 50;
  logic [7:0] ta_avail, txb_en, rxb_en, txf_data, rxf_data = 0;
  logic txb_clk, rxb_clk, txf_sop, in_sync, fifo_err, cpu_we = 0, txf_en = 0, rxf_en = 0;
  logic [15:0] txb_data, rxb_data, tc_idle_tx, tc_rx_ok, tc_rx_corrected, tc_rx_discarded, tc_rx_idle;
  logic [4:0] cpu_addr = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  uni_board dut (.*);

  logic en_tx = 0, a1, a2;
  logic [15:0] d1, d2;
  int s1, s2;
  ta_tx_model #(.STREAM(1)) t1 (.clk, .rst_n, .enable(en_tx), .n_cells(NC), .gap(0), .avail(a1),
    .sel(txb_en[1]), .bus_clk(txb_clk), .data(d1), .sent(s1));
  ta_tx_model #(.STREAM(2)) t2 (.clk, .rst_n, .enable(en_tx), .n_cells(NC), .gap(5), .avail(a2),
    .sel(txb_en[2]), .bus_clk(txb_clk), .data(d2), .sent(s2));
  always_comb begin ta_avail = '0; ta_avail[1] = a1; ta_avail[2] = a2; txb_data = d1 | d2; end
  int c4, b4, f4, n4, c7, b7, f7, n7;
  ta_rx_model #(.STREAM(1)) r4 (.clk, .rst_n, .sel(rxb_en[4]), .bus_clk(rxb_clk), .data(rxb_data),
    .cells(c4), .bit_errors(b4), .failures(f4), .next_n(n4));
  ta_rx_model #(.STREAM(2)) r7 (.clk, .rst_n, .sel(rxb_en[7]), .bus_clk(rxb_clk), .data(rxb_data),
    .cells(c7), .bit_errors(b7), .failures(f7), .next_n(n7));

  // line loop
  logic [7:0] q [$];
  int since_sop = -1, sop_bad = 0, pauses = 0;
  always @(negedge clk) begin
    txf_en = rst_n && ($urandom % 20 != 0);
    rxf_en = 0;
    if (q.size() > 2 && ($urandom % 20 != 0)) begin rxf_en = 1; rxf_data = q[0]; end
    else if (q.size() > 2) pauses++;
  end
  always @(posedge clk) if (rst_n) begin
    if (txf_en) begin
      q.push_back(txf_data);
      if (txf_sop) begin
        if (since_sop >= 0 && since_sop != 53) sop_bad++;
        since_sop = 1;
      end else if (since_sop >= 0) since_sop++;
    end
    if (rxf_en) void'(q.pop_front());
  end

  task automatic cpu_write(logic [4:0] a, logic [31:0] d);
    @(negedge clk); cpu_we = 1; cpu_addr = a; cpu_wdata = d;
    @(negedge clk); cpu_we = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    cpu_write(5'h01, tb_pkg::tb_hdr(1, 'h101));
    cpu_write(5'h02, tb_pkg::tb_hdr(2, 'h202));
    cpu_write(5'h0C, tb_pkg::tb_cam(1, 'h101));
    cpu_write(5'h0F, tb_pkg::tb_cam(2, 'h202));
    wait (in_sync);
    check(1'b1, "receiver in SYNC on idle cells");
    en_tx = 1;
    wait (c4 == NC && c7 == NC);
    repeat (100) @(posedge clk);
    check(f4 == 0 && f7 == 0, "cells intact and in order");
    check(sop_bad == 0, "53 bytes per cell on the line");
    check(tc_idle_tx > 0 && tc_rx_idle > 0, "idle cells inserted and removed");
    check(int'(tc_rx_ok) == 2 * NC && tc_rx_discarded == 0 && tc_rx_corrected == 0, "TC receive counters");
    check(!fifo_err, "no FIFO error");
    cpu_addr = 5'h12; #1; check(cpu_rdata[15:0] == 16'(2 * NC), "ATM accepted count");
    finish_tb();
  end
endmodule
