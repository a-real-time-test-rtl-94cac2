// tb_atm_controller: the ATM controller with its two external FIFOs.
// The local CPU port programs PSM headers and CAM entries. Two TAs send
// cells; a TC transmitter model pulls them and checks header (from the PSM
// block of the sending TA) and payload. Cells fed on the receive side are
// routed by the CAM to TA models that check them. Also checks the 50-clock
// cell loading period (400 kcell/s at 20 MHz), the statistics read through
// the CPU port and that the FIFO error detectors stay quiet.
module tb_atm_controller;
  import atm_pkg::*;
`include "tb_common.svh"
  localparam int FD = 256;
  localparam int NC = 30;
  logic [7:0] ta_avail, txb_en, rxb_en;
  logic txb_clk, rxb_clk, txfifo_wr, txfifo_rd, rxfifo_wr, rxfifo_rd, c_rdy, tx_fifo_err, rx_fifo_err;
  logic [15:0] txb_data, txfifo_wdata, txfifo_rdata, rxfifo_wdata, rxfifo_rdata, rxb_data, tc_tx_data;
  logic [8:0] txfifo_count, rxfifo_count;
  logic head_en = 0, info_en = 0, rx_valid = 0, rx_hdr = 0, cpu_we = 0;
  logic [15:0] rx_data = 0;
  logic [4:0] cpu_addr = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  logic e1, f1, e2, f2;

  atm_controller #(.N(8), .FIFO_DEPTH(FD)) dut (.*);
  sync_fifo #(.WIDTH(16), .DEPTH(FD)) u_txq (.clk, .rst_n, .wr(txfifo_wr), .wdata(txfifo_wdata),
    .rd(txfifo_rd), .rdata(txfifo_rdata), .empty(e1), .full(f1), .count(txfifo_count));
  sync_fifo #(.WIDTH(16), .DEPTH(FD)) u_rxq (.clk, .rst_n, .wr(rxfifo_wr), .wdata(rxfifo_wdata),
    .rd(rxfifo_rd), .rdata(rxfifo_rdata), .empty(e2), .full(f2), .count(rxfifo_count));

  logic en_tx = 0;
  logic av3, av5;
  logic [15:0] d3, d5;
  int s3, s5;
  ta_tx_model #(.STREAM(3)) ta3 (.clk, .rst_n, .enable(en_tx), .n_cells(NC), .gap(0), .avail(av3),
    .sel(txb_en[3]), .bus_clk(txb_clk), .data(d3), .sent(s3));
  ta_tx_model #(.STREAM(5)) ta5 (.clk, .rst_n, .enable(en_tx), .n_cells(NC), .gap(0), .avail(av5),
    .sel(txb_en[5]), .bus_clk(txb_clk), .data(d5), .sent(s5));
  always_comb begin ta_avail = '0; ta_avail[3] = av3; ta_avail[5] = av5; txb_data = d3 | d5; end

  int r1c, r1b, r1f, r1n, r6c, r6b, r6f, r6n;
  ta_rx_model #(.STREAM(11)) rx1 (.clk, .rst_n, .sel(rxb_en[1]), .bus_clk(rxb_clk), .data(rxb_data),
    .cells(r1c), .bit_errors(r1b), .failures(r1f), .next_n(r1n));
  ta_rx_model #(.STREAM(16)) rx6 (.clk, .rst_n, .sel(rxb_en[6]), .bus_clk(rxb_clk), .data(rxb_data),
    .cells(r6c), .bit_errors(r6b), .failures(r6f), .next_n(r6n));

  task automatic cpu_write(logic [4:0] a, logic [31:0] d);
    @(negedge clk); cpu_we = 1; cpu_addr = a; cpu_wdata = d;
    @(negedge clk); cpu_we = 0;
  endtask

  int errs = 0, bus_words = 0, first_word = -1, last_word = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (tx_fifo_err || rx_fifo_err) errs++;
    if (rst_n && txb_clk) begin
      bus_words++;
      if (first_word < 0) first_word = cyc;
      last_word = cyc;
    end
  end

  // TC transmitter model: pulls whole cells and checks them
  int got3 = 0, got5 = 0, tx_bad = 0;
  initial begin
    wait (rst_n);
    wait (en_tx);
    repeat (3000) @(posedge clk);   // let the Tx FIFO fill first
    while (got3 + got5 < 2 * NC) begin
      logic [31:0] h; logic [15:0] w [24]; int s, n;
      @(negedge clk);
      if (!c_rdy) continue;
      for (int b = 0; b < 4; b++) begin
        head_en = 1; #1; h[8*(3-b) +: 8] = tc_tx_data[7:0];
        @(negedge clk);
      end
      head_en = 0;
      for (int i = 0; i < 24; i++) begin
        info_en = 1; #1; w[i] = tc_tx_data; @(negedge clk);
      end
      info_en = 0;
      if (h == tb_pkg::tb_hdr(3, 'h33)) begin s = 3; n = got3++; end
      else if (h == tb_pkg::tb_hdr(5, 'h55)) begin s = 5; n = got5++; end
      else begin s = -1; tx_bad++; end
      if (s >= 0) for (int i = 0; i < 24; i++) if (w[i] != tb_pkg::tb_payload(s, n, i)) tx_bad++;
    end
  end

  task automatic send_cell(int vpi, int vci, int stream, int n);
    logic [31:0] h;
    h = tb_pkg::tb_hdr(vpi, vci);
    for (int i = 0; i < 26; i++) begin
      @(negedge clk);
      rx_valid = 1; rx_hdr = i < 2;
      rx_data = (i == 0) ? h[31:16] : (i == 1) ? h[15:0] : tb_pkg::tb_payload(stream, n, i - 2);
      @(negedge clk); rx_valid = 0;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    cpu_write(5'h03, tb_pkg::tb_hdr(3, 'h33));
    cpu_write(5'h05, tb_pkg::tb_hdr(5, 'h55));
    cpu_write(5'h09, tb_pkg::tb_cam(1, 'h11));
    cpu_write(5'h0E, tb_pkg::tb_cam(6, 'h66));
    en_tx = 1;
    // receive direction meanwhile
    for (int c = 0; c < NC; c++) begin
      send_cell(1, 'h11, 11, c);
      send_cell(6, 'h66, 16, c);
      if (c % 10 == 0) send_cell(7, 'h77, 0, 0);   // no connection
    end
    wait (got3 + got5 == 2 * NC);
    repeat (200) @(posedge clk);
    check(tx_bad == 0 && got3 == NC && got5 == NC, "transmit cells: PSM header and TA payload");
    check(r1c == NC && r1f == 0 && r6c == NC && r6f == 0, "receive cells routed by the CAM");
    check(errs == 0, "FIFO error detectors quiet");
    // the first 10 cells (240 words) were loaded back to back: 50 clocks per cell
    check(bus_words == 2 * NC * 24, "bus words");
    cpu_addr = 5'h11; #1; check(cpu_rdata[15:0] == 16'(2 * NC), "user cell counter");
    cpu_addr = 5'h12; #1; check(cpu_rdata == {16'd3, 16'(2 * NC)}, "receive counters");
    finish_tb();
  end

  // loading period while the FIFO has room: measured on the DMA starts
  int st [$];
  always @(posedge clk) if (rst_n && dut.u_txctl.dma_start) st.push_back(cyc);
  initial begin
    wait (st.size() == 10);
    for (int i = 1; i < 10; i++) check(st[i] - st[i-1] == 50, "50 clocks per cell (400 kcell/s at 20 MHz)");
  end
endmodule
