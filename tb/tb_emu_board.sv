// tb_emu_board: the emulator board between a receiving bus (driven like the
// first UNI's Rx DMA) and a transmitting bus (pulled like the second UNI's
// Tx DMA: 24 words at clk/2 whenever tx_avail).
// Run 1, constant delay 400, no errors: every cell comes out intact, in
// order, no earlier than 400 clocks after its first word arrived.
// Run 2, 15 % rejection and 3 % word errors: cells out + rejected = cells
// in, the single-bit word errors seen equal the board's count.
// Run 3, a burst faster than the delay allows with a 48-word FIFO: whole
// cells are dropped and counted, the rest come out intact.
// Run 4, zero delay with back-to-back cells: each cell waits until its last
// word is in, and all come out intact and in order.
module tb_emu_board;
  import atm_pkg::*;
`include "tb_common.svh"
  logic rx_en = 0, rx_clk = 0, tx_avail, tx_en = 0, tx_clk = 0;
  logic [15:0] rx_data = 0, tx_data;
  logic [15:0] cells_in, cells_out, cells_dropped, cells_rejected, bit_errors;
  logic [31:0] last_delay;
  emu_cfg_t cfg;
  logic rx_en2 = 0, rx_clk2 = 0, tx_avail2, tx_en2 = 0, tx_clk2 = 0;
  logic [15:0] rx_data2 = 0, tx_data2, ci2, co2, cd2, cr2, be2;
  logic [31:0] ld2;
  emu_board #(.FIFO_DEPTH(256)) dut (.*);
  emu_board #(.FIFO_DEPTH(48)) dut_small (.clk, .rst_n, .cfg, .rx_en(rx_en2), .rx_clk(rx_clk2),
    .rx_data(rx_data2), .tx_avail(tx_avail2), .tx_en(tx_en2), .tx_clk(tx_clk2), .tx_data(tx_data2),
    .cells_in(ci2), .cells_out(co2), .cells_dropped(cd2), .cells_rejected(cr2), .bit_errors(be2),
    .last_delay(ld2));

  int cyc = 0;
  always @(posedge clk) cyc++;
  int arr_t [$];
  int stream = 0;

  task automatic send(int n, bit to_small);
    arr_t.push_back(cyc);
    for (int w = 0; w < 24; w++) begin
      @(negedge clk);
      if (to_small) begin rx_en2 = 1; rx_clk2 = 0; rx_data2 = tb_pkg::tb_payload(stream, n, w); end
      else begin rx_en = 1; rx_clk = 0; rx_data = tb_pkg::tb_payload(stream, n, w); end
      @(negedge clk);
      if (to_small) rx_clk2 = 1; else rx_clk = 1;
    end
    @(negedge clk); rx_en = 0; rx_clk = 0; rx_en2 = 0; rx_clk2 = 0;
  endtask

  // transmit-side puller and checker for dut
  int out_n = 0, seen_be = 0, fails = 0, early = 0;
  bit lossy = 0;
  initial begin
    wait (rst_n);
    forever begin
      logic [15:0] w [24];
      @(negedge clk);
      if (!tx_avail) continue;
      for (int i = 0; i < 24; i++) begin
        tx_en = 1; tx_clk = 0; @(negedge clk);
        tx_clk = 1; #1 w[i] = tx_data; @(negedge clk);
      end
      tx_en = 0; tx_clk = 0;
      begin
        int n, errs; bit ok;
        ok = 0;
        for (n = out_n; n < out_n + (lossy ? 20 : 1); n++) begin
          errs = 0; ok = 1;
          for (int i = 0; i < 24; i++) begin
            logic [15:0] d;
            d = w[i] ^ tb_pkg::tb_payload(stream, n, i);
            if ($countones(d) == 1 && lossy) errs++; else if (d != 0) ok = 0;
          end
          if (ok) break;
        end
        if (!ok) fails++;
        else begin
          if (!lossy && cyc - 48 - arr_t[n] < int'(cfg.mean_delay)) early++;
          seen_be += errs; out_n = n + 1;
        end
      end
    end
  end

  // puller for dut_small
  int out2 = 0, fails2 = 0;
  initial begin
    wait (rst_n);
    forever begin
      logic [15:0] w [24];
      @(negedge clk);
      if (!tx_avail2) continue;
      for (int i = 0; i < 24; i++) begin
        tx_en2 = 1; tx_clk2 = 0; @(negedge clk);
        tx_clk2 = 1; #1 w[i] = tx_data2; @(negedge clk);
      end
      tx_en2 = 0; tx_clk2 = 0;
      out2++;
      if (find_n(w[0]) < 0) fails2++;
      for (int i = 1; i < 24; i++) if (w[i] != tb_pkg::tb_payload(7, find_n(w[0]), i)) fails2++;
    end
  end
  function automatic int find_n(logic [15:0] w0);
    for (int n = 0; n < 100; n++) if (tb_pkg::tb_payload(7, n, 0) == w0) return n;
    return -1;
  endfunction

  initial begin
    cfg = '0;
    cfg.mean_delay = 400;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // run 1
    for (int n = 0; n < 30; n++) begin send(n, 0); repeat ($urandom % 100) @(negedge clk); end
    wait (out_n == 30);
    repeat (100) @(posedge clk);
    check(fails == 0 && out_n == 30, "run 1: all cells intact and in order");
    check(early == 0, "run 1: no cell left before its delay");
    check(last_delay == 32'd400, "run 1: delay 400");
    // run 2
    stream = 1; out_n = 0; lossy = 1; arr_t.delete();
    cfg.cell_rej_p = 32'h2666_6666; cfg.word_err_p = 32'h07AE_147B;
    for (int n = 0; n < 100; n++) send(n, 0);
    repeat (3000) @(posedge clk);
    check(fails == 0, "run 2: cells in order, single-bit word errors only");
    check(int'(cells_out) - 30 + int'(cells_rejected) == 100, "run 2: out + rejected = in");
    check(cells_rejected > 0 && bit_errors > 0, "run 2: rejections and bit errors happened");
    check(seen_be == int'(bit_errors), "run 2: bit errors seen = inserted");
    // run 3
    cfg = '0; cfg.mean_delay = 2000;
    stream = 7;
    for (int n = 0; n < 10; n++) send(n, 1);
    repeat (3000) @(posedge clk);
    check(cd2 > 0, "run 3: overflow drops");
    check(int'(ci2) + int'(cd2) == 10 && int'(co2) == int'(ci2) && out2 == int'(ci2), "run 3: kept cells come out");
    check(fails2 == 0, "run 3: kept cells intact");
    // run 4: zero delay, cells back to back - none may leave before it is complete
    cfg = '0;
    stream = 3; out_n = 0; lossy = 0; arr_t.delete();
    for (int n = 0; n < 10; n++) send(n, 0);
    repeat (1000) @(posedge clk);
    check(fails == 0 && out_n == 10 && early == 0, "run 4: zero delay, all cells intact and in order");
    finish_tb();
  end
endmodule
