// tb_tc_receiver: a line byte stream built with the reference HEC and
// scrambler: idle cells to reach SYNC, then user and idle cells mixed, some
// user cells with one header bit flipped (anywhere in the 40 bits), some
// with two. The framer pauses at random. Checks: every user cell without a
// double error arrives as 2 header words (rx_hdr) + 24 payload words with
// the original header and payload, in order; double-error cells and idle
// cells are not delivered; the statistics count them.
module tb_tc_receiver;
  import atm_pkg::*;
`include "tb_common.svh"
`include "tb_ref.svh"
  logic rxf_en = 0, rx_valid, rx_hdr, in_sync;
  logic [7:0] rxf_data = 0;
  logic [15:0] rx_data, cells_ok, cells_corrected, cells_discarded, idle_cells, sync_losses;
  tc_receiver dut (.*);

  typedef struct { int kind; int n; int e1; int e2; } cdesc_t;   // kind 0 idle, 1 user
  cdesc_t cells [$];
  int expect_n [$];
  int n_single = 0, n_double = 0, n_idle = 0;
  logic [7:0] line [$];
  ref_scr sc;

  function automatic logic [31:0] hdr_of(int n); return {4'h0, 8'(n + 1), 16'(n * 5 + 9), 4'h0}; endfunction

  // output side: collect words
  int w = 0, got = 0, bad = 0;
  logic [31:0] h;
  always @(posedge clk) if (rst_n && rx_valid) begin
    checks++;
    if (w < 2) begin
      if (!rx_hdr) bad++;
      if (w == 0) h[31:16] = rx_data; else h[15:0] = rx_data;
      if (w == 1 && (expect_n.size() == 0 || h != hdr_of(expect_n[0]))) bad++;
    end else begin
      if (rx_hdr) bad++;
      if (expect_n.size() == 0 || rx_data != tb_pkg::tb_payload(4, expect_n[0], w - 2)) bad++;
    end
    if (w == 25) begin w = 0; got++; void'(expect_n.pop_front()); end else w++;
  end

  initial begin
    sc = new();
    for (int c = 0; c < 12; c++) cells.push_back('{0, 0, -1, -1});
    for (int c = 0, n = 0; c < 300; c++) begin
      if ($urandom % 3 == 0) cells.push_back('{0, 0, -1, -1});
      else begin
        int r, e1, e2;
        r = $urandom % 10; e1 = -1; e2 = -1;
        if (r == 0) e1 = $urandom % 40;
        if (r == 1) begin e1 = $urandom % 40; e2 = (e1 + 1 + $urandom % 39) % 40; end
        cells.push_back('{1, n, e1, e2});
        n++;
      end
    end
    // build the line bytes
    foreach (cells[i]) begin
      logic [31:0] hh; logic [39:0] cw;
      if (cells[i].kind == 0) begin hh = IDLE_HDR; n_idle++; end
      else begin
        hh = hdr_of(cells[i].n);
        if (cells[i].e2 >= 0) n_double++;
        else begin
          expect_n.push_back(cells[i].n);
          if (cells[i].e1 >= 0) n_single++;
        end
      end
      cw = {hh, ref_hec(hh)};
      if (cells[i].e1 >= 0) cw[cells[i].e1] = !cw[cells[i].e1];
      if (cells[i].e2 >= 0) cw[cells[i].e2] = !cw[cells[i].e2];
      for (int b = 0; b < 5; b++) line.push_back(cw[8*(4-b) +: 8]);
      for (int k = 0; k < 48; k++) begin
        logic [7:0] pb;
        pb = (cells[i].kind == 0) ? IDLE_PAYLOAD : tb_pkg::tb_payload(4, cells[i].n, k / 2)[(k % 2) ? 7 : 15 -: 8];
        line.push_back(sc.step(pb, 0));
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 23; i++) void'(line.pop_front());   // start mid-cell
    while (line.size() > 0) begin
      @(negedge clk);
      rxf_en = ($urandom % 6) != 0;
      if (rxf_en) rxf_data = line.pop_front();
    end
    @(negedge clk); rxf_en = 0;
    repeat (20) @(posedge clk);
    check(bad == 0, "delivered words");
    check(expect_n.size() == 0 && w == 0, "every good user cell delivered");
    check(int'(cells_corrected) == n_single && n_single > 0, "single errors corrected");
    check(int'(cells_discarded) == n_double && n_double > 0, "double errors discarded");
    check(int'(cells_ok) == got, "delivered count");
    check(int'(idle_cells) >= n_idle - 8 && int'(idle_cells) <= n_idle, "idle cells removed");
    check(in_sync && sync_losses == 0, "stays in sync");
    finish_tb();
  end
endmodule
