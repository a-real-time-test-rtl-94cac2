// tb_testbed_top: end-to-end test of the whole test-bed at its default sizes.
//
// The testbench plays the parts outside the RTL: terminal adapters on the two
// nodes (ta_tx_model / ta_rx_model), the STM-1 framers and lines (byte
// queues between UNI 0 and 1 and between UNI 2 and 3, which pause the byte
// stream now and then as frame overhead does), and the local CPUs, which set
// up the connections:
//   VC0  node A TA 2 -> emulator EB A->B #0 (mean delay 200, no errors) -> node B TA 5
//   VC1  node A TA 6 -> emulator EB A->B #1 (delay 300 +/-100, 10 % cell
//        rejection, 2 % word errors)                                   -> node B TA 6
//   VC2  node B TA 4 -> emulator EB B->A #0 (delay 50)                   -> node A TA 3
// Node B also enables unassigned cells. On the line towards node B the
// testbench flips one header bit in some user cells (to be corrected) and
// two header bits in some idle cells (to be discarded).
// Checks: every VC0/VC2 cell arrives intact and in order; VC1 cells arrive
// in order with gaps exactly as many as the EB rejected and with exactly the
// bit errors the EB inserted; the emulator's delays lie in their bounds; each
// mechanism (arbitration between TAs, framer pauses, idle cells, unassigned
// cells, header correction, header discard, cell delay, jitter, rejection,
// bit errors) happened at least once.
module tb_testbed_top;
  import atm_pkg::*;
  import tb_pkg::*;

  localparam int NCELLS = 40;
  localparam int N_VC = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #25 clk = ~clk;     // 20 MHz

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- DUT ----------------
  logic [N_TA-1:0] a_ta_avail, a_txb_en, a_rxb_en, b_ta_avail, b_txb_en, b_rxb_en;
  logic a_txb_clk, a_rxb_clk, b_txb_clk, b_rxb_clk;
  logic [15:0] a_txb_data, a_rxb_data, b_txb_data, b_rxb_data;
  logic [3:0] line_txf_en, line_txf_sop, line_rxf_en;
  logic [3:0][7:0] line_txf_data, line_rxf_data;
  logic [3:0] cpu_we;
  logic [3:0][4:0] cpu_addr;
  logic [3:0][31:0] cpu_wdata, cpu_rdata;
  emu_cfg_t [2*N_VC-1:0] eb_cfg;
  logic [2*N_VC-1:0][15:0] eb_cells_out, eb_cells_rejected, eb_bit_errors;
  logic [3:0] in_sync, fifo_err;
  logic [3:0][15:0] tc_idle_tx, tc_rx_ok, tc_rx_corrected, tc_rx_discarded, tc_rx_idle;

  testbed_top dut (.*);

  // ---------------- terminal adapters ----------------
  logic en_tx = 1'b0;
  int sent_a2, sent_a6, sent_b4;
  logic [15:0] d_a2, d_a6, d_b4;
  logic av_a2, av_a6, av_b4;
  ta_tx_model #(.STREAM(0)) ta_a2 (.clk, .rst_n, .enable(en_tx), .n_cells(NCELLS), .gap(0),
    .avail(av_a2), .sel(a_txb_en[2]), .bus_clk(a_txb_clk), .data(d_a2), .sent(sent_a2));
  ta_tx_model #(.STREAM(1)) ta_a6 (.clk, .rst_n, .enable(en_tx), .n_cells(NCELLS), .gap(0),
    .avail(av_a6), .sel(a_txb_en[6]), .bus_clk(a_txb_clk), .data(d_a6), .sent(sent_a6));
  ta_tx_model #(.STREAM(2)) ta_b4 (.clk, .rst_n, .enable(en_tx), .n_cells(NCELLS), .gap(30),
    .avail(av_b4), .sel(b_txb_en[4]), .bus_clk(b_txb_clk), .data(d_b4), .sent(sent_b4));
  always_comb begin
    a_ta_avail = '0; a_ta_avail[2] = av_a2; a_ta_avail[6] = av_a6;
    b_ta_avail = '0; b_ta_avail[4] = av_b4;
    a_txb_data = d_a2 | d_a6;
    b_txb_data = d_b4;
  end

  int r0_cells, r0_be, r0_fail, r0_next, r1_cells, r1_be, r1_fail, r1_next, r2_cells, r2_be, r2_fail, r2_next;
  ta_rx_model #(.STREAM(0)) rx_b5 (.clk, .rst_n, .sel(b_rxb_en[5]), .bus_clk(b_rxb_clk), .data(b_rxb_data),
    .cells(r0_cells), .bit_errors(r0_be), .failures(r0_fail), .next_n(r0_next));
  ta_rx_model #(.STREAM(1), .ALLOW_LOSS(1), .ALLOW_ERRORS(1)) rx_b6 (.clk, .rst_n, .sel(b_rxb_en[6]),
    .bus_clk(b_rxb_clk), .data(b_rxb_data),
    .cells(r1_cells), .bit_errors(r1_be), .failures(r1_fail), .next_n(r1_next));
  ta_rx_model #(.STREAM(2)) rx_a3 (.clk, .rst_n, .sel(a_rxb_en[3]), .bus_clk(a_rxb_clk), .data(a_rxb_data),
    .cells(r2_cells), .bit_errors(r2_be), .failures(r2_fail), .next_n(r2_next));

  // ---------------- lines and framers ----------------
  // link l carries UNI src[l] -> UNI dst[l]
  int src [4] = '{0, 1, 2, 3};
  int dst [4] = '{1, 0, 3, 2};
  logic [7:0] q [4][$];
  bit         qs [4][$];
  int pauses = 0, corr_inj = 0, disc_inj = 0, cellno = 0;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int l = 0; l < 4; l++) begin
        if (line_txf_en[src[l]]) begin
          q[l].push_back(line_txf_data[src[l]]);
          qs[l].push_back(line_txf_sop[src[l]]);
        end
        if (line_rxf_en[dst[l]]) begin
          void'(q[l].pop_front());
          void'(qs[l].pop_front());
        end
      end
    end
  end

  always_comb begin
    for (int u = 0; u < 4; u++) line_txf_en[u] = rst_n && (($urandom % 30) != 0);
  end

  // receive side: a byte is offered once at least a header's worth is queued
  always @(negedge clk) begin
    for (int l = 0; l < 4; l++) begin
      line_rxf_en[dst[l]]   = 1'b0;
      line_rxf_data[dst[l]] = 8'h00;
      if (q[l].size() >= 6) begin
        if (($urandom % 30) == 0) pauses++;
        else begin
          // header error injection on the line towards node B
          if (l == 2 && qs[l][0]) begin
            cellno++;
            if ({q[l][0], q[l][1], q[l][2], q[l][3]} == IDLE_HDR && cellno % 23 == 0) begin
              q[l][0] ^= 8'h10; q[l][2] ^= 8'h04; disc_inj++;
            end else if ({q[l][0], q[l][1], q[l][2], q[l][3]} != IDLE_HDR &&
                         {q[l][0], q[l][1], q[l][2], q[l][3]} != UNASSIGNED_HDR && cellno % 7 == 0) begin
              q[l][1] ^= 8'h20; corr_inj++;
            end
          end
          line_rxf_en[dst[l]]   = 1'b1;
          line_rxf_data[dst[l]] = q[l][0];
        end
      end
    end
  end

  // ---------------- local CPUs ----------------
  task automatic cpu_write(int u, logic [4:0] a, logic [31:0] d);
    @(negedge clk);
    cpu_we[u] = 1'b1; cpu_addr[u] = a; cpu_wdata[u] = d;
    @(negedge clk);
    cpu_we[u] = 1'b0;
  endtask

  task automatic cpu_read(int u, logic [4:0] a, output logic [31:0] d);
    @(negedge clk);
    cpu_addr[u] = a;
    #1 d = cpu_rdata[u];
  endtask
  logic [31:0] rd;

  // ---------------- mechanism counters ----------------
  int arb_switch = 0, last_sel = -1, jitter_seen = 0, delay_bad = 0, fifo_errs = 0;
  logic [31:0] d0_min = '1, d1_min = '1, d1_max = 0;
    always @(posedge clk) if (rst_n) begin
    if (a_txb_clk) begin
      int s;
      s = a_txb_en[2] ? 2 : 6;
      if (last_sel != -1 && s != last_sel) arb_switch++;
      last_sel = s;
    end
    if (|fifo_err) fifo_errs++;
  end
  // the emulator's delay of each cell, sampled when a departure time is computed
  always @(posedge clk) if (rst_n) begin
    if (dut.g_dir[0].g_eb[0].u_eb.u_delay.arr_pop) begin
      logic [31:0] d;
      #1 d = dut.g_dir[0].g_eb[0].last_delay;
      if (d < 200) delay_bad++;
      if (d < d0_min) d0_min = d;
    end
    if (dut.g_dir[0].g_eb[1].u_eb.u_delay.arr_pop) begin
      logic [31:0] d;
      #1 d = dut.g_dir[0].g_eb[1].last_delay;
      if (d < 200) delay_bad++;
      if (d < d1_min) d1_min = d;
      if (d > d1_max) d1_max = d;
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  initial begin
    cpu_we = '0; cpu_addr = '0; cpu_wdata = '0;
    for (int e = 0; e < 2*N_VC; e++) eb_cfg[e] = '0;
    eb_cfg[0].mean_delay = 16'd200;
    eb_cfg[1].mean_delay = 16'd300; eb_cfg[1].jitter = 16'd100; eb_cfg[1].jitter_en = 1'b1;
    eb_cfg[1].cell_rej_p = 32'h1999_9999;       // 10 %
    eb_cfg[1].word_err_p = 32'h051E_B851;       // 2 %
    eb_cfg[2].mean_delay = 16'd50;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    // node A: sends VC(1,0x20) from TA 2, VC(2,0x40) from TA 6; receives VC(3,0x30) at TA 3
    cpu_write(0, 5'h02, tb_hdr(1, 'h20));
    cpu_write(0, 5'h06, tb_hdr(2, 'h40));
    cpu_write(0, 5'h0B, tb_cam(3, 'h30));
    // emulator UNI 1: VC(1,0x20) -> EB position 0, VC(2,0x40) -> position 1; VC2 leaves with (3,0x30)
    cpu_write(1, 5'h08, tb_cam(1, 'h20));
    cpu_write(1, 5'h09, tb_cam(2, 'h40));
    cpu_write(1, 5'h00, tb_hdr(3, 'h30));
    // emulator UNI 2: A->B cells leave with their VCs; VC(3,0x30) from node B -> EB position 0
    cpu_write(2, 5'h00, tb_hdr(1, 'h20));
    cpu_write(2, 5'h01, tb_hdr(2, 'h40));
    cpu_write(2, 5'h08, tb_cam(3, 'h30));
    // node B: receives VC(1,0x20) at TA 5 and VC(2,0x40) at TA 6, sends VC(3,0x30) from TA 4
    cpu_write(3, 5'h0D, tb_cam(1, 'h20));
    cpu_write(3, 5'h0E, tb_cam(2, 'h40));
    cpu_write(3, 5'h04, tb_hdr(3, 'h30));
    cpu_write(3, 5'h10, 32'd1);                 // node B fills with unassigned cells
    cpu_read(3, 5'h10, rd); check(rd == 32'd1, "control register read back");
    // wait for cell delineation everywhere
    wait (in_sync == 4'hF);
    check(1'b1, "all receivers reached SYNC");
    en_tx = 1'b1;
    wait (sent_a2 == NCELLS && sent_a6 == NCELLS && sent_b4 == NCELLS);
    wait (r0_cells == NCELLS && r2_cells == NCELLS &&
          int'(eb_cells_out[1]) + int'(eb_cells_rejected[1]) == NCELLS &&
          eb_cells_out[1] == 16'(r1_cells));
    repeat (2000) @(posedge clk);

    // ---- delivery ----
    check(r0_cells == NCELLS && r0_fail == 0 && r0_be == 0, "VC0 delivered intact and in order");
    check(r2_cells == NCELLS && r2_fail == 0 && r2_be == 0, "VC2 delivered intact and in order");
    check(r1_fail == 0, "VC1 cells in order, only single-bit word errors");
    check(r1_cells + int'(eb_cells_rejected[1]) == NCELLS, "VC1 received + rejected = sent");
    check(r1_be == int'(eb_bit_errors[1]), "VC1 bit errors seen = inserted by the EB");
    check(eb_cells_out[0] == 16'(NCELLS) && eb_cells_out[2] == 16'(NCELLS), "EBs passed every cell");
    check(delay_bad == 0 && d0_min == 200, $sformatf("constant delay of 200 cycles (bad %0d, min %0d)", delay_bad, d0_min));
    check(d1_min >= 200 && d1_max <= 400 && d1_max > d1_min, "jittered delay within 300 +/- 100");
    check(fifo_errs == 0, "no FIFO integrity errors");
    // statistics through the CPU ports
    cpu_read(0, 5'h11, rd); check(rd[15:0] == 16'(2*NCELLS), "node A sent 2N user cells");
    cpu_read(2, 5'h12, rd); check(rd[31:16] > 0, "emulator UNI 2 saw unassigned (unmatched) cells");
    cpu_read(3, 5'h11, rd); check(rd[31:16] > 0, "node B sent unassigned cells");
    cpu_read(3, 5'h12, rd); check(rd[15:0] == 16'(NCELLS + r1_cells), "node B accepted all delivered cells");

    // ---- mechanisms ----
    $display("arb_switch=%0d pauses=%0d idle_tx=%0d corr=%0d/%0d disc=%0d/%0d rej=%0d biterr=%0d jitter=[%0d,%0d]",
             arb_switch, pauses, tc_idle_tx[0], tc_rx_corrected[3], corr_inj, tc_rx_discarded[3], disc_inj,
             eb_cells_rejected[1], eb_bit_errors[1], d1_min, d1_max);
    check(arb_switch > 0, "mechanism: arbitration between two TAs");
    check(pauses > 0, "mechanism: framer pauses");
    check(tc_idle_tx[0] > 0 && tc_rx_idle[1] > 0, "mechanism: idle cells inserted and removed");
    check(corr_inj > 0 && int'(tc_rx_corrected[3]) == corr_inj, "mechanism: header single-bit correction");
    check(disc_inj > 0 && int'(tc_rx_discarded[3]) == disc_inj, "mechanism: multi-bit header discard");
    check(eb_cells_rejected[1] > 0, "mechanism: cell rejection");
    check(eb_bit_errors[1] > 0, "mechanism: payload bit errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
