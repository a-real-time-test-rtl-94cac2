// tb_workload_node: the two traffic cases the test-bed is sized for, run on
// one UNI board at its default parameters with its line looped back to its
// own receiver through an STM-1-like byte pacing.
//
// Line pacing: bytes arrive at 155.52 Mb/s (19.44 Mbyte/s against the
// 20 MHz clock, by a credit counter) and in every 270 byte slots the first
// 10 carry frame and path overhead, so txf_en is high for 260 of them. That
// leaves about 353 kcell/s for cells.
//
// Phase 1 (DISTIMA-style): one terminal sends a 10 Mb/s constant-bit-rate
// stream carried in AAL type 1 cells (47 useful bytes per cell), i.e. one
// cell every 752 clocks at 20 MHz.
// Phase 2 (fully loaded node): all eight terminals each send a 10 Mb/s
// virtual channel (48-byte payloads, one cell every 768 clocks each, about
// 208 kcell/s together).
// Terminal k sends with VPI k+1 / VCI 0x100+k; the CAM routes it to
// terminal 7-k. Checks: every cell arrives intact and in order, no cell is
// dropped for a full FIFO, each channel's measured cell period is within
// 2 % of the offered one, and idle cells fill the spare line capacity.
module tb_workload_node;
  import atm_pkg::*;
`include "tb_common.svh"
  localparam int NC1 = 20;             // cells in phase 1
  localparam int NC2 = 30;             // cells per terminal in phase 2
  localparam int P1  = 752;            // clocks per cell, 10 Mb/s AAL1
  localparam int P2  = 768;            // clocks per cell, 10 Mb/s of payload

  logic [7:0] ta_avail, txb_en, rxb_en, txf_data, rxf_data = 0;
  logic txb_clk, rxb_clk, txf_sop, in_sync, fifo_err, cpu_we = 0, txf_en = 0, rxf_en = 0;
  logic [15:0] txb_data, rxb_data, tc_idle_tx, tc_rx_ok, tc_rx_corrected, tc_rx_discarded, tc_rx_idle;
  logic [4:0] cpu_addr = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  uni_board dut (.*);

  // eight terminal adapters
  logic [7:0] en_tx = '0;
  int ncell [8], gap [8], sent [8];
  logic [15:0] d [8];
  int rc [8], rb [8], rf [8], rn [8];
  longint t_arr [8][64];               // arrival time of each cell, by index
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar k = 0; k < 8; k++) begin : g_ta
    ta_tx_model #(.STREAM(k)) u_tx (.clk, .rst_n, .enable(en_tx[k]), .n_cells(ncell[k]), .gap(gap[k]),
      .avail(ta_avail[k]), .sel(txb_en[k]), .bus_clk(txb_clk), .data(d[k]), .sent(sent[k]));
    ta_rx_model #(.STREAM(k)) u_rx (.clk, .rst_n, .sel(rxb_en[7-k]), .bus_clk(rxb_clk), .data(rxb_data),
      .cells(rc[k]), .bit_errors(rb[k]), .failures(rf[k]), .next_n(rn[k]));
    always @(posedge clk) if (rst_n && rc[k] > 0 && rc[k] <= 64 && t_arr[k][rc[k]-1] == 0)
      t_arr[k][rc[k]-1] = cyc;
  end
  always_comb begin
    txb_data = '0;
    for (int k = 0; k < 8; k++) txb_data |= d[k];
  end

  // STM-1-like pacing of the line, looped back
  int credit = 0, col = 0;
  logic [7:0] q [$];
  always @(negedge clk) begin
    txf_en = 0;
    if (rst_n) begin
      credit += 19440;
      if (credit >= 20000) begin
        credit -= 20000;
        txf_en = (col >= 10);
        col = (col == 269) ? 0 : col + 1;
      end
    end
    rxf_en = 0;
    if (q.size() > 0) begin rxf_en = 1; rxf_data = q[0]; end
  end
  always @(posedge clk) if (rst_n) begin
    if (txf_en) q.push_back(txf_data);
    if (rxf_en) void'(q.pop_front());
  end

  task automatic cpu_write(logic [4:0] a, logic [31:0] v);
    @(negedge clk); cpu_we = 1; cpu_addr = a; cpu_wdata = v;
    @(negedge clk); cpu_we = 0;
  endtask
  task automatic cpu_read(logic [4:0] a, output logic [31:0] v);
    @(negedge clk); cpu_addr = a; #1 v = cpu_rdata;
  endtask

  // mean cell period of terminal k over cells first..last
  function automatic bit period_ok(int k, int first, int last, int p);
    int n = last - first + 1;
    real per = real'(t_arr[k][last] - t_arr[k][first]) / real'(n - 1);
    $display("  terminal %0d: %0d cells, mean period %0.1f clocks (offered %0d)", k, n, per, p);
    return per <= 1.02 * p && per >= 0.98 * p;
  endfunction

  logic [31:0] v;
  int idle_before;
  initial begin
    for (int k = 0; k < 8; k++) begin
      ncell[k] = 0; gap[k] = 0;
      for (int i = 0; i < 64; i++) t_arr[k][i] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      cpu_write(5'(k), tb_pkg::tb_hdr(k + 1, 'h100 + k));
      cpu_write(5'(8 + 7 - k), tb_pkg::tb_cam(k + 1, 'h100 + k));
    end
    wait (in_sync);

    // phase 1: one 10 Mb/s AAL1 stream
    ncell[0] = NC1; gap[0] = P1 - 48; en_tx[0] = 1'b1;
    wait (rc[0] == NC1);
    repeat (2) @(posedge clk);
    check(rf[0] == 0, "phase 1: cells intact and in order");
    check(period_ok(0, 0, NC1 - 1, P1), "phase 1: cell period of the CBR stream kept");

    // phase 2: eight 10 Mb/s channels
    idle_before = int'(tc_idle_tx);
    for (int k = 0; k < 8; k++) begin
      ncell[k] = (k == 0 ? NC1 : 0) + NC2; gap[k] = P2 - 48;
      g_ta_stagger(k);
    end
    for (int k = 0; k < 8; k++) wait (rc[k] == (k == 0 ? NC1 : 0) + NC2);
    repeat (100) @(posedge clk);
    for (int k = 0; k < 8; k++) begin
      check(rf[k] == 0 && rb[k] == 0, $sformatf("phase 2: terminal %0d cells intact and in order", k));
      check(period_ok(k, k == 0 ? NC1 : 0, (k == 0 ? NC1 : 0) + NC2 - 1, P2), $sformatf("phase 2: terminal %0d keeps 10 Mb/s", k));
    end
    check(int'(tc_idle_tx) > idle_before, "phase 2: idle cells fill the spare line capacity");
    cpu_read(5'h13, v);
    check(v[15:0] == 0, "no cell dropped for a full Rx FIFO");
    cpu_read(5'h12, v);
    check(v[15:0] == 16'(NC1 + 8 * NC2) && v[31:16] == 0, "all cells matched and accepted");
    check(!fifo_err && tc_rx_discarded == 0, "no FIFO or header errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // start the terminals a few cells apart so the stream is not one burst
  task automatic g_ta_stagger(int k);
    repeat (97) @(posedge clk);
    en_tx[k] = 1'b1;
  endtask
endmodule
