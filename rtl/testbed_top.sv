// testbed_top: the basic test-bed configuration - two nodes and a network
// emulator between them.
//
//   node A UNI  <-line->  emulator UNI 1  ==EBs==  emulator UNI 2  <-line->  node B UNI
//
// Each node is a UNI board whose eight terminal adapter (TA) positions are
// brought out (the TAs themselves are user equipment). The network emulator
// is two UNI boards with emulator boards (EBs) between their internal buses:
// for each of N_VC emulated virtual channels per direction, one EB takes the
// channel's cells from UNI 1's RxBus and hands them, delayed and corrupted
// as programmed, to UNI 2's TxBus, and another EB does the same from UNI 2
// to UNI 1. EB k of a direction occupies bus position k on both UNIs; the
// other positions of the emulator UNIs are unused. The two directions are
// independent, as in the document.
//
// UNI index used in the array ports: 0 = node A, 1 = emulator UNI facing
// node A, 2 = emulator UNI facing node B, 3 = node B. The STM-1 frame
// controllers, PMD cards and lines are outside: every UNI's transmit and
// receive byte streams are ports (line_*), so the surrounding environment
// connects UNI 0 with UNI 1 and UNI 2 with UNI 3 and decides when frame
// overhead pauses the stream. The local CPUs' register ports (cpu_*) and the
// EBs' CPU-set delay and error parameters (eb_cfg) are ports as well.
// eb_cfg index: k = A->B channel k, N_VC + k = B->A channel k.
module testbed_top
  import atm_pkg::*;
#(
  parameter int N_VC       = 2,
  parameter int FIFO_DEPTH = 256
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // node A internal bus
  input  logic [N_TA-1:0]       a_ta_avail,
  output logic [N_TA-1:0]       a_txb_en,
  output logic                  a_txb_clk,
  input  logic [15:0]           a_txb_data,
  output logic [N_TA-1:0]       a_rxb_en,
  output logic                  a_rxb_clk,
  output logic [15:0]           a_rxb_data,
  // node B internal bus
  input  logic [N_TA-1:0]       b_ta_avail,
  output logic [N_TA-1:0]       b_txb_en,
  output logic                  b_txb_clk,
  input  logic [15:0]           b_txb_data,
  output logic [N_TA-1:0]       b_rxb_en,
  output logic                  b_rxb_clk,
  output logic [15:0]           b_rxb_data,
  // STM-1 frame controller side of the four UNIs
  input  logic [3:0]            line_txf_en,
  output logic [3:0][7:0]       line_txf_data,
  output logic [3:0]            line_txf_sop,
  input  logic [3:0]            line_rxf_en,
  input  logic [3:0][7:0]       line_rxf_data,
  // local CPUs of the four UNIs
  input  logic [3:0]            cpu_we,
  input  logic [3:0][4:0]       cpu_addr,
  input  logic [3:0][31:0]      cpu_wdata,
  output logic [3:0][31:0]      cpu_rdata,
  // emulator board settings and statistics
  input  emu_cfg_t [2*N_VC-1:0] eb_cfg,
  output logic [2*N_VC-1:0][15:0] eb_cells_out,
  output logic [2*N_VC-1:0][15:0] eb_cells_rejected,
  output logic [2*N_VC-1:0][15:0] eb_bit_errors,
  // UNI status
  output logic [3:0]            in_sync,
  output logic [3:0]            fifo_err,
  output logic [3:0][15:0]      tc_idle_tx,
  output logic [3:0][15:0]      tc_rx_ok,
  output logic [3:0][15:0]      tc_rx_corrected,
  output logic [3:0][15:0]      tc_rx_discarded,
  output logic [3:0][15:0]      tc_rx_idle
);
  // internal buses of the two emulator UNIs (index 0: UNI 1, 1: UNI 2)
  logic [1:0][N_TA-1:0] e_ta_avail, e_txb_en, e_rxb_en;
  logic [1:0]           e_txb_clk, e_rxb_clk;
  logic [1:0][15:0]     e_txb_data, e_rxb_data;

  // per UNI bus signals, nodes at 0 and 3
  logic [3:0][N_TA-1:0] ta_avail, txb_en, rxb_en;
  logic [3:0]           txb_clk, rxb_clk;
  logic [3:0][15:0]     txb_data, rxb_data;

  always_comb begin
    ta_avail[0] = a_ta_avail;   txb_data[0] = a_txb_data;
    ta_avail[3] = b_ta_avail;   txb_data[3] = b_txb_data;
    ta_avail[1] = e_ta_avail[0]; txb_data[1] = e_txb_data[0];
    ta_avail[2] = e_ta_avail[1]; txb_data[2] = e_txb_data[1];
    a_txb_en = txb_en[0]; a_txb_clk = txb_clk[0];
    a_rxb_en = rxb_en[0]; a_rxb_clk = rxb_clk[0]; a_rxb_data = rxb_data[0];
    b_txb_en = txb_en[3]; b_txb_clk = txb_clk[3];
    b_rxb_en = rxb_en[3]; b_rxb_clk = rxb_clk[3]; b_rxb_data = rxb_data[3];
    for (int u = 0; u < 2; u++) begin
      e_txb_en[u]   = txb_en[u+1];
      e_txb_clk[u]  = txb_clk[u+1];
      e_rxb_en[u]   = rxb_en[u+1];
      e_rxb_clk[u]  = rxb_clk[u+1];
      e_rxb_data[u] = rxb_data[u+1];
    end
  end

  for (genvar u = 0; u < 4; u++) begin : g_uni
    uni_board #(.N(N_TA), .FIFO_DEPTH(FIFO_DEPTH)) u_uni (
      .clk, .rst_n,
      .ta_avail(ta_avail[u]), .txb_en(txb_en[u]), .txb_clk(txb_clk[u]), .txb_data(txb_data[u]),
      .rxb_en(rxb_en[u]), .rxb_clk(rxb_clk[u]), .rxb_data(rxb_data[u]),
      .txf_en(line_txf_en[u]), .txf_data(line_txf_data[u]), .txf_sop(line_txf_sop[u]),
      .rxf_en(line_rxf_en[u]), .rxf_data(line_rxf_data[u]),
      .cpu_we(cpu_we[u]), .cpu_addr(cpu_addr[u]), .cpu_wdata(cpu_wdata[u]), .cpu_rdata(cpu_rdata[u]),
      .in_sync(in_sync[u]), .fifo_err(fifo_err[u]), .tc_idle_tx(tc_idle_tx[u]),
      .tc_rx_ok(tc_rx_ok[u]), .tc_rx_corrected(tc_rx_corrected[u]),
      .tc_rx_discarded(tc_rx_discarded[u]), .tc_rx_idle(tc_rx_idle[u]));
  end

  // emulator boards: direction d = 0 (UNI 1 -> UNI 2) or 1 (UNI 2 -> UNI 1)
  logic [2*N_VC-1:0]       eb_avail;
  logic [2*N_VC-1:0][15:0] eb_tx_data;

  for (genvar d = 0; d < 2; d++) begin : g_dir
    for (genvar k = 0; k < N_VC; k++) begin : g_eb
      localparam int E = d * N_VC + k;
      logic [15:0] dropped, cells_in;
      logic [31:0] last_delay;
      emu_board #(.FIFO_DEPTH(FIFO_DEPTH)) u_eb (
        .clk, .rst_n, .cfg(eb_cfg[E]),
        .rx_en(e_rxb_en[d][k]), .rx_clk(e_rxb_clk[d]), .rx_data(e_rxb_data[d]),
        .tx_avail(eb_avail[E]), .tx_en(e_txb_en[1-d][k]), .tx_clk(e_txb_clk[1-d]),
        .tx_data(eb_tx_data[E]),
        .cells_in, .cells_out(eb_cells_out[E]), .cells_dropped(dropped),
        .cells_rejected(eb_cells_rejected[E]), .bit_errors(eb_bit_errors[E]), .last_delay);
    end
  end

  // TxBus of each emulator UNI: the selected EB drives the data lines
  always_comb begin
    for (int u = 0; u < 2; u++) begin
      e_ta_avail[u] = '0;
      e_txb_data[u] = '0;
      for (int k = 0; k < N_VC; k++) begin
        // UNI 1 transmits what the B->A boards (direction 1) send, UNI 2 the A->B ones
        e_ta_avail[u][k] = eb_avail[(1-u) * N_VC + k];
        if (e_txb_en[u][k]) e_txb_data[u] = eb_tx_data[(1-u) * N_VC + k];
      end
    end
  end
endmodule
