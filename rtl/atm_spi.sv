// atm_spi: the local CPU's register port into the ATM controller ("SPI" in
// the document, which names it but gives no details).
//
// A simple synchronous register port: one write per clock with a strobe, and
// a combinational read. Write map (32-bit data):
//   0x00-0x07  PSM block k: the four header bytes of TA k (MSB = first byte)
//   0x08-0x0F  CAM entry k: bit 24 = valid, bits 23:0 = VPI/VCI of TA k
//   0x10       control: bit 0 = send unassigned cells when no user cell waits
// Read map: 0x10 control, 0x11 {unassigned, user} cells sent,
//   0x12 {unmatched, accepted} cells received, 0x13 overflow drops,
//   0x14 {Rx, Tx} FIFO error counts, 0x15 last received header.
module atm_spi #(
  parameter int N = 8,
  localparam int IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cpu_we,
  input  logic [4:0]    cpu_addr,
  input  logic [31:0]   cpu_wdata,
  output logic [31:0]   cpu_rdata,
  // PSM and CAM write ports
  output logic          psm_wr,
  output logic [IW-1:0] psm_blk,
  output logic [31:0]   psm_hdr,
  output logic          cam_wr,
  output logic [IW-1:0] cam_idx,
  output logic          cam_valid,
  output logic [23:0]   cam_key,
  output logic          unassigned_en,
  // status
  input  logic [15:0]   user_cells,
  input  logic [15:0]   unassigned_cells,
  input  logic [15:0]   rx_accepted,
  input  logic [15:0]   rx_unmatched,
  input  logic [15:0]   rx_overflow,
  input  logic [15:0]   tx_fifo_errs,
  input  logic [15:0]   rx_fifo_errs,
  input  logic [31:0]   last_header
);
  always_comb begin
    psm_wr    = cpu_we && (cpu_addr[4:3] == 2'b00);
    psm_blk   = IW'(cpu_addr[2:0]);
    psm_hdr   = cpu_wdata;
    cam_wr    = cpu_we && (cpu_addr[4:3] == 2'b01);
    cam_idx   = IW'(cpu_addr[2:0]);
    cam_valid = cpu_wdata[24];
    cam_key   = cpu_wdata[23:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              unassigned_en <= 1'b0;
    else if (cpu_we && cpu_addr == 5'h10)    unassigned_en <= cpu_wdata[0];
  end

  always_comb begin
    unique case (cpu_addr)
      5'h10:   cpu_rdata = {31'd0, unassigned_en};
      5'h11:   cpu_rdata = {unassigned_cells, user_cells};
      5'h12:   cpu_rdata = {rx_unmatched, rx_accepted};
      5'h13:   cpu_rdata = {16'd0, rx_overflow};
      5'h14:   cpu_rdata = {rx_fifo_errs, tx_fifo_errs};
      5'h15:   cpu_rdata = last_header;
      default: cpu_rdata = 32'd0;
    endcase
  end
endmodule
