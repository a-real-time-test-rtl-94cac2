// atm_pkg: constants, types and helper functions shared by the UNI board and
// emulator board RTL.
//
// Cell format on the internal bus: a cell is 4 header bytes (GFC/VPI/VCI/PT/CLP,
// UNI format) plus 48 payload bytes carried as 24 words of 16 bits. The HEC
// byte exists only on the line side of the TC sublayer (53-byte cells).
// The HEC is the CRC-8 of the four header bytes with generator x^8+x^2+x+1
// (the "8-bit CCITT polynomial"), XORed with the coset 0x55 as in ITU-T I.432.
// Idle cells use header 00 00 00 01 and payload bytes 0x6A (I.432); the
// unassigned cell of the ATM layer uses an all-zero header.
package atm_pkg;

  localparam int N_TA          = 8;    // terminal adapter slots per node bus
  localparam int HDR_BYTES     = 4;    // header bytes without HEC
  localparam int PAYLOAD_BYTES = 48;
  localparam int PAYLOAD_WORDS = 24;   // 16-bit words per payload
  localparam int CELL_BYTES    = 53;   // line-side cell length

  localparam logic [7:0]  HEC_COSET      = 8'h55;
  localparam logic [31:0] IDLE_HDR       = 32'h0000_0001;
  localparam logic [7:0]  IDLE_PAYLOAD   = 8'h6A;
  localparam logic [31:0] UNASSIGNED_HDR = 32'h0000_0000;
  localparam logic [15:0] UNASSIGNED_PAYLOAD = 16'h6A6A;

  // UNI cell header (first four bytes, MSB first on the line)
  typedef struct packed {
    logic [3:0]  gfc;
    logic [7:0]  vpi;
    logic [15:0] vci;
    logic [2:0]  pt;
    logic        clp;
  } uni_hdr_t;

  // Local CPU register access (the controller's SPI port)
  typedef struct packed {
    logic        we;
    logic [4:0]  addr;
    logic [31:0] wdata;
  } cpu_wr_t;

  // Delay / error programming of one emulator board
  typedef struct packed {
    logic [15:0] mean_delay;   // clock cycles
    logic [15:0] jitter;       // +/- bound in clock cycles
    logic        jitter_en;    // 0: constant delay, 1: uniform jitter
    logic [31:0] word_err_p;   // P(bit error in a payload word) * 2^32
    logic [31:0] cell_rej_p;   // P(cell rejected) * 2^32
  } emu_cfg_t;

  // One step of the MSB-first CRC-8, polynomial x^8+x^2+x+1, over one byte
  function automatic logic [7:0] crc8_byte(input logic [7:0] crc, input logic [7:0] d);
    logic [7:0] c;
    c = crc;
    for (int i = 7; i >= 0; i--) begin
      if (c[7] ^ d[i]) c = {c[6:0], 1'b0} ^ 8'h07;
      else             c = {c[6:0], 1'b0};
    end
    return c;
  endfunction

  // CRC-8 of a 32-bit header (no coset)
  function automatic logic [7:0] crc8_hdr(input logic [31:0] h);
    logic [7:0] c;
    c = 8'h00;
    for (int b = 3; b >= 0; b--) c = crc8_byte(c, h[8*b +: 8]);
    return c;
  endfunction

  // HEC byte transmitted after the header
  function automatic logic [7:0] hec_of(input logic [31:0] h);
    return crc8_hdr(h) ^ HEC_COSET;
  endfunction

  // Syndrome of a received 40-bit header+HEC word; zero when error free
  function automatic logic [7:0] syndrome_of(input logic [39:0] cw);
    return crc8_hdr(cw[39:8]) ^ cw[7:0] ^ HEC_COSET;
  endfunction

endpackage
