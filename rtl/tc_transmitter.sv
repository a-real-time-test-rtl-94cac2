// tc_transmitter: Transmission Convergence sublayer transmitter ("Tx PHYS").
//
// Produces the 53-byte cell stream for the STM-1 frame controller, one byte
// for every clock in which the framer takes one (txf_en). The framer may
// pause the stream at any byte while it inserts frame overhead; the cell in
// progress simply resumes. At the first byte of each cell the Tx controller
// looks at c_rdy from the ATM layer:
//   * c_rdy high: a user cell. Bytes 0-3 are header bytes pulled from the ATM
//     layer with head_en (byte on data_in[7:0]); byte 4 is the HEC from the
//     CRC generator; bytes 5-52 are the payload, pulled as 16-bit words with
//     info_en (high byte sent first, the word is taken with its low byte).
//   * c_rdy low: the idle cell generator supplies header 00 00 00 01, its HEC
//     and 48 bytes of 0x6A (cell rate decoupling).
// All payload bytes, idle cells' included, go through the x^43+1 scrambler;
// header and HEC bytes do not. txf_data is combinational from the state and
// data_in; txf_sop marks byte 0 of a cell.
// The structure (input MUX, CRC generator/header buffer, scrambler, idle cell
// generator, cell multiplexer, Tx controller) is the document's; the pull
// interface and the idle cell contents (ITU-T I.432) are this design's.
module tc_transmitter
  import atm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // towards the STM-1 frame controller
  input  logic        txf_en,
  output logic [7:0]  txf_data,
  output logic        txf_sop,
  // from the ATM layer
  input  logic        c_rdy,
  output logic        head_en,
  output logic        info_en,
  input  logic [15:0] data_in,
  // statistics
  output logic [15:0] user_cells,
  output logic [15:0] idle_cells
);
  logic [5:0]  bi_q;          // byte index in the cell, 0..52
  logic        user_q, user;
  logic        in_hdr, in_payload, odd;
  logic [7:0]  hdr_byte, raw_payload, scr_out, hec;

  always_comb begin
    user        = (bi_q == 6'd0) ? c_rdy : user_q;
    in_hdr      = (bi_q < 6'd4);
    in_payload  = (bi_q >= 6'd5);
    odd         = !bi_q[0];                 // payload byte index bi_q-5 is odd
    // input MUX (user data) or idle cell generator
    hdr_byte    = user ? data_in[7:0] : IDLE_HDR[8*(3-int'(bi_q[1:0])) +: 8];
    raw_payload = !user ? IDLE_PAYLOAD : (odd ? data_in[7:0] : data_in[15:8]);
    head_en     = txf_en && user && in_hdr;
    info_en     = txf_en && user && in_payload && odd;
    // cell multiplexer
    if (in_hdr)             txf_data = hdr_byte;
    else if (bi_q == 6'd4)  txf_data = hec;
    else                    txf_data = scr_out;
    txf_sop     = (bi_q == 6'd0);
  end

  tc_crc_gen u_crc (
    .clk, .rst_n, .en(txf_en && in_hdr), .first(bi_q == 6'd0), .din(hdr_byte),
    .hec);

  tc_scrambler #(.DESCRAMBLE(1'b0)) u_scr (
    .clk, .rst_n, .en(txf_en && in_payload), .din(raw_payload), .dout(scr_out));

  // Tx controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bi_q       <= '0;
      user_q     <= 1'b0;
      user_cells <= '0;
      idle_cells <= '0;
    end else if (txf_en) begin
      bi_q <= (bi_q == 6'(CELL_BYTES-1)) ? 6'd0 : bi_q + 6'd1;
      if (bi_q == 6'd0) begin
        user_q <= c_rdy;
        if (c_rdy) user_cells <= user_cells + 16'd1;
        else       idle_cells <= idle_cells + 16'd1;
      end
    end
  end
endmodule
