// tc_crc_gen: CRC Generator / Header Buffer of the TC transmitter.
//
// Takes the four header bytes of a cell one per clock (`en`, with `first`
// marking byte 0) and runs the CRC-8 with
// the 8-bit CCITT polynomial x^8+x^2+x+1 over them, MSB first. After the
// fourth byte, `hec` holds the header error control byte to send in the
// fifth position: the CRC remainder XOR 0x55 (the coset of ITU-T I.432,
// which the document cites for the TC functions).
module tc_crc_gen
  import atm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        first,
  input  logic [7:0]  din,
  output logic [7:0]  hec
);
  logic [7:0] crc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc_q <= '0;
    end else if (en) begin
      crc_q <= crc8_byte(first ? 8'h00 : crc_q, din);
    end
  end

  assign hec = crc_q ^ HEC_COSET;
endmodule
