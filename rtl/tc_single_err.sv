// tc_single_err: Single Error Detection of the TC receiver.
//
// Maps the 8-bit HEC syndrome of a received header (4 header bytes + HEC)
// to the position of a single-bit error. The syndrome of each of the 40
// possible single-bit errors is computed at elaboration from the CRC; all 40
// are distinct and non-zero, so a match gives the byte number (0-4) and bit
// number (7 = MSB) of the error, and a 40-bit mask for the correcting XOR
// plane. A non-zero syndrome that matches no single-bit error means more than
// one error: the cell is to be discarded. Combinational.
module tc_single_err
  import atm_pkg::*;
(
  input  logic [7:0]  syn,
  output logic        no_err,
  output logic        single,
  output logic        multi,
  output logic [2:0]  err_byte,
  output logic [2:0]  err_bit,
  output logic [39:0] err_mask
);
  typedef logic [7:0] syn_tab_t [40];

  // TAB[i]: syndrome of an error in bit i of the 40-bit word (bit 39 = MSB of byte 0)
  function automatic syn_tab_t mk_tab();
    syn_tab_t t;
    for (int i = 0; i < 40; i++) begin
      logic [39:0] e;
      e    = 40'd1 << i;
      t[i] = crc8_hdr(e[39:8]) ^ e[7:0];
    end
    return t;
  endfunction
  localparam syn_tab_t TAB = mk_tab();

  always_comb begin
    no_err   = (syn == 8'h00);
    single   = 1'b0;
    err_mask = '0;
    err_byte = '0;
    err_bit  = '0;
    for (int i = 0; i < 40; i++) begin
      if (!no_err && syn == TAB[i]) begin
        single      = 1'b1;
        err_mask[i] = 1'b1;
        err_byte    = 3'(4 - i / 8);
        err_bit     = 3'(i % 8);
      end
    end
    multi = !no_err && !single;
  end
endmodule
