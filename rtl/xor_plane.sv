// xor_plane: a plane of XOR gates that flips the data bits selected by a mask.
//
// The document uses such a plane twice: on the emulator board, to insert bit
// errors into cell payloads as they move from the Rx FIFO to the Tx FIFO, and
// in the TC receiver, to correct a single-bit header error at the position
// computed from the HEC syndrome. Purely combinational.
module xor_plane #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] din,
  input  logic [WIDTH-1:0] mask,
  output logic [WIDTH-1:0] dout
);
  always_comb dout = din ^ mask;
endmodule
