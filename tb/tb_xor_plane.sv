// tb_xor_plane: random data and masks against a bitwise reference.
module tb_xor_plane;
`include "tb_common.svh"
  logic [15:0] din, mask, dout;
  xor_plane #(.WIDTH(16)) dut (.*);
  initial begin
    for (int i = 0; i < 500; i++) begin
      din = 16'($urandom); mask = (i % 2) ? 16'(1 << (i % 16)) : 16'($urandom);
      #1;
      for (int b = 0; b < 16; b++) check(dout[b] == (mask[b] ? !din[b] : din[b]), "bit");
    end
    finish_tb();
  end
endmodule
