// tb_tc_single_err: for every single-bit error in a random header + HEC the
// syndrome must give exactly that position; a zero syndrome means no error;
// double errors must be flagged multi (never miscorrected to a single).
module tb_tc_single_err;
`include "tb_common.svh"
`include "tb_ref.svh"
  logic [7:0] syn;
  logic no_err, single, multi;
  logic [2:0] err_byte, err_bit;
  logic [39:0] err_mask;
  tc_single_err dut (.*);
  function automatic logic [7:0] ref_syn(logic [39:0] cw);
    return ref_hec(cw[39:8]) ^ cw[7:0];
  endfunction
  initial begin
    for (int t = 0; t < 20; t++) begin
      logic [31:0] h; logic [39:0] cw;
      h = $urandom; cw = {h, ref_hec(h)};
      syn = ref_syn(cw); #1;
      check(no_err && !single && !multi && err_mask == 0, "no error");
      for (int i = 0; i < 40; i++) begin
        syn = ref_syn(cw ^ (40'd1 << i)); #1;
        check(single && !multi && err_mask == (40'd1 << i), "single error located");
        check(err_byte == 3'(4 - i / 8) && err_bit == 3'(i % 8), "byte and bit number");
      end
      for (int k = 0; k < 40; k++) begin
        int i, j;
        i = $urandom % 40; j = (i + 1 + $urandom % 39) % 40;
        syn = ref_syn(cw ^ (40'd1 << i) ^ (40'd1 << j)); #1;
        check(multi && !single, "double error flagged");
      end
    end
    finish_tb();
  end
endmodule
