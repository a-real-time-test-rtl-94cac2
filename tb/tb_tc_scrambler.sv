// tb_tc_scrambler: scrambler output against a bitwise reference; a
// descrambler started from a different state recovers the data after the
// first 43 bits; with both in step the round trip is exact.
module tb_tc_scrambler;
`include "tb_common.svh"
`include "tb_ref.svh"
  logic en = 0;
  logic [7:0] din = 0, sout, dout;
  tc_scrambler #(.DESCRAMBLE(0)) u_s (.clk, .rst_n, .en, .din, .dout(sout));
  tc_scrambler #(.DESCRAMBLE(1)) u_d (.clk, .rst_n(rst_n), .en(en), .din(sout), .dout(dout));
  ref_scr rs;
  int nen = 0;
  initial begin
    rs = new();
    repeat (2) @(posedge clk);
    rst_n = 1;
    // the descrambler's history is garbage for the first bytes; make it so
    u_d.hist_q = 43'h5A5A5A5A5A5;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      din = (i % 100 < 30) ? 8'h6A : 8'($urandom);
      #1;
      if (en) begin
        check(sout == rs.step(din, 0), "scrambler output");
        nen++;
        if (nen > 6) check(dout == din, "descrambler recovers data");
      end
    end
    finish_tb();
  end
endmodule
