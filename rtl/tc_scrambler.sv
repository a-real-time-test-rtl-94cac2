// tc_scrambler: self-synchronising cell payload scrambler (DESCRAMBLE = 0)
// or descrambler (DESCRAMBLE = 1), polynomial x^43 + 1.
//
// Processes one byte per enabled clock, MSB first. Each output bit is the
// input bit XOR the line bit sent 43 bits earlier; the 43-bit history holds
// line-side (scrambled) bits in both directions, so the descrambler locks to
// the scrambler after 43 payload bits without any reset alignment. Only
// payload bytes are passed through it: header and HEC bytes neither enter
// the history nor change. The document names payload scrambling and
// descrambling without giving the polynomial; x^43+1 is the one ITU-T I.432
// specifies for SDH-based cell transfer.
module tc_scrambler #(
  parameter bit DESCRAMBLE = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [7:0] din,
  output logic [7:0] dout
);
  logic [42:0] hist_q, hist_n;

  always_comb begin
    hist_n = hist_q;
    for (int i = 7; i >= 0; i--) begin
      logic line_bit;
      dout[i]  = din[i] ^ hist_n[42];
      line_bit = DESCRAMBLE ? din[i] : dout[i];
      hist_n   = {hist_n[41:0], line_bit};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  hist_q <= '0;
    else if (en) hist_q <= hist_n;
  end
endmodule
