// error_rate_ctrl: Error Rate Control of the emulator board.
//
// Emulates the error behaviour of one virtual channel while its cells are
// copied from the Rx FIFO to the Tx FIFO. At the start of each cell
// (cell_start) it draws a 32-bit pseudo-random number and rejects the cell
// when the number is below cell_rej_p (probability * 2^32). For each payload
// word (word_en) it draws another number; below word_err_p it flips one bit
// of the word, at a pseudo-random position, through the XOR plane (mask).
// For the low bit error rates of interest the chance of a bit error in a
// 16-bit word is about 16 x BER, so the local CPU programs
// word_err_p = 16 x BER x 2^32 and the cell rejection probability it derives
// from the BER. The document says the unit uses the BER to set the cell
// rejection rate and the single bit error probability; the random
// generators (xorshift) and the one-error-per-word model are this design's.
module error_rate_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] word_err_p,
  input  logic [31:0] cell_rej_p,
  input  logic        cell_start,
  output logic        reject,
  input  logic        word_en,
  output logic [15:0] mask,
  output logic [15:0] bit_errors,
  output logic [15:0] cells_rejected
);
  logic [31:0] rc_q, rw_q;

  function automatic logic [31:0] xs32(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  always_comb begin
    reject = cell_start && (rc_q < cell_rej_p);
    mask   = '0;
    if (word_en && rw_q < word_err_p) mask[rw_q[3:0]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rc_q           <= 32'h1234_5678;
      rw_q           <= 32'h9E37_79B9;
      bit_errors     <= '0;
      cells_rejected <= '0;
    end else begin
      if (cell_start) rc_q <= xs32(rc_q);
      if (word_en)    rw_q <= xs32(rw_q);
      if (reject)     cells_rejected <= cells_rejected + 16'd1;
      if (mask != '0) bit_errors     <= bit_errors + 16'd1;
    end
  end
endmodule
