// fifo_err_detector: Error Detector Unit guarding one external cell FIFO.
//
// The ATM controller writes and reads whole cell payloads (24 words). This
// unit folds every written word into a position-dependent checksum
// (c = rotl(c,1) ^ word), queues the checksum of each complete payload, and
// computes the same checksum over the words read back. When the last word of
// a payload is read, the two are compared; a difference raises `err` for one
// clock and increments `err_count`. The document says these units validate
// the payload integrity across the FIFO's write and read cycles; the
// checksum is this design's choice, and it detects but cannot correct an
// error because the 16-bit FIFO holds no redundancy.
module fifo_err_detector #(
  parameter int WORDS = 24,
  parameter int Q_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,
  input  logic [15:0] wdata,
  input  logic        rd,
  input  logic [15:0] rdata,
  output logic        err,
  output logic [15:0] err_count
);
  logic [15:0] wsum_q, rsum_q, wsum_n, rsum_n, q_head;
  logic [$clog2(WORDS)-1:0] wcnt_q, rcnt_q;
  logic        w_last, r_last, q_empty, q_full;
  logic [$clog2(Q_DEPTH):0] q_count;

  always_comb begin
    wsum_n = {wsum_q[14:0], wsum_q[15]} ^ wdata;
    rsum_n = {rsum_q[14:0], rsum_q[15]} ^ rdata;
    w_last = wr && (wcnt_q == ($clog2(WORDS))'(WORDS-1));
    r_last = rd && (rcnt_q == ($clog2(WORDS))'(WORDS-1));
    err    = r_last && !q_empty && (rsum_n != q_head);
  end

  sync_fifo #(.WIDTH(16), .DEPTH(Q_DEPTH)) u_q (
    .clk, .rst_n, .wr(w_last), .wdata(wsum_n), .rd(r_last && !q_empty),
    .rdata(q_head), .empty(q_empty), .full(q_full), .count(q_count));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wsum_q <= '0; rsum_q <= '0; wcnt_q <= '0; rcnt_q <= '0; err_count <= '0;
    end else begin
      if (wr) begin
        wsum_q <= w_last ? '0 : wsum_n;
        wcnt_q <= w_last ? '0 : wcnt_q + 1'b1;
      end
      if (rd) begin
        rsum_q <= r_last ? '0 : rsum_n;
        rcnt_q <= r_last ? '0 : rcnt_q + 1'b1;
      end
      if (err) err_count <= err_count + 1'b1;
    end
  end
endmodule
