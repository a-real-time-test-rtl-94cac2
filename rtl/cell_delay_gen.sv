// cell_delay_gen: Cell Delay Generator of the emulator board.
//
// For each cell it takes the arrival time stamp (from the Rx timing FIFO
// filled by the AAL-ATM interface controller), adds a locally generated
// delay and queues the resulting departure time in its own FIFO. The delay
// is the programmed mean, plus, when jitter is enabled, a pseudo-random
// offset uniform in [-jitter, +jitter] (xorshift generator; a negative total
// is clamped to zero). Cells of a virtual channel keep their order: a
// departure time is never earlier than the one before it. `go` is high while
// the oldest queued departure time has been reached by the free-running
// timer; `go_ack` removes it when the cell is sent on. Times are in clock
// cycles, compared modulo 2^32. The document gives the inputs (arrival
// times, programmed mean delay and jitter bound) and the output timing; the
// generator and the ordering rule are this design's choice.
module cell_delay_gen #(
  parameter int Q_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] timer,
  input  logic [15:0] mean_delay,
  input  logic [15:0] jitter,
  input  logic        jitter_en,
  // arrival time stamps
  input  logic        arr_valid,
  input  logic [31:0] arr_time,
  output logic        arr_pop,
  // departure
  output logic        go,
  input  logic        go_ack,
  output logic [31:0] last_delay
);
  logic [31:0] rnd_q, rnd_n, dep_last_q, dep, dq_head;
  logic signed [33:0] d;
  logic [31:0] span, off;
  logic dq_empty, dq_full, dep_valid_q;
  logic [$clog2(Q_DEPTH):0] dq_count;

  always_comb begin
    rnd_n = rnd_q ^ (rnd_q << 13);
    rnd_n = rnd_n ^ (rnd_n >> 17);
    rnd_n = rnd_n ^ (rnd_n << 5);
    span  = {15'd0, jitter, 1'b0} + 32'd1;              // 2*jitter + 1 values
    off   = rnd_q % span;
    d     = 34'(mean_delay);
    if (jitter_en) d = d + 34'(off) - 34'(jitter);
    if (d < 0) d = '0;
    dep   = arr_time + 32'(d);
    if (dep_valid_q && $signed(dep - dep_last_q) < 0) dep = dep_last_q;
    arr_pop = arr_valid && !dq_full;
    go      = !dq_empty && $signed(timer - dq_head) >= 0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rnd_q       <= 32'h2545_F491;
      dep_last_q  <= '0;
      dep_valid_q <= 1'b0;
      last_delay  <= '0;
    end else if (arr_pop) begin
      rnd_q       <= rnd_n;
      dep_last_q  <= dep;
      dep_valid_q <= 1'b1;
      last_delay  <= dep - arr_time;
    end
  end

  sync_fifo #(.WIDTH(32), .DEPTH(Q_DEPTH)) u_depq (
    .clk, .rst_n, .wr(arr_pop), .wdata(dep), .rd(go_ack && go),
    .rdata(dq_head), .empty(dq_empty), .full(dq_full), .count(dq_count));
endmodule
