// atm_arbiter: ATM Arbiter with the Decision Unit and Scanning Selector.
//
// Each terminal adapter (TA) drives one "cell available" line. Every clock
// the arbiter registers its decision for the next TA to serve:
// the first requesting position found when scanning upward from the one
// after the TA served last (round robin). The choice is held in a register,
// so it is already known when the DMA of the previous cell ends and the next
// DMA can start without a gap. `take` accepts the offered TA and makes it
// the new scan origin. Round robin scanning is this design's choice; the
// document only says the Scanning Selector picks the next TA using the
// arbiter's information.
module atm_arbiter #(
  parameter int N = 8,
  localparam int IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  avail,
  input  logic          take,
  output logic          next_valid,
  output logic [IW-1:0] next_ta
);
  logic [IW-1:0] last_q;
  logic          found;
  logic [IW-1:0] pick;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 1; k <= N; k++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(last_q) + k) % N);
      if (!found && avail[idx]) begin
        found = 1'b1;
        pick  = idx;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q     <= IW'(N-1);
      next_valid <= 1'b0;
      next_ta    <= '0;
    end else begin
      if (take) last_q <= next_ta;
      next_valid <= found && !take;
      next_ta    <= pick;
    end
  end
endmodule
