// tb_atm_arbiter: random request patterns; each time the offered TA is
// taken, checks it is the first requester after the previously served
// position (round robin), that an offer always exists when someone requests,
// and that the offer is withdrawn for one clock after a take.
module tb_atm_arbiter;
`include "tb_common.svh"
  logic [7:0] avail = 0;
  logic take = 0, next_valid;
  logic [2:0] next_ta;
  int last = 7, served [8];
  atm_arbiter #(.N(8)) dut (.*);
  function automatic int expect_rr(logic [7:0] a, int l);
    for (int k = 1; k <= 8; k++) if (a[(l + k) % 8]) return (l + k) % 8;
    return -1;
  endfunction
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      take = 0;
      // avail is held for a clock so the registered offer reflects it
      if (i % 2 == 0) avail = (i % 200 < 100) ? 8'($urandom) : 8'hFF;
      else begin
        int e;
        e = expect_rr(avail, last);
        if (e < 0) check(!next_valid, "no offer without requests");
        else begin
          check(next_valid && int'(next_ta) == e, "round robin offer");
          take = 1; last = e; served[e]++;
        end
      end
      @(posedge clk); #1;
      if (take) check(!next_valid, "offer withdrawn after take");
    end
    for (int k = 0; k < 8; k++) check(served[k] > 50, "every position served");
    finish_tb();
  end
endmodule
