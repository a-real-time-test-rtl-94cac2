// tb_cell_delay_gen: arrival stamps are fed at random times. Checks: with
// jitter off every cell leaves exactly mean_delay after its arrival; with
// jitter on every delay lies in [mean - jitter, mean + jitter], the delays
// spread over the range, and departures never overtake each other.
module tb_cell_delay_gen;
`include "tb_common.svh"
  logic [31:0] timer = 0, arr_time = 0, last_delay;
  logic [15:0] mean_delay = 0, jitter = 0;
  logic jitter_en = 0, arr_valid = 0, arr_pop, go, go_ack = 0;
  cell_delay_gen #(.Q_DEPTH(16)) dut (.*);
  always @(posedge clk) timer <= rst_n ? timer + 1 : 0;

  int arr_q [$], outstanding = 0, mind = 1 << 30, maxd = 0, last_dep = 0;
  // departures: ack as soon as go
  always @(negedge clk) go_ack = go;
  always @(posedge clk) if (rst_n && go && go_ack) begin
    int a, d;
    a = arr_q.pop_front();
    d = int'(timer) - a;
    if (!jitter_en) check(d == int'(mean_delay), "constant delay");
    else begin
      check(int'(timer) >= last_dep, "order kept");
      if (d < mind) mind = d;
      if (d > maxd) maxd = d;
    end
    last_dep = int'(timer);
    outstanding--;
  end

  task automatic run(int n, int gapmax);
    for (int c = 0; c < n; c++) begin
      @(negedge clk);
      while (outstanding >= 12) @(negedge clk);
      arr_valid = 1; arr_time = timer; #1;
      while (!arr_pop) begin @(negedge clk); #1; end
      @(posedge clk);
      arr_q.push_back(int'(arr_time)); outstanding++;
      @(negedge clk); arr_valid = 0;
      repeat ($urandom % gapmax) @(negedge clk);
    end
    wait (outstanding == 0);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    mean_delay = 120; run(50, 80);
    check(last_delay == 32'd120, "last delay output");
    mean_delay = 300; jitter = 100; jitter_en = 1; run(300, 60);
    check(mind >= 200 && maxd <= 400, "jitter bounds");
    check(mind < 230 && maxd > 370, "jitter spread over the range");
    // jitter larger than the mean: delays clamp at zero
    mean_delay = 5; jitter = 20; mind = 1 << 30; maxd = 0; run(100, 40);
    check(mind >= 0 && maxd <= 25, "clamped jitter bounds");
    finish_tb();
  end
endmodule
