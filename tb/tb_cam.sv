// tb_cam: loads eight VPI/VCI entries, then looks up every entry, random
// misses, an invalidated entry and a rewritten entry.
module tb_cam;
`include "tb_common.svh"
  logic wr = 0, wr_valid = 0, hit;
  logic [2:0] wr_idx = 0, hit_idx;
  logic [23:0] wr_key = 0, key = 0, keys [8];
  cam #(.N(8)) dut (.*);
  task automatic put(int k, bit v, logic [23:0] kv);
    @(negedge clk); wr = 1; wr_idx = 3'(k); wr_valid = v; wr_key = kv;
    @(negedge clk); wr = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); key = 24'h000000; #1;
    check(!hit, "empty CAM does not match");
    for (int k = 0; k < 8; k++) begin keys[k] = {8'(k + 1), 16'($urandom)}; put(k, 1, keys[k]); end
    for (int k = 0; k < 8; k++) begin
      key = keys[k]; #1;
      check(hit && hit_idx == 3'(k), "lookup of each entry");
    end
    for (int i = 0; i < 200; i++) begin
      key = {8'hF0 | 8'(i % 16), 16'($urandom)}; #1;
      check(!hit, "miss");
    end
    put(3, 0, keys[3]);
    key = keys[3]; #1; check(!hit, "invalidated entry");
    put(5, 1, 24'hABCDEF);
    key = 24'hABCDEF; #1; check(hit && hit_idx == 3'd5, "rewritten entry");
    key = keys[5]; #1; check(!hit, "old key gone");
    finish_tb();
  end
endmodule
