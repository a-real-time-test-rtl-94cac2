// tb_tc_transmitter: an ATM layer model offers cells at random times; the
// framer takes bytes with random pauses. The output stream is parsed with
// the reference HEC and descrambler. Checks: 53-byte cells starting at
// txf_sop; correct HEC on every cell; user cells carry the offered header and
// payload in order; idle cells (00000001, payload 0x6A) fill the gaps; the
// ATM layer is asked for exactly 4 header bytes and 24 payload words per
// user cell.
module tb_tc_transmitter;
  import atm_pkg::*;
`include "tb_common.svh"
`include "tb_ref.svh"
  logic txf_en = 0, txf_sop, c_rdy, head_en, info_en;
  logic [7:0] txf_data;
  logic [15:0] data_in, user_cells, idle_cells;
  tc_transmitter dut (.*);

  // ATM layer model: queue of cell numbers; header byte / payload word pointers
  int ready_cells = 0, hb = 0, pw = 0, served = 0, heads = 0, infos = 0;
  function automatic logic [31:0] hdr_of(int n); return {4'h0, 8'(n), 16'(n * 3 + 5), 4'h2}; endfunction
  assign c_rdy = ready_cells > 0;
  always_comb data_in = (hb < 4) ? {8'hEE, hdr_of(served)[8*(3-hb) +: 8]} : tb_pkg::tb_payload(9, served, pw);
  always @(posedge clk) if (rst_n) begin
    if (head_en) begin hb <= hb + 1; heads++; end
    if (info_en) begin
      infos++;
      if (pw == 23) begin pw <= 0; hb <= 0; served <= served + 1; ready_cells <= ready_cells - 1; end
      else pw <= pw + 1;
    end
  end

  ref_scr rd;
  logic [7:0] cb [53];
  int bi = 0, ncells = 0, nuser = 0, nidle = 0, started = 0;
  initial begin
    rd = new();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40000; i++) begin
      @(negedge clk);
      txf_en = ($urandom % 8) != 0;
      if (($urandom % 150) == 0 && ready_cells < 3) ready_cells++;
      #1;
      if (txf_en) begin
        check(txf_sop == (bi == 0), "start of cell every 53 bytes");
        cb[bi] = txf_data;
        if (bi == 52) begin
          logic [31:0] h; logic [7:0] p [48];
          bi = 0;
          h = {cb[0], cb[1], cb[2], cb[3]};
          check(cb[4] == ref_hec(h), "HEC");
          for (int k = 0; k < 48; k++) p[k] = rd.step(cb[5 + k], 1);
          if (h == IDLE_HDR) begin
            bit ok = 1;
            for (int k = 0; k < 48; k++) if (p[k] != IDLE_PAYLOAD) ok = 0;
            check(ok, "idle cell payload");
            nidle++;
          end else begin
            bit ok = 1;
            check(h == hdr_of(nuser), "user header in order");
            for (int k = 0; k < 48; k++)
              if (p[k] != tb_pkg::tb_payload(9, nuser, k / 2)[(k % 2) ? 7 : 15 -: 8]) ok = 0;
            check(ok, "user payload (descrambled)");
            nuser++;
          end
          ncells++;
        end else bi++;
      end
    end
    check(nuser > 100 && nidle > 100, "both user and idle cells");
    check(heads == 4 * served + hb && infos == 24 * served + pw, "4 header bytes and 24 words per user cell");
    check(int'(user_cells) == nuser + (bi > 0 && dut.user_q ? 1 : 0) &&
          int'(idle_cells) == nidle + (bi > 0 && !dut.user_q ? 1 : 0), "statistics");
    finish_tb();
  end
endmodule
