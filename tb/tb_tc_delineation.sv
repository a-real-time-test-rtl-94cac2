// tb_tc_delineation: a stream of cells with correct HECs, entered at a
// random byte offset. Checks: HUNT until the first HEC, SYNC after DELTA
// further correct HECs, HEC positions every 53 bytes once in SYNC; ALPHA-1
// consecutive bad HECs keep SYNC, ALPHA of them return to HUNT (counted as a
// sync loss), after which the detector locks again.
module tb_tc_delineation;
`include "tb_common.svh"
`include "tb_ref.svh"
  localparam int ALPHA = 7, DELTA = 6;
  logic en = 0, at_hec, payload;
  logic [7:0] din = 0, syn;
  logic [1:0] state;
  logic [5:0] pos;
  logic [31:0] hdr;
  logic [15:0] sync_losses;
  tc_delineation #(.ALPHA(ALPHA), .DELTA(DELTA)) dut (.*);

  int cidx = 0, byte_i = 0;
  bit bad_hec [1000];
  bit is_hec;
  // one byte of the test stream; the payload avoids accidental HEC matches
  // by being constant 0x00 (a zero window after a header never has a zero
  // syndrome because the coset makes the HEC of zero 0x55)
  function automatic logic [7:0] stream_byte(int c, int b);
    logic [31:0] h;
    h = {4'h0, 8'(c), 16'(c * 7 + 1), 4'h0};
    if (b < 4) return h[8*(3-b) +: 8];
    if (b == 4) return ref_hec(h) ^ (bad_hec[c] ? 8'h01 : 8'h00);
    return 8'h00;
  endfunction

  int sync_cell = -1, hunt_cell = -1;
  initial begin
    for (int c = 0; c < 1000; c++) bad_hec[c] = 0;
    for (int c = 20; c < 20 + ALPHA - 1; c++) bad_hec[c] = 1;   // survives
    for (int c = 40; c < 40 + ALPHA; c++) bad_hec[c] = 1;       // loses sync
    repeat (2) @(posedge clk);
    rst_n = 1;
    byte_i = 17;   // enter mid-cidx
    while (cidx < 80) begin
      @(negedge clk);
      en = ($urandom % 5) != 0;
      din = stream_byte(cidx, byte_i);
      is_hec = (byte_i == 4);
      #1;
      if (en) begin
        if (state == 2'd2) begin
          check(at_hec == is_hec, "HEC position in SYNC");
          if (is_hec) check(pos == 6'd4, "position 4 at HEC");
        end
        if (cidx < 1) check(state == 2'd0, "HUNT before the first header");
        @(posedge clk); #1;
        if (state == 2'd2 && sync_cell < 0) sync_cell = cidx;
        if (cidx > 40 && state == 2'd0 && hunt_cell < 0) hunt_cell = cidx;
        if (byte_i == 52) begin byte_i = 0; cidx++; end else byte_i++;
      end
    end
    check(sync_cell == 1 + DELTA, "SYNC after DELTA more correct HECs");
    check(hunt_cell == 40 + ALPHA - 1, "HUNT after ALPHA bad HECs");
    check(sync_losses == 16'd1, "one sync loss");
    check(state == 2'd2, "locked again");
    finish_tb();
  end
endmodule
