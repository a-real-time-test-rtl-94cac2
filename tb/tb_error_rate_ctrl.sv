// tb_error_rate_ctrl: draws many cells and words and checks the observed
// rejection and word error rates against the programmed probabilities
// (binomial 5-sigma bounds), that each error mask has exactly one bit set,
// that every bit position is hit, and that zero probabilities give none.
module tb_error_rate_ctrl;
`include "tb_common.svh"
  logic [31:0] word_err_p = 0, cell_rej_p = 0;
  logic cell_start = 0, reject, word_en = 0;
  logic [15:0] mask, bit_errors, cells_rejected;
  error_rate_ctrl dut (.*);
  int rej = 0, werr = 0, pos_hit [16];
  task automatic run(int ncells);
    for (int c = 0; c < ncells; c++) begin
      @(negedge clk); cell_start = 1; word_en = 0; #1; if (reject) rej++;
      for (int w = 0; w < 24; w++) begin
        @(negedge clk); cell_start = 0; word_en = 1; #1;
        if (mask != 0) begin
          werr++;
          check($countones(mask) == 1, "one bit per error");
          for (int b = 0; b < 16; b++) if (mask[b]) pos_hit[b]++;
        end
      end
    end
    @(negedge clk); cell_start = 0; word_en = 0;
  endtask
  function automatic bit in_bounds(int k, int n, real p);
    real m, s;
    m = n * p; s = $sqrt(n * p * (1.0 - p));
    return (k >= m - 5.0 * s - 1) && (k <= m + 5.0 * s + 1);
  endfunction
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(200);
    check(rej == 0 && werr == 0, "zero probabilities");
    cell_rej_p = 32'h3333_3333;   // 0.2
    word_err_p = 32'h0A3D_70A4;   // 0.04
    run(2000);
    check(in_bounds(rej, 2000, 0.2), "cell rejection rate");
    check(in_bounds(werr, 48000, 0.04), "word error rate");
    for (int b = 0; b < 16; b++) check(pos_hit[b] > 0, "every bit position hit");
    check(int'(cells_rejected) == rej && int'(bit_errors) == werr, "counters");
    finish_tb();
  end
endmodule
