// cam: Content Addressable Memory of the ATM controller's receive side.
//
// Entry k holds the VPI/VCI of the connection served by the TA in bus
// position k, plus a valid bit; the local CPU writes entries through the SPI
// port when connections are set up. A lookup compares the VPI/VCI field of a
// received header with all entries at once and returns, in the same clock,
// whether one matched and which position it was (lowest index wins if two
// entries hold the same value). Matching on VPI and VCI together (24 bits,
// GFC, PT and CLP ignored) is this design's choice.
module cam #(
  parameter int N = 8,
  localparam int IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr,
  input  logic [IW-1:0] wr_idx,
  input  logic          wr_valid,
  input  logic [23:0]   wr_key,
  input  logic [23:0]   key,
  output logic          hit,
  output logic [IW-1:0] hit_idx
);
  logic [23:0]  key_q [N];
  logic [N-1:0] valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int k = 0; k < N; k++) key_q[k] <= '0;
    end else if (wr) begin
      valid_q[wr_idx] <= wr_valid;
      key_q[wr_idx]   <= wr_key;
    end
  end

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int k = N-1; k >= 0; k--) begin
      if (valid_q[k] && key_q[k] == key) begin
        hit     = 1'b1;
        hit_idx = IW'(k);
      end
    end
  end
endmodule
