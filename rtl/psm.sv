// psm: Position Selectable Memory of the ATM controller.
//
// 32 bytes organised as 8 blocks of 4 bytes; block k holds the first four
// header bytes of the cells of the terminal adapter in bus position k. The
// local CPU rewrites a whole block (through the SPI port) when a connection
// is set up. The read address is {block pointer, 2-bit counter}; the counter
// advances on every header byte taken by the physical layer (`adv`) and so
// returns to 0 after the fourth byte. The byte read is combinational.
// Organisation and addressing follow the document; writing a block as one
// 32-bit word (MSB = first header byte) is this design's choice.
module psm #(
  parameter int BLOCKS = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wr,
  input  logic [$clog2(BLOCKS)-1:0] wr_blk,
  input  logic [31:0]               wr_hdr,
  input  logic [$clog2(BLOCKS)-1:0] rd_blk,
  input  logic                      adv,
  output logic [7:0]                rd_byte,
  output logic [1:0]                byte_cnt,
  output logic                      last_byte
);
  logic [7:0] mem [BLOCKS*4];

  // 2-bit byte counter, advanced by the physical layer clock enable
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   byte_cnt <= 2'd0;
    else if (adv) byte_cnt <= byte_cnt + 2'd1;
  end

  always_ff @(posedge clk) begin
    if (wr) begin
      for (int b = 0; b < 4; b++)
        mem[{wr_blk, 2'(b)}] <= wr_hdr[8*(3-b) +: 8];
    end
  end

  assign rd_byte   = mem[{rd_blk, byte_cnt}];
  assign last_byte = (byte_cnt == 2'd3);
endmodule
