// tc_delineation: HEC Byte Validation / Cell Boundaries Detector of the TC
// receiver.
//
// Keeps the last four received bytes and, with each new byte, checks in
// parallel whether the five bytes form a header with a correct HEC (the
// syndrome is zero). The delineation state machine follows ITU-T I.432,
// which the document cites: in HUNT every byte position is tried; a correct
// HEC moves to PRESYNC with the cell boundary fixed; DELTA further correct
// HECs, one per cell, confirm SYNC, while one wrong HEC in PRESYNC returns to
// HUNT; in SYNC, ALPHA consecutive wrong HECs return to HUNT. Byte alignment
// is given by the STM-1 framer, so the hunt goes byte by byte.
// Outputs, valid in the clock of the byte (en): `pos` is its position in the
// cell (4 = HEC, 5..52 = payload; meaningful outside HUNT), `at_hec` marks a
// HEC position, `syn` is the syndrome there and `hdr` the four bytes before.
module tc_delineation
  import atm_pkg::*;
#(
  parameter int ALPHA = 7,
  parameter int DELTA = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [7:0]  din,
  output logic [1:0]  state,      // 0 HUNT, 1 PRESYNC, 2 SYNC
  output logic [5:0]  pos,
  output logic        at_hec,
  output logic [7:0]  syn,
  output logic [31:0] hdr,
  output logic        payload,
  output logic [15:0] sync_losses
);
  typedef enum logic [1:0] {HUNT = 2'd0, PRESYNC = 2'd1, SYNC = 2'd2} dstate_t;
  dstate_t    st_q;
  logic [31:0] win_q;
  logic [5:0]  pos_q;
  logic [3:0]  cnt_q;

  always_comb begin
    state   = st_q;
    pos     = pos_q;
    hdr     = win_q;
    syn     = syndrome_of({win_q, din});
    at_hec  = en && ((st_q == HUNT) ? (syn == 8'h00) : (pos_q == 6'd4));
    payload = en && (st_q != HUNT) && (pos_q >= 6'd5);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q        <= HUNT;
      win_q       <= '0;
      pos_q       <= '0;
      cnt_q       <= '0;
      sync_losses <= '0;
    end else if (en) begin
      win_q <= {win_q[23:0], din};
      pos_q <= (pos_q == 6'(CELL_BYTES-1)) ? 6'd0 : pos_q + 6'd1;
      unique case (st_q)
        HUNT: if (syn == 8'h00) begin
          st_q  <= PRESYNC;
          pos_q <= 6'd5;
          cnt_q <= '0;
        end
        PRESYNC: if (at_hec) begin
          if (syn != 8'h00)                 st_q <= HUNT;
          else if (int'(cnt_q) + 1 >= DELTA) begin st_q <= SYNC; cnt_q <= '0; end
          else                               cnt_q <= cnt_q + 4'd1;
        end
        SYNC: if (at_hec) begin
          if (syn == 8'h00) cnt_q <= '0;
          else if (int'(cnt_q) + 1 >= ALPHA) begin
            st_q        <= HUNT;
            cnt_q       <= '0;
            sync_losses <= sync_losses + 16'd1;
          end else cnt_q <= cnt_q + 4'd1;
        end
        default: st_q <= HUNT;
      endcase
    end
  end
endmodule
