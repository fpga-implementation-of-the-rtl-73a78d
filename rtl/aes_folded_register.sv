// aes_folded_register -- the AES state held as four byte-wide row memories.
//
// Byte i of every written column goes into row memory i, and each row
// memory is a shift register with its own read tap (aes_srl). Columns are
// always written to consecutive locations, so no write address is needed:
// a write simply shifts the column in. Reading one byte per row with four
// independent taps lets the controller gather the bytes of one output
// column of ShiftRows or InvShiftRows in a single cycle; the row shift of
// the cipher is thus nothing but the choice of tap addresses. Because the
// rows keep their history, the columns of the previous round stay readable
// while the new round is shifted in, so no separate input and output
// memories are needed. The document describes the row memories and their
// shift-register build; sharing one shift register per row for both the
// old and the new round is this design's choice.
//
// Interface: wr_en shifts wdata in on the rising edge; rdata[i] is the entry
// at depth tap[i] of row i (0 = most recent), read combinationally.
module aes_folded_register
  import aes_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                                clk,
  input  logic                                wr_en,
  input  col_t                                wdata,
  input  logic [0:3][$clog2(DEPTH)-1:0]       tap,
  output col_t                                rdata
);

  for (genvar r = 0; r < 4; r++) begin : g_row
    aes_srl #(.WIDTH(8), .DEPTH(DEPTH)) u_row (
      .clk      (clk),
      .shift_en (wr_en),
      .din      (wdata[r]),
      .addr     (tap[r]),
      .dout     (rdata[r])
    );
  end

endmodule
