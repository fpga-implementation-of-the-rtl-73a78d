// aes_controller -- sequencer of the folded AES-128 datapath.
//
// A block is processed in three phases. LOAD takes the four input columns,
// one per accepted in_valid, and writes each with the first round key
// added. ROUND then runs NR rounds of four clocks, one output column per
// clock, reading from the row memories the four bytes that ShiftRows
// (encryption) or InvShiftRows (decryption) brings into that column: for
// output column k, row i reads input column (k+i) mod 4, or (k-i) mod 4 when
// decrypting. The last round's columns leave on dout instead of being
// written back. The four-steps-per-round order and the addressing rule
// follow the document; phases, handshakes and the pipeline are this
// design's own.
//
// Pipeline: a column is read in one clock (R) and written one clock later
// (W), because the S-box block RAM is synchronous. So when the first column
// of a round is read, the last column of the previous round is being written
// in that very clock: its byte is taken from the forwarding path (fwd) and
// all other bytes from the row memories. Tap depths follow from counting
// writes since the needed column was shifted in.
//
// The round-key RAM is also synchronous, so key_addr names the word needed
// in the next clock: during LOAD the word for the next load column, during
// ROUND the word for the column being read (used in its W clock).
// Encryption uses words 0..43 in order, decryption starts with 40..43 and
// walks the round keys backwards.
//
// Handshake: start (with decrypt) is taken when ready; the four input words
// follow with in_valid/in_ready and may have gaps; out_valid marks the four
// output words (no back-pressure). A block takes 1 + 4 + 4*NR clocks from
// start to the last output word when the input words arrive without gaps.
module aes_controller
  import aes_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned ROUNDS = NR
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          keys_valid,
  input  logic                          start,
  input  logic                          decrypt_in,
  output logic                          ready,
  input  logic                          in_valid,
  output logic                          in_ready,
  output logic                          out_valid,
  output logic                          busy,
  // datapath controls
  output logic                          decrypt,
  output logic [0:3][$clog2(DEPTH)-1:0] tap,
  output logic [0:3]                    fwd,
  output logic                          sel_input,
  output logic                          sel_invmix,
  output logic                          sel_rkey,
  output logic                          wr_en,
  output logic [5:0]                    key_addr
);

  typedef enum logic [1:0] {IDLE, LOAD, ROUND} phase_t;

  phase_t     phase, phase_n;
  logic [1:0] lcol, lcol_n;   // load column
  logic [1:0] col;            // column being read in ROUND
  logic [3:0] round;          // 1..ROUNDS
  logic       mode_n;

  // write-stage registers
  logic       w_valid, w_final;

  assign ready    = (phase == IDLE) && keys_valid;
  assign in_ready = (phase == LOAD);
  assign busy     = (phase != IDLE) || w_valid;

  always_comb begin
    phase_n = phase;
    lcol_n  = lcol;
    mode_n  = decrypt;
    unique case (phase)
      IDLE: if (start && keys_valid) begin
        phase_n = LOAD;
        lcol_n  = '0;
        mode_n  = decrypt_in;
      end
      LOAD: if (in_valid) begin
        lcol_n = lcol + 2'd1;
        if (lcol == 2'd3) phase_n = ROUND;
      end
      ROUND: if (col == 2'd3 && round == 4'(ROUNDS)) phase_n = IDLE;
      default: phase_n = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase   <= IDLE;
      lcol    <= '0;
      col     <= '0;
      round   <= 4'd1;
      decrypt <= 1'b0;
      w_valid <= 1'b0;
      w_final <= 1'b0;
    end else begin
      phase   <= phase_n;
      lcol    <= lcol_n;
      decrypt <= mode_n;
      w_valid <= (phase == ROUND);
      w_final <= (phase == ROUND) && (round == 4'(ROUNDS));
      if (phase == ROUND) begin
        col <= col + 2'd1;
        if (col == 2'd3) round <= (round == 4'(ROUNDS)) ? 4'd1 : round + 4'd1;
      end else begin
        col   <= '0;
        round <= 4'd1;
      end
    end
  end

  // read side: tap depths and forwarding
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      logic [1:0] m;
      int         depth;
      m = decrypt ? 2'(col - 2'(i)) : 2'(col + 2'(i));
      // depth = writes since column m of the previous round was stored
      if (col == 2'd0)
        depth = (round == 4'd1) ? 3 - int'(m) : 2 - int'(m);
      else if (round == 4'(ROUNDS))
        depth = 3 - int'(m);                    // last round writes nothing
      else
        depth = int'(col) + 2 - int'(m);
      fwd[i] = (phase == ROUND) && (depth < 0);
      tap[i] = (depth < 0) ? '0 : ($clog2(DEPTH))'(depth);
    end
  end

  // write side
  always_comb begin
    sel_input  = (phase == LOAD);
    wr_en      = ((phase == LOAD) && in_valid) || (w_valid && !w_final);
    sel_invmix = w_valid && !w_final && decrypt;
    sel_rkey   = w_valid && (w_final || decrypt);
    out_valid  = w_valid && w_final;
  end

  // round-key address for the next clock
  always_comb begin
    if (phase_n == LOAD)
      key_addr = mode_n ? 6'(4 * ROUNDS) + 6'(lcol_n) : 6'(lcol_n);
    else if (decrypt)
      key_addr = 6'(4 * (int'(ROUNDS) - int'(round))) + 6'(col);
    else
      key_addr = 6'(4 * int'(round)) + 6'(col);
  end

  // The pipeline never asks for a load write and a round write together.
  a_no_overlap: assert property (@(posedge clk) disable iff (rst)
    !((phase == LOAD) && w_valid));

endmodule
