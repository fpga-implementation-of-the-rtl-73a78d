// aes_key_schedule -- AES-128 key expansion, one 32-bit word per clock.
//
// The four words of the cipher key enter through the input multiplexer,
// one per key_valid, and the remaining 40 words w[4..43] are then computed
// in 40 consecutive clocks, so the whole schedule takes 44 clocks. A
// register holds the newest word w[i-1] and a three-deep shift register
// behind it the three before, so its output is w[i-4]. The new word is
// w[i-4] xor w[i-1], except every fourth word, where w[i-1] is first
// rotated by one byte, passed through SubBytes and xored with the round
// constant Rcon. Every word leaves the register towards the round-key RAM
// (ram_we/ram_waddr/ram_wdata), one clock after it is computed. This
// structure is the document's; the handshake and the RAM write timing are
// this design's own.
//
// The four S-box lookups use two dual-port S-box block RAMs. Their
// addresses are taken from the register's input, so the synchronous
// output matches the register's content one clock later without adding
// latency. Rcon is kept in a register and doubled in GF(2^8) after each use.
//
// Interface: a key is taken while allow is high (the cipher is idle);
// loading its first word clears keys_valid, which rises again once all 44
// words are stored. key_ready tells when a key word can be offered.
module aes_key_schedule
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        allow,
  input  logic        key_valid,
  input  col_t        key_word,
  output logic        key_ready,
  output logic        keys_valid,
  output logic        ram_we,
  output logic [5:0]  ram_waddr,
  output col_t        ram_wdata
);

  logic [5:0] idx;      // index of the word produced next
  col_t       w_reg;    // w[idx-1]
  col_t       sr [3];   // sr[2] = w[idx-4]
  col_t       sub_rot;  // SubWord(RotWord(w[idx-1]))
  col_t       mux_out, temp, rot_in;
  byte_t      rcon;
  logic       idle, loading, gen, take, upd;
  logic [5:0] widx;     // index of the word that mux_out carries

  assign idle      = (idx == 6'(KEY_WORDS));
  assign loading   = (idx < 6'(NK)) || idle;
  assign gen       = !loading;
  assign key_ready = loading && allow;
  assign take      = key_ready && key_valid;
  assign upd       = take || gen;
  assign widx      = idle ? 6'd0 : idx;

  always_comb begin
    temp    = (idx[1:0] == 2'd0) ? (sub_rot ^ {rcon, 24'h0}) : w_reg;
    mux_out = loading ? key_word : (temp ^ sr[2]);
    rot_in  = {mux_out[1], mux_out[2], mux_out[3], mux_out[0]};
  end

  for (genvar p = 0; p < 2; p++) begin : g_sbox
    aes_sbox_bram u_sbox (
      .clk   (clk),
      .en    (upd),
      .rst   (rst),
      .addra ({1'b0, rot_in[2*p]}),
      .addrb ({1'b0, rot_in[2*p+1]}),
      .doa   (sub_rot[2*p]),
      .dob   (sub_rot[2*p+1])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idx        <= 6'(KEY_WORDS);
      w_reg      <= '0;
      sr         <= '{default: '0};
      rcon       <= 8'h01;
      ram_we     <= 1'b0;
      ram_waddr  <= '0;
      keys_valid <= 1'b0;
    end else begin
      ram_we <= upd;
      if (upd) begin
        w_reg     <= mux_out;
        sr[0]     <= w_reg;
        sr[1]     <= sr[0];
        sr[2]     <= sr[1];
        ram_waddr <= widx;
        idx       <= widx + 6'd1;
        if (idle) rcon <= 8'h01;
        else if (gen && idx[1:0] == 2'd0) rcon <= xtime(rcon);
      end
      if (take && idle) keys_valid <= 1'b0;
      else if (ram_we && ram_waddr == 6'(KEY_WORDS - 1)) keys_valid <= 1'b1;
    end
  end

  assign ram_wdata = w_reg;

endmodule
