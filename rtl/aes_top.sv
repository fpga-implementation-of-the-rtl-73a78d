// aes_top -- compact AES-128 encryption/decryption core for FPGAs.
//
// One circuit encrypts and decrypts 128-bit blocks in ECB fashion with a
// 32-bit datapath that computes a quarter of a round per clock. It joins
// the key schedule (one round-key word per clock, 44 clocks), the round-key
// RAM, the sequencer and the folded encryption/decryption unit. The
// division into these units follows the document; the port protocol is
// this design's own.
//
// Use:
//   1. Offer the cipher key as four 32-bit words (most significant first)
//      with key_valid while key_ready is high. keys_valid rises once all
//      44 round-key words are stored (45 clocks after the first word when
//      the words come back to back). A key is only taken while no block is
//      in flight.
//   2. Pulse start with decrypt (0 encrypt, 1 decrypt) while ready is high,
//      then give the four input words, most significant first, with in_valid
//      while in_ready is high. Gaps between words are allowed.
//   3. The four result words leave on dout, most significant first, in four
//      consecutive clocks marked by out_valid. With no input gaps the last
//      output word appears 45 clocks after start; the next start can be
//      taken in that same clock.
module aes_top
  import aes_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst,
  // key
  input  logic        key_valid,
  input  logic [31:0] key_word,
  output logic        key_ready,
  output logic        keys_valid,
  // data
  input  logic        start,
  input  logic        decrypt,
  output logic        ready,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] din,
  output logic        out_valid,
  output logic [31:0] dout,
  output logic        busy
);

  logic                          ram_we;
  logic [5:0]                    ram_waddr, key_addr;
  col_t                          ram_wdata, subkey, dout_col;
  logic                          dec_mode, sel_input, sel_invmix, sel_rkey, wr_en;
  logic [0:3][$clog2(DEPTH)-1:0] tap;
  logic [0:3]                    fwd;

  aes_key_schedule u_ks (
    .clk        (clk),
    .rst        (rst),
    .allow      (!busy),
    .key_valid  (key_valid),
    .key_word   (col_t'(key_word)),
    .key_ready  (key_ready),
    .keys_valid (keys_valid),
    .ram_we     (ram_we),
    .ram_waddr  (ram_waddr),
    .ram_wdata  (ram_wdata)
  );

  aes_key_ram #(.WORDS(KEY_WORDS), .AW(6)) u_kram (
    .clk   (clk),
    .we    (ram_we),
    .waddr (ram_waddr),
    .wdata (ram_wdata),
    .raddr (key_addr),
    .rdata (subkey)
  );

  aes_controller #(.DEPTH(DEPTH)) u_ctrl (
    .clk        (clk),
    .rst        (rst),
    .keys_valid (keys_valid),
    .start      (start),
    .decrypt_in (decrypt),
    .ready      (ready),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .out_valid  (out_valid),
    .busy       (busy),
    .decrypt    (dec_mode),
    .tap        (tap),
    .fwd        (fwd),
    .sel_input  (sel_input),
    .sel_invmix (sel_invmix),
    .sel_rkey   (sel_rkey),
    .wr_en      (wr_en),
    .key_addr   (key_addr)
  );

  aes_encdec_unit #(.DEPTH(DEPTH)) u_unit (
    .clk        (clk),
    .rst        (rst),
    .decrypt    (dec_mode),
    .tap        (tap),
    .fwd        (fwd),
    .sel_input  (sel_input),
    .sel_invmix (sel_invmix),
    .sel_rkey   (sel_rkey),
    .wr_en      (wr_en),
    .din        (col_t'(din)),
    .subkey     (subkey),
    .dout       (dout_col)
  );

  assign dout = dout_col;

endmodule
