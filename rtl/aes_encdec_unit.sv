// aes_encdec_unit -- the 32-bit folded datapath shared by AES encryption and
// decryption; it computes a quarter of a round (one state column) per clock.
//
// Left of the folded register, a multiplexer takes either a new input column
// or the column fed back from c(x); AddRoundKey is applied to it, and a
// second multiplexer may instead pass the feedback through d^2(x). The
// chosen column is written into the folded register. On the read side four
// bytes, picked by the controller's tap addresses so that ShiftRows or
// InvShiftRows is applied, go through the forwarding multiplexer (which
// substitutes the column being written in the same cycle when a byte is
// needed before it is stored) and address the S-box block RAMs; address bit
// 8 selects SubBytes or InvSubBytes. After the S-boxes, a multiplexer
// either passes the bytes or applies AddRoundKey, and c(x) follows. This
// arrangement of multiplexers, d^2(x), c(x), the folded register and the
// forwarding path follows the document's encryption/decryption unit.
//
// Round structure this produces:
//   encryption: reg -> SubBytes -> c(x) -> AddRoundKey -> reg
//   decryption: reg -> InvSubBytes -> AddRoundKey -> c(x) -> d^2(x) -> reg
//   last round (both): S-box -> AddRoundKey -> dout
//   first step (both): din -> AddRoundKey -> reg
//
// Timing: tap/fwd/decrypt are applied in the read cycle; the S-box output
// appears one clock later, when subkey, sel_* and wr_en for the same column
// must be driven (the write cycle). dout is combinational in that cycle.
module aes_encdec_unit
  import aes_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                          clk,
  input  logic                          rst,
  // read-cycle controls
  input  logic                          decrypt,
  input  logic [0:3][$clog2(DEPTH)-1:0] tap,
  input  logic [0:3]                    fwd,
  // write-cycle controls
  input  logic                          sel_input,   // 1: din, 0: feedback
  input  logic                          sel_invmix,  // 1: write d^2(x) path
  input  logic                          sel_rkey,    // 1: AddRoundKey after S-box
  input  logic                          wr_en,
  input  col_t                          din,
  input  col_t                          subkey,
  output col_t                          dout
);

  col_t left_mux, left_key, wdata, rdata, sbox_in, sbox_out, mix, inv_mix;

  aes_mixcolumns u_mix (
    .a       (dout),
    .mix     (mix),
    .inv_mix (inv_mix)
  );

  always_comb begin
    left_mux = sel_input ? din : mix;
    left_key = left_mux ^ subkey;
    wdata    = sel_invmix ? inv_mix : left_key;
  end

  aes_folded_register #(.DEPTH(DEPTH)) u_state (
    .clk   (clk),
    .wr_en (wr_en),
    .wdata (wdata),
    .tap   (tap),
    .rdata (rdata)
  );

  // forwarding multiplexer
  always_comb
    for (int r = 0; r < 4; r++) sbox_in[r] = fwd[r] ? wdata[r] : rdata[r];

  for (genvar p = 0; p < 2; p++) begin : g_sbox
    aes_sbox_bram u_sbox (
      .clk   (clk),
      .en    (1'b1),
      .rst   (rst),
      .addra ({decrypt, sbox_in[2*p]}),
      .addrb ({decrypt, sbox_in[2*p+1]}),
      .doa   (sbox_out[2*p]),
      .dob   (sbox_out[2*p+1])
    );
  end

  assign dout = sel_rkey ? (sbox_out ^ subkey) : sbox_out;

endmodule
