// aes_sbox_bram -- dual-port synchronous 512 x 8 ROM holding both S-boxes.
//
// Addresses 0x000-0x0FF hold SubBytes, addresses 0x100-0x1FF hold
// InvSubBytes, so address bit 8 chooses the direction and bits 7:0 are the
// byte to be substituted. Each of the two read ports reaches the whole
// table, so one memory performs two independent substitutions per clock,
// and two of them give the four lookups that a 32-bit column needs. This
// split of one block RAM into the two tables follows the document; the
// contents are computed at elaboration from the S-box definition
// (inverse in GF(2^8), then the affine map), not typed in as a table.
//
// Timing: the data output follows the address by one clock (read on the
// rising edge while en is high), like an FPGA block RAM. The write port of
// the block RAM is not used by the cipher and is left out; rst clears the
// output registers, like the block RAM's RSTA pin.
module aes_sbox_bram
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       en,
  input  logic       rst,
  input  logic [8:0] addra,
  input  logic [8:0] addrb,
  output byte_t      doa,
  output byte_t      dob
);

  byte_t rom [512];

  // SubBytes(a) = affine(a^-1), InvSubBytes(a) = (inv_affine(a))^-1, with
  // 0^-1 = 0. Inverses come from powers of the generator {03}:
  // if a = g^k then a^-1 = g^(255-k).
  initial begin
    byte_t pw [256];
    byte_t lg [256];
    byte_t x, inv;
    x = 8'h01;
    lg[0] = 8'h00;
    for (int k = 0; k < 255; k++) begin
      pw[k] = x;
      lg[x] = byte_t'(k);
      x = x ^ xtime(x);
    end
    pw[255] = 8'h01;
    for (int i = 0; i < 256; i++) begin
      inv    = (i == 0) ? 8'h00 : pw[255 - int'(lg[i])];
      rom[i] = affine(inv);
    end
    for (int i = 0; i < 256; i++) begin
      x = inv_affine(byte_t'(i));
      rom[256 + i] = (x == 8'h00) ? 8'h00 : pw[255 - int'(lg[x])];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      doa <= '0;
      dob <= '0;
    end else if (en) begin
      doa <= rom[addra];
      dob <= rom[addrb];
    end
  end

endmodule
