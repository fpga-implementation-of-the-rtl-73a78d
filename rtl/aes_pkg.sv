// aes_pkg -- types, constants and GF(2^8) arithmetic shared by the AES-128
// folded encryption/decryption core.
//
// A state column is 32 bits, row 0 in the most significant byte, so that a
// 128-bit block written as hex in the usual AES notation splits into columns
// 0..3 from left to right. Field arithmetic is modulo x^8+x^4+x^3+x+1.
// The S-box block RAMs build their contents from the affine maps below and
// a table of powers of {03}, which generates the multiplicative group.
// MixColumns is the product with c(x) = {03}x^3+{01}x^2+{01}x+{02} modulo
// x^4+1; the decryption path additionally multiplies by
// d^2(x) = {04}x^2+{05}, which turns c(x) into its inverse d(x).
package aes_pkg;

  localparam int unsigned NR        = 10;            // rounds of AES-128
  localparam int unsigned NK        = 4;             // key words
  localparam int unsigned KEY_WORDS = 4 * (NR + 1);  // 44 round-key words

  typedef logic [7:0]       byte_t;
  typedef logic [0:3][7:0]  col_t;   // col[0] = row 0 = bits 31:24

  // Multiply by x modulo the AES polynomial.
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t affine(input byte_t a);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = a[i] ^ a[(i + 4) % 8] ^ a[(i + 5) % 8] ^ a[(i + 6) % 8] ^ a[(i + 7) % 8];
    return r ^ 8'h63;
  endfunction

  function automatic byte_t inv_affine(input byte_t a);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = a[(i + 2) % 8] ^ a[(i + 5) % 8] ^ a[(i + 7) % 8];
    return r ^ 8'h05;
  endfunction

  // b = c(x) * a(x) mod x^4+1
  function automatic col_t mix_c(input col_t a);
    col_t b;
    for (int i = 0; i < 4; i++)
      b[i] = xtime(a[i]) ^ (xtime(a[(i + 1) % 4]) ^ a[(i + 1) % 4])
           ^ a[(i + 2) % 4] ^ a[(i + 3) % 4];
    return b;
  endfunction

  // b = d^2(x) * a(x) mod x^4+1, d^2(x) = {04}x^2 + {05}
  function automatic col_t mix_d2(input col_t a);
    col_t b;
    for (int i = 0; i < 4; i++) begin
      byte_t q0 = xtime(xtime(a[i]));
      byte_t q2 = xtime(xtime(a[(i + 2) % 4]));
      b[i] = q0 ^ a[i] ^ q2;
    end
    return b;
  endfunction

endpackage
