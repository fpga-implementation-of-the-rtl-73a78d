// aes_mixcolumns -- MixColumns and InvMixColumns on one 32-bit column with
// shared logic.
//
// The column is multiplied by c(x) = {03}x^3+{01}x^2+{01}x+{02} modulo
// x^4+1, which is MixColumns. Because c(x)*d^2(x) = d(x), the inverse
// transform is obtained by passing the MixColumns result through a second,
// much smaller product with d^2(x) = {04}x^2+{05}: InvMixColumns reuses the
// whole c(x) network and adds only d^2(x). Both results are available at
// once; the datapath picks the one it needs. Purely combinational. The
// c(x)/d^2(x) factorisation is the document's; providing both outputs side
// by side is this design's way of wiring it.
module aes_mixcolumns
  import aes_pkg::*;
(
  input  col_t a,
  output col_t mix,      // c(x) * a(x)
  output col_t inv_mix   // d^2(x) * c(x) * a(x) = d(x) * a(x)
);

  always_comb begin
    mix     = mix_c(a);
    inv_mix = mix_d2(mix);
  end

endmodule
