// aes_ref_pkg -- behavioural AES-128 reference for the testbenches.
//
// Written independently of the RTL: the state is a flat array of 16 bytes
// (byte 4*c+r is row r of column c), the S-box is found by searching for
// the multiplicative inverse and applying the affine map bit by bit from
// its matrix definition, and InvMixColumns uses the full d(x) coefficients
// {0e},{0b},{0d},{09}. Blocks and keys are 128-bit vectors in the usual hex
// order (byte 0 in bits 127:120).
package aes_ref_pkg;

  typedef logic [7:0] u8;

  function automatic u8 mul(input u8 a, input u8 b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= (16'(a) << i);
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= (16'h11b << (i - 8));
    return p[7:0];
  endfunction

  function automatic u8 calc_sbox(input u8 a);
    u8 inv = 8'h00;
    u8 r;
    for (int y = 1; y < 256; y++) if (mul(a, u8'(y)) == 8'h01) inv = u8'(y);
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8]
           ^ inv[(i + 7) % 8] ^ ((8'h63 >> i) & 1'b1);
    return r;
  endfunction

  // tables filled on first use
  u8  sb_tab [256];
  u8  isb_tab [256];
  bit tab_ok = 1'b0;

  function automatic void fill_tables();
    if (tab_ok) return;
    for (int y = 0; y < 256; y++) begin
      sb_tab[y] = calc_sbox(u8'(y));
      isb_tab[sb_tab[y]] = u8'(y);
    end
    tab_ok = 1'b1;
  endfunction

  function automatic u8 ref_sbox(input u8 a);
    fill_tables();
    return sb_tab[a];
  endfunction

  function automatic u8 ref_inv_sbox(input u8 a);
    fill_tables();
    return isb_tab[a];
  endfunction

  typedef u8 state_t [16];

  function automatic state_t to_state(input logic [127:0] v);
    state_t s;
    for (int i = 0; i < 16; i++) s[i] = v[127 - 8*i -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_state(input state_t s);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127 - 8*i -: 8] = s[i];
    return v;
  endfunction

  // w[0..43] of the AES-128 key expansion
  typedef logic [31:0] words_t [44];

  function automatic words_t expand(input logic [127:0] key);
    words_t w;
    u8 rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    return w;
  endfunction

  function automatic state_t add_key(input state_t s, input words_t w, input int rnd);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) s[4*c+r] ^= w[4*rnd+c][31 - 8*r -: 8];
    return s;
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] key, input logic [127:0] pt);
    words_t w = expand(key);
    state_t s = add_key(to_state(pt), w, 0);
    for (int rnd = 1; rnd <= 10; rnd++) begin
      state_t t;
      for (int i = 0; i < 16; i++) s[i] = ref_sbox(s[i]);
      for (int c = 0; c < 4; c++)                         // ShiftRows
        for (int r = 0; r < 4; r++) t[4*c+r] = s[4*((c+r)%4)+r];
      s = t;
      if (rnd != 10)
        for (int c = 0; c < 4; c++) begin                 // MixColumns
          u8 a0 = s[4*c], a1 = s[4*c+1], a2 = s[4*c+2], a3 = s[4*c+3];
          s[4*c]   = mul(a0,2) ^ mul(a1,3) ^ a2 ^ a3;
          s[4*c+1] = a0 ^ mul(a1,2) ^ mul(a2,3) ^ a3;
          s[4*c+2] = a0 ^ a1 ^ mul(a2,2) ^ mul(a3,3);
          s[4*c+3] = mul(a0,3) ^ a1 ^ a2 ^ mul(a3,2);
        end
      s = add_key(s, w, rnd);
    end
    return from_state(s);
  endfunction

  function automatic logic [127:0] decrypt(input logic [127:0] key, input logic [127:0] ct);
    words_t w = expand(key);
    state_t s = add_key(to_state(ct), w, 10);
    for (int rnd = 9; rnd >= 0; rnd--) begin
      state_t t;
      for (int c = 0; c < 4; c++)                         // InvShiftRows
        for (int r = 0; r < 4; r++) t[4*((c+r)%4)+r] = s[4*c+r];
      s = t;
      for (int i = 0; i < 16; i++) s[i] = ref_inv_sbox(s[i]);
      s = add_key(s, w, rnd);
      if (rnd != 0)
        for (int c = 0; c < 4; c++) begin                 // InvMixColumns
          u8 a0 = s[4*c], a1 = s[4*c+1], a2 = s[4*c+2], a3 = s[4*c+3];
          s[4*c]   = mul(a0,14) ^ mul(a1,11) ^ mul(a2,13) ^ mul(a3,9);
          s[4*c+1] = mul(a0,9)  ^ mul(a1,14) ^ mul(a2,11) ^ mul(a3,13);
          s[4*c+2] = mul(a0,13) ^ mul(a1,9)  ^ mul(a2,14) ^ mul(a3,11);
          s[4*c+3] = mul(a0,11) ^ mul(a1,13) ^ mul(a2,9)  ^ mul(a3,14);
        end
    end
    return from_state(s);
  endfunction

endpackage
