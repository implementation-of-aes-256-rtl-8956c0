// aes_ref_pkg: a software-style AES-256 reference for the testbenches.
//
// It is written independently of the RTL: the state is an array of 16 bytes,
// the S-box is found by exhaustive search for each byte's inverse (not by
// exponentiation), MixColumns multiplies with a general shift-and-add GF(2^8)
// product, and the key schedule is the textbook word loop w[i] = w[i-8] ^ t
// over all 60 words. Call init() once before using it.
package aes_ref_pkg;

  typedef logic [7:0] u8;
  typedef u8 bytes16_t [16];

  u8 sbox_tab [256];

  function automatic u8 mul(u8 a, u8 b);
    u8 p = 0;
    u8 aa = a;
    u8 bb = b;
    while (bb != 0) begin
      if (bb[0]) p ^= aa;
      aa = aa[7] ? ((aa << 1) ^ 8'h1b) : (aa << 1);
      bb = bb >> 1;
    end
    return p;
  endfunction

  function automatic void init();
    for (int a = 0; a < 256; a++) begin
      u8 inv = 0;
      u8 s;
      for (int b = 1; b < 256; b++)
        if (mul(u8'(a), u8'(b)) == 8'h01) inv = u8'(b);
      s = 8'h63;
      for (int i = 0; i < 5; i++) s ^= u8'((inv << i) | (inv >> (8 - i)));
      sbox_tab[a] = s;
    end
  endfunction

  function automatic bytes16_t to_bytes(logic [127:0] x);
    bytes16_t b;
    for (int i = 0; i < 16; i++) b[i] = x[127 - 8*i -: 8];
    return b;
  endfunction

  function automatic logic [127:0] from_bytes(bytes16_t b);
    logic [127:0] x;
    for (int i = 0; i < 16; i++) x[127 - 8*i -: 8] = b[i];
    return x;
  endfunction

  function automatic logic [31:0] sub_word(logic [31:0] w);
    return {sbox_tab[w[31:24]], sbox_tab[w[23:16]], sbox_tab[w[15:8]], sbox_tab[w[7:0]]};
  endfunction

  function automatic logic [127:0] sub_bytes(logic [127:0] x);
    bytes16_t b = to_bytes(x);
    for (int i = 0; i < 16; i++) b[i] = sbox_tab[b[i]];
    return from_bytes(b);
  endfunction

  // Byte i sits in row i%4, column i/4; row r moves left by r columns.
  function automatic logic [127:0] shift_rows(logic [127:0] x);
    bytes16_t b = to_bytes(x);
    bytes16_t o;
    for (int i = 0; i < 16; i++) o[i] = b[(i + 4 * (i % 4)) % 16];
    return from_bytes(o);
  endfunction

  function automatic logic [127:0] mix_columns(logic [127:0] x);
    bytes16_t b = to_bytes(x);
    bytes16_t o;
    for (int c = 0; c < 4; c++) begin
      u8 a0 = b[4*c];
      u8 a1 = b[4*c+1];
      u8 a2 = b[4*c+2];
      u8 a3 = b[4*c+3];
      o[4*c]   = mul(a0, 2) ^ mul(a1, 3) ^ a2 ^ a3;
      o[4*c+1] = a0 ^ mul(a1, 2) ^ mul(a2, 3) ^ a3;
      o[4*c+2] = a0 ^ a1 ^ mul(a2, 2) ^ mul(a3, 3);
      o[4*c+3] = mul(a0, 3) ^ a1 ^ a2 ^ mul(a3, 2);
    end
    return from_bytes(o);
  endfunction

  function automatic logic [127:0] round_fn(logic [127:0] s, logic [127:0] k, bit last);
    logic [127:0] t = shift_rows(sub_bytes(s));
    if (!last) t = mix_columns(t);
    return t ^ k;
  endfunction

  // All 60 key words, w[0] first.
  typedef logic [31:0] words60_t [60];

  function automatic words60_t expand_words(logic [255:0] key);
    words60_t w;
    u8 rc = 8'h01;
    for (int i = 0; i < 8; i++) w[i] = key[255 - 32*i -: 32];
    for (int i = 8; i < 60; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 8 == 0) begin
        t = sub_word({t[23:0], t[31:24]}) ^ {rc, 24'h0};
        rc = mul(rc, 2);
      end else if (i % 8 == 4) begin
        t = sub_word(t);
      end
      w[i] = w[i-8] ^ t;
    end
    return w;
  endfunction

  function automatic logic [127:0] round_key(logic [255:0] key, int r);
    words60_t w = expand_words(key);
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] pt, logic [255:0] key);
    logic [127:0] s = pt ^ round_key(key, 0);
    for (int r = 1; r <= 14; r++) s = round_fn(s, round_key(key, r), r == 14);
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic logic [255:0] rand256();
    return {rand128(), rand128()};
  endfunction

endpackage
