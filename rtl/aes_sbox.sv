// aes_sbox: the AES S-box as a 256-entry lookup table.
//
// The table is a constant array filled at elaboration by a function, so no
// numbers are pasted into the source: entry a is the affine map of the
// multiplicative inverse of a in GF(2^8) (FIPS-197, 5.1.1),
//   b = a^254 (0 maps to 0),
//   s = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63.
// The inverse is found by square-and-multiply. Only the table lookup is
// hardware; synthesis sees a 256x8 ROM.
//
// Interface: in_byte -> out_byte, purely combinational, no clock.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);

  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = 8'h00;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // a^254 = a^-1 for a != 0; 254 = 0b11111110.
  function automatic byte_t gf_inv(byte_t a);
    byte_t r  = 8'h01;
    byte_t sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t affine(byte_t b);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]}
             ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  typedef byte_t table_t [256];

  function automatic table_t make_table();
    table_t t;
    for (int a = 0; a < 256; a++) t[a] = affine(gf_inv(byte_t'(a)));
    return t;
  endfunction

  localparam table_t SBOX = make_table();

  assign out_byte = SBOX[in_byte];

endmodule
