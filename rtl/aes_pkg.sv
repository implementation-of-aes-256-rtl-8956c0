// aes_pkg: types, constants and small byte-level functions shared by the
// AES-256 encryption core.
//
// Byte order follows FIPS-197: bits [127:120] of a 128-bit block hold byte 0
// (the first byte of the hex string), and the state is filled column by column,
// so column c is bytes 4c..4c+3 (bits [127-32c -: 32]). A 256-bit key holds
// key word w0 in bits [255:224] down to w7 in bits [31:0].
//
// The functions here are pure wiring or a few XORs (ShiftRows, RotWord, xtime);
// the table-driven and matrix parts live in their own modules.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  typedef logic [255:0] key256_t;

  // Rounds of AES-256 (FIPS-197): 14, so 15 round keys RK0..RK14.
  localparam int unsigned NR = 14;
  // Round counter width: values 0..NR.
  localparam int unsigned ROUND_W = 4;
  typedef logic [ROUND_W-1:0] round_t;

  // Multiply by x (i.e. by 2) in GF(2^8) modulo x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Cyclic left rotation of a key word by one byte.
  function automatic word_t rot_word(word_t w);
    return {w[23:0], w[31:24]};
  endfunction

  // Byte r of column c of a state block.
  function automatic byte_t state_byte(block_t s, int unsigned c, int unsigned r);
    return s[127 - 8*(4*c + r) -: 8];
  endfunction

  // ShiftRows: row r is rotated left by r byte positions, so output byte
  // (row r, column c) comes from input (row r, column (c + r) mod 4).
  function automatic block_t shift_rows(block_t s);
    block_t o;
    for (int unsigned c = 0; c < 4; c++) begin
      for (int unsigned r = 0; r < 4; r++) begin
        o[127 - 8*(4*c + r) -: 8] = state_byte(s, (c + r) % 4, r);
      end
    end
    return o;
  endfunction

endpackage
