// aes_key_expand: one step of the AES-256 key schedule, shared by the whole
// schedule. From the eight key words held in the key register (two round keys,
// w[8j..8j+7]) it derives the next eight (w[8j+8..8j+15]):
//
//   w'[0] = w[0] ^ SubWord(RotWord(w[7])) ^ {rcon, 24'h0}
//   w'[i] = w[i] ^ w'[i-1]               for i = 1,2,3,5,6,7
//   w'[4] = w[4] ^ SubWord(w'[3])
//
// A loop index i walks the word positions; position 0 and 4 take a SubWord
// result, the others the word just derived. Unrolling the schedule would need SubWord 13
// times and RotWord 7 times; here one RotWord and two SubWord units serve it
// all, and the iterative core calls this unit once every two rounds.
//
// Interface: combinational. key_in is the current group (w0 in [255:224]),
// rcon the round-constant word for this step ({01,02,04,...,40} followed by
// three zero bytes), key_out the
// next group in the same layout.
module aes_key_expand
  import aes_pkg::*;
(
  input  key256_t key_in,
  input  word_t   rcon,
  output key256_t key_out
);

  word_t w_in  [8];
  word_t w_lo  [4];   // w'[0..3]
  word_t w_hi  [4];   // w'[4..7]
  word_t sub_rot;   // SubWord(RotWord(w[7])) ^ rcon
  word_t sub_mid;   // SubWord(w'[3])
  word_t sub_rot_raw;

  always_comb begin
    for (int i = 0; i < 8; i++) w_in[i] = key_in[255 - 32*i -: 32];
  end

  aes_sub_word u_sub_word_rot (
    .in_word (rot_word(w_in[7])),
    .out_word(sub_rot_raw)
  );
  assign sub_rot = sub_rot_raw ^ rcon;

  aes_sub_word u_sub_word_mid (
    .in_word (w_lo[3]),
    .out_word(sub_mid)
  );

  // Lower half: words 0..3, chained from SubWord(RotWord(w[7])).
  always_comb begin
    word_t prev;
    prev = sub_rot;
    for (int i = 0; i < 4; i++) begin
      w_lo[i] = w_in[i] ^ prev;
      prev    = w_lo[i];
    end
  end

  // Upper half: words 4..7, chained from SubWord(w'[3]).
  always_comb begin
    word_t prev;
    prev = sub_mid;
    for (int i = 0; i < 4; i++) begin
      w_hi[i] = w_in[i + 4] ^ prev;
      prev    = w_hi[i];
    end
  end

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      key_out[255 - 32*i -: 32] = w_lo[i];
      key_out[127 - 32*i -: 32] = w_hi[i];
    end
  end

endmodule
