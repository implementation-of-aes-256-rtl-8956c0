// aes_sub_word: SubWord of the AES key schedule. Each of the four bytes of a
// 32-bit key word goes through its own S-box lookup.
//
// Interface: in_word -> out_word, combinational. The key-expansion unit holds
// two of these, which is all the S-box hardware the key schedule needs.
module aes_sub_word
  import aes_pkg::*;
(
  input  word_t in_word,
  output word_t out_word
);

  for (genvar b = 0; b < 4; b++) begin : g_byte
    aes_sbox u_sbox (
      .in_byte (in_word[8*b +: 8]),
      .out_byte(out_word[8*b +: 8])
    );
  end

endmodule
