// aes_sub_bytes: SubBytes step of an AES round. All 16 bytes of the 128-bit
// state are replaced, in parallel, by their S-box entries.
//
// Interface: state_in -> state_out, combinational.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  for (genvar b = 0; b < 16; b++) begin : g_byte
    aes_sbox u_sbox (
      .in_byte (state_in[8*b +: 8]),
      .out_byte(state_out[8*b +: 8])
    );
  end

endmodule
