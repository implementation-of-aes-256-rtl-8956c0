// aes_mix_columns: MixColumns step of an AES round. Each 4-byte column
// (a0,a1,a2,a3) is multiplied over GF(2^8) by the circulant matrix
// [02 03 01 01]: out_r = 2*a_r ^ 3*a_(r+1) ^ a_(r+2) ^ a_(r+3) (indices mod 4).
// The products by 2 and 3 are built from xtime and XOR, so no multiplier is
// needed.
//
// Interface: state_in -> state_out, combinational; byte order as in aes_pkg.
module aes_mix_columns
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  always_comb begin
    for (int unsigned c = 0; c < 4; c++) begin
      for (int unsigned r = 0; r < 4; r++) begin
        byte_t a0, a1, a2, a3;
        a0 = state_byte(state_in, c, r);
        a1 = state_byte(state_in, c, (r + 1) % 4);
        a2 = state_byte(state_in, c, (r + 2) % 4);
        a3 = state_byte(state_in, c, (r + 3) % 4);
        state_out[127 - 8*(4*c + r) -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      end
    end
  end

endmodule
