// aes_result_flags: pass/fail flags for an on-board check of the encryption
// core against a known test vector.
//
// On the clock where done is high, five flags are registered:
//   flags[0..3]  word k of cipher_text (bits [127-32k -: 32]) equals word k
//                of EXP_CIPHER,
//   flags[4]     subkey14 equals EXP_SUBKEY14.
// The flags then hold until the next done, or until reset clears them, and
// can drive five LEDs directly. valid goes high with the first result.
//
// Five flags and a check on a finished encryption come from the source
// design; which bits each flag covers is this design's own choice. The
// default expected values are the AES-256 results (FIPS-197) for the core's
// built-in test vector, plaintext 00112233445566778899aabbccddeeff under
// key 603deb10...0914dff4.
module aes_result_flags
  import aes_pkg::*;
#(
  parameter block_t EXP_CIPHER   = 128'hd83414223d20a0c928b136c884d07ea2,
  parameter block_t EXP_SUBKEY14 = 128'hfe4890d1e6188d0b046df344706c631e
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       done,
  input  block_t     cipher_text,
  input  block_t     subkey14,
  output logic [4:0] flags,
  output logic       valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags <= '0;
      valid <= 1'b0;
    end else if (done) begin
      for (int k = 0; k < 4; k++)
        flags[k] <= (cipher_text[127 - 32*k -: 32] == EXP_CIPHER[127 - 32*k -: 32]);
      flags[4] <= (subkey14 == EXP_SUBKEY14);
      valid    <= 1'b1;
    end
  end

endmodule
