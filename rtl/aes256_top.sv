// aes256_top: the AES-256 encryption core with its on-board self-check.
//
// The core (aes256_enc) encrypts one 128-bit block under a 256-bit key in 15
// clocks after start. With use_test_vector high, the core is fed the built-in
// test vector (TEST_DATA, TEST_KEY) instead of data_in/key_in, so the board
// can check itself with nothing attached; aes_result_flags then compares the
// ciphertext and the last round key with EXP_CIPHER and EXP_SUBKEY14 and
// raises five flags, all high when the encryption is correct. Flags are
// computed for every result, so with external data they only show which
// words happen to match.
//
// Interface: clk, asynchronous active-low rst_n, start pulse, data_in,
// key_in, use_test_vector (sampled with start); busy, one-clock done,
// cipher_text and subkey14 (held until the next result), flags and
// flags_valid (registered one clock after done).
//
// The test inputs are the ones the source design checks with; the expected
// outputs are the FIPS-197 AES-256 results for them. The input selection is
// this design's own choice.
module aes256_top
  import aes_pkg::*;
#(
  parameter block_t  TEST_DATA    = 128'h00112233445566778899aabbccddeeff,
  parameter key256_t TEST_KEY     =
    256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4,
  parameter block_t  EXP_CIPHER   = 128'hd83414223d20a0c928b136c884d07ea2,
  parameter block_t  EXP_SUBKEY14 = 128'hfe4890d1e6188d0b046df344706c631e
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       use_test_vector,
  input  block_t     data_in,
  input  key256_t    key_in,
  output logic       busy,
  output logic       done,
  output block_t     cipher_text,
  output block_t     subkey14,
  output logic [4:0] flags,
  output logic       flags_valid
);

  block_t  core_data;
  key256_t core_key;

  assign core_data = use_test_vector ? TEST_DATA : data_in;
  assign core_key  = use_test_vector ? TEST_KEY  : key_in;

  aes256_enc u_enc (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .data_in    (core_data),
    .key_in     (core_key),
    .busy       (busy),
    .done       (done),
    .cipher_text(cipher_text),
    .subkey14   (subkey14)
  );

  aes_result_flags #(
    .EXP_CIPHER  (EXP_CIPHER),
    .EXP_SUBKEY14(EXP_SUBKEY14)
  ) u_flags (
    .clk        (clk),
    .rst_n      (rst_n),
    .done       (done),
    .cipher_text(cipher_text),
    .subkey14   (subkey14),
    .flags      (flags),
    .valid      (flags_valid)
  );

endmodule
