// aes_round: the combinational datapath of one AES round, shared by every
// round of the iterative core.
//
//   state_out = AddRoundKey(MixColumns(ShiftRows(SubBytes(state_in))), round_key)
//
// When last_round is high the MixColumns step is bypassed, as the final AES
// round requires. The order of the steps is the one the standard fixes;
// building one round and reusing it every clock is the area-saving choice
// of this design.
//
// Interface: combinational; state_in, round_key and last_round in,
// state_out out.
module aes_round
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  input  logic   last_round,
  output block_t state_out
);

  block_t subbed, shifted, mixed;

  aes_sub_bytes u_sub_bytes (
    .state_in (state_in),
    .state_out(subbed)
  );

  assign shifted = shift_rows(subbed);

  aes_mix_columns u_mix_columns (
    .state_in (shifted),
    .state_out(mixed)
  );

  assign state_out = (last_round ? shifted : mixed) ^ round_key;

endmodule
