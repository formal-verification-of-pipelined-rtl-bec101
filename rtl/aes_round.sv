// aes_round: one AES encryption round, combinational:
//   SubBytes -> ShiftRows -> MixColumns -> AddRoundKey
// With last_round high, MixColumns is bypassed, which gives the tenth
// (final) round of AES. The unrolled pipeline ties last_round to a constant
// in each stage, so synthesis keeps only the datapath that stage needs; the
// sequential core drives it from its round counter. Folding the regular and
// the final round into one module with a select input is a choice of this
// design; the two round functions themselves are the standard ones.
module aes_round
  import aes_pkg::*;
(
  input  state_t state_in,
  input  key_t   round_key,
  input  logic   last_round,
  output state_t state_out
);

  state_t s_sub, s_shift, s_mix, s_pre_key;

  sub_bytes u_sub_bytes (
    .state_in (state_in),
    .state_out(s_sub)
  );

  shift_rows u_shift_rows (
    .state_in (s_sub),
    .state_out(s_shift)
  );

  mix_columns u_mix_columns (
    .state_in (s_shift),
    .state_out(s_mix)
  );

  assign s_pre_key = last_round ? s_shift : s_mix;

  add_round_key u_add_round_key (
    .state_in (s_pre_key),
    .round_key(round_key),
    .state_out(state_out)
  );

endmodule
