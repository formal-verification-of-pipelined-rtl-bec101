// add_round_key: the AES AddRoundKey step. The 128-bit round key is added
// to the state in GF(2), i.e. bitwise XOR. Combinational. It is also the
// initial whitening of the plaintext with the cipher key before round 1.
module add_round_key
  import aes_pkg::*;
(
  input  state_t state_in,
  input  key_t   round_key,
  output state_t state_out
);

  assign state_out = state_in ^ round_key;

endmodule
