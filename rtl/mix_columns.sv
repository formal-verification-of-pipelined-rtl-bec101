// mix_columns: the AES MixColumns step, combinational. Each of the four
// columns (a0..a3, a0 the top row) is multiplied by the fixed circulant
// matrix [2 3 1 1; 1 2 3 1; 1 1 2 3; 3 1 1 2] over GF(2^8), with products
// reduced modulo x^8+x^4+x^3+x+1. Multiplication by 2 is xtime (shift and
// conditional XOR of 0x1b); by 3 is xtime(a) ^ a.
module mix_columns
  import aes_pkg::*;
(
  input  state_t state_in,
  output state_t state_out
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t a0, a1, a2, a3;
      a0 = state_in[127-32*c      -: 8];
      a1 = state_in[127-32*c - 8  -: 8];
      a2 = state_in[127-32*c - 16 -: 8];
      a3 = state_in[127-32*c - 24 -: 8];
      state_out[127-32*c      -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      state_out[127-32*c - 8  -: 8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      state_out[127-32*c - 16 -: 8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      state_out[127-32*c - 24 -: 8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
  end

endmodule
