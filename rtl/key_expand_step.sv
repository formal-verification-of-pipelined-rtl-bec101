// key_expand_step: one step of the AES-128 key schedule. Given round key
// n-1 (the cipher key for n = 1) as words w0..w3 and the round number n
// (1..10), it returns round key n:
//   w0' = w0 ^ SubWord(RotWord(w3)) ^ {rcon(n), 24'h0}
//   w1' = w1 ^ w0',  w2' = w2 ^ w1',  w3' = w3 ^ w2'
// RotWord rotates the word left by one byte; SubWord passes its four bytes
// through S-boxes; rcon(n) = x^(n-1) in GF(2^8), held in a ten-entry table
// built at elaboration. Combinational. In the unrolled pipeline the round
// number is a constant per stage and the table lookup folds away; the
// sequential core drives it from its round counter. A round number outside
// 1..10 selects a zero round constant.
module key_expand_step
  import aes_pkg::*;
(
  input  key_t        key_in,
  input  logic [3:0]  round_idx,
  output key_t        key_out
);

  function automatic logic [15:0][7:0] rcon_table();
    logic [15:0][7:0] t;
    t = '0;
    for (int unsigned n = 1; n <= NR; n++) t[n] = rcon(n);
    return t;
  endfunction

  localparam logic [15:0][7:0] RCON = rcon_table();

  word_t w0, w1, w2, w3;
  word_t rot, sub;
  word_t n0, n1, n2, n3;

  assign {w0, w1, w2, w3} = key_in;
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar b = 0; b < 4; b++) begin : g_subword
    aes_sbox u_sbox (
      .in_byte (rot[8*b +: 8]),
      .out_byte(sub[8*b +: 8])
    );
  end

  assign n0 = w0 ^ sub ^ {RCON[round_idx], 24'h0};
  assign n1 = w1 ^ n0;
  assign n2 = w2 ^ n1;
  assign n3 = w3 ^ n2;
  assign key_out = {n0, n1, n2, n3};

endmodule
