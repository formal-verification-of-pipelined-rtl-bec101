// aes128_top: the two AES-128 encryptors of this design, side by side.
//
//  * aes128_pipe - the main design: AES-128 unrolled into ten pipeline
//    stages, one block in and one block out per clock, latency 10 clocks.
//  * aes128_seq  - the iterative implementation: one round unit reused
//    for ten rounds, one block per 10 clocks plus the load clock.
//
// Both compute the same function, AES-128 encryption (FIPS-197), and the
// pipelined core is meant to be checked against the sequential one, which
// in turn is checked against an algorithmic model of AES. The two cores
// share nothing but clock and reset; each keeps its own ports (prefix pipe_
// and seq_), so either can be used alone or both fed the same blocks and
// compared. Port timing is that of the two cores (see their headers).
module aes128_top
  import aes_pkg::*;
(
  input  logic   clk_i,
  input  logic   rst_ni,
  // pipelined encryptor
  input  logic   pipe_in_valid,
  input  state_t pipe_plaintext,
  input  key_t   pipe_key,
  output logic   pipe_out_valid,
  output state_t pipe_ciphertext,
  // sequential encryptor
  input  logic   seq_start,
  input  state_t seq_plaintext,
  input  key_t   seq_key,
  output logic   seq_busy,
  output logic   seq_done,
  output state_t seq_ciphertext
);

  aes128_pipe u_pipe (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .in_valid  (pipe_in_valid),
    .plaintext (pipe_plaintext),
    .key       (pipe_key),
    .out_valid (pipe_out_valid),
    .ciphertext(pipe_ciphertext)
  );

  aes128_seq u_seq (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .start     (seq_start),
    .plaintext (seq_plaintext),
    .key       (seq_key),
    .busy      (seq_busy),
    .done      (seq_done),
    .ciphertext(seq_ciphertext)
  );

endmodule
