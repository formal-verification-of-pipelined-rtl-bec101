// aes128_pipe: AES-128 encryption fully unrolled into a ten-stage pipeline.
//
// Every round has its own hardware. Stage 1 whitens the plaintext with the
// cipher key (AddRoundKey) and runs round 1; stages 2..9 run rounds 2..9;
// stage 10 runs the final round without MixColumns. Each stage also derives
// its round key from the key of the previous stage (key_expand_step), so the
// key travels down the pipeline next to its block: every block may use a
// different key, and no key schedule has to be precomputed or stored.
// A register bank at the end of each stage holds {valid, state, round key}.
//
// Interface: present plaintext and key with in_valid high for one clock to
// start a block. There is no back-pressure; a new block can enter on every
// clock, so up to ten blocks are in flight. The ciphertext appears on
// ciphertext with out_valid high exactly NR = 10 clocks after the block
// was taken, in input order. rst_ni (asynchronous, active low) clears only
// the valid bits; the data registers are don't-care while invalid.
//
// The round structure, the unrolling into one stage per round and the
// derivation of each stage's key from the previous stage's key follow the
// published pipelined AES-128 architecture this RTL is modelled on. Where
// the registers sit (one bank per round, after the round logic), the valid
// bit and the reset are choices of this design.
module aes128_pipe
  import aes_pkg::*;
(
  input  logic   clk_i,
  input  logic   rst_ni,
  input  logic   in_valid,
  input  state_t plaintext,
  input  key_t   key,
  output logic   out_valid,
  output state_t ciphertext
);

  typedef struct packed {
    state_t state;
    key_t   rkey;
  } stage_t;

  // Index 0 is the (unregistered) input; index n is the register after round n.
  stage_t          stg   [NR+1];
  logic   [NR:0]   vld;

  state_t whitened;

  add_round_key u_whiten (
    .state_in (plaintext),
    .round_key(key),
    .state_out(whitened)
  );

  assign stg[0].state = whitened;
  assign stg[0].rkey  = key;
  assign vld[0]       = in_valid;

  for (genvar n = 1; n <= NR; n++) begin : g_stage
    key_t   rkey_next;
    state_t state_next;

    key_expand_step u_key (
      .key_in   (stg[n-1].rkey),
      .round_idx(4'(n)),
      .key_out  (rkey_next)
    );

    aes_round u_round (
      .state_in  (stg[n-1].state),
      .round_key (rkey_next),
      .last_round(1'(n == NR)),
      .state_out (state_next)
    );

    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni) vld[n] <= 1'b0;
      else         vld[n] <= vld[n-1];
    end

    always_ff @(posedge clk_i) begin
      if (vld[n-1]) stg[n] <= '{state: state_next, rkey: rkey_next};
    end
  end

  assign out_valid  = vld[NR];
  assign ciphertext = stg[NR].state;

endmodule
