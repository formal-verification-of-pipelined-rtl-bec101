// aes128_seq: iterative AES-128 encryption with a single round unit.
//
// One aes_round and one key_expand_step are reused for all ten rounds. On
// start (accepted only while idle) the core loads plaintext XOR key into the
// state register and the cipher key into the round-key register. On each
// of the next ten clocks it derives the next round key and applies one
// round to the state; in the tenth, MixColumns is bypassed. After the tenth
// round done pulses for one clock and ciphertext holds the result until the
// next start. Only the key of the current round is kept, so no key schedule
// is stored.
//
// Interface: start/plaintext/key sampled on a rising clk_i when busy is low;
// busy is high from the clock after start until done; done is high in the
// clock after the last round, NR = 10 clocks after start was taken.
// A start while busy is ignored. rst_ni is asynchronous, active low.
//
// The iterative structure, one round per clock on the same round hardware,
// follows the published sequential AES-128 architecture this RTL is
// modelled on. Computing round keys on the fly rather than expanding the
// whole schedule first, the start/busy/done handshake and the timing are
// choices of this design.
module aes128_seq
  import aes_pkg::*;
(
  input  logic   clk_i,
  input  logic   rst_ni,
  input  logic   start,
  input  state_t plaintext,
  input  key_t   key,
  output logic   busy,
  output logic   done,
  output state_t ciphertext
);

  typedef enum logic {S_IDLE, S_RUN} fsm_e;

  fsm_e       fsm_q;
  logic [3:0] round_q;
  state_t     state_q, whitened, round_out;
  key_t       rkey_q, rkey_next;

  add_round_key u_whiten (
    .state_in (plaintext),
    .round_key(key),
    .state_out(whitened)
  );

  key_expand_step u_key (
    .key_in   (rkey_q),
    .round_idx(round_q),
    .key_out  (rkey_next)
  );

  aes_round u_round (
    .state_in  (state_q),
    .round_key (rkey_next),
    .last_round(round_q == 4'(NR)),
    .state_out (round_out)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      fsm_q   <= S_IDLE;
      round_q <= '0;
      done    <= 1'b0;
      state_q <= '0;
      rkey_q  <= '0;
    end else begin
      done <= 1'b0;
      unique case (fsm_q)
        S_IDLE: if (start) begin
          state_q <= whitened;
          rkey_q  <= key;
          round_q <= 4'd1;
          fsm_q   <= S_RUN;
        end
        S_RUN: begin
          state_q <= round_out;
          rkey_q  <= rkey_next;
          round_q <= round_q + 4'd1;
          if (round_q == 4'(NR)) begin
            fsm_q <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: fsm_q <= S_IDLE;
      endcase
    end
  end

  assign busy       = (fsm_q == S_RUN);
  assign ciphertext = state_q;

  // The round counter stays within 1..NR while the core runs.
  // Reset clears the state machine, so busy is low during reset.
  a_round_range: assert property (@(posedge clk_i)
    busy |-> (round_q >= 4'd1 && round_q <= 4'(NR)))
    else $error("aes128_seq: round counter out of range");

endmodule
