// sub_bytes: the AES SubBytes step. Each of the 16 bytes of the state goes
// through its own S-box (aes_sbox), all in parallel, so the step is purely
// combinational with no latency. Byte positions are unchanged.
module sub_bytes
  import aes_pkg::*;
(
  input  state_t state_in,
  output state_t state_out
);

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_sbox u_sbox (
      .in_byte (state_in [8*i +: 8]),
      .out_byte(state_out[8*i +: 8])
    );
  end

endmodule
