// shift_rows: the AES ShiftRows step, pure wiring. The state is a 4x4 byte
// matrix filled column by column (byte 4*c+r is row r, column c, byte 0 in
// the top bits). Row 0 is kept, row 1 is rotated left by one column, row 2
// by two and row 3 by three: output (r,c) takes input (r,(c+r) mod 4).
module shift_rows
  import aes_pkg::state_t;
(
  input  state_t state_in,
  output state_t state_out
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        state_out[127-8*(4*c+r) -: 8] = state_in[127-8*(4*((c+r)%4)+r) -: 8];
      end
    end
  end

endmodule
