// aes_sbox: the AES substitution box, one byte in, one byte out, purely
// combinational.
//
// The S-box maps a byte to the affine transform of its inverse in GF(2^8)
// (polynomial x^8+x^4+x^3+x+1). Rather than evaluating that arithmetic in
// logic, the 256-entry table is computed once at elaboration by
// aes_pkg::sbox_table() (the package constant SBOX) and the byte indexes
// it, which synthesises to a 256x8 lookup. Using a table is a choice of this design; the mapping itself
// is the standard AES S-box.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);

  assign out_byte = SBOX[in_byte];

endmodule
