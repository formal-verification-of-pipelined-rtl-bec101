// aes_pkg: types, constants and GF(2^8) helpers shared by the AES-128 datapath.
//
// State layout. The 128-bit AES block is held as a packed vector whose most
// significant byte is input byte 0, exactly as the block is written in hex
// (FIPS-197 order). The bytes fill a 4x4 matrix column by column, so byte
// i = 4*col + row sits at bits [127-8*i -: 8]. A round key uses the same
// layout and is made of four 32-bit words w0..w3, w0 in the top bits.
//
// The S-box table is not typed in: sbox_table() computes it at elaboration
// time from its definition, the multiplicative inverse in GF(2^8) modulo
// x^8+x^4+x^3+x+1 followed by the AES affine map. The round constants are
// successive powers of x in the same field. SBOX is a package constant, so it
// is worked out once however many S-boxes are instantiated.
package aes_pkg;

  localparam int unsigned NR       = 10;   // rounds of AES-128
  localparam int unsigned BLOCK_W  = 128;  // plaintext / ciphertext width
  localparam int unsigned KEY_W    = 128;  // cipher key width

  typedef logic [BLOCK_W-1:0] state_t;
  typedef logic [KEY_W-1:0]   key_t;
  typedef logic [31:0]        word_t;
  typedef logic [7:0]         byte_t;

  // Multiply by x modulo the AES polynomial 0x11b.
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t rotl8(input byte_t b, input int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  // Entry x of the S-box is bits [8*x +: 8]. The inverse of x is found from
  // exp/log tables of the generator 3: inv(3^i) = 3^(255-i), inv(0) = 0.
  // The affine map is b ^ rotl(b,1..4) ^ 0x63.
  function automatic logic [255:0][7:0] sbox_table();
    logic [255:0][7:0] t;
    byte_t exp_t [256];
    byte_t log_t [256];
    byte_t e, b;
    e = 8'h01;
    for (int i = 0; i < 256; i++) log_t[i] = '0;
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = e;
      log_t[e] = byte_t'(i);
      e = xtime(e) ^ e;
    end
    for (int x = 0; x < 256; x++) begin
      b = (x == 0) ? 8'h00 : exp_t[(255 - int'(log_t[x])) % 255];
      t[x] = b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
    end
    return t;
  endfunction

  localparam logic [255:0][7:0] SBOX = sbox_table();

  // Round constant of round n (1..10): x^(n-1) in GF(2^8).
  function automatic byte_t rcon(input int unsigned n);
    byte_t r;
    r = 8'h01;
    for (int unsigned i = 1; i < n; i++) r = xtime(r);
    return r;
  endfunction

  // Byte i (0..15, FIPS order) of a state.
  function automatic byte_t get_byte(input state_t s, input int unsigned i);
    return s[BLOCK_W-1-8*i -: 8];
  endfunction

endpackage
