// aes_ref_pkg: an algorithmic AES-128 model used as the reference by the
// testbenches. It is written independently of the RTL: the S-box is
// generated with the classic walk over the multiplicative group (p runs
// through powers of 3 while q runs through powers of its inverse), the key
// schedule is expanded in full into 44 words, and the state is a 4x4 byte
// matrix. Byte order is FIPS-197: byte 0 of a block is its top byte, and
// bytes fill the matrix column by column.
package aes_ref_pkg;

  typedef logic [7:0] b8;
  typedef b8 mat_t [4][4];   // [row][col]

  function automatic b8 ref_mul(input b8 a, input b8 b);
    b8 r;
    r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return r;
  endfunction

  function automatic b8 ref_sbox(input b8 x);
    b8 p, q, s;
    b8 tab [256];
    p = 1; q = 1;
    do begin
      p = p ^ (p << 1) ^ (p[7] ? 8'h1b : 8'h00);       // p *= 3
      q ^= q << 1; q ^= q << 2; q ^= q << 4;           // q /= 3
      if (q[7]) q ^= 8'h09;
      s = q ^ {q[6:0], q[7]} ^ {q[5:0], q[7:6]} ^ {q[4:0], q[7:5]} ^ {q[3:0], q[7:4]};
      tab[p] = s ^ 8'h63;
    end while (p != 1);
    tab[0] = 8'h63;
    return tab[x];
  endfunction

  function automatic mat_t to_mat(input logic [127:0] v);
    mat_t m;
    for (int i = 0; i < 16; i++) m[i%4][i/4] = v[127-8*i -: 8];
    return m;
  endfunction

  function automatic logic [127:0] from_mat(input mat_t m);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127-8*i -: 8] = m[i%4][i/4];
    return v;
  endfunction

  function automatic logic [127:0] ref_sub_bytes(input logic [127:0] v);
    logic [127:0] o;
    for (int i = 0; i < 16; i++) o[8*i +: 8] = ref_sbox(v[8*i +: 8]);
    return o;
  endfunction

  function automatic logic [127:0] ref_shift_rows(input logic [127:0] v);
    mat_t m, o;
    m = to_mat(v);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) o[r][c] = m[r][(c + r) % 4];
    return from_mat(o);
  endfunction

  function automatic logic [127:0] ref_mix_columns(input logic [127:0] v);
    mat_t m, o;
    b8 coef [4] = '{8'h02, 8'h03, 8'h01, 8'h01};
    m = to_mat(v);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[r][c] = 0;
        for (int k = 0; k < 4; k++) o[r][c] ^= ref_mul(coef[(k - r + 4) % 4], m[k][c]);
      end
    return from_mat(o);
  endfunction

  // Round keys 0..10 of a cipher key.
  typedef logic [127:0] rk_t [11];
  function automatic rk_t ref_key_schedule(input logic [127:0] key);
    logic [31:0] w [44];
    logic [31:0] t;
    b8 rc;
    rk_t rk;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    rc = 1;
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = ref_mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic logic [127:0] ref_encrypt(input logic [127:0] pt, input logic [127:0] key);
    rk_t rk;
    logic [127:0] s;
    rk = ref_key_schedule(key);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = ref_shift_rows(ref_sub_bytes(s));
      if (r != 10) s = ref_mix_columns(s);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
