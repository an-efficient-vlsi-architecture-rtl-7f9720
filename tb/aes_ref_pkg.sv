// aes_ref_pkg: behavioural AES-128 reference model for the testbenches.
//
// Written independently of the RTL: the S-box inverse is x^254 by
// square-and-multiply with a bit-serial GF(2^8) multiplier, the affine map is
// evaluated bit by bit, MixColumns uses the general multiplier, and the key
// schedule is the textbook 44-word array. Blocks use the same byte order as the
// RTL: byte i of the input sequence is bits [127-8*i -: 8].
package aes_ref_pkg;

  typedef logic [127:0] blk_t;

  function automatic logic [7:0] ref_gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa, bb;
    p = 0; aa = a; bb = b;
    for (int i = 0; i < 8; i++) begin
      if (bb[0]) p ^= aa;
      aa = aa[7] ? ((aa << 1) ^ 8'h1b) : (aa << 1);
      bb >>= 1;
    end
    return p;
  endfunction

  function automatic logic [7:0] ref_ginv(input logic [7:0] x);
    logic [7:0] r, base;
    int e;
    r = 8'h01; base = x; e = 254;
    while (e > 0) begin
      if (e & 1) r = ref_gmul(r, base);
      base = ref_gmul(base, base);
      e >>= 1;
    end
    return r;   // 0^254 = 0
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] x);
    logic [7:0] b, s, c;
    b = ref_ginv(x); c = 8'h63;
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ c[i];
    return s;
  endfunction

  function automatic logic [7:0] ref_inv_sbox(input logic [7:0] y);
    for (int x = 0; x < 256; x++) if (ref_sbox(8'(x)) == y) return 8'(x);
    return 8'h00;
  endfunction

  function automatic logic [7:0] gb(input blk_t s, input int r, input int c);
    return s[127 - 8*(r + 4*c) -: 8];
  endfunction

  function automatic blk_t ref_sub_bytes(input blk_t s, input bit inv);
    blk_t o;
    for (int i = 0; i < 16; i++)
      o[127 - 8*i -: 8] = inv ? ref_inv_sbox(s[127 - 8*i -: 8]) : ref_sbox(s[127 - 8*i -: 8]);
    return o;
  endfunction

  function automatic blk_t ref_shift_rows(input blk_t s, input bit inv);
    blk_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[127 - 8*(r + 4*c) -: 8] = inv ? gb(s, r, (c - r + 4) % 4) : gb(s, r, (c + r) % 4);
    return o;
  endfunction

  function automatic blk_t ref_mix_columns(input blk_t s, input bit inv);
    blk_t o;
    logic [7:0] m [4];
    m = inv ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        logic [7:0] acc;
        acc = 0;
        for (int k = 0; k < 4; k++) acc ^= ref_gmul(m[(k - r + 4) % 4], gb(s, k, c));
        o[127 - 8*(r + 4*c) -: 8] = acc;
      end
    return o;
  endfunction

  // Round constant of key-expansion step n (n = 1..10).
  function automatic logic [7:0] ref_rcon(input int n);
    logic [7:0] r;
    r = 8'h01;
    for (int i = 1; i < n; i++) r = ref_gmul(r, 8'h02);
    return r;
  endfunction

  // Round key n (n = 0..10) of the AES-128 key expansion.
  function automatic blk_t ref_round_key(input blk_t key, input int n);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0] rc;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    rc = 8'h01;
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        t ^= {rc, 24'h0};
        rc = ref_gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    return {w[4*n], w[4*n+1], w[4*n+2], w[4*n+3]};
  endfunction

  function automatic blk_t ref_encrypt(input blk_t pt, input blk_t key);
    blk_t s;
    s = pt ^ ref_round_key(key, 0);
    for (int n = 1; n <= 10; n++) begin
      s = ref_shift_rows(ref_sub_bytes(s, 0), 0);
      if (n < 10) s = ref_mix_columns(s, 0);
      s ^= ref_round_key(key, n);
    end
    return s;
  endfunction

  function automatic blk_t ref_decrypt(input blk_t ct, input blk_t key);
    blk_t s;
    s = ct ^ ref_round_key(key, 10);
    for (int n = 9; n >= 0; n--) begin
      s = ref_sub_bytes(ref_shift_rows(s, 1), 1);
      s ^= ref_round_key(key, n);
      if (n > 0) s = ref_mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic blk_t rand_blk();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

endpackage
