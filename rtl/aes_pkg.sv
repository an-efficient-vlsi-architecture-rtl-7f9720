// aes_pkg: types, constants and GF(2^8) helpers shared by the AES-128 blocks.
//
// A 128-bit block is held as one packed vector. Byte i of the input sequence
// sits at bits [127-8*i -: 8], and the 4x4 state byte s[r][c] (row r, column c)
// is byte r+4*c, so a column is one 32-bit word and the first word w0 is the
// leftmost one. This byte order is that of the AES standard (FIPS-197); the
// document only draws the state as a 4x4 array.
//
// The forward and inverse S-box tables are not typed in: they are computed at
// elaboration by constant functions from the formula of the cipher. The S-box of
// x is the affine map b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63
// applied to b = x^-1 in GF(2^8) modulo x^8+x^4+x^3+x+1 (0 maps to 0). The
// inverse is found from exponent and logarithm tables built with generator 3.
// In hardware each table becomes a 256 x 8 ROM.
package aes_pkg;

  localparam int unsigned NB = 4;   // columns of the state
  localparam int unsigned NK = 4;   // words of an AES-128 cipher key
  localparam int unsigned NR = 10;  // rounds of AES-128

  typedef logic [7:0]   u8_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  typedef logic [255:0][7:0] sbox_table_t;

  // Multiplication by x (that is, by 2) in GF(2^8).
  function automatic u8_t xtime(input u8_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Round constant of key-expansion step n (n = 1..10): x^(n-1) in GF(2^8).
  function automatic u8_t rcon(input int unsigned n);
    u8_t r;
    r = 8'h01;
    for (int unsigned i = 1; i < n; i++) r = xtime(r);
    return r;
  endfunction

  // Round constants indexed by key-expansion step number; entry 0 is unused.
  function automatic logic [15:0][7:0] gen_rcon_table();
    logic [15:0][7:0] t;
    t = '0;
    for (int unsigned n = 1; n < 16; n++) t[n] = rcon(n);
    return t;
  endfunction

  localparam logic [15:0][7:0] RCON_TABLE = gen_rcon_table();

  function automatic u8_t rotl8(input u8_t b, input int unsigned n);
    return u8_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic sbox_table_t gen_sbox();
    sbox_table_t ex, lg, tab;
    u8_t p, inv;
    p  = 8'h01;
    ex = '0;
    lg = '0;
    for (int i = 0; i < 255; i++) begin
      ex[i] = p;
      lg[p] = u8_t'(i);
      p     = p ^ xtime(p);             // multiply by generator 3
    end
    for (int x = 0; x < 256; x++) begin
      if (x == 0) inv = 8'h00;
      else        inv = ex[(255 - int'(lg[x])) % 255];
      tab[x] = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
    end
    return tab;
  endfunction

  function automatic sbox_table_t gen_inv_sbox();
    sbox_table_t fwd, tab;
    fwd = gen_sbox();
    tab = '0;
    for (int x = 0; x < 256; x++) tab[fwd[x]] = u8_t'(x);
    return tab;
  endfunction

  localparam sbox_table_t SBOX     = gen_sbox();
  localparam sbox_table_t INV_SBOX = gen_inv_sbox();

  // Byte i of a block (i = r + 4*c for state byte s[r][c]).
  function automatic u8_t blk_byte(input block_t b, input int unsigned i);
    return b[127 - 8*i -: 8];
  endfunction

  function automatic word_t sub_word(input word_t w);
    return {SBOX[w[31:24]], SBOX[w[23:16]], SBOX[w[15:8]], SBOX[w[7:0]]};
  endfunction

  function automatic word_t rot_word(input word_t w);
    return {w[23:0], w[31:24]};
  endfunction

endpackage
