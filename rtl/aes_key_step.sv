// aes_key_step: one step of the AES-128 key expansion, from the round key of
// round n to that of round n+1 (or back from n+1 to n when INVERSE = 1).
//
// Forward, as in the document's key-expansion figure: with the four words
// w[4n..4n+3] of round key n, the temporary word
//   t = SubWord(RotWord(w[4n+3])) ^ {rcon, 24'h0}
// gives w[4n+4] = w[4n] ^ t, and each further word is the previous new word
// XORed with the word four positions back. The round constant is an input so
// that one block serves every step; rcon for step n -> n+1 is x^n in GF(2^8).
//
// Inverse (this design's own addition, used by the decryption pipeline to run
// the key schedule backwards from the last round key): the same equations
// solved for the older words,
//   w[4n+3] = w[4n+7] ^ w[4n+6], w[4n+2] = w[4n+6] ^ w[4n+5],
//   w[4n+1] = w[4n+5] ^ w[4n+4], w[4n]   = w[4n+4] ^ t(w[4n+3]).
// Here key_i is round key n+1, key_o is round key n, and rcon_i is the constant
// of the forward step n -> n+1.
//
// Purely combinational: four S-box lookups and a few XORs.
module aes_key_step
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t key_i,
  input  u8_t    rcon_i,
  output block_t key_o
);

  word_t w0, w1, w2, w3;
  word_t n0, n1, n2, n3;
  word_t t;

  assign {w0, w1, w2, w3} = key_i;

  always_comb begin
    if (!INVERSE) begin
      t  = sub_word(rot_word(w3)) ^ {rcon_i, 24'h0};
      n0 = w0 ^ t;
      n1 = w1 ^ n0;
      n2 = w2 ^ n1;
      n3 = w3 ^ n2;
    end else begin
      n3 = w3 ^ w2;
      n2 = w2 ^ w1;
      n1 = w1 ^ w0;
      t  = sub_word(rot_word(n3)) ^ {rcon_i, 24'h0};
      n0 = w0 ^ t;
    end
  end

  assign key_o = {n0, n1, n2, n3};

endmodule
