// aes_sub_bytes: the SubBytes step (or InvSubBytes when INVERSE = 1).
//
// Every one of the 16 state bytes is replaced by its entry in the 256-entry
// substitution table, as the document describes for SubBytes. The tables come
// from aes_pkg, where they are computed from the S-box formula at elaboration;
// each byte lane is one 256 x 8 ROM read. The inverse variant, used by the
// decryption rounds, reads the inverse table.
//
// Purely combinational: state_o follows state_i in the same cycle.
module aes_sub_bytes
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0   // 0: SubBytes, 1: InvSubBytes
) (
  input  block_t state_i,
  output block_t state_o
);

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      if (INVERSE) state_o[127 - 8*i -: 8] = INV_SBOX[state_i[127 - 8*i -: 8]];
      else         state_o[127 - 8*i -: 8] = SBOX[state_i[127 - 8*i -: 8]];
    end
  end

endmodule
