// aes_add_round_key: the AddRoundKey step.
//
// All 128 state bits are XORed with the four 32-bit words of the current round
// key (words w[4n] .. w[4n+3] of the expanded key for round n), column c of the
// state with word w[4n+c], as the document describes. The step is its own
// inverse, so decryption uses the same block.
//
// Purely combinational.
module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t state_i,
  input  block_t round_key_i,
  output block_t state_o
);

  assign state_o = state_i ^ round_key_i;

endmodule
