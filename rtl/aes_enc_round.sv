// aes_enc_round: one AES encryption round together with the key-expansion step
// for the following round.
//
// The state passes SubBytes, ShiftRows, MixColumns and AddRoundKey in that
// order, as in the document's encryption flow; when last_i is set (round 10)
// MixColumns is left out. In parallel, and independent of the state path, the
// round key of this round (key_i) is expanded into the key of the next round
// (key_next_o). This is the document's central idea: key generation for round
// n+1 overlaps round n, so the key is already waiting in a register when the
// next round starts and is never on the round's critical path.
//
// last_i and rcon_i are inputs so that the same block serves a round-unrolled
// pipeline (where they are constants and fold away) and a round-iterative core.
// rcon_i is the round constant of the step from this round's key to the next.
//
// Purely combinational; the caller registers state and key.
module aes_enc_round
  import aes_pkg::*;
(
  input  block_t state_i,
  input  block_t key_i,
  input  u8_t    rcon_i,
  input  logic   last_i,
  output block_t state_o,
  output block_t key_next_o
);

  block_t sb, sr, mc, pre_ark;

  aes_sub_bytes     #(.INVERSE(1'b0)) u_sb (.state_i(state_i), .state_o(sb));
  aes_shift_rows    #(.INVERSE(1'b0)) u_sr (.state_i(sb),      .state_o(sr));
  aes_mix_columns   #(.INVERSE(1'b0)) u_mc (.state_i(sr),      .state_o(mc));

  assign pre_ark = last_i ? sr : mc;

  aes_add_round_key u_ark (.state_i(pre_ark), .round_key_i(key_i), .state_o(state_o));

  aes_key_step #(.INVERSE(1'b0)) u_ks (.key_i(key_i), .rcon_i(rcon_i), .key_o(key_next_o));

endmodule
