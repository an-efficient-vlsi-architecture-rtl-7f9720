// aes_dec_round: one AES decryption round together with the backward key step.
//
// The state passes InvShiftRows, InvSubBytes, AddRoundKey and InvMixColumns in
// that order, which is the order of the document's decryption flow; when
// last_i is set (round 10) InvMixColumns is left out. In parallel the round key
// of this round (key_i) is run one step back through the key schedule to give
// the key of the next decryption round (key_next_o), so decryption keys are
// produced on the fly in the same overlapped way as for encryption. Running the
// schedule backwards is this design's choice: the document shows a key schedule
// feeding the decryption rounds but does not say how it produces the keys in
// reverse order.
//
// rcon_i is the constant of the forward expansion step that produced key_i,
// i.e. rcon(10-i) in decryption round i.
//
// Purely combinational.
module aes_dec_round
  import aes_pkg::*;
(
  input  block_t state_i,
  input  block_t key_i,
  input  u8_t    rcon_i,
  input  logic   last_i,
  output block_t state_o,
  output block_t key_next_o
);

  block_t isr, isb, ark, imc;

  aes_shift_rows    #(.INVERSE(1'b1)) u_isr (.state_i(state_i), .state_o(isr));
  aes_sub_bytes     #(.INVERSE(1'b1)) u_isb (.state_i(isr),     .state_o(isb));
  aes_add_round_key                   u_ark (.state_i(isb), .round_key_i(key_i), .state_o(ark));
  aes_mix_columns   #(.INVERSE(1'b1)) u_imc (.state_i(ark),     .state_o(imc));

  assign state_o = last_i ? ark : imc;

  aes_key_step #(.INVERSE(1'b1)) u_iks (.key_i(key_i), .rcon_i(rcon_i), .key_o(key_next_o));

endmodule
