// aes_dec_pipeline: round-unrolled, fully pipelined AES-128 decryption.
//
// The same structure as aes_enc_pipeline, with the document's decryption round
// (InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns) in each of the ten
// stages. The keys are again produced on the fly, one stage ahead of the round
// that uses them, but the key schedule runs backwards: the block enters with
// the round-10 key (the last round key of encryption, available from
// aes_enc_pipeline's last_key_o), and each stage derives the key of the round
// before. Taking the last round key as the decryption key is this design's
// choice; the document does not say how decryption obtains its keys.
//
//   input  : AddRoundKey with round key 10, and the backward step to key 9
//   stage i: register {valid, state, round key 10-i}, then decryption round i
//   output : register after round 10
//
// Interface: ld_i accepts {ciphertext_i, last_key_i} on a rising edge; no
// back-pressure. valid_o marks plaintext_o. cipher_key_o is the recovered
// round-0 key, i.e. the original cipher key of the same block.
//
// Timing: latency NR+1 = 11 cycles, one block per cycle. Only the
// valid bits are reset (active-low, sync).
module aes_dec_pipeline
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ld_i,
  input  block_t ciphertext_i,
  input  block_t last_key_i,
  output logic   valid_o,
  output block_t plaintext_o,
  output block_t cipher_key_o
);

  typedef struct packed {
    logic   valid;
    block_t state;
    block_t key;
  } stage_t;

  stage_t stg [1:NR];
  block_t rnd_state [1:NR];
  block_t rnd_key   [1:NR];
  block_t s0, k9;

  aes_add_round_key u_ark0 (.state_i(ciphertext_i), .round_key_i(last_key_i), .state_o(s0));
  aes_key_step #(.INVERSE(1'b1)) u_iks0 (.key_i(last_key_i), .rcon_i(rcon(NR)), .key_o(k9));

  for (genvar i = 1; i <= NR; i++) begin : g_round
    // Decryption round i uses round key NR-i, produced by forward step NR-i.
    aes_dec_round u_round (
      .state_i   (stg[i].state),
      .key_i     (stg[i].key),
      .rcon_i    ((i < NR) ? rcon(NR - i) : 8'h00),
      .last_i    (i == NR),
      .state_o   (rnd_state[i]),
      .key_next_o(rnd_key[i])
    );
  end

  always_ff @(posedge clk) begin
    stg[1].state <= s0;
    stg[1].key   <= k9;
    for (int i = 1; i < NR; i++) begin
      stg[i+1].state <= rnd_state[i];
      stg[i+1].key   <= rnd_key[i];
    end
    plaintext_o  <= rnd_state[NR];
    cipher_key_o <= stg[NR].key;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 1; i <= NR; i++) stg[i].valid <= 1'b0;
      valid_o <= 1'b0;
    end else begin
      stg[1].valid <= ld_i;
      for (int i = 1; i < NR; i++) stg[i+1].valid <= stg[i].valid;
      valid_o <= stg[NR].valid;
    end
  end

endmodule
