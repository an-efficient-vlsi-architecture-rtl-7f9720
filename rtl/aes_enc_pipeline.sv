// aes_enc_pipeline: round-unrolled, fully pipelined AES-128 encryption.
//
// The document's pipelined structure: a register in front of each of the ten
// rounds, one round per pipeline stage. The cipher key travels down the
// pipeline next to the data, and every stage expands the key for the following
// stage while it computes its own round with the key that is already in its
// register (round n overlaps key generation for round n+1). So each block may
// carry its own key, no key memory or key set-up phase is needed, and a new
// block can enter on every clock.
//
//   input  : initial AddRoundKey (plaintext ^ key) and the step to round key 1
//   stage r: register {valid, state, round key r}, then round r (r = 1..10),
//            which also produces round key r+1
//   output : register after round 10 (this design's choice; the document's
//            figure ends with the last round)
//
// Interface: ld_i accepts {plaintext_i, key_i} on a rising clock edge. There is
// no back-pressure: the pipeline never stalls. valid_o marks ciphertext_o.
// last_key_o is the round-10 key of the same block, which is the key the
// decryption pipeline starts from.
//
// Timing: a block accepted at edge t appears at the outputs after edge t+10, a
// latency of NR+1 = 11 clock cycles, and the throughput is one
// 128-bit block per cycle. Only the valid bits are reset (active-low, sync);
// the data registers need none.
module aes_enc_pipeline
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ld_i,
  input  block_t plaintext_i,
  input  block_t key_i,
  output logic   valid_o,
  output block_t ciphertext_o,
  output block_t last_key_o
);

  typedef struct packed {
    logic   valid;
    block_t state;
    block_t key;
  } stage_t;

  stage_t stg [1:NR];              // register in front of round r
  block_t rnd_state [1:NR];
  block_t rnd_key   [1:NR];
  block_t s0, k1;

  // Stage 0: initial AddRoundKey with the cipher key, and key step 0 -> 1.
  aes_add_round_key u_ark0 (.state_i(plaintext_i), .round_key_i(key_i), .state_o(s0));
  aes_key_step #(.INVERSE(1'b0)) u_ks0 (.key_i(key_i), .rcon_i(rcon(1)), .key_o(k1));

  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_enc_round u_round (
      .state_i   (stg[r].state),
      .key_i     (stg[r].key),
      .rcon_i    ((r < NR) ? rcon(r + 1) : 8'h00),
      .last_i    (r == NR),
      .state_o   (rnd_state[r]),
      .key_next_o(rnd_key[r])
    );
  end

  always_ff @(posedge clk) begin
    stg[1].state <= s0;
    stg[1].key   <= k1;
    for (int r = 1; r < NR; r++) begin
      stg[r+1].state <= rnd_state[r];
      stg[r+1].key   <= rnd_key[r];
    end
    ciphertext_o <= rnd_state[NR];
    last_key_o   <= stg[NR].key;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 1; r <= NR; r++) stg[r].valid <= 1'b0;
      valid_o <= 1'b0;
    end else begin
      stg[1].valid <= ld_i;
      for (int r = 1; r < NR; r++) stg[r+1].valid <= stg[r].valid;
      valid_o <= stg[NR].valid;
    end
  end

endmodule
