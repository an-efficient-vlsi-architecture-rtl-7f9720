// aes_top: AES-128 encryption/decryption accelerator.
//
// Three engines stand side by side, each with its own ports:
//   enc_* : aes_enc_pipeline, the ten-stage round-unrolled encryption pipeline
//           with on-the-fly key expansion (one block per clock, latency 11)
//   dec_* : aes_dec_pipeline, the matching decryption pipeline, which runs the
//           key schedule backwards from the last round key (one block per
//           clock, latency 11)
//   itr_* : aes_enc_iter, a one-round-per-clock encryption core with the same
//           overlapped key generation (one block per 11 clocks)
// The encryption pipeline's enc_last_key output is the key to give the
// decryption pipeline for blocks encrypted under the same cipher key.
//
// All engines share clk and a synchronous active-low reset rst_n. Inputs are
// sampled on the rising edge when the engine's ld input is high.
module aes_top
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // encryption pipeline
  input  logic   enc_ld,
  input  block_t enc_plaintext,
  input  block_t enc_key,
  output logic   enc_valid,
  output block_t enc_ciphertext,
  output block_t enc_last_key,
  // decryption pipeline
  input  logic   dec_ld,
  input  block_t dec_ciphertext,
  input  block_t dec_last_key,
  output logic   dec_valid,
  output block_t dec_plaintext,
  output block_t dec_cipher_key,
  // iterative encryption core
  input  logic   itr_ld,
  input  block_t itr_plaintext,
  input  block_t itr_key,
  output logic   itr_ready,
  output logic   itr_done,
  output block_t itr_ciphertext
);

  aes_enc_pipeline u_enc (
    .clk, .rst_n,
    .ld_i        (enc_ld),
    .plaintext_i (enc_plaintext),
    .key_i       (enc_key),
    .valid_o     (enc_valid),
    .ciphertext_o(enc_ciphertext),
    .last_key_o  (enc_last_key)
  );

  aes_dec_pipeline u_dec (
    .clk, .rst_n,
    .ld_i        (dec_ld),
    .ciphertext_i(dec_ciphertext),
    .last_key_i  (dec_last_key),
    .valid_o     (dec_valid),
    .plaintext_o (dec_plaintext),
    .cipher_key_o(dec_cipher_key)
  );

  aes_enc_iter u_itr (
    .clk, .rst_n,
    .ld_i        (itr_ld),
    .plaintext_i (itr_plaintext),
    .key_i       (itr_key),
    .ready_o     (itr_ready),
    .done_o      (itr_done),
    .ciphertext_o(itr_ciphertext)
  );

endmodule
