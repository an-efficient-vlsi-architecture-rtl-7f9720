// tb_aes_top: end-to-end test of the accelerator at its default configuration.
// Plaintext blocks enter the encryption pipeline in bursts and gaps; some runs
// of blocks share one key, others change the key on every block. Each
// ciphertext leaving the pipeline is fed, in the same cycle, into the
// decryption pipeline together with the round-10 key the encryption pipeline
// reports, and the decryption pipeline must return the original plaintext and
// cipher key. The same plaintext/key pairs are also pushed through the
// iterative core whenever it is ready, and its ciphertexts must match. All
// results are checked against the reference model, with latencies of 11
// cycles (pipelines) and 12 cycles (iterative core, from the ld cycle).
// Every mechanism must occur at least once: back-to-back pipeline input,
// pipeline bubble, key change between consecutive blocks, key reuse,
// decryption round trip, iterative start from wait, iterative back-to-back
// start, and an ld ignored by the busy iterative core.
module tb_aes_top;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int NBLOCKS = 300;
  localparam int WATCHDOG_CYCLES = 40000;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   rst_n;
  logic   enc_ld, enc_valid, dec_ld, dec_valid, itr_ld, itr_ready, itr_done;
  block_t enc_pt, enc_key, enc_ct, enc_lk, dec_ct, dec_lk, dec_pt, dec_ck;
  block_t itr_pt, itr_key, itr_ct;

  aes_top dut (.*,
    .enc_plaintext(enc_pt), .enc_key(enc_key), .enc_ciphertext(enc_ct), .enc_last_key(enc_lk),
    .dec_ciphertext(dec_ct), .dec_last_key(dec_lk), .dec_plaintext(dec_pt),
    .dec_cipher_key(dec_ck), .itr_plaintext(itr_pt), .itr_key(itr_key),
    .itr_ciphertext(itr_ct));

  // Encryption output feeds decryption input directly.
  assign dec_ld = enc_valid;
  assign dec_ct = enc_ct;
  assign dec_lk = enc_lk;

  typedef struct { block_t pt; block_t key; block_t ct; int sent; } blk_rec_t;
  blk_rec_t enc_q [$], dec_q [$], itr_q [$], itr_todo [$];
  int cyc = 0;
  int n_b2b = 0, n_bubble = 0, n_keychg = 0, n_keyreuse = 0, n_roundtrip = 0;
  int n_itr_wait = 0, n_itr_b2b = 0, n_itr_ignored = 0, n_itr_done = 0;

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic chk_lat(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s latency %0d expected %0d", what, got, exp);
    end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // Monitors.
  always @(negedge clk) begin
    if (rst_n && enc_valid) begin
      blk_rec_t e;
      e = enc_q.pop_front();
      chk("enc ciphertext", enc_ct, e.ct);
      chk("enc last key", enc_lk, ref_round_key(e.key, 10));
      chk_lat("enc", cyc - e.sent, 11);
      e.sent = cyc;                       // enters decryption in this cycle
      dec_q.push_back(e);
    end
    if (rst_n && dec_valid) begin
      blk_rec_t e;
      e = dec_q.pop_front();
      chk("dec plaintext", dec_pt, e.pt);
      chk("dec cipher key", dec_ck, e.key);
      chk_lat("dec", cyc - e.sent, 11);
      n_roundtrip++;
    end
    if (rst_n && itr_done) begin
      blk_rec_t e;
      e = itr_q.pop_front();
      chk("itr ciphertext", itr_ct, e.ct);
      chk_lat("itr", cyc - e.sent, 12);
      n_itr_done++;
    end
  end

  // Iterative-core driver: takes blocks from itr_todo whenever it is ready.
  initial begin
    itr_ld = 1'b0; itr_pt = '0; itr_key = '0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (itr_ready && itr_todo.size() != 0) begin
        blk_rec_t e;
        if (itr_q.size() != 0 && !itr_done) n_itr_b2b++; else n_itr_wait++;
        e = itr_todo.pop_front();
        itr_ld = 1'b1; itr_pt = e.pt; itr_key = e.key;
        e.sent = cyc;
        itr_q.push_back(e);
      end else begin
        itr_ld = !itr_ready && ($urandom_range(3) == 0);
        if (itr_ld) n_itr_ignored++;
        itr_pt = rand_blk(); itr_key = rand_blk();
      end
    end
  end

  // Encryption driver.
  initial begin
    block_t key;
    bit prev_sent;
    rst_n = 1'b0; enc_ld = 1'b0; enc_pt = '0; enc_key = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    prev_sent = 1'b0;
    for (int n = 0; n < NBLOCKS; ) begin
      @(negedge clk);
      if (n == 0 || $urandom_range(4) != 0) begin
        blk_rec_t e;
        if (n == 0) e.pt = 128'h3243f6a8885a308d313198a2e0370734;
        else        e.pt = rand_blk();
        if (n != 0 && $urandom_range(2) == 0) begin
          key = rand_blk(); n_keychg++;
        end else if (n != 0) n_keyreuse++;
        e.key = key;
        e.ct = ref_encrypt(e.pt, e.key);
        if (n == 0) chk("reference vector", e.ct, 128'h3925841d02dc09fbdc118597196a0b32);
        e.sent = cyc;
        enc_ld = 1'b1; enc_pt = e.pt; enc_key = e.key;
        enc_q.push_back(e);
        if (n % 8 == 0 && itr_todo.size() < 4) itr_todo.push_back(e);
        if (prev_sent) n_b2b++;
        prev_sent = 1'b1;
        n++;
      end else begin
        enc_ld = 1'b0; enc_pt = rand_blk(); enc_key = rand_blk();
        if (prev_sent) n_bubble++;
        prev_sent = 1'b0;
      end
    end
    @(negedge clk);
    enc_ld = 1'b0;
    wait (itr_todo.size() == 0 && itr_q.size() == 0 && enc_q.size() == 0 && dec_q.size() == 0);
    repeat (5) @(negedge clk);
    checks++;
    if (n_roundtrip != NBLOCKS) begin
      failures++; $display("FAIL round trips %0d of %0d", n_roundtrip, NBLOCKS);
    end
    $display("back_to_back=%0d bubbles=%0d key_changes=%0d key_reuse=%0d round_trips=%0d",
             n_b2b, n_bubble, n_keychg, n_keyreuse, n_roundtrip);
    $display("iter: done=%0d from_wait=%0d back_to_back=%0d ignored_ld=%0d",
             n_itr_done, n_itr_wait, n_itr_b2b, n_itr_ignored);
    checks++;
    if (n_b2b == 0 || n_bubble == 0 || n_keychg == 0 || n_keyreuse == 0 || n_roundtrip == 0 ||
        n_itr_wait == 0 || n_itr_b2b == 0 || n_itr_ignored == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
