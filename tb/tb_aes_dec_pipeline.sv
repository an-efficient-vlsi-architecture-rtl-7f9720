// tb_aes_dec_pipeline: streams blocks through the decryption pipeline.
// Each block is a ciphertext produced by the reference model under its own
// random key, entered with that key's round-10 key. The pipeline must return
// the plaintext and recover the cipher key, with a latency of 11 cycles and one
// block per cycle in bursts. The standard's two known-answer vectors go first.
// Inputs change on the falling edge.
module tb_aes_dec_pipeline;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int LATENCY = 11;
  localparam int NBLOCKS = 300;
  localparam int WATCHDOG_CYCLES = 20000;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   rst_n, ld, valid;
  block_t ct, lk, pt, ck;

  aes_dec_pipeline dut (.clk(clk), .rst_n(rst_n), .ld_i(ld), .ciphertext_i(ct), .last_key_i(lk),
                        .valid_o(valid), .plaintext_o(pt), .cipher_key_o(ck));

  typedef struct { block_t pt; block_t key; int sent; } exp_t;
  exp_t q [$];
  int cyc = 0, received = 0, run = 0, max_run = 0;

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

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n && valid) begin
      exp_t e;
      run++;
      if (run > max_run) max_run = run;
      if (q.size() == 0) begin
        failures++; checks++;
        $display("FAIL unexpected output %h", pt);
      end else begin
        e = q.pop_front();
        chk("plaintext", pt, e.pt);
        chk("cipher key", ck, e.key);
        checks++;
        if (cyc - e.sent != LATENCY) begin
          failures++;
          $display("FAIL latency %0d", cyc - e.sent);
        end
      end
      received++;
    end else run = 0;
  end

  task automatic send_ct(input block_t c, input block_t k, input block_t p);
    @(negedge clk);
    ld = 1'b1; ct = c; lk = ref_round_key(k, 10);
    q.push_back('{p, k, cyc});
  endtask

  task automatic send(input block_t p, input block_t k);
    send_ct(ref_encrypt(p, k), k, p);
  endtask

  task automatic idle();
    @(negedge clk);
    ld = 1'b0; ct = rand_blk(); lk = rand_blk();
  endtask

  initial begin
    rst_n = 1'b0; ld = 1'b0; ct = '0; lk = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send_ct(128'h3925841d02dc09fbdc118597196a0b32, 128'h2b7e151628aed2a6abf7158809cf4f3c,
            128'h3243f6a8885a308d313198a2e0370734);
    send_ct(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h000102030405060708090a0b0c0d0e0f,
            128'h00112233445566778899aabbccddeeff);
    idle();
    for (int n = 0; n < 30; n++) send(rand_blk(), rand_blk());
    idle();
    for (int n = 32; n < NBLOCKS; ) begin
      int b = 1 + int'($urandom_range(7));
      for (int j = 0; j < b && n < NBLOCKS; j++, n++) send(rand_blk(), rand_blk());
      repeat ($urandom_range(3)) idle();
    end
    idle();
    repeat (LATENCY + 3) @(negedge clk);
    checks++;
    if (received != NBLOCKS || q.size() != 0) begin
      failures++; $display("FAIL received %0d of %0d", received, NBLOCKS);
    end
    checks++;
    if (max_run < 30) begin
      failures++; $display("FAIL longest back-to-back output run %0d", max_run);
    end
    $display("blocks=%0d longest_run=%0d", received, max_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
