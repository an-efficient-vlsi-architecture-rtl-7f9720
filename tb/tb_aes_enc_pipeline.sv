// tb_aes_enc_pipeline: streams blocks through the encryption pipeline.
// The two known-answer vectors of the AES standard (FIPS-197 Appendix B and
// C.1) go first, then random plaintexts, each with its own random key, in
// bursts of back-to-back blocks separated by random gaps. Every output is
// compared with the reference model (ciphertext and round-10 key), the latency
// must be 11 cycles for every block, and a long burst must come out one block
// per cycle without a hole. Inputs change on the falling edge.
module tb_aes_enc_pipeline;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int LATENCY = 11;
  localparam int NBLOCKS = 400;
  localparam int WATCHDOG_CYCLES = 20000;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   rst_n, ld, valid;
  block_t pt, key, ct, lk;

  aes_enc_pipeline dut (.clk(clk), .rst_n(rst_n), .ld_i(ld), .plaintext_i(pt), .key_i(key),
                        .valid_o(valid), .ciphertext_o(ct), .last_key_o(lk));

  typedef struct { block_t ct; block_t lk; int sent; } exp_t;
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

  // Output monitor, on the falling edge.
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n && valid) begin
      exp_t e;
      run++;
      if (run > max_run) max_run = run;
      if (q.size() == 0) begin
        failures++; checks++;
        $display("FAIL unexpected output %h", ct);
      end else begin
        e = q.pop_front();
        chk("ciphertext", ct, e.ct);
        chk("last round key", lk, e.lk);
        checks++;
        if (cyc - e.sent != LATENCY) begin
          failures++;
          $display("FAIL latency %0d", cyc - e.sent);
        end
      end
      received++;
    end else run = 0;
  end

  task automatic send(input block_t p, input block_t k);
    @(negedge clk);
    ld = 1'b1; pt = p; key = k;
    q.push_back('{ref_encrypt(p, k), ref_round_key(k, 10), cyc});
  endtask

  task automatic idle();
    @(negedge clk);
    ld = 1'b0; pt = rand_blk(); key = rand_blk();
  endtask

  initial begin
    rst_n = 1'b0; ld = 1'b0; pt = '0; key = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c);
    send(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f);
    checks++;
    if (q[0].ct != 128'h3925841d02dc09fbdc118597196a0b32 ||
        q[1].ct != 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
      failures++; $display("FAIL reference model disagrees with the standard");
    end
    idle();
    // One long back-to-back burst, then random bursts and gaps.
    for (int n = 0; n < 40; n++) send(rand_blk(), rand_blk());
    idle();
    for (int n = 42; n < NBLOCKS; ) begin
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
    if (max_run < 40) begin
      failures++; $display("FAIL longest back-to-back output run %0d", max_run);
    end
    $display("blocks=%0d longest_run=%0d", received, max_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
