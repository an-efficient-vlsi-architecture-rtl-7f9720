// tb_aes_enc_iter: runs the round-iterative encryption core.
// Checks the reset step (ready low during reset, high one edge after), the known-answer
// vectors of the AES standard, and random blocks under random keys, each
// against the reference model. Blocks start either from the wait state after a
// random idle time or back to back (ld high during r10). The testbench also
// raises ld with garbage data while the core is busy, which must be ignored.
// Timing checked: done 12 cycles after the accepting ld cycle, and 11 cycles
// between blocks back to back. Inputs change on the falling edge.
module tb_aes_enc_iter;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int NBLOCKS = 120;
  localparam int WATCHDOG_CYCLES = 20000;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   rst_n, ld, ready, done;
  block_t pt, key, ct;

  aes_enc_iter dut (.clk(clk), .rst_n(rst_n), .ld_i(ld), .plaintext_i(pt), .key_i(key),
                    .ready_o(ready), .done_o(done), .ciphertext_o(ct));

  typedef struct { block_t ct; int sent; bit b2b; } exp_t;
  exp_t q [$];
  int cyc = 0, sent = 0, received = 0, from_wait = 0, back_to_back = 0, ignored = 0;
  int last_done = -100;

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n && done) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL unexpected done");
      end else begin
        e = q.pop_front();
        if (ct !== e.ct) begin
          failures++; $display("FAIL ciphertext %h expected %h", ct, e.ct);
        end
        checks++;
        if (cyc - e.sent != 12) begin
          failures++; $display("FAIL latency %0d", cyc - e.sent);
        end
        if (e.b2b) begin
          checks++;
          if (cyc - last_done != 11) begin
            failures++; $display("FAIL back-to-back interval %0d", cyc - last_done);
          end
        end
      end
      last_done = cyc;
      received++;
    end
  end

  initial begin
    bit after_reset_ok;
    rst_n = 1'b0; ld = 1'b0; pt = '0; key = '0;
    repeat (3) @(negedge clk);
    after_reset_ok = !ready;          // reset step
    rst_n = 1'b1;
    @(negedge clk);
    after_reset_ok &= ready;          // waiting for ld
    checks++;
    if (!after_reset_ok) begin
      failures++; $display("FAIL reset / wait sequence");
    end
    while (sent < NBLOCKS) begin
      if (ready) begin
        bit in_r10, go;
        in_r10 = (q.size() != 0) && !done;
        go = in_r10 ? ($urandom_range(1) == 1) : ($urandom_range(2) == 0);
        if (sent < 2) go = 1'b1;
        ld = go;
        if (sent == 0) begin
          pt = 128'h3243f6a8885a308d313198a2e0370734; key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
        end else if (sent == 1) begin
          pt = 128'h00112233445566778899aabbccddeeff; key = 128'h000102030405060708090a0b0c0d0e0f;
        end else begin
          pt = rand_blk(); key = rand_blk();
        end
        if (go) begin
          q.push_back('{ref_encrypt(pt, key), cyc, in_r10});
          if (sent == 0 && q[$].ct != 128'h3925841d02dc09fbdc118597196a0b32) begin
            failures++; $display("FAIL reference model");
          end
          if (in_r10) back_to_back++; else from_wait++;
          sent++;
        end
      end else begin
        ld = ($urandom_range(3) == 0);
        if (ld) ignored++;
        pt = rand_blk(); key = rand_blk();
      end
      @(negedge clk);
    end
    ld = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (received != NBLOCKS) begin
      failures++; $display("FAIL received %0d of %0d", received, NBLOCKS);
    end
    checks++;
    if (from_wait == 0 || back_to_back == 0 || ignored == 0) begin
      failures++; $display("FAIL a start mode never happened");
    end
    $display("blocks=%0d from_wait=%0d back_to_back=%0d ignored_ld=%0d", received, from_wait,
             back_to_back, ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
