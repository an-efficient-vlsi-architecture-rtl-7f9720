// tb_aes_enc_round: checks one encryption round and the parallel next-key output.
// Reference values come from aes_ref_pkg (an independent behavioural model)
// and from the worked example of the AES standard (FIPS-197 Appendix B).
// A watchdog ends the run with a failure if it does not finish in time.
module tb_aes_enc_round;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  localparam int WATCHDOG_CYCLES = 100000;
  block_t st, k, so, kn;
  u8_t rc;
  logic last;
  aes_enc_round dut (.state_i(st), .key_i(k), .rcon_i(rc), .last_i(last), .state_o(so), .key_next_o(kn));

  initial begin
    // Round 1 of the standard's example: key input is round key 1.
    st = 128'h193de3bea0f4e22b9ac68d2ae9f84808; k = 128'ha0fafe1788542cb123a339392a6c7605;
    rc = 8'h02; last = 1'b0;
    #1 check("round1 FIPS", so, 128'ha49c7ff2689f352b6b5bea43026a5049);
    check("round1 next key", kn, ref_round_key(128'h2b7e151628aed2a6abf7158809cf4f3c, 2));
    for (int n = 0; n < 200; n++) begin
      block_t key;
      int r;
      key = rand_blk(); st = rand_blk();
      r = 1 + int'($urandom_range(9));
      k = ref_round_key(key, r); last = (r == 10);
      rc = (r < 10) ? ref_rcon(r + 1) : 8'h00;
      #1 begin
        block_t e;
        e = ref_shift_rows(ref_sub_bytes(st, 0), 0);
        if (!last) e = ref_mix_columns(e, 0);
        check("round rand", so, e ^ k);
        if (r < 10) check("round next key", kn, ref_round_key(key, r + 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
