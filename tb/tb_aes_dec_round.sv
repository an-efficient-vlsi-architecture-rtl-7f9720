// tb_aes_dec_round: checks one decryption round and the backward key output.
// Reference values come from aes_ref_pkg (an independent behavioural model)
// and from the worked example of the AES standard (FIPS-197 Appendix B).
// A watchdog ends the run with a failure if it does not finish in time.
module tb_aes_dec_round;
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
  aes_dec_round dut (.state_i(st), .key_i(k), .rcon_i(rc), .last_i(last), .state_o(so), .key_next_o(kn));

  initial begin
    for (int n = 0; n < 200; n++) begin
      block_t key;
      int i;
      key = rand_blk(); st = rand_blk();
      i = 1 + int'($urandom_range(9));        // decryption round i uses key 10-i
      k = ref_round_key(key, 10 - i); last = (i == 10);
      rc = (i < 10) ? ref_rcon(10 - i) : 8'h00;
      #1 begin
        block_t e;
        e = ref_sub_bytes(ref_shift_rows(st, 1), 1) ^ k;
        if (!last) e = ref_mix_columns(e, 1);
        check("dec round rand", so, e);
        if (i < 10) check("dec round prev key", kn, ref_round_key(key, 9 - i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
