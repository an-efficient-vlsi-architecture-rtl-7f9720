// tb_aes_key_step: checks the forward and backward key-expansion steps over whole schedules.
// Reference values come from aes_ref_pkg (an independent behavioural model)
// and from the worked example of the AES standard (FIPS-197 Appendix B).
// A watchdog ends the run with a failure if it does not finish in time.
module tb_aes_key_step;
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
  block_t kin, kf, kb_in, kb;
  u8_t rc;
  aes_key_step #(.INVERSE(1'b0)) dut_f (.key_i(kin),   .rcon_i(rc), .key_o(kf));
  aes_key_step #(.INVERSE(1'b1)) dut_b (.key_i(kb_in), .rcon_i(rc), .key_o(kb));

  initial begin
    // Round key 1 and 10 of the standard's example key.
    kin = 128'h2b7e151628aed2a6abf7158809cf4f3c; rc = 8'h01; kb_in = '0;
    #1 check("key step FIPS rk1", kf, 128'ha0fafe1788542cb123a339392a6c7605);
    check("ref rk10 FIPS", ref_round_key(kin, 10), 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    for (int t = 0; t < 20; t++) begin
      block_t key;
      key = (t == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : rand_blk();
      for (int n = 1; n <= 10; n++) begin
        kin   = ref_round_key(key, n - 1);
        kb_in = ref_round_key(key, n);
        rc    = ref_rcon(n);
        #1 check("key step fwd", kf, kb_in);
        check("key step back", kb, kin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
