// tb_aes_add_round_key: checks AddRoundKey against the standard's example and random data.
// Reference values come from aes_ref_pkg (an independent behavioural model)
// and from the worked example of the AES standard (FIPS-197 Appendix B).
// A watchdog ends the run with a failure if it does not finish in time.
module tb_aes_add_round_key;
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
  block_t st, rk, out;
  aes_add_round_key dut (.state_i(st), .round_key_i(rk), .state_o(out));

  initial begin
    st = 128'h046681e5e0cb199a48f8d37a2806264c;
    rk = 128'ha0fafe1788542cb123a339392a6c7605;
    #1 check("ark FIPS", out, 128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int n = 0; n < 200; n++) begin
      logic [127:0] e;
      st = rand_blk(); rk = rand_blk();
      for (int i = 0; i < 128; i++) e[i] = st[i] != rk[i];
      #1 check("ark rand", out, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
