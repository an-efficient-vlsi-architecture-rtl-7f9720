// tb_aes_sub_bytes: checks SubBytes and InvSubBytes on all 256 byte values and random states.
// Reference values come from aes_ref_pkg (an independent behavioural model)
// and from the worked example of the AES standard (FIPS-197 Appendix B).
// A watchdog ends the run with a failure if it does not finish in time.
module tb_aes_sub_bytes;
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
  block_t in, out_f, out_i;
  aes_sub_bytes #(.INVERSE(1'b0)) dut_f (.state_i(in),    .state_o(out_f));
  aes_sub_bytes #(.INVERSE(1'b1)) dut_i (.state_i(out_f), .state_o(out_i));

  initial begin
    // Example from the standard: state at the start of round 1.
    in = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    #1 check("sub_bytes FIPS", out_f, 128'hd42711aee0bf98f1b8b45de51e415230);
    // Every byte value in every lane.
    for (int v = 0; v < 256; v += 16) begin
      for (int i = 0; i < 16; i++) in[127 - 8*i -: 8] = 8'(v + i);
      #1 check("sub_bytes table", out_f, ref_sub_bytes(in, 0));
      check("inv_sub_bytes table", out_i, in);
    end
    for (int n = 0; n < 200; n++) begin
      in = rand_blk();
      #1 check("sub_bytes rand", out_f, ref_sub_bytes(in, 0));
      check("inv_sub_bytes rand", out_i, ref_sub_bytes(out_f, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
