// tb_aes_mix_columns: checks MixColumns and InvMixColumns.
// Reference values come from aes_ref_pkg (an independent behavioural model)
// and from the worked example of the AES standard (FIPS-197 Appendix B).
// A watchdog ends the run with a failure if it does not finish in time.
module tb_aes_mix_columns;
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
  aes_mix_columns #(.INVERSE(1'b0)) dut_f (.state_i(in),    .state_o(out_f));
  aes_mix_columns #(.INVERSE(1'b1)) dut_i (.state_i(out_f), .state_o(out_i));

  initial begin
    in = 128'hd4bf5d30e0b452aeb84111f11e2798e5;
    #1 check("mix_columns FIPS", out_f, 128'h046681e5e0cb199a48f8d37a2806264c);
    check("inv_mix_columns FIPS", out_i, in);
    for (int n = 0; n < 300; n++) begin
      in = rand_blk();
      #1 check("mix_columns rand", out_f, ref_mix_columns(in, 0));
      check("inv_mix_columns rand", out_i, ref_mix_columns(out_f, 1));
      check("inv_mix_columns roundtrip", out_i, in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
