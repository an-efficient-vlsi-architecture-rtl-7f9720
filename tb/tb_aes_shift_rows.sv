// tb_aes_shift_rows: checks ShiftRows and InvShiftRows.
// Reference values come from aes_ref_pkg (an independent behavioural model)
// and from the worked example of the AES standard (FIPS-197 Appendix B).
// A watchdog ends the run with a failure if it does not finish in time.
module tb_aes_shift_rows;
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
  aes_shift_rows #(.INVERSE(1'b0)) dut_f (.state_i(in),    .state_o(out_f));
  aes_shift_rows #(.INVERSE(1'b1)) dut_i (.state_i(out_f), .state_o(out_i));

  initial begin
    in = 128'hd42711aee0bf98f1b8b45de51e415230;
    #1 check("shift_rows FIPS", out_f, 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    // Byte k carries value k: row r moves left by r.
    for (int i = 0; i < 16; i++) in[127 - 8*i -: 8] = 8'(i);
    #1 check("shift_rows index", out_f, 128'h00050a0f04090e03080d02070c01060b);
    check("inv_shift_rows index", out_i, in);
    for (int n = 0; n < 200; n++) begin
      in = rand_blk();
      #1 check("shift_rows rand", out_f, ref_shift_rows(in, 0));
      check("inv_shift_rows rand", out_i, in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
