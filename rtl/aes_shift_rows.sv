// aes_shift_rows: the ShiftRows step (or InvShiftRows when INVERSE = 1).
//
// Row 0 of the state stays put; rows 1, 2 and 3 are rotated cyclically to the
// left by 1, 2 and 3 byte positions, so that s'[r][c] = s[r][(c+r) mod 4]. For
// decryption the rotation is to the right: s'[r][c] = s[r][(c-r) mod 4]. Both
// rules are the document's. State byte s[r][c] is byte r+4c of the block (see
// aes_pkg).
//
// Pure wiring, combinational.
module aes_shift_rows
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0   // 0: ShiftRows (left), 1: InvShiftRows (right)
) (
  input  block_t state_i,
  output block_t state_o
);

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) begin
        if (INVERSE)
          state_o[127 - 8*(r + 4*c) -: 8] = state_i[127 - 8*(r + 4*((c + 4 - r) % 4)) -: 8];
        else
          state_o[127 - 8*(r + 4*c) -: 8] = state_i[127 - 8*(r + 4*((c + r) % 4)) -: 8];
      end
    end
  end

endmodule
