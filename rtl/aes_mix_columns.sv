// aes_mix_columns: the MixColumns step (or InvMixColumns when INVERSE = 1).
//
// Each state column is read as a polynomial over GF(2^8) and multiplied modulo
// x^4+1 by a fixed polynomial, so that every output byte depends on all four
// bytes of its column, as the document describes. The fixed polynomials and the
// reduction polynomial x^8+x^4+x^3+x+1 are those of the AES standard, which the
// document names but does not print:
//   forward  a(x) = {03}x^3 + {01}x^2 + {01}x + {02}
//   inverse  a(x) = {0b}x^3 + {0d}x^2 + {09}x + {0e}
// Products are built from xtime (multiply by 2) and XORs only.
//
// Purely combinational.
module aes_mix_columns
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0   // 0: MixColumns, 1: InvMixColumns
) (
  input  block_t state_i,
  output block_t state_o
);

  function automatic word_t mix_col(input word_t col);
    u8_t a [4];
    u8_t x2 [4], x4 [4], x8 [4];
    u8_t m9 [4], mb [4], md [4], me [4];
    u8_t b [4];
    for (int r = 0; r < 4; r++) begin
      a[r]  = col[31 - 8*r -: 8];
      x2[r] = xtime(a[r]);
      x4[r] = xtime(x2[r]);
      x8[r] = xtime(x4[r]);
      m9[r] = x8[r] ^ a[r];
      mb[r] = x8[r] ^ x2[r] ^ a[r];
      md[r] = x8[r] ^ x4[r] ^ a[r];
      me[r] = x8[r] ^ x4[r] ^ x2[r];
    end
    for (int r = 0; r < 4; r++) begin
      if (INVERSE)
        b[r] = me[r] ^ mb[(r+1)%4] ^ md[(r+2)%4] ^ m9[(r+3)%4];
      else
        b[r] = x2[r] ^ (x2[(r+1)%4] ^ a[(r+1)%4]) ^ a[(r+2)%4] ^ a[(r+3)%4];
    end
    return {b[0], b[1], b[2], b[3]};
  endfunction

  always_comb begin
    for (int c = 0; c < 4; c++) state_o[127 - 32*c -: 32] = mix_col(state_i[127 - 32*c -: 32]);
  end

endmodule
