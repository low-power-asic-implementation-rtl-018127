// mix_columns: the AES MixColumns transformation.
//
// Each column is treated as a polynomial over GF(2^8) and multiplied by
// a(x) = {03}x^3 + {01}x^2 + {01}x + {02} modulo x^4 + 1. In matrix form,
// row i of the result is 2*s_i ^ 3*s_(i+1) ^ s_(i+2) ^ s_(i+3). The
// multiplications are built from xtime (a shift and a conditional XOR with
// {1b}), and 3*s is xtime(s) ^ s. Combinational.
// The transformation is the standard AES one, as specified; the bit order of
// the 128-bit vector (FIPS-197) is this design's choice.
module mix_columns
  import aes_pkg::*;
(
  input  state_t din,
  output state_t dout
);
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      logic [7:0] s [4];
      for (int r = 0; r < 4; r++) s[r] = din[127 - 8*(r + 4*c) -: 8];
      for (int r = 0; r < 4; r++)
        dout[127 - 8*(r + 4*c) -: 8] = xtime(s[r]) ^ xtime(s[(r+1)%4]) ^ s[(r+1)%4]
                                       ^ s[(r+2)%4] ^ s[(r+3)%4];
    end
  end
endmodule
