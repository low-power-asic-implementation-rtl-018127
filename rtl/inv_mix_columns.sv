// inv_mix_columns: the AES InvMixColumns transformation.
//
// Each column is multiplied by a^-1(x) = {0b}x^3 + {0d}x^2 + {09}x + {0e}
// modulo x^4 + 1. Row i of the result is
// 0e*s_i ^ 0b*s_(i+1) ^ 0d*s_(i+2) ^ 09*s_(i+3). The constants are made from
// xtime chains: x2 = xtime(s), x4 = xtime(x2), x8 = xtime(x4), then
// 09 = x8^s, 0b = x8^x2^s, 0d = x8^x4^s, 0e = x8^x4^x2. Combinational.
// The transformation is the standard AES one, as specified; the bit order of
// the 128-bit vector (FIPS-197) is this design's choice.
module inv_mix_columns
  import aes_pkg::*;
(
  input  state_t din,
  output state_t dout
);
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      logic [7:0] s [4], m9 [4], mb [4], md [4], me [4];
      for (int r = 0; r < 4; r++) begin
        logic [7:0] x2, x4, x8;
        s[r]  = din[127 - 8*(r + 4*c) -: 8];
        x2    = xtime(s[r]);
        x4    = xtime(x2);
        x8    = xtime(x4);
        m9[r] = x8 ^ s[r];
        mb[r] = x8 ^ x2 ^ s[r];
        md[r] = x8 ^ x4 ^ s[r];
        me[r] = x8 ^ x4 ^ x2;
      end
      for (int r = 0; r < 4; r++)
        dout[127 - 8*(r + 4*c) -: 8] = me[r] ^ mb[(r+1)%4] ^ md[(r+2)%4] ^ m9[(r+3)%4];
    end
  end
endmodule
