// inv_shift_rows: the AES InvShiftRows transformation.
//
// Row r of the 4x4 state is rotated right by r bytes: S'(r,c) takes
// S(r,(c-r) mod 4). It undoes shift_rows. Byte order is as in aes_pkg.
// Pure wiring; combinational.
// The transformation is the standard AES one, as specified; the bit order of
// the 128-bit vector (FIPS-197) is this design's choice.
module inv_shift_rows
  import aes_pkg::*;
(
  input  state_t din,
  output state_t dout
);
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        dout[127 - 8*(r + 4*c) -: 8] = din[127 - 8*(r + 4*((c - r + 4) % 4)) -: 8];
  end
endmodule
