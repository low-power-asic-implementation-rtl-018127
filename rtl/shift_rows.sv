// shift_rows: the AES ShiftRows transformation.
//
// Row r of the 4x4 state is rotated left by r bytes, and row 0 is left as it
// is. Output element S'(r,c) takes S(r,(c+r) mod 4). Byte r+4c of the 128-bit
// vector is S(r,c), with byte 0 in bits [127:120].
// Pure wiring; combinational.
// The transformation is the standard AES one, as specified; the bit order of
// the 128-bit vector (FIPS-197) is this design's choice.
module shift_rows
  import aes_pkg::*;
(
  input  state_t din,
  output state_t dout
);
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        dout[127 - 8*(r + 4*c) -: 8] = din[127 - 8*(r + 4*((c + r) % 4)) -: 8];
  end
endmodule
