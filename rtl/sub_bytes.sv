// sub_bytes: the AES SubBytes transformation on a 128-bit state.
//
// Each of the 16 bytes is replaced by its S-box value, the Rijndael S-box
// being the GF(2^8) multiplicative inverse followed by the affine transform.
// As in the design this follows, the S-box is a look-up table, not
// inversion logic. The table (aes_pkg::SBOX) is computed when the design is
// elaborated, so each byte lane is a 256-entry constant ROM.
// Purely combinational: dout follows din in the same cycle.
module sub_bytes
  import aes_pkg::*;
(
  input  state_t din,
  output state_t dout
);
  always_comb begin
    for (int i = 0; i < 16; i++) dout[8*i +: 8] = SBOX[din[8*i +: 8]];
  end
endmodule
