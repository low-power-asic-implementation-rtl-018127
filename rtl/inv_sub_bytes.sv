// inv_sub_bytes: the AES InvSubBytes transformation on a 128-bit state.
//
// Each of the 16 bytes goes through the inverse S-box, a 256-entry constant
// look-up table (aes_pkg::INV_SBOX) built at elaboration by inverting the
// forward S-box. Using a table follows the LUT approach of the design.
// Purely combinational.
module inv_sub_bytes
  import aes_pkg::*;
(
  input  state_t din,
  output state_t dout
);
  always_comb begin
    for (int i = 0; i < 16; i++) dout[8*i +: 8] = INV_SBOX[din[8*i +: 8]];
  end
endmodule
