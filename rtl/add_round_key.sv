// add_round_key: the AES AddRoundKey step, a bitwise XOR of the 128-bit
// state with the 128-bit round key. Combinational.
// The transformation is the standard AES one, as specified; the bit order of
// the 128-bit vector (FIPS-197) is this design's choice.
module add_round_key
  import aes_pkg::*;
(
  input  state_t din,
  input  state_t round_key,
  output state_t dout
);
  assign dout = din ^ round_key;
endmodule
