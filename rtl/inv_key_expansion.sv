// inv_key_expansion: on-the-fly AES-256 round-key generator for the
// decryption block. It runs the key schedule backwards.
//
// key is the last 256 bits of the expanded key, {w52, ..., w59}. Rewriting
// the schedule as
//   w[i-8] = w[i] ^ t(w[i-1]),  t = SubWord(RotWord(.)) ^ Rcon(i/8) if i mod 8 = 0,
//                               t = SubWord(.)                     if i mod 8 = 4,
//                               t = identity                       otherwise,
// each clock yields the four words before the window. The round keys come
// out in decryption order, rk14, rk13, ..., rk0.
// A register holds {current round key, next older round key}.
//
// Timing: in count[0] round_key = key[127:0] = rk14, taken straight from the
// input. In count[k] for k = 1..NR it is rk_(NR-k). The key must be valid on
// the clock edge that leaves count[0]. What the decryption key input holds,
// and the backwards schedule itself, are this design's choices. The
// structure only fixes a key-expansion unit fed by the key and the counter.
module inv_key_expansion
  import aes_pkg::*;
#(
  parameter int unsigned NR = 14
) (
  input  logic            clk,
  input  logic [255:0]    key,
  input  logic [NR+1:0]   count,
  output state_t          round_key
);
  logic [255:0] v_q, v, v_next;
  word_t        x [4];   // newer round key, w[i..i+3]
  word_t        y [4];   // older round key, w[i-4..i-1]
  word_t        z [4];   // computed: w[i-8..i-5]
  word_t        t, rc;
  logic         rot_phase;

  assign v         = count[0] ? {key[127:0], key[255:128]} : v_q;
  assign round_key = v[255:128];

  // In count[m], m even, the step crosses i = 8*(NR/2 - m/2), using Rcon(NR/2 - m/2).
  always_comb begin
    rot_phase = 1'b0;
    rc        = '0;
    for (int unsigned m = 0; m < NR; m += 2) begin
      if (count[m]) begin
        rot_phase = 1'b1;
        rc        = rcon(NR/2 - m/2);
      end
    end
  end

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      x[j] = v[255 - 32*j -: 32];
      y[j] = v[127 - 32*j -: 32];
    end
    t    = rot_phase ? (sub_word(rot_word(y[3])) ^ rc) : sub_word(y[3]);
    z[0] = x[0] ^ t;
    for (int j = 1; j < 4; j++) z[j] = x[j] ^ x[j-1];
    v_next = {v[127:0], z[0], z[1], z[2], z[3]};
  end

  always_ff @(posedge clk) begin
    if (|count[NR-1:0]) v_q <= v_next;
  end
endmodule
