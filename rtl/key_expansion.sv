// key_expansion: on-the-fly AES-256 round-key generator for the encryption
// block.
//
// An 8-word window of the expanded key w0..w59 is kept in a register. The
// current round key is the older half of the window. Each clock, four new
// words are computed from the window, following FIPS-197 with Nk = 8:
//   t  = SubWord(RotWord(w[i-1])) ^ Rcon(i/8)   if i mod 8 = 0
//   t  = SubWord(w[i-1])                       if i mod 8 = 4
//   w[i] = w[i-8] ^ t,   w[i+j] = w[i+j-8] ^ w[i+j-1]   (j = 1..3)
// The window then shifts by four words. Which of the two forms of t applies,
// and which Rcon, follow from the one-hot round count.
//
// Timing: in count[0] (the load state) round_key is key[255:128] (rk0)
// straight from the input, and the window loads {w4..w7, w8..w11}. In
// count[k] for k = 1..NR, round_key is rk_k = {w4k..w4k+3}. So the key must
// be valid on the clock edge that leaves count[0].
// Generating the keys on the fly follows the design. The window form and the
// SubWord-only step at i mod 8 = 4 (standard AES-256) are this
// implementation's choices. Only the AES-256 schedule (NR = 14) is supported.
module key_expansion
  import aes_pkg::*;
#(
  parameter int unsigned NR = 14
) (
  input  logic            clk,
  input  logic [255:0]    key,
  input  logic [NR+1:0]   count,
  output state_t          round_key
);
  logic [255:0] win_q, win, win_next;
  word_t        w [8];
  word_t        n [4];
  word_t        t, rc;
  logic         rot_phase;

  assign win       = count[0] ? key : win_q;
  assign round_key = win[255:128];

  // In count[m], rounds m even use the RotWord/Rcon(m/2+1) step.
  always_comb begin
    rot_phase = 1'b0;
    rc        = '0;
    for (int unsigned m = 0; m < NR; m += 2) begin
      if (count[m]) begin
        rot_phase = 1'b1;
        rc        = rcon(m/2 + 1);
      end
    end
  end

  always_comb begin
    for (int i = 0; i < 8; i++) w[i] = win[255 - 32*i -: 32];
    t    = rot_phase ? (sub_word(rot_word(w[7])) ^ rc) : sub_word(w[7]);
    n[0] = w[0] ^ t;
    for (int j = 1; j < 4; j++) n[j] = w[j] ^ n[j-1];
    win_next = {w[4], w[5], w[6], w[7], n[0], n[1], n[2], n[3]};
  end

  always_ff @(posedge clk) begin
    if (|count[NR-1:0]) win_q <= win_next;
  end
endmodule
