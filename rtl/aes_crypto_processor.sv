// aes_crypto_processor: AES-256 crypto-processor with an encryption block and
// a decryption block that work at the same time, and a power-gated
// encryption block.
//
// The decryption block is chained behind the encryption block. Its data
// input is the encryption output (op_e), and it is started by the
// encryption's valid pulse. So each block is encrypted and then decrypted.
// While block n is being decrypted, block n+1 can already be encrypted.
// With pg_en set, the encryption block is put to sleep (sleep_e high, clock
// gated off) whenever decryption runs and no new plaintext is offered. It is
// woken when plaintext arrives or decryption ends.
//
// Interface:
//   e_enable/e_ready  valid/ready handshake for data_e and key_e. A block is
//                     taken on a clock edge where both are 1.
//   key_e             256-bit cipher key.
//   key_d             decryption key: the last 256 bits of the expanded
//                     cipher key, {w52..w59}.
//   op_e, e_valid     ciphertext; e_valid rises on the 14th clock edge after
//                     the accepting edge and lasts one cycle. op_e holds the
//                     ciphertext until the next block starts. The encryption
//                     block is ready again in the cycle after e_valid, so a
//                     new block can be taken every 16 clocks.
//   op_d, d_valid     decrypted text. Decryption takes the ciphertext on the
//                     edge that ends the e_valid cycle, and d_valid rises 14
//                     edges later (15 clocks after e_valid).
//   sleep_e           sleep control for the encryption block's power switches
//                     (the switches are transistors outside this RTL).
// The block diagram (two blocks, OP_E to DATA_D, E_VALID to D_ENABLE)
// follows the design. The handshake, key_d format and sleep policy are this
// design's choices.
module aes_crypto_processor
  import aes_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          e_enable,
  output logic          e_ready,
  input  state_t        data_e,
  input  logic [255:0]  key_e,
  input  logic [255:0]  key_d,
  input  logic          pg_en,
  output state_t        op_e,
  output logic          e_valid,
  output state_t        op_d,
  output logic          d_valid,
  output logic          sleep_e
);
  logic enc_clk, enc_clk_en, enc_ready, dec_ready, enc_start;

  pg_ctrl u_pg (
    .clk(clk), .rst(rst), .pg_en(pg_en),
    .enc_idle(enc_ready), .enc_req(e_enable), .dec_busy(!dec_ready),
    .sleep(sleep_e), .clk_en(enc_clk_en)
  );

  clock_gate u_cg (.clk(clk), .en(enc_clk_en), .gclk(enc_clk));

  assign enc_start = e_enable && enc_clk_en;
  assign e_ready   = enc_ready && enc_clk_en;

  aes_encrypt #(.NR(NR_256)) u_enc (
    .clk(enc_clk), .rst(rst), .enable(enc_start), .data_in(data_e), .key(key_e),
    .ready(enc_ready), .data_out(op_e), .valid(e_valid)
  );

  aes_decrypt #(.NR(NR_256)) u_dec (
    .clk(clk), .rst(rst), .enable(e_valid), .data_in(op_e), .key(key_d),
    .ready(dec_ready), .data_out(op_d), .valid(d_valid)
  );

  // A ciphertext is never lost: the decryption block is always waiting when
  // e_valid rises, because one block period (16 clocks) is equally long in
  // both blocks.
  a_dec_ready: assert property (@(posedge clk) disable iff (rst) e_valid |-> dec_ready);
  // The encryption block only sleeps while it is idle.
  a_sleep_idle: assert property (@(posedge clk) disable iff (rst) sleep_e |-> enc_ready);
endmodule
