// aes_decrypt: iterative AES-256 decryption block, one round per clock.
//
// The single round datapath is the straightforward inverse cipher:
//   input mux -> InvShiftRows -> InvSubBytes -> AddRoundKey -> InvMixColumns -> state F/F
// The mux takes data_in in count[0] and the fed-back state otherwise.
//   count[0]       InvShiftRows, InvSubBytes and InvMixColumns are bypassed,
//                  so only AddRoundKey with rk14 is done.
//   count[1..NR-1] full inverse rounds with rk13..rk1.
//   count[NR]      InvMixColumns is bypassed (the last round, rk0).
// Round keys come in reverse order from inv_key_expansion, which needs the
// last 256 bits of the expanded key, {w52..w59}, as its key input.
//
// The interface and timing are the same as aes_encrypt. enable is accepted on
// an edge where ready=1, and valid rises on the NR-th edge after it with the
// plaintext on data_out. The step order and bypasses follow the design. The
// decryption-key format and the handshake are this design's choices.
module aes_decrypt
  import aes_pkg::*;
#(
  parameter int unsigned NR = 14
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          enable,
  input  state_t        data_in,
  input  logic [255:0]  key,
  output logic          ready,
  output state_t        data_out,
  output logic          valid
);
  logic [NR+1:0] count;
  state_t        state_q, mux_o, isr, isb, imc, isr_o, isb_o, ark, imc_o, round_key;
  logic          bypass, bypass1, load;

  round_counter #(.NR(NR)) u_counter (
    .clk(clk), .rst(rst), .start(enable), .count(count)
  );

  inv_key_expansion #(.NR(NR)) u_key (
    .clk(clk), .key(key), .count(count), .round_key(round_key)
  );

  assign bypass  = count[0];
  assign bypass1 = count[NR];
  assign mux_o   = count[0] ? data_in : state_q;

  inv_shift_rows  u_isr (.din(mux_o), .dout(isr));
  assign isr_o = bypass ? mux_o : isr;
  inv_sub_bytes   u_isb (.din(isr_o), .dout(isb));
  assign isb_o = bypass ? isr_o : isb;
  add_round_key   u_ark (.din(isb_o), .round_key(round_key), .dout(ark));
  inv_mix_columns u_imc (.din(ark), .dout(imc));
  assign imc_o = (bypass || bypass1) ? ark : imc;

  assign load = (count[0] && enable) || (|count[NR:1]);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       state_q <= '0;
    else if (load) state_q <= imc_o;
  end

  assign ready    = count[0];
  assign valid    = count[NR+1];
  assign data_out = state_q;
endmodule
