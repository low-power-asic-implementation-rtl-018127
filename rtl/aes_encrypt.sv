// aes_encrypt: iterative AES-256 encryption block, one round per clock.
//
// A single round datapath is reused for all rounds:
//   input mux -> SubBytes -> ShiftRows -> MixColumns -> AddRoundKey -> state F/F
// The mux takes data_in in count[0] and the fed-back state otherwise. The
// one-hot round counter steers the bypasses:
//   count[0]       SubBytes, ShiftRows and MixColumns are bypassed, so the
//                  stage is the initial AddRoundKey with rk0.
//   count[1..NR-1] full rounds.
//   count[NR]      MixColumns is bypassed (the last round).
// Round keys come from key_expansion, computed on the fly.
//
// Interface: enable is a start request, accepted on a clock edge in which
// ready (= count[0]) is 1. data_in and key are sampled on that edge, which
// also performs the initial AddRoundKey. The NR rounds take the next NR edges,
// so valid rises on the NR-th edge after the accepting edge (14 clocks for
// AES-256) and stays high for one cycle, with the ciphertext on data_out.
// data_out keeps it until the next accepted start. ready returns in the
// cycle after valid, so a block can be taken every NR+2 clocks.
// The mux, counter, bypasses and on-the-fly keys follow the design. The
// handshake, the valid state and the reset are this design's choices.
module aes_encrypt
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
  state_t        state_q, mux_o, sb, sr, mc, sb_o, sr_o, mc_o, ark, round_key;
  logic          bypass, bypass1, load;

  round_counter #(.NR(NR)) u_counter (
    .clk(clk), .rst(rst), .start(enable), .count(count)
  );

  key_expansion #(.NR(NR)) u_key (
    .clk(clk), .key(key), .count(count), .round_key(round_key)
  );

  assign bypass  = count[0];
  assign bypass1 = count[NR];
  assign mux_o   = count[0] ? data_in : state_q;

  sub_bytes       u_sb  (.din(mux_o), .dout(sb));
  assign sb_o = bypass ? mux_o : sb;
  shift_rows      u_sr  (.din(sb_o), .dout(sr));
  assign sr_o = bypass ? sb_o : sr;
  mix_columns     u_mc  (.din(sr_o), .dout(mc));
  assign mc_o = (bypass || bypass1) ? sr_o : mc;
  add_round_key   u_ark (.din(mc_o), .round_key(round_key), .dout(ark));

  assign load = (count[0] && enable) || (|count[NR:1]);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       state_q <= '0;
    else if (load) state_q <= ark;
  end

  assign ready    = count[0];
  assign valid    = count[NR+1];
  assign data_out = state_q;
endmodule
