// round_counter: the one-hot round counter of the encryption and decryption
// control units.
//
// count is one-hot over NR+2 states (16 for AES-256, matching the [15:0]
// COUNT bus). The design specifies a 15-bit one-hot round counter, which is
// bits [NR:0] here:
//   count[0]      waiting and load state. The datapath takes the new input
//                 block and performs only AddRoundKey.
//   count[1..NR]  rounds 1..NR; count[NR] is the last round (no MixColumns).
//   count[NR+1]   one-cycle "result valid" state. It then returns to count[0].
// Leaving count[0] needs start=1 on a clock edge; every other state advances
// on each edge. Reset (asynchronous, active high) puts it in count[0]. The
// reset, the waiting state and the extra valid bit are this design's choices.
module round_counter #(
  parameter int unsigned NR = 14
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  output logic [NR+1:0]   count
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)
      count <= (NR+2)'(1);
    else if (count[0]) begin
      if (start) count <= (NR+2)'(2);
    end else
      count <= {count[NR:0], count[NR+1]};
  end

  // The counter must always hold exactly one set bit.
  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(count));
endmodule
