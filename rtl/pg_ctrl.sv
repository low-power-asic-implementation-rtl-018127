// pg_ctrl: power-gating controller for the encryption block.
//
// The encryption block is put to sleep while decryption runs: its supply is
// cut by sleep transistors (driven by sleep) and its clock is stopped (clk_en
// low). The controller has three states:
//   ACTIVE  clock on. It goes to SLEEP when pg_en is set, the encryption
//           block is idle (enc_idle), no new request is waiting (enc_req
//           low) and decryption is running (dec_busy).
//   SLEEP   supply off, clock off. It goes to WAKE when a request arrives,
//           when decryption ends, or when pg_en is cleared.
//   WAKE    supply back on, clock still off for WAKE_CYCLES clocks while
//           the virtual rail settles. Then ACTIVE.
// Outputs are registered state decodes. Sleeping while decrypting follows
// the design. The sleep and wake conditions, the wake delay and the reset
// (active high, asynchronous, to ACTIVE) are this design's choices.
module pg_ctrl #(
  parameter int unsigned WAKE_CYCLES = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic pg_en,
  input  logic enc_idle,
  input  logic enc_req,
  input  logic dec_busy,
  output logic sleep,
  output logic clk_en
);
  typedef enum logic [1:0] {ACTIVE, SLEEP, WAKE} pg_state_e;

  localparam int unsigned WCW = (WAKE_CYCLES > 1) ? $clog2(WAKE_CYCLES + 1) : 1;

  pg_state_e      state_q;
  logic [WCW-1:0] wait_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state_q <= ACTIVE;
      wait_q  <= '0;
    end else begin
      unique case (state_q)
        ACTIVE:
          if (pg_en && enc_idle && !enc_req && dec_busy) state_q <= SLEEP;
        SLEEP:
          if (enc_req || !dec_busy || !pg_en) begin
            state_q <= WAKE;
            wait_q  <= WCW'(WAKE_CYCLES - 1);
          end
        WAKE:
          if (wait_q == '0) state_q <= ACTIVE;
          else              wait_q  <= wait_q - 1'b1;
        default: state_q <= ACTIVE;
      endcase
    end
  end

  assign sleep  = (state_q == SLEEP);
  assign clk_en = (state_q == ACTIVE);
endmodule
