// sha256_fold_ctrl: sequencer of the folded SHA-256 round datapath.
//
// With folding factor 2 every one of the 64 rounds takes two clock cycles,
// called phase 0 and phase 1, because each of the two shared 4-2 compressors
// is used twice per round. The controller counts rounds with a 7-bit
// iteration counter and toggles the phase:
//   IDLE   waits for start; the start cycle itself loads A..H (init).
//   ROUND  t = 0..63, phase 0 then phase 1; round_en is high.
//   UPDATE one cycle: the digest update adds A..H into H0..H7.
// done pulses in the cycle after UPDATE, when the new digest is readable.
// From the start cycle to the done cycle there are 2*64 + 2 = 130 clocks.
//   clk, rst     clock, synchronous active-high reset
//   start        block is loaded into the message schedule; begin hashing
//   init         start accepted: load the working variables
//   round_en     a round cycle, phase tells which half
//   t            round index 0..63 (the iteration counter)
//   update       digest update cycle
//   busy, done   status
// The folding factor of 2 and a 7-bit iteration count follow the source;
// the state encoding and the single update cycle are this design's choice.
module sha256_fold_ctrl
  import sha256_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              init,
  output logic              round_en,
  output logic              phase,
  output logic [ITER_W-1:0] t,
  output logic              update,
  output logic              busy,
  output logic              done
);

  typedef enum logic [1:0] {S_IDLE, S_ROUND, S_UPDATE} state_e;

  state_e state_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      phase   <= 1'b0;
      t       <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (start) begin
            state_q <= S_ROUND;
            phase   <= 1'b0;
            t       <= '0;
          end
        end
        S_ROUND: begin
          phase <= ~phase;
          if (phase) begin
            if (t == ITER_W'(ROUNDS - 1)) begin
              state_q <= S_UPDATE;
            end
            t <= t + 1'b1;
          end
        end
        S_UPDATE: begin
          state_q <= S_IDLE;
          done    <= 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign init     = (state_q == S_IDLE) && start;
  assign round_en = (state_q == S_ROUND);
  assign update   = (state_q == S_UPDATE);
  assign busy     = (state_q != S_IDLE);

endmodule
