// keccak_f: iterative Keccak-f[1600] permutation engine (KECCAK_f).
//
// A pulse on start_i copies state_i into the engine's own 1600-bit state
// register. On each of the next 24 cycles one keccak_round is applied, with
// the round counter selecting the round constant. In the cycle after the last
// round done_o pulses for one cycle and state_o holds the permuted state; it
// stays there until the next start. busy_o is high from the cycle after
// start_i until done_o. start_i while busy is ignored.
//
// Timing: with start_i high in cycle 0, busy_o is high in cycles 1..24 (one
// round per cycle) and done_o in cycle 25. A new start is taken from the cycle
// of done_o on.
//
// The 24 rounds follow the algorithm; one round per cycle is this design's
// choice, as no latency is given for the engine.
module keccak_f
  import kronos_pkg::*;
#(
  parameter int unsigned ROUNDS = NUM_ROUNDS
) (
  input  logic   clk_i,
  input  logic   rst_ni,
  input  logic   start_i,
  input  state_t state_i,
  output logic   busy_o,
  output logic   done_o,
  output state_t state_o
);

  state_t state_q, round_out;
  round_t round_q;
  logic   busy_q, done_q;

  keccak_round u_round (
    .state_i (state_q),
    .round_i (round_q),
    .state_o (round_out)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= '0;
      round_q <= '0;
      busy_q  <= 1'b0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (!busy_q) begin
        if (start_i) begin
          state_q <= state_i;
          round_q <= '0;
          busy_q  <= 1'b1;
        end
      end else begin
        state_q <= round_out;
        round_q <= round_q + round_t'(1);
        if (round_q == round_t'(ROUNDS - 1)) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
        end
      end
    end
  end

  assign busy_o  = busy_q;
  assign done_o  = done_q;
  assign state_o = state_q;

endmodule
