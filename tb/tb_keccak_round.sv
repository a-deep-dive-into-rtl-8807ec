// tb_keccak_round: checks the combinational Keccak round against the
// reference model, for every round index on random states, plus the known
// answer for the all-zero state (only the round constant survives).
module tb_keccak_round;
  import kronos_tb_pkg::*;

  int checks = 0, failures = 0;
  kronos_pkg::state_t st_i, st_o;
  kronos_pkg::round_t rnd;
  state_t exp_s;

  keccak_round dut (.state_i(st_i), .round_i(rnd), .state_o(st_o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // zero state: theta, rho, pi, chi keep zero; iota leaves RC in lane 0
    for (int r = 0; r < 24; r++) begin
      st_i = '0; rnd = 5'(r); #1;
      exp_s = '0; exp_s[0] = RC_TAB[r];
      checks++;
      if (st_o !== exp_s) begin failures++; $display("zero state, round %0d: lane0 %h", r, st_o[0]); end
    end
    for (int t = 0; t < 240; t++) begin
      st_i = rand_state(); rnd = 5'(t % 24); #1;
      exp_s = ref_round(st_i, t % 24);
      checks++;
      if (st_o !== exp_s) begin failures++; $display("random state, round %0d mismatch", t % 24); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
