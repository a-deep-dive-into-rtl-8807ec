// keccak_round: one round of the Keccak-f[1600] permutation, combinational.
//
// The five steps are applied in order:
//   theta - each bit is XORed with the parities of two neighbouring columns,
//   rho   - each lane is rotated left by its fixed offset,
//   pi    - lanes are moved: lane (x,y) goes to (y, 2x+3y mod 5),
//   chi   - a[x] ^= ~a[x+1] & a[x+2] along each row (the only non-linear step),
//   iota  - the round constant of round_i is XORed into lane (0,0).
// The step order and the 24-round count follow the algorithm the design is
// built around; the offsets, the lane move and the constants are the SHA-3
// standard's (see kronos_pkg).
//
// Interface: state_i / state_o are 25 lanes of 64 bits (lane x + 5*y),
// round_i is 0..23. No clock: the result is valid in the same cycle.
module keccak_round
  import kronos_pkg::*;
(
  input  state_t state_i,
  input  round_t round_i,
  output state_t state_o
);

  lane_t [4:0] col_par;   // parity of each column
  lane_t [4:0] theta_d;   // value XORed into each column by theta
  state_t      a_theta;
  state_t      a_pi;      // after rho and pi

  always_comb begin
    for (int x = 0; x < 5; x++)
      col_par[x] = state_i[x] ^ state_i[x+5] ^ state_i[x+10] ^ state_i[x+15] ^ state_i[x+20];
    for (int x = 0; x < 5; x++)
      theta_d[x] = col_par[(x+4)%5] ^ rotl64(col_par[(x+1)%5], 1);
    for (int k = 0; k < 25; k++)
      a_theta[k] = state_i[k] ^ theta_d[k%5];
    // rho then pi: lane (x,y) rotated and stored at (y, 2x+3y)
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        a_pi[y + 5*((2*x + 3*y) % 5)] = rotl64(a_theta[x + 5*y], keccak_rho(x + 5*y));
    // chi
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++)
        state_o[x + 5*y] = a_pi[x + 5*y] ^ (~a_pi[(x+1)%5 + 5*y] & a_pi[(x+2)%5 + 5*y]);
    // iota
    state_o[0] = state_o[0] ^ keccak_rc(round_i);
  end

endmodule
