// kronos_pkg: types and constants shared by the KRONOS Keccak accelerators.
//
// The Keccak-f[1600] state is 25 lanes of 64 bits. Lane k = x + 5*y holds the
// word at column x and row y of the 5x5 matrix; bit z of a lane is bit z of the
// 64-bit word. This packing follows the SHA-3 standard, so a byte string
// absorbed little-endian lands on the lanes exactly as the standard requires.
//
// The 24 round constants and the rho rotation offsets are those of the
// standard. They are produced by functions (the standard's LFSR and the
// rho walk over the lanes) rather than stored as a table; synthesis folds
// them to constants.
package kronos_pkg;

  localparam int unsigned NUM_LANES  = 25;
  localparam int unsigned LANE_W     = 64;
  localparam int unsigned STATE_W    = NUM_LANES * LANE_W;  // 1600
  localparam int unsigned NUM_ROUNDS = 24;
  localparam int unsigned NUM_WORDS  = STATE_W / 32;        // 50 words of 32 bits

  typedef logic [LANE_W-1:0]                lane_t;
  typedef logic [NUM_LANES-1:0][LANE_W-1:0] state_t;
  typedef logic [4:0]                       round_t;

  // Round constant of round `r`, from the standard's degree-8 LFSR
  // x^8 + x^6 + x^5 + x^4 + 1: bit 2^j - 1 of RC[r] is LFSR output 7*r + j.
  function automatic lane_t keccak_rc(input round_t r);
    logic [7:0] lfsr;
    lane_t      rc;
    lfsr = 8'h01;
    rc   = '0;
    for (int unsigned t = 0; t < 7 * NUM_ROUNDS; t++) begin
      if (t / 7 == int'(r)) rc[(1 << (t % 7)) - 1] = lfsr[0];
      lfsr = lfsr[7] ? ((lfsr << 1) ^ 8'h71) : (lfsr << 1);
    end
    return rc;
  endfunction

  // rho offset of lane x + 5*y: starting at (x,y) = (1,0), step t
  // (0..23) visits the next lane with offset (t+1)(t+2)/2 mod 64 and moves to
  // (y, 2x + 3y mod 5). Lane (0,0) is not rotated.
  function automatic int unsigned keccak_rho(input int unsigned lane);
    int unsigned x, y, nx;
    x = 1;
    y = 0;
    for (int unsigned t = 0; t < 24; t++) begin
      if (x + 5 * y == lane) return ((t + 1) * (t + 2) / 2) % 64;
      nx = y;
      y  = (2 * x + 3 * y) % 5;
      x  = nx;
    end
    return 0;
  endfunction

  function automatic lane_t rotl64(input lane_t v, input int unsigned n);
    return (n % 64 == 0) ? v : ((v << (n % 64)) | (v >> (64 - n % 64)));
  endfunction

endpackage
