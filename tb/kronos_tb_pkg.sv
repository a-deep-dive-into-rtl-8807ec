// kronos_tb_pkg: reference model and helpers shared by the KRONOS testbenches.
//
// The reference Keccak-f[1600] is written straight from the SHA-3 standard's
// step definitions on a 5x5 array, with the round constants and rotation
// offsets as literal tables, so it shares no code with the RTL (which derives
// them with an LFSR and a lane walk). SHA3-384 padding and the test messages
// are here too; the expected digests in the testbenches were computed with an
// independent SHA-3 implementation.
package kronos_tb_pkg;

  typedef logic [63:0]            lane_t;
  typedef logic [24:0][63:0]      state_t;

  localparam int unsigned RATE_BYTES = 104;  // SHA3-384: 1600 - 2*384 bits

  localparam lane_t RC_TAB [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A, 64'h8000000080008000,
    64'h000000000000808B, 64'h0000000080000001, 64'h8000000080008081, 64'h8000000000008009,
    64'h000000000000008A, 64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089, 64'h8000000000008003,
    64'h8000000000008002, 64'h8000000000000080, 64'h000000000000800A, 64'h800000008000000A,
    64'h8000000080008081, 64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008};

  // rotation offsets, indexed [x][y]
  localparam int ROT_TAB [5][5] = '{
    '{ 0, 36,  3, 41, 18},
    '{ 1, 44, 10, 45,  2},
    '{62,  6, 43, 15, 61},
    '{28, 55, 25, 21, 56},
    '{27, 20, 39,  8, 14}};

  function automatic lane_t rol(input lane_t v, input int n);
    lane_t r;
    r = v;
    for (int i = 0; i < n; i++) r = {r[62:0], r[63]};
    return r;
  endfunction

  function automatic state_t ref_round(input state_t s, input int r);
    lane_t a [5][5], b [5][5];
    lane_t c [5], d [5];
    state_t o;
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) a[x][y] = s[x + 5*y];
    for (int x = 0; x < 5; x++) c[x] = a[x][0] ^ a[x][1] ^ a[x][2] ^ a[x][3] ^ a[x][4];
    for (int x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ rol(c[(x+1)%5], 1);
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) a[x][y] ^= d[x];
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++)
      b[y][(2*x + 3*y) % 5] = rol(a[x][y], ROT_TAB[x][y]);
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++)
      a[x][y] = b[x][y] ^ ((~b[(x+1)%5][y]) & b[(x+2)%5][y]);
    a[0][0] ^= RC_TAB[r];
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) o[x + 5*y] = a[x][y];
    return o;
  endfunction

  function automatic state_t ref_perm(input state_t s);
    for (int r = 0; r < 24; r++) s = ref_round(s, r);
    return s;
  endfunction

  function automatic state_t rand_state();
    state_t s;
    for (int k = 0; k < 25; k++) s[k] = {$urandom, $urandom};
    return s;
  endfunction

  // Test messages: 0 = empty, 1 = "abc", 2 = 150 bytes, byte i = (7i + 3) mod 256
  function automatic int msg_len(input int m);
    return (m == 0) ? 0 : (m == 1) ? 3 : 150;
  endfunction

  function automatic logic [7:0] msg_byte(input int m, input int i);
    if (m == 1) return (i == 0) ? 8'h61 : (i == 1) ? 8'h62 : 8'h63;
    return 8'((7*i + 3) % 256);
  endfunction

  function automatic logic [383:0] msg_digest(input int m);
    case (m)
      0: return 384'h0c63a75b845e4f7d01107d852e4c2485c51a50aaaa94fc61995e71bbee983a2ac3713831264adb47fb6bd1e058d5f004;
      1: return 384'hec01498288516fc926459f58e2c6ad8df9b473cb0fc08c2596da7cf0e49be4b298d88cea927ac7f539f1edf228376d25;
      default: return 384'h3a94f151680e42ae4f174bb023cb8ee79df50a7b814aeaab6d8e9d3ccb555e48bb9bb202f07d922a1e8ec3c8cf347c2e;
    endcase
  endfunction

  function automatic int num_blocks(input int m);
    return msg_len(m) / RATE_BYTES + 1;
  endfunction

  // Rate block `blk` of message m after SHA3 padding (0x06 ... 0x80),
  // placed on the state as it is XORed in (byte j -> lane j/8, bits 8(j%8)).
  function automatic state_t padded_block(input int m, input int blk);
    state_t s;
    int     len, idx;
    logic [7:0] bt;
    s   = '0;
    len = msg_len(m);
    for (int j = 0; j < RATE_BYTES; j++) begin
      idx = blk * RATE_BYTES + j;
      bt  = (idx < len) ? msg_byte(m, idx) : 8'h00;
      if (idx == len) bt |= 8'h06;
      if (blk == num_blocks(m) - 1 && j == RATE_BYTES - 1) bt |= 8'h80;
      s[j/8][8*(j%8) +: 8] = bt;
    end
    return s;
  endfunction

  // Digest (48 bytes) read from the state, as a big-endian hex number
  function automatic logic [383:0] state_digest(input state_t s);
    logic [383:0] d;
    for (int j = 0; j < 48; j++) d[383 - 8*j -: 8] = s[j/8][8*(j%8) +: 8];
    return d;
  endfunction

  // R-type instruction word
  function automatic logic [31:0] rtype(input logic [6:0] f7, input logic [2:0] f3,
                                        input logic [4:0] rd, input logic [6:0] opc);
    return {f7, 5'd2, 5'd1, f3, rd, opc};
  endfunction

endpackage
