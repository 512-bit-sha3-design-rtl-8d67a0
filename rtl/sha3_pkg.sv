// sha3_pkg: types and constants shared by the SHA3-512 core.
//
// The Keccak-f[1600] state is a 5x5 array of 64-bit lanes. It is kept as a
// packed array indexed state[x][y], so that a whole state can cross a port
// as one 1600-bit vector. SHA3-512 uses the rate r = 576 bits (nine lanes,
// 72 bytes) and the capacity c = 1024 bits; the digest is the first 512
// bits of the state. The rotation offsets of the rho step and the 24
// round constants of the iota step are the standard FIPS 202 values; they
// are held here as constant tables and read through small functions so
// that every user of them elaborates them to wiring or constants. The sizes
// and the 128-bit input width follow the published design.
package sha3_pkg;

  localparam int unsigned LANE_W      = 64;
  localparam int unsigned NUM_ROUNDS  = 24;
  localparam int unsigned RATE_BITS   = 576;             // SHA3-512 rate
  localparam int unsigned CAP_BITS    = 1024;            // SHA3-512 capacity
  localparam int unsigned RATE_BYTES  = RATE_BITS / 8;   // 72
  localparam int unsigned RATE_LANES  = RATE_BITS / LANE_W; // 9
  localparam int unsigned DIGEST_BITS = 512;
  localparam int unsigned IN_W        = 128;             // input word width
  localparam int unsigned IN_BYTES    = IN_W / 8;        // 16
  localparam logic [7:0]  PAD_FIRST   = 8'h06;           // SHA-3 domain bits + first pad bit
  localparam logic [7:0]  PAD_LAST    = 8'h80;           // final pad bit

  typedef logic [LANE_W-1:0]       lane_t;
  typedef logic [4:0][4:0][LANE_W-1:0] state_t;          // state[x][y]
  typedef logic [4:0]              round_t;              // 0 .. 23

  // Rho rotation offsets r[x][y] (FIPS 202, Table 2).
  localparam int RHO_OFS [5][5] = '{
    '{ 0, 36,  3, 41, 18},   // x = 0, y = 0..4
    '{ 1, 44, 10, 45,  2},   // x = 1
    '{62,  6, 43, 15, 61},   // x = 2
    '{28, 55, 25, 21, 56},   // x = 3
    '{27, 20, 39,  8, 14}    // x = 4
  };

  // Iota round constants RC[0..23].
  localparam lane_t RC_TABLE [NUM_ROUNDS] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A,
    64'h8000000080008000, 64'h000000000000808B, 64'h0000000080000001,
    64'h8000000080008081, 64'h8000000000008009, 64'h000000000000008A,
    64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089,
    64'h8000000000008003, 64'h8000000000008002, 64'h8000000000000080,
    64'h000000000000800A, 64'h800000008000000A, 64'h8000000080008081,
    64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008
  };

  // Rotate a lane left by a constant amount.
  function automatic lane_t rotl(input lane_t a, input int unsigned n);
    int unsigned s;
    s = n % LANE_W;
    if (s == 0) return a;
    return (a << s) | (a >> (LANE_W - s));
  endfunction

  function automatic lane_t round_const(input round_t r);
    return (int'(r) < NUM_ROUNDS) ? RC_TABLE[r] : '0;
  endfunction

endpackage
