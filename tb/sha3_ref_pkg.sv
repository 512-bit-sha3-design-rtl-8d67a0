// sha3_ref_pkg: reference model of SHA3-512 for the testbenches.
//
// Written independently of the RTL: the round constants are generated by
// the FIPS 202 LFSR rc(t), the rho offsets by walking (x,y) -> (y, 2x+3y)
// with offset (t+1)(t+2)/2, and the steps are applied one after the other
// on a flat 25-lane array indexed x + 5y (rho, then pi into a separate
// array, then chi). sha3_512() hashes a byte queue and returns the digest
// with its first byte in bits [511:504].
package sha3_ref_pkg;

  typedef logic [63:0] rlane_t;
  typedef rlane_t rstate_t [25];

  function automatic rlane_t rot(input rlane_t a, input int n);
    int s;
    s = n % 64;
    if (s == 0) return a;
    return (a << s) | (a >> (64 - s));
  endfunction

  function automatic bit rc_bit(input int t);
    logic [8:0] r;
    r = 9'h001;
    for (int i = 1; i <= t % 255; i++) begin
      r = {r[7:0], 1'b0};
      r[0] ^= r[8];
      r[4] ^= r[8];
      r[5] ^= r[8];
      r[6] ^= r[8];
      r[8] = 1'b0;
    end
    return r[0];
  endfunction

  function automatic rlane_t rc_of(input int ir);
    rlane_t rc;
    rc = '0;
    for (int j = 0; j <= 6; j++) rc[(1 << j) - 1] = rc_bit(j + 7 * ir);
    return rc;
  endfunction

  function automatic int rho_of(input int xq, input int yq);
    int x, y, nx;
    if (xq == 0 && yq == 0) return 0;
    x = 1; y = 0;
    for (int t = 0; t < 24; t++) begin
      if (x == xq && y == yq) return ((t + 1) * (t + 2) / 2) % 64;
      nx = y;
      y  = (2 * x + 3 * y) % 5;
      x  = nx;
    end
    return -1;
  endfunction

  function automatic rstate_t ref_theta(input rstate_t a);
    rlane_t c [5];
    rlane_t d;
    rstate_t o;
    for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++) begin
      d = c[(x + 4) % 5] ^ rot(c[(x + 1) % 5], 1);
      for (int y = 0; y < 5; y++) o[x + 5*y] = a[x + 5*y] ^ d;
    end
    return o;
  endfunction

  function automatic rstate_t ref_rho_pi(input rstate_t a);
    rstate_t b;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rot(a[x + 5*y], rho_of(x, y));
    return b;
  endfunction

  function automatic rstate_t ref_chi(input rstate_t b);
    rstate_t o;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        o[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    return o;
  endfunction

  function automatic rstate_t ref_round(input rstate_t a, input int ir);
    rstate_t o;
    o = ref_chi(ref_rho_pi(ref_theta(a)));
    o[0] ^= rc_of(ir);
    return o;
  endfunction

  function automatic rstate_t ref_keccak_f(input rstate_t a);
    rstate_t o;
    o = a;
    for (int ir = 0; ir < 24; ir++) o = ref_round(o, ir);
    return o;
  endfunction

  // Convert to and from the RTL's packed layout, state[x][y].
  function automatic logic [1599:0] to_packed(input rstate_t a);
    logic [4:0][4:0][63:0] p;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++) p[x][y] = a[x + 5*y];
    return p;
  endfunction

  function automatic rstate_t from_packed(input logic [1599:0] v);
    logic [4:0][4:0][63:0] p;
    rstate_t a;
    p = v;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++) a[x + 5*y] = p[x][y];
    return a;
  endfunction

  function automatic rstate_t rand_state();
    rstate_t a;
    for (int i = 0; i < 25; i++) a[i] = {$urandom(), $urandom()};
    return a;
  endfunction

  // Pad a message (multi-rate padding with SHA-3 suffix), rate 72 bytes.
  function automatic void pad_msg(input byte unsigned msg[$], output byte unsigned p[$]);
    p = msg;
    p.push_back(8'h06);
    while (p.size() % 72 != 0) p.push_back(8'h00);
    p[p.size() - 1] |= 8'h80;
  endfunction

  // Rate block k of a padded message as a state (capacity zero).
  function automatic rstate_t block_state(input byte unsigned p[$], input int k);
    rstate_t a;
    for (int i = 0; i < 25; i++) a[i] = '0;
    for (int i = 0; i < 72; i++) a[i / 8][8 * (i % 8) +: 8] = p[72 * k + i];
    return a;
  endfunction

  function automatic logic [511:0] sha3_512(input byte unsigned msg[$]);
    byte unsigned p[$];
    rstate_t s, b;
    logic [511:0] d;
    pad_msg(msg, p);
    for (int i = 0; i < 25; i++) s[i] = '0;
    for (int k = 0; k < p.size() / 72; k++) begin
      b = block_state(p, k);
      for (int i = 0; i < 25; i++) s[i] ^= b[i];
      s = ref_keccak_f(s);
    end
    for (int k = 0; k < 64; k++) d[511 - 8*k -: 8] = s[k / 8][8 * (k % 8) +: 8];
    return d;
  endfunction

endpackage
