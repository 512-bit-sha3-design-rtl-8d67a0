// keccak_rho_pi_chi: rho, pi and chi of Keccak-f[1600] merged into one
// combinational step.
//
// Rho rotates each lane A[x][y] by the constant r[x][y]; pi moves it to
// B[y][2x+3y]. Both are pure wiring, so instead of building the
// intermediate array B, every chi term reads the rotated source lane
// directly: B[X][Y] is A[(X+3Y) mod 5][X] rotated by r[(X+3Y) mod 5][X]
// (the inverse of the pi index map). Chi then gives
// A'[X][Y] = B[X][Y] ^ (~B[X+1][Y] & B[X+2][Y]). For example
// A'[1][3] = ROT(A[0][1],36) ^ (~ROT(A[1][2],10) & ROT(A[2][3],15)).
// Merging the three steps this way is the central area saving of the
// design: only one level of logic (NOT, AND, XOR) per output bit remains.
// The merging follows the published design, which derives the wiring lane
// by lane; computing it from the inverse pi map is this implementation's way
// of writing the same wiring.
// Interface: state_i in, state_o out, no clock.
module keccak_rho_pi_chi
  import sha3_pkg::*;
(
  input  state_t state_i,
  output state_t state_o
);

  // Source lane of B[bx][by] after rho and pi, as wiring.
  function automatic lane_t b_lane(input state_t a, input int bx, input int by);
    int sx;
    sx = (bx + 3 * by) % 5;
    return rotl(a[sx][bx], RHO_OFS[sx][bx]);
  endfunction

  always_comb begin
    for (int x = 0; x < 5; x++) begin
      for (int y = 0; y < 5; y++) begin
        state_o[x][y] = b_lane(state_i, x, y)
                      ^ (~b_lane(state_i, (x + 1) % 5, y) & b_lane(state_i, (x + 2) % 5, y));
      end
    end
  end

endmodule
