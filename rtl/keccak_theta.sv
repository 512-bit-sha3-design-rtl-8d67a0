// keccak_theta: the theta step of Keccak-f[1600], purely combinational.
//
// The five column parities C[x] are formed by one 5-input XOR per lane
// position, all 64 bits in parallel. D[x] = C[x-1] ^ ROT(C[x+1], 1) is then
// XORed into every lane of column x (indices modulo 5). The step is
// written exactly as the three equations of the algorithm; the one-bit
// rotation is wiring. The published design keeps theta's partial results
// in intermediate registers; here they are plain signals, so that a whole
// round fits in one clock as its 24-cycle figure requires. Interface: state_i in, state_o out, no clock.
module keccak_theta
  import sha3_pkg::*;
(
  input  state_t state_i,
  output state_t state_o
);

  lane_t c [5];
  lane_t d [5];

  always_comb begin
    for (int x = 0; x < 5; x++) begin
      c[x] = state_i[x][0] ^ state_i[x][1] ^ state_i[x][2]
           ^ state_i[x][3] ^ state_i[x][4];
    end
    for (int x = 0; x < 5; x++) begin
      d[x] = c[(x + 4) % 5] ^ rotl(c[(x + 1) % 5], 1);
    end
    for (int x = 0; x < 5; x++) begin
      for (int y = 0; y < 5; y++) begin
        state_o[x][y] = state_i[x][y] ^ d[x];
      end
    end
  end

endmodule
