// keccak_iota: the iota step of Keccak-f[1600], combinational.
//
// The 64-bit round constant rc_i is XORed into lane [0][0]; all other lanes
// pass unchanged. The constant comes from the round-constant register
// (sha3_rc_reg). As in the published design, this is a single 64-bit XOR.
// Interface: state_i and rc_i in, state_o out, no clock.
module keccak_iota
  import sha3_pkg::*;
(
  input  state_t state_i,
  input  lane_t  rc_i,
  output state_t state_o
);

  always_comb begin
    state_o       = state_i;
    state_o[0][0] = state_i[0][0] ^ rc_i;
  end

endmodule
