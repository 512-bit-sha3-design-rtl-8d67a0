// keccak_cbox: the compression box, one complete Keccak-f[1600] round.
//
// theta, then the merged rho/pi/chi step, then iota, all combinational, so
// one round is computed per clock cycle and the 24 rounds of a block take 24
// cycles when the result is fed back through the state register. There is
// no register between the steps: the step order follows the published
// design, and the absence of inner registers is this design's reading of
// its one-round-per-clock timing. Interface: state_i and the round constant
// rc_i in, state_o out.
module keccak_cbox
  import sha3_pkg::*;
(
  input  state_t state_i,
  input  lane_t  rc_i,
  output state_t state_o
);

  state_t theta_s;
  state_t chi_s;

  keccak_theta      u_theta (.state_i(state_i), .state_o(theta_s));
  keccak_rho_pi_chi u_rpc   (.state_i(theta_s), .state_o(chi_s));
  keccak_iota       u_iota  (.state_i(chi_s),   .rc_i(rc_i), .state_o(state_o));

endmodule
