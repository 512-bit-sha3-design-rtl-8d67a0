// sha3_digest_out: output register Reg B and the output interconnect.
//
// When load_i is high (round 23 of the last block of a message) Reg B takes
// the final state. Only the first 512 bits of the state, lanes 0..7 in
// FIPS 202 order (x + 5y), form the SHA3-512 digest, so only those are
// stored: the truncation is done before the register rather than after,
// which gives the same output with half the flip-flops. The interconnect
// then reverses the byte order: the Keccak state is little-endian inside
// each lane, while digest_o presents the digest as a byte string with its
// first byte in bits [511:504]. digest_o holds until the next load;
// valid_o is a one-cycle pulse in the cycle after the load. Reg B and the
// reordering/truncation stage follow the published design; truncating
// before the register and the valid pulse are this design's choices.
// Interface: clk_i, rst_ni, load_i, state_i; digest_o, valid_o.
module sha3_digest_out
  import sha3_pkg::*;
(
  input  logic                   clk_i,
  input  logic                   rst_ni,
  input  logic                   load_i,
  input  state_t                 state_i,
  output logic [DIGEST_BITS-1:0] digest_o,
  output logic                   valid_o
);

  localparam int unsigned OUT_LANES = DIGEST_BITS / LANE_W;   // 8

  lane_t reg_b_q [OUT_LANES];
  logic  valid_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < OUT_LANES; i++) reg_b_q[i] <= '0;
      valid_q <= 1'b0;
    end else begin
      valid_q <= load_i;
      if (load_i) begin
        for (int i = 0; i < OUT_LANES; i++) reg_b_q[i] <= state_i[i % 5][i / 5];
      end
    end
  end

  // Byte k of the digest is byte k%8 of lane k/8.
  always_comb begin
    for (int k = 0; k < DIGEST_BITS / 8; k++) begin
      digest_o[DIGEST_BITS - 1 - 8 * k -: 8] = reg_b_q[k / 8][8 * (k % 8) +: 8];
    end
  end

  assign valid_o = valid_q;

endmodule
