// sha3_512_top: iterative SHA3-512 hash core.
//
// Datapath: 128-bit input -> padding block (sha3_padder) -> 2:1 MUX and
// Reg A (sha3_state_reg) -> compression box computing one Keccak-f[1600]
// round per clock (keccak_cbox, with theta and a merged rho/pi/chi step) ->
// back to Reg A for 24 rounds -> Reg B and output byte reordering /
// truncation (sha3_digest_out). sha3_ctrl sequences the rounds and drives
// the multiplexer select Ctrl 1; sha3_rc_reg holds the round constant.
//
// Interface: the message enters as bytes packed in 128-bit words (first byte
// in [127:120]) with in_valid_i / in_ready_o; in_last_i marks the final word
// and in_bytes_i gives its byte count (0..16). digest_o (first digest byte
// in [511:504]) is valid when digest_valid_o pulses and holds until the next
// message completes. Timing: a 576-bit block is absorbed in exactly 24
// clocks; the digest appears 24 clocks after the last block is taken by
// the core, and blocks are taken back to back every 24 clocks. The block
// structure follows the published design; the port-level framing of the
// message is this design's own.
module sha3_512_top
  import sha3_pkg::*;
(
  input  logic                   clk_i,
  input  logic                   rst_ni,
  input  logic                   in_valid_i,
  output logic                   in_ready_o,
  input  logic [IN_W-1:0]        in_data_i,
  input  logic                   in_last_i,
  input  logic [4:0]             in_bytes_i,
  output logic [DIGEST_BITS-1:0] digest_o,
  output logic                   digest_valid_o,
  output logic                   busy_o
);

  state_t blk_data, mux_out, cbox_out;
  logic   blk_valid, blk_ready, blk_last;
  logic   ctrl1, state_en, state_clr, regb_load, rc_adv;
  round_t round, round_next;
  lane_t  rc;

  sha3_padder u_padder (
    .clk_i, .rst_ni,
    .in_valid_i, .in_ready_o, .in_data_i, .in_last_i, .in_bytes_i,
    .blk_valid_o(blk_valid), .blk_ready_i(blk_ready),
    .blk_data_o(blk_data),   .blk_last_o(blk_last)
  );

  sha3_ctrl u_ctrl (
    .clk_i, .rst_ni,
    .blk_valid_i(blk_valid), .blk_last_i(blk_last), .blk_ready_o(blk_ready),
    .ctrl1_o(ctrl1), .state_en_o(state_en), .state_clr_o(state_clr),
    .regb_load_o(regb_load), .round_o(round),
    .rc_adv_o(rc_adv), .round_next_o(round_next), .busy_o
  );

  sha3_rc_reg u_rc (
    .clk_i, .rst_ni, .adv_i(rc_adv), .round_next_i(round_next), .rc_o(rc)
  );

  sha3_state_reg u_state (
    .clk_i, .rst_ni, .ctrl1_i(ctrl1), .en_i(state_en), .clr_i(state_clr),
    .data_i(blk_data), .cbox_i(cbox_out), .mux_o(mux_out)
  );

  keccak_cbox u_cbox (.state_i(mux_out), .rc_i(rc), .state_o(cbox_out));

  sha3_digest_out u_out (
    .clk_i, .rst_ni, .load_i(regb_load), .state_i(cbox_out),
    .digest_o, .valid_o(digest_valid_o)
  );

  // The round constant register must hold RC[round] while a round runs.
  a_rc_matches: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (state_en) |-> (rc == round_const(round)));

endmodule
