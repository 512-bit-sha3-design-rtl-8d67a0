// sha3_rc_reg: register holding the iota round constant of the current round.
//
// The constant is fetched one cycle ahead: whenever the controller moves to
// a new round (adv_i high) the register loads RC[round_next_i], so the
// constant of the round being computed is always at a flop output and never
// on the round's critical path. Holding the constant in a register follows
// the published design; loading it one cycle ahead is this design's choice. Reset loads RC[0], the constant of the
// first round of a block. Interface: clk_i, rst_ni (active-low, synchronous
// to clk_i, asynchronous assert), adv_i, round_next_i; rc_o. Timing: rc_o
// changes one clock after adv_i.
module sha3_rc_reg
  import sha3_pkg::*;
(
  input  logic   clk_i,
  input  logic   rst_ni,
  input  logic   adv_i,
  input  round_t round_next_i,
  output lane_t  rc_o
);

  lane_t rc_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)    rc_q <= round_const(round_t'(0));
    else if (adv_i) rc_q <= round_const(round_next_i);
  end

  assign rc_o = rc_q;

endmodule
