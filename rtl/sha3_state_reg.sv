// sha3_state_reg: the 2:1 input multiplexer and the state register Reg A.
//
// The multiplexer feeds the compression box. With Ctrl 1 low it selects the
// data entry: the padded 1600-bit block XORed into Reg A (Reg A is zero at
// the start of a message, so for the first block this is the block itself;
// for later blocks it is the sponge absorb). With Ctrl 1 high it selects the
// feedback, Reg A unchanged. Reg A loads the compression-box output when
// en_i is high, or is cleared to zero when clr_i is high (end of a message).
// Reg A resets to zero. The multiplexer, its select and the zeroed Reg A
// follow the published design; placing the multiplexer at the C-Box input
// (so round 0 runs in the cycle the block arrives) and the XOR with Reg A
// for multi-block messages are this design's choices. Interface: clk_i, rst_ni, ctrl1_i, en_i, clr_i,
// data_i (padded block), cbox_i (round result); mux_o (to the compression
// box).
// Timing: mux_o is combinational from ctrl1_i, data_i and Reg A; Reg A
// updates on the clock edge. With ctrl1_i high, mux_o shows Reg A itself.
module sha3_state_reg
  import sha3_pkg::*;
(
  input  logic   clk_i,
  input  logic   rst_ni,
  input  logic   ctrl1_i,
  input  logic   en_i,
  input  logic   clr_i,
  input  state_t data_i,
  input  state_t cbox_i,
  output state_t mux_o
);

  state_t reg_a_q;

  assign mux_o = ctrl1_i ? reg_a_q : (reg_a_q ^ data_i);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)    reg_a_q <= '0;
    else if (clr_i) reg_a_q <= '0;
    else if (en_i)  reg_a_q <= cbox_i;
  end

endmodule
