// sha3_ctrl: round controller of the iterative SHA3-512 core.
//
// Two states. In IDLE the controller offers blk_ready_o; when a padded
// block is handed over (blk_valid_i & blk_ready_o) it keeps Ctrl 1 low so
// the input multiplexer selects the data entry, the state register loads
// the result of round 0, and it moves to RUN. In RUN Ctrl 1 is high (the
// multiplexer selects the feedback from Reg A) and rounds 1..23 follow, one
// per clock. In round 23 of the last block of a message it loads Reg B and
// clears Reg A back to zero for the next message. A block therefore takes
// exactly 24 cycles and the next block can be accepted in the cycle after
// round 23. Ctrl 1 and its polarity and the 24 cycles per block follow
// the published design; the two-state machine is this design's own. Outputs: ctrl1_o (multiplexer select), state_en_o (Reg A load),
// state_clr_o (Reg A clear), regb_load_o, round_o (round being computed),
// rc_adv_o / round_next_o (round-constant register), busy_o.
module sha3_ctrl
  import sha3_pkg::*;
(
  input  logic   clk_i,
  input  logic   rst_ni,
  input  logic   blk_valid_i,
  input  logic   blk_last_i,
  output logic   blk_ready_o,
  output logic   ctrl1_o,
  output logic   state_en_o,
  output logic   state_clr_o,
  output logic   regb_load_o,
  output round_t round_o,
  output logic   rc_adv_o,
  output round_t round_next_o,
  output logic   busy_o
);

  typedef enum logic {S_IDLE, S_RUN} ctrl_state_e;

  ctrl_state_e st_q, st_d;
  round_t      round_q, round_d;
  logic        last_q, last_d;
  logic        fire;

  localparam round_t LAST_ROUND = round_t'(NUM_ROUNDS - 1);

  assign blk_ready_o = (st_q == S_IDLE);
  assign fire        = blk_valid_i && blk_ready_o;

  always_comb begin
    st_d         = st_q;
    round_d      = round_q;
    last_d       = last_q;
    ctrl1_o      = 1'b1;
    state_en_o   = 1'b0;
    state_clr_o  = 1'b0;
    regb_load_o  = 1'b0;
    rc_adv_o     = 1'b0;
    round_next_o = round_q;
    unique case (st_q)
      S_IDLE: begin
        ctrl1_o = 1'b0;                  // data entry selected
        if (fire) begin
          state_en_o   = 1'b1;
          last_d       = blk_last_i;
          round_d      = round_t'(1);
          rc_adv_o     = 1'b1;
          round_next_o = round_t'(1);
          st_d         = S_RUN;
        end
      end
      S_RUN: begin
        state_en_o = 1'b1;
        rc_adv_o   = 1'b1;
        if (round_q == LAST_ROUND) begin
          round_d      = round_t'(0);
          round_next_o = round_t'(0);
          st_d         = S_IDLE;
          if (last_q) begin
            regb_load_o = 1'b1;
            state_clr_o = 1'b1;
          end
        end else begin
          round_d      = round_q + round_t'(1);
          round_next_o = round_q + round_t'(1);
        end
      end
      default: st_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      st_q    <= S_IDLE;
      round_q <= '0;
      last_q  <= 1'b0;
    end else begin
      st_q    <= st_d;
      round_q <= round_d;
      last_q  <= last_d;
    end
  end

  assign round_o = round_q;
  assign busy_o  = (st_q == S_RUN);

  // The round counter never leaves 0..23, and is 0 whenever the core idles.
  a_round_range: assert property (@(posedge clk_i) disable iff (!rst_ni)
    round_q < round_t'(NUM_ROUNDS));
  a_idle_round0: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (st_q == S_IDLE) |-> (round_q == '0));

endmodule
