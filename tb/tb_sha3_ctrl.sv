// tb_sha3_ctrl: drives block hand-overs at random times and checks every
// control output each cycle against a cycle model: Ctrl 1 low only while
// idle, rounds 1..23 after an accepted block (24 cycles per block), Reg B
// load and Reg A clear only in round 23 of a last block, and the round
// number sent to the round-constant register. Also measures the block
// period when blocks are offered back to back.
module tb_sha3_ctrl;
  import sha3_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   blk_valid = 1'b0, blk_last = 1'b0;
  logic   blk_ready, ctrl1, state_en, state_clr, regb_load, rc_adv, busy;
  round_t round, round_next;
  int checks = 0, failures = 0;

  sha3_ctrl dut (
    .clk_i(clk), .rst_ni(rst_n), .blk_valid_i(blk_valid), .blk_last_i(blk_last),
    .blk_ready_o(blk_ready), .ctrl1_o(ctrl1), .state_en_o(state_en),
    .state_clr_o(state_clr), .regb_load_o(regb_load), .round_o(round),
    .rc_adv_o(rc_adv), .round_next_o(round_next), .busy_o(busy));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp_v, $time);
    end
  endtask

  // Cycle model.
  int  m_round = 0;      // 0 = idle, else round being computed
  bit  m_last  = 0;
  int  accepts = 0, last_accept = -1, cyc = 0, periods_24 = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      cyc++;
      blk_valid = (n > 1500) ? 1'b1 : 1'($urandom_range(0, 2) == 0);
      blk_last  = 1'($urandom_range(0, 1));
      #1;
      if (m_round == 0) begin
        expect_eq(blk_ready, 1, "ready when idle");
        expect_eq(ctrl1, 0, "ctrl1 low when idle");
        expect_eq(state_en, blk_valid, "load on accept");
        expect_eq(busy, 0, "not busy");
        expect_eq(regb_load, 0, "no regb load when idle");
        if (blk_valid) begin
          expect_eq(rc_adv, 1, "rc advance on accept");
          expect_eq(round_next, 1, "next round 1");
        end
      end else begin
        expect_eq(blk_ready, 0, "not ready while running");
        expect_eq(ctrl1, 1, "ctrl1 high while running");
        expect_eq(state_en, 1, "load each round");
        expect_eq(round, m_round, "round number");
        expect_eq(round_next, (m_round + 1) % 24, "next round");
        expect_eq(regb_load, (m_round == 23) && m_last, "regb load");
        expect_eq(state_clr, (m_round == 23) && m_last, "state clear");
      end
      @(posedge clk);
      if (m_round == 0) begin
        if (blk_valid) begin
          m_round = 1;
          m_last  = blk_last;
          if (last_accept >= 0 && n > 1502) begin
            expect_eq(cyc - last_accept, 24, "back-to-back block period");
            periods_24++;
          end
          last_accept = cyc;
          accepts++;
        end
      end else begin
        m_round = (m_round == 23) ? 0 : m_round + 1;
      end
    end
    checks++;
    if (accepts < 50 || periods_24 < 10) begin
      failures++;
      $display("FAIL too few blocks: %0d accepts, %0d periods", accepts, periods_24);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
