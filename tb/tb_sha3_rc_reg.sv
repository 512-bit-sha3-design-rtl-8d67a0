// tb_sha3_rc_reg: checks the round-constant register: RC[0] after reset,
// RC[round_next] one clock after an advance, and no change without one.
// Constants are compared with the LFSR-generated reference values.
module tb_sha3_rc_reg;
  import sha3_pkg::*;
  import sha3_ref_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, adv = 1'b0;
  round_t rn = '0;
  lane_t  rc;
  int checks = 0, failures = 0;

  sha3_rc_reg dut (.clk_i(clk), .rst_ni(rst_n), .adv_i(adv), .round_next_i(rn), .rc_o(rc));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input lane_t exp_v, input string what);
    checks++;
    if (rc !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, rc, exp_v);
    end
  endtask

  initial begin
    lane_t prev;
    repeat (2) @(posedge clk);
    #1 check(rc_of(0), "reset value");
    rst_n = 1'b1;
    for (int k = 0; k < 3; k++) begin
      for (int r = 1; r <= 24; r++) begin
        @(negedge clk);
        adv = 1'b1;
        rn  = round_t'(r % 24);
        @(posedge clk);
        #1 check(rc_of(r % 24), "advance");
      end
    end
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      prev = rc;
      adv = 1'($urandom_range(0, 1));
      rn  = round_t'($urandom_range(0, 23));
      @(posedge clk);
      #1 check(adv ? rc_of(int'(rn)) : prev, adv ? "random advance" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
