// tb_keccak_iota: checks that iota XORs the constant into lane [0][0] only,
// for random states with each of the 24 reference round constants.
module tb_keccak_iota;
  import sha3_pkg::*;
  import sha3_ref_pkg::*;

  state_t din, dout, exp_s;
  lane_t  rc;
  int checks = 0, failures = 0;

  keccak_iota dut (.state_i(din), .rc_i(rc), .state_o(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rstate_t a;
    for (int n = 0; n < 96; n++) begin
      a  = rand_state();
      din = to_packed(a);
      rc = rc_of(n % 24);
      a[0] ^= rc;
      exp_s = to_packed(a);
      #1;
      checks++;
      if (dout !== exp_s) begin
        failures++;
        $display("FAIL state %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
