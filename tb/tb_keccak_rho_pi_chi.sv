// tb_keccak_rho_pi_chi: checks the merged rho/pi/chi step against the
// reference model, which applies rho, pi and chi separately, and checks
// the worked example A'[1][3] = ROT(A[0][1],36) ^ (~ROT(A[1][2],10) &
// ROT(A[2][3],15)) lane by lane.
module tb_keccak_rho_pi_chi;
  import sha3_pkg::*;
  import sha3_ref_pkg::*;

  state_t din, dout;
  int checks = 0, failures = 0;

  keccak_rho_pi_chi dut (.state_i(din), .state_o(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rstate_t a;
    rlane_t  exp13;
    for (int n = 0; n < 300; n++) begin
      a = rand_state();
      din = to_packed(a);
      #1;
      checks++;
      if (dout !== to_packed(ref_chi(ref_rho_pi(a)))) begin
        failures++;
        $display("FAIL random state %0d", n);
      end
      exp13 = rot(a[0 + 5*1], 36) ^ (~rot(a[1 + 5*2], 10) & rot(a[2 + 5*3], 15));
      checks++;
      if (dout[1][3] !== exp13) begin
        failures++;
        $display("FAIL lane [1][3] example, state %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
