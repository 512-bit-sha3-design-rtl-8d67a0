// tb_keccak_cbox: checks one compression-box round against the reference
// round for random states and every round index, and chains 24 rounds
// through the box to compare with the reference Keccak-f[1600]
// permutation, including the all-zero state.
module tb_keccak_cbox;
  import sha3_pkg::*;
  import sha3_ref_pkg::*;

  state_t din, dout;
  lane_t  rc;
  int checks = 0, failures = 0;

  keccak_cbox dut (.state_i(din), .rc_i(rc), .state_o(dout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rstate_t a;
    for (int n = 0; n < 240; n++) begin
      a  = rand_state();
      din = to_packed(a);
      rc = rc_of(n % 24);
      #1;
      checks++;
      if (dout !== to_packed(ref_round(a, n % 24))) begin
        failures++;
        $display("FAIL round %0d state %0d", n % 24, n);
      end
    end
    for (int n = 0; n < 4; n++) begin
      a = (n == 0) ? from_packed('0) : rand_state();
      din = to_packed(a);
      for (int ir = 0; ir < 24; ir++) begin
        rc = rc_of(ir);
        #1;
        din = dout;
      end
      checks++;
      if (din !== to_packed(ref_keccak_f(a))) begin
        failures++;
        $display("FAIL permutation %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
