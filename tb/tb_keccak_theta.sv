// tb_keccak_theta: checks the theta step against the reference model on
// random states and on single-bit states (where each set bit must spread to
// exactly 11 bits: itself, two columns of five).
module tb_keccak_theta;
  import sha3_pkg::*;
  import sha3_ref_pkg::*;

  state_t din, dout;
  int checks = 0, failures = 0;

  keccak_theta dut (.state_i(din), .state_o(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rstate_t a;
    logic [1599:0] flat;
    for (int n = 0; n < 300; n++) begin
      a = rand_state();
      din = to_packed(a);
      #1;
      checks++;
      if (dout !== to_packed(ref_theta(a))) begin
        failures++;
        $display("FAIL random state %0d", n);
      end
    end
    for (int b = 0; b < 1600; b += 37) begin
      flat = '0;
      flat[b] = 1'b1;
      din = flat;
      #1;
      checks++;
      if ($countones(dout) != 11) begin
        failures++;
        $display("FAIL single bit %0d gives %0d ones", b, $countones(dout));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
