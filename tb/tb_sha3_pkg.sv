// tb_sha3_pkg: checks the constant tables and helpers of sha3_pkg: the 24
// round constants against the FIPS 202 LFSR, the 25 rho offsets against
// the (x,y) walk, and the lane rotation against a bit-by-bit rotation.
module tb_sha3_pkg;
  import sha3_pkg::*;
  import sha3_ref_pkg::*;

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lane_t a, r;
    for (int i = 0; i < NUM_ROUNDS; i++) begin
      checks++;
      if (round_const(round_t'(i)) !== rc_of(i)) begin
        failures++;
        $display("FAIL RC[%0d] = %h, expected %h", i, round_const(round_t'(i)), rc_of(i));
      end
    end
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++) begin
        checks++;
        if (RHO_OFS[x][y] != rho_of(x, y)) begin
          failures++;
          $display("FAIL rho offset [%0d][%0d] = %0d, expected %0d", x, y, RHO_OFS[x][y], rho_of(x, y));
        end
      end
    for (int n = 0; n < 64; n++) begin
      a = {$urandom(), $urandom()};
      for (int b = 0; b < 64; b++) r[(b + n) % 64] = a[b];
      checks++;
      if (rotl(a, n) !== r) begin
        failures++;
        $display("FAIL rotl by %0d", n);
      end
    end
    checks++;
    if (RATE_BITS + CAP_BITS != 1600 || RATE_BYTES != 72 || RATE_LANES != 9) begin
      failures++;
      $display("FAIL SHA3-512 sizes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
