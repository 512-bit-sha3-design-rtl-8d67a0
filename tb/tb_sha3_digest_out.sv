// tb_sha3_digest_out: loads random states into Reg B and checks the 512-bit
// digest (lanes 0..7, little-endian bytes, first byte at [511:504]), that
// it holds between loads, and that valid pulses one cycle after each load.
module tb_sha3_digest_out;
  import sha3_pkg::*;
  import sha3_ref_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  state_t       st;
  logic [511:0] digest, exp_d;
  logic         valid;
  int checks = 0, failures = 0;

  sha3_digest_out dut (.clk_i(clk), .rst_ni(rst_n), .load_i(load), .state_i(st),
                       .digest_o(digest), .valid_o(valid));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rstate_t a;
    logic    was_load;
    exp_d = '0;
    st = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      a    = rand_state();
      st   = to_packed(a);
      load = 1'($urandom_range(0, 2) == 0);
      was_load = load;
      if (load) for (int k = 0; k < 64; k++) exp_d[511 - 8*k -: 8] = a[k / 8][8 * (k % 8) +: 8];
      @(posedge clk);
      #1;
      checks++;
      if (digest !== exp_d || valid !== was_load) begin
        failures++;
        $display("FAIL step %0d load=%0b valid=%0b", n, was_load, valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
