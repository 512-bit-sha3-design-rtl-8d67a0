// tb_sha3_512_throughput: the core's headline operating point. Sends 40
// single-block messages (71 bytes, the largest that still pads into one
// 576-bit block) back to back with the input word presented every clock,
// checks every digest against the reference model, and checks that the
// digests come out exactly 24 clocks apart, i.e. one 576-bit block per 24
// clocks (24 rate bits per clock; 7.22 Gbit/s at 301 MHz).
module tb_sha3_512_throughput;
  import sha3_pkg::*;
  import sha3_ref_pkg::*;

  localparam int NMSG = 40;
  localparam int LEN  = 71;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid = 1'b0, in_ready, in_last = 1'b0;
  logic [127:0] in_data = '0;
  logic [4:0]   in_bytes = '0;
  logic [511:0] digest;
  logic         digest_valid, busy;
  int checks = 0, failures = 0;

  sha3_512_top dut (
    .clk_i(clk), .rst_ni(rst_n), .in_valid_i(in_valid), .in_ready_o(in_ready),
    .in_data_i(in_data), .in_last_i(in_last), .in_bytes_i(in_bytes),
    .digest_o(digest), .digest_valid_o(digest_valid), .busy_o(busy));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned msgs [NMSG][LEN];
  logic [511:0] exp_dig [NMSG];
  int cyc = 0, ndig = 0, prev_dig = -1, first_dig = -1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (digest_valid) begin
      checks++;
      if (ndig >= NMSG || digest !== exp_dig[ndig]) begin
        failures++;
        $display("FAIL digest %0d", ndig);
      end
      if (prev_dig >= 0) begin
        checks++;
        if (cyc - prev_dig != 24) begin
          failures++;
          $display("FAIL digest spacing %0d clocks, expected 24", cyc - prev_dig);
        end
      end else first_dig = cyc;
      prev_dig = cyc;
      ndig++;
    end
  end

  initial begin
    byte unsigned q[$];
    for (int m = 0; m < NMSG; m++) begin
      q = {};
      for (int b = 0; b < LEN; b++) begin
        msgs[m][b] = 8'($urandom());
        q.push_back(msgs[m][b]);
      end
      exp_dig[m] = sha3_512(q);
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < NMSG; m++) begin
      for (int w = 0; w < (LEN + 15) / 16; w++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_data  = '0;
        for (int b = 0; b < 16; b++)
          if (16*w + b < LEN) in_data[127 - 8*b -: 8] = msgs[m][16*w + b];
        in_last  = (w == (LEN + 15) / 16 - 1);
        in_bytes = in_last ? 5'(LEN - 16*w) : 5'd16;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    while (ndig < NMSG) @(posedge clk);
    $display("%0d blocks in %0d clocks after the first digest: %0d rate bits per clock",
             NMSG - 1, prev_dig - first_dig, 576 * (NMSG - 1) / (prev_dig - first_dig));
    checks++;
    if (ndig != NMSG) begin
      failures++;
      $display("FAIL %0d digests, expected %0d", ndig, NMSG);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
