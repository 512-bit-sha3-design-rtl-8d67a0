// tb_sha3_512_top: end-to-end test of the SHA3-512 core at its only
// configuration. Hashes known-answer messages (the empty string, "abc" and
// 200 bytes of 0xA3, digests from the SHA-3 standard's examples) and random
// messages of 0..400 bytes, comparing every digest with the reference
// model. It also checks the timing: the digest must appear exactly 24
// clocks after the core takes the last block, and blocks of one streamed
// message must be taken every 24 clocks. Each mechanism of the design is
// counted and must occur: multi-block absorb, a word split across blocks,
// padding in an extra block, input back-pressure, Reg A cleared between
// messages (consecutive messages), back-to-back blocks.
module tb_sha3_512_top;
  import sha3_pkg::*;
  import sha3_ref_pkg::*;

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
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_multi = 0, n_split = 0, n_pad_block = 0, n_stall = 0, n_msgs = 0;
  int n_b2b = 0, n_empty = 0;

  // Expected digests, in message order.
  logic [511:0] exp_dig [$];

  // Block hand-over observation, for the timing checks.
  int  cyc = 0, last_take = -1, last_blk_take = -1;
  bit  streaming = 0;
  bit  prev_last = 1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_valid && !in_ready) n_stall++;
      if (digest_valid) begin
        checks++;
        if (cyc - last_blk_take != 24) begin
          failures++;
          $display("FAIL digest latency %0d, expected 24", cyc - last_blk_take);
        end
        checks++;
        if (exp_dig.size() == 0) begin
          failures++;
          $display("FAIL unexpected digest");
        end else begin
          if (digest !== exp_dig[0]) begin
            failures++;
            $display("FAIL digest %0d\n  got %h\n  exp %h", n_msgs, digest, exp_dig[0]);
          end
          void'(exp_dig.pop_front());
        end
        n_msgs++;
      end
      if (dut.blk_valid && dut.blk_ready) begin
        if (streaming && !prev_last) begin
          checks++;
          n_b2b++;
          if (cyc - last_take != 24) begin
            failures++;
            $display("FAIL streamed block period %0d, expected 24", cyc - last_take);
          end
        end
        last_take = cyc;
        prev_last = dut.blk_last;
        if (dut.blk_last) last_blk_take = cyc;
      end
    end
  end

  task automatic send(input byte unsigned msg[$], input logic [511:0] exp_v, input bit gaps);
    int nw;
    exp_dig.push_back(exp_v);
    if (msg.size() >= 72) n_multi++;
    if (msg.size() % 72 == 0 || msg.size() % 72 > 64) n_pad_block++;
    if (msg.size() > 72) n_split++;
    if (msg.size() == 0) n_empty++;
    nw = (msg.size() + 15) / 16;
    if (nw == 0) nw = 1;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk);
      while (gaps && $urandom_range(0, 3) == 0) @(negedge clk);
      in_valid = 1'b1;
      in_data  = '0;
      for (int b = 0; b < 16; b++)
        if (16*w + b < msg.size()) in_data[127 - 8*b -: 8] = msg[16*w + b];
      in_last  = (w == nw - 1);
      in_bytes = in_last ? 5'(msg.size() - 16*w) : 5'd16;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 1'b0;
    end
  endtask

  task automatic wait_idle();
    while (exp_dig.size() != 0) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  initial begin
    byte unsigned msg[$];
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // Known answers.
    msg = {};
    send(msg, 512'ha69f73cca23a9ac5c8b567dc185a756e97c982164fe25859e0d1dcc1475c80a615b2123af1f5f94c11e3e9402c3ac558f500199d95b6d3e301758586281dcd26, 0);
    msg = '{8'h61, 8'h62, 8'h63};
    send(msg, 512'hb751850b1a57168a5693cd924b6b096e08f621827444f70d884f5d0240d2712e10e116e9192af3c91a7ec57647e3934057340b4cf408d5a56592f8274eec53f0, 0);
    wait_idle();
    msg = {};
    for (int i = 0; i < 200; i++) msg.push_back(8'hA3);
    streaming = 1;
    send(msg, 512'he76dfad22084a8b1467fcf2ffa58361bec7628edf5f3fdc0e4805dc48caeeca81b7c13c30adf52a3659584739a2df46be589c51ca1a4a8416df6545a1ce8ba00, 0);
    wait_idle();
    streaming = 0;

    // Random messages, lengths around the block boundaries, random gaps.
    for (int n = 0; n < 60; n++) begin
      int len;
      len = (n < 30) ? n * 12 + (n % 3) : int'($urandom_range(0, 400));
      msg = {};
      for (int b = 0; b < len; b++) msg.push_back(8'($urandom()));
      send(msg, sha3_512(msg), 1'(n % 2));
    end
    wait_idle();

    // A long message streamed without gaps: 10 blocks at one per 24 clocks.
    msg = {};
    for (int b = 0; b < 720; b++) msg.push_back(8'($urandom()));
    streaming = 1;
    send(msg, sha3_512(msg), 0);
    wait_idle();
    streaming = 0;

    checks++;
    if (n_msgs != 64) begin
      failures++;
      $display("FAIL %0d digests seen, expected 64", n_msgs);
    end
    $display("mechanisms: messages=%0d multi-block=%0d split-word=%0d extra-pad-block=%0d",
             n_msgs, n_multi, n_split, n_pad_block);
    $display("            empty=%0d input-stall-cycles=%0d back-to-back-blocks=%0d",
             n_empty, n_stall, n_b2b);
    checks++;
    if (n_multi == 0 || n_split == 0 || n_pad_block == 0 || n_stall == 0 ||
        n_b2b == 0 || n_empty == 0 || n_msgs < 2) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
