// tb_sha3_padder: sends messages of many lengths (0 to 300 bytes, all
// lengths around the 72-byte block boundary included) through the padder
// with random gaps on the input and random stalls on the block side, and
// compares every block and its last flag with the reference padding.
// Counts the cases that exercise each mechanism: a word split across two
// blocks, padding pushed into an extra block, input back-pressure.
module tb_sha3_padder;
  import sha3_pkg::*;
  import sha3_ref_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid = 1'b0, in_ready, in_last = 1'b0;
  logic [127:0] in_data = '0;
  logic [4:0]   in_bytes = '0;
  logic         blk_valid, blk_ready = 1'b0, blk_last;
  state_t       blk_data;
  int checks = 0, failures = 0;
  int n_split = 0, n_pad_block = 0, n_stall = 0;

  sha3_padder dut (
    .clk_i(clk), .rst_ni(rst_n), .in_valid_i(in_valid), .in_ready_o(in_ready),
    .in_data_i(in_data), .in_last_i(in_last), .in_bytes_i(in_bytes),
    .blk_valid_o(blk_valid), .blk_ready_i(blk_ready), .blk_data_o(blk_data),
    .blk_last_o(blk_last));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected blocks, queued by the driver, checked by the receiver.
  logic [1599:0] exp_blk [$];
  bit            exp_last [$];

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && !in_ready) n_stall++;
      if (blk_valid && blk_ready) begin
        checks++;
        if (exp_blk.size() == 0) begin
          failures++;
          $display("FAIL unexpected block");
        end else begin
          if (blk_data !== exp_blk[0] || blk_last !== exp_last[0]) begin
            failures++;
            $display("FAIL block mismatch (last exp %0b got %0b)", exp_last[0], blk_last);
          end
          void'(exp_blk.pop_front());
          void'(exp_last.pop_front());
        end
      end
      blk_ready <= 1'($urandom_range(0, 3) == 0);
    end
  end

  task automatic send(input byte unsigned msg[$]);
    byte unsigned p[$];
    int nblk, nw;
    pad_msg(msg, p);
    nblk = p.size() / 72;
    for (int k = 0; k < nblk; k++) begin
      exp_blk.push_back(to_packed(block_state(p, k)));
      exp_last.push_back(k == nblk - 1);
    end
    if (msg.size() % 72 == 0 || (msg.size() % 72 > 64)) n_pad_block++;
    if (msg.size() > 72) n_split++;
    nw = (msg.size() + 15) / 16;
    if (nw == 0) nw = 1;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) @(negedge clk);
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

  initial begin
    byte unsigned msg[$];
    int lens[$];
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int l = 0; l <= 300; l++)
      if (l < 20 || (l > 55 && l < 90) || (l > 135 && l < 150) || l > 210 && l < 220 || l == 300)
        lens.push_back(l);
    foreach (lens[i]) begin
      msg = {};
      for (int b = 0; b < lens[i]; b++) msg.push_back(8'($urandom()));
      send(msg);
    end
    repeat (400) @(posedge clk);
    checks++;
    if (exp_blk.size() != 0) begin
      failures++;
      $display("FAIL %0d blocks never came out", exp_blk.size());
    end
    checks++;
    if (n_split == 0 || n_pad_block == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: split=%0d pad_block=%0d stall=%0d",
               n_split, n_pad_block, n_stall);
    end
    $display("mechanisms: multi-block=%0d extra-pad-block=%0d input-stall-cycles=%0d",
             n_split, n_pad_block, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
