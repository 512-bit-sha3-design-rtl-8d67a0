// sha3_padder: 128-bit input interface, padding block and byte inversion.
//
// The message arrives as a byte string in 128-bit words, first byte in bits
// [127:120], with a valid/ready handshake. in_last_i marks the final word
// and in_bytes_i (0..16) tells how many of its leading bytes belong to the
// message; other words carry 16 bytes. Bytes are gathered into a 72-byte
// buffer, the 576-bit rate of SHA3-512. Because 72 is not a multiple of 16,
// a word can straddle two blocks: its first bytes complete the block and
// the rest (at most 8 bytes) wait in a carry register until the block has
// been handed to the core.
//
// After the last message byte the SHA-3 padding is applied: 0x06 at the
// next free byte and 0x80 ORed into byte 71 (giving 0x86 when they meet).
// If the message ends exactly at, or straddles, a block boundary, the
// padding goes into the following block.
//
// blk_data_o is the block presented as a whole 1600-bit state: the nine
// rate lanes are formed little-endian from the byte string (the byte-order
// inversion between the input stream and the Keccak lanes) and the 1024
// capacity bits are zero. blk_valid_o / blk_ready_i hand the block over;
// blk_last_o marks the final block of a message. While a block waits, no
// input is accepted (in_ready_o low). Words are taken at one per clock.
// The 128-bit input, the padding block and the byte inversion follow the
// published design; the byte count, the handshake and the carry register
// are this design's own.
module sha3_padder
  import sha3_pkg::*;
(
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            in_valid_i,
  output logic            in_ready_o,
  input  logic [IN_W-1:0] in_data_i,
  input  logic            in_last_i,
  input  logic [4:0]      in_bytes_i,
  output logic            blk_valid_o,
  input  logic            blk_ready_i,
  output state_t          blk_data_o,
  output logic            blk_last_o
);

  typedef logic [7:0] byte_t;

  byte_t       buf_q   [RATE_BYTES];
  byte_t       buf_d   [RATE_BYTES];
  byte_t       carry_q [8];
  byte_t       carry_d [8];
  byte_t       word_b  [IN_BYTES];
  logic [6:0]  fill_q, fill_d;          // bytes held in the buffer, 0..72
  logic [3:0]  carry_len_q, carry_len_d;
  logic        pad_pend_q, pad_pend_d;  // padding still owed to the next block
  logic        valid_q, valid_d;
  logic        last_q, last_d;
  logic [4:0]  n_bytes;
  logic [7:0]  end_pos;

  assign in_ready_o = !valid_q;

  always_comb begin
    for (int k = 0; k < IN_BYTES; k++) word_b[k] = in_data_i[IN_W - 1 - 8 * k -: 8];
    n_bytes = !in_last_i ? 5'(IN_BYTES)
            : (in_bytes_i > 5'(IN_BYTES)) ? 5'(IN_BYTES) : in_bytes_i;
    end_pos = 8'(fill_q) + 8'(n_bytes);
  end

  always_comb begin
    buf_d       = buf_q;
    carry_d     = carry_q;
    fill_d      = fill_q;
    carry_len_d = carry_len_q;
    pad_pend_d  = pad_pend_q;
    valid_d     = valid_q;
    last_d      = last_q;

    if (valid_q && blk_ready_i) begin
      // Block handed over: restart with the carried bytes, then any padding owed.
      for (int i = 0; i < RATE_BYTES; i++) buf_d[i] = '0;
      for (int i = 0; i < 8; i++) begin
        if (i < int'(carry_len_q)) buf_d[i] = carry_q[i];
      end
      fill_d      = 7'(carry_len_q);
      carry_len_d = '0;
      valid_d     = 1'b0;
      last_d      = 1'b0;
      if (pad_pend_q) begin
        buf_d[7'(carry_len_q)] = buf_d[7'(carry_len_q)] | PAD_FIRST;
        buf_d[RATE_BYTES - 1] = buf_d[RATE_BYTES - 1] | PAD_LAST;
        pad_pend_d = 1'b0;
        valid_d    = 1'b1;
        last_d     = 1'b1;
      end
    end else if (in_valid_i && in_ready_o) begin
      for (int i = 0; i < RATE_BYTES; i++) begin
        if (i >= int'(fill_q) && i < int'(end_pos)) buf_d[i] = word_b[4'(i - int'(fill_q))];
      end
      if (end_pos < 8'(RATE_BYTES)) begin
        fill_d = 7'(end_pos);
        if (in_last_i) begin
          buf_d[end_pos[6:0]]   = buf_d[end_pos[6:0]] | PAD_FIRST;
          buf_d[RATE_BYTES - 1] = buf_d[RATE_BYTES - 1] | PAD_LAST;
          valid_d = 1'b1;
          last_d  = 1'b1;
        end
      end else begin
        fill_d  = 7'(RATE_BYTES);
        valid_d = 1'b1;
        if (in_last_i) pad_pend_d = 1'b1;
        carry_len_d = 4'(end_pos - 8'(RATE_BYTES));
        for (int j = 0; j < 8; j++) begin
          carry_d[j] = (j < int'(carry_len_d))
                     ? word_b[4'(RATE_BYTES - int'(fill_q) + j)] : '0;
        end
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < RATE_BYTES; i++) buf_q[i] <= '0;
      for (int i = 0; i < 8; i++) carry_q[i] <= '0;
      fill_q      <= '0;
      carry_len_q <= '0;
      pad_pend_q  <= 1'b0;
      valid_q     <= 1'b0;
      last_q      <= 1'b0;
    end else begin
      buf_q       <= buf_d;
      carry_q     <= carry_d;
      fill_q      <= fill_d;
      carry_len_q <= carry_len_d;
      pad_pend_q  <= pad_pend_d;
      valid_q     <= valid_d;
      last_q      <= last_d;
    end
  end

  // Present the block as a state: rate lanes little-endian, capacity zero.
  always_comb begin
    blk_data_o = '0;
    for (int i = 0; i < RATE_LANES; i++) begin
      for (int b = 0; b < 8; b++) begin
        blk_data_o[i % 5][i / 5][8 * b +: 8] = buf_q[8 * i + b];
      end
    end
  end

  assign blk_valid_o = valid_q;
  assign blk_last_o  = last_q;

  // A presented block stays stable until taken.
  a_blk_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (blk_valid_o && !blk_ready_i) |=> (blk_valid_o && $stable(blk_data_o)));

endmodule
