# SHA3-512 iterative hash core

A compact SHA3-512 core that computes one full Keccak-f[1600] round per
clock cycle and iterates it 24 times over a single 1600-bit state register.
Its area saving comes from how the round is built. The rho rotations and
the pi lane permutation are folded into the chi step as wiring, so no
intermediate state array exists between theta and the end of the round.
A 576-bit message block is absorbed in exactly 24 clocks. That is
24 bits per clock, for example 7.22 Gbit/s at 301 MHz.

The architecture follows a published FPGA design of a sequential SHA3-512
core: 128-bit input, padding block, a 2:1 multiplexer in front of the state
register "Reg A", a compression box ("C-Box") computing the round, a
round-constant register, an output register "Reg B" and an output stage that
reorders and truncates. Where that description is silent or inconsistent,
the choices made here are listed under [Design choices](#design-choices-and-departures).

```
 in_data_i (128) ──► sha3_padder ──blk_data (1600)──┐
 in_valid/ready        72-byte buffer, padding,      │            ┌───────────────┐
 in_last, in_bytes     byte→lane reordering          ▼            │               │
                                              ┌─────────────┐     │  keccak_cbox  │
                             Ctrl 1 ─────────►│ MUX: A^blk  │────►│ theta         │
                                              │   or  A     │     │ rho+pi+chi    │
                                              └─────────────┘     │ iota ◄── rc   │
                                                    ▲             └──────┬────────┘
                                                    │ Reg A (1600)       │
                                                    └──── sha3_state_reg ◄┤
                                                                          ▼
                         sha3_ctrl (round 0..23) ──► sha3_rc_reg    sha3_digest_out
                                                                   Reg B, truncate to
                                                                   512, byte reorder
                                                                        │
                                                                 digest_o (512)
```

## The state and its layout

The Keccak state is 25 lanes of 64 bits, A[x][y] with x, y in 0..4. In the
RTL it is the packed type `sha3_pkg::state_t`, `logic [4:0][4:0][63:0]`,
indexed `state[x][y]`. Being packed, it crosses ports as one 1600-bit
vector. The FIPS 202 lane number is x + 5y. This matters only at the two
byte interfaces:

* Rate lanes 0..8 (x + 5y < 9) hold message bytes 8i..8i+7, little-endian:
  byte 8i is bits [7:0] of lane i.
* Digest byte k is byte k mod 8 of lane k/8.

SHA3-512 has rate r = 576 bits (72 bytes, nine lanes) and capacity
c = 1024 bits. The capacity lanes of every block entering the core are zero.

## The round: theta, then rho/pi/chi as one step, then iota

`keccak_cbox` chains three combinational modules. There is no register
inside the round.

**theta** (`keccak_theta`). The five column parities
C[x] = A[x][0] ^ … ^ A[x][4] are computed 64 bits wide in parallel. Then
D[x] = C[x-1] ^ ROT(C[x+1], 1) is XORed into every lane of column x.

**rho + pi + chi** (`keccak_rho_pi_chi`). This is the key step of the design.
Done literally, rho rotates every lane, pi moves A[x][y] to
B[y][2x+3y], and chi computes

    A'[x][y] = B[x][y] ^ (~B[x+1][y] & B[x+2][y])

Rotations by constants and lane moves cost no logic, so the module never
builds B. Each chi input is taken straight from its source lane in the
theta output. Inverting the pi map gives the source:

    B[X][Y] = ROT( A[(X + 3Y) mod 5][X],  r[(X + 3Y) mod 5][X] )

Here r[x][y] are the standard rho offsets. For example, the output lane [1][3] is

    A'[1][3] = ROT(A[0][1],36) ^ (~ROT(A[1][2],10) & ROT(A[2][3],15))

In the RTL the function `b_lane()` does this index arithmetic at
elaboration. What remains in hardware is one NOT/AND/XOR level per output
bit, fed by wires.

**iota** (`keccak_iota`) XORs the round constant into lane [0][0].

## Round constants

`sha3_rc_reg` holds the constant of the round being computed. It is
loaded one clock ahead: when the controller starts round n, the register
takes RC[n+1], or RC[0] after round 23. The constant therefore always comes
from a flip-flop. After reset it holds RC[0]. The 24 constants and the 25
rho offsets are the FIPS 202 values. They are kept as tables in `sha3_pkg`.
The testbench checks them against the LFSR and the (x,y) walk that define them.

## Control and timing

`sha3_ctrl` has two states, IDLE and RUN, and a 5-bit round counter.

| cycle | Ctrl 1 | multiplexer output into the C-Box | Reg A after the edge |
|-------|--------|-----------------------------------|----------------------|
| block taken (IDLE, `blk_valid & blk_ready`) | 0 | Reg A ^ padded block | round 0 result |
| rounds 1..22 | 1 | Reg A | round n result |
| round 23 | 1 | Reg A | round 23 result, or cleared to 0 if this was the message's last block (Reg B loads the result instead) |

* **Per block:** 24 clocks. The core takes the next block in the clock
  after round 23, so a streamed message runs at one block per 24 clocks.
* **Latency:** `digest_valid_o` pulses 24 clocks after the core takes the
  last block of a message. `digest_o` then holds until the next digest.
* **Reg A:** it is zero at the start of every message. For the first block
  the data entry is therefore the block itself. For later blocks it is the
  sponge absorb, state XOR block.

Rounds run at full rate only if the next block is waiting. The padder can
fill a block from five input words in five clocks, well inside the 24
clocks of a round sequence.

## Input interface and padding (`sha3_padder`)

The message is a byte string sent in 128-bit words with `in_valid_i` /
`in_ready_o`. The first byte of a word is in bits [127:120].
`in_last_i` marks the final word. Its `in_bytes_i` (0..16) says how many
leading bytes are message; any other word carries 16 bytes. An empty message
is one final word with `in_bytes_i = 0`.

Bytes are collected into a 72-byte buffer. A block holds 4.5 words, so
every other block ends in the middle of a word. The word's first 8 bytes
then complete the block, and the rest waits in an 8-byte carry register.
That carry becomes the start of the next block once the core has taken the
current one. While a full block waits for the core, `in_ready_o` is low.

After the last byte the SHA-3 padding is inserted: 0x06 at the next free
byte and 0x80 ORed into byte 71 (0x86 if they coincide). In two cases the
padding goes into an extra block of its own (plus any carried bytes): the
message fills the block exactly, or the final word straddles the block end.
The block leaves the padder as a whole `state_t` with its capacity zeroed.
The bytes are already placed little-endian into the lanes, which reverses
their order relative to the input stream.

## Output (`sha3_digest_out`)

Reg B is loaded in round 23 of a message's last block. Only the 512 digest
bits (lanes 0..7) are stored, since truncating before the register gives
the same output with half the flip-flops. The output wiring reverses the
bytes of each lane, so `digest_o[511:504]` is the first digest byte. That
is the usual hex order of a SHA3-512 digest. No squeeze permutation is
needed, because 512 bits fit in the 576-bit rate.

## Design choices and departures

* **One round per clock, no registers inside the round.** The source
  describes theta's intermediate results as "stored" in registers. It also
  states 24 clocks per hash and a throughput of 576 bits × f / 24. Both of
  those imply one register per round, so this design keeps theta
  combinational.
* **Multiplexer in front of the C-Box.** The source describes copying the
  padded message into Reg A and then iterating. Here the multiplexer feeds
  the C-Box, and Reg A holds the round result. Round 0 thus starts in the
  clock the block is taken, which gives exactly 24 clocks per block rather
  than 25.
* **Multi-block messages** are supported by absorbing each block into the
  state (XOR) through the multiplexer. The source's block diagram shows a
  single block.
* **Input framing.** The byte count of the final word, the valid/ready
  handshake and the carry register are choices of this design. The source
  gives only a 128-bit input with an extra end-of-message bit.
* **Byte-granular messages.** Messages must be whole bytes. Bit-length
  messages are not supported.
* **Reset** is active-low (`rst_ni`), asserted asynchronously. It zeroes
  every register except the round-constant register, which resets to RC[0].
* **Not covered:** the reported FPGA results (240 slices, 301 MHz on a
  Virtex-5) are properties of the source's implementation. RTL simulation
  cannot confirm them. The cycle counts they rest on are checked.

## Files

| file | contents |
|------|----------|
| `rtl/sha3_pkg.sv` | types, sizes, rho offsets, round constants, `rotl()` |
| `rtl/keccak_theta.sv` | theta |
| `rtl/keccak_rho_pi_chi.sv` | merged rho, pi and chi |
| `rtl/keccak_iota.sv` | iota |
| `rtl/keccak_cbox.sv` | one complete round |
| `rtl/sha3_rc_reg.sv` | round-constant register |
| `rtl/sha3_state_reg.sv` | input multiplexer and Reg A |
| `rtl/sha3_ctrl.sv` | round controller |
| `rtl/sha3_padder.sv` | input interface, padding, byte reordering |
| `rtl/sha3_digest_out.sv` | Reg B and output stage |
| `rtl/sha3_512_top.sv` | the core |
| `tb/sha3_ref_pkg.sv` | reference SHA3-512 model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_sha3_512_throughput` |

## Verification

The reference model in `tb/sha3_ref_pkg.sv` is written separately from the
RTL. It generates the round constants with the FIPS 202 LFSR and the rho
offsets by the (x,y) walk. It applies rho, pi and chi as separate steps on
a flat 25-lane array. Its output matches the published digests of the
empty string and of "abc".

Every testbench prints `TB_RESULT checks=N failures=M`:

* **Step testbenches** (`tb_keccak_*`). These compare each step with the
  model on random states. They also check the worked lane example above
  and a full 24-round permutation.
* **Register and control testbenches.** These check, cycle by cycle:
  - the multiplexer and Reg A;
  - the round-constant register;
  - every controller output, including the 24-clock block period;
  - Reg B's byte order and its valid pulse.
* **Padder testbench.** It sends all message lengths near the block
  boundaries, with random input gaps and random core stalls. It compares
  every block with the model's padding.
* **`tb_sha3_512_top`.** This runs the whole core:
  - three known-answer digests: empty, "abc", and 200 × 0xA3;
  - 60 random messages of up to 400 bytes;
  - one 10-block message streamed without gaps.

  It checks the 24-clock digest latency and the 24-clock block period. It
  also counts the multi-block, split-word, extra-padding-block,
  empty-message, input-stall and back-to-back cases, and fails if any of
  them never happens.

* **`tb_sha3_512_throughput`.** This runs the headline operating point. It
  sends 40 single-block messages (71 bytes each) with an input word offered
  every clock. It checks every digest and requires the digests to come out
  exactly 24 clocks apart.

Assertions in the RTL check three rules:
- the round counter's range;
- block stability while `blk_valid` waits;
- the round constant matching the round.

To simulate with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sha3_pkg.sv tb/sha3_ref_pkg.sv tb/tb_sha3_512_top.sv \
    --top-module tb_sha3_512_top -Mdir obj_top
./obj_top/Vtb_sha3_512_top
```

Any other testbench runs the same way with its own name. To lint the core:

```
verilator --lint-only -Wall -Irtl rtl/sha3_pkg.sv rtl/sha3_512_top.sv --top-module sha3_512_top
```
