# LTE turbo encoder with table-driven RSC state machines and ping/pong buffering

This is a rate-1/3 turbo encoder for the LTE / LTE-Advanced code block sizes:
any of the 188 block lengths from K = 40 to K = 6144 bits. For each block it
emits, one clock per information bit, the systematic bit X, the parity Z of an
upper recursive systematic convolutional (RSC) encoder fed in natural order,
and the parity Z' of a lower RSC encoder fed in the order of the QPP
(quadratic permutation polynomial) interleaver. Three clocks of trellis
termination bits follow each block.

The design follows the architecture of the paper "High performance turbo
encoder using mealy FSM state encoding technique" (Sujatha, Subhas, Giri
Prasad). It rests on three ideas:

* **RSC encoders as Mealy state machines.** Each constituent encoder is a
  3-bit state register with a 16-row transition table that gives the next
  state and the parity bit for every (input, state) pair. It replaces the
  usual shift register with XOR taps.
* **Interleaver addresses from a look-up table.** The block length selects a
  table entry (f1, f2) through a cheap five-range index rule. The
  permutation pi(i) = (f1*i + f2*i^2) mod K is then evaluated without a
  multiplier.
* **Ping/pong code block buffers.** Two dual-port RAMs take turns: one is
  loaded with the next block while the other is read by both encoders. A
  stream of blocks therefore leaves the encoder with no idle clocks between
  them.

## Data flow

```
 data_in ──► turbo_encoder_control ──► ping RAM ─┐  port A: X_i      ┌► upper RSC ─► X, Z
 (1 bit/clk)  (write side)          └► pong RAM ─┴► 2x1 mux ─────────┤
                                          ▲  ▲          port B: X_pi(i)└► lower RSC ─► Z'
                       qpp_interleaver ───┘  └── (i, pi(i)) per clock
                       (qpp_lut inside)
```

Before a block can be encoded, all of it must be stored: the lower encoder
needs bit pi(0), which can be anywhere in the block. Once a block is
complete, the control logic starts the interleaver on it. From then on the
interleaver delivers one address pair (i, pi(i)) per clock. Port A of the
buffer reads X_i and port B reads X_pi(i) in the same clock, and the two
encoders consume both bits in the next clock. Meanwhile the writer fills the
other buffer through its port A.

`data_sync_unit` groups the two buffers, the mux and the control logic. The
top, `turbo_encoder_top`, adds the interleaver, the two encoders
(`u_sys_parity`, `u_int_parity`) and an output register.

## The QPP interleaver (`qpp_interleaver`, `qpp_lut`)

LTE defines 188 block sizes, and each has its own pair (f1, f2):

| range        | step | sizes | table index                    |
|--------------|------|-------|--------------------------------|
| 40 .. 504    | 8    | 59    | (K - 32)/8 - 1                 |
| 512 .. 1008  | 16   | 32    | 60 + (K - 512)/16 - 1          |
| 1024 .. 2016 | 32   | 32    | 92 + (K - 1024)/32 - 1         |
| 2048 .. 4032 | 64   | 32    | 124 + (K - 2048)/64 - 1        |
| 4096 .. 6144 | 64   | 33    | 156 + (K - 4096)/64 - 1        |

`qpp_lut` computes this index with one comparison chain, one subtraction and a
shift. It does not search the table. The index addresses a 188-row ROM of
(K, f1, f2), a `case` statement filled with the values of the LTE interleaver
table (3GPP TS 36.212, table 5.1.3-3). The K column of the ROM is compared
with the requested length, so `legal` is high only for the 188 valid sizes.

`qpp_interleaver` evaluates the polynomial with additions alone. With

    g(i)    = (f1 + f2*(2i + 1)) mod K
    pi(i+1) = (pi(i) + g(i))     mod K,   pi(0) = 0
    g(i+1)  = (g(i) + 2*f2)      mod K,   g(0)  = (f1 + f2) mod K

each clock needs two additions, each followed by at most one subtraction of K.
Every operand stays below K, so no wider arithmetic is needed. The published
architecture says only that the polynomial is computed from an "array" of
f1, f2, i and i^2 instead of a multiplier. This recursion is this design's
way of doing that.

Timing: `start` in clock t latches the length. Clock t+1 does the table
look-up and computes g(0) and 2*f2 mod K. The pairs (i, pi(i)) are then valid
in clocks t+2 .. t+K+1, with `first_seq` and `last_seq` marking the ends. A
length that is not an LTE size gives a one-clock `len_err` and no sequence.

## The RSC state machine and trellis termination (`turbo_rsc_encoder`)

The state is s1 s2 s3, where s1 is the first delay element. The transition
table below is the LTE constituent code: feedback 1 + D^2 + D^3 and parity
1 + D + D^3.

| x | state | next | parity | | x | state | next | parity |
|---|-------|------|--------|-|---|-------|------|--------|
| 0 | 000 | 000 | 0 | | 1 | 000 | 100 | 1 |
| 0 | 001 | 100 | 0 | | 1 | 001 | 000 | 1 |
| 0 | 010 | 101 | 1 | | 1 | 010 | 001 | 0 |
| 0 | 011 | 001 | 1 | | 1 | 011 | 101 | 0 |
| 0 | 100 | 010 | 1 | | 1 | 100 | 110 | 0 |
| 0 | 101 | 110 | 1 | | 1 | 101 | 010 | 0 |
| 0 | 110 | 111 | 0 | | 1 | 110 | 011 | 1 |
| 0 | 111 | 011 | 0 | | 1 | 111 | 111 | 1 |

The parity depends on both the input and the state, so this is a Mealy
machine. The outputs are combinational, and the state advances on clocks
where `en` is high. On the first bit of a block (`first`), state 000 is used.
After the last bit, three `term` clocks replace the input with s2 xor s3.
This cancels the feedback and drives the state back to 000. The bit used,
`x_out`, is then a tail systematic bit. Both encoders terminate during the
same three clocks.

## Ping/pong sequencing (`turbo_encoder_control`)

* **Write side.** A block opens with `sop_in`, which also samples `size_in`.
  Its bits go to addresses 0..K-1 of the current write buffer. The block
  closes on bit K-1, or earlier if `eop_in` comes first. The buffer is then
  marked full and writing moves to the other buffer. `ready_in` goes low only
  while that other buffer is still full, meaning both buffers hold blocks not
  yet encoded. Bits offered without a preceding `sop_in` are dropped.
* **Read side.** When the read buffer is full, the interleaver is started with
  that buffer's length. `tail` is high for the three clocks after the last
  address pair. On the last tail clock the buffer is released and the read
  select toggles. If the other buffer is already full, the interleaver is
  restarted during the second tail clock. The next block's first pair then
  follows the last tail clock directly, so a block of K bits takes exactly
  K+3 clocks at the output.
* **Bad lengths.** If the interleaver rejects a block's length, the buffer is
  released and `blk_err` pulses.

The mux select is delayed by one clock together with the read data, so blocks
change over without a gap.

## Interface of `turbo_encoder_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `size_in` | in | 13 | block length K, sampled with `sop_in` |
| `valid_in`, `sop_in`, `eop_in`, `data_in` | in | 1 | serial input bit and framing |
| `ready_in` | out | 1 | a bit is taken when `valid_in && ready_in` |
| `valid_out` | out | 1 | `data_out` is valid |
| `sop_out` / `eop_out` | out | 1 | first triple of a block / last tail clock |
| `tail_out` | out | 1 | this clock carries termination bits |
| `data_out` | out | 3 | `{Z', Z, X}`: bit 0 systematic, bit 1 upper parity, bit 2 lower parity |
| `tail_xi_out` | out | 1 | on tail clocks: the lower encoder's tail systematic bit X' |
| `blk_err` | out | 1 | pulse: a block was dropped because `size_in` is not an LTE size |

A block produces K clocks of `{Z'_i, Z_i, X_i}`. It then produces three tail
clocks carrying `{Z'_K+j, Z_K+j, X_K+j}` on `data_out` and `X'_K+j` on
`tail_xi_out` (j = 0, 1, 2). These are the 12 LTE tail bits. A rate matcher
that needs the 3GPP order d(0..2) of the tail bits has to reorder these 12
bits.

Latency: on an idle encoder, the first output triple appears 5 clocks after
the block's last input bit. The output stays valid for K+3 consecutive
clocks. The output side has no back-pressure, so the consumer must accept one
triple per clock.

Throughput: one information bit per clock, minus 3 tail clocks per block.
Streaming all 188 sizes gives 0.9984 information bits per clock. At the
300 MHz clock (3.333 ns period) reported for the published FPGA
implementation, that is about 300 Mbit/s. RTL simulation cannot confirm the
clock rate itself.

Parameters: `KMAX_P` (default 6144) sets the buffer depth. It must be at
least the longest block that will be sent. A smaller value saves memory only
if the longer LTE sizes are never used.

## Where this RTL departs from, or adds to, the published architecture

* The published block diagram places the interleaver between the mux and the
  lower encoder, as if it reordered data. Here it produces read addresses for
  the buffer that holds the block, and port B of that buffer reads the
  interleaved bit. This is what a memory-based interleaver amounts to.
* The published simulation names its two buffers "Sys" and "Int" code block
  buffers. Its text and block diagram describe a ping and a pong buffer. This
  RTL follows the ping/pong description: both buffers are identical, and each
  serves both read orders.
* The following are this design's own choices:
  * trellis termination and its output layout
  * serial 1-bit input
  * valid/ready back-pressure
  * `blk_err`
  * all cycle-level timing
  * the reset style

  The published waveforms show an 8-bit `data_in` and an `enable` input
  whose function is not described. Neither is implemented.
* The f1/f2 values come from the LTE specification and are not given with the
  architecture. Every row was checked to form a permutation, and 14 rows are
  checked against separately entered values.

## Files

`rtl/`:

* `turbo_pkg.sv`: shared constants and types
* `qpp_lut.sv`: size index rule and (f1, f2) table
* `qpp_interleaver.sv`: address pair generator
* `turbo_rsc_encoder.sv`: RSC state machine
* `code_block_buffer.sv`: dual-port bit RAM
* `pingpong_mux.sv`: 2x1 mux
* `turbo_encoder_control.sv`: ping/pong sequencing
* `data_sync_unit.sv`: buffers, mux and control
* `turbo_encoder_top.sv`: the encoder

`tb/`: one self-checking testbench per module, `tb_<module>.sv`, and
`tb_turbo_encoder_all_sizes.sv`, which streams all 188 sizes and measures the
rate. `turbo_ref_pkg.sv` is the reference model: an XOR-form RSC, direct QPP
evaluation and 14 reference (K, f1, f2) rows. Each testbench prints
`TB_RESULT checks=N failures=M`.

## Simulating

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/turbo_pkg.sv tb/turbo_ref_pkg.sv tb/tb_turbo_encoder_top.sv \
  --top-module tb_turbo_encoder_top -o sim && obj_dir/sim
```

To run another testbench, substitute its name. All testbenches run at the
default sizes and finish in seconds.

## What has been verified

* The RSC machine matches an XOR shift-register model on random blocks. All
  16 table rows are exercised, and the state is 000 after every termination.
* The size index gives 0..187 for the 188 sizes, and no other 13-bit length
  is legal.
* For all 188 sizes, the interleaver's sequence equals (f1*i + f2*i^2) mod K
  evaluated directly, with a 2-clock start latency.
* End to end: random blocks are compared bit for bit with the reference
  encoder, including the tail bits, for sizes from every index range up to
  6144. This covers use of both buffers, input stalls, gap-free changes
  between blocks, a rejected length, and the 5-clock latency.

Not verified: the timing on any FPGA or ASIC, and the f1/f2 values beyond
the permutation property and the 14 reference rows.
