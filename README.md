# Bit-serial convolution accelerator

This is the FPGA side of a small CNN convolution accelerator. It computes
one entry of an output feature map at a time:

    Y[i][j] = sum over l, k of X[i+l][j+k] * K[l][k]

It uses one **bit-serial multiplier** per kernel position, all working in
parallel. A tree of **2-bit full adders** sums their outputs. A host processor
does the scheduling. It cuts each l × k window out of the image and sends
the window and the kernel one bit plane at a time: bit s of all 25 values in
one transfer. The accelerator returns the result two bits per step, least
significant pair first.

The point of the design is area, not speed. Each multiplier is a 1-bit-wide
datapath with about 3n flip-flops. The whole 5 × 5, 8-bit accelerator holds
606 datapath and control flip-flops and uses no DSP blocks or RAM. One window
takes 3n/2 = 12 compute steps.

The RTL follows a published design: a capstone report on a DE1-SoC board,
with an ARM host and a Cyclone V FPGA. That report builds on a patented
serial-serial multiplier. Sizes are the report's: n = 8-bit unsigned data and
a 5 × 5 kernel. The section [Departures and choices](#departures-and-choices)
lists what is this implementation's own.

## Block structure

```
 host (bit slices, handshake)
   │ i_bit_x[24:0] i_bit_k[24:0] i_valid i_ready      o_product[1:0] o_out_valid o_idle
   ▼                                                  ▲
 conv_accel ──────────────────────────────────────────┤
   control_fsm   six-state handshake, one datapath step per slice
   conv_core     s_bit_x_delayed / s_bit_k_delayed (25-bit delay banks)
                 25 × serial_multiplier  (n/2-1 × i2b, 1 × t2b, n/2-1 × fa2)
                 adder_tree              (24 × fa2, depth 5)
                 4-bit step counter → digit valid / done
   srr           shift right register, rebuilds the 16-bit result
   perf_counters compute-only cycles, cycles including transfer
```

| file | contents |
|---|---|
| `rtl/conv_pkg.sv` | default sizes, `digit_t`, FSM state enum |
| `rtl/fa2.sv` | 2-bit full adder `{cout,sum} = a + b + cin` |
| `rtl/i2b.sv`, `rtl/t2b.sv` | intermediate and terminating 2-bit multiplier blocks |
| `rtl/serial_multiplier.sv` | n × n bit-serial multiplier, 2-bit output |
| `rtl/adder_tree.sv` | M-input digit-serial adder tree |
| `rtl/conv_core.sv` | delay banks, multiplier array, tree, step counter |
| `rtl/control_fsm.sv` | host handshake FSM |
| `rtl/srr.sv` | result shift register |
| `rtl/perf_counters.sv` | the two cycle counters |
| `rtl/conv_accel.sv` | top level |

## How the multiplier works

This is the least obvious part of the design.

**Operands in, digits out.** Operands a and b enter one bit per step, LSB
first, and are followed by zeros. The product leaves as radix-4 digits: two
bits per step, least significant pair first. An n × n product has 2n bits, so
there are n digits.

**Counter-flow.** Bits of a move left to right through a chain of n−1
one-step delays. Bits of b move right to left through another n−1 delays. Tap
x of the a chain holds a(t−x), and tap y of the b chain holds b(t−y).

The b chain is laid out in reverse. So the b tap physically opposite a-tap x
is y = n−1−x. Every facing pair therefore computes a partial product a_i·b_j
with the same index sum: i + j = 2t − (n−1). A diagonal pair, with
x + y = n, gives the column one lower. At each step, the AND gates of the
whole multiplier work on exactly two adjacent product columns:

- the even column c = 2t − n, which has up to n−1 partial products;
- the odd column c+1, which has up to n partial products.

Together these two columns are one output digit. Digit d is formed at step
t = d + n/2.

**Blocks.** The chains are cut into blocks of two delays each:

- **i2b**, the intermediate block, has n/2 − 1 copies. Each has 2 a-delays,
  2 b-delays, 4 partial products (2 odd, 2 even) and a 2FA. The odd products
  go to the weight-2 bits of the 2FA inputs and the even products to the
  weight-1 bits.
- **t2b**, the terminating block, has one copy. It has 1 a-delay, 1 b-delay,
  3 partial products (2 odd, 1 even) and a 2FA whose fourth input is 0.

The counts come out exactly: 2(n/2−1) + 1 = n−1 even products and
2(n/2−1) + 2 = n odd products. The patent's original terminating block had a
second delay on b. That extra delay shifts every b tap by one step, so the
pairs no longer fall on the same column. The source design removed it, and so
does this one.

**Digit-serial addition.** Every 2FA keeps its carry-out in a one-step delay
and feeds it back to its own carry-in. A carry out of a digit has weight 4.
On the next step the stream has moved up one digit, so the same carry has
weight 1. This turns each 2FA into an exact radix-4 serial adder. This holds
inside the blocks, along the series of n/2 − 1 2FAs that join the block
outputs, and throughout the adder tree.

No pipeline registers sit in the sum path, so the digit of a step is
available combinationally in that step. Because all inputs are non-negative
and the final value fits in the digits that are read, every carry is zero once
the last digit has gone out. The next window still starts from a reset.

**Input delay.** The report's final multiplier puts one extra delay on both
inputs, so that the first bit does not disturb the blocks before the rest of
the datapath moves. In `conv_accel` this delay is the pair of shared 25-bit
banks `s_bit_x_delayed` / `s_bit_k_delayed` in `conv_core`. The multipliers
there are built with `IN_DELAY = 0`. A stand-alone `serial_multiplier`
defaults to `IN_DELAY = 1`.

**Timing.** Step 0 is the step that loads bit 0. Digit d appears after step
n/2 + d. The last digit appears after 3n/2 steps (12 for n = 8). Without the
input delay, each digit appears one step earlier, combinationally: the last
one during step 3n/2 − 1.

**Size.** One multiplier holds 5(n/2−1) + 3 + (n/2−1) = 3n − 3 flip-flops,
which is 21 for n = 8.

## Adder tree

The tree sums the 25 product streams with 24 fa2 instances, each with its own
carry delay. Adders pair items in order at each level. An odd item left at
the end of a level moves to the end of the next level. For 25 inputs this
gives 12, 6, 3, 2 and 1 adders: depth 5. The 25th product joins at level 3.

The tree is produced by a generate loop from `M`. Changing the kernel size is
a parameter change, with no hand-written netlist. Its output is the
accelerator's 2-bit result port.

## Host protocol and control FSM

The host cannot observe when a memory-mapped write has landed. So each slice
goes through a handshake:

1. Wait for `o_idle`.
2. Drive `i_bit_x` / `i_bit_k` with slice s. Slices s ≥ n are zero.
3. Raise `i_valid`, then lower it.
4. If `o_out_valid` is high, read `o_product`. Then pull `i_ready` low and
   back high to acknowledge.

Before each window the host pulses `i_arstn` low. It repeats the loop until
2n result bits are collected. For n = 8 that is 12 slices and 8 digits.

| state | condition | next | output |
|---|---|---|---|
| IDLE | valid=1 / 0 | READ / IDLE | `o_idle` |
| READ | – | WAIT_RES | `o_step`: datapath advances one step |
| WAIT_RES | digit produced / not | WRITE / READ_DONE | `o_capture` loads the SRR |
| READ_DONE | valid=1 / 0 | READ_DONE / IDLE | |
| WRITE | ready=1 / 0 | WRITE / WRITE_DONE | `o_out_valid`, digit held stable |
| WRITE_DONE | ready=1 / 0 | IDLE / WRITE_DONE | |

A 4-bit step counter in `conv_core` decides whether a step produced a result
digit. The digit is valid for counts n/2+1 … n/2+OUT_DIGITS. `o_done` rises
with the last digit.

`srr` also collects the digits into `o_result`, the 16-bit result. The host
does not need it, because it rebuilds the value from the digits itself.

Two assertions in `conv_accel` check the handshake:

- the offered digit is stable while `o_out_valid` is high;
- the datapath steps at most once per slice.

## Performance counters

`o_cnt_step` counts cycles in which a slice enters the datapath. This is the
compute-only time: exactly 12 per window.

`o_cnt_total` counts cycles while the host's `i_run` flag is high. This is
the time including scheduling and transfers.

The counters have their own reset (`i_perf_arstn`) and clear (`i_perf_clr`).
They are not cleared by the per-window reset.

For the report's workload, a 1280 × 720 RGB image with a 5 × 5 kernel at
stride 1, there are 1276 × 716 × 3 = 2,740,848 windows. At 12 compute cycles
each that is 32,890,176 cycles, the compute-only figure the report measured
on the board. Handshake overhead dominates. With a 2-cycle port latency the
testbench sees about 73 cycles per window. The report measured about 166 on
the real bus.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `conv_accel` | `N` | 8 | operand width n (even, ≥ 4) |
| | `KERNEL_L`, `KERNEL_K` | 5, 5 | kernel size; M = L·K multipliers |
| | `OUT_DIGITS` | 8 (= n) | result digits per window (2n bits) |
| | `PERF_W` | 32 | counter width |
| `serial_multiplier` | `IN_DELAY` | 1 | extra delay on both inputs |

Flip-flops at the defaults are 686:

- 450 in the multiplier blocks;
- 75 in the multipliers' outer carries;
- 24 in the tree carries;
- 50 in the delay banks;
- 4 in the step counter;
- 3 in the FSM state;
- 16 in the SRR;
- 64 in the counters.

Without the SRR and counters that is 606 = 3·m·n + 6, the count the design
predicts.

## Departures and choices

- **Result width.** The host reads 2n = 16 bits, so the result is
  sum(X·K) mod 2^16. The exact sum of 25 products of 8-bit values needs
  21 bits. Set `OUT_DIGITS = 11` to get it; the datapath needs no other
  change.
- **Unsigned data.** An AND-array product is unsigned. Signed weights would
  need a different multiplier.
- **Assumed details.** The FSM outputs, the port set of the top level, the
  step counter's use for digit-valid, the SRR width and its shift enable, the
  counter width and resets, and the reset style are all this implementation's
  choices. The reset is an active-low asynchronous reset on every register.
  The clock enable (`i_valid`/`i_step`) on every datapath register is also a
  choice.
- **Derived tap pairing.** Which tap pair feeds which 2FA input inside
  i2b/t2b was derived from the column arithmetic above. It was verified
  against integer multiplication, not copied from a drawing.
- **Outer 2FAs.** The outer 2FAs of the multiplier are a series chain. For
  n = 4 this is a single adder.
- **Not in this RTL.** The host program, the vendor parallel-I/O cores and
  the HPS-to-FPGA bus bridge are not here. Their signals are the top-level
  ports.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

- `tb_fa2` is exhaustive.
- `tb_i2b` and `tb_t2b` check digit streams against accumulated partial
  products.
- `tb_serial_multiplier` checks n = 8 with and without input delay, and
  n = 12, against integer products. It checks every digit at its exact step.
- `tb_adder_tree` checks 25 and 7 inputs.
- `tb_conv_core` checks every digit and its timing. It also runs an
  11-digit instance that checks the full 21-bit sum.
- `tb_control_fsm` checks every table row plus random sequences.
- `tb_srr` and `tb_perf_counters` cover the remaining two blocks.
- `tb_conv_accel` is end to end at default parameters. It runs 75 windows of
  a 3-channel 9 × 9 image with a host model that has random port latency. It
  counts every FSM path and hold state and fails if one never happens.
- `tb_workload_rgb720p` runs the upper half of the 1280 × 720 RGB workload:
  1,370,424 windows, checked one by one. It takes about 90 s.

Every testbench has been shown to fail on a deliberately broken copy of its
block.

To simulate with Verilator 5 (the package is named first; `-y rtl` finds the
modules by file name):

```
verilator --binary --timing --assert -y rtl rtl/conv_pkg.sv tb/tb_conv_accel.sv \
          --top-module tb_conv_accel -o sim && ./obj_dir/sim
```

Replace the testbench file and `--top-module` to run another test.
