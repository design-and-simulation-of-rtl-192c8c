# Dual-clock FIFO with Gray-coded pointers, and a single-clock companion FIFO

Two blocks of logic that run on clocks with no fixed relation cannot safely
pass a multi-bit value by sampling it. The receiving flip-flops may catch some
bits before a change and some after, or go metastable. This design moves a
stream of words across such a boundary with a **dual-clock FIFO**. The data
sits in a dual-port memory that each side touches only with its own clock. The
only signals that cross between the clocks are the two memory pointers. Each
pointer is sent in Gray code, so that consecutive values differ in one bit, and
passes through a two-flip-flop synchronizer on the receiving side.

Next to it is a **single-clock FIFO** of the same size. It has a richer set of
status flags: half-full, almost-full, almost-empty, overflow, underflow and an
occupancy count. Both clocks are the same there, so it needs no synchronizers.
The two FIFOs are independent and share no signals. The top level `fifo_top`
simply places them side by side.

Both default to **8 words of 8 bits**.

## How the dual-clock FIFO decides "full" and "empty"

This is the subtle part of the design.

### Pointers with a lap bit

Each pointer has one more bit than a memory address needs: 4 bits for 8 words.
The low 3 bits address the memory. The top bit flips every time the pointer
wraps from location 7 back to 0. When the read and write addresses are equal,
the FIFO is either empty or full, and the top bit tells which:

- **Empty:** the write pointer has made the same number of laps as the read
  pointer, so all 4 bits are equal.
- **Full:** the write pointer is exactly one lap ahead. The addresses match
  and the lap bits differ.

### Gray code on the crossing

Each handler keeps its pointer in binary (`b_wptr`, `b_rptr`), which addresses
the memory. It also keeps a Gray-coded copy (`g_wptr`, `g_rptr`), computed as
`g = b ^ (b >> 1)`. Only the Gray copy goes to the other clock domain. For a
4-bit pointer the sequence is:

| binary | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| Gray (hex) | 0 | 1 | 3 | 2 | 6 | 7 | 5 | 4 | C | D | F | E | A | B | 9 | 8 |

Only one bit changes at each step, including the wrap from 15 back to 0. A
synchronizer that samples during a change therefore returns either the old
value or the new one, never a mix of the two. Both pointer handlers hold an
assertion that their Gray pointer never changes more than one bit per clock.

The full and empty tests are done on Gray values, with no conversion back:

- **Empty** (read domain): the next Gray read pointer equals the synchronized
  Gray write pointer.
- **Full** (write domain): the next Gray write pointer equals the synchronized
  Gray read pointer with its **two** top bits inverted. In Gray code, "one lap
  ahead" inverts the top bit and also the one below it, because the reflected
  code mirrors the lower half.

Both flags are registers, loaded from the *next* pointer value. So `full`
rises on the same write-clock edge that stores the last free word, and `empty`
rises on the edge that reads the last stored word.

### Why the flags can be late but never wrong

A pointer reaches the other side two receiving-clock edges after it changed.
Each flag is then computed against a slightly old view of the far pointer:

- `full` may stay high briefly after a read has freed a word.
- `empty` may stay high briefly after a word was written.

Both errors are on the safe side. No word is ever overwritten, and no
unwritten location is ever read. In simulation at the default size, with
clock edges that never coincide:

- A write into an empty FIFO clears `empty` on the **third** read-clock edge.
  Two edges go to the synchronizer and one to the flag register.
- A read from a full FIFO clears `full` on the **third** write-clock edge.

If a clock edge on one side happens to coincide with the other side's change,
these can be one edge longer. This latency is what the design pays for safe
crossing.

### Fill-level estimates

`wr_level` (write domain) and `rd_level` (read domain) subtract the two
pointers after converting the synchronized one back to binary (`gray2bin`):

- `wr_level` can only over-estimate the true fill level.
- `rd_level` can only under-estimate it.

Each is the conservative figure for the side that uses it.

## The single-clock FIFO

It follows the usual organisation: reset logic, write control with the write
pointer, read control with the read pointer, the memory, and flag logic. Both
pointers are binary counters with a lap bit, on one clock, so they are
compared directly.

All of the following happen on the rising edge of `clk`.

Writes and reads:

- A write is taken when `wr_en` is high and the FIFO is not full.
- A read is taken when `rd_en` is high and the FIFO is not empty. `rd_data`
  shows the word from that same edge on, one cycle after the request was
  presented. It then holds until the next accepted read.
- A read and a write in the same cycle are both served. The FIFO therefore
  moves one word per clock in each direction.
- A write while full is dropped, even if a read in the same cycle frees a
  word.

Flags:

- `occupancy` is `wr_ptr - rd_ptr`, from 0 to 8.
- `empty` is high at 0 and `full` at 8.
- `half_full` is high at 4 or more, `almost_full` at 6 or more, and
  `almost_empty` at 1 or fewer. The thresholds are the parameters
  `ALMOST_FULL` and `ALMOST_EMPTY`.
- `overflow` is high for one cycle after a write request that arrived while
  the FIFO was full.
- `underflow` is high for one cycle after a read request that arrived while it
  was empty.

Reset: `rst_n` is asynchronous, active low. The reset logic asserts the
internal reset at once and releases it on the second rising clock edge after
`rst_n` goes high.

## Module hierarchy

```
fifo_top
├── async_fifo            dual-clock FIFO
│   ├── wptr_handler      binary + Gray write pointer, full, wr_level
│   │   ├── bin2gray
│   │   └── gray2bin
│   ├── rptr_handler      binary + Gray read pointer, empty, rd_level
│   │   ├── bin2gray
│   │   └── gray2bin
│   ├── sync_2ff  ×2      Gray pointer into the other domain
│   └── fifo_mem          dual-port memory, registered read port
└── sync_fifo             single-clock FIFO
    ├── reset_sync        asynchronous assert, synchronous release
    ├── sync_wr_ctrl      write control + write pointer
    ├── sync_rd_ctrl      read control + read pointer
    ├── sync_flag_logic   occupancy and all flags
    └── fifo_mem          same memory, both clocks tied to clk
```

`fifo_pkg` holds the shared default sizes. Every file begins with a comment
that gives the block's interface and timing.

## Top-level ports (`fifo_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `a_wclk`, `a_wrst_n` | in | 1 | write clock; write-side reset, active low, asynchronous |
| `a_w_en`, `a_data_in` | in | 1, 8 | write request and data |
| `a_full`, `a_wr_level` | out | 1, 4 | full flag; fill estimate on the write side |
| `a_rclk`, `a_rrst_n` | in | 1 | read clock; read-side reset |
| `a_r_en` | in | 1 | read request |
| `a_data_out`, `a_empty`, `a_rd_level` | out | 8, 1, 4 | read data; empty flag; fill estimate on the read side |
| `s_clk`, `s_rst_n` | in | 1 | single-clock FIFO clock and reset |
| `s_wr_en`, `s_wr_data`, `s_rd_en` | in | 1, 8, 1 | requests and write data |
| `s_rd_data` | out | 8 | read data |
| `s_empty`, `s_full`, `s_half_full`, `s_almost_full`, `s_almost_empty` | out | 1 each | level flags |
| `s_overflow`, `s_underflow` | out | 1 each | one-cycle pulses after a refused request |
| `s_occupancy` | out | 4 | words held |

Assert `a_wrst_n` and `a_rrst_n` together. Each is released in its own clock
domain.

## Parameters and resizing

| parameter | default | where |
|---|---|---|
| `A_DATA_WIDTH`, `A_DEPTH` | 8, 8 | dual-clock FIFO (`DATA_WIDTH`, `DEPTH` in `async_fifo`) |
| `S_DATA_WIDTH`, `S_DEPTH` | 8, 8 | single-clock FIFO |
| `S_ALMOST_FULL`, `S_ALMOST_EMPTY` | 6, 1 | single-clock thresholds |

Depths must be powers of two, at least 2. Elaboration stops with an error
otherwise. The Gray wrap relies on this.

## What follows the original design and what is this implementation's own

These follow the published design:

- The split into write and read clock domains.
- Dual-port memory.
- Binary pointers converted to Gray code before they cross.
- Two-flip-flop synchronizers.
- Full and empty computed from Gray values against the synchronized far
  pointer.
- Writes blocked when full and reads blocked when empty.
- The single-clock FIFO's blocks and flag names, and its overflow and
  underflow indicators.
- The 8 × 8-bit size.
- The almost-full and almost-empty thresholds, 6 and 1.

These are this implementation's own choices:

- The lap-bit pointer width.
- Registered flags, and the exact full pattern (two top Gray bits inverted).
- A registered read port on the memory, giving one cycle of read latency.
- Reset values: pointers 0, `empty` 1, `full` 0.
- The `wr_level` / `rd_level` outputs.
- The comparison directions of the half, almost-full and almost-empty flags.
- The one-cycle pulse form of overflow and underflow.
- The internals of the reset logic.

Not built:

- **Error-correcting code and a pointer-mismatch check.** Status signals for
  these appear in the original simulation traces, but their behaviour is never
  defined. Error correction is mentioned only as possible future work.
- **The statistics counters** (maximum occupancy, total writes and reads)
  seen in the same traces. They are likewise undefined.
- **Low-power techniques** such as clock gating or voltage scaling. The
  original lists these as future work. The design here gets no power
  reduction beyond its small size.
- **Level flags for the dual-clock FIFO** (half-full, almost-full and so on).
  The original describes those only for the single-clock FIFO.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

- `tb_fifo_top` runs both FIFOs at the default sizes with no parameter
  overrides.
  - The dual-clock FIFO runs with a faster writer, then a faster reader, then
    nearly equal clocks.
  - The single-clock FIFO alternates write-heavy and read-heavy traffic.
  - Each FIFO is checked against a reference queue.
  - The testbench counts how often each mechanism happens: full, empty,
    refused write and read, wrap-around, crossing of a write into the read
    domain, overflow, underflow, the three level flags, and a simultaneous
    read and write. Any mechanism that never happens counts as a failure.
- `tb_async_fifo` adds directed checks of the three-edge flag latencies given
  above, and of `full` rising on the last write.
- `tb_sync_fifo` checks every flag on every cycle. It runs continuous writes
  past full, continuous reads past empty, 20 back-to-back cycles with both a
  read and a write, and 3000 random cycles.
- The unit testbenches check the converters exhaustively, the synchronizer's
  two-stage delay, and the reset release edge. The pointer handlers are
  driven from a modelled far side.

Run one with plain Verilator (5.x) from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
    rtl/fifo_pkg.sv tb/tb_fifo_top.sv --top-module tb_fifo_top
./obj_dir/Vtb_fifo_top
```

Replace `tb_fifo_top` with any other testbench name. Each run takes well
under a second.

## Limits worth knowing

- A two-state simulator cannot show metastability. The testbenches show that
  the logic is correct with pointers that arrive late. They cannot show that
  the synchronizers resolve in time: that depends on the target's flip-flops
  and clock rates.
- In an implementation, constrain the Gray pointer buses between the domains.
  A maximum-delay or skew constraint of about one period of the faster clock
  keeps the "one bit changes at a time" property true at the receiving flops.
- `wr_level` and `rd_level` are estimates and lag by the synchronizer delay.
  Use `full` and `empty` for flow control.
