# fifo8x32 — an 8-word, 32-bit synchronous FIFO built from mux-feedback cells

A FIFO sits between a producer and a consumer that cannot always move data
in the same cycle: words go in on one side and come out on the other in the
order they were written. This one runs on a single clock, holds 8 words of
32 bits, and lets a write and a read happen in the same cycle.

It does not use a RAM. Each stored bit is its own small cell: a D flip-flop
with a 2:1 multiplexer that either feeds the flip-flop's output back to its
input (hold) or passes the write data (write), and an AND gate that puts the
bit on a shared read line only when that word is selected. A word is 32 such
cells, and the memory is 8 words with a write decoder and a read decoder.

Besides the usual full and empty flags the FIFO has an **almost-full** flag.
It goes high while one free place is left, so a producer that watches it
knows one cycle ahead that it must stop. It replaces sending a credit count
to the producer every cycle.

## Ports

| Port         | Dir | Width | Meaning |
|--------------|-----|-------|---------|
| `clk`        | in  | 1     | clock; everything happens on its rising edge |
| `reset`      | in  | 1     | **active low**, asynchronous: empties the FIFO, clears the memory and `rdata` |
| `winc`       | in  | 1     | write request |
| `wdata`      | in  | 32    | word to write |
| `rinc`       | in  | 1     | read request |
| `rdata`      | out | 32    | last word read; holds until the next accepted read |
| `almostFull` | out | 1     | at most one free location (7 or 8 words stored) |
| `wfull`      | out | 1     | 8 words stored; writes are dropped |
| `rempty`     | out | 1     | nothing stored; reads are dropped |

The parameters are `WIDTH` (32) and `ADDR_W` (3, giving a depth of
`2**ADDR_W` = 8). The defaults come from `rtl/fifo_pkg.sv`.

## Structure

```
             winc                                   rinc
              |                                       |
   +----------v----------+   wr, waddr   +-------------------+ raddr  +---------------------+
   | write_control_logic |-------------->|  fifo_memory8x32  |<-------| read_control_logic  |
   |  write pointer      |    wdata ---->|  8 x word_buffer  |------->|  read pointer       |
   |  wfull, almostFull  |               |  (32 x mem_cell)  | word   |  rdata register     |
   +---------------------+               +-------------------+        |  rempty             |
              ^   |                                                   +---------------------+
              |   +------------------------ wptr ------------------------->  |
              +---------------------------- rptr ----------------------------+
```

| File | What it is |
|------|------------|
| `rtl/fifo_pkg.sv` | default width, depth and address width |
| `rtl/mem_cell.sv` | one bit: flip-flop, feedback mux, read AND gate |
| `rtl/word_buffer.sv` | one word: `WIDTH` cells on one write enable and one read enable |
| `rtl/addr_decoder.sv` | binary to one-hot decoder with an enable |
| `rtl/fifo_memory8x32.sv` | the 8x32 array, its two decoders and the OR of the read lines |
| `rtl/write_control_logic.sv` | write pointer, write strobe, `wfull`, `almostFull` |
| `rtl/read_control_logic.sv` | read pointer, output register, `rempty` |
| `rtl/fifo8x32.sv` | the top: the three parts wired together, plus two assertions |

## The storage array

**Cell.** While the cell's write enable is low, the multiplexer feeds Q back
to D, so the flip-flop reloads its own value every clock. While it is high,
the flip-flop takes the write bit at the next rising edge. The output is
`Q AND read_enable`, so an unselected cell drives 0. Synthesis tools usually
turn the mux-plus-flip-flop into a flip-flop with a clock enable. That is the
same circuit.

**Word and array.** The 32 cells of a word share one write enable and one read
enable. The write decoder turns `waddr` into one word's write enable. It is
enabled only by the write strobe `wr`, so nothing is written when `wr` is low.
The read decoder turns `raddr` into one word's read enable, and it is always
on. Because every unselected word outputs zeros, the array's read data is
simply the OR of all eight gated words. The read is combinational: `rdata`
of the array follows `raddr` in the same cycle, and a word written at one
edge can be read in the next cycle.

## Pointers and flags

This part carries the design's logic. Each control block owns one pointer
that is one bit wider than the 3-bit address (4 bits). The low 3 bits
address the memory, and the top bit flips each time the pointer wraps past
word 7. The fill level is `wptr - rptr`, computed modulo 16, and it is always
between 0 and 8:

| Condition            | Level | Flag |
|----------------------|-------|------|
| pointers equal       | 0     | `rempty` |
| one place left       | 7     | `almostFull` |
| pointers 8 apart (same low bits, different top bit) | 8 | `wfull`, `almostFull` |

Without the extra bit, a full FIFO and an empty one would both have equal
pointers.

- A write is accepted when `winc` is high and `wfull` is low. Then
  `wr = 1`, the word goes to `waddr = wptr[2:0]`, and `wptr` advances.
- A read is accepted when `rinc` is high and `rempty` is low. Then the word at
  `raddr = rptr[2:0]` is loaded into the `rdata` register, and `rptr`
  advances.
- Requests that are not accepted are simply dropped. Nothing is overwritten,
  and no stale word is read.
- All three flags are combinational from the two pointers. They change just
  after the edge that moves a pointer.
- `almostFull` stays high while the FIFO is full. It means "at most one free
  place", not "exactly one".
- When the FIFO is full, a write is dropped even if a read is accepted in the
  same cycle. The write decision looks only at the level before the edge.

### Timing example

Start empty. Write A at edge 1, request a read from edge 2 on:

| after edge | stored | `rempty` | `rdata` |
|------------|--------|----------|---------|
| 1 (write A) | A     | 0        | previous value |
| 2 (read)    | —     | 1        | A |
| 3 (read refused) | — | 1       | A (held) |

So a word written at one edge can be read at the very next edge, and it is
on `rdata` right after that edge.

## Choices this RTL makes

The design these files follow specifies the cell, the array organisation, the
port list and the flag meanings. It leaves the following open, and they were
settled here:

- **Reset polarity.** `reset` keeps its name from the original port list, but it
  is active low. The reference simulation of the design shows it at 1 while
  data flows. Assertion is asynchronous. Reset also clears the 256 storage cells
  and `rdata`.
- **Pointer scheme.** Pointers with a wrap bit, exchanged between the two
  control blocks as described above. The original block diagram shows no link
  between the two sides, but the flags need both pointers.
- **Almost full while full.** High at 7 *and* 8 words, as in the reference
  simulation, where both flags read 1 at the same time.
- **Output register.** `rdata` is registered and holds its value when there is no
  read. The alternative would be to show the head of the queue combinationally.
- **Bit numbering.** The original symbols number data bits 32..1 and address
  bits 3..1. Here they are `[31:0]` and `[2:0]`.

The original design was implemented on a Spartan-3E FPGA. It reported about
270 slice registers, 401 LUTs, 71 I/Os, 5.04 ns delay and 4 mW dynamic power
at 100 MHz. This RTL has 296 flip-flops: 256 cells, the 32-bit `rdata`
register and two 4-bit pointers. Its 71 I/Os match. The timing and power
figures have not been reproduced.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares the
outputs with a model written independently in the testbench, and ends by
printing `TB_RESULT checks=N failures=M`:

- `tb_mem_cell`, `tb_word_buffer`: random write, data and read-enable
  patterns against a register model, plus the reset tests.
- `tb_addr_decoder`: all addresses, enable on and off.
- `tb_fifo_memory8x32`: reset contents, fill and read back, then random
  writes and reads. The read is checked both before and after each edge.
- `tb_write_control_logic`, `tb_read_control_logic`: each controller
  against a level-counting model. The testbench plays the other side.
- `tb_fifo8x32`: the whole FIFO at its default size against a queue model.
  It checks the flags every cycle and `rdata` after every edge. It runs a
  directed fill-to-full and drain-to-empty with an incrementing count, checks
  the one-cycle read latency, then runs 4,000 cycles of random traffic and a
  reset while data is stored. It counts full, almost-full, empty, dropped
  writes, dropped reads, simultaneous read and write, pointer wrap-around and
  reset-while-busy events, and fails if any of them never happened.

`fifo8x32` also carries two concurrent assertions: the level never exceeds
the depth, and full and empty are never both true.

Every testbench was also run against a copy of its module with one
deliberate bug, and each caught it. For example, the feedback mux was
removed, almost-full was made to drop when full, and the output register was
made to load every cycle.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb --top-module tb_fifo8x32 \
    rtl/fifo_pkg.sv tb/tb_fifo8x32.sv
./obj_dir/Vtb_fifo8x32
```

(`-y` lets Verilator find each module in the file of its name; the package
is listed first). The same works for any other `tb_<module>`. The testbenches
use only `$urandom`, so they need no constraint solver. To change the depth,
set `ADDR_W` on `fifo8x32`, and the memory and both controllers follow.
