# Dual-clock FIFO with previous-operation full/empty flags

This is a first-in first-out buffer. A producer writes it on one clock and a
consumer reads it on another, unrelated clock. The default size is 16 words of
8 bits. The FIFO raises **Overrun** when it is full and **Underrun** when it is
empty. It ignores a write request while Overrun is high and a read request
while Underrun is high, so no data is overwritten and no word is invented.

The main idea is in how the two flags are made. Each side's pointer has exactly
as many bits as are needed to address the memory: 4 bits for 16 words. There
is no extra wrap-around bit. So when the two pointers are equal, the FIFO may
be either completely full or completely empty. Each clock domain settles this
by remembering the **previous operation** it has seen:

| pointers equal and previous operation is... | flag |
|---|---|
| a write | Overrun (full) |
| a read | Underrun (empty) |

Everything else is a standard asynchronous FIFO:
- binary pointers;
- Gray-coded copies of the pointers;
- two-flip-flop synchronizers;
- a memory with one write port and one read port.

## Interface

| port | dir | width | clock | meaning |
|---|---|---|---|---|
| `wr_clk` | in | 1 | | write clock |
| `rd_clk` | in | 1 | | read clock |
| `rst` | in | 1 | async | active-high reset of both domains |
| `wr_en` | in | 1 | `wr_clk` | write request |
| `data_in` | in | `DATA_WIDTH` | `wr_clk` | word to write |
| `overrun` | out | 1 | `wr_clk` | FIFO full; `wr_en` is ignored |
| `rd_en` | in | 1 | `rd_clk` | read request |
| `data_out` | out | `DATA_WIDTH` | `rd_clk` | word read at the previous `rd_clk` edge, otherwise 0 |
| `underrun` | out | 1 | `rd_clk` | FIFO empty; `rd_en` is ignored |

Parameters of `async_fifo`:
- `ADDR_WIDTH` (default 4): depth is `2**ADDR_WIDTH`.
- `DATA_WIDTH` (default 8).

Protocol:
- A write is taken on a rising `wr_clk` edge when `wr_en` is high and
  `overrun` is low.
- A read is taken on a rising `rd_clk` edge when `rd_en` is high and
  `underrun` is low. The word appears on `data_out` right after that edge.
- After a `rd_clk` edge with no read taken, `data_out` is 0. Capture the
  output in the cycle that follows the read.
- Each flag is a combinational function of flip-flops in its own clock domain.
  A producer or consumer on that clock can use it directly.
- Reset empties the FIFO and clears every memory word. After reset, `underrun`
  is 1 and `overrun` is 0.

## Block structure

```
 wr_clk domain                                     rd_clk domain
 bit_counter (wr_ptr) --addr--> fifo_memory <--addr-- bit_counter (rd_ptr)
      | next                                              | next
 gray_code_converter (wr_gray)              gray_code_converter (rd_gray)
      |             \                      /              |
      |              '---> sync_2ff ------'--> rd_prev_logic --> underrun
 wr_prev_logic <------------ sync_2ff <---'
      |
   overrun
```

| file | what it is |
|---|---|
| `rtl/async_fifo_pkg.sv` | default sizes; `last_op_e` (LAST_READ / LAST_WRITE) |
| `rtl/bit_counter.sv` | binary pointer that wraps around; also gives its next value |
| `rtl/gray_code_converter.sv` | `g = b ^ (b >> 1)`, held in a register of the source domain |
| `rtl/sync_2ff.sv` | two-stage synchronizer (default width 8, used at pointer width) |
| `rtl/fifo_memory.sv` | 2**ADDR_WIDTH x DATA_WIDTH array with a write clock and a read clock, cleared by reset |
| `rtl/wr_prev_logic.sv` | write-side previous operation, Gray comparator, Overrun |
| `rtl/rd_prev_logic.sv` | read-side previous operation, Gray comparator, Underrun |
| `rtl/async_fifo.sv` | top level: wires the above together and gates the enables with the flags |

## How the previous-operation logic works

This is the part that needs care. The write domain cannot see reads directly.
It learns of them only as a change of the synchronized read pointer. The read
domain likewise learns of writes as a change of the synchronized write
pointer.

`wr_prev_logic` works as follows, each `wr_clk` cycle:

1. Compare the synchronized Gray read pointer with its value one cycle earlier.
   If it changed, the consumer has read something since the last look. The
   previous operation becomes *read* at once, in the same cycle.
2. Overrun is `wr_gray == rd_gray_sync` AND previous operation == *write*.
3. If a write is taken in this cycle, the previous operation becomes *write*
   for the next cycle.

The order matters. The producer acts on the read pointer it currently sees. If
its write then closes the gap to that pointer, the FIFO is full. If the pointers
are equal because the reader caught up, the last thing that happened was a read,
and the FIFO is empty. The read pointer can jump several steps at once (fast
reader). That does not matter: only the fact that it moved is used. When both
things happen in one cycle, the write is counted last, which is the true order.

`rd_prev_logic` is the mirror image:
- A change of the synchronized write pointer makes the previous operation
  *write*.
- Underrun is `rd_gray == wr_gray_sync` AND previous operation == *read*.
- A read taken in the cycle makes the previous operation *read*.

Reset sets both previous operations to *read*, so the FIFO starts empty.

Consequences:
- **Each flag is exact for its own side's operations.** The write that fills
  the FIFO raises Overrun at the very next `wr_clk` edge. The read that
  empties it raises Underrun at the next `rd_clk` edge. The FIFO takes 16 writes
  on 16 back-to-back edges.
- **Each flag is late to fall, which is safe.** The Gray pointer changes on
  the same edge as the operation. A read therefore frees a word for the
  producer after the next two `wr_clk` edges: the two synchronizer stages. A
  write likewise becomes visible to the consumer after the next two `rd_clk`
  edges. Counted from the operation, this is two to three periods of the other
  clock, depending on the phase. The testbench accepts 2 to 4 edges.
- **Clock ratio limit.** A side is noticed only when its synchronized pointer
  changes. If one side could make a full 16 operations between two edges of the
  other clock, its pointer would come back to the same value unseen. The FIFO
  would then stay stuck at "full" or "empty". Keep the two clocks well within a
  16:1 ratio. The limit grows with the depth.

## Gray code and synchronization

Each binary pointer is converted to reflected Gray code. The 3-bit sequence is
000, 001, 011, 010, 110, 111, 101, 100. Consecutive pointers then differ in one
bit only. So a synchronizer that samples the code mid-change still gets either
the old pointer or the new one, never a mix.

The converter registers `gray(next pointer)`. Only a flip-flop output, never
XOR gates, drives the crossing, and the Gray pointer changes on the same edge as
the binary one.

The synchronizer is two flip-flops on the destination clock. The first may go
metastable. The second gives it a full clock period to settle. Pointers are only
ever compared for equality, and that compare is done in Gray code, so no
Gray-to-binary converter is needed.

## Choices made in this implementation

These points are not fixed by the architecture itself. Change them if your use
needs it.

- **Depth and width.** 16 x 8 by default. This matches the 4-bit pointers and
  16 eight-bit words of the reference waveforms. One prose description of the
  architecture speaks of 5-bit addresses; the waveforms were followed, and
  `ADDR_WIDTH` sets any depth that is a power of two.
- **Registered Gray pointers.** The architecture draws counter, then converter,
  then synchronizer. The register in the converter was added here for clean
  clock-domain crossing.
- **Reset.** A single asynchronous, active-high `rst` for both clock domains,
  not synchronized to either clock. Release it when both clocks are running
  and the enables are low. If your system needs it, add per-domain reset
  synchronizers.
- **Flushing memory on reset.** Reset clears every word, as the architecture
  asks. As a result the memory is built from resettable flip-flops
  (16 x 8 = 128 bits), not a RAM macro. For a large FIFO, drop the clear in
  `fifo_memory` so that synthesis can infer a RAM.
- **`data_out` between reads.** The output is registered. It holds a word only
  for the cycle after the read and is 0 otherwise. This matches the reference
  read waveform. For a holding output, remove the `else rdata <= '0` branch.
- **Refused requests.** A request made while its flag is high is dropped. It is
  not queued, and there is no error output.
- **Gates.** The counters use adders and the converters use XORs. The
  architecture describes its logic as multiplexers and flip-flops only. The
  function is the same.
- **Observation outputs.** `wr_prev_logic` and `rd_prev_logic` also output
  `prev_write`/`prev_read` and `ptrs_equal`, which are useful in waveforms. The
  top does not use them, so the linter reports them as unused.
- **Assertions.** Two assertions state the handshake rule: no write is taken
  while Overrun is high, and no read while Underrun is high.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_bit_counter` | count, hold and wrap against a reference counter; `ptr_next` |
| `tb_gray_code_converter` | every code against a bit-by-bit reference; one-bit steps; the 3-bit sequence above |
| `tb_sync_2ff` | exactly two cycles of latency with random data; reset |
| `tb_fifo_memory` | reset clears all words; random writes and reads on unrelated clocks; 0 output without a read |
| `tb_wr_prev_logic` | Overrun against a plain occupancy count (no previous-operation model); full and empty with equal pointers; reads advancing two steps at once |
| `tb_rd_prev_logic` | the same for Underrun |
| `tb_async_fifo` | the whole FIFO at default size (described below) |

`tb_async_fifo` runs these phases:
1. Reset: check the state of both flags and of `data_out`.
2. Write 0xAA, 0xAB, ... 0xB9 on back-to-back edges with no reads. Exactly 16
   writes are taken. Overrun must rise right after the 16th, and further writes
   must be refused.
3. Read everything back in order. Overrun must fall 2 to 4 write edges after
   the first read. Underrun must rise after the 16th read, and further reads
   must be refused.
4. Write one word into the empty FIFO. Underrun must fall within 4 read edges.
5. Random simultaneous traffic at write:read clock ratios of about 1.4:1,
   1:2.25 and 1:1. Each ratio is run once with the producer busier and once
   with the consumer busier. After each run the FIFO goes quiet, and then each
   flag must match the true fill level exactly.

A queue in the testbench checks every word read. The testbench also counts
these events and fails if any of them never happens:
- Overrun raised;
- write refused;
- Underrun raised;
- read refused;
- read and write in the same window;
- pointer wrap-around;
- equal pointers meaning full;
- equal pointers meaning empty.

A typical run moves about 4,700 words.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl rtl/async_fifo_pkg.sv \
  rtl/bit_counter.sv rtl/gray_code_converter.sv rtl/sync_2ff.sv \
  rtl/fifo_memory.sv rtl/wr_prev_logic.sv rtl/rd_prev_logic.sv \
  rtl/async_fifo.sv tb/tb_async_fifo.sv --top-module tb_async_fifo
./obj_dir/Vtb_async_fifo
```

For a block testbench, pass the package, the block's file and its testbench.
The simulator has no X state, so the testbenches set every input they drive
from time zero.

What is not covered: metastability itself. A two-state simulator cannot show a
flip-flop going metastable. The synchronizers are checked for latency and
function only. Real timing closure (constraints on the Gray-pointer crossings)
is also outside this RTL.
