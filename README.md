# Frequency-table engine: counting (attribute, class) pairs in one block RAM

Decision-tree learners such as C4.5 pick the test for a tree node by looking
at a *frequency table* for every attribute: for each attribute value `v` and
class value `c`, how many training items have `att = v` and `class = c`.
This RTL computes that table in hardware from two streams, one element per
item: the attribute column and the class column of the dataset. The whole
table lives in a single block RAM. Each item is one read-increment-write of
one RAM word; when the items are done, the table is streamed out and cleared
in the same sweep, so the engine is ready for the next attribute at once.

The design is a SystemVerilog re-implementation of a dataflow kernel
published for an FPGA accelerator card (a Virtex-6 board with off-chip
DDR2 memory and a PCIe link to the host). It follows that kernel's structure
and numbers: 6 + 6 index bits (up to 64 attribute and 64 class values, a
4096-word table of 32-bit counts), a single-port read-first RAM, a loop
latency of 5 clocks, 96-byte memory blocks. Handshakes, control, reset
behaviour and the memory channel are this design's own; see
[Departures and own choices](#departures-and-own-choices).

## Structure

```
            host side (mgr_clk)                          off-chip memory side (mgr_clk)
   start, items, strm_len, att_base, cls_base      block requests / 768-bit responses
                 |                                   |                    |
   +-------------v-----------------------------------v--------------------v----+
   | compute_freq_dfe                      lmem_stream_reader  lmem_stream_reader
   |                                          (att column)       (class column)
   |  mgr_clk                                      |                |
   | - - - - - - - - - - - - - - - - - - - - - async_fifo - - - async_fifo - - - |
   |  k_clk                                        | att            | cls
   |   +-------------------------------------------v----------------v-------+  |
   |   | compute_freq (kernel)                                              |  |
   |   |   att[5:0] @ cls[5:0] --+                                          |  |
   |   |                         +--> addr MUX --> freq_ram (1 port,        |  |
   |   |   wrap_counter (cnt) ---+                 read-first, 4096 x 32)   |  |
   |   |                                             | read data            |  |
   |   |   input_throttle          +1 --> regs --> wdata MUX <-- 0          |  |
   |   |                             \___________________________/          |  |
   |   |                            read data --> 2-word buffer --> s       |  |
   |   +------------------------------------------------------|-------------+  |
   | - - - - - - - - - - - - - - - - - - - - - - - - - -  async_fifo - - - - - - |
   +---------------------------------------------------------|------------------+
                                   s (table words) to the host (mgr_clk)
```

| File | What it is |
|---|---|
| `rtl/freq_pkg.sv` | widths, default sizes, kernel phase enum |
| `rtl/compute_freq_dfe.sv` | top: two stream readers and one kernel |
| `rtl/compute_freq.sv` | the kernel: index, increment loop, read-out with clearing, control |
| `rtl/freq_ram.sv` | single-port read-first RAM holding the table |
| `rtl/input_throttle.sv` | admits one element per `LOOP_LAT` clocks, or one per clock |
| `rtl/wrap_counter.sv` | the read-out / clear address counter (`cnt`) |
| `rtl/lmem_stream_reader.sv` | linear reader: 96-byte blocks from memory to a 32-bit stream |
| `rtl/async_fifo.sv` | Gray-pointer FIFO carrying a stream between the two clocks |
| `rtl/pulse_sync.sv`, `rtl/sync_bit.sv`, `rtl/reset_sync.sv` | start/done pulses, busy level and resets across the clocks |
| `tb/lmem_model.sv` | behavioural off-chip memory for the testbenches |

## The table index

Each input element is a 32-bit unsigned value. The kernel keeps only the low
`N_A` bits of the attribute and the low `N_C` bits of the class and
concatenates them, attribute on top:

```
index = { att[N_A-1:0], cls[N_C-1:0] }        table word k  <->  att = k >> N_C, cls = k mod 2^N_C
```

Higher bits are ignored, so values must be encoded into `0 .. 2^N - 1` by
the host (the intended use has at most 63 attribute values and 64 class
values). Putting the attribute on the high side is this design's choice.

## The increment loop and why the input is throttled

This is the part that sets the speed. There is one RAM port, and an item's
update is a read followed, some clocks later, by a write of `old + 1` to
the same word. With `LOOP_LAT = L` (default 5) the schedule of one item is:

```
clock   0: index on the RAM address, read            (item accepted this clock)
clock   1: old count on rdata; adder forms old + 1
clocks 2..L-1: old + 1 passes through L-2 registers
clock L-1: write old + 1 to the same address (index held in a register)
clock   L: the next item may read -- and sees the updated word
```

If two items with the same index were closer than `L` clocks, the second
would read the count before the first one's write and one increment would be
lost. The kernel therefore admits one element every `L` clocks while
counting (`input_throttle`); it never needs to compare addresses or forward
data. The price is throughput: one item per 5 clocks, i.e. 66.6 million
items/s at the original kernel clock of 333 MHz. The registers after the
adder stand for the pipelining that the original tool flow put into the
loop; `LOOP_LAT` can be lowered (minimum 2) when the loop closes timing with
fewer registers, and the throttle follows it automatically.

An assertion in `compute_freq` checks that the loop's write never falls on a
clock with another RAM access.

## Read-out with clearing, and draining

When `items` elements have been counted and the last write has landed
(phase `K_FLUSH`, at most `L-1` clocks), two multiplexers switch over: the
RAM address now comes from the counter `cnt`, and the write data from the
constant 0. On each clock the RAM reads word `cnt` (the old count, thanks to
read-first) and writes 0 to it, so the table leaves on `s` in address order
at one word per clock and is all zero afterwards. There is no loop here, so
nothing is throttled.

The stream `s` may stall. A read-out word appears one clock after its
address is issued, so the kernel keeps a two-word output buffer and issues a
new address only if the word it returns will find room. With `s_ready`
always high this still gives one word per clock.

The input streams usually hold more elements than the items of interest:
off-chip memory is read in 96-byte blocks (24 elements), so `strm_len` is
`items` rounded up to a multiple of 24. The kernel must consume the whole
stream; the surplus `strm_len - items` elements are accepted one per clock
and discarded while the loop flushes and the table is read out. `done`
pulses when both the read-out and the draining have finished.

## Feeding the kernel: the stream readers

Each column lives in off-chip memory as consecutive 32-bit words. A
`lmem_stream_reader` requests consecutive 96-byte blocks from a start
address, `ceil(strm_len / 24)` of them, and unpacks each 768-bit response
into 24 elements, element 0 from bits 31:0. It keeps at most `BUF` (2)
blocks requested or buffered, so responses never need back-pressure. The
memory channel is a plain request (valid/ready, byte address) and an
in-order single-beat response (valid, 768 bits); a real memory controller
needs an adapter to this.

The two columns are read independently; the kernel joins them, taking an
element only when both streams offer one.

## Two clocks

The engine has two clock domains, as the original did: a manager side
(`mgr_clk`, 100 MHz in the original) with the memory readers and every port
of the top, and the kernel (`k_clk`, 333 MHz in the original). The att and
class streams cross into the kernel domain, and `s` crosses back, through
16-entry asynchronous FIFOs. `start` and the kernel's `done` cross as
toggle-synchronized pulses, the kernel's `busy` through a two-flop
synchronizer; the scalars are registered on the manager side at `start` and
held, so the kernel samples settled values. Each domain gets its own reset,
asserted with `rst_n` and released two clocks after it.

At these clocks the memory side delivers one element per 10 ns, more than
the kernel's one item per 15 ns, so counting runs at the kernel's rate. The
read-out is different: the kernel could send a word every 3 ns, but the
32-bit stream `s` leaves on the manager clock, so it runs at one word per
10 ns and the kernel waits on the FIFO. The top's `done` comes only after
the last word has left `s`.

## Using the engine

All ports are on `mgr_clk`. Reset (`rst_n` low). The kernel first sweeps
its table to zero (4096 kernel clocks) and `busy` stays high meanwhile. Then, for each attribute of
a dataset stored attribute-major:

1. Put `att_base` (byte address of the attribute column), `cls_base` (the
   class column), `items` and `strm_len` on the inputs and pulse `start`
   while `busy` is low. Columns should start on 96-byte boundaries and be
   padded to `strm_len` elements.
2. Take 4096 words from `s` (valid/ready). Word `k` is the count for
   attribute value `k >> 6`, class value `k & 63`.
3. Wait for the one-clock `done` (raised once the last word has been taken).

`items` larger than `strm_len` is clipped to `strm_len`; `items = 0` gives
an all-zero table.

Run time with the memory and the host keeping up:

```
time per run  =  5 * items * T(k_clk)  +  4096 * T(mgr_clk)  +  about 150 ns of synchronization
```

With 3 ns and 10 ns clocks that is 71.1 us for 2000 items and 62.96 ms for
2^22 items, i.e. 66.6 million items/s for long runs, the limit set by the
loop (333 MHz / 5). The table read-out is a fixed cost per run that makes
short runs slower per item: 28.5 million items/s at 2048 items. (The kernel
alone, `tb_compute_freq`, takes exactly `5 * items` clocks to count and
4096 clocks to read out when nothing stalls.)

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `N_A` | 6 | `compute_freq`, top | attribute bits in the index |
| `N_C` | 6 | `compute_freq`, top | class bits in the index |
| `LOOP_LAT` | 5 | `compute_freq`, top | clocks from read to next read of the loop; also the throttle period |
| `BUF` | 2 | `lmem_stream_reader`, top | memory blocks in flight per stream |
| `FIFO_AW` | 4 | top (`AW` of `async_fifo`) | log2 of the clock-crossing FIFO depth |
| `DEPTH`, `WIDTH` | 4096, 32 | `freq_ram` | table size (the kernel sets `DEPTH = 2^(N_A+N_C)`) |
| `MAX` | 4096 | `wrap_counter` | counter modulus |

`freq_pkg` holds the fixed widths: 32-bit data, 96-byte blocks, 33-bit byte
addresses (enough for 8 GiB).

## Departures and own choices

Follows the original kernel: the index slicing and concatenation; the
single-port read-first table RAM; increment by one and write back; input
throttled to one element per loop latency (5 clocks); read-out through a
counter and two multiplexers that also writes zeros; one output word per
clock; un-throttled draining of the surplus input; the scalars `items` and
`strm_len`; linear reads in 96-byte blocks; one kernel per engine.

Own choices, where the original says nothing or relies on its vendor
tools:

- **Clock crossing.** The original ran the memory side at 100 MHz and the
  kernel at 333 MHz and left the crossing to its vendor's stream
  infrastructure; the FIFOs and synchronizers here are this design's own,
  and so is the 32-bit width of `s` on the manager side, which paces the
  read-out (see [Two clocks](#two-clocks)).
- **Where the loop registers sit** (after the adder) and the resulting
  schedule above. The original loop latency came from its tool flow. Its
  write-up also gives 4 clocks of the measured 5.34 clocks per item as loop
  latency in one place, against the 5-clock loop latency stated for the
  synthesized design; 5 is used, which matches its stated peak rate.
- **Handshakes** (valid/ready everywhere), **start/busy/done**, clipping of
  `items`, the **clear sweep after reset**, the two-word output buffer.
- **Memory channel and host link.** The off-chip DDR2 memory, its
  controller, and the PCIe link with its DMA (including the destination
  address of `s`) are not part of this RTL; their sides are ports of the top.

Not built: the variant sketched as a way around the loop latency (five
copies of the RAM-adder loop fed round-robin, summed at the end) and a
multi-kernel engine that processes several attributes at once; both were
only proposed, not designed.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

| Testbench | Covers |
|---|---|
| `tb_freq_ram` | zero initial contents, read-first against a reference array |
| `tb_wrap_counter` | enable, wrap at 5 and at 4096, last flag, clear |
| `tb_input_throttle` | exactly one accept per 5 clocks, one per clock when free, none when off |
| `tb_lmem_stream_reader` | element order, exact length, block addresses, random memory stalls, 1 element/clock |
| `tb_compute_freq` | 128-word kernel: tables against a software count over six runs; rates (5 clocks/item, 1 drained element and 1 output word per clock); stalls on both sides; `items = 0`; `items > strm_len`; clearing between runs |
| `tb_async_fifo` | clock-crossing FIFO, 10 ns / 3 ns clocks both ways round: order, no loss, full at 16 |
| `tb_compute_freq_dfe` | whole engine at default parameters, 100 MHz / 333 MHz clocks: five runs over three attribute columns, memory stalls, output back-pressure, draining, clipping, junk high bits; counts each mechanism and fails if one never happened; run time against the formula above |
| `tb_workload_benchmark` | default engine on datasets shaped like C4.5 benchmark data: items 2^11 .. 2^22 with one attribute, and 1 .. 64 attributes with 2^11 items; every table and every run time checked (about a minute of simulation) |

Simulate with Verilator 5, from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/freq_pkg.sv tb/tb_compute_freq_dfe.sv --top-module tb_compute_freq_dfe -o sim
obj_dir/sim
```

The `--timescale 1ns/1ps` matters: the testbenches give clock periods in
nanoseconds, including the 3 ns kernel clock.

Swap in any other testbench name. The testbenches use `$urandom` only, and
initialise everything they read, so two-state simulation is sufficient.
The RTL is synthesizable; the table is a plain array that synthesis maps to
block RAM (its zero initial value relies on FPGA-style RAM initialisation,
and the post-reset clear sweep makes that unnecessary after any reset).
