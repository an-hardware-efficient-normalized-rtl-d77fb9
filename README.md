# Log-domain normalized cross correlation coprocessor

This is an FPGA coprocessor for feature matching in visual odometry. The host
computer finds corner features in a left image. It cuts a small **descriptor**
(16x16 pixels) around each feature, and a larger **search window** (80x80
pixels) around the same place in the right image. The coprocessor slides the
descriptor over every position in the window, 65 x 65 = 4225 of them. At each
position it computes the normalized cross correlation (NCC) coefficient:

    coef = sum(d*w) / sqrt( sum(d*d) * sum(w*w) )

For each descriptor/window pair it returns the best coefficient and the
position where it occurred.

The design's main idea is to do all multiplication, division and square roots
in the **base-2 logarithm domain**, using a cheap piecewise-linear logarithm.
There, a product is an addition, a square is a left shift by one, a square
root is a right shift by one and a quotient is a subtraction. The
accumulations still need ordinary numbers, so values move between the two
representations several times along the datapath.

The host talks to the board over PCI Express. It writes descriptors and
windows into a 1 MB on-chip memory, starts a job through a control register,
polls for completion and reads the results back.

## The logarithm and its inverse

`log2_conv` takes a signed fixed-point number `x` and produces:

* a **zero** flag (x = 0);
* a **sign** flag;
* a 64-bit two's-complement log value in **10.54** format (10 integer bits,
  54 fraction bits).

If |x| = 2^k * (1 + f) with 0 <= f < 1, the log value is k + f. The integer
part is the index of the leading one, less the number of fraction bits of
the input. The fraction is just the bits below the leading one. This is
Mitchell's approximation. It is exact at powers of two, and its worst error
is about 0.086 in the log, or 6 % in the linear value.

`ilog2_conv` reverses this. It places a one at bit k, puts the 54 fraction
bits behind it, and truncates to **signed 32.32** fixed point. Results with
k >= 31 saturate; results with k < -33 become 0.

Because both conversions use the same straight-line segments, they invert
each other exactly. A patch identical to the descriptor (or a copy scaled by a
power of two) therefore scores exactly 1.0, and its negation exactly -1.0.
In general the coefficient is an approximation of the true NCC. The
testbenches compare against a floating-point model of the same approximation,
not against exact arithmetic.

The hardware does not subtract the means that appear in the textbook NCC. It
expects signed pixels from which the host has already removed them; that is
why pixels are signed. Memory holds them as signed 8-bit values, four per
32-bit word with the lowest byte first. They are sign-extended to 9 bits on
their way into the datapath. The coefficient is signed (-1 to +1) and the
best match is the largest signed value.

## The NCC core (`ncc_core`)

* **PE array.** There are 16x16 processing elements (`ncc_pe`). Each holds
  the log of one descriptor pixel and one window pixel. From them it forms
  log(d) + log(w), 2 log(d) and 2 log(w), and converts all three back to
  32.32. The result is d*w, d*d and w*w for its pixel.
* **Descriptor loading.** A descriptor arrives as 64 words of four pixels. Each
  strobe converts four pixels and writes one *column group* of one PE row. PE
  column = 4 x group + lane. A 2-bit column-group counter and a 4-bit row
  counter, each with a one-hot decoder, select the PEs. The group advances on
  every strobe and the row advances when the group wraps.
* **Window loading.** All 256 pixels of a window patch are loaded in one
  clock, each through its own log unit.
* **Adder trees.** Three binary adder trees (`tree_adder`, 256 inputs, 8
  levels) sum the products into the numerator and the two sums of squares.
* **Coefficient.** The three sums go back to the log domain. The denominator
  is (log SOSd + log SOSw) >>> 1, and the coefficient is log|num| minus that,
  converted to 32.32 with the numerator's sign. If either sum of squares or
  the numerator is zero, the coefficient is 0.
* **Priority register.** `priority_reg` keeps the largest coefficient since
  the last clear, and the index of its patch (row x 65 + column). It replaces
  its value only on a strictly greater one, so ties keep the earliest patch.

Two variants are selected by the `PIPELINED` parameter:

| PIPELINED | Registers after the PE inputs | Patch-to-result latency | Throughput |
|---|---|---|---|
| 0 (default) | none: the path is one long combinational path, meant for the slow 25 MHz clock | 1 clock | 1 patch per clock |
| 1 | 2 in the PE, 1 per adder-tree level (8), 2 in the final log stages | 13 clocks | 1 patch per clock |

## The window holder (`window_handler`)

Memory delivers only four pixels per read, so a patch cannot be fetched at
once. The holder is a bank of shift registers, 16 rows by 20 columns, for one
band of 16 window rows at a time (row offset `ro`):

1. Clear the holder.
2. For column group 0, read the group's word for each of the 16 rows into
   columns 16..19 (16 reads). Then shift the whole holder left by four.
   Repeat for groups 1..3. Columns 0..15 now hold window columns 0..15, and
   the first patch (column 0) is emitted.
3. For each later group (4..19), load 16 words into columns 16..19. Then
   shift left by one column, four times, emitting one patch after every
   shift. That gives patch columns 1..64.
4. Go to the next row offset and start again from the clear. There are 65
   row offsets.

Each patch is presented to the core on `win_load`, together with its index
ro*65 + x. Window words are re-read for every row offset that covers them.
This trades memory bandwidth for a small holder.

## Memory and the control register (`memory_system`, `bram_tdp`)

The memory is four true dual-port RAM banks of 64K x 32 bits, 1 MB in all.
Address bits [17:16] pick the bank.

* **Port A** runs on the 250 MHz PCIe clock.
* **Port B** runs on the 25 MHz NCC clock.

Each bank has an output register, so a read returns data two edges of the
port's own clock after the request. A matching `rvalid` delay line, which
also records the bank number, selects which bank's data to return.

Port A uses a 19-bit word address, covering a 2 MB BAR:

| Word address | Contents |
|---|---|
| 0x00000 - 0x3FFFF | RAM |
| 0x7FFFE (byte 0x1FFFF8) | control register |
| anything else | writes ignored, reads return 0 |

Control register fields:

| Bits | Field | Use |
|---|---|---|
| 0 | go | host sets it to start a job and clears it after done |
| 2:1 | op | 1 = NCC over `count` sets, 2 = add one to words 0..count-1 |
| 4 | done | read only; the controller's done flag, synchronized to the PCIe clock |
| 31:16 | count | number of sets (NCC) or words (add one) |

This is a **four-phase handshake**:

1. The host writes go = 1 with op and count.
2. The NCC side sees go through a two-flop synchronizer and runs the job. It
   takes op and count only while the synchronized go is high; they are stable
   by then.
3. It raises done, which comes back through another synchronizer.
4. The host writes go = 0, and the controller drops done and returns to idle.

Every signal crossing between the two clocks uses `cdc_sync`: two flops
marked `ASYNC_REG`. Data itself crosses only through the dual-port RAM.

### Data layout

| Item | Word address |
|---|---|
| set s (0..149) | s x 1664 |
| &nbsp;&nbsp;descriptor | 64 words: 16 rows x 4 words |
| &nbsp;&nbsp;window | the next 1600 words: 80 rows x 20 words, row-major |
| result of set s | 249600 + 3s |

Each result is three words: coefficient bits [63:32], coefficient bits
[31:0] (signed 32.32), then the patch index. One full image pair (150 sets
plus results) takes 250,050 of the 262,144 words.

## NCC-side control

Three clients share RAM port B through `mem_arbiter`:

* the job controller,
* the descriptor handler,
* the window handler.

Each client raises a request struct (`mem_req_t`: req, we, addr, wdata) and
holds it unchanged until it gets `ack`, with read data in `mem_rsp_t`. An
assertion checks this rule. The arbiter serves one access at a time at fixed
priority, lowest-numbered client first. A read takes five NCC clocks:
grant, issue, two cycles of RAM latency, then acknowledge. A write takes
three.

`ncc_controller` runs a job. For each set it:

1. clears the priority register and starts `descriptor_handler`, which
   fetches the 64 descriptor words in order and strobes them into the core;
2. then starts `window_handler`;
3. waits until the core has no patch in flight;
4. writes the three result words and increments `sets_done`.

The add-one operation reads and rewrites words 0..count-1, as a memory
self-test.

## PCI Express side (`pcie_rx_engine`, `pcie_tx_engine`)

The endpoint block itself is not part of this RTL. The top exposes its 64-bit
AXI4-Stream receive and transmit interfaces, in the 7-series integrated-block
layout:

* three-DW headers;
* header DW0/DW1 in the first beat;
* DW2 or the address plus the first payload word in the second beat.

The receive engine:

* accepts 32-bit memory writes (fmt/type 0x40) of any length. It writes one
  32-bit word per clock and holds `tready` low while it writes the lower word
  of a two-word beat.
* passes 32-bit memory reads (0x00) to the transmit engine and stalls until
  the completion has been sent. The same memory port is then free for the
  transmitter, so no port-A arbitration is needed.
* drops all other TLPs.

The transmit engine fetches the requested words (up to 32) into a buffer,
then sends one completion with data (0x4A). Its header is built from the
request's requester ID, tag, traffic class, attributes and lower address, and
it honours `tready` back-pressure.

## Files

| Module | Role |
|---|---|
| `ncc_pkg` | types (`lg_t`, `fx_t`, `pix_t`, memory request/response), sizes, address map |
| `log2_conv`, `ilog2_conv` | log and inverse log |
| `ncc_pe`, `tree_adder`, `pipe_reg`, `priority_reg`, `ncc_core` | NCC datapath |
| `bram_tdp`, `memory_system`, `cdc_sync` | memory, control register, clock crossing |
| `mem_arbiter`, `ncc_controller`, `descriptor_handler`, `window_handler` | NCC-side control |
| `pcie_rx_engine`, `pcie_tx_engine` | TLP handling |
| `ncc_coprocessor` | top level |

Top-level ports:

* `clk_pcie` (250 MHz) and `clk_ncc` (25 MHz);
* `rst`, synchronous to `clk_pcie`;
* `cfg_completer_id`;
* the two AXI4-Stream interfaces;
* `job_done` and `sets_done` as status outputs.

## Simulating

Every testbench in `tb/` is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal rtl/ncc_pkg.sv rtl/*.sv \
        tb/tb_ncc_coprocessor.sv --top-module tb_ncc_coprocessor -Mdir obj
    ./obj/Vtb_ncc_coprocessor

For another testbench, replace the testbench file and top-module name.
`tb_ncc_coprocessor` runs the whole design at its default parameters. It acts
as the host:

* loads two random sets, each with an exact copy of its descriptor planted at
  a random position in the window;
* runs an NCC job and checks that each set reports a coefficient of exactly
  1.0 at the planted position;
* runs an add-one job;
* writes and reads every bank, the control register and an unmapped address;
* applies random back-pressure on the transmit stream.

It counts receive stalls, transmit back-pressure, multi-beat writes, single-
and multi-word completions, both operations, handshakes and unmapped
accesses, and fails if any of them never happened. It takes about 7 seconds.

The unit testbenches cover each block against independent models:

* floating-point models of the log arithmetic;
* a pixel-exact model of the window patches;
* behavioural memories with random latency for the handlers and controller;
* a reference RAM for the dual-port memory.

`tb_ncc_core` runs both datapath variants and checks their latencies of 1 and
13 clocks.

## Departures from the original description and open points

* **Pixel storage.** Pixels are stored as signed bytes, four per word, and
  widened to signed 9 bits. The original design wanted signed 9-bit pixels
  but also packs four pixels into a 32-bit word. Storing a full 9 bits would
  need a different packing. Mean removal is left to the host.
* **Coefficient range.** The original states the coefficient lies between
  0 and 1. With signed, mean-free pixels it lies between -1 and +1, so the
  numerator's sign is kept and the best match is the largest signed value.
* **Address map.** The original gives the memory limit and the
  control-register location as numbers that do not fit its 2 MB BAR as byte
  addresses. They are read here as 32-bit word addresses: RAM up to word
  0x3FFFF, control register at word 0x7FFFE.
* **Chosen here, not specified originally:**
  * the control register's fields;
  * the go/done handshake;
  * the data layout of sets and results;
  * the result format;
  * the request/acknowledge protocol between the NCC-side state machines;
  * the fixed arbitration priority.
* **Add-one limit.** The original self-test increments the whole memory. Here
  the count field is 16 bits, so one add-one job covers at most the first
  65,535 words.
* **Default datapath.** The unpipelined datapath is the default, as in the
  original, where pipelining was a fallback for timing. The pipelined
  variant's register placement (13-clock latency) is this design's; the
  original only gives 8 clocks for the adder tree.
* **RAM.** The RAM is an inferred array, not a vendor IP instance. It is
  read-first when a port reads and writes the same address.
* **Off-chip parts.** The PCIe endpoint and the clock generator (which makes
  25 MHz from the board clock) are outside the RTL. Their signals are ports
  of the top.
* **Stream protocol.** The TLP format is an assumption. Only 32-bit-address
  memory reads and writes are handled, and a read is answered with a single
  completion of at most 32 words. A longer read request gets only its first
  32 words, which a real root complex would treat as an error. Hosts must
  read in pieces of 128 bytes or less.
* **Throughput.** Throughput was not a design target here. Each memory
  read costs five NCC clocks and the window holder re-reads words for every
  row offset. One set then takes about 4.5 ms at 25 MHz, about 0.67 s for
  150 sets.
* **Reset.** Reset is synchronous. The NCC domain receives it through a
  synchronizer.

## Warnings that stand

* `bram_tdp` writes its array from two clocks. This is the normal template
  for a true dual-port RAM, and lint tools report it as multiple drivers.
