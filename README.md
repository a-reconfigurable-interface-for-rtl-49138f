# A reconfigurable host interface for bit-sequential systolic arrays

A bit-sequential systolic array is fast and narrow. Each processing element
takes one bit per clock on each row. A general-purpose host is the opposite:
it is slower, word-parallel and asynchronous. It has data in bytes, one word
after another. Between them sits an interface that has to do three jobs:

* absorb the difference in rates;
* reorder and serialise the host's words into whatever bit pattern the
  current array program wants on its rows;
* gather the array's result bits back into words for the host.

Several programs may run on the array at once, each producing results at
its own number of bits per clock. The interface must collect all of them
without ever losing a bit.

This repository holds SystemVerilog for two such interfaces, side by side in
one top level (`ri_top`):

* **The general interface** (`general_interface`). It is fully
  reconfigurable by instruction bytes: input word reordering, 1/2/4/8 bits
  per clock, any converter line to any array row(s), any N of M result rows,
  any permutation of them, and a task scheduler that places concurrent
  result streams so they never collide.
* **The string-matcher interface** (`string_interface`). This is a fixed,
  much smaller instance of the same idea. It serves a systolic matcher that
  rebuilds bar-code labels from scanned fragments. Each fragment is a string
  of up to 48 three-valued characters (0, 1, wild card). The interface loads
  a new string one character per clock or appends one two characters per
  clock, handles fragments scanned "inside out", supports an Undo, and
  collects the rebuilt string.

Everything is synchronous to one clock `clk` with an asynchronous active-low
reset `rst_n`. Default sizes: array words N = 8, 16 array rows fed, 16 rows
read, strings of 48 characters.

## The general interface

```
host bytes -> byte_decoder -> fifo -> input_stager -> conditioner_memory -> p2s_converter -> switch_network -> array rows
                   |                                                                                             |
                   +-> interface_controller (settings) -> task_scheduler                                         |
                                                                                                                 v
host reads <- fifo <- conditioner_memory <- output_stager <- permutation_network <- row_select <- array result rows
```

### Data and instructions on one byte stream

The host has one byte bus. `byte_decoder` treats every byte as data except
0x00, which escapes the byte that follows:

| Sequence | Meaning |
|---|---|
| `00 00` | the data byte 0 |
| `00 FF` | master reset: every setting back to default, FIFOs emptied |
| `00 x` | instruction byte `x` |

The decoder is the four-state machine A (data), B (after an escape),
C (instruction), R (master reset). Its outputs are registered.

Instruction bytes are `op[7:5] payload[4:0]`, decoded by
`interface_controller`:

| op | Effect |
|---|---|
| 1 | `payload[1:0]` = converter format (log2 of bits per clock); `payload[2]` = bypass the input stager |
| 2 | shift 5 bits into the switch-network setting (per row: 3-bit source line, enable) |
| 3 | shift 5 bits into the row-selector setting (per line: 4-bit row) |
| 4 | shift 5 bits into the 17 permutation-network control bits |
| 5 | shift 5 bits into the task table (per task: valid, 2-bit format) |
| 6 | commands: bit0 schedule, bit1 start collection, bit2 stop collection, bit3 flush the input stager, bit4 toggle sending to the array |

Long settings are sent low chunk first.

### Input stager: turning rows into columns

Some array programs want word-serial data, where each row sees one whole
word, one bit per clock. Others want bit-slice data, where each row sees one
bit position of successive words. The input stager converts between the two.
It takes blocks of N words, and output word k of a block holds bit k of every
word in the block (bit j = bit k of input word j).

It is an N×N grid. Each cell is a flip-flop behind a 2:1 multiplexer, and
all cells share one select line. A block enters from the top and moves down
one row per clock. Then the direction flips: the next block enters from the
left while the previous block leaves from the right edge, one column (one
output word) per clock. The next flip reverses the roles again. Once the
grid is full, one transposed word leaves for every word that enters, so the
latency is exactly one block.

A block stays in the grid until the next block pushes it out. The flush
command pushes zero words in until the grid is empty, which also pads a
short final block. With bypass set, words pass straight through.

### Conditioner & memory: sharing one RAM bank between two rates

The host side and the array side both use the same RAM bank. The bank
consists of s_R chips of N_R bits each, so one access moves w_R = s_R·N_R
bits and takes T_R clocks.

* **Writing side.** Host words fill Register1. A full Register1 is copied
  at once into Register2. Register2 is written to the bank w_R bits per
  access.
* **Reading side.** The bank fills Register4 w_R bits per access. Register4
  is copied into Register5. Register5 hands out array words.

Register1 and Register2 are s_H·w_R bits, and Register4 and Register5 are
s_A·w_R bits, where s_H = N_H/gcd(N_H, w_R) and s_A = N_A/gcd(N_A, w_R).
Each register is the smallest length that is a whole number of both the
words and the memory words. The bit stream is preserved, least significant
bits first.

One side has priority and the other steals cycles. In the input memory the
array (reader) has priority. The host's writes take the bank when it is
free, or at once when Register1 is nearly full ("urgent"). The output memory
uses the opposite priority, because the output stager cannot wait.

`conditioner_memory` defaults to a worked sizing of three 8-bit chips, a
3-clock access, 12-bit host words and 10-bit array words. That gives
w_R = 24, s_H = 1 and s_A = 5. Inside the general interface both sides are
8 bits, with two chips and a 2-clock access, which is 8 bits per clock in
total.

This budget is the interface's real limit. Writes plus reads must fit in
the bank's access rate. At the 8-bit format the array alone needs all of
it, so the host is held off (`in_stall`, visible as `host_in_full`). On the
output side, results arriving at more than about 4 bits per clock every
clock, while the host also reads, overflow the memory. Each lost word
pulses `out_drop`.

### Parallel-to-serial converter and switch network

`p2s_converter` sends each word as 1, 2, 4 or 8 bits per clock. With l
lines, line j at clock t carries bit l·t + j. The shift register loads the
word plainly and shifts by l; this is the "simple load, complex shift"
choice. A second register keeps words back to back.

`switch_network` is one N:1 multiplexer per array row, plus a per-row
enable. Any converter line can therefore feed any number of rows.
`array_in_valid` marks clocks that carry data. It is low when sending is off
or the memory has run dry (`array_starve`).

### Collecting results: row selector, permutation network, output stager

This is the part that needs the most care.

**Row selector and permutation network.** `row_select` picks the N result
rows (of M) to collect. `permutation_network` then puts them in any of the
N! orders on the N output-stager lines. A network of 2×2 butterfly elements
needs at least ⌈log2 N!⌉ control bits, which is 16 for N = 8. That count
is a lower bound, not a circuit. This design uses a recursive Waksman
network, which has 17 elements for N = 8 and 5 for N = 4. The test runs all 2^17 settings and finds every one of the 40,320 permutations.

**Output stager.** The stager is a chain of N modules, and module 0 is the
output. Each module has:

* a shift register that takes its task's w lines per clock (w = 1, 2, 4 or
  N bits);
* a latch that either loads the shift register's full word or takes the
  word from the module below.

Latched words therefore move up one module per clock and leave at the top,
one per clock, tagged with the module that built them. Module i and module
i+N/2 share a load line. The schedule below always puts a task of weight w
on a module below N/w. So module i needs only N/2^⌈log2(i+1)⌉ input lines:
8 for module 0, 4 for module 1, 2 for modules 2 and 3, and 1 for modules 4
to 7 (for N = 8). Module i's lines start at line bitrev(i), and they are
disjoint for modules that can be in use at the same time.

Two words collide if a module loads while a word from below is passing
through it. `collision` flags this, and it never happens with a valid
schedule. The schedule (`task_scheduler`) is:

```
S = {0 .. N-1}
for each task, heaviest first:
    s = min(S);  put the task on module s
    remove s + k·N/w (k = 0 .. w-1) from S
```

If the weights add up to at most N, every task is placed and no word is
ever overwritten. Otherwise `sched_error` is set. The hardware looks at one
(weight, task) pair per clock, so `done` comes N·(log2 N + 1) + 1 = 33
clocks after `start` for N = 8.

The no-collision argument assumes every module shifts on the same clocks.
Collection (`run`) is therefore common to all modules. The array must
present results on the same clocks for every running task
(`array_out_valid`).

## The string-matcher interface

The host is an 8-bit bus master. It uses seven addresses, each with a
write or read strobe (`mwtc_n`/`mrtc_n`) and an acknowledge (`xack_n`):

| Address | Access |
|---|---|
| 1 | write: string FIFO (count byte, then characters) |
| 2 | write: instruction register |
| 3 | write: "instruction in" flip-flop (go) |
| 4 | write: clear the string FIFO |
| 5 | write: Undo count |
| 6 | read: result FIFO |
| 7 | read: non-wild-card count of the last result |

The instruction register has four bits:

* bit 3, Bar/Space: 1 if the first character is a bar;
* bit 2, Flip: 0 if the fragment was scanned inside out;
* bits 1:0: `00` Reset (new X-string), `01` Add (A-string), `1x` Undo.

Each instruction starts a routine at 04h, 74h or FCh. `upc_start` shows the
start address, formed from IR1:0 the way the original address wiring does.

### Strings in bytes, in order or inside out

A string is a count byte followed by ⌈count/8⌉ data bytes, 8 characters per
byte. Only the non-wild-card characters are sent; every character from
`count` to 47 is a wild card.

* **In order.** Character 8m + k is bit k of byte m.
* **Inside out.** The first byte holds the first `count mod 8` characters,
  reversed (character k at bit r−1−k). Later bytes hold characters
  base + k at bit 7−k.

`flip_mux` reverses each byte for inside-out strings. The loader then gives
the shift register initial shifts with its counters stopped, so the first
real character arrives on the first character clock. The number of shifts is
8 − count mod 8 for X-strings and 4 − ⌊(count mod 8)/2⌋ for A-strings.

### Loaders, Undo and collection

* `x_string_loader` sends one character per clock for 48 clocks. A
  down-counter from `count` raises the wild-card line W_x once the real
  characters are used up.
* `a_string_loader` sends two characters per clock for 24 clocks: even
  characters to the matcher's upper cells, odd to the lower. When the count
  is odd, the last real character goes to the upper cells while the lower
  cells already get a wild card. The "Odd" multiplexer delays the upper
  wild card by one clock to do this.
* `undo_counter` is loaded over the bus. During an Undo it drives W_x for
  48 clocks, low for the first `Undo count` clocks and high after. This
  turns the string's tail into wild cards.
* `result_collector` starts 24 clocks after an Add has finished loading,
  which is the matcher's pipeline delay. For 48 clocks it shifts the
  matcher's X output into bytes (first character in bit 0) and writes each
  byte to the result FIFO. It also counts characters whose wild-card flag is
  0.

`string_controller` sequences all of this: it reads the count, loads words
into the loaders when they run out (every 8 clocks for X, every 4 for A),
and gives the initial shifts. In the original machine these are microcode
routines. Here they are a hardwired state machine with the same outputs.

## Where this design departs from its source

* **Permutation network.** 17 butterfly elements (Waksman) instead of the
  16 that the information bound suggests (see above).
* **One clock.** Host, interface and array share one clock. The FIFOs are
  synchronous, and the host's asynchronous timing is not modelled.
* **General controller.** The instruction format, the shifted settings
  chains and the command bits are this design's own. Only the decoder's
  escape rule and master reset are given by the source. The master-reset
  byte value 0xFF is also a choice (parameter `PANIC` of `byte_decoder`).
* **String controller.** It is a hardwired state machine in place of the
  microsequencer, PROM and condition multiplexer. The microcode is not
  reproduced; only the start addresses and the routines' effects are.
* **Undo code.** Undo is decoded as IR1 = 1 (`1x`). One listing of the
  instruction set gives Undo as `11`, which this decoding includes.
* **Input stager.** Blocks shorter than N words are zero-padded by flush,
  and there is a bypass. Both are additions.
* **Output stager.** The per-module tag and the collision flag are
  additions for observation.
* **Memory schedule.** The cycle-stealing memory follows the register
  structure and sizing rules. Its read/write interleaving is a simple
  priority-plus-urgency rule, not a reproduction of a fixed clock-by-clock
  schedule. Bank depth and circular addressing are chosen here.
* **Status ports.** Both interfaces bring out status signals: stalls,
  starvation, drops, scheduler state, stager output, controller state.
* **Sizes that are choices.** The number of array rows (16 fed, 16 read),
  the FIFO depths (16, and 8 on the string side) and the general
  interface's memory geometry are chosen here.
* **The string interface's upc_start.** Bits 2:0 are constant (`100`) by
  construction, so two output bits never change.

## Files

Each file holds one module or package and starts with a comment describing
its function, interface and timing.

| Module | Role |
|---|---|
| `ri_pkg` | shared functions: Waksman element count, stager line mapping |
| `byte_decoder`, `interface_controller`, `task_scheduler` | general interface control |
| `fifo`, `input_stager`, `conditioner_memory`, `p2s_converter`, `switch_network` | general input path (`fifo` is also used on the string side) |
| `row_select`, `butterfly`, `permutation_network`, `output_stager_module`, `output_stager` | general output path |
| `general_interface` | the general interface |
| `bus_interface`, `string_controller`, `flip_mux`, `x_string_loader`, `a_string_loader`, `undo_counter`, `result_collector` | string-matcher interface parts |
| `string_interface` | the string-matcher interface |
| `ri_top` | both interfaces side by side |

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=<n> failures=<n>`, and has a watchdog.
`tb_memory_sizing` runs the memory at the first sizing of the complexity
table: 8-bit host words every 7 clocks, 10-bit array words every 2 clocks,
and four 8-bit chips with a 3-clock access. It checks that neither side ever
waits. The two end-to-end scenarios live in `tb/gi_scenario.svh` and `tb/si_scenario.svh`.
They are shared by the interface testbenches and by `tb_ri_top`, which runs
both interfaces at once at the default sizes.

The general scenario counts and requires each of these to happen:

* escaped zeros and master reset;
* stager transposition, bypass and flush;
* all four converter formats and a custom switch setting;
* a full input FIFO and memory stall, and array starvation;
* scheduling and a rejected task set;
* collection through a random row selection and permutation;
* output-memory overflow.

Along the way it checks every word against reference models.

## Simulating

With Verilator 5:

```
verilator --binary --top-module tb_ri_top -Itb rtl/ri_pkg.sv $(ls rtl/*.sv | grep -v ri_pkg) tb/tb_ri_top.sv
./obj_dir/Vtb_ri_top
```

Replace `tb_ri_top` with any other testbench to test one block.
`tb_ri_top` takes a few seconds. The permutation-network test, which is
exhaustive over 2^17 settings, takes the longest of the block tests.
