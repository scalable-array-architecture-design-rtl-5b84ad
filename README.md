# Scalable full-search block-matching array

Motion estimation by full search compares an N x N *template block* of the
current frame with every N x N *candidate block* inside a (K+N-1) x (K+N-1)
*search area* of a reference frame, and reports the offset (k, l) of the
candidate with the smallest sum of absolute differences (SAD). That is N²·K²
absolute differences per block: 4·2²⁰ for N = 16 and K = 64.

This design computes them in a linear array that is built from identical
*modules*. One module is a row of N processing elements (PEs) and handles
one candidate row k, which means all K candidates (k, 0) … (k, K-1). Search-area
pixels are broadcast to all PEs of a module. Template pixels stay in the
PEs, and partial sums flow from PE to PE. Modules are chained one behind the
other. Each module works one search-area row and one cycle after its
predecessor, so it can reuse the search data that its predecessor has just
seen. The number of modules is a free choice. With NMOD modules a block needs
⌈K/NMOD⌉ *rounds*, and each round takes N·K cycles. Every PE does useful work
in every cycle, so the block period is ⌈K/NMOD⌉·N·K cycles. With
NMOD = K this is K². The tracking range can be switched at run time between
K = N, 2N and 4N (16, 32 and 64 for N = 16).

At its default parameters the RTL is the published configuration: N = 16,
two modules per chip and two chips, which gives 64 PEs.

## Template rows, search rows and the two buses

The module handles candidate row k one template row at a time. For template
row m (m = 0 … N-1) it needs search-area row k+m, pixels x = 0 … K+N-2.
PE n, counted from the right (n = 0 is the rightmost), holds template pixel
c(m,n). In the cycle in which search pixel x = l+n is on the bus, PE n adds
|c(m,n) − p(k+m, l+n)| to the partial sum of candidate (k, l). The partial
sum enters from its right neighbour, one cycle behind. After the leftmost PE,
the sum over one template row leaves the PE row once per cycle, for
l = 0, 1, …, K-1 in order.

Each search row is K+N-1 pixels long, but a new template row starts every K
cycles. Consecutive rows therefore overlap by N-1 cycles. For this reason a
module has two buses: even template rows arrive on bus A and odd rows on
bus B.

A *selection pulse* marks the start of a row. It enters PE 0 and moves one PE
to the left per cycle. When the pulse reaches a PE, that PE:
- loads its next template pixel;
- switches to the bus of the new row.

The bus number travels with the pulse. Every PE therefore changes bus
exactly when the first pixel it needs from the new row arrives.

A K-word *delay line* with an adder sums the row sums of the N template rows.
The delay line has a run-time length of 16, 32 or 64 words and holds the K
open partial SADs. The last row's sums are the finished SADs. A comparator
keeps the smallest of them and its column l.

### Split accumulator

A 16-bit add in every PE would be on the critical path. Instead, each PE adds
the 8-bit absolute difference to the low byte of the partial sum. It keeps
the carry as a separate bit, and adds the previous PE's carry into the high
byte one cycle later. The sum therefore travels as {high byte, low byte,
carry}. Its value is high·256 + low + carry·256. The module adds the last
carry when the row sum leaves the PE row. With this split, the longest path
in a PE is two 8-bit adds and the multiplexers.

## Module chain and the force lines

A module registers its buses once. The next module takes the registered
buses with A and B swapped, and starts K+1 cycles later:
- Its row m is its predecessor's row m+1, one K-cycle slot later.
- The +1 cycle is the register.

Because the buses are swapped, even rows are again on bus A.

One row cannot come from the predecessor. For module j of a round, the last
row of its job (row k+j+N-1) is one row that the previous module never used.
This row is sent separately from the controller on one of two *force
lines*, pf1 and pf2. The controller broadcasts both lines to all modules. A
per-module select `b_src` tells the module's second bus to take the main
line, pf1 or pf2 for that row.

Force rows of neighbouring modules are K+1 cycles apart and K+N-1 cycles
long, so at most two are active at a time. The controller puts a force row
on pf1 if pf1 is free, and otherwise on pf2.

The template reaches the modules differently. The first module of each chip
(the *upper* module) takes template pixels from a serial stream `c`. Inside
the module the stream runs through a two-register-per-PE chain. The second
module (the *lower* module) copies each pixel from the upper module's PE.
It takes the pixel that the upper PE is replacing, exactly when the lower
PE's own selection pulse arrives. This is why there are two PE types. The
chip passes the template stream on to the next chip, delayed by 2K+2
cycles.

## Rounds, results and the result link

A module's job is one candidate row. The chain of NMOD modules covers rows k
… k+NMOD-1 in one round, so a block needs R = K/NMOD rounds. Each module
finishes its job as follows:
- It compares its local minimum with the result word it received from the
  previous module.
- It passes on the better of the two. On equal SADs it passes on the earlier
  one, so the search keeps the first minimum in k-then-l order.
- It adds one to the *first-position index*. This field tells the next
  module which candidate row it owns.

The result word is 34 bits: {SAD 16, k 6, l 6, first position 6}. Between
chips, and between the chips and the controller, it travels bit-serially.
A PISO sends it and a SIPO receives it, SER_W bits per cycle, least
significant bits first, in ⌈34/SER_W⌉ beats.

The last chip's result returns to the controller:
- After round R-1, the controller outputs it as the block's motion vector
  (`mv_valid`, `mv_sad`, `mv_k`, `mv_l`).
- After any earlier round, the controller sends it back to the first
  module as the starting point of the next round.

Round 0 of a block starts from a "no match yet" word: SAD all ones, first
position 0.

Module timing, for a job that starts in cycle c0:

| event | cycle |
|---|---|
| selection pulse enters PE 0 for template row m | c0 + mK |
| search pixel x of row m at the module's bus inputs | c0 + mK + x |
| template pixel c(m,n) on the upper module's `c` input | c0 + mK − 2 − n |
| next module starts (`start_out`) | c0 + K + 1 |
| next job of this module may start | c0 + NK |
| result word leaves (`res_out_valid`) | c0 + NK + N + 1 |
| incoming result word must have arrived | before c0 + NK + N |

### Timing limits of the serial link

The serial link sets two limits:
- **Chip to chip.** A word must cross to the next chip within the K+1 cycles
  between module starts. This needs ⌈34/SER_W⌉ ≤ K−2.
- **Feedback.** The last module of round r finishes (NMOD−1)(K+1) cycles
  after the first module. Its word must reach the first module before round
  r+1 needs it. This needs N·K − (NMOD−1)(K+1) to exceed the link round trip
  of about 2·⌈34/SER_W⌉ + 4 cycles.

Both limits hold with margin at the defaults (N = 16, two chips, SER_W = 4).
For example, at K = 16 the second is 205 cycles against 22. A small array
such as N = 4, K = 8 with four modules does not meet them with a serial link.
The design also assumes that:
- N is even;
- NMOD is even and divides K;
- the tracking range changes only while no block is in flight.

## Host side: input buffers and controller

`ibuf_ctrl` is the host. It accepts template blocks in raster order through a
valid/ready handshake into a two-bank `template_buffer`. Search areas arrive
on four lanes into a three-bank `search_buffer`. The three banks hold the
previous, current and next area, because the last modules still read the
previous area while the first ones start the next. The four lanes carry, one
pixel per cycle each:
- lane 0: even rows of the first N;
- lane 1: odd rows of the first N;
- lane 2: even rows from N on;
- lane 3: odd rows from N on.

A block starts when its template and its search area are complete and the
array is free.

For scheduling, the controller keeps one *tracker* per module. A tracker
counts the N·K cycles of the module's current job. It also remembers the
previous job, because the rows of consecutive jobs overlap. From these
counters the controller decides, in every cycle:
- the start pulse;
- which template pixel goes on `c`;
- which search row and column four stream generators read from the search
  buffer: p1 and p2 for the first module, pf1 and pf2 for the force rows;
- the `b_src` select of every module.

A bank is released once the last row that reads from it has been sent.
Rounds and blocks follow each other with no gap. The measured block period is
exactly R·N·K cycles.

## What differs from the original chip

- **Search-area buffer.** The original buffer consists of the following:
  - two *upper* clusters, which hold the first N rows;
  - three *lower* clusters, which hold the rest;
  - even/odd banks within the clusters;
  - two update buses that copy rows between the clusters.

  Here the buffer is one array of three banks with four combinational read
  ports. It delivers the same row streams but does not model the cluster
  transfers.
- **Force lines.** The original points out that part of the force-line data
  equals main-line data, so the force lines are busy less often than this
  design uses them. Here every force row is sent on pf1 or pf2.
- **Force-line groups.** For arrays of more than N modules the original
  gives each group of N modules its own pair of force lines. Here one pair
  serves all modules. An assertion in the controller fires if a third force
  row would ever be needed at the same time.
- **Controller.** The original gives the controller's job but not its
  insides. The tracker scheme, the start pulse, the stream generators and all
  cycle offsets are this design's own.
- **Result word and link.** The original transfers the result and the
  first-position index bit-serially but does not give the format. The 34-bit
  word, its field order, the least-significant-first order and SER_W = 4 are
  this design's own choices, and so is the tie rule (first minimum).
- **Overlapping search areas.** When search areas are centred on their
  template blocks, neighbouring areas overlap, and the input bandwidth could
  be reduced by loading only the new columns. This design loads every search
  area whole.
- **Physical chip.** Pads, the layout and the 0.8 µm process are not
  modelled.
- **Other array types.** Only the architecture that the design is built on is
  implemented. The other array organisations from the same family are not.

## Files

`rtl/`:

| file | content |
|---|---|
| `fsbm_pkg.sv` | pixel, SAD and index types, result word, bus-source enum, `absdiff` |
| `fsbm_pe.sv` | processing element, upper or lower type (`UPPER`) |
| `var_delay_line.sv` | run-time-length delay line for the K partial SADs |
| `fsbm_module.sv` | N PEs, bus registers and selects, row controller, SAD accumulation, comparator |
| `fsbm_chip.sv` | upper and lower module, template-stream delay, result SIPO/PISO |
| `res_piso.sv`, `res_sipo.sv` | serial result link |
| `template_buffer.sv` | two-bank template store |
| `search_buffer.sv` | three-bank search-area store, four write lanes, four read ports |
| `ibuf_ctrl.sv` | host controller |
| `fsbm_top.sv` | controller plus NCHIP chained chips |

`fsbm_top` parameters are `N` (16), `NCHIP` (2) and `SER_W` (4). Its ports:
- `trk_mode` (0, 1, 2 for K = N, 2N, 4N);
- the template handshake `c_wdata`/`c_wvalid`/`c_wready`;
- the four search lanes `sa_wdata[4]`/`sa_wvalid`/`sa_wready`;
- the result `mv_valid`/`mv_sad`/`mv_k`/`mv_l`.

Results come out in block order.

## Testbenches

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. The checks are:

| testbench | what it checks |
|---|---|
| `tb_fsbm_pe` | both PE types against a cycle model: sum value, template loading and hand-down, relays |
| `tb_var_delay_line` | delay of exactly `len` at lengths 1, 5, 16, 32, 63 and 64 |
| `tb_res_link` | PISO to SIPO: words, beat count and order, latency ⌈34/SER_W⌉+1 |
| `tb_template_buffer` | bank alternation, `wr_done`, read-back under random stalls |
| `tb_search_buffer` | lane order, `lane_ready`, bank rotation, read-back in all three ranges |
| `tb_fsbm_module` | one module (N = 4): SADs, better, tied and worse incoming results, result cycle, `start_out` cycle |
| `tb_ibuf_ctrl` | every stream (template, main rows, force rows and selects) at its cycle; the feedback and initial words; motion vectors |
| `tb_fsbm_chip` | controller plus one chip (N = 8) against a software full search, in all ranges; block period; cascade outputs |
| `tb_fsbm_top` | two chips (N = 8) against a software full search in all three ranges, with range switches |
| `tb_fsbm_top_full` | the same at the default parameters (N = 16, two chips, K = 16, 32, 64) |

`tb_fsbm_top` also counts how often each mechanism was used, and fails if one
of them never happened:
- pf1 and pf2;
- result feedback;
- blocks back to back;
- search-bank reuse;
- range switches.

It checks that the block period is R·N·K.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl rtl/fsbm_pkg.sv \
        tb/tb_fsbm_top.sv --top-module tb_fsbm_top -o sim
    ./obj_dir/sim

The full-size test runs in about ten seconds.

## Lint notes

Verilator reports the following unused signals, which are intentional:
- the top bits of some controller counters;
- the lower module's `tmpl_prev`, which no third module reads;
- the PISO `busy` outputs, which only the controller's assertion would need.

Verilator also reports that `rst_n` is used both asynchronously and
synchronously. The synchronous use is only the `disable iff` condition of
the handshake assertions. Every flip-flop resets asynchronously.
