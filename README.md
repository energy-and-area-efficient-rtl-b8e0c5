# LDPC decoder on planar eDRAM with interleaved page-mode access

Planar eDRAM stores a bit as charge on the gate of an ordinary MOS
transistor. It needs no special capacitor process, so it fits any logic
process, and it is several times denser than SRAM. Its weakness is
retention: the charge leaks away in a few microseconds. A
general-purpose memory would have to refresh it constantly. A signal
processing datapath usually does not need refresh at all. It touches its
data in a fixed, predictable order and rewrites it long before it decays.

This RTL shows that with a quasi-cyclic LDPC decoder. Every message
memory is a planar eDRAM sub-array. All messages are rewritten once per
decoding phase, so refresh is never needed. Each memory block is also
accessed in strict address order, so the decoder can use the sense
amplifiers as a free register file. A wordline is activated once. The
decoder then reads, updates and writes back its messages in the sense
amplifiers, one per cycle. The wordline goes back to the cells once, at
the end. A conventional controller would activate the wordline once for
every read and once for every write.

The code, the decoder architecture, the message width, the iteration
count, the wordline size and the page-mode policy come from the design
this RTL implements. The node algorithm, the circulant shift values, the
cycle-level timing of the memories and the external interface are this
implementation's own choices. They are listed under
[Departures and own choices](#departures-and-own-choices).

## The code and the decoder

The parity check matrix is an `MB x NB` array of `P x P` circulants.
Each circulant is the sum of `PERM` cyclic permutation matrices, so it
has row and column weight `PERM`.

| parameter | default | meaning |
|---|---|---|
| `P` | 1024 | circulant size, also the folding factor |
| `MB`, `NB` | 2, 32 | block rows and block columns |
| `PERM` | 2 | weight of each circulant |
| `ITER` | 16 | decoding iterations, always run in full |
| `WL_MSGS` | 42 | messages per eDRAM wordline |
| `MSG_W` | 6 | message width in bits (package constant) |
| `RETENTION_CYCLES` | 4241 | retention time of a cell, in clock cycles |

At the defaults the matrix is 2048 x 32768, which gives a rate-15/16
code with 32768-bit codewords. Each check node has 64 edges and each bit
has 4.

The decoder is partially parallel, with folding factor `P`:

* There is one check node unit (`cnu`) per block row. It updates one
  check, i.e. one row of its block row, per cycle.
* There is one variable node unit (`vnu`) per block column. It updates
  one bit, i.e. one column of its block column, per cycle.
* Each permutation of each circulant has its own memory block
  (`edram_msg_mem`) of `P` messages. That makes 128 blocks at the
  defaults. The message on edge (row r, column c) is stored at
  address c.
* Each block column also has an input block that holds its channel
  LLRs. That makes 32 more blocks.

Permutation `k` of circulant `(i, j)` has its one in row r at column
`(r + s_ijk) mod P`. The shift is `s_ijk = ldpc_pkg::circ_shift(i, j, k, P)`.

* **Check phase, cycle r.** Block (i,j,k) is read at address
  `(r + s_ijk) mod P`. CNU i takes those 64 messages and computes the new
  ones, which are written back to the same addresses at the clock edge.
* **Variable phase, cycle c.** All four blocks of block column j and the
  input block of column j are read at address c. VNU j computes the new
  messages and the hard decision. The messages are written back to the
  same addresses.

Every memory access is a read, an update and a write-back of the same
message in one cycle. The node units are purely combinational.

## The eDRAM memory block

This is the part that makes the design unusual. It is split into three
modules.

**`edram_bank`** models one sub-array. It holds `ROWS` wordlines of
`COLS` messages and one row of sense amplifiers. It accepts four kinds of
operation:

* `act` copies a wordline into the sense amplifiers. In a DRAM this read
  is destructive.
* `col_re` reads one message of the open wordline in the sense
  amplifiers.
* `col_we` writes one message of the open wordline in the sense
  amplifiers.
* `wb` restores the sense amplifier contents into a wordline.

`act` and `wb` may be issued in the same cycle. One wordline is then
closed while the next is opened.

**`edram_page_ctrl`** is the interleaved page-mode policy. It takes a flat
message address: row = `addr / COLS`, column = `addr mod COLS`. The first
request to a wordline activates it and writes back whichever wordline
was open. Later requests to the same wordline are served from the sense
amplifiers. `flush` writes the open wordline back and closes it. An
assertion checks that `flush` never comes together with a request.

**`edram_msg_mem`** joins the two. To the decoder it looks like a
single-port memory with a combinational read.

### Timing model

On the first access to a new wordline, three things happen within that
one cycle:

* the write-back of the old wordline;
* the activation of the new wordline;
* the column access itself.

`rdata` therefore comes straight from the cells in that cycle. No page
change ever stalls the decoder. This is a functional, cycle-level view
of the macro. It says nothing about how long a real activation takes.

### Activation counts

A block sweeps its addresses in order, so it opens each wordline once per
phase. There is one exception. A check-phase sweep starts at the shift
`s_ijk`. If that shift is not a multiple of 42, the sweep starts in the
middle of a wordline and wraps around. That wordline is then opened
twice: once at the start of the sweep and once at the end.

At 1024 messages per block the block has 25 wordlines. The last one
holds only 16 messages.

For one codeword at the defaults, the memory blocks make 121,184 wordline
activations and as many write-backs for 4,882,432 message accesses. A
controller that issued separate read and write commands would need
9,076,736 activations.

`act_count` and `wb_count` on the top level add up these events over all
160 blocks. They can be used for energy accounting.

### Retention model

`edram_bank` keeps an age counter for each wordline. The counter is
cleared on every write-back.

* An activation of a wordline older than `RETENTION_CYCLES` marks its
  messages as lost.
* A message that has been rewritten in the sense amplifiers is valid
  again.
* Reading a lost message sets the sticky `retention_err`.

After reset every wordline counts as expired. These counters model the
physics of the cell so that a schedule can be checked. A real array
would not contain them. `MODEL_RETENTION = 0` removes them.

The default of 4241 cycles comes from two numbers of the source design:
a cell retention of 3 µs and a decoding iteration of 1.45 µs. One
iteration here is 2·1024 + 2 = 2050 cycles, so 3 µs is
3.0 / 1.45 · 2050 ≈ 4241 cycles.

Under the decoder's schedule no wordline waits longer than one
iteration between two write-backs:

* message blocks are rewritten in every phase;
* input blocks are rewritten in every variable phase.

Refresh is therefore never needed, and `retention_err` stays low.

## Schedule and timing (`ldpc_ctrl`)

```
LOAD   P accepted beats (in_valid & in_ready), random gaps allowed
FLUSH
repeat ITER times:
  CHECK  P cycles, row index 0..P-1
  FLUSH
  VAR    P cycles, column index 0..P-1   (out_valid in the last iteration)
  FLUSH                                 (done in the last one)
```

* The latency from the last input beat to `done` is 1 + ITER·(2P+2)
  cycles. That is 32,801 cycles at the defaults.
* One iteration takes 2050 cycles. Meeting the source design's 1.45 µs
  per iteration therefore needs a clock of about 1.41 GHz.
* Loading is not overlapped with decoding, which adds `P` cycles per
  codeword.

## Node units

Messages are 6-bit two's complement log-likelihood ratios. They are kept
in the symmetric range [-31, +31] by saturation. A positive value favours
bit 0.

**`cnu`** implements offset min-sum. Each edge gets two things:

* the sign product of the other 63 inputs;
* the smallest of their magnitudes, computed from the two smallest
  magnitudes overall, less `OFFSET` (1) and not below 0.

**`vnu`** adds the channel LLR and the 4 incoming messages. Each outgoing
message is that sum minus the message on the same edge, saturated. The
hard decision is the sign of the full sum.

On the default code, plain min-sum (`OFFSET = 0`) oscillated from
iteration to iteration and corrected none of 0.1 % flipped bits in 16
iterations. With offset 1 it corrected all of them, and all of 0.3 %. The
offset is needed, not just an improvement.

## Top-level interface (`ldpc_edram_decoder`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset of the control state (storage arrays are not reset) |
| `in_valid`, `in_ready` | in / out | a beat is accepted when both are high; `in_ready` is high while loading |
| `in_llr[NB]` | in | beat `a` carries the LLR of bit `j*P + a` in `in_llr[j]`; -32 is saturated to -31 |
| `out_valid`, `out_col`, `out_bits[NB]` | out | during the last variable phase, `out_bits[j]` is the decision for bit `j*P + out_col`; there is no back-pressure |
| `done` | out | one-cycle pulse when a codeword is finished; loading of the next one can start |
| `iteration` | out | the iteration in progress |
| `act_count`, `wb_count` | out | wordline activations and write-backs since reset |
| `retention_err` | out | sticky; set if any message was read after it decayed |

## Departures and own choices

* **Circulant shifts.** The source design does not publish its matrix.
  `circ_shift` is a polynomial picked for two properties:
  * the two permutations of a circulant never coincide;
  * length-4 cycles are rare (40 cycle paths at the default size, none at
    the 64 x 2 x 4 test size).

  To use another code of the same shape, replace that function.
* **Node algorithm.** Only "message passing" is specified. This design
  uses offset min-sum with offset 1, as described under
  [Node units](#node-units).
* **Code size.** The source describes both a 2048 x 32768 matrix and
  4 kB of user data per codeword. These two do not agree: a rate-15/16
  code of length 32768 carries at most 30,720 information bits. The
  matrix dimensions are used.
* **Memory timing.** Activations and write-backs are hidden inside the
  access cycle (see [Timing model](#timing-model)). Every node update is
  a single-cycle read-modify-write.
* **Flush cycles.** One cycle after each phase writes back every open
  wordline.
* **Interface.** The external interface is this implementation's own,
  and loading is not overlapped with decoding.
* **No early termination.** The decoder always runs `ITER` iterations.
* **Not built.** These were reference points in the source, not part of
  the decoder:
  * the conventional read/write control;
  * a page-mode variant with separate register files.
* **Analog parts.** The analog content of the memory is modelled only by
  its logical behaviour:
  * the two-transistor gain cell;
  * the hierarchical sense amplifiers;
  * the cell's retention time.

  Area and energy are not modelled.

## Verification

Every testbench is self-checking. It ends with a
`TB_RESULT checks=<n> failures=<n>` line and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_cnu` | 2000 random vectors at degree 64, with ties and extremes, against a direct evaluation of offset min-sum |
| `tb_vnu` | 20,000 random vectors against a direct sum, including saturation and the hard decision |
| `tb_edram_bank` | random activate / read / write / write-back traffic against a cells + sense-amplifier reference; retention error on an expired wordline, none when the wordline is rewritten first |
| `tb_edram_page_ctrl` | cycle-by-cycle check of the policy under random traffic; one activation per wordline for a sweep; the wrap-split wordline costs one extra |
| `tb_edram_msg_mem` | offset, wrapping read-modify-write sweeps with gaps against a reference array; activation and write-back counts; retention error after idling |
| `tb_ldpc_ctrl` | phase sequence, indices, stalls, `out_valid`, `done` and latency over two codewords |
| `tb_ldpc_edram_decoder` | the whole decoder at P = 64, 2 x 4 circulants, 8 iterations, 5 messages per wordline: three codewords back to back (see below); a second instance with a retention limit of 100 cycles, shorter than its 130-cycle iteration, must raise `retention_err` |
| `tb_ldpc_full` | the same checks at the default parameters: two codewords of 32768 bits, 16 iterations; the first has 0.3 % of its bits flipped and all are corrected |

In both decoder testbenches, the driver and checker `ldpc_tb_core`
compares every hard decision with a reference flooding offset min-sum
decoder written over the explicit edge list. It also checks:

* latency;
* the number of output beats;
* activation and write-back counts against the counts the schedule
  implies;
* the absence of retention errors.

It counts the mechanisms below and fails if one never occurs:

* input stalls;
* wrap-split wordlines;
* page hits;
* corrected channel errors;
* back-to-back codewords.

### Running with Verilator

Every file is one module or package, and `ldpc_pkg.sv` must come first.
For example:

```
verilator --binary -j 4 -Irtl -Itb -y rtl -y tb rtl/ldpc_pkg.sv \
    tb/tb_ldpc_edram_decoder.sv --top-module tb_ldpc_edram_decoder -Mdir obj -o sim
./obj/sim
```

The full-size testbench (`tb_ldpc_full`) takes a few minutes to compile.
It simulates in a few seconds.
