# MIMO iterative detection and decoding receiver core

A MIMO receiver with iterative detection and decoding (IDD) lets the soft
detector and the LDPC decoder refine each other's beliefs. The detector
turns received vectors into bit reliabilities (L-values). The decoder turns
these into better reliabilities. The decoder's output goes back to the
detector as prior knowledge, and the loop repeats a few times. The hard
part in hardware is keeping both engines busy: within one code block,
detection and decoding strictly alternate.

The main idea of this design is to **keep two code blocks in flight**. Each
block has its own L-value memory (CB1 and CB2). While the detector works on
one block, the decoder works on the other. When both are done, the two
memories swap owners. Each engine sees one memory, and the swap is only a
change of multiplexer settings and memory clocks. The detector and the
decoder run on two unrelated clocks, each at its own best speed.

The RTL is SystemVerilog (IEEE 1800-2017) in `rtl/`. It includes a
self-checking testbench per block and an end-to-end testbench in `tb/`.

## Dataflow and L-value convention

All L-values are 5-bit two's complement, saturated to ±15, with
L = ln P(b=0)/P(b=1). Positive means bit 0 is more likely.

One shared memory block holds one L-value per code bit of a code block:
- the detector reads λa there and overwrites it with its extrinsic output λe;
- the decoder reads that as its own λa; in its last iteration it
  overwrites the word with its own extrinsic output λe = λp − λa.

Nothing else passes between the two engines.

For one IDD iteration of block A, while block B is in the other memory:

```
  detector : reads y~, R (input memory) + lambda_a (CB of A)  -> writes lambda_e (CB of A)
  decoder  : reads lambda_a (CB of B), decodes, writes lambda_e = lambda_p - lambda_a (CB of B)
  both idle -> swap CB1 <-> CB2 -> repeat
```

In the first iteration of a block, the detector ignores the memory contents
and uses zero priors. After `idd_iters` decoder runs, the block is finished:
- the writeback unit emits its hard decisions, one block column (Z bits)
  per cycle;
- the slot reports `cb_done`.

## Shared L-memory and the alignment problem

Each of CB1/CB2 has 24 words. A word holds 81 L-values (three banks of 27),
so one word is one block column of a QC-LDPC code with lifting size Z ≤ 81.
Lane k of word j holds code bit j·Z + k. There is one read port and one
write port.

The decoder always accesses whole words. The detector, however, works on
vectors of MT·Q L-values; for 4×4 64-QAM that is 24 bits per vector. Z is
generally not a multiple of MT·Q, so a vector can straddle two words.
Received vector v starts at bit b = v·MT·Q, i.e. word b/Z and lane b mod Z.

Two mechanisms handle this:
- `lmem_align` rotates the vector into lane position.
- The memory takes two word addresses per access plus a per-lane select.
  Each lane independently picks the first or the second word, so a
  straddling vector is still read or written in one cycle.

Example: with Z = 27 and 4×4 64-QAM, the second vector (index 1) covers
lanes 24–26 of word 0 and lanes 0–20 of word 1. The design requires Z ≥ MT·Q.

## Detector (`mimo_detector`)

```
input_mem --> dispatcher --> ring of 5 input buffers (shuffler) --> 5 cores (clock-gated)
                                                                       |
shared CB <-- align <-- correction LUT <-- collector <-- output buffers
```

- **Input memory** (`input_mem`): one bank per antenna row. A bank holds
  y~_i and row i of the upper-triangular R. All banks are read together,
  so a complete data set comes out in one cycle. The address is
  slot·N_CB/(MT·Q) + vector index. The default depth of 162 holds two
  blocks of 81 vectors (4×4 64-QAM, N_CB = 1944). The host must write y~
  and R, which come from a QR decomposition done outside this core.
- **Dispatcher**: issues at most one vector per cycle, together with its λa
  gathered through an alignment unit. It loads the vector into an empty
  buffer in front of an idle core if there is one. Otherwise it loads the
  lowest-numbered empty buffer of an enabled core.
- **Shuffler**: the five input buffers form a ring. After the last vector
  has been issued, if a packet waits in front of a busy core while another
  core is idle with an empty buffer, the whole ring advances by one place.
  Shifting is disabled while vectors are still being issued, because it
  would otherwise interfere with streaming.
- **Cores** (`sd_core`): each core has a clock gate controlled by `core_en`.
  A core takes MT + 2 cycles per vector (details below).
- **Collector**: round robin among the full output buffers. It forwards one
  result vector per cycle, tagged with its vector index, so results are
  written out of order.
- **Correction**: a 32-entry programmable table maps every λe value. It
  resets to the identity.
- **Output alignment**: writes the result to the shared memory block.

### Detector core

The core performs successive interference cancellation (SIC) with soft
output, one layer per cycle, starting from the last antenna.

For each layer it:
1. Subtracts the interference of the already-decided symbols below.
2. Treats the real and the imaginary part as two Gray-labelled PAM
   dimensions. For every PAM level it computes a metric:
   - the squared distance, scaled down by 2^MSHIFT and saturated to 12 bits;
   - plus a prior term from λa.
3. Keeps the best level as the decision.
4. For every bit, computes the max-log L-value:
   λe = min(metric | bit = 1) − min(metric | bit = 0) − λa.

Bit order: within antenna i, bits i·Q … i·Q + Q/2 − 1 belong to the real
part and the next Q/2 to the imaginary part, MSB first.

A core takes MT + 2 cycles per vector: input, MT layers, output. This is the
minimum run-time of a full sphere-decoding detector; the tree search that
would spend more cycles to approach max-log-optimal output is not part of
this RTL (see "Departures").

## LDPC decoder (`ldpc_decoder`, `ldpc_ncu`, `ldpc_writeback`)

The decoder runs a layered offset-min-sum algorithm and is programmable at
run time. A program memory lists the non-zero entries of the prototype
matrix, layer by layer. Each entry holds:
- the block column;
- the cyclic shift;
- a layer-end flag;
- first-use and last-use flags, marking the first and last time the column
  appears in an iteration.

Z ≤ 81 lanes work in parallel. Each lane has one node computation unit
(NCU).

Each layer takes two passes over its entries:
- **Read pass**: the column is read, rotated, and the old message is
  subtracted (q = L − r). The NCU tracks the two smallest magnitudes, the
  index of the smallest and the sign product.
- **Write pass**: the new messages are formed (minimum minus offset β,
  limited to 5) and added back. The column is written back, still in its
  rotated form.

Columns stay rotated in the internal memory. The decoder remembers each
column's current rotation and applies only the difference to the next
shift.

The shared memory is used only at the edges of a run:
- In iteration 0, the first read of each column comes from the shared block
  (the detector's λe).
- In the last iteration, the last write of each column goes to the
  writeback unit instead. The writeback unit:
  1. un-rotates λp;
  2. reads λa from the shared block;
  3. writes back λe = sat(λp − λa);
  4. outputs the signs of λp as hard decisions.

Timing: 2·n_elem cycles per iteration, plus 3 cycles of pipeline and
writeback.

Message magnitudes are limited to 5. With 5-bit saturated L-values and
unlimited messages, the a-posteriori values of a column can lock at
saturation and the decoder stops converging.

## Control and clocking (`idd_ctrl`, `lmem_clk_switch`, `idd_top`)

The controller runs in the decoder clock domain. `mem_cb_sel = 0` gives CB1
to the detector and CB2 to the decoder; `mem_cb_sel = 1` is the reverse.

Each round, the controller:
1. Starts the detector if the block on the detector side needs detection.
2. Starts the decoder if its block needs decoding.
3. Waits until both have reported done and both running signals are low.
4. Toggles `mem_cb_sel`.

Signals crossing the clock domains:
- `mem_cb_sel` reaches the detector domain through a 3-stage synchronizer
  (`det_cb_sel`).
- The detector start and done events cross as toggles through 3-stage
  synchronizers.
- `det_running` crosses back the same way.

Each memory block is clocked by its current owner. For CB1:
- the detector clock is gated by `det_running & ~det_cb_sel`;
- the decoder clock is gated by `dec_running & ~dec_cb_sel`;
- the two gated clocks are merged by an XOR gate.

CB2 uses the true selects. A swap only happens while both engines are idle,
so at most one gated clock is ever active per block. The clock gates are
latch-based; these are the only latches in the design.

The port multiplexers of the two blocks follow the decoder-domain select.
After a swap, the synchronized detector select lags by a few cycles, but
the detector's start arrives through a synchronizer of the same depth,
later than its select. If the lagging select steered the multiplexers, the
decoder would read from the wrong block for its first elements. The
end-to-end testbench detects exactly this error.

## Top-level interface (`idd_top`)

Detector clock domain:
- `im_we/im_cb/im_idx/im_data` load y~ and R per vector and slot;
- `lut_*` program the correction table.

Decoder clock domain:
- `prog_*` load the LDPC program;
- `cb_start[s]` starts slot s once its data are loaded; `cb_busy[s]` and
  `cb_done[s]` report its state;
- `hard_valid/hard_cb/hard_col/hard_bits` return the decoded code word one
  block column at a time.

Static configuration (hold constant while blocks are in flight): `cfg`
(MT, Q, N_CB, Z), `core_en`, `idd_iters`, `ldpc_iters`, `n_elem` and `beta`.

Default parameters: 5 cores, 162 input vectors, 96 program entries, 12
layers, 24 entries per layer.

## Departures and limits

- **Detection is the SIC case only.** A full soft-output sphere-decoding
  tree search is not built, and neither are its run-time constraints
  (cycle budgets per vector or per block) or scheduling policies. The
  results are SIC-quality, not max-log-optimal.
- **The shuffler is practically never triggered.** With a fixed run-time
  per vector, the end-of-block imbalance it exists for does not arise with
  this dispatcher: no shift occurs in the detector and system tests. The
  shifter works and is tested on its own.
- **The decoder needs two cycles per prototype-matrix entry.** It uses a
  read pass and a write pass per layer. A pipelined one-cycle-per-entry
  decoder would overlap the write pass of one layer with the read pass of
  the next.
- **Memories are flip-flop arrays.** They are written as plain arrays; a
  layout would use standard-cell latch memories with per-bank clock gating.
  The three 27-lane banks are modelled as one 81-lane word with per-lane
  write enables.
- **Own choices**, not fixed by the architecture:
  - metric scaling (MSHIFT = 6) and 12-bit metric saturation;
  - message limit 5;
  - correction-table indexing;
  - buffer depths of one packet;
  - zero priors in the first iteration;
  - toggle handshakes across the clock domains;
  - the output format of the hard decisions.
- **Size.** The whole top contains about 140 kbit of memory written as
  arrays, plus 81 parallel NCUs. Generic synthesis of the full top takes
  several minutes.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops through a watchdog if it hangs.
The reference models are in `tb/idd_ref_pkg.sv`:
- vector generation for a triangular channel;
- a bit-exact SIC soft demapper;
- a random quasi-cyclic LDPC code with a dual-diagonal parity part, plus
  its encoder and a bit-exact layered decoder.

`idd_top_tb` runs the design at its default sizes:
- 4×4 64-QAM, Z = 81, N_CB = 1944;
- two code blocks, 2 IDD iterations, 4 LDPC iterations;
- a detector clock of period 14 and a decoder clock of period 6 time units;
- twice: once with all cores, once with two cores switched off.

It checks:
- that every decoded bit equals the transmitted code word;
- per-run cycle counts of both engines;
- that swaps, overlap of detection and decoding, split vectors and
  reduced-core runs all occur.

To simulate a block with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module idd_top_tb \
  -y rtl -y tb +libext+.sv -Irtl rtl/idd_pkg.sv tb/idd_ref_pkg.sv tb/idd_top_tb.sv
./obj_dir/Vidd_top_tb
```

Replace `idd_top_tb` with `<block>_tb` for a single block. The full-size
system test runs in well under a minute.
