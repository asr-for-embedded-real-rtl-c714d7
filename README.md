# GMM emission-probability accelerator for embedded speech recognition

In an HMM speech recognizer, most of the run time goes into one small kernel. For every
active HMM state j and every 10 ms feature vector o_t, it evaluates the log-likelihood of
o_t under the state's mixture of M diagonal Gaussians. That is `log b_j(o_t)`, the
emission probability, and in a fixed-point software recognizer it takes about two thirds
of the decoding time. This RTL moves that kernel into hardware next to an embedded
processor. The processor still does feature extraction, the Viterbi (token-passing) search
and beam pruning. For each state that survives pruning, it hands the accelerator two
memory addresses and later reads back one 16-bit number.

Two ideas shape the block:

* **Parallel arithmetic.** N computation units each handle one feature dimension per
  cycle. A parallel adder combines their results. A hardware log-add unit then folds the
  M mixture scores into one value, so the processor receives `log b_j(o_t)` itself and
  not M partial results.
* **Double buffering with no on-chip model.** The acoustic model stays in off-chip SRAM
  and SDRAM. On chip there is room for only two HMM states (2 x 640 bytes). While one
  state is being scored, the next one is fetched. The accelerator makes no assumption
  about which states will be needed, so it works for any vocabulary size that fits in
  the external memory.

Default configuration: D = 39 feature dimensions (MFCC with deltas and delta-deltas),
M = 4 mixtures per state, N = 3 parallel units and 16-bit fixed-point data.

## What is computed

For mixture m of state j:

    log b_jm = C_jm + g_jm + sum_{d=0..38} (o_d - mu_jmd)^2 * v_jmd
    C_jm = log c_jm                   (mixture weight)
    v_jmd = -1 / (2 sigma_jmd^2)      (precomputed, always <= 0)
    g_jm = -1/2 (D log 2pi + sum_d log sigma_jmd^2)

and for the state:

    log b_j = ((log b_j1 (+) log b_j2) (+) log b_j3) (+) log b_j4

`(+)` is the log-add, `x (+) y = ln(e^x + e^y)`, approximated with z = x - y:

| z              | result                     |
|----------------|----------------------------|
| z < -16        | y                          |
| -16 <= z < 0   | y + ln(1 + e^z)            |
| 0 <= z < 16    | x + ln(1 + e^-z)           |
| z >= 16        | x                          |

A threshold of 16 loses no accuracy, and as a power of two it reduces the range test to
a bit test. The correction term comes from a 128-entry table indexed by |z|
(`rtl/gmm_logadd_lut.hex`). Entry i is `round(8 * ln(1 + exp(-i/8)))`, so its values run
from 6 down to 0.

C, g and v are computed offline and stored with the model. The accelerator only
multiplies and adds.

### Number formats

| quantity                              | format                                        |
|---------------------------------------|-----------------------------------------------|
| o, mu                                 | signed 16 bit, 8 fraction bits (±128)         |
| v                                     | signed 16 bit, 8 fraction bits                |
| C, g, log b_jm, log b_j               | signed 16 bit, 3 fraction bits, natural log (±4096) |
| interim terms, per-mixture accumulator | signed 32 bit, 3 fraction bits               |

Each term `(o - mu)^2 v` is formed exactly: a 34-bit square times a 16-bit weight. It is
then shifted right by 2·8 + 8 − 3 = 21 bits, rounding toward minus infinity. `log b_jm`
saturates to 16 bits. The log-add result saturates at +32767. These formats are this
design's own choice, since only "16-bit fixed point" is specified. They live as constants
in `rtl/asr_gmm_pkg.sv`.

## Data path

```
             SRAM (mu, C)              SDRAM (v, g, o_t)
                  |  32 bit                 |  32 bit
            +-----v-------------------------v-----+
            |  gmm_fetch_unit (2 Avalon read masters)|  8 bytes / cycle
            +----+--------------+-------------+------+
                 |              |             |
        +--------v---+  +-------v----+  +-----v-----------+
        | param buf 0|  | param buf 1|  | obs buffer (78 B)|
        |  640 B     |  |  640 B     |  +-----+-----------+
        +-----+------+  +-----+------+        |
              +---- select ----+               |
                     | N x (mu, v), C, g       | N x o
              +------v-------------------------v------+
              | gmm_arith_unit                         |
              |  N x gmm_comp_unit  ((o-mu)^2 v)        |
              |  gmm_parallel_adder                     |
              |  accumulator (+C+g, saturate) -> log b_jm|
              |  gmm_logadd_unit fold      -> log b_j   |
              +------------------+----------------------+
                                 | 16 bit
                     gmm_host_if result queue -> processor
```

`gmm_accelerator` holds the sequencer that ties these blocks together:

* Each parameter buffer is either *empty* or *full*. A fetch fills the buffer under
  `fill_ptr` and marks it full when the last word arrives.
* A computation starts when the buffer under `comp_ptr` is full and the result queue has
  room. It reads M x ceil(D/N) = 4 x 13 groups, one per cycle. The buffer becomes empty
  in the cycle after its last group is read, so it can be refilled while the arithmetic
  pipeline is still draining.
* A new fetch starts as soon as an order is queued and the fill buffer is empty. In steady
  state, fetches therefore run back to back. Each computation (52 cycles) is hidden inside
  the next state's fetch (80 cycles).
* An observation-vector load is accepted only when nothing older is queued, being
  fetched, or being computed. Every state is therefore scored against the vector that was
  current when it was ordered.

With N = 3, the 39 dimensions fill 13 groups exactly. For an N that does not divide 39,
the last group of each mixture has lanes past dimension 38. The lane enable forces their
contribution to zero, and the buffers read zero there.

## Memory layout of one HMM state

Each state takes 320 bytes in SRAM and 320 bytes in SDRAM:

* SRAM holds the means and C. Mixture m sits at byte offset 80·m: `mu_0 .. mu_38, C`.
* SDRAM holds the weights and g, in the same layout: `v_0 .. v_38, g`.
* Each mixture is 40 halfwords, which is 20 32-bit words.
* Within a word, the lower-numbered halfword is in bits 15:0.

The observation vector is 39 halfwords (20 words) in SDRAM, packed the same way. The
16 spare bits of its last word are ignored. Base addresses are byte addresses and must be
word aligned. This layout, and splitting the means from the weights between the two
memories, is what lets both 32-bit buses deliver a state in 80 transfers each.

## Programming model (processor side)

`gmm_host_if` is an Avalon-MM slave with 32-bit registers and word addresses. Reads have
a fixed latency of one cycle.

| addr | name       | access | meaning |
|------|------------|--------|---------|
| 0    | STATUS     | R      | [0] busy, [2:1] queued orders, [5:3] queued results |
| 1    | OBS_ADDR   | W      | SDRAM address of o_t; starts loading it. Held by `waitrequest` until all earlier orders are finished |
| 2    | SRAM_BASE  | W      | SRAM address of the next state's block |
| 3    | SDRAM_BASE | W      | SDRAM address of the next state's block; queues the order {SRAM_BASE, SDRAM_BASE}. Held while the order queue (2 deep) is full |
| 4    | RESULT     | R      | [31] valid, [15:0] log b_j of the oldest finished order, which the read removes. Reads 0 when nothing is ready |

Results come back in order. A typical frame loop looks like this:

```
write OBS_ADDR  <- o_t
write SRAM_BASE, SDRAM_BASE  <- state q0
for each further active state q_k:
    write SRAM_BASE, SDRAM_BASE <- q_k      # fetch of q_k overlaps ...
    poll RESULT until valid                 # ... the Viterbi update of q_(k-1)
poll RESULT for the last state
```

**Rule:** no more than CMD_DEPTH + 2 + RES_DEPTH = 8 orders may be outstanding (written
but not yet read). The order queue, the two buffers and the result queue hold 8 in
total. A ninth order write would be held until a result is read, and the processor cannot
read while its write is held.

## Timing

Measured with memories that never assert `waitrequest` (SRAM read latency 2, SDRAM 3):

* A state fetch is 80 read transfers on each bus at once, which is 640 bytes at
  8 bytes/cycle. It completes in 85 cycles including latency.
* A computation takes 52 issue cycles. Then `log b_jm` appears 5 cycles after the last
  group of the mixture, and `log b_j` 6 cycles after.
* Steady state is one state every **86 cycles**, limited by the memory transfer as
  intended. With N = 2 the computation (80 cycles + pipeline) would no longer hide
  behind the fetch. N = 3 is therefore the smallest value that keeps the block
  transfer-bound.

Wait states on either memory stretch the fetch. The two read masters run independently,
and a fetch completes when both have delivered their last word.

## Modules

| file | role |
|------|------|
| `rtl/asr_gmm_pkg.sv` | sizes, number formats, Avalon request/response structs, register enum, `sat16` |
| `rtl/gmm_accelerator.sv` | top: host interface, fetch unit, buffers, arithmetic unit, double-buffer sequencer |
| `rtl/gmm_host_if.sv` | processor slave port, order and result queues |
| `rtl/gmm_fetch_unit.sv` | parameter and observation fetch over two read masters |
| `rtl/gmm_avm_reader.sv` | one pipelined Avalon-MM read master (helper) |
| `rtl/gmm_fifo.sv` | small first-word-fall-through FIFO (helper) |
| `rtl/gmm_param_buffer.sv` | one 640-byte state buffer, two write ports, N-wide read |
| `rtl/gmm_obs_buffer.sv` | 78-byte observation buffer |
| `rtl/gmm_arith_unit.sv` | computation units + parallel adder + accumulator + log-add |
| `rtl/gmm_comp_unit.sv` | (o − mu)^2 v, 3-stage pipeline |
| `rtl/gmm_parallel_adder.sv` | adder tree over the N lanes |
| `rtl/gmm_logadd_unit.sv` | combinational log-add with its lookup table |
| `rtl/gmm_logadd_lut.hex` | the 128-entry log(1 + e^-z) table |

The top's parameters are D, M, N, CMD_DEPTH and RES_DEPTH. The number formats and the
log-add threshold are package constants. The lookup-table file matches LOG_FRAC = 3 and a
threshold of 16. If either changes, regenerate the table from the formula above.

The memory ports are packed structs (`avm_req_t`: address, read; `avm_rsp_t`: readdata,
waitrequest, readdatavalid). Assertions check three things: a buffer is never written
while it holds a pending state; the result queue never overflows; a read master never
receives data it did not ask for.

## Simulation

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>`. The testbenches share a reference model
(`tb/tb_gmm_ref_pkg.sv`) written directly from the equations, with the log-add table
recomputed from `$ln`/`$exp`. `tb/tb_avalon_mem.sv` is a behavioural SRAM/SDRAM model
with configurable read latency and random `waitrequest`.

Run from the repository root, because the lookup table is loaded by the relative path
`rtl/gmm_logadd_lut.hex`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/asr_gmm_pkg.sv tb/tb_gmm_ref_pkg.sv tb/tb_gmm_accelerator.sv \
  --top-module tb_gmm_accelerator -o sim && ./obj_dir/sim
```

Replace the testbench name to run another one. Testbenches that do not import the
reference package do not need `tb/tb_gmm_ref_pkg.sv`.

`tb_gmm_accelerator` runs the top at its default parameters against 12 random states
and 3 observation vectors. It goes through these phases:

1. one order at a time;
2. a burst that measures the 86-cycle steady state;
3. a burst of 8 orders that fills both queues;
4. an observation load issued while orders are still pending;
5. everything above again with random memory wait states.

It checks all 91 results bit-exactly. It also requires that each of the following
happened at least once: fetch overlapping computation, both buffers used, order write
held, observation write held, computation held by a full result queue, memory wait
states, all four log-add cases, and a saturated mixture score. The unit testbenches also
cover extreme operands, a 5-input adder tree, random gaps in the arithmetic input stream,
and fetches with wait states.
The arithmetic unit and buffer testbenches run with N = 4, so that the last group of
each mixture has a disabled lane. The default N = 3 divides 39 exactly.

`tb_gmm_frame_workload` runs one frame the size of the pruning limit used with this
design: 2300 active states, the upper threshold on active tokens. The states are drawn at
random from 256 stored states and scored against one observation vector. All 2300
results are checked. The frame takes 197,888 cycles (86.0 per state), so the GMM part of
a 10 ms frame needs a clock of at least 19.8 MHz.

## Relation to the published design, and limits

Taken from the source design:

* the partition: the processor does feature extraction, Viterbi search and (adaptive)
  beam pruning, and the accelerator does the GMM;
* the equations and the log-add rule with threshold 16 and a table lookup on |z|;
* 16-bit data and a 16-bit result;
* two 640-byte parameter buffers and a 78-byte observation buffer;
* means and C in SRAM, weights, g and o_t in SDRAM;
* 8 bytes per cycle over two 32-bit Avalon buses;
* N parallel computation units, a parallel adder and a hardware log-add.

This design's own choices:

* **N = 3.** N is meant to be the smallest number of units that reaches full speed. For
  this fetch path that number is 3: the 52-cycle computation hides behind the 80-cycle
  fetch. Other values are a parameter change.
* the fixed-point formats, the table resolution (1/8 nat, 128 entries) and saturation;
* treating z = 16 as "x": the published rule leaves that single point open;
* the accelerator fetching the parameters itself as a bus master;
* the register map, the order and result queues, the observation-load interlock, and the
  in-memory word layout;
* pipeline depths and the reset scheme (asynchronous, active low; buffer contents are not
  reset).

Not included: the processor, the bus interconnect, the SRAM interface and SDRAM
controller (vendor IP), and the external memories. Those appear only as the behavioural
memory model used in simulation. Also not included are feature extraction, the Viterbi
search and the adaptive beam-pruning algorithm, which are software on the processor.

Real-time capacity depends on the clock frequency, which is not fixed here, and on how
many states survive pruning per frame. At 86 cycles per state, a 100 MHz clock allows
about 11,600 state evaluations per 10 ms frame before the processor's own work is
counted. At the 2300-token pruning limit, the accelerator needs 19.8 MHz.

The accuracy of the chosen number formats against a floating-point recognizer has not
been measured. The testbenches check the RTL bit-exactly against a model of the same
fixed-point arithmetic, and the log-add alone to within about one LSB of the exact
`ln(e^x + e^y)`.
