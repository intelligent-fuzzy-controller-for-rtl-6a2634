# Pipelined fuzzy controller with a crisp-state, fuzzy-output state machine

This is the RTL of a fuzzy-logic hardware accelerator whose rule base changes
with the state of a finite state machine. A conventional fuzzy controller
holds one static linguistic model: the same inputs always give the same
answer. Here a small state machine with ordinary crisp states selects which
model is used. The fuzzy inputs themselves drive the state machine, so the
controller's response depends on the history of events. This state machine
is called a CSFO FSM (crisp state, fuzzy output).

Two ideas keep the hardware small and fast:

* **One relation per model.** Every rule `IF X(1) is A AND X(2) is B THEN Y is C`
  is folded into a single 25 x 25 fuzzy relation `R` when it is learned. The
  relation is the union of the rules, so inference never walks a rule list.
  It reads the 25 rows of `R` once, whatever the number of rules. One relation
  takes 25 x 25 x 3 bits, about 1/4 kbyte, and there is one relation per FSM
  state.
* **A four-step pipeline.** Host transfer, pre-processing, learning or
  inference, and defuzzification work on four different jobs at once. The
  learning/inference step processes four rows of `R` per clock, so it takes
  `ceil(25/4) + 2 = 9` clocks. This gives one result every 9 clocks, or 3.3
  million fuzzy inferences per second at 30 MHz.

## Data format

A fuzzy set is a membership function sampled at 25 points (`U_MAX = W_MAX = 25`).
Each degree is a 3-bit code. Five levels are used: 0 means no membership and
4 (`MU_ONE`) means full membership. The 3-bit code leaves room for up to 8
levels. A whole set is one 75-bit word, `fvec_t`. Element `j` (point `j+1`)
is at bits `[3j+2:3j]`. All of this is in `rtl/fuzzy_pkg.sv`, together with
the job and result records that travel down the pipeline.

## The arithmetic

With `X = min(X(1), X(2))` point by point (the AND of the two inputs):

| operation | formula |
|---|---|
| first rule of a model | `R(u,w) = min(X(u), Y(w))` |
| each further rule | `R(u,w) = max(R(u,w), min(X(u), Y(w)))` |
| inference | `Y(w) = max over u of min(X(u), R(u,w))` (max-min composition) |
| crisp output | `yc` = mean position of the points where `Y` is largest (mean of maxima) |

## Pipeline

```
 host bus ──> T1 host_interface ──> T2 preproc_unit ──> T3 inference_unit ──> T4 defuzzifier ──> res
                 job slot, regs       min of inputs,        rule_memory (R_K)      max, count, sum,
                                      B transform,          4 x min_unit           reciprocal LUT
                                      csfo_fsm              4+1 x max_unit
```

T3 is the slowest step. T1 and T2 hold their job in a one-entry register and
pass it on when the next stage is ready (valid/ready handshakes). T4 has no
back-pressure. Once the pipeline is full, a job leaves T3 every 9 clocks. The
host can reuse the input registers, and then one command write per job is
enough to keep T3 busy. When every input changes, a job needs seven 64-bit
writes, which still fits in the 9-clock step.

## Model / inference unit (`inference_unit`)

This block is the core of the design. It has three registers, `X_I`, `Y_I` and
`Y`, and two operand multiplexers:

* **MUX2** chooses the vector operand of the minimum units. It selects `Y_I`
  when learning and the row of `R` when inferring. The scalar operand is one
  degree `X_I(i)`, copied to all 25 points.
* **MUX3** chooses the second operand of the maximum units:
  * `0` for the first rule of a learning sequence;
  * the old row of `R` for a further rule;
  * for inference, `0` on the first row group and the `Y` register after that.

There are four copies of the min/max path (`PATHS = 4`). Path `p` handles row
`4g+p` in row group `g`. The memory word of group `g` holds those four rows,
so one read feeds all four paths. Rows 25 to 27 of the last word are padding.
They are masked: they are never written, and they count as zero in inference.
For inference, a four-input maximum tree merges the four paths into `Y`.

A job runs through this clock sequence:

| clock | action |
|---|---|
| 0 (idle, job taken) | load `X_I`, `Y_I`; read word 0 of relation `K` |
| 1 … 7 (row group g = 0…6) | compute group g; write it back when learning, or accumulate into `Y`; read word g+1 |
| 8 (done) | `out_valid`; the result is in `Y`; update the error flag after learning |

The memory has a synchronous read, so the read of group `g+1` overlaps the
write of group `g` to a different word. The unit takes its next job on the
clock after `done`, which gives a period of 9 clocks. Learning `N` rules
takes `9N` clocks.

**Error flag.** After a learning job, `err_flag` shows whether every element
of the relation is now at full membership. Such a model answers "everything"
to every input. The host interface turns this into a sticky interrupt. The
host can recover in two ways:

* Relearn the model, starting with `OP_LEARN_FIRST`.
* Download a known-safe model row by row with `OP_LOAD_ROW`. This job takes
  the same 9 clocks and writes `Y_I` into one row.

## CSFO state machine (`csfo_fsm`, inside `preproc_unit`)

The pre-processing step maps each fuzzy input to Boolean variables `X_B`
(the "B transform"). It finds the position of the input's maximum, taking
the first one if several points tie. It then sets one bit for the five-point
range that contains it. Bit `k*5 + r` is true when input `k+1` peaks in
positions `5r+1 … 5r+5`, so bit 0 is "X1 is LOW".

The next state is `f(X_B, state)`. It is an application-specific function,
so here it is a table. Each state has `N_TRANS = 4` entries
`{valid, mask, match, next}`. The first valid entry with
`(X_B & mask) == match` wins. If no entry matches, the state does not change.

The state changes on the same clock edge that takes an inference job into
T2. The new state travels with the job as its relation index `K`, and T3
infers with `R_K`.

Other jobs do not change the state:

* Learning and row-load jobs name their relation explicitly, so each state's
  model can be trained on its own.
* `OP_SET_STATE` forces the state and is consumed in T2.

## Defuzzifier (`defuzzifier`)

The defuzzifier has two pipeline stages:

1. Find the maximum degree. Then count the points `L` that reach it, and
   add up their positions `S` (positions 1 to 25).
2. Compute `yc = (16*S * RECIP[L]) >> 17`, using a reciprocal table
   `RECIP[L] = ceil(2^17 / L)`.

For every reachable `S ≤ 325` and `L ≤ 25`, the result equals
`floor(16*S/L)` exactly. `yc` is the mean position with 4 fraction bits.
For example, 0x0D0 = 13.0.

An all-zero `Y` has every point at its maximum. It gives 13.0 and sets
`flat`.

## Host interface (`host_interface`)

The host interface is a synchronous bus with 64-bit registers (`cs`, `we`,
`addr[3:0]`, `wdata`, `rdata`).

Writes:

| addr | register |
|---|---|
| 0/1, 2/3, 4/5 | X(1), X(2), Y: bits 63:0 / 74:64 |
| 6 | command: `[2:0]` op, `[9:8]` relation or state, `[20:16]` row, `[31:24]` tag |
| 7 | next-state table entry: `[1:0]` state, `[5:4]` entry, `[8]` valid, `[25:16]` mask, `[41:32]` match, `[49:48]` next |
| 8 | bit 0 = 1: clear `irq` |

Op codes: 0 infer, 1 learn first rule, 2 learn further rule, 3 load row, 4 set state.

A command write while the job slot is full raises `hwait`. The host holds
the write on the bus until `hwait` drops.

Reads:

| addr | register |
|---|---|
| 0/1 | `Y` of the last inference |
| 2 | `[8:0]` yc, `[12]` flat, `[17:16]` relation used, `[31:24]` tag, `[34:32]` op |
| 3 | status: `[0]` irq, `[1]` error flag, `[2]` job slot full, `[3]` inference unit busy (clear means stand-by), `[5:4]` FSM state, `[47:32]` jobs completed, `[63:48]` inference results |

Every finished job also appears on the top-level `res_valid`/`res` port.

A typical session:

1. Write the next-state table.
2. For each state `K`, write X(1), X(2) and Y, then a learn command. Use op 1
   for the first rule of each state and op 2 for the rest, with relation = `K`.
3. Write op 4 to choose the starting state.
4. Stream inference commands.

## Files

| file | contents |
|---|---|
| `rtl/fuzzy_pkg.sv` | data format, job/result records, op codes |
| `rtl/fuzzy_controller.sv` | top level, the four pipeline steps |
| `rtl/host_interface.sv` | T1 |
| `rtl/preproc_unit.sv`, `rtl/csfo_fsm.sv` | T2 and the state machine |
| `rtl/inference_unit.sv`, `rtl/rule_memory.sv`, `rtl/min_unit.sv`, `rtl/max_unit.sv` | T3 |
| `rtl/defuzzifier.sv` | T4 |
| `tb/tb_<module>.sv` | a self-checking testbench for each module |
| `tb/inference_unit_check.sv` | the inference-unit test body, instantiated once per path count |
| `tb/tb_rule_base_workload.sv` | linguistic-model workload and throughput measurement |

Parameters and their defaults:

| parameter | default | what it sets |
|---|---|---|
| `PATHS` | 4 | parallel rows per clock |
| `NSTATES` | 4 | FSM states, and so relations |
| `N_TRANS` | 4 | table entries per state |

The degree width, universe size and crisp-output fraction bits are package
constants.

## Simulating

Each testbench compares the design with its own model of the arithmetic. It
ends with a line `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_fuzzy_controller` runs the whole controller at its default sizes. It
covers:

* learning into all four relations;
* 68 inferences, including back-to-back streams with host waits;
* FSM state changes;
* row downloads;
* the error interrupt, and clearing it.

It also checks that results arrive every 9 clocks.

```
verilator --binary --timing -y rtl rtl/fuzzy_pkg.sv tb/tb_fuzzy_controller.sv \
          --top-module tb_fuzzy_controller
./obj_dir/Vtb_fuzzy_controller
```

Replace the testbench name to run another one.

* `tb_inference_unit` is the most detailed test of learning and inference.
  It runs the same checks on the four-path unit (9 clocks per job) and on
  the basic single-path datapath, `PATHS = 1` (27 clocks per job).
* `tb_rule_base_workload` learns a five-rule linguistic model. Each rule reads
  "IF X(1) is very small … very big AND X(2) is medium THEN Y is …". The test
  then streams 500 inferences with fresh inputs through the host bus. It
  measures 9.00 clocks per result, which is 3.33 million inferences per
  second at 30 MHz.

The handshake rules of the pipeline are also written as assertions in the
RTL. Build with `--assert` to check them. They cover job hold while stalled,
the 9-clock occupancy of the inference unit, and `R` being written only by
learning or row-load jobs.

## How far it follows the original design, and where it departs

Taken from the original design:

* the data format (25 points, 3-bit degrees, 75-bit words);
* learning by min and union, max-min inference, mean-of-maxima
  defuzzification;
* the operand multiplexers of the inference datapath;
* four parallel paths and a 9-clock step;
* the error flag and its interrupt use;
* the four-unit pipeline;
* the crisp-state machine, whose state selects the relation and which is
  driven by Boolean range variables of the inputs;
* a defuzzification look-up table;
* a 64-bit host bus with chip select and reset.

Choices of this design, where the original design gives no detail:

* the register map and command set, including `OP_LOAD_ROW` for downloading a
  safe model and `OP_SET_STATE`;
* the valid/ready handshakes;
* the table form of the next-state function;
* the ranges beyond "LOW" and the first-maximum tie rule;
* which state an inference uses: the state entered during the job's
  pre-processing step;
* the crisp fixed-point format;
* four states;
* the synchronous memory with four rows per word.

Conflicting figures: the pipeline step is described both as 9 clocks
(`ceil(25/4)+2`) and as 8 clocks per step for one processing path. This
design uses 9 clocks.

Not built:

* The stand-alone variant's analog inputs and outputs (A/D and D/A
  converters), its on-chip fuzzifier, and its EPROM/EEPROM program memory
  and programming mode. Their behaviour is not specified.
* The FUTUREBUS host bus protocol. It is replaced by the plain register bus
  above.
* The dedicated fuzzification, inference and defuzzification control pins,
  and the mode, strobe and synchronisation pins. Their meaning is not
  specified.
* Serial and parallel cascading of several chips.
* The two-phase non-overlapping clock and the clock tree. The RTL uses one
  rising-edge clock.

The 30 MHz clock rate depends on the process and has not been checked. Only
the clock counts are verified.
