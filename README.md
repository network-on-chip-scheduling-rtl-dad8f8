# Modified i-SLIP scheduler for virtual-output-queued switches

An N-port on-chip switch in which every input keeps a separate queue for
every output (virtual output queuing, VoQ) never suffers head-of-line
blocking: a packet stuck behind a busy output cannot hold up a packet for
a free one. The cost is that, in every time slot, something must decide
which input sends to which output. Each input may send to only one output,
and each output may take from only one input. This RTL is that decision
maker. It builds a one-to-one match between inputs and outputs from the
request bits of the queues. It uses the *modified i-SLIP* algorithm: a few
rounds of request, grant and accept between round-robin arbiters. Its
pointer rule keeps the match fair and free of starvation.

The default configuration is 8 ports and 8 iterations per scheduling
cycle. A new match comes out every 9 clocks.

## The algorithm, one iteration

Every output *j* has a **grant arbiter** with a priority pointer `g[j]`.
Every input *k* has an **accept arbiter** with a pointer `a[k]`. One
iteration has three steps:

1. **Request.** Each input that is still unmatched requests every output
   it holds a packet for. Outputs that are already matched, or marked not
   available, are not requested.
2. **Grant.** Each unmatched output picks one of the requesting inputs. It
   takes the first one at or after `g[j]`, counting round modulo N.
3. **Accept.** Each unmatched input that received grants picks one of them.
   It takes the first granting output at or after `a[k]`. That input and
   that output are now matched for the rest of the scheduling cycle.

Later iterations only add pairs among the ports still free. So the match
grows until it is maximal: no free input still wants a free output. With
8 ports and 8 iterations it is always maximal. In practice it usually
stops growing after about log2(N) iterations.

### The pointer rule (the part that matters)

The arbitration is plain round robin. What makes it i-SLIP, and *modified*
i-SLIP, is **when the pointers move**:

* A grant pointer `g[j]` moves to one past the input it granted **only if
  that grant was accepted**. A refused grant leaves the pointer where it
  was, so the output offers the same input again next time.
* An accept pointer `a[k]` moves to one past the output it accepted.
* Both move **only for pairs matched in the first iteration** of a
  scheduling cycle. Matches made in later iterations fill gaps but do not
  touch any pointer.

The rule gives the most recent connection the lowest priority. It also
makes the output arbiters drift out of step with each other under heavy
load, so they grant to different inputs. That is what lifts throughput
towards 100 % and keeps every queue served. Updating on a refused grant as
well gives plain round-robin matching. Its output arbiters then stay in
step, which caps throughput near 50 %. Updating in
every iteration gives plain i-SLIP. The end-to-end testbench detects the
second variant.

## Structure

```
 input_request[k] ──► mask (unmatched, available) ──► [request swizzle]
                                                          │ per output
                                        N grant arbiters ◄┘  (arbiter, g[j])
                                                          │
                                               [grant swizzle]
                                                          │ per input
                                        N accept arbiters ◄┘  (arbiter, a[k])
                                                          │
                          ┌──────────────── [accept swizzle]
                          ▼                              ▼ per output
                 match registers               update_enable ──► pointer
            (matched flags, decisions)        (first iteration)   updates
                          ▲
                     islip_fsm  (clear / iterate / first_iter / done)
```

| module | role |
|---|---|
| `islip_scheduler` | top: wires everything, holds the match registers |
| `arbiter` | round-robin arbiter with pointer; used 2N times (grant and accept) |
| `ppe` | programmable priority encoder: first request at or after the pointer |
| `spe` | simple priority encoder: lowest-numbered request |
| `swizzle` | transpose of N vectors of N bits (per-input ↔ per-output view) |
| `update_enable` | which arbiters may move their pointer this clock |
| `islip_fsm` | iteration counter, first-iteration flag, DONE |
| `islip_pkg` | default sizes and the FSM state type |

**Arbiter.** The same `arbiter` module is used for both roles. A grant
arbiter sees the requests arriving at its output. An accept arbiter sees
the grants arriving at its input. Inside, a `ppe` is built from two `spe`s.
One `spe` sees only the requests at positions >= pointer, and the other
sees all requests. The first one's result is used if it found anything.
Otherwise the second one's result is used, which is the wrap-around case.
When `update_enable` is high at a clock edge, the pointer becomes
(granted index + 1) mod N. A disabled arbiter outputs zeros.

**Swizzles.** The request, grant and accept vectors are produced by one
side and consumed by the other. An input's request vector has one bit per
output. A grant arbiter needs one bit per input. Three swizzles transpose
the N x N bit matrix between the two views, one for requests, one for
grants and one for accepts. They are wires only.

**Update enables.** `grant_update[j] = first_iter & |output_acc[j]`: output
j's grant was accepted in iteration 0. `accept_update[k] = first_iter &
|input_acc[k]`. These go to the arbiters' `update_enable`. Each arbiter
updates with its own grant, which for a grant arbiter is the accepted input.

**Critical path.** One iteration is combinational in a single clock. It
runs through the request mask, the grant PPE, the grant swizzle and the
accept PPE into the match registers and the pointers. The two priority
encoders in series dominate it. Speeding up the PPE speeds up the
scheduler.

## Interface and timing

Parameters: `N` (ports, default 8) and `N_ITER` (iterations per cycle,
default 8).

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `resetb` | in | 1 | asynchronous reset, active low; pointers go to 0 |
| `start` | in | 1 | start a scheduling cycle; keep high for back-to-back cycles |
| `done` | out | 1 | high for one clock when the match is complete |
| `input_request[k]` | in | N x N | bit j: input k has a packet for output j |
| `output_available` | in | N | bit j low: output j takes no part in the match |
| `input_decision[k]` | out | N x N | one-hot: the output input k got (zero if none) |
| `output_decision[j]` | out | N x N | one-hot: the input output j got (zero if none) |
| `input_decision_valid` | out | N | matched inputs; non-zero only while `done` |
| `output_decision_valid` | out | N | matched outputs; non-zero only while `done` |

Sequence with `start` held high:

```
clock     0      1      2     ...    8      9      10
state   IDLE   IT0    IT1    ...   IT7   DONE    IT0 ...
                 \ pointers may move here only
done      0      0      0     ...    0      1      0
```

* `start` is sampled in IDLE or DONE. That clock clears the match
  registers. Iteration 0 runs in the next clock.
* Each iteration clock adds its pairs to the match registers at its end.
  So `input_decision`/`output_decision` build up during the cycle, and a
  reader may watch them grow.
* In the DONE clock the valid vectors show the matched ports. If `start` is
  still high, the next cycle's iteration 0 follows directly, so a cycle
  lasts `N_ITER + 1` clocks. Otherwise the FSM returns to IDLE and the
  decisions stay readable until the next start.
* Requests and availability are sampled in every iteration. Hold them
  steady from the start clock until DONE. Change them in the DONE clock for
  the next cycle.

Bit conventions: bit j of `input_request[k]` is the request for output j.
Bit k of `output_decision[j]` names input k. For example, with
`input_request[3] = 8'b11110001` input 3 may be matched to output 0, and
then `output_decision[0] = 8'b00001000` and `input_decision[3] =
8'b00000001`.

## What is specified and what is chosen here

These parts follow the published modified i-SLIP scheduler:

* the three-step iteration;
* the pointer rule (accepted grants only, first iteration only, one past
  the chosen port);
* the arbiter built as a PPE made of two SPEs, with
  `req / arb_enable / update_enable / gnt / anygnt` ports;
* N grant and N accept arbiters, three swizzles, an update-enable unit and
  an FSM;
* N = 8 and i = 8;
* the top-level signal names and bit order.

These are choices of this implementation:

* **One iteration per clock**, and a single DONE clock. So a cycle is
  N_ITER + 1 clocks.
* **`output_available`** removes an output from the match. This is the
  most natural reading of an availability input on a scheduler.
* **Matched ports drop out.** A matched output receives no more requests,
  and the arbiters of matched ports are disabled. Only unconnected inputs
  request, as the algorithm says. Withholding requests to matched outputs
  as well keeps later iterations from producing grants that cannot be
  accepted.
* **Reset** is asynchronous. It is active low at the top and active high
  inside. All pointers reset to port 0.
* **Encodings.** Pointers are binary indices of clog2(N) bits, and the FSM
  has three states plus an iteration counter. The arbiter enables are
  computed per arbiter rather than collected into one 2N-bit vector.

Not included: the virtual output queues themselves (depth, memory, 72-bit
packet storage, dequeue on a match) and the crossbar that carries the
packets. `input_request` stands for the queues' non-empty flags, and the
decision outputs are what a crossbar would be driven with. Published FPGA
figures for a comparable design (about 266 MHz, 771 slices on a Virtex-4)
come from a different netlist and are not reproduced here.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_spe` | all 256 request vectors |
| `tb_ppe` | all 256 request vectors x all 8 pointer values, against a wrapped scan |
| `tb_arbiter` | 3000 random clocks against a pointer model; update, hold and wrap all occur |
| `tb_swizzle` | random and walking-bit matrices |
| `tb_update_enable` | random accept vectors with and without the first-iteration flag |
| `tb_islip_fsm` | clock-by-clock outputs against a model; cycle length N_ITER + 1; back-to-back cycles |
| `tb_islip_scheduler` | the full 8 x 8 design at default parameters, 400 scheduling cycles |
| `tb_islip_3x3` | the same design built as 3 x 3 with 3 iterations, starting from the 3 x 3 example |

The two system-level benches carry an independent model of the algorithm,
with its own pointer arrays. Each scheduling cycle they compare all
decisions and valid bits with it. They also check several properties of
the match:

* every decision is one-hot;
* each pair looks the same from the input side and from the output side;
* every matched pair was requested and its output was available;
* the match is maximal;
* DONE comes exactly N_ITER + 1 clocks after the start.

The first 8 x 8 cycle uses a fixed set of request vectors, with output 6
unavailable. The 3 x 3 bench also looks at the arbiters' internal
pointers. After its first cycle they must read g0=1, g1=0, g2=0 and a0=1,
a1=0, a2=0, and input 0 must be matched to output 0 in the first
iteration.

The end-to-end benches also count that each behaviour really happens, and
report a failure for any that never does:

* a first-iteration grant that is refused, so its pointer stays;
* a match made in a later iteration;
* a request to an unavailable output;
* a pointer wrapping from N-1 to 0;
* back-to-back cycles;
* a return to idle.

The RTL also holds assertions:

* each arbiter grant is one-hot and agrees with `anygnt`;
* an accept only happens on a granted output;
* the number of matched inputs always equals the number of matched
  outputs.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/islip_pkg.sv tb/tb_islip_scheduler.sv --top-module tb_islip_scheduler
./obj_dir/Vtb_islip_scheduler
```

Replace the testbench name for any other bench. Everything takes well under
a second to run. Lint with
`verilator --lint-only -Wall -Irtl rtl/islip_pkg.sv rtl/islip_scheduler.sv`.
It reports two kinds of warnings. The package's size constants go unused
in modules that take only one of them. The assertions use the reset as a
synchronous disable, while the flip-flops use it asynchronously.

To change the size, set `N` and `N_ITER` on `islip_scheduler`. N need not
be a power of two. Use N_ITER >= N if the match must always be maximal.
