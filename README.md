# 1-n-1 FIFO with GasP-style control

A FIFO that wastes no energy moving items through stages they do not need.
In a linear FIFO of n stages every item is copied n times on its way through.
A 1-n-1 FIFO needs only three copies, whatever its depth. Its stages sit in three ranks:

```
                +--> M[0]   --+
                +--> M[1]   --+
 in --> S1 -----+     ...     +-----> Sn --> out
                +--> M[K-1] --+
                     (K = N_STAGES - 2 middle stages)
```

Each item is copied into S1, then into one middle stage, then into Sn.
The items in the middle row are parked side by side, and nothing moves them again until they are due at the output.
The work per item is therefore constant: three latch openings and four control firings, for any depth.

The control style comes from GasP self-timed circuits.
This RTL is a clocked model of that control: it keeps the GasP firing rule and the token structure, with a clock period standing for one firing round.

## Places, modules and the firing rule

The design uses two kinds of element.

* A **place** (`gasp_place`) holds at most one item. It has a data latch and a one-bit *state conductor* that says FULL or EMPTY.
  The state is stored with GasP polarity: a high level means EMPTY, a low level means FULL (`gasp_pkg::gasp_state_e`).
* A **module** (`gasp_module`) sits between places. It has input *pins*, and it fires when every pin is set.
  Typical pins are "my predecessor is FULL", "my successor is EMPTY" and "I hold the pointer token".
  A firing does three things in the same round:
  * it opens the data latch of the successor;
  * it resets its self-resetting pins: the predecessor becomes EMPTY and the token is consumed;
  * it sets its outputs: the successor becomes FULL and the token passes to the next module.

Data only ever moves forward. Draining a place changes only its state bit.
A place cannot be filled and drained in the same round, because filling needs EMPTY and draining needs FULL.
Assertions in `gasp_place` check that.

## Keeping order: two pointer tokens

The middle row is filled out of turn with respect to position, so order has to be kept some other way.
Two rings of token state conductors do this.

* **Branch** (`rr_branch`): there is one module per middle stage, with pins {S1 FULL, M[i] EMPTY, token at i}.
  When module i fires, the item moves from S1 to M[i] and the token moves to module i+1 (K-1 wraps to 0).
* **Merge** (`rr_merge`): there is one module per middle stage, with pins {M[i] FULL, Sn EMPTY, token at i}.
  When module i fires, the item moves from M[i] to Sn and the token moves on in the same direction.

Both tokens start at M[0] and step through the same rotation.
The merge therefore always takes the oldest item in the row.
Item k (counting from 0) always travels S1 → M[k mod K] → Sn.
If the branch token's stage is still FULL, the branch waits, even if other middle stages are empty. Items never skip ahead.

The FULL middle stages always form one circular run. It starts at the merge token and ends just before the branch token.
When the two tokens meet, the row is either empty or full.
`fifo_1n1` asserts this invariant every clock (`a_mid_order`).

The whole FIFO has 2·N_STAGES − 2 modules:

* one input module;
* K branch modules;
* K merge modules;
* one output module.

## Timing of the clocked model

Every module is evaluated once per clock from the states at the start of that clock. Its effects land at the next edge.

| quantity | value |
|---|---|
| capacity | N_STAGES items (every stage, S1 and Sn included, holds one) |
| latency, empty FIFO | an item accepted at edge t is on `out_valid` at edge t+3 |
| peak rate | one item per two clocks at the input and at the output |
| drain of a full FIFO | one item every two clocks: the last leaves 2·(N_STAGES−1) clocks after the first |
| latch openings per item | exactly 3 |

The rate of one item per two clocks follows from the alternation of S1 (and of Sn) between FULL and EMPTY.
In the self-timed circuit the same alternation sets the cycle time.
The published transistor-level figures are:

| stages | cycle time |
|---|---|
| 10 | about 313 ps |
| 18 | about 332 ps |

The reason given for these figures is the large fan-out of the first and last modules.
None of those picosecond figures is modelled here.

## Interface (`fifo_1n1`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | firing-round clock; asynchronous active-low reset (all places EMPTY, tokens at M[0]) |
| `in_valid`, `in_ready`, `in_data` | in/out/in | 1/1/WIDTH | input handshake; an item enters when both valid and ready are high at an edge; `in_ready` is S1 EMPTY |
| `out_valid`, `out_ready`, `out_data` | out/in/out | 1/1/WIDTH | output handshake; `out_valid` is Sn FULL |
| `latch_en` | out | N_STAGES | bit 0 = S1, bits 1..K = M[0..K-1], bit N−1 = Sn; high in the round a stage's latch captures, i.e. every data move |

| parameter | default | meaning |
|---|---|---|
| `N_STAGES` | 18 | total stages, ≥ 3 (10 is the other configuration the design was measured at) |
| `WIDTH` | 1 | data bits per stage |

## Where this RTL departs from the circuit

* **Clocked, not self-timed.**
  * The GasP circuit uses self-resetting NAND gates and tri-state state wires held by keepers.
  * Its forward latency is four gate delays and its reverse latency two.
  * None of this is modelled. The RTL keeps only the logic: the firing condition and the token and state updates.
  * The published circuit also has a race constraint between the token path and the state path inside a branch or merge. It cannot arise in a clocked model.
* **Valid/ready environment.** The original environment talks in GasP pulses. Here the first and last modules take part in a synchronous valid/ready handshake.
* **Latches as registers.** Each data latch is a register loaded in the round its feeding module fires. The original uses a pass-gate latch that is transparent for a moment.
* **Reset values** (EMPTY places, latches at zero, tokens at stage 0) are choices of this RTL. The circuit only needs some consistent initial marking.
* **Not included.** The design was measured against four other FIFOs: a linear GasP FIFO, a square GasP FIFO, a binary-tree GasP FIFO and a clocked flip-flop FIFO. Those reference designs are not part of this RTL. Power and transistor counts are not modelled.

## Files

| file | contents |
|---|---|
| `rtl/gasp_pkg.sv` | state-conductor enum, default sizes |
| `rtl/gasp_module.sv` | generic GasP module: fire when all pins set; which pins self-reset is a parameter |
| `rtl/gasp_place.sv` | one-item stage: state conductor + data latch, with fill/drain assertions |
| `rtl/rr_branch.sv` | round-robin branch, K modules and a one-hot token ring |
| `rtl/rr_merge.sv` | round-robin merge, K modules, token ring, select for the Sn latch |
| `rtl/fifo_1n1.sv` | top: S1, branch, K middle places, merge, Sn, input and output modules |
| `tb/tb_*.sv` | self-checking testbenches, one per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each has a watchdog.

```
verilator --binary --timing --assert -y rtl rtl/gasp_pkg.sv tb/tb_fifo_1n1_full.sv \
          --top-module tb_fifo_1n1_full -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_fifo_1n1_full` with its name in both places.

| testbench | what it shows |
|---|---|
| `tb_gasp_module` | all pin combinations against the firing rule |
| `tb_gasp_place` | random legal fill/drain against a reference place, including the HI=EMPTY / LO=FULL level |
| `tb_rr_branch`, `tb_rr_merge` | random neighbouring states against a modulo-K counter; covers pointer wrap and waiting out of turn |
| `tb_fifo_1n1` | 10 stages, 8-bit data: scoreboard order, latency 3, capacity exactly N, rate 1/2 while streaming and draining, stage j mod K for the j-th item, 3 latch openings per item |
| `tb_fifo_1n1_patterns` | 10 and 18 stages side by side, 1-bit data, streamed at full rate with constant, long-run and random data: order, rate, 3 latch openings per item at both depths, output toggles equal input toggles |
| `tb_fifo_1n1_full` | the same checks at the defaults (18 stages, 1-bit data), about 12,700 items |

The two FIFO testbenches count each mechanism and fail if one never happens:

* overflow stall;
* empty output;
* output back-pressure;
* wrap of the branch pointer;
* wrap of the merge pointer;
* several items parked in the middle row.

## Expected activity per item

The case for the structure is a count of how many control modules work per item.
Each structure has a number of modules per stage, and that is multiplied by the number of stages an item passes through:

| structure | modules working per item |
|---|---|
| linear, n stages | n + 1 |
| square, n stages | (2√n − 1)·(n + 3√n − 2)/n |
| binary tree, half-height h | (2h − 1)·(2^h − 1)/(2^(h−1) + 2^(h−2) − 1) |
| 1-n-1, n stages | 3·(2n − 2)/n, which tends to 6 |

In this RTL the matching measure is exact and directly observable: `latch_en` shows three latch openings per item at every depth.
Both FIFO testbenches check that the total equals 3 × items accepted.
