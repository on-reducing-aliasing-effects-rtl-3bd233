# Logic BIST with single-chain diagnosis

A logic BIST session loads pseudo-random patterns into many scan chains. The
responses are compacted in a multiple-input signature register (MISR), and the
final signature is compared with the expected one. A wrong signature says that
*something* failed, but not which vector failed or which scan cells captured
wrong values. Two errors can even cancel inside the MISR (aliasing), so that a
faulty circuit passes.

This RTL adds a small amount of logic around the MISR so that the raw response
of **one scan chain at a time** can be read out, bit for bit, on the MISR's
serial output:

* **Chain select.** Each chain's scan-out goes through a 2-input multiplexer
  whose other input is constant 0. A **one-hot state machine** with one
  flip-flop per chain drives the selects. In its all-0 reset state every chain
  passes, which is ordinary BIST. In one-hot state *k*, only chain *k* reaches
  the MISR.
* **MISR feedback gating.** Every feedback input of the MISR's XOR gates goes
  through a 2-input multiplexer to constant 0, controlled by the test signal
  **D**. With D = 1 the MISR has no feedback and becomes a shift register. The
  selected chain's bits enter stage *k* and leave the serial output unchanged
  N-1-k clocks later.

The test equipment compares that stream with the fault-free responses. The
first mismatch names the first failing vector, and the mismatch positions name
the failing cells. Aliasing cannot hide an error, because nothing is compacted.
With the state machine cleared and D = 0, the added logic is transparent.

The default configuration is that of an industrial block: 96 scan chains of up
to 499 flip-flops, a 96-bit pattern generator and MISR, and 16K-vector
sessions.

## Block diagram

```
            +------+  bit i   +-----------------+  so_i  +-------------+ misr_in_i +---------------+
            | PRPG |--------->| scan chain i    |------->| chain_select|---------->| MISR stage i  |--> ... --> misr_so
            |  N   |          | L cells         |        |  mux to 0   |           |  XOR + D-gated|     (stage N-1)
            +------+          +-----------------+        +-------------+           |  feedback     |
                                 ^ d (cut_resp)               ^ pass_i              +---------------+
                                 | q (scan_cells)             |                         ^ diag_d
                         logic under test (outside)     onehot_fsm (N flops)            |
                                                              ^ diag_clear / diag_step
   lbist_controller: start, num_vectors -> scan_en / capture_en / misr_en, done, pass
```

| File | Module | What it is |
|---|---|---|
| `rtl/bist_pkg.sv` | package | default sizes, polynomial, seed, controller phase enum |
| `rtl/prpg.sv` | `prpg` | N-bit LFSR, bit i feeds chain i |
| `rtl/scan_chain.sv` | `scan_chain` | one mux-D scan chain of L cells |
| `rtl/onehot_fsm.sv` | `onehot_fsm` | chain-selecting state machine, all-0 = normal mode |
| `rtl/chain_select.sv` | `chain_select` | N multiplexers (chain or 0) in front of the MISR |
| `rtl/misr.sv` | `misr` | N-bit MISR with D-gated feedback, serial output |
| `rtl/lbist_controller.sv` | `lbist_controller` | session sequencing, signature compare |
| `rtl/lbist_diag_top.sv` | `lbist_diag_top` | the whole BIST with diagnosis |

## The session

A BIST vector is a full scan load, one system clock that captures the
response, and a full shift-out through the MISR. The shift-out of vector *v*
overlaps the load of vector *v+1*. After `start`, the controller runs:

| phase | clocks | enables |
|---|---|---|
| LOAD | L | `scan_en`, PRPG advances, MISR idle (the chains' power-up contents are never compacted) |
| CAPTURE | 1 | `capture_en`: every scan cell loads `cut_resp` |
| SHIFT | L (the last one: L + N - 1) | `scan_en`, PRPG advances, MISR compacts |

CAPTURE and SHIFT repeat for `num_vectors` vectors. The final shift is N-1
clocks longer, so that in diagnosis mode the last bits of any chain reach
`misr_so`. `done` rises **L + V·(L+1) + N − 1** clocks after the clock that
accepts `start`. For the defaults (V = 16384) that is 8,192,594 clocks. In the
DONE phase, `pass = (signature == expected_sig)`. `start` clears the MISR and
reseeds the PRPG.

Alternatively, the signature can be compared off chip. In DONE, holding
`sig_unload` high shifts the MISR towards its serial output, one bit per
clock, with inputs and feedback ignored. `misr_so` shows stage N-1 first, so
bit N-1-j of the signature is on `misr_so` after j unload clocks. `pass` keeps
the result of the compare made before the first unload clock.

## Diagnosing a failing session

1. Pulse `diag_clear` and then pulse `diag_step` k+1 times. This selects chain
   k, where chains are numbered 0 to N-1; `diag_state` shows `1 << k`. Further
   steps move to the next chain and wrap from N-1 to 0.
2. Set `diag_d = 1` and run a session (`start`) with as many vectors as needed.
3. Sample `misr_so` after every clock of the SHIFT phase (`bist_phase` is
   SHIFT during the clock). The MISR stands still during the capture clocks,
   so only shift clocks bring a new bit. Number the shift clocks of the session
   j = 1, 2, ... The value that cell *c* of chain *k* captured for vector *v*
   is on `misr_so` after shift clock

   **j(v, c, k) = (v−1)·L + (L−1−c) + (N−1−k) + 1**

   Here chains are numbered 0 to N-1 and vectors 1 to V. Cell 0 is next to the
   scan-in, and cell L-1 drives the scan-out.

4. Compare with the fault-free value of that cell. The smallest *v* with a
   mismatch is the first failing vector of chain *k*, and the mismatching *c*
   values for that *v* are its failing cells.
5. Repeat for every chain, or only for the chains of interest. Finish with
   `diag_clear` and `diag_d = 0` to return to normal BIST.

The diagnosis controls must be held steady during a session, and an assertion
in the top checks this. All chains are still loaded and captured normally
during diagnosis, so the logic feeding the selected chain sees exactly the same
patterns as in a normal session.

### Why aliasing goes away

The MISR used here shifts from stage i to stage i+1 and adds the polynomial
feedback from the last stage. Take an error in chain i that leaves the chain at
shift s, and a second error in chain i+d that leaves at shift s+d. If no
feedback stage lies between them, the first error arrives at stage i+d just as
the second one enters, and the two cancel. The normal-mode signature then
passes. The end-to-end testbench builds exactly such a fault (chain 2, cell 3
and chain 3, cell 2 at the same vector). It checks that the normal session
passes, and that diagnosing chains 2 and 3 finds both cells. In diagnosis mode
only one chain feeds the MISR and there is no feedback, so a stream bit can
never meet another error.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 96 | scan chains = PRPG bits = MISR bits = FSM flip-flops |
| `L` | 499 | cells per chain (all chains equally long) |
| `MAX_VECTORS` | 16384 | largest session; `num_vectors` is $clog2(MAX_VECTORS+1) = 15 bits |
| `POLY` | x^96+x^94+x^49+x^47+1 | PRPG and MISR polynomial; bit i = coefficient of x^i, x^N implied |
| `SEED` | 1 | PRPG start value |

When `N` changes, `POLY` and `SEED` must be given at the new width. The
testbenches use N = 8 with x^8+x^6+x^5+x^4+1 (`8'h71`).

## Top-level ports (`lbist_diag_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | start a session (sampled when idle or done) |
| `num_vectors` | in | 15 | vectors in the session (0 runs 1) |
| `expected_sig` | in | N | expected signature |
| `sig_unload` | in | 1 | in DONE: shift the signature out on `misr_so` |
| `busy`, `done`, `pass` | out | 1 | session running / finished / signature matched |
| `vec_count` | out | 15 | vectors captured so far |
| `diag_clear`, `diag_step` | in | 1 | one-hot FSM to all-0 / to next chain |
| `diag_d` | in | 1 | test signal D; 1 = MISR feedback forced to 0 |
| `diag_state`, `diag_mode` | out | N, 1 | FSM state, FSM in a one-hot state |
| `bist_phase` | out | enum | controller phase (IDLE, LOAD, CAPTURE, SHIFT, DONE) |
| `signature`, `misr_so` | out | N, 1 | MISR contents and serial output (stage N-1) |
| `capture_en` | out | 1 | the system clock of the vector |
| `scan_cells` | out | N×L | all scan cells: inputs of the logic under test |
| `cut_resp` | in | N×L | response of the logic under test, loaded on `capture_en` |

The logic under test is not part of this RTL. Its state elements are the scan
cells, so the top exposes them as `scan_cells` and takes their next values as
`cut_resp`. In a real design, the scan chains would be stitched through the
design's own flip-flops, and `cut_resp` would be their functional D inputs.

## Design choices and departures

The following points are choices made in this RTL where the architecture leaves
them open.

* **Multiplexer select in normal mode.** The chain multiplexer passes the chain
  when its select is 1. In the all-0 reset state, however, every chain must
  pass. The FSM therefore outputs `chain_pass[i] = state[i] | (state == 0)`,
  which adds one N-input NOR gate.
* **Which MISR inputs D gates.** D gates the feedback from the last stage into
  the tapped stages. The stage-to-stage shift path stays, because the selected
  chain has to travel to the serial output. If the shift path were gated as
  well, only the chain next to the output could be observed.
* **MISR and PRPG structure.** Both are internal-XOR (Galois) registers with
  the same primitive polynomial. The MISR has one XOR per stage (N of them) and
  gates its feedback at the 4 polynomial taps. The reference block instead had
  91 chain XORs and 91 feedback multiplexers in its own MISR, whose structure
  is unknown.
* **D polarity.** D = 1 selects the constant 0.
* **Chain length.** The reference block's longest chain has 499 flip-flops.
  Every chain here has that length, as if the chains were perfectly balanced.
* **Sequencing.** Load and shift-out overlap. The MISR is idle during the first
  load. The final shift is extended by N-1 clocks. The controller compares the
  signature on chip in addition to shifting it out serially, and takes a
  run-time vector count. The unload path (a plain shift with inputs ignored)
  is this design's own.
* **State machine transitions.** `diag_clear` and `diag_step` (step from all-0
  to chain 0, then rotate) are this design's own interface. The architecture
  only asks that the machine can be reset to all-0 and put into each one-hot
  state.

Not included:

* the logic under test;
* the 100 test points (78 control, 22 observation) that lift stuck-at coverage
  from 84.82 % to 95 % in the reference block;
* the off-line software that turns a failing vector and its failing cells into
  fault suspects. That software takes the difference of the undetected-fault
  lists after n-1 and n vectors, then keeps the faults detected only at the
  failing cells.

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | size | what it checks |
|---|---|---|
| `tb_prpg` | 8 and 96 bits | every state against multiply-by-x mod p(x); full 255-state period; hold, reseed |
| `tb_scan_chain` | L = 6 | shift latency, capture, unload order, shift priority |
| `tb_onehot_fsm` | 5 and 96 | reset, step order, wrap, clear, `chain_pass` decode, one-hot assertion |
| `tb_chain_select` | 96 | random words, bit by bit |
| `tb_misr` | 8 | normal compaction against a polynomial model; with D = 1, every input k appears on `so` exactly N-1-k clocks later; serial unload |
| `tb_lbist_controller` | N=4, L=5 | phase on every clock, session length formula, pass, 0 vectors, unload with pass held |
| `tb_lbist_diag_top` | N=8, L=6 | end to end against a procedural reference model: every `misr_so` bit, signatures, pass and fail sessions, diagnosis of all 8 chains, FSM wrap, an aliasing fault that passes normal BIST and is found by diagnosis, chain isolation with feedback on, serial signature unload |
| `tb_lbist_full` | defaults | a full 16384-vector session (8.2 M clocks): length, signature, pass; then a fault at vector 16000 must fail |
| `tb_table2_diag` | defaults | 15 failure cases: first failing vector 32, 41, 65, 74 or 100 with 2, 4 or 6 failing cells in distinct chains. Each normal session must fail, every failing chain must be diagnosed to the right vector and cell, and a clean chain must show nothing |

`tb/lbist_ref_pkg.sv` holds the reference model used by the last three
testbenches. It is a clock-by-clock procedural model of the session, written
independently of the RTL. It also contains the stand-in logic under test: a
fixed XOR/AND mix of rotated scan-cell contents, with a fault modelled as
inverted cells at chosen vectors. The testbenches evaluate the stand-in once
per vector, in the capture cycle.

To run one with Verilator 5 (`--timing` is needed):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lbist_diag_top \
  rtl/bist_pkg.sv tb/lbist_ref_pkg.sv rtl/*.sv tb/tb_lbist_diag_top.sv
./obj_dir/Vtb_lbist_diag_top
```

The small testbenches finish in well under a second. `tb_table2_diag` takes
about 25 s, and `tb_lbist_full` about 90 s (both at full size).
