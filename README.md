# Low-power BIST for a Reed-Muller circuit: bit swapping LFSR and LT-RTPG

Random test patterns make a circuit switch far more during test than in normal
use, and that extra switching costs power and heat. This design is a built-in
self-test (BIST) that tests a small AND/XOR circuit with two *low-transition*
pattern generators and locates faulty copies of the circuit with a comparator:

* **Bit swapping LFSR (BS-LFSR)** – a normal LFSR followed by 2-to-1
  multiplexers that exchange neighbouring cells whenever the last cell is 0.
  It produces the same set of vectors as the LFSR, in another order, with
  fewer bit changes from one vector to the next. Used *test per clock*: one
  vector per clock goes straight to the circuit inputs.
* **Low-transition random TPG (LT-RTPG)** – an LFSR, a K-input AND gate and
  a toggle flip-flop. The flip-flop changes only when the AND output is 1
  (on average once every 2^K clocks), so the bit stream it shifts into a scan
  chain has long runs of equal values. Used *test per scan*: the chain is
  filled, then one vector is applied.
* **Circuit under test** – a Reed-Muller network (only AND and XOR gates) for
  f(W,X,Y) = WX + W'Y + X'Y' = 1 ⊕ X ⊕ WX ⊕ WY ⊕ XY, with one injectable
  single stuck-at fault per copy.
* **Comparator response analyzer** – every copy under test is compared with
  a fault-free reference copy fed the same vectors; a sticky fail bit per copy
  says which copy is faulty.

All RTL is SystemVerilog-2017 in `rtl/`, with a self-checking testbench per
module in `tb/`.

## Block diagram

```
              mode (per session)
                 |
 +---------+     v                +--------------+  wof   +---------+
 | bs_lfsr |--bslf[2:0]--+------->| rm_cut (ref) |------->|         |
 +---------+             |   +--->|              |--+     |         |
                         |   |    +--------------+  |cap  |         |
 +---------+ chain_in +--|---+-------------------+  v     |         |
 | lt_rtpg |--------->| scan chain (ref)  |<------+ so -->| ora_cmp |--> fail[NCUT-1:0]
 +---------+    |     +-------------------+               |         |--> fault_detected
                |     +-------------------+  so --------->|         |
                +---->| scan chain (c)    |<-- cap        |         |
                      +-------------------+               |         |
                         |  +----------------+  wif[c] -->|         |
                         +->| rm_cut, copy c |            +---------+
                            | (faults[c])    |
                            +----------------+
   bist_ctrl: start -> INIT -> BS_RUN ... | SHIFT x3, CAPTURE ... UNLOAD -> done
```

In BS-LFSR mode every circuit takes `bslf[2:0]` and the analyzer compares
`wof` with `wif` each clock. In LT-RTPG mode every circuit takes the cells of
its own scan chain, the chains capture the responses, and the analyzer
compares the chain outputs (`so`) of the copies with that of the reference.

| module        | file                  | role |
|---------------|-----------------------|------|
| `bist_pkg`    | `rtl/bist_pkg.sv`     | `tpg_sel_e`, `fault_t`, Reed-Muller coefficient function |
| `lfsr`        | `rtl/lfsr.sv`         | Fibonacci LFSR, parameter taps and seed |
| `bs_lfsr`     | `rtl/bs_lfsr.sv`      | bit swapping LFSR |
| `lt_rtpg`     | `rtl/lt_rtpg.sv`      | LFSR + K-input AND + T flip-flop |
| `scan_chain`  | `rtl/scan_chain.sv`   | scan chain: serial load, parallel capture, serial unload |
| `rm_cut`      | `rtl/rm_cut.sv`       | Reed-Muller circuit with stuck-at fault injection |
| `ora_cmp`     | `rtl/ora_cmp.sv`      | comparator ORA, sticky per-copy fail bits |
| `bist_ctrl`   | `rtl/bist_ctrl.sv`    | session sequencer |
| `bist_top`    | `rtl/bist_top.sv`     | the whole BIST |

## The bit swapping LFSR

Cells are numbered c1..cN; on each clock c1 → c2 → … → cN and c1 takes the
XOR of the tapped cells (default N = 4, taps c1 and c4, i.e. x^4+x^3+1, period
15). The output O_i is cell c_i unless a swap is active:

* the select line of every multiplexer is cN;
* cN = 1: each cell goes to its own output;
  cN = 0: c1↔c2, c3↔c4, … are exchanged, for every pair lying before cN;
* a cell without a partner (c3 when N = 4) and cN itself pass unchanged.

Because cN is itself one of the outputs, the map from LFSR state to output
vector can be undone, so over one period the BS-LFSR emits every non-zero
vector exactly once, as the LFSR does. The saving in bit changes grows with N:
the testbench measures, over one full period (cyclic), 32 → 28 transitions for
N = 4 and 80 → 64 for N = 5; the ideal figure for large N is 25 %.

The generic form, where any cell drives the select of a pair of neighbours,
is available through `SEL_CELL` (1-based); a pair that contains the select
cell is not swapped, which keeps the vector set unchanged.

Which multiplexer input is 0 and which is 1 (so: swap on cN = 0, not on
cN = 1) is read from the schematic of the technique rather than stated in
words; flip `sel` in `bs_lfsr.sv` if the other convention is wanted. Either
way the vector set is the same.

## The LT-RTPG

`lt_rtpg` has an R-stage LFSR (default R = 5, taps c3 and c5, period 31),
an AND of K stages (`AND_STAGES`, one byte per input holding a 1-based stage
number; `AND_INV` inverts single inputs) and a T flip-flop. Defaults: K = 3,
AND of stages 1, 3 and 5, none inverted. Over one LFSR period the flip-flop
toggles 4 times in 31 clocks (K = 2: 8 times), so the scan input changes
rarely. Larger K means longer runs and fewer transitions but also lower fault
coverage; K = 2 or 3 is the intended range.

The scan chain (`scan_chain`, LEN = 3) shifts the flip-flop output in at
`q[0]`; after three shift clocks the cells `q[2:0]` are the vector
{first, second, third bit}. They drive W, X, Y (`q[2]` = W). On the capture
clock the chain loads the circuit's response into its last cell `q[2]`
(the other cells keep their values); the first shift of the next load puts
it on the chain output `so`, towards the analyzer, while the next vector
enters. The reference circuit and every copy under test have a chain of
their own, all fed the same bit stream, so every copy sees the same vector
and its response travels to the analyzer on its own wire.

## The circuit under test and its faults

`rm_cut` builds any N-input function from its truth table `TRUTH` (bit j =
f(j), with W as the most significant input bit). The positive-polarity
Reed-Muller coefficient of the product of the variables in mask m is the XOR
of f_j over all j whose bits are a subset of m (`bist_pkg::rm_coeff`,
evaluated at elaboration). Only the positive-polarity form (every variable
uncomplemented) is built; a fixed-polarity expansion with some variables
complemented would need inverters on those inputs. The network is one AND gate per product of two or
more variables and one XOR chain, starting at the constant 1 if C_0 = 1,
that adds the terms in increasing mask order. For the default table 8'hDB
this is 1 ⊕ X ⊕ XY ⊕ WY ⊕ WX: three AND gates and four XOR gates.

Fault lines, selected by `fault.site` (N inputs, T = 2^N):

| site            | line |
|-----------------|------|
| 0 … N-1         | input stem x[i] (x[2] = W, x[1] = X, x[0] = Y) |
| N + m           | product term m: constant 1 (m = 0), the branch of a single input into the chain, or an AND output |
| N + T + m       | XOR chain node after term m; node T-1 is the output f |

For the default circuit 19 lines × 2 values give 38 single stuck-at faults.
29 of them can be detected at all. Nine cannot: stuck-at-1 on the constant
line and on the two chain nodes that still equal it, and both values on the
unused Y, W and WXY term lines, which are not connected to anything.

## Sessions, timing and the response analyzer

A session is started with a one-clock `start` pulse while the BIST is idle.
`mode` is sampled with it. Counting the edge that samples `start` as 1:

| mode          | what happens | `done` rises on edge |
|---------------|--------------|----------------------|
| `TPG_BSLFSR`  | 1 INIT clock (reseed, clear ORA), then 15 clocks each comparing one BS-LFSR vector (a full period) | 2 + 15 = 17 |
| `TPG_LTRTPG`  | INIT, then 32 × (3 shift clocks + 1 capture clock), then 1 unload clock; the first shift of each load after the first, and the unload clock, compare the chain outputs | 3 + 32·4 = 131 |

`done` stays high until the next `start`. `fail[c]` is set if copy c ever
disagreed with the reference on a compared response, `fault_detected` is the OR
of `fail`, `errors` counts compare clocks with any mismatch. `wof` / `wif`
show the reference response and the responses of the copies. With default
sizes the BS-LFSR session applies all 8 input combinations and catches all 29
detectable faults; the 32-vector LT-RTPG session catches 27 of them, because
the low-transition sequence repeats some vectors and misses others.

## Parameters of `bist_top`

| parameter     | default | meaning |
|---------------|---------|---------|
| `BS_N`        | 4       | BS-LFSR cells (its low `N_VARS` outputs drive the circuit) |
| `LT_R`, `LT_K`| 5, 3    | LT-RTPG LFSR stages and AND inputs |
| `N_VARS`      | 3       | circuit inputs = scan chain length |
| `TRUTH`       | 8'hDB   | truth table of the circuit under test |
| `NCUT`        | 1       | copies under test (each with its own `faults[c]`) |
| `BS_PATTERNS` | 15      | vectors per BS-LFSR session |
| `LT_PATTERNS` | 32      | scan loads per LT-RTPG session |

The taps, seeds and AND inputs of the generators are parameters of
`bs_lfsr` / `lt_rtpg`; when changing `BS_N` or `LT_R` give them a primitive
polynomial as well (the defaults are for 4 and 5 cells).

## What follows the source and what is this design's own

Taken from the technique as published: the external-XOR LFSR, the BS-LFSR
structure (pairwise swap by 2-to-1 multiplexers selected by the last cell,
general select cell), the 4-bit size of the BS-LFSR, the LT-RTPG structure
(LFSR, K-input AND on true or inverted stages, T flip-flop into a scan chain
that feeds the circuit and carries its response to the analyzer) with K = 2 or
3, the Reed-Muller function, its coefficient rules and its AND/XOR
realisation, the comparator ORA with a fault-free and a faulty response, and
the stuck-at fault model.

Chosen here, because the source does not give it: all feedback polynomials
and seeds, the multiplexer polarity, the pairing of cells for even N, the LFSR
length and AND inputs of the LT-RTPG, the scan chain length of 3, the order
of terms along the XOR chain, how faults are injected, the sticky fail bits,
the error counter, the controller and session lengths, and the choice of
generator per session, a separate scan chain per circuit copy, and capture
of the single response bit into the last cell only. The mapping onto an FPGA (CLBs, routing) and the alternative
signature-analyzer ORA are not part of the RTL.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/bist_pkg.sv \
          tb/tb_bist_top.sv --top-module tb_bist_top -Mdir obj_top
./obj_top/Vtb_bist_top
```

| testbench        | what it checks |
|------------------|----------------|
| `tb_lfsr`        | recurrence, full period, hold, reload (4 and 5 cells) |
| `tb_bs_lfsr`     | every vector against a swap model, same vector set and same number of ones per output as the LFSR, fewer transitions; N = 4, 5 and 7 with the select on cell 3 |
| `tb_lt_rtpg`     | chain input, AND output and toggle count per period (K = 3 and K = 2 with an inverted input) |
| `tb_scan_chain`  | random shift/capture/hold against a model (LEN = 3 and 5) |
| `tb_rm_cut`      | coefficients, function, all 38 stuck-at faults against a gate model |
| `tb_ora_cmp`     | sticky fail bits, enable, clear, error count (two copies) |
| `tb_bist_top`    | default sizes: one session fault free and one per fault for each generator (78 sessions); vectors, session lengths, detection and error counts against a model; counts swaps, T-flip-flop toggles and holds, scan captures and scan-out compares, generator switches, detected and undetected faults |
| `tb_bist_diag`   | `NCUT = 3`: random faults in several copies; `fail` must name exactly the copies whose fault shows |

The whole set runs in a few seconds.
