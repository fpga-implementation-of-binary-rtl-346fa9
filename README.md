# Binary pulse compression sequence search engine

A pulse compression radar sends a long pulse whose phase is flipped by a
binary code (+1/-1 per chip). The receiver correlates the echo with the code.
A good code concentrates the correlation into one sharp peak, with small
sidelobes on either side. The usual figure of quality is Golay's merit factor

    F = N^2 / (2 E),      E = sum_{k=1}^{N-1} A(k)^2,
    A(k) = sum_{i=0}^{N-1-k} s[i] s[i+k]          (aperiodic autocorrelation)

For a binary code the mainlobe A(0) = N is fixed. Finding the best code of
length N is therefore finding the sequence with the smallest sidelobe energy
E. Optimisation heuristics (genetic algorithms, annealing) give no guarantee
of the optimum. This design settles the question in hardware by brute force.
A counter enumerates the candidates, a fully parallel correlator computes E
for one candidate every clock, and a comparator keeps the best. For N = 23 the
whole space of 2^23 sequences is covered in 2^23 + 1 clocks.

For longer codes the design also supports a partial search. The upper N-K
elements are held at a known good shorter sequence and only the last K
elements are enumerated, which cuts the run to 2^K clocks.

## Dataflow

```
 preset ─► seq_gen (counter, K bits + N-K fixed bits) ──────────────┐ sequence
              │ N bits                                              │
           sign_conv   bit 1 -> +1, bit 0 -> -1                     │
              │ N elements                                          │
     ┌────────┼─────────────── ... ───────┐   one stage per lag     │
  mux_unit(k=1)  mux_unit(k=2)   ...  mux_unit(k=N-1)   shift by k  │
  mac_unit       mac_unit        ...  mac_unit          A(k)        │
  square_unit    square_unit     ...  square_unit       A(k)^2      │
     └────────┬─────────────── ... ───────┘                         │
          energy_adder                 E = sum A(k)^2               │
              │                                                     │
          best_tracker:  [energy reg 1] [sequence reg 1] ◄──────────┘
                          comparator: E1 < Emin  -> load
                         [energy reg 2] [sequence reg 2]
                              │               │
                         min_energy        best_seq
```

All N-1 lag stages work side by side. The path from the counter register
through the correlator to the first pair of temp registers is purely
combinational. A candidate therefore enters the comparator one clock after
the counter shows it, and a new minimum is in the output registers one clock
later.

## The blocks

| module | role |
|---|---|
| `bpc_pkg` | element type and width functions |
| `seq_gen` | synchronous counter with preset; K counted bits, N-K fixed bits |
| `sign_conv` | counter bit to signed element |
| `mux_unit` | N multiplexers of N:1; output i = input i+sel, zero past the end |
| `bpc_mul` | product of two elements in {-1, 0, +1} |
| `mac_unit` | N multipliers and an adder chain: A(k) for one lag |
| `square_unit` | A(k)^2 |
| `energy_adder` | E = sum over k = 1..N-1 |
| `best_tracker` | two register pairs and the comparator with its load signal |
| `bpcs_search` | top level |

**Element encoding.** An element is a 2-bit two's-complement number:
`01` = +1, `11` = -1, `00` = 0. Binary candidates use only +1 and -1. The zero
code appears only where a multiplexer shifts past the end of the sequence.
This zero fill is what makes the correlation aperiodic. The multiplier needs
no arithmetic: the product is 0 if either input is 0, and otherwise the XOR
of the sign bits chooses -1 or +1.

**Multiplexer stages.** Each stage is a set of N:1 multiplexers whose select
input is the lag. In the top the select inputs are constants (k = 1 .. N-1),
so after synthesis the stages are plain wiring. The module keeps a real
select input so that a lag-serial variant could reuse it.

**Comparator and registers.** The first energy/sequence register pair holds
the candidate just computed. The second pair holds the best candidate so far
and drives the outputs. The comparison is strict (`<`), so among
equal-energy sequences the first in counter order is kept. Negating,
reversing or flipping every other sign of a sequence leaves its energy
unchanged, so ties are common. A `found` flag makes the first
candidate after preset load unconditionally, so no "infinite" start value is
needed.

## Interface and timing (`bpcs_search`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `preset` | in | 1 | high for at least one clock: clears counter and result |
| `fixed_seq` | in | N | bits N-1..K are the fixed elements when K < N; otherwise ignored |
| `min_energy` | out | ceil(log2((N-1)N(2N-1)/6 + 1)) | smallest E found (12 bits for N = 23) |
| `best_seq` | out | N | the sequence with that energy; bit i is element i, 1 = +1, 0 = -1 |
| `new_best` | out | 1 | one-clock pulse when the comparator loads a new minimum |
| `found` | out | 1 | the output registers hold a result |
| `done` | out | 1 | the search is complete; stays high until the next preset |

Parameters: `N` (sequence length, default 23) and `K` (counted bits,
default N, i.e. exhaustive search).

The search starts on the first clock with `preset` low. The candidate with
counter value c is compared c + 1 clocks later. `done` rises exactly
2^K + 1 clocks after `preset` is released, and from then on the outputs hold
the final result. `min_energy` and `best_seq` are updated during the run and
may be read at any time as "best so far". Nothing is reset at power-up:
`preset` must be applied once before the outputs mean anything.

## Sizes and results

With the defaults (N = 23) the top level synthesises (generic, before
technology mapping) to about 1,200 word-level cells and 98 flip-flops. Of
those, 23 + 1 are counter bits and the rest are the two register pairs and
status bits.
The correlator is written with N multipliers per lag stage. Those that
multiply by the zero fill are constant and drop out in synthesis, which
leaves N(N-1)/2 = 253 products for N = 23.

Results from simulation, each checked against an independent software
search in the testbench:

| N | K | min. energy E | merit factor | clocks |
|---|---|---|---|---|
| 11 | 11 | 5 | 12.1 | 2^11 + 1 |
| 13 | 13 | 6 (Barker 13) | 14.08 | 2^13 + 1 |
| 23 | 23 | 47 | 5.63 | 2^23 + 1 |
| 31 | 20 (upper 11 fixed to the best 11-element code) | 111 | 4.33 | 2^20 + 1 |

A full 31-element search (2^31 clocks) only needs `N = 31`. At an assumed
50 MHz that is about 43 s of hardware time, but it is too long to simulate.

## Interpretation and departures

* **Binary, not ternary.** The architecture comes from a description that
  mixes binary and ternary sequences. It speaks of 3^N candidates, of a 0
  element, and of a table of ternary merit factors. This design is the binary
  engine: an N-bit counter has 2^N states, and a minimum-energy search over
  ternary sequences would simply return the all-zero sequence, whose
  sidelobe energy is 0. The 2-bit element code keeps a zero value, which the
  multiplexers use for the zero fill.
* **Counter bits as multiplexer selects.** In the original description the
  counter drives the multiplexer select lines. Here the select of each stage
  is its lag, and the counter drives the data.
* **No accumulation over time.** Where an "adder and accumulator" is
  mentioned, each lag stage here sums its N products in the same clock. This
  gives one candidate per clock.
* **Own choices:** mapping of bit 0 to -1; placement of the fixed elements in
  the upper bit positions; strict minimum; one-shot counter that stops after
  2^K candidates; the `found`, `done` and `new_best` status outputs; no
  pipeline register inside the correlator (add one before `best_tracker` if
  timing requires it; `done` then moves by one clock).
* **Not included:** any conversion of `best_seq` into a transmit waveform.
  That belongs outside this block.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>`, and each has a watchdog.

* `tb_bpc_mul`, `tb_square_unit`: exhaustive.
* `tb_sign_conv`, `tb_mux_unit`, `tb_mac_unit`, `tb_energy_adder`: random
  vectors against integer arithmetic.
* `tb_seq_gen`: count order, fixed bits, `last`, stop and restart.
* `tb_best_tracker`: a random energy stream with ties and gaps against a
  cycle-level model.
* `tb_bpcs_search`: end to end at N = 13, 11 (twice, to test restart) and
  16 with K = 10. The testbench counts preset starts, comparator loads, ties
  with the minimum, partial searches, restarts and completions, and fails if
  any of them never happened.
* `tb_bpcs_search_full`: the default N = 23 exhaustive search (about 20 s).
* `tb_bpcs_search_n31`: N = 31 partial search.

The reference model (`tb/bpc_ref_pkg.sv`) does not use the element code. It
computes A(k) from the bit pattern as
`(N-k) - 2*popcount((s ^ (s >> k)) & mask(N-k))`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/bpc_pkg.sv tb/bpc_ref_pkg.sv tb/tb_bpcs_search.sv \
    --top-module tb_bpcs_search -Mdir obj_tb
./obj_tb/Vtb_bpcs_search
```

Replace `tb_bpcs_search` with any other testbench name. For another length,
instantiate `bpcs_search #(.N(n), .K(k))`. All widths follow from `N`
through the functions in `bpc_pkg`. The testbench reference model holds
sequences in 64 bits, so it covers N up to 63. The RTL has no such limit.
