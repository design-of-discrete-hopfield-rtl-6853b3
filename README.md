# Discrete Hopfield network with pattern-based weights

This is synthesizable SystemVerilog for a small discrete Hopfield neural network (DHNN). It
follows the architecture of the single-flux-quantum (SFQ) superconducting DHNN described in
"Design of Discrete Hopfield Neural Network Using a Single Flux Quantum Circuit". The network
stores M binary patterns of N elements. From a damaged or noisy copy (the *retrieve
pattern* Y), it recovers the nearest stored pattern by updating one neuron at a time. The
default size is the one the original circuit was built for: **2 stored patterns of 8
elements** (a 4x2 image).

Values are bits throughout: bit 1 means +1 and bit 0 means -1.

## The main idea: store patterns, not weights

A textbook Hopfield network keeps a weight matrix `w_ij = sum_u x_i^u x_j^u` and updates
neuron i as

    h_i  = sum_j w_ij y_j
    y_i <- 1 if h_i >= 0, else 0 (-1)

Keeping W means storing M·N² numbers, or N² small integers. The design instead regroups
the sum:

    h_i = sum_u x_i^u * (Y . X^u) = sum_u sum_j  x_i^u * x_j^u * y_j

The regrouped sum needs only the patterns themselves, M·N bits. Every term is a product of
three ±1 values, so it is itself ±1. In 0/1 encoding, the product of two ±1 values is their
XNOR. Each term therefore takes two gates:

1. `t = y_j XNOR x_j^u` gives the term of `Y . X^u`.
2. Gating `t` with `x_i^u` gives the sign of the h_i term: `x_i XNOR t`.

| x_i | Y·X term | h_i term |
|-----|----------|----------|
| 0   | 0        | 1 (+1)   |
| 0   | 1        | 0 (−1)   |
| 1   | 0        | 0 (−1)   |
| 1   | 1        | 1 (+1)   |

In the original pulse logic, step 2 is done by an NDROC: a non-destructive read-out
flip-flop with complementary outputs. x_i is stored in it. Each Y·X pulse reads it out on
`out` when x_i = 1, or on `outb` when x_i = 0. This avoids copying x_i N times. The RTL
keeps that structure (`ndroc.sv`, `pe.sv`).

No multiplier or adder is needed for h_i. The sign function counts the +1 terms with a chain
of toggle flip-flops. With `c` terms of +1 out of `M·N`, `h_i = 2c − M·N`, so the new y_i is
`2c >= M·N`. A tie (h_i = 0) gives 1.

### The self term

A Hopfield network has no self-connection (`w_ii = 0`). The regrouped sum above does include
j = i. The hardware handles this the way the original does: **y_i is reset to 0 (−1) when it
is read out, before h_i is computed**. The self term is then the constant `x_i·x_i·(−1) = −1`
per pattern, so −M in total. This is a fixed bias, not feedback of y_i's own value. After
the sign is known, y_i is only ever *set* to 1. A result of 0 leaves the reset value in place.
The reference model in `tb/dhnn_ref_pkg.sv` builds the full weight matrix and uses the same
convention. Compared with a zero-diagonal network, this shifts the threshold by M.

## One update, step by step

`dhnn_controller.sv` runs each update of neuron i as a fixed sequence of states. Every
"pulse" of the original circuit is a one-cycle strobe here.

| state  | cycles | what happens |
|--------|--------|--------------|
| ADDR   | 1 | i is loaded into the NDROC decoder tree |
| READ   | 1 | decoder read pulse: y_i → y_i register, y_i reset to 0; x_i of every pattern stored in the PE NDROCs; counters cleared |
| STREAM | M·N (sequential) or N (parallel) | one term per PE per cycle, index j = 0..N−1 |
| PASS   | 1, parallel only | chained PE sums loaded into the sign counter |
| WRITE  | 1 | decoder read pulse again: y_i set to 1 if the sign is 1; the y_i register reports whether y_i changed |

The decoder is read twice per update and keeps its address in between. NDROC reads are
non-destructive, so the tree that routed the read-and-reset pulse also routes the write-back.

**Latency from `start` to `done`:** 3 + M·N cycles per update in the sequential
architecture (19 at the default size), or 4 + N cycles in the parallel one (12). In run
mode, each further update takes the same number of cycles.

### Sequential and parallel architectures (`PARALLEL`)

- **`PARALLEL = 0` (default).** This is the circuit as originally built. The PEs take turns:
  pattern 0 streams its N terms, then pattern 1, and so on. All terms go into one shared
  T-flip-flop counter in `sign_function`. An assertion in the top checks that at most one PE
  is active per cycle.
- **`PARALLEL = 1`.** This is the improved architecture the original work proposes. Each PE
  has its own T-flip-flop counter (`pe` with `ACCUMULATE = 1`), and all PEs stream at the
  same time. Each PE then passes `acc_in + own count` to the next one. The last sum is
  loaded into the sign counter. The stream phase is M times shorter.

The source times the original circuit at 29.8 ps per element, and 238 ps per pattern of 8
elements. That is one element per time slot, which is what one term per clock cycle
reproduces. The source reports 746.1 ps for a whole update of 2×8 elements. Its overhead
beyond the stream phase comes from the cells' pulse delays, which a synchronous model does not
have.

## Blocks

| file | block | role |
|------|-------|------|
| `rtl/dhnn_pkg.sv` | package | default sizes, the `ctrl_t` strobe bundle, `sign_of()` |
| `rtl/ndroc.sv` | NDROC cell | stores a bit; a read pulse leaves on `out` or `outb` without clearing it |
| `rtl/ndroc_decoder.sv` | decoder | NDROC binary tree, one address bit per level (MSB at the root); routes a read pulse to one of N outputs |
| `rtl/y_memory.sv` | Y memory | retrieve pattern; read-and-reset and set of the selected element; stream read of y_j |
| `rtl/yi_register.sv` | y_i register | old value of y_i; `differs` compares it with the new value |
| `rtl/x_memory.sv` | pattern memory | M×N bits; x_i^u of the selected neuron, x_j^u at the stream index |
| `rtl/pe.sv` | processing element | XNOR plus an NDROC gate per pattern; optional own counter and sum chain |
| `rtl/bit_counter.sv` | bit count circuit | toggle flip-flops in series, made synchronous; clear and load |
| `rtl/sign_function.sv` | sign function | bit counter plus the `2c >= M·N` threshold |
| `rtl/dhnn_controller.sv` | controller | the state sequence above, single-update and run-to-stable modes |
| `rtl/dhnn_top.sv` | top | wires everything together |

Each file starts with a comment on its interface and timing.

## Using the top (`dhnn_top`)

Parameters: `N` (elements, default 8), `M` (patterns, default 2), `PARALLEL` (default 0).

1. While `busy` is low, write the stored patterns with `x_we`, `x_pat`, `x_data`, one per
   cycle. Write the retrieve pattern with `y_we`, `y_data`. Writing while busy violates an
   assertion.
2. Pulse `start` for one cycle, with `start_idx` set to the first neuron and `run_mode` set:
   - `run_mode = 0`: one update of neuron `start_idx`.
   - `run_mode = 1`: update `start_idx`, `start_idx+1`, … (mod N) until N updates in a row
     change nothing, i.e. the pattern is a fixed point. `converged` is then set.
3. `done` pulses for one cycle at the end. `y_out` holds the pattern. `update_count` is the
   number of updates performed. `last_changed` says whether the last update changed its
   neuron.

For a symmetric network with a constant bias like this one, asynchronous updates always
reach a fixed point, so run mode always ends.

## Where this RTL departs from the original circuit

- **Clocking.** The original is SFQ pulse logic at 50 GHz or more, where a pulse is an event.
  Here each pulse is a one-cycle signal in a single-clock synchronous design. The toggle
  flip-flop chain is made synchronous: a stage toggles when all lower stages are 1.
- **Neuron order.** The Hopfield algorithm picks the neuron to update at random. The RTL
  takes the first neuron from `start_idx` and then goes in order. For a random order, drive
  `run_mode = 0` and choose `start_idx` randomly.
- **Convergence test.** The stopping rule (N updates in a row without change), the y_i
  register's use for it, and the status outputs are this design's own choices. The original
  names the y_i register but does not say how convergence is detected.
- **Loading.** The pattern load ports are this design's own; the original does not describe
  how patterns enter the chip.
- **Parallel chain.** In the parallel architecture, the passing of sums from PE to PE is a
  combinational adder chain, captured once in the sign counter.
- **Decoder details.** The tree layout, the address-load strobe and the priority of
  set over reset in the NDROC are assumptions.
- **Not modelled.** The physical layer is not part of this RTL: Josephson-junction cells,
  bias network, clock distribution, 6.5 mm × 2.3 mm layout, power (11.2 µW dynamic and
  1.46 mW static at 50 GHz in the original), and bias margins.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself after a cycle limit (watchdog).

- `tb_ndroc`, `tb_ndroc_decoder`, `tb_bit_counter`, `tb_sign_function`, `tb_y_memory`,
  `tb_x_memory`, `tb_yi_register`, `tb_pe`: random and exhaustive stimulus against software
  models. The decoder is also tested at a non-power-of-two size, N = 6.
- `tb_dhnn_controller`: checks every strobe, cycle by cycle, in both architectures,
  including the stopping rule.
- `tb_dhnn_top`: runs the sequential and parallel tops side by side on 60 random sets of
  patterns. It checks single updates and runs to a stable pattern against the weight-matrix
  model in `dhnn_ref_pkg`, including exact cycle counts. It counts each mechanism: single
  update, run mode, y_i raised, y_i left at 0, changed, unchanged, h_i = 0 tie, and recovery
  of a stored pattern. A mechanism that never occurs counts as a failure.
- `tb_dhnn_top_full`: the top at its default parameters. It stores two orthogonal 8-element
  patterns. A copy of pattern 2 with its first element flipped is repaired by one update of
  that element. Then every single-element corruption of either pattern is recalled in run
  mode.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/dhnn_pkg.sv tb/dhnn_ref_pkg.sv tb/tb_dhnn_top.sv \
        --top-module tb_dhnn_top -o sim
    ./obj_dir/sim

Replace `tb_dhnn_top` with any other testbench name. The packages must come first on the
command line.
