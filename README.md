# PM-RNS: modular inversion in a residue number system without base extension

This is synthesizable SystemVerilog for a modular inverter over a prime field F_P, with P of 160 to 600 bits. Numbers are held in a **residue number system** (RNS): X is stored as its residues `x_i = X mod m_i` for N coprime W-bit moduli. Additions, subtractions and multiplications then split into N independent W-bit channels. Comparison and division, which inversion normally needs, are expensive in that form.

The usual RNS inversion uses Fermat: `X^-1 = X^(P-2) mod P`. That is a long exponentiation. Each step needs a Montgomery reduction with two base extensions, so it costs O(log2 P · N²) W-bit multiplications, with little parallelism. This design uses the **plus-minus** variant of the binary extended Euclidean algorithm instead:

* it makes no comparisons;
* it divides only by 2 and 4;
* all it needs from the whole number is its value mod 4.

Each step is then one channel-parallel operation. The only cross-channel logic is a small adder tree (the **Cox**) that recovers `X mod 4` from a few bits per channel. The total cost is O(log2 P · N) multiplications, and no base extension is used at all.

The default configuration is a 192-bit field (NIST P-192) with 12 channels of 17 bits and a 6-bit Cox. One inversion takes about 700 clock cycles on average, and at most 735 over the test set.

## The hat representation and the Cox

Inside the inverter, every working value is a signed integer X with `-P < X < P`. It is stored in **hat form**:

    xi_i = | (X + C) · Mi^-1 |_mi        M = m_1 ··· m_N,  Mi = M / m_i

By the Chinese remainder theorem:

    X + C = Σ xi_i · Mi  -  q · M,        q = floor( Σ xi_i / m_i )

If C ≡ 0 (mod 4), this gives

    |X|_4 = | s - q · |M|_4 |_4,          s = | Σ |xi_i|_4 · |Mi|_4 |_4

* `s` needs only the two low bits of each residue.
* `q` is estimated as in Kawamura's method, from the top T bits of each residue: `q ≈ floor( Σ trunc_T(xi_i) / 2^T )`.

The estimate undershoots the true sum `q + (X+C)/M` by at most `err = N · (2^-T + max_i (2^W - m_i)/2^W)`. That is about 0.23 for the default configuration and 0.29 for an 18-channel one. The offset is **C = 2^(N·W-1)**, roughly M/2. X + C then stays near the middle of [0, M): the fractional part `(X+C)/M` lies well above `err` and well below 1. Under those conditions the truncated estimate equals q exactly, with no correction term. The hat form also folds the factor `Mi^-1` into the stored value, so the Cox needs no multiplication.

`cox.sv` adds N T-bit values and N 2-bit products in one cycle. It then registers q, s and `mod4 = s - q·|M|_4`.

## The algorithm

`^` below marks a value in hat form. b is a value's residue mod 4, as supplied by the Cox.

    V3 = X^, U3 = P^, V1 = 1^, U1 = 0^, u = v = 0
    while V3 != ±1 and U3 != ±1:
        while V3 is even:                               inner loop
            r  = 2 if b(V3) = 0 else 1
            V3 = V3 / 2^r,  V1 = (V1 + kP) / 2^r,  v += r
        V* = V
        if b(V3) + b(U3) = 0 mod 4:  V = (V + U) / 4   plus step
        else:                         V = (V - U) / 4   minus step
        if v > u:  U = V*,  swap u and v                swap
        v += 1
    S = ±V1 + P   (or ±U1 + P): the sign is that of the ±1 reached

The operation applies to both halves: `V = (V ± U)/4` means `V3 = (V3 ± U3)/4` and `V1 = (V1 ± U1 + kP)/4`. The invariant is `V1 · X ≡ V3` and `U1 · X ≡ U3 (mod P)`.

The counters u and v stand in for the comparison between |U3| and |V3|. Each counts how many bits its operand has lost.

The "1" operands are not divisible in general, so a multiple k of P is added first:

* `k = (-b · P^-1) mod 4`, taken in {-1, 0, 1, 2}. For a division by 2, `k = b mod 2`.
* This keeps every value inside (-P, P).
* The result S of the final correction is `Y + P` for a Y in (-P, P). So `0 < S < 2P`, and no final comparison is needed.

For random 192-bit inputs the main loop runs about 0.71 · log2 P times, and the inner loop about 2/3 times per main iteration. The end-to-end testbench checks that the measured average stays in that range.

## One rower operation covers every step

Every channel operation is one form:

    r = | pre(a, b) · K + D |_m        pre ∈ { a, a + b, a - b, 0 }

K and D come from two small per-channel constant tables in `rns_pkg.sv`. The tables are computed at elaboration from the modulus m, `|M/m|_m`, `|C|_m` and `|P|_m`. With `Minv = |Mi^-1|_m`:

| operation | pre | K | D |
|---|---|---|---|
| enter hat form, `X^` | a | Minv | C·Minv |
| load `P^`, `1^`, `0^` | 0 | – | (P+C)·Minv, (1+C)·Minv, C·Minv |
| `div2r(V^, 1)` | a | 2^-1 | (kP + C)·2^-1·Minv |
| `div2r(V^, 2)` | a | 4^-1 | (kP + 3C)·4^-1·Minv |
| `div2r(V^ + U^, 2)` | a+b | 4^-1 | (kP + 2C)·4^-1·Minv |
| `div2r(V^ - U^, 2)` | a−b | 4^-1 | (kP + 4C)·4^-1·Minv |
| leave hat form, +Y + P | a | Mi | P − C |
| leave hat form, −Y + P | a | −Mi | P + C |

The D entries absorb the offset: a sum of two hat values carries 2C, a difference carries none, and the result must again carry exactly C. There are 6 K entries and 20 D entries (k = −1…2 for each division kind).

`rower.sv` is a two-stage pipeline. Stage 1 forms `pre(a,b) mod m` and looks up K and D. Stage 2 multiplies and reduces. The moduli are primes of the form `2^W − H` with `H < 2^(W/2−1)`. Reduction then folds four times (`hi·H + lo`) and finishes with at most two conditional subtractions, so no divider is needed. The rower also sends its result's top T bits and bottom 2 bits to the Cox. It flags whether the result equals the hat form of +1 or −1; ANDed over all channels, that is the loop's termination test.

## Controller and schedule

`pm_ctrl.sv` broadcasts one rower operation and one set of register addresses to all channels each cycle. Each step, whether an inner division or a plus/minus step, takes three cycles:

    cycle 0   issue V3 operation        (needs b(V3): from the Cox this very cycle)
    cycle 1   issue V1 operation        (needs b(V1): from the Cox this very cycle)
    cycle 2   wait
    cycle 3   = cycle 0 of the next step

Results travel as follows:

* A rower result appears 2 cycles after issue. The register file and the ±1 flags see it then.
* The Cox's mod 4 appears 3 cycles after issue.
* A tag pipeline in the controller records which operand each returning result belongs to.
* The controller uses the Cox value in the same cycle it arrives (a bypass) and also latches it for later.

The controller keeps b for V3, V1, U3 and U1. When U takes the old V, U also takes V's saved b values and ±1 flags.

Register slots are renamed rather than copied. Each channel has three slots for the "3" operands and three for the "1" operands: V, U and a free slot. A plus/minus step writes the new V into the free slot. After it:

* with a swap, U takes the old V slot;
* without one, the old V slot becomes free.

So `U = V*` costs nothing. In total:

    cycles = 5 (initialisation) + 3 · (main + inner iterations) + 4 (test, final conversion, write)

The register file (`chan_regs.sv`) has eight W-bit words per channel: slots 0–2 and 3–5 for the operands, 6 for the input and 7 for the result. It has two read ports, a write-back port and an I/O write port. The original architecture draws only one read path from the registers to the rower. The second port lets a plus-minus step read V and U in the same cycle, which is what keeps every step to three cycles.

## Interface (`pm_rns_inv`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `io_we_i` | in | 1 | write `io_data_i` into slot 6 of channel `io_ch_i` |
| `io_ch_i` | in | ⌈log2 N⌉ | channel index |
| `io_data_i` | in | W | one residue `|X|_mi`, with 0 < X < P |
| `start_i` | in | 1 | start an inversion (ignored while busy) |
| `busy_o` | out | 1 | inversion running |
| `done_o` | out | 1 | one-cycle pulse: `s_o` is valid |
| `s_o` | out | N×W | residues of S, `S ≡ X^-1 (mod P)`, `0 < S < 2P` |
| `stats_o` | out | `pm_stats_t` | last inversion: main and inner iterations, divisions by 2 and 4, plus and minus steps, swaps, cycles |
| `end_o` | out | `pm_end_t` | which of V3 or U3 reached +1 or −1 |
| `cox_q_o`, `cox_s_o` | out | ⌈log2 N⌉, 2 | the Cox's q and s for the previous cycle's rower outputs |

Sequence: write the N residues, one per cycle, pulse `start_i`, then wait for `done_o`. Loading takes N cycles; the cycle counts given below start at `start_i`. `s_o` stays valid until the next inversion ends.

Parameters: `N`, `W`, `T`, `PW` (bit width of P), `P` and `MODULI` (a `rns_pkg::modvec_t`, channel 0 in entry 0). The constraints are:

* every modulus must be an odd prime `2^W − H` with `H < 2^(W/2−1)`;
* W ≤ 33;
* N ≤ 32;
* `M > 2^(N·W−1) + P`;
* the Cox error bound above must stay well below 0.5.

The constant routines in `rns_pkg` work in 64/128-bit arithmetic, which is where the W ≤ 33 limit comes from.

## Configurations and measured cycle counts

The design was run in the six field/base combinations listed below. The first is the default; the other five are set through the parameters.

| field | N × W | max cycles measured | cycles reported for the FPGA design |
|---|---|---|---|
| P-192 | 12 × 17 (default) | 735 | 1753 |
| P-192 | 9 × 22 | 702 | 1753 |
| P-192 | 7 × 29 | 705 | 1753 |
| P-384 | 18 × 22 | 1434 | 3518 |
| P-384 | 14 × 29 | 1455 | 3518 |
| P-384 | 12 × 33 | 1410 | 3518 |

Each base is the N largest primes below 2^W. The published FPGA design reports one fixed count per field size and does not describe its schedule, so its cycle counts are not a target here. The testbenches only check that this design stays below them.

## What follows the original architecture and what does not

These follow the original PM-RNS design:

* channels of register file plus rower, a single Cox and a controller;
* the Cox computing q from T = 6 MSBs and s from 2 LSBs per channel, over all channels in one cycle;
* odd moduli and the hat form with an offset C ≡ 0 mod 4;
* div2r returning hat values;
* the plus-minus main loop with u and v counters and the ±1 termination test;
* the 12 × 17 / 192-bit configuration.

These are this implementation's own:

* the choice of moduli, of P (NIST curves) and of `C = 2^(N·W−1)`;
* a second register read port per channel (the original draws one);
* the input written one residue per cycle with a channel index, and the result read out in parallel on `s_o` (the original draws only a W-bit bus into the registers);
* the multiply-add form of the rower, its constant tables, its two-stage pipeline and its folding reduction;
* the three-cycle schedule and slot renaming;
* using the Kawamura estimate without an offset term;
* the initial values and the final correction to `±Y + P`, which follow the underlying binary Euclidean algorithm.

Left out:

* **The q input of every rower and an N-to-1 output multiplexer fed back to all channels.** In the RNS processor this architecture comes from, both serve base extension. The inversion never uses them.
* **The Fermat-based (FLT-RNS) inverter.** It is only a baseline for comparison.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=… failures=…`.

| testbench | what it checks |
|---|---|
| `tb_rower` | 20 000 random operations plus extreme operands on the hardest channel (largest H), against `pre·K + D mod m`. K and D are re-derived with Fermat inversion and wide-integer residues. Also the Cox bits and ±1 flags. |
| `tb_cox` | Hat vectors of random X in (−P, P), built with wide-integer CRT, must give exact q, s and `X mod 4`. Random bit patterns check the estimate's definition. |
| `tb_chan_regs` | Random dual-port writes (including collisions) and reads against a reference array. |
| `tb_pm_ctrl` | The controller alone, with the channels replaced by an integer model of what each operation means. Fails on any inexact division, any out-of-range value or a wrong inverse. Runs 1000 inversions mod 65521, a prime ≡ 1 mod 4; the 192-bit prime is ≡ 3 mod 4. |
| `tb_pm_rns_inv` | The full design at default parameters: 48 inversions (1, 2, 3, 4, P−1, P−2, 2^100, (P−1)/2 and random values) against `X^(P−2) mod P`. It also rebuilds S by CRT to check `0 < S < 2P` and `S·X ≡ 1`, checks the cycle formula, the average iteration count and the average number of W-bit modular multiplications (measured about 5200 per inversion, 12 channels counted; the expected average is about 5470), and checks that divisions by 2 and 4, plus and minus steps, swaps and termination through both V3 and U3 all occur. |
| `tb_workloads` | The five other configurations (with `tb_inv_cfg`), six inversions each. |

In addition, `pm_ctrl` carries concurrent assertions that hold in every simulation of it: the three V/U/free slots stay distinct, no result is ever written over the input slot, and `done_o` only pulses in the idle state. Because they use `rst_n` as their `disable iff` condition, Verilator's lint reports `rst_n` as used both synchronously and asynchronously (SYNCASYNCNET). No flip-flop samples it synchronously, so the warning can be ignored.

To simulate with Verilator, for example the full design:

    verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/rns_pkg.sv tb/tb_pm_rns_inv.sv --top-module tb_pm_rns_inv
    ./obj_dir/Vtb_pm_rns_inv

Replace the testbench name to run another one. Each of them takes at most a few seconds to run.
