# Soft-decision BCH decoders by least-reliable-bit reprocessing

A hard-decision BCH decoder throws away what the demodulator knows about how
sure it is of each bit. The two decoders here keep that information. Each one
takes a received word of a binary, t-error-correcting BCH(n,k) code together
with a reliability magnitude for every bit. It then looks for the most likely
valid codeword among those that differ from the received word only in a
small set of doubtful positions:

* the **2t least reliable bits** (the "L" bits), as in earlier
  heuristic soft decoders;
* **p extra bits**, the next p least reliable ones. p is a design parameter
  that trades decoding time for coding gain.

Of all flip patterns on these 2t + p bits that give a codeword, the decoder
reports the one of least **error weight**. The error weight is the sum of the
reliabilities of the flipped bits. The error positions are reported directly
as positions in the sorted list, so no Chien search is needed.

There are two ways to find the valid patterns, and both are built:

* **EHe**, the extended heuristic decoder, tries every pattern. It works only
  on the odd syndromes and can also recognise one further error anywhere in
  the word.
* **EBP**, the extended Björck–Pereyra decoder, solves the Vandermonde system
  once per extra bit and then combines the solutions.

Default configuration:

| Parameter | Value |
|---|---|
| Code | BCH(255,239,2) over GF(2^8) |
| p | 2 |
| Pipeline cut q of the systolic multipliers | 2 |
| Reliability width | 6 bits |

`rtl/bch_soft_decoder_top.sv` puts the two decoders side by side, each with
its own ports.

## Conventions

* **Field.** GF(2^8) in polynomial basis, with field polynomial
  x^8+x^6+x^5+x^4+1 (`GF_POLY = 'h171` in `rtl/bch_pkg.sv`). With α a root of
  this polynomial, the product of the minimal polynomials of α and α^3 is the
  code generator g(x) = 1 + x^2 + x^3 + x^5 + x^6 + x^7 + x^8 + x^10 + x^11 +
  x^15 + x^16.
* **Bit order.** Bits arrive highest coefficient first: r_254, r_253, …, r_0.
* **Arrival index.** A counter numbers the bits as they arrive, starting at
  0. Bit c of the stream is coefficient r_(n-1-c), and its **error
  locator** is α^(n-1-c). The locator is produced by a register that starts
  at 1 and is multiplied by α^-1 once per bit.
* **Reliabilities.** Unsigned magnitudes, where smaller means less sure.
  On a tie, the bit that arrived earlier counts as less reliable.
* **Error weights.** `WW = RW + clog2(2t+p+2)` bits wide, so they cannot
  overflow.

## Front end: evaluator and syndromes (both decoders)

While the n bits stream in, one per cycle, two units work in parallel:

* **`err_loc_eval`, the error locator evaluator.** It keeps 2t+p slots sorted
  by reliability. A slot that is still empty counts as larger than any
  reliability. Each new bit is compared with every slot at once:
  * slots holding a larger value shift down by one;
  * the first such slot takes the new bit's reliability, arrival index and
    locator;
  * all other slots hold.

  The critical path is one constant multiplier by α^-1.
* **`syndrome_calc`.** It computes syndromes by Horner's rule,
  S_j ← S_j·α^j + r, using one constant multiplier per syndrome. EBP needs
  all 2t syndromes. EHe needs only the t odd ones, because for a binary code
  S_2j = S_j².

When the last bit is in, the solver (EMS, error magnitude solver) starts. The
input is refused (`in_ready` low) until `op_ready` rises. Words are decoded
one at a time.

## EHe solver (`ehe_ems`)

Let Γ be the 2t-bit flip pattern on the L bits and A the p-bit pattern on the
extra bits. The odd discrepancy is

    Δ_odd = S_odd + Σ a_i·ΔS_i + B_odd·Γ

Here:
* row i of B_odd is (β_i, β_i^3, …, β_i^(2t-1)) for L bit i;
* ΔS_i is the same vector for extra bit i.

If Δ_odd = 0, the pattern (Γ, A) gives a codeword. If Δ_odd = (x, x^3, …) for
some x ≠ 0, then one further bit, at the position whose locator is x, makes it
a codeword.

The four units:

1. **`bodd_calc`** builds B_odd with a chain of t-1 power-sum units.
   x^(2s+1) is computed as x^(2s-1)·x², which is a power sum with C = 0.
   The 2t locators are streamed through it one per cycle.
2. **`eff_syndrome`** works out ΔS_i with a second `bodd_calc`. It then holds
   S_eff = S_odd + Σ a_i·ΔS_i. A walks through its 2^p values in **Gray
   order**, so each step adds exactly one ΔS_i: a single adder per odd
   syndrome.
3. **`heuristic_search`** walks Γ through its 2^(2t) values in Gray order for
   each A. Each cycle Δ_odd changes by one row of B_odd, so it produces one
   candidate per cycle.
   * Δ_odd is passed through a t-1 stage power-sum chain to form x^3, x^5, …
     for the geometric test. The rest of the candidate is delayed alongside.
   * The position of the further error is read from a 256-entry logarithm
     table, computed when the design is elaborated:
     table[α^e] = (n-1-e) mod (2^m-1).
   * It asks `eff_syndrome` for the next A two cycles before each Γ sweep
     ends, so sweeps run back to back. All 2^(2t+p) candidates take
     2^(2t+p) cycles.
4. **`weight_errloc`** keeps the weight of the current candidate
   incrementally. Γ and A both move one bit at a time, so two add/subtract
   units follow them. It keeps the valid candidate of least weight; on equal
   weights the first is kept.
   * A further error is charged 2^(RW-1), half the largest reliability. Its
     true reliability is not stored.

At the defaults, op_ready rises 81 clock edges after the edge that takes the
last bit (2^(2t+p) + max(2t, p+1) + 2(t-1)·ceil(m/q) + 5).

## EBP solver (`ebp_ems`)

EBP solves for error magnitudes g_i on the 2t L bits:

    Σ_i g_i·β_i^j = S_j,   j = 1..2t

This is a Vandermonde system. The received word is a codeword after flipping
exactly the bits whose g_i is 1, so a solution whose every entry is 0 or 1 is
a valid pattern. To bring in the extra bits, the system is solved p+1 times:
* once for S, giving G_0;
* once for each incremental syndrome ΔS_i = (β_xi, β_xi², …, β_xi^(2t)),
  giving G_i.

The system is linear, so flipping extra bits b gives the solution
G_0 + Σ b_i·G_i.

1. **`incr_syndrome`** computes the ΔS_i with one power-sum unit
   (β^j = β^(j-2)·β²). It waits for each result before starting the next
   operation. It runs while the inverse table below is being filled, so it
   adds no time.
2. **`bp_solver`** is a Björck–Pereyra solver. Over GF(2^m) subtraction is
   XOR, and it works in three loops on x, which starts equal to the
   right-hand side:
   * **a1:** for k = 0..2t-2 and i = 2t-1 down to k+1: x_i += β_k·x_(i-1);
   * **a2:** for k = 2t-2 down to 0:
     * x_i ·= 1/(β_i+β_(i-k-1)) for i > k;
     * then x_i += x_(i+1) for i = k..2t-2;
   * **a3:** x_k ·= 1/β_k.

   The divisors depend only on the locators, so all 2t(2t+1)/2 = 10 inverses
   are computed once per word. They are streamed through the pipelined
   inversion unit (28 cycles) and kept in a table. The multiplications of one
   inner loop are independent and are issued back to back to the 4-stage
   systolic multiplier. Before a loop whose operands depend on the previous
   loop, the solver **stalls** until the pipeline is empty. `stall_cycles`
   counts these cycles (28 per solve at the defaults).
3. **`binary_check`** steps b through its 2^p values in Gray order. Each step
   adds one G_i to the running sum D, using one adder per entry. The
   candidate is flagged binary if every entry of D is 0 or 1.
4. **`err_calc`** forms the weight of each candidate from two parts:
   * an add/subtract unit that follows b's Gray steps;
   * an adder tree over the L bits, since the binary pattern can change
     arbitrarily between candidates.

   It keeps the binary candidate of least weight.

At the defaults, a word takes 214 cycles after its last bit: 39 to fill the
inverse table, 3 × 55 cycles of solves, then the check.

## Arithmetic units

| Unit | Function | Timing |
|---|---|---|
| `gf_const_mult` | Multiply by α^E (XOR network) | combinational |
| `gf_adder` | Add (XOR) | combinational |
| `gf_mult_systolic` | LSB-first array of m rows: row i adds b_i·A·α^i. A register after every q rows. | latency ceil(m/q) = 4, one result per cycle |
| `gf_power_sum` | P = A·B² + C. Row k holds A·α^(2k) and adds it when b_k = 1. A register after every q rows. | latency 4, one result per cycle |
| `gf_inverse` | A^-1 = A^254 by m-1 chained power sums: y ← A·y², starting from y = A; the last stage squares only. | latency 28, one result per cycle |

Every pipelined unit carries a tag along with its operands. The controllers
use the tag to route results.

## Interface of each decoder

Clock `clk`; reset `rst` (synchronous, active high).

| Signal | Dir | Width | Meaning |
|---|---|---|---|
| `in_valid`, `data_in`, `rel_in` | in | 1, 1, RW | one received bit: hard decision and reliability |
| `in_ready` | out | 1 | the bit is taken on a clock edge where `in_valid && in_ready` |
| `op_ready` | out | 1 | result valid; held until the first bit of the next word |
| `sorted_loc[i]` | out | 2t+p × m | arrival index of the i-th least reliable bit |
| `error_locations` | out | 2t+p | bit i set: sorted bit i is in error |
| `decode_ok`, `weight` | out | 1, WW | a codeword was found, and its error weight |
| `extra_error_valid`, `extra_error` | out | 1, m | EHe only: one further error at that arrival index |
| `stall_cycles` | out | 16 | EBP only: BP-solver stall cycles counted since reset (wraps around) |

## Where this design departs from the original description

* **Generator polynomial.** It includes the x^6 term. Without that term the
  degree-16 generator has no degree-8 factor, so it cannot be the product of
  the minimal polynomials of α and α^3.
* **Multiplier latency.** It is ceil(m/q) = 4, not (m+1)/q, because the
  registers sit between groups of q rows.
* **EHe geometric test.** It uses t-1 power-sum units rather than t-2, so
  that x^3 is also computed when t = 2.
* **EHe latency.** n+81 cycles, against n+74 in the original.
* **EBP latency.** n+214 cycles, against n+132 in the original. There are
  three reasons:
  * the solves are not overlapped with each other or with the binary check;
  * each dependent loop drains the multiplier pipeline;
  * the incremental syndrome unit waits for each of its results.
* **BP stall count.** 28 per solve, against a formula in the original that
  gives 16 stall cycles for these sizes (m/q = 4). Instead of a tighter
  schedule, this design solves with a simple issue-and-drain order.
* **Added ports.** The reliability input, the valid/ready handshake,
  `decode_ok`/`weight` and `stall_cycles` are additions. The original pin
  list names only the hard-decision input and the outputs.
* **Choices of this design.** The 6-bit reliability width, the tie rules
  and the reset behaviour.
* **Not implemented.** p = 0 (no extra bits) is not supported: the
  extra-bit logic uses p-bit vectors, so it needs p ≥ 1.
* **Other sizes.** Every size is a parameter (`M`, `POLY`, `N`, `T`, `P`,
  `Q`, `RW`). Six other configurations were simulated (see Verification).
  The field polynomial for n = 511, x^9+x^4+1, is this design's choice.
  The EBP gap grows with p. Each extra bit adds one more solve, which
  takes about 55 cycles here, against 38 in the original's latency formula.
  It also adds (2t-1)·(ceil(m/q)+1) cycles to the incremental syndrome unit, which
  computes its powers one after another. The EHe latency stays within 10
  cycles of the original.

  | Code, p | EHe here | EHe original | EBP here | EBP original |
  |---|---|---|---|---|
  | (255,239,2), p = 2 | n+81 | n+74 | n+214 | n+132 |
  | (255,239,2), p = 4 | n+274 | n+266 | n+360 | n+214 |
  | (255,239,2), p = 6 | n+1044 | n+1034 | n+550 | n+314 |
  | (255,247,1), p = 2 | n+24 | – | n+105 | – |
  | (255,231,3), p = 2 | n+283 | – | n+352 | – |
  | (511,502,1), p = 2 | n+24 | – | n+126 | – |
  | (511,484,3), p = 2 | n+287 | – | n+396 | – |

  No error-rate (coding-gain) curves were produced. They need a channel
  simulation, not a hardware run.

## Verification

Each block has a self-checking testbench in `tb/`. The testbenches compare
against exp/log-table arithmetic (`tb/tb_bch_pkg.sv`) and check the cycle
counts stated above. Each one ends by printing
`TB_RESULT checks=… failures=…`.

* The decoder and top-level testbenches encode random messages with a
  systematic encoder and place errors by scenario:
  * none;
  * two errors in the L bits;
  * one more error on an extra bit;
  * 2t+p errors;
  * one error far from the doubtful bits;
  * five random errors.

  They compare the results with a brute-force search over all 2^(2t+p)
  patterns.
* `tb_workloads` runs the same kind of end-to-end check on the top level at
  the six other sizes in the table above, all at once. Each size is an
  instance of `tb/soft_decoder_bench.sv`, which
  builds its field tables and its generator polynomial from M, the field
  polynomial and t. They check the exact EHe latency,
  2^(2t+p) + max(2t, p+1) + 2(t-1)·ceil(m/q) + 5, and a constant EBP latency.
* `tb_bch_soft_decoder_top` runs both decoders end to end at the default
  parameters. It requires every mechanism to occur at least once:
  * an extra-bit correction by each decoder;
  * the EHe further-error rule;
  * decoding failures;
  * BP-solver stalls.

To run a testbench with Verilator:

    verilator --binary --timing -y rtl -y tb +libext+.sv \
        rtl/bch_pkg.sv tb/tb_bch_pkg.sv tb/tb_bch_soft_decoder_top.sv \
        --top-module tb_bch_soft_decoder_top -o sim
    ./obj_dir/sim

Replace the last two file and module names to run any other testbench
(for example `tb_ebp_decoder`).

## Files

| Area | Files |
|---|---|
| Shared constants and field helper functions | `rtl/bch_pkg.sv` |
| Arithmetic units | `gf_const_mult`, `gf_adder`, `gf_mult_systolic`, `gf_power_sum`, `gf_inverse` |
| Front end | `err_loc_eval`, `syndrome_calc` |
| EHe solver | `bodd_calc`, `eff_syndrome`, `heuristic_search`, `weight_errloc`, `ehe_ems`, `ehe_decoder` |
| EBP solver | `incr_syndrome`, `bp_solver`, `binary_check`, `err_calc`, `ebp_ems`, `ebp_decoder` |
| Top level | `bch_soft_decoder_top` |
| Other-size benches | `tb/tb_workloads.sv`, `tb/soft_decoder_bench.sv` |
