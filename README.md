# An RGSW accumulator for FHEW bootstrapping

FHEW evaluates one binary gate on encrypted bits and then bootstraps the result,
so it can evaluate circuits of any depth. Almost all of the bootstrapping time goes into the
accumulation loop. It has n = 512 iterations, and each one multiplies the accumulator (an RLWE
ciphertext, that is, two polynomials) by one RGSW entry of the bootstrapping key. Each
iteration needs two inverse NTTs, a signed digit decomposition, eight forward NTTs and a
pointwise multiply-accumulate with the key.

This RTL computes one such iteration in hardware for the STD128 parameter set:

| symbol | value | meaning |
|---|---|---|
| N | 1024 | polynomial size, ring Z_Q[x]/(x^N + 1) |
| log2 Q | 27 | coefficient width |
| Q | 134215681 = 2^27 - 2047 | NTT-friendly prime, Q = 1 mod 2N (this design's choice) |
| psi | 4073518 | primitive 2N-th root of unity mod Q (7^((Q-1)/2048)) |
| B_g, d_g | 128, 4 | gadget base and number of digits |
| PEs | 32 | butterfly processing elements per transform unit |

All transform units move 32 coefficients per clock, so one polynomial is one *stream* of
32 *beats*. In beat c, lane p carries coefficient 32c + p.

## What one step computes

The input is the accumulator (a, b) in the NTT domain. The key entry for this step is
K[h][j][col], 16 polynomials, also in the NTT domain. Every key coefficient is stored
multiplied by R = 2^27 mod Q (Montgomery form; see below). The step computes

    for h in {a, b}:  x   = INTT(h)                      (coefficients)
                      d_j = digit j of x, j = 0..3       (signed base-128)
                      D_hj = NTT(d_j)
    a' = sum_{h,j} D_hj * K[h][j][0]        b' = sum_{h,j} D_hj * K[h][j][1]

Products are pointwise. a' and b' come out in the same order as a and b went in, so the
output of one step can be fed straight back as the input of the next.

## Datapath

```
 in_data ──► gs_intt ──► sdd ──┬─► ct_ntt #0 (digit 0) ─┐
 (a, then b)   1 unit          ├─► ct_ntt #1 (digit 1) ─┤
                               ├─► ct_ntt #2 (digit 2) ─┼─► acc_add ──► out_data (a', then b')
                               └─► ct_ntt #3 (digit 3) ─┘
                                      ▲ key_data[0..3] (one port per unit)
```

* **gs_intt** holds one polynomial in a `poly_ram`: 64 BRAMs of 16 words, each with one read
  and one write port. It runs the inverse transform on 32 Gentleman–Sande butterflies.
  Polynomial a is transformed first. While the CT units work on a, the INTT loads and
  transforms b. It then holds b until all four CT units can load again: the output
  `intt_stall` is high during that wait.
* **sdd** splits each coefficient into four signed base-128 digits on its way out of the INTT.
* **ct_ntt** (four units, one per digit) transforms its digit polynomial on 32 Cooley–Tukey
  butterflies. It then multiplies the result by the key and adds it into two *extension
  stores*, one per output polynomial. Digits of a (half 0) write products there; digits of
  b (half 1) add their products to them. The same butterfly does the multiply-accumulate:
  it computes "even + odd × factor" with even = stored partial sum, odd = NTT coefficient and
  factor = key coefficient.
* **acc_add** adds the four units' results, lane by lane, modulo Q.

## The memory schedule

This is the least obvious part of the design. A stage of a radix-2 transform pairs
coefficient j with j + 2^s. With 32 butterflies per cycle, every cycle reads 64 coefficients
and writes 64, and every BRAM allows only one read and one write per cycle. So the 64
coefficients of each cycle must lie in 64 different BRAMs, in every stage. The index reversal
at the start and end of the INTT needs the same for 32 coefficients in bit-reversed order.

Coefficient position j (10 bits) is stored at

    bank(j) = { ^j[9:5] , j[4:0] XOR j[9:5] }      (6 bits, 64 BRAMs)
    addr(j) = j[9:6]                               (4 bits, 16 words)

In stage s (butterfly distance 2^s), processing element p in cycle c (0..15) takes butterfly
b = 32c + p. Its operands are j = b with a 0 inserted at bit s, and j + 2^s. With this
assignment, the 64 operands of every cycle of every stage fall in 64 distinct banks. So do
32 consecutive positions (natural-order streams) and the bit reversal of 32 consecutive
positions (bit-reversed streams). The testbench of `bank_xbar` checks all of these cases
exhaustively. `bank_xbar` is the crossbar that routes each lane to its bank and returns read
data one cycle later. It also asserts that no two lanes hit the same bank in a cycle.

A stage issues 16 read cycles. Results are written back in place 5 cycles after their read:
1 cycle of BRAM read plus 4 cycles of butterfly. The next stage starts after the last write,
so a stage takes 21 cycles and a transform 210 cycles.

## Transforms and constants

* **Forward (ct_ntt)**: decimation in time, distance 512 down to 1, "merged" twiddles
  psi^brv(2^(9-s) + (b >> s)). Input is in natural order; output is the evaluations
  a(psi^(2·brv(k)+1)), in bit-reversed order k. This order is the NTT-domain order used
  throughout.
* **Inverse (gs_intt)**: `index_reversal` writes the incoming beats to bit-reversed positions,
  which puts the evaluations in natural order. The 10 Gentleman–Sande stages then compute a
  cyclic inverse DFT with omega^-1 = psi^-2, twiddle omega^-((b mod 2^s)·2^(9-s)). This leaves
  the result in bit-reversed order. On the way out, `index_reversal` reads the positions back
  in bit-reversed order and multiplies coefficient i by N^-1·psi^-i. That factor also undoes
  the negacyclic twist, so no separate pre- or post-multiplication pass is needed.
* **Modular multiplication** (`mont_mul`) is Montgomery multiplication with R = 2^27. It
  returns a·b·R^-1 mod Q in 3 pipeline stages. Every constant operand is therefore stored as
  x·R mod Q: the twiddles, the scale factors and the bootstrapping key. A key generator must
  do the same.
* Every processing element has its own twiddle ROM of 160 words: 10 stages × 16 cycles. The
  INTT output stage has a 32-word scale ROM per lane. All ROMs are computed at elaboration by
  the functions in `fhew_pkg`; there are no data files.

## Signed digit decomposition

Coefficient c is first centred: d = c if c < floor(Q/2), else d = c − Q. Four times, the low
7 bits of d are taken as a signed digit r in [−64, 63], and d becomes (d − r)/128. The digits
satisfy Σ r_l·128^l = d. A negative digit leaves as r + Q. This follows the usual signed
gadget decomposition of FHEW software libraries.

## Key interface

Each CT unit asks for key data with `key_req`, `key_half` (0 = row for digits of a,
1 = digits of b), `key_col` (0 → a', 1 → b') and `key_beat` (0..31). The beat
K[key_half][unit][key_col][32·key_beat + p] must be on `key_data[unit]` lane p one cycle
later. This is the timing of a synchronous memory or a prefetch FIFO. A unit draws 64 beats
per half. The four units run in lock step. A step consumes 16,384 key coefficients in
128 cycles: 3,456 bits per cycle during those bursts, or 46.9 Gbit/s averaged over a step at
100 MHz. The whole key (about 1.3 GB for n = 512 iterations) is far too large to keep on
chip. It has to come from external memory, such as FPGA HBM. That memory and its controller
are not part of this RTL.

## Timing

| phase | cycles |
|---|---|
| load one polynomial into gs_intt | 32 |
| 10 INTT stages | 210 |
| unload with scaling (first beat after) | 1 + 1 + 3, then 32 beats |
| 10 NTT stages in each ct_ntt | 210 |
| key multiply-accumulate, both columns | 64 + 5 |
| result out through acc_add | 1 + 2, then 64 beats |
| **one complete step, first input beat to last output beat** | **944** |

At 100 MHz, one step takes 9.4 µs and the 512 steps of a bootstrap take 4.8 ms. These
figures assume the key arrives on time.

## Top-level ports (`rgsw_acc_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; active-low asynchronous reset of the control state (BRAMs are not cleared) |
| in_valid / in_ready / in_data | in/out/in | 1/1/32×27 | 64 beats per step: a, then b |
| key_req, key_col, key_half | out | 4 | per CT unit, see above |
| key_beat | out | 4×5 | per CT unit |
| key_data | in | 4×32×27 | per CT unit, one cycle after the request |
| out_valid / out_col / out_data | out | 1/1/32×27 | 64 beats: a' (col 0), then b' (col 1); no back-pressure |
| intt_stall | out | 1 | INTT result waiting for the CT units |

## Relation to the published architecture

The block structure is the published architecture's: a GS INTT, digit decomposition, four
CT NTT units with the key product folded into the CT datapath and extended BRAMs, and a final
adder. So are 32 PEs over 64 BRAMs, bit reversal with 1/N scaling around the INTT, and
constants in Montgomery-style "times R" form. These are this design's own choices:

* the value of Q and psi (only the 27-bit width is fixed);
* the bank map above (the architecture only calls for conflict-free scheduling plus a
  crossbar);
* bit reversal on load and unload, instead of an in-place series of swaps;
* scaling by N^-1·psi^-i, not only N^-1;
* the key row order, the key port timing and all handshakes;
* register placement, and so all latencies.

The published implementation reports 250 cycles per INTT plus 80 for bit reversal and
scaling, and 3,616 cycles per accumulation step. This design takes 210 + about 70 cycles
per INTT and 944 per step. The main reason is that it drains each stage and has no
external-memory wait states. The published design also routes the input past the datapath
to the output. Its function is not specified, so the accumulator here is simply replaced by
the new value.

Not included: the HBM controller and AXI ports that would stream the key, and the key memory
itself. The other parts of gate bootstrapping stay in software, as in the published
architecture. These are the LWE gate addition, the accumulator initialization and the
extraction of the result. They are small next to the 512 accumulator steps.
No resource or clock-rate figures have been measured for this RTL.

## Files

`rtl/`: `fhew_pkg` (constants, types, modular arithmetic, memory map, twiddle and scale
tables), `mont_mul`, `gs_butterfly`, `ct_butterfly`, `poly_ram`, `bank_xbar`,
`index_reversal`, `gs_intt`, `sdd`, `ct_ntt`, `acc_add`, `rgsw_acc_top`.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`, plus `tb_ref_pkg`. The
reference package computes the NTT and its inverse from their O(N²) definitions, the digit
decomposition, and Montgomery products through the modular inverse of R. None of it shares
code with the hardware algorithms. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. `tb_rgsw_acc_top` runs two chained
accumulator steps at full size against the reference. It also checks that an INTT stall,
first-half and second-half key products, and a fed-back step each occur, and that a step
stays under 3,616 cycles.

`tb_bootstrap_accumulation` runs the whole accumulation loop of one bootstrap: 512 chained
steps at full size, about 13 s in Verilator. Its keys are noise-free and gadget-structured:
K[h][j][col] is the constant polynomial M[h][col]·128^j, with a random 2×2 matrix M for each
step. Because the digits recombine exactly, every step must return a' = M00·a + M10·b and
b' = M01·a + M11·b pointwise, and the testbench checks every output coefficient of every
step. The loop takes 30,208 cycles for 32 steps (1/16 of a bootstrap) and 483,328 cycles for
all 512.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb --top-module tb_rgsw_acc_top \
    rtl/fhew_pkg.sv tb/tb_ref_pkg.sv tb/tb_rgsw_acc_top.sv -o sim
./obj_dir/sim
```

Modules are found in `rtl/` and `tb/` by name. The same command runs any other testbench:
replace the top module and the last file, and keep the two packages first. Compiling the full
design takes about a minute; simulating two steps takes under a second.

To change the modulus, edit `Q`, `PSI` and `QP` (= −Q^-1 mod 2^27) in `fhew_pkg`; all tables
follow. The memory map and the beat format assume N = 1024 with 32 PEs.
