# ECC-protected parallel FIR filters

When a system runs several copies of the same filter in parallel, each on its own input
signal, the copies can protect one another. Triple modular redundancy would triplicate
every filter. This design treats the four parallel filters as the four data bits of a
Hamming(7,4) code and adds only three redundant filters, which play the part of the parity bits.
Any single faulty filter among the seven is located and, if it is one of the four that
produce outputs, its output is rebuilt from the others.

The idea works because a filter is linear. Take a redundant filter that is fed the sum of
several inputs. Its output equals the sum of the outputs those inputs produce. A parity
"bit" therefore stays valid after filtering, with XOR replaced by addition.

## The code

Inputs `x1..x4` go to four identical FIR filters `H`, which produce `y1..y4`. A coding
stage forms three extra inputs from the rows of the Hamming(7,4) parity equations:

    x5 = x1 + x2 + x3        z1 = H(x5)
    x6 = x1 + x2 + x4        z2 = H(x6)
    x7 = x1 + x3 + x4        z3 = H(x7)

In a fault-free bank `z1 = y1 + y2 + y3`, `z2 = y1 + y2 + y4` and `z3 = y1 + y3 + y4`.
The checker computes one residue per check:

    r1 = z1 - y1 - y2 - y3,   r2 = z2 - y1 - y2 - y4,   r3 = z3 - y1 - y3 - y4

It then sets syndrome bit `s_i` when `|r_i|` is larger than a threshold. A faulty filter
disturbs exactly the checks it takes part in. The pattern of failing checks is its column
of the check matrix:

| s1 s2 s3 | filter in error        | action                                  |
|----------|------------------------|-----------------------------------------|
| 0 0 0    | none                   | none                                    |
| 1 1 1    | original filter 1 (d1) | `yc1 = z1 - y2 - y3`                    |
| 1 1 0    | original filter 2 (d2) | `yc2 = z1 - y1 - y3`                    |
| 1 0 1    | original filter 3 (d3) | `yc3 = z1 - y1 - y2`                    |
| 0 1 1    | original filter 4 (d4) | `yc4 = z2 - y1 - y2`                    |
| 1 0 0    | redundant filter 1     | outputs unchanged, location reported    |
| 0 1 0    | redundant filter 2     | outputs unchanged, location reported    |
| 0 0 1    | redundant filter 3     | outputs unchanged, location reported    |

To rebuild a faulty original output, the corrector takes the first redundant filter whose
check contains that filter and subtracts the other original outputs of that check.
For filter 1 this is the published rule. For filters 2 to 4 the same rule is applied, and
the choice of `z1` or `z2` is this design's. A fault on a redundant filter does not touch
the bank's outputs, so it is only reported.

The code corrects one faulty filter at a time. With two faulty filters the syndrome names
the wrong filter, or none, and the outputs are wrong. As with any Hamming(7,4) code,
nothing in the design can tell this case apart.

## Exact arithmetic and the threshold

All arithmetic is two's complement modulo 2^`DATA_W`, in the filters and in the coding
stage alike. Under that arithmetic, `H(a + b) = H(a) + H(b)` holds bit for bit. A
fault-free bank therefore gives residues of exactly zero, even when a sum such as `x5`
wraps around.

The scheme itself allows for filters whose redundant copies round differently, for
example a different structure or precision. Their residues are then small but not zero, so a
residue counts as an error only when its magnitude exceeds `THRESHOLD`. Here all seven
filters are bit-identical, so the default threshold is 0. A non-zero threshold buys
tolerance to rounding at a cost: a real fault whose effect stays within the threshold
passes undetected and uncorrected. `tb_parallel_filters_threshold` shows that behaviour.

The comparison uses the magnitude of the signed residue with a strict `>`, so a residue
equal to the threshold counts as zero.

## Datapath and timing

```
 x1..x4 ──┬──────────────────────► 4 x fir_filter ── y1..y4 ─┐
          └─► ecc_encoder ─ x5..x7 ► 3 x fir_filter ── z1..z3 ─┤  (^ err_inj)
                                                              ▼
                         syndrome_check ── s, residue ─► single_fault_correction
                                                              ▼
                                                     output register ─► yc1..yc4, flags
```

| module                    | role                                                                 |
|---------------------------|----------------------------------------------------------------------|
| `ecc_filter_pkg`          | sizes, the parity rows `CHECK_MASK`, the location type `err_loc_e`   |
| `fir_filter`              | one direct-form FIR filter `H`, output registered                    |
| `ecc_encoder`             | combinational sums `x5..x7`                                          |
| `syndrome_check`          | combinational residues and thresholded syndrome                      |
| `single_fault_correction` | combinational syndrome decoding and output rebuild                   |
| `parallel_filters_ecc`    | top level: wiring, fault injection, output register                  |

- **Input:** a sample set `x1..x4` is taken on a rising clock edge while `in_valid` is high.
  All seven filters advance together. While `in_valid` is low the bank holds.
- **Latency:** the filters register their outputs, and the checked and corrected result is
  registered once more. `out_valid` and the outputs therefore appear two edges after the
  sample set was taken. An assertion in the top checks this.
- **Throughput:** one sample set per clock.
- **Outputs:** `yc` (corrected outputs), `syndrome` (bit 0 = s1), `residue` (the three
  signed differences), `err_loc` (`LOC_NONE`, `LOC_D1..LOC_D4`, `LOC_P1..LOC_P3`),
  `error_detected` (non-zero syndrome) and `corrected` (an original output was replaced).
  They hold their value between valid results.
- **Reset:** `rst` is synchronous and active high. It clears the filter delay lines and
  all outputs.
- **Fault injection:** `err_inj` holds one 32-bit XOR mask per filter output. Indices 0 to 3
  are the original filters and 4 to 6 the redundant ones. The masks are applied where the
  checker reads the outputs, in the cycle before the output register captures the result.
  Tie it to zero in use. It exists so that every syndrome can be exercised.

## Parameters

| parameter   | default                     | meaning                                   |
|-------------|-----------------------------|-------------------------------------------|
| `DATA_W`    | 32                          | sample and output width                   |
| `TAPS`      | 8                           | filter length (2 or more)                 |
| `COEF_W`    | 16                          | signed coefficient width                  |
| `COEFFS`    | 1, 3, 7, 12, 12, 7, 3, 1    | coefficients, packed, element `k` multiplies `x[n-k]` |
| `THRESHOLD` | 0                           | largest residue magnitude still read as 0 |

The 32-bit width matches the reference simulation of the scheme. The filter length and the
coefficients are not part of the scheme. These defaults are a small symmetric low-pass
filter, and any filter can be substituted. The protection relies only on linearity and on all
seven copies being identical. The code size is fixed at four original and three redundant
filters. `CHECK_MASK` in the package lists which original filters each check contains.

## Where the design makes its own choices

The following follow the scheme: the block structure, the coding equations, the check
equations, the syndrome table, the rebuild rule for filter 1 and the use of a threshold.
The following are this design's own:

- the FIR structure, length and coefficients;
- the modular arithmetic;
- the threshold default and how the comparison is made;
- the rebuild rules for filters 2 to 4;
- reporting, rather than correcting, a fault on a redundant filter;
- the two-cycle pipeline with `in_valid`/`out_valid`;
- the status outputs and the fault-injection port.

The published implementation closed timing at about 143 MHz on an FPGA. That figure has not
been checked for this RTL. The longest path here runs through a filter's adder tree, or
through the checker and corrector, which lie between two registers.

## Simulation

Each testbench checks itself and ends with a line `TB_RESULT checks=N failures=M`. With
Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/ecc_filter_pkg.sv tb/tb_parallel_filters_ecc.sv \
        --top-module tb_parallel_filters_ecc -o sim
    ./obj_dir/sim

| testbench                       | what it checks                                                       |
|---------------------------------|----------------------------------------------------------------------|
| `tb_fir_filter`                 | impulse response, then random samples with a random enable, against a reference convolution |
| `tb_ecc_encoder`                | the three sums for one-hot, all-ones and random inputs               |
| `tb_syndrome_check`             | syndrome and residues for errors below, at, just above and far above a threshold (0 and 20) |
| `tb_single_fault_correction`    | all eight syndrome cases: location, flags and restored outputs       |
| `tb_parallel_filters_ecc`       | the whole bank at default parameters: 4000 sample sets with stalls, a random single fault on any of the seven filters, outputs against a reference model, two-cycle latency, and a count of every case |
| `tb_parallel_filters_threshold` | the bank with `THRESHOLD = 15`: small faults are ignored and passed through, large ones corrected |

All of them pass with Verilator 5. The whole-bank test runs at the default parameters in
well under a second.
