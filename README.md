# Low-switching scan test with an XOR decompressor and a MISR

Shifting test patterns into scan chains toggles every scan cell that
changes value, and this shift activity dominates test power. This design is
a small scan-compression test architecture built to keep that activity low:

* a tester supplies a narrow **seed** (4 bits) every scan clock;
* a fixed **XOR network** expands the seed into 9 scan-in values, one per
  scan chain;
* the scan-out bits of the 9 chains are compacted by a 9-bit
  **multiple-input signature register (MISR)**, and the final signature is
  compared with the expected one.

The low-power part is not a circuit. It is the **order in which the tester
applies the seeds**. Going from one seed to the next toggles the scan-in
lines whose XOR outputs differ between the two seeds. If all 16 seed values
are applied in an order that keeps these differences small, fewer cells
toggle during shifting. Picking that order is a travelling-salesman problem
over a 16×16 matrix of switching distances. The hardware is the same for
any order, and the testbenches measure the effect of the order on it.

```
            seed_i[3:0]  (X0..X3, one seed per shift cycle)
                 |
        +--------v---------+
        |   xor_network    |   Yj = XOR of a fixed subset of Xi
        +--------+---------+
          Y0 ... |  ... Y8            (9 scan-in values in parallel)
     +-----+-----+-- ... --+
     v     v     v         v
   chain chain chain ... chain        9 x scan_chain, 16 cells each
     0     1     2         8          (scan_q_o / capture_d_i to the logic under test)
     |     |     |         |
     +-----+-----+-- ... --+
                 | scan_out_o[8:0]
        +--------v---------+
        |       misr       |  9-bit, x^9 + x^4 + 1
        +--------+---------+
                 v
            signature_o  ==  expected_sig_i  ->  sig_match_o
```

## The XOR network

Bit `i` of the seed is `Xi` (`seed_i[0] = X0`). The nine outputs are:

| output | equation        | output | equation        | output | equation        |
|--------|-----------------|--------|-----------------|--------|-----------------|
| Y0     | X0 ^ X1 ^ X2    | Y3     | X0 ^ X1 ^ X3    | Y6     | X2 ^ X3         |
| Y1     | X1 ^ X2         | Y4     | X1 ^ X3         | Y7     | X0 ^ X2 ^ X3    |
| Y2     | X0 ^ X2         | Y5     | X1 ^ X2 ^ X3    | Y8     | X0 ^ X3         |

Each output has a 4-bit mask in `scan_pkg::XOR_MASKS`: bit `i` set means `Xi`
feeds that output. `xor_network` computes `y[j] = ^(x & MASKS[j])`. It is
parameterised in `N`, `M` and `MASKS`, so another network is one parameter
away. The equations above are the published network. When a seed value is
written as a decimal number 0..15, X0 is taken to be its least significant
bit.

## Seed order and scan-in switching

Let `Y(s)` be the 9-bit output for seed `s`. Applying seed `b` right after
seed `a` toggles `popcount(Y(a) ^ Y(b))` scan-in lines. Those 16×16 values
form a symmetric matrix with a zero diagonal. Distinct seeds differ in 3 to
6 outputs, and the upper triangle sums to 576. A load of all 16 seeds has 15
seed changes, so its shift switching is the sum of 15 matrix entries along
the chosen order.

The chain length is 16, so one ordering of the 16 seed values is exactly one
scan load: the first seed ends up in the last cell of each chain. These are
the numbers for the orderings used in the tests (scan-in toggles summed over
the 9 lines, X0 = LSB):

| seed order                                       | toggles |
|--------------------------------------------------|--------:|
| 1-15-2-3-12-7-8-5-10-4-9-6-13-0-14-11            | 55 |
| 12-3-2-15-1-6-7-8-9-4-10-5-11-0-13-14            | 59 |
| 6-1-15-2-3-12-7-8-5-10-4-11-0-13-14-9            | 58 |
| 4-9-6-1-15-2-3-12-7-8-5-10-13-0-14-11            | 56 |
| 14-0-13-2-3-12-1-6-7-8-5-10-4-9-11-15            | 59 |
| 7-8-5-10-13-0-14-9-4-1-15-2-3-12-11-6            | 55 |
| 3-12-2-13-0-14-9-4-10-5-8-7-6-1-15-11            | 56 |
| 2-3-12-7-8-5-10-4-9-6-1-15-0-11-13-14            | 60 |
| 8-5-10-4-9-6-1-15-2-3-12-7-0-13-11-14            | 57 |
| 11-6-8-5-10-7-9-4-15-2-12-1-14-3-13-0 (optimum)  | 48 |
| 0-1-2-...-15 (ascending, for comparison)         | 76 |

The first nine are the published low-switching orderings. The
least-switching order of all 16 seeds costs **48** toggles as an open path
and **52** as a closed tour. `tb_seed_order` finds this with an exact
dynamic-programming search over subsets. Ascending order costs 76, so a good
order removes about a third of the scan-in switching.

**Difference from the published numbers.** The published totals for the
nine orderings range from 45 to 52, and 45 is listed for
3-12-2-13-…-15-11. Those totals do not follow from the XOR equations above
with either bit order of the seed: X0 as LSB gives the 55–60 in the table,
and X0 as MSB gives 60–66. The exact optimum under this metric is 48, which
is above 45. So the published totals must count switching in some other
way, and that way is not specified. The testbenches check the counts that
follow from the equations, not the published totals.

## Scan chains and the test sequence

`scan_chain` is a mux-D chain of `LEN` cells:

* `scan_en = 1`: the chain shifts. `scan_in` enters cell 0 and cell `LEN-1`
  drives `scan_out`.
* `scan_en = 0`: every cell loads its functional input
  `capture_d[k]`, which is the capture cycle.

The cell values are also brought out as `q` (`scan_q_o` at the top level),
because they drive the logic under test. That logic is not part of this
design: its responses come back on `capture_d_i`.

One test at the top level works like this:

1. `misr_clr_i` for one cycle clears the signature.
2. There are 16 shift cycles (`scan_en_i = 1`), one seed per cycle. With
   `misr_en_i = 1` the bits leaving the chains are compacted at the same
   time. Set `misr_en_i = 0` during the first load, when the chains hold
   only reset contents.
3. One capture cycle (`scan_en_i = 0`, `misr_en_i = 0`). An assertion
   flags compaction requested in a capture cycle.
4. Repeat from step 2 for the next pattern. The final unload shifts 16
   cycles with any seed and compaction on.
5. Drive `expected_sig_i`. `sig_match_o` is combinational and shows whether
   the signature matches.

Timing is one shift, capture or compaction per rising clock edge. A bit
applied as a seed output appears at `scan_out` 16 cycles later. The MISR
samples `scan_out_o` as it is before the edge, so a bit is compacted on the
same edge that shifts it out of the chain. `rst_n` is asynchronous and
active low, and it clears chains and signature.

## The MISR

`misr` is an internal-XOR LFSR with one parallel input per stage:

```
sig[0] <= sig[8] ^ d[0]
sig[k] <= sig[k-1] ^ d[k] ^ (POLY[k] & sig[8])      k = 1..8
```

This multiplies the signature, read as a polynomial, by x modulo
`x^9 + x^4 + 1` (`POLY = 9'h011`, a primitive polynomial) and adds the input
word. `clr` has priority over `en`. Both the polynomial and the MISR form
are this design's choices.

## Files

| file | contents |
|------|----------|
| `rtl/scan_pkg.sv` | seed width, chain count, chain length, XOR masks, MISR polynomial |
| `rtl/xor_network.sv` | combinational N→M XOR network |
| `rtl/scan_chain.sv` | one mux-D scan chain |
| `rtl/misr.sv` | W-bit MISR |
| `rtl/scan_compress_top.sv` | network + M chains + MISR + signature compare |
| `tb/tb_xor_network.sv` | all 16 seeds against the equations written term by term |
| `tb/tb_scan_chain.sv` | random shift/capture against a reference array; 16-cycle shift latency |
| `tb/tb_misr.sv` | random traffic against a GF(2) polynomial model; single-bit error detection |
| `tb/tb_scan_compress_top.sv` | end-to-end test at full size, described below |
| `tb/tb_seed_order.sv` | switching matrix, the orderings' costs and the exact optimum |

`tb_scan_compress_top` runs the top at its default parameters. It applies
the 11 loads in the table above, each followed by a capture, with a simple
XOR function standing in for the logic under test. Every cycle it compares
all 144 cells and the signature with a reference model. After each load it
checks every cell against the XOR equations and checks the load's toggle
count. It ends with a matching and a mismatching signature compare. It also
counts shift, capture, compaction, clear, match and mismatch events, and
fails if any of them never happened.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/scan_pkg.sv tb/tb_scan_compress_top.sv --top-module tb_scan_compress_top
./obj_dir/Vtb_scan_compress_top
```

For another testbench, swap in its name. Each one runs in well under a
second.

## Where this design goes beyond what was published

Published: the 4-input, 9-output XOR network and its equations; one seed
per scan cycle from the tester; 9 scan chains fed in parallel; MISR
compaction of the chain outputs; comparison of the final signature with the
expected one; and choosing the seed order by a travelling-salesman search to
reduce switching.

This design's own choices:

* the chain length (16, so that one ordering is one load);
* the mux-D scan cell and capturing in every cycle with scan enable low;
* the MISR polynomial and form, and its clear/enable inputs;
* asynchronous reset;
* the seed bit order (X0 = LSB);
* placing the signature comparator on chip.

Not built as hardware:

* the tester;
* the logic under test, whose connections are brought out as ports;
* the switching-matrix computation and the branch-and-bound search. These
  are offline software whose result is test data. `tb_seed_order` recomputes
  the matrix and the optimum for checking.
