# Self-checking, self-correcting encoder and syndrome computation for OLS codes

Memories and caches are often protected with an error-correcting code. The
encoder that makes the check bits on a write, and the syndrome computation
that checks them on a read, are logic too, and a fault in either one defeats
the code: a bad encoder writes a word that is already wrong, and a bad
syndrome computation corrects good data or lets bad data through.

This design protects both circuits for **orthogonal Latin squares (OLS)
codes** with a cheap **parity prediction** check and repairs their output on
the fly from a duplicate copy. It relies on two properties of OLS codes:

1. every data bit takes part in exactly 2t checks (an even number), so the
   XOR of all check bits of a correct encoding is always 0;
2. two data bits share at most one check, so the check bits are computed by
   separate XOR trees with no shared gate. A single faulty node then corrupts
   at most one check bit, which always changes that total parity.

So a single parity check on the encoder's outputs detects every single
stuck-at node fault in the encoder. When the check fails, a multiplexer
switches the output to a duplicate copy of the circuit. The same idea covers
the syndrome computation.

The RTL implements single-error-correcting codes (t = 1) with k = m² data
bits and 2m check bits. By default m = 4, so k = 16 and there are 8 check
bits. The parameter `M` also builds the k = 64 and k = 256 codes.

## The code

The generator matrix is G = [M1; M2], with 2m rows and k columns:

* **M1**: row r (check c(r+1), r = 0..m-1) is 1 over the r-th group of m
  consecutive data bits.
* **M2** = [I_m I_m … I_m]: row r (check c(m+r+1)) is 1 over data bits
  r, r+m, r+2m, …

For k = 16 (d1 is the leftmost column):

```
c1  1111000000000000      c5  1000100010001000
c2  0000111100000000      c6  0100010001000100
c3  0000000011110000      c7  0010001000100010
c4  0000000000001111      c8  0001000100010001
```

If you arrange the data word as an m×m square, the M1 checks are row
parities and the M2 checks are column parities. Each data bit sits in
exactly one row check and one column check.

Bit numbering in every module: bit 0 of a data bus is d1, and bit 0 of a
check or syndrome bus is c1 or s1.

## Encoder with concurrent error detection and correction (`ols_cedc_encoder`)

```
            +--------------------+  ci (2m)                     +-----+
 data ---+->| ols_check_gen orig |--+---------------------------| 0   |
         |  +--------------------+  | c1..cm   --> r1 --+       |  mux|--> check_o
         |                          | cm+1..c2m--> r2 --+-> e --| sel |
         |  +--------------------+  cj (2m)                     |     |
         +->| ols_check_gen dup  |------------------------------| 1   |
            +--------------------+                              +-----+
```

* The **original generator** computes ci.
* The **two-rail parity checker** (`ols_parity_checker`) takes:
  * r1 = c1 ⊕ … ⊕ cm, the parity of the row checks;
  * r2 = c(m+1) ⊕ … ⊕ c2m, the parity of the column checks.

  Both equal the parity of the data word, so a correct encoding gives
  {r1, r2} = 00 or 11. Then e = r1 ⊕ r2.
* The **duplicate generator** computes the same bits, cj, from the same data.
* The **correction multiplexer** (`ols_corr_mux`) outputs ci while e = 0 and
  cj while e = 1: `check_o = ~e·ci | e·cj`.

Which faults are handled:

* **Single fault in the original generator:** at most one ci is wrong, so
  exactly one rail flips. e rises and the duplicate's correct bits go out.
* **Fault in the checker:** one rail is wrong, so e rises. The duplicate is
  used, and its bits are also correct.
* **Not covered:** faults in the duplicate generator, in the final XOR that
  forms e, and in the multiplexer. A fault in the duplicate only matters when
  the original is also faulty.

## Syndrome computation with concurrent error detection and correction (`ols_cedc_syndrome`)

`ols_syndrome_gen` recomputes each check from the read data and XORs it with
the stored check bit: s(i) = c(i) ⊕ (row i of G applied to d). Every data
bit enters two syndrome bits, so the data cancels out of the total parity:

    s1 ⊕ … ⊕ s2m  =  c1 ⊕ … ⊕ c2m

The checker therefore uses r1 = XOR of the computed syndrome and r2 = XOR of
the stored check bits, with f = r1 ⊕ r2. The rest of the structure matches
the encoder: an original and a duplicate syndrome generator, and a
multiplexer selected by f.

Errors in the stored word itself change s and c together, so they never
raise f. Only faults in the syndrome logic or in the checker raise f.

## Read-path correction (`ols_mld_corrector`)

The corrected syndrome drives a one-step majority-logic corrector. With
t = 1, data bit j is inverted when both of its checks fail: its row check
j/m and its column check m + j mod m. This corrects any single error in the
stored data bits. A single error in a check bit sets only one syndrome bit
and leaves the data unchanged. `err_o` reports a non-zero syndrome.

## Top level (`ols_cedc_top`)

The top holds the write path (encoder) and the read path (syndrome
computation and corrector). The memory array is outside the top: the
surrounding design stores `wr_data_i` together with `wr_check_o` and later
presents them as `rd_data_i` / `rd_check_i`.

| port | dir | width | meaning |
|---|---|---|---|
| `wr_data_i` | in | M² | word to be written |
| `wr_check_o` | out | 2M | check bits to store with it |
| `enc_err_o` | out | 1 | e: the encoder saw an internal fault and used its duplicate |
| `enc_rails_o` | out | 2 | {r2, r1} of the encoder checker |
| `rd_data_i`, `rd_check_i` | in | M², 2M | word read back |
| `rd_data_o` | out | M² | corrected data |
| `rd_synd_o` | out | 2M | syndrome |
| `rd_err_o` | out | 1 | the stored word was in error |
| `synd_fault_o` | out | 1 | f: the syndrome computation saw an internal fault and used its duplicate |
| `synd_rails_o` | out | 2 | {r2, r1} of the syndrome checker |

### Timing

Everything is combinational, with no clock and no reset. The check and the
multiplexer sit in series after the XOR trees, which lengthens the encoder
and syndrome paths. Some latency can be hidden:

* On a write, the check can run while the data is being written. The check
  bits stored last are the corrected ones.
* On a read, the check can run alongside majority voting.

Registers at the memory boundary are left to the surrounding design.

## Cost

With m = 4, each check bit uses m - 1 = 3 two-input XORs. The checkers add
2m - 1 XORs (encoder) and 4m - 1 XORs (syndrome computation). Duplication
doubles the generator logic. Relative to the unprotected circuit, the
checker overhead shrinks roughly as 2/m (encoder) and 4/m (syndrome
computation) as the word size grows. The comparable checker-only overhead
estimates for the three code sizes are:

| k | m | encoder | syndrome |
|---|---|---|---|
| 16 | 4 | 58.33 % | 87.50 % |
| 64 | 8 | 26.78 % | 46.87 % |
| 256 | 16 | 12.91 % | 24.21 % |

These figures come from gate-count formulas (4tm-2 and 8tm-4 XORs over
2tm(m-1) and 2tm²). The formulas count more checker gates than the trees
built here, and they leave out the duplicate and the multiplexer.

## Files

| file | contents |
|---|---|
| `rtl/ols_pkg.sv` | default size, and the G-matrix membership functions |
| `rtl/ols_check_gen.sv` | check-bit generator (2m XOR trees) |
| `rtl/ols_syndrome_gen.sv` | syndrome generator |
| `rtl/ols_parity_checker.sv` | two-rail parity checker (r1, r2, error flag) |
| `rtl/ols_corr_mux.sv` | 2:1 correction multiplexer |
| `rtl/ols_cedc_encoder.sv` | encoder with detection and correction |
| `rtl/ols_cedc_syndrome.sv` | syndrome computation with detection and correction |
| `rtl/ols_mld_corrector.sv` | majority-logic data corrector |
| `rtl/ols_cedc_top.sv` | top level |
| `tb/tb_*.sv` | self-checking testbenches; `tb_ols_ref_pkg.sv` is the reference model |

## Verification

Each testbench prints `TB_RESULT checks=N failures=F` and has a watchdog. All
of them pass.

* **`tb_ols_check_gen`** applies all 65,536 16-bit words and compares each
  check bit against the matrix above. It also runs random words at k = 64.
* **Other unit testbenches** compare against a reference model written from
  the matrix definition. They cover the syndrome, the checker, the
  multiplexer and the corrector.
* **`tb_ols_cedc_encoder` and `tb_ols_cedc_syndrome`** inject single
  stuck-at-0/1 faults with `force`:
  * on every output bit of the original generator;
  * on each checker rail.

  In every case the output must still be correct, and the error flag must
  rise exactly when the fault changed a monitored bit.
* **`tb_ols_cedc_top`** is the end-to-end test at the default size (k = 16).
  The testbench models the memory with an array. It does 4000 write/read
  operations with random single soft errors in stored data or check bits,
  plus random encoder, syndrome or checker-rail faults. It counts each
  mechanism and requires each to occur:
  * encoder fault corrected;
  * syndrome fault corrected;
  * rail fault;
  * data bit corrected;
  * check-bit error seen;
  * clean operation.
* **`tb_ols_workloads`** runs the same scenario at k = 64 and k = 256, using
  the helper `tb_ols_e2e`.

Faults are injected at the outputs of the XOR trees. No gate is shared
between check bits, so a stuck-at node inside a tree can only show up as a
wrong value on that tree's one output. The injected faults therefore stand
for every single-node fault in the generators.

To run one with Verilator:

```
verilator --binary --timing -y rtl -y tb rtl/ols_pkg.sv tb/tb_ols_ref_pkg.sv \
          tb/tb_ols_cedc_top.sv --top-module tb_ols_cedc_top -o sim
./obj_dir/sim
```

## Limits and design choices

* **Only t = 1 is built.** Codes that correct more errors add further groups
  of m checks built from more mutually orthogonal Latin squares. Their
  construction is not given here. The two-rail split (first half of the
  checks against second half) would still work for them.
* **Corrector voting rule.** The majority-logic corrector, and its rule
  (flip when both checks fail), are this design's own, the simplest
  single-error corrector for the code.
* **Uncovered parts.** The duplicate circuits, the final checker XOR and the
  multiplexers are not themselves checked.
* **No delay figures here.** Published delay estimates for these circuits
  (about 45 % longer paths with detection and correction) depend on a
  technology library and are not reproduced by this RTL.
* **Bus naming and bit order** (d1 = bit 0) are chosen here.
