# 2D divide-symbol ECC memory

Radiation in space upsets memory cells, and a single particle often flips
several neighbouring cells at once: a multiple cell upset (MCU). A plain
single-error-correcting Hamming code cannot repair those. This design protects
16-bit words with a two-dimensional code. The word is laid out as a 4x4 array
and covered by three kinds of XOR redundancy: diagonal, parity and check bits.
Together they can both locate and repair upsets that stay inside two
neighbouring bit columns of that array.

The RTL is a small ECC-protected memory. A write encodes the data into a
32-bit codeword and stores it. A read fetches the codeword and computes its
syndrome. It then decides which region holds the upset and returns the
repaired word, together with the raw codeword, the syndrome and a status.

## The code

The data word `A[15:0]` is split into four groups of four bits:

| group | bits 1..4      |
|-------|----------------|
| X     | A0  A1  A2  A3 |
| Y     | A4  A5  A6  A7 |
| Z     | A8  A9  A10 A11|
| W     | A12 A13 A14 A15|

Here `X1 = A0` and `W4 = A15`. A bit is named by its group and its *index*
(1..4). Sixteen redundancy bits are formed:

* **Parity** `Pi = Xi ^ Yi ^ Zi ^ Wi`. One bit per index, so one per column of
  the array.
* **Diagonal** `D1 = X1^Y2^Z1^W2`, `D2 = X2^Y1^Z2^W1`, `D3 = X3^Y4^Z3^W4`,
  `D4 = X4^Y3^Z4^W3`. These run along the diagonals of the 2x2 sub-blocks,
  using indices 1&2 for D1/D2 and indices 3&4 for D3/D4.
* **Check** `G13 = G1 ^ G3` and `G24 = G2 ^ G4` for each group G. There are
  eight of these, two per group, pairing bits that are two columns apart.

The codeword is systematic. From the LSB up:

| bits    | content                                              |
|---------|------------------------------------------------------|
| [15:0]  | data A15..A0                                         |
| [19:16] | D4..D1                                               |
| [23:20] | P4..P1                                               |
| [31:24] | Cw24 Cw13 Cz24 Cz13 Cy24 Cy13 Cx24 Cx13              |

The syndrome is the stored redundancy XOR the redundancy recomputed from the
stored data (`SDi`, `SPi`, `SC`). It has the same `{C, P, D}` layout and is
the packed struct `ecc2d_pkg::red_t`.

Several points are this design's own choices: which input bits form which
group, the order of the redundancy bits, and the equations for D3/D4, P3/P4
and the Z/W check bits. The last follow the pattern of the published
D1/D2, P1/P2 and X/Y equations.

## Region selection: how an upset is located

This is the heart of the decoder, and the part that needs care.

The upsets this code is meant for stay within two neighbouring bit
columns, across any of the four groups. Three such *regions* are defined:

* region 1: indices 1 and 2
* region 2: indices 3 and 4
* region 3: indices 2 and 3

The key fact is that, inside any one region, every data bit is covered by
exactly one check bit. For example, `Gx13` covers index 1 in region 1 and
index 3 in regions 2 and 3. So once the region is known, the check syndrome
`SC` names every flipped bit directly:

| region | `SCg13` means | `SCg24` means |
|--------|---------------|---------------|
| 1      | G1 flipped    | G2 flipped    |
| 2      | G3 flipped    | G4 flipped    |
| 3      | G3 flipped    | G2 flipped    |

Each region therefore proposes one candidate error pattern. The decoder
*verifies* each candidate: it works out the full syndrome that candidate
would produce and compares it with the measured one. In practice the parity
and diagonal parts decide, because the check part matches by construction.
Verification runs for all three regions in parallel; it is three copies of
the redundancy XOR network.

* If one region verifies, or several do and all propose the same pattern, the
  data is XORed with that pattern. The status is `ST_CORRECTED`, and `region`
  reports the lowest such region.
* If verified regions disagree, the upset is reported as `ST_UNCORRECTABLE`
  and the data is passed through unchanged. The same happens when no region
  verifies.
* If the check syndrome is zero but the diagonal or parity syndrome is not,
  only stored D/P bits were hit. The data is passed through unchanged with
  status `ST_REDUNDANCY_ERR`.
* The same status is given when exactly one check-syndrome bit is set and the
  D and P syndromes are zero. A data upset inside a region that sets a single
  check bit is a single-bit upset, and that would also set a parity bit, so
  this case can only be a single upset of a stored check bit.

The published method describes these steps only in outline: syndrome, then
verification and region selection, then correction. The exact verification
rule above, the tie-breaking and the four status codes are this design's own
reading of that outline.

### What it can and cannot repair

These figures come from exhaustive enumeration over this exact rule:

* Every single-bit upset in any of the 32 stored bits leaves the returned
  data correct.
* All 24 adjacent double upsets are corrected. That is two neighbouring
  indices in one group, or one index in two neighbouring groups.
* Of all 120 two-bit data upsets, 52 are corrected and the rest are flagged.
  None is miscorrected.
* Of the 735 distinct patterns that lie inside a region, 460 are corrected.
  The rest are flagged uncorrectable because two regions explain them
  equally well. Two examples are a burst that covers one whole index
  (X1,Y1,Z1,W1) and a 2x2 block (X1,X2,Y1,Y2 versus X3,X4,Y3,Y4).
* Upsets wider than a region can be miscorrected. Of the 560 three-bit data
  patterns, 64 are miscorrected.

So the decoder works best on bursts that run along a group (neighbouring
indices) and on scattered pairs. A physical layout that places a group's
bits next to each other, and the four groups apart, plays to that strength.

## Blocks

| module            | role |
|-------------------|------|
| `ecc2d_pkg`       | types (`data_t`, `red_t`, `code_t`, `status_t`) and `calc_red()`, the redundancy XOR network shared by the encoder, syndrome unit and verification |
| `ecc2d_encoder`   | data → codeword. Combinational, one 4-input XOR level per redundancy bit |
| `ecc2d_syndrome`  | stored redundancy XOR recomputed redundancy. Combinational |
| `ecc2d_corrector` | per-region candidates, verification, selection, XOR correction. Combinational |
| `ecc2d_decoder`   | `ecc2d_syndrome` followed by `ecc2d_corrector` |
| `ecc2d_memory`    | `2**ADDR_W` x 32-bit codeword array, synchronous write and read, synchronous reset to zero |
| `ecc2d_top`       | encoder → memory → decoder |

## Top-level interface and timing

`ecc2d_top #(ADDR_W = 4)`. The default of 16 words matches the 4-bit address
port of the original block.

| port          | dir | width | meaning |
|---------------|-----|-------|---------|
| `clk`, `rst`  | in  | 1     | clock, synchronous active-high reset |
| `write`       | in  | 1     | store `data_in` at `address` on this edge |
| `read`        | in  | 1     | fetch `address`; results next cycle |
| `address`     | in  | ADDR_W| word address |
| `data_in`     | in  | 16    | data to write |
| `inject_mask` | in  | 32    | XORed into the codeword as it is written. Used for fault injection; tie to 0 in normal use |
| `valid`       | out | 1     | one-cycle pulse, the cycle after `read` |
| `codeword`    | out | 32    | codeword as stored |
| `syndrome`    | out | 16    | its syndrome, `{SC, SP, SD}` |
| `data_out`    | out | 16    | repaired data |
| `status`      | out | 2     | `ecc2d_pkg::status_t`: no error / corrected / redundancy only / uncorrectable |
| `region`      | out | 2     | region used for the repair (1..3), 0 if none |
| `err_mask`    | out | 16    | data bits that were flipped back |

Timing works as follows:

* A write takes effect at the clock edge where `write` is high.
* A read requested in cycle *t* shows its results in cycle *t+1*. The memory
  has a registered read port, and decoding is combinational after it.
* If a read and a write hit the same address in one cycle, the read returns
  the old word.
* Reset clears every word to the all-zero codeword, which is valid, so unwritten
  addresses read as zero with no error.
* The memory does no scrubbing: a repaired word is returned but not written
  back.

The original paper reports a critical path of about 2.3 ns on an FPGA, but
gives no cycle-level timing. The one-cycle read, the reset behaviour and the
extra outputs (`data_out`, `status`, `region`, `err_mask`, `valid`) are this
design's own. The same goes for the `inject_mask` port.

## Where this departs from the original description

* The decoder outline includes an "XOR and shift" step. Here correction is a
  single XOR with the selected pattern, and nothing needs shifting.
* The original lists two conditions for a detected error. The first is that
  at least one SD/SP bit is set; the second is that more than one SC bit is
  set. They are used here only in the spirit described above: SD/SP and SC
  together tell data upsets apart from upsets of the stored redundancy. They
  are not used as literal gates.
* The memory depth, the codeword bit order, the group mapping and the status
  outputs are not specified in the original, and were chosen here.
* The original evaluated the design on an FPGA, reporting 142 LUTs, 0.158 W
  and 2.279 ns. Those figures are not reproduced here.

## Simulating

Every file in `rtl/` and `tb/` is one module or package with the file's
name. The packages must come first on the command line. For example, for the
end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ecc2d_pkg.sv tb/ecc2d_ref_pkg.sv tb/ecc2d_top_tb.sv \
    --top-module ecc2d_top_tb -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs. `tb/ecc2d_ref_pkg.sv` is a reference model written
directly from the named equations rather than from the loop form used in
the RTL.

| testbench            | what it covers |
|----------------------|----------------|
| `ecc2d_encoder_tb`   | all 65536 data words against the reference equations |
| `ecc2d_syndrome_tb`  | clean codewords, random corruption, every single-bit upset |
| `ecc2d_corrector_tb` | every region pattern, judged against a brute-force table of all region patterns and their syndromes; D/P-only and single check-bit upsets; a mixed upset |
| `ecc2d_decoder_tb`   | corrupted codewords: all single-bit upsets, all region patterns, D/P upsets |
| `ecc2d_memory_tb`    | reset, readback, one-cycle latency, read-during-write, hold |
| `ecc2d_top_tb`       | the whole memory at its default size. Each address gets a different upset (none, each region, D/P only, a check bit, ambiguous), then everything is read back with one-cycle latency. It checks that every outcome and the reset occur at least once |

## Changing it

* Depth: set `ADDR_W` on `ecc2d_top`.
* The code itself is fixed at four groups of four bits. The equations and the
  region table depend on that shape.
* `calc_red()` in `ecc2d_pkg` is the single place that defines the
  redundancy. The encoder, the syndrome unit and the three verification
  copies all use it. Change it and the reference model in
  `tb/ecc2d_ref_pkg.sv` together.
* The region table lives in the `g_cand` generate loop of `ecc2d_corrector`.
