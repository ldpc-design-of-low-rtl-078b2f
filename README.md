# Two-stage QC-EIRA LDPC encoder for IEEE 802.11n (rate 1/2)

An LDPC encoder has to produce parity bits P that satisfy H·[I P]ᵀ = 0 for
the information bits I. Done naively, that is a dense matrix-vector product
whose cost grows with the square of the block length. This encoder avoids it
by using two properties of the IEEE 802.11n codes:

* **Quasi-cyclic structure.** H is a 12 × 24 array of Z × Z blocks. Each
  block is either zero or an identity matrix rotated by a shift value. A
  block times a sub-block of bits is therefore just a cyclic rotation.
* **EIRA parity part.** H = [H1 H2]. Here H2 (12 × 12 blocks) has one special
  column plus a dual diagonal of identities. So P = H2⁻¹·(H1·Iᵀ) can be
  solved with XORs alone, without forming H2⁻¹.

The encoder is a two-stage pipeline built around these properties:

```
           info words (IN_W bits/clk)
                 │
      ┌──────────▼─────────────────────────────┐        ┌──────────────────┐
      │ CMMU  column-wise multiplication       │◄──col──│ H1 ROM           │
      │  sub-block assembly → work register    │        │ (3 sizes, rate ½)│
      │  N_DCS × DCS (decomposed cyclic shift)  │        └──────────────────┘
      │  q_i ^= P^h(i,j) · I_j   (12 accums)    │
      └──────────┬────────────── finish ───────┘
                 │ q, info, size        ▲ start
      ┌──────────▼──────────┐     ┌─────┴──────────┐
      │ H1I buffer          │◄────│ controller     │
      └──────────┬──────────┘     └─────▲──────────┘
      ┌──────────▼──────────────────────┴───┐
      │ MPSU  forward/backward substitution │  M_PAR bit positions / clk
      └──────────┬──────────────────────────┘
      ┌──────────▼──────────┐
      │ parity buffer       │──► cw_valid, cw[24] = [I P]
      └─────────────────────┘
```

Stage 1 (CMMU) computes q = H1·Iᵀ while the information bits are still
arriving. Stage 2 (MPSU) turns q into parity bits while stage 1 already
accepts the next codeword.

## The code

`rtl/ldpc_pkg.sv` holds the information part H1 of the three IEEE 802.11n
rate-1/2 prototype matrices:

| Z  | codeword n | information bits |
|----|------------|------------------|
| 27 | 648        | 324              |
| 54 | 1296       | 648              |
| 81 | 1944       | 972              |

An entry s ≥ 0 stands for the rotation (Pˢx)[k] = x[(k+s) mod Z]. An entry of −1
stands for a zero block.

H2 is not stored, because its shape is fixed:

* block column 0 holds P¹ in row 0, the identity in row 6 (= m/2), and P¹ in
  row 11;
* block columns 1…11 form a dual diagonal: block row i has identities in
  parity columns i and i+1.

The shift values were transcribed from the standard's tables. Check them
against IEEE 802.11n before you rely on bit-exact compatibility. The
testbenches check every codeword with a full parity check against the same
table, so a wrong entry would give a different (but still valid) LDPC code,
not a broken encoder.

## Stage 1: column-wise multiplication (CMMU)

Row-wise, H1·Iᵀ would have to wait for the whole information block. The CMMU
works column-wise instead:

    q_i ← q_i + P^h(i,j) · I_j      for every non-zero block (i, j) of column j

This update runs as soon as sub-block I_j is complete. Sub-block I_j arrives
in ceil(Z/IN_W) words: bit b of the sub-block is bit (b mod IN_W) of word
(b div IN_W). When the last word arrives, the sub-block moves to a work
register. The ROM then returns the whole block column j. N_DCS shifters
handle N_DCS block rows per clock, so a column takes G = ceil(12/N_DCS)
clocks. This is the partially parallel schedule: the number of shifters
follows a = ⌊p/IN⌋, N = ⌈rows/a⌉. With IN_W = 20 and Z = 27 that gives
N_DCS = 12 and G = 1.

If the next sub-block completes while the shifters are still busy, `in_ready`
drops for its last word. That cannot happen at the defaults, but it does
happen with fewer shifters. `in_ready` also drops after the last sub-block,
until the controller has taken the result. `finish` rises G + 1 clocks after
the last word is accepted.

### Decomposed cyclic shifter (DCS)

A single logarithmic rotator rotates only one fixed length. Here one shifter
has to rotate 27-, 54- or 81-bit sub-blocks, and `rtl/dcs.sv` does it in two
steps. The shift is split as s = u·TINY + r, with TINY = 27:

1. **Coarse step.** The vector is cut into Z/TINY tiny sub-blocks of 27 bits.
   The tiny sub-blocks are rotated by u, modulo Z/TINY. That is a small mux
   of whole 27-bit groups.
2. **Fine step.** A 5-stage logarithmic shifter rotates by r < 27 bits. It
   works on a vector extended by 26 bits above bit Z−1. Switches fill those
   bits with the lowest 26 bits, at a place that depends on the selected
   length. The wrap-around is therefore correct for every Z with a single
   shifter.

TINY is a parameter. Any common divisor of the supported sizes works. A
smaller one moves work from the fine step to the coarse step.

## Stage 2: parity by substitution (MPSU)

Summing all 12 block rows of H·cᵀ = 0 cancels the dual-diagonal terms and the
two P¹ blocks, which leaves p0 = Σ q_i. The remaining parity sub-blocks come
from two running sums. One runs from the top and one from the bottom, so
neither XOR chain is longer than about m/2:

    f_0 = q_0 + q_1,            f_i = f_(i-1) + q_(i+1)     (i ≤ m/2−2)
    b_0 = q_11 + q_10,          b_i = b_(i-1) + q_(10−i)    (i ≤ m/2−3)
    p0  = f_4 + b_3 + q_6,      p0' = P¹·p0
    p1  = p0' + q_0,    p_i = p0' + f_(i−2)    (2 ≤ i ≤ 6)
    p11 = p0' + q_11,   p_j = p0' + b_(10−j)   (7 ≤ j ≤ 10)

All of these are bitwise XORs across sub-blocks, so the MPSU handles M_PAR
bit positions of all 12 sub-blocks per clock and takes ceil(Z/M_PAR) clocks.
The rotation in p0' only means that p0' at bit k is p0 at bit k+1. Because q
is held whole in the H1I buffer, each lane forms that bit directly as the XOR
of all q_i at bit k+1.

## Hand-over, timing and throughput

The controller (`enc_controller`) sees stage 1's level `finish` and stage 2's
state. When stage 1 has finished and stage 2 is idle, or in its last clock,
the controller sends one start pulse. That pulse does three things:

* loads the H1I buffer;
* clears and restarts the CMMU;
* starts the MPSU.

The parity buffer copies the information sub-blocks with the MPSU's last
write. That lets the H1I buffer take the next codeword in the same clock, so
stage 2 works every clock.

At the defaults (IN_W = 20, N_DCS = 12, M_PAR = 1):

| Z  | input clocks (12·ceil(Z/20)) | MPSU clocks | codeword interval | latency, last word → cw_valid |
|----|------------------------------|-------------|-------------------|-------------------------------|
| 27 | 24                           | 27          | 27                | 30                            |
| 54 | 36                           | 54          | 54                | 57                            |
| 81 | 60                           | 81          | 81                | 84                            |

Stage 2 sets the throughput: 12 information bits per clock, which is 480 Mbit/s
at 40 MHz. The original architecture quotes 800 Mbit/s at 40 MHz. That figure
needs 20 information sub-blocks per codeword (rate 5/6), and this build does
not store the rate-5/6 tables (see below). In general the throughput is
(n − m)·M_PAR·f_clk.

Synthesis of the whole encoder gives about 6,060 flip-flop bits. Of these,
2·Z·(m+n) = 5,832 are the information, q and parity stores; the rest are the
assembly and work registers and control. The ROM is combinational.

## Interface (`ldpc_encoder`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `zsel_in` | in | 2 | sub-block size: 0 = 27, 1 = 54, 2 = 81. Sampled with the first word of a codeword. |
| `in_valid`, `in_ready` | in/out | 1 | valid/ready handshake for information words |
| `in_data` | in | IN_W | information bits, framed as described above |
| `cw_valid` | out | 1 | one-clock pulse: a codeword is on `cw` |
| `cw_zsel` | out | 2 | size of that codeword |
| `cw` | out | 24 × 81 | `cw[0..11]` information sub-blocks, `cw[12..23]` parity sub-blocks, each in bits [Z−1:0]; higher bits are zero |
| `n_started`, `n_done` | out | 16 | codewords handed to stage 2 / completed |

`cw` is only guaranteed during the `cw_valid` clock. The parity part is
rewritten from the next clock on.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `IN_W` | 20 | top, cmmu | information bits per clock (20 = 800 Mbit/s at 40 MHz) |
| `N_DCS` | 12 | top, cmmu | number of decomposed cyclic shifters |
| `M_PAR` | 1 | top, mpsu, parity_buffer | bit positions per clock in stage 2 |
| `TINY` | 27 | dcs | tiny sub-block size of the coarse step |
| `Z_MAX`, `N_BLK`, `M_BLK` | 81, 24, 12 | ldpc_pkg | largest sub-block, block columns, block rows |

## Departures from the reference architecture

* Only the rate-1/2 codes are built. The parity equations are written for a
  fixed m = 12, so other rates need their tables and a run-time m.
* Published form of the forward recurrence: f_i = q_i + q_(i+1). Here it is
  read as a running sum, f_i = f_(i−1) + q_(i+1). Only that reading satisfies
  H·cᵀ = 0.
* Input word framing, the valid/ready handshake, the parallel codeword output,
  the single shared start pulse, the reset, and the way the DCS switches are
  wired are this design's own choices.
* The published gate-count formulas (for example 2M(m−1) XORs in stage 2) are
  not reproduced exactly. The p0' tap adds about m XORs per lane.

## Files and simulation

`rtl/`: `ldpc_pkg` (constants and the H1 table), `dcs`, `h1_rom`, `cmmu`,
`h1i_buffer`, `mpsu`, `parity_buffer`, `enc_controller`, `ldpc_encoder` (top).

`tb/`: one self-checking testbench per module, plus `ldpc_ref_pkg`, a
bit-level reference model. The reference solves the block rows one after
another, not by forward/backward substitution. Each testbench prints
`TB_RESULT checks=N failures=M`.

`tb_ldpc_encoder` runs the top at its default parameters. It does three
things:

* checks 18 codewords of all sizes against the reference and with a full
  parity check;
* checks the latency and the back-to-back interval of Z clocks;
* counts input stalls, size switches, stage overlap and coarse rotations,
  and fails if any of them never happens.

Example:

```
verilator --binary --timing --assert rtl/ldpc_pkg.sv rtl/dcs.sv rtl/h1_rom.sv \
    rtl/cmmu.sv rtl/h1i_buffer.sv rtl/mpsu.sv rtl/parity_buffer.sv \
    rtl/enc_controller.sv rtl/ldpc_encoder.sv \
    tb/ldpc_ref_pkg.sv tb/tb_ldpc_encoder.sv --top-module tb_ldpc_encoder
./obj_dir/Vtb_ldpc_encoder
```

`tb_ldpc_throughput` streams ten codewords of each size with no input
gaps. It measures the sustained rate: 12 information bits per clock for
every size, i.e. 480 Mbit/s at 40 MHz.

For a single block, list `rtl/ldpc_pkg.sv`, the block's files,
`tb/ldpc_ref_pkg.sv` and its `tb/tb_<block>.sv`. Each testbench finishes in
well under a second.
