# Exchange-correlation density engine: orbitals and Tr(S·Δ) on one FPGA

In density functional theory, the exchange-correlation term is integrated numerically over a grid
of points around a molecule. Grids of about half a million points are split into blocks of 128 to
512 points. For every point P of a block, the hardware here does two things:

1. It evaluates every atomic orbital as a contracted Cartesian Gaussian:

       chi_klm(P) = r_x^k r_y^l r_z^m · Σ_i C_i exp(-α_i r²)

   Here (r_x, r_y, r_z) is the point's position relative to the atom and r² = r_x² + r_y² + r_z².
   This is the **orbital module**.
2. It forms the density from those orbital values and the density matrix Δ:

       rho(P) = Tr(S·Δ) = Σ_i Σ_j chi_i(P) chi_j(P) Δ_ij

   This is the **S matrix generator**.

The next steps, the potential v = k·rho^(1/3) (computed on the host in the original system) and
the update V = V + S·v·w of the exchange-correlation matrix, are not in this RTL.

The design follows the architecture of the article "FPGA Implementation of Exchange-Correlation
Potential Calculation for DFT", which targets an SGI RASC blade (Virtex-4, on-board SRAM). That
article gives the block diagram, the input data formats, the load sequence and the S-matrix lane
structure. It leaves out widths, handshakes, encodings, FIFO depths, number formats and the
insides of the arithmetic. Those parts are this design's own, and each one is listed under
[Departures and choices](#departures-and-choices).

## Top level: `dft_xc_top`

```
          SRAM (128-bit words)
               │ mem_req/gnt/addr, mem_rvalid/rdata
   ┌───────────▼────────────── orbital_module ─────────────────────┐
   │ control1 ──wr_data──► BRAM_0 {α,C}   BRAM_1 (kw,tp) list       │
   │  (request tracker)   FIFO_0 {ry,rx} FIFO_1 rz FIFO_2 r² FIFO_3 Δ│
   │ control2 ─► ep_unit ─► exp_part FIFO ─┐                         │
   │        └──────────────► T_tp FIFO ────┴► pp_unit ──► chi stream  │
   └──────────────────────────────────────────────┬───────────┬─────┘
                                         chi, end_point   Δ words
                                                  ▼           ▼
                                    smat_gen: NUM_TR_CALC lanes, ping-pong
                                    buffers, shared Δ broadcast, FACC,
                                    facc2float, output FIFO ──► rho stream
```

To run one block:

1. The host writes the serialized vectors into the SRAM.
2. It sets `cfg` (base address and word count of each vector, and the number of Δ passes),
   `n_atoms` and `n_points`.
3. It pulses `start`.
4. `rho` values come out in point order on a valid/ready stream.
5. `load_done` pulses when every SRAM word has been read. `calc_done` pulses when the last
   orbital has left the orbital module.

The monitor outputs `fifo_burst`, `swap`, `orb_stall` and `smat_busy` exist for testbenches and
debug.

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_TR_CALC` | 16 | S-matrix lanes (grid points processed at once). The article reports 1 and 16. |
| `MAX_ORB` | 512 | orbitals per point (size of each ping-pong bank) |
| `FIFO_DEPTH` | 512 | depth of FIFO_0..3 |
| `COEF_DEPTH` | 2048 | (α, C) pairs in BRAM_0: 32 atoms × 64 |
| `KW_WORDS` | 256 | BRAM_1 words of four (kw, tp) pairs each, 1024 pairs |

## Number formats

| Where | Format |
|---|---|
| SRAM | IEEE-754 double |
| Datapath | IEEE-754 single, converted as the words are written into the on-chip memories |
| S-matrix accumulator | 96-bit two's-complement fixed point with 56 fractional bits, converted back to single once per point |
| Output | single |

All fp32 operators:

- round to nearest, ties to even;
- flush subnormals to zero;
- return infinity on overflow.

`fp_exp` computes 2^(x·log2 e) as follows:

1. The fractional part of the exponent gives a 256-entry table index, with entries
   2^(a/256) in Q2.30. The table is computed at elaboration from that formula.
2. A second-order polynomial covers the remainder.

The relative error stays below 2^-21 over the normal range.

## SRAM layout of the input vectors

Every vector starts at its own base address (`cfg.*.base`) and is `cfg.*.words` 128-bit words
long. Bit 0 is the LSB.

| Vector | One 128-bit word holds | Destination |
|---|---|---|
| T_αC | `[63:0]` C_i, `[127:64]` α_i | BRAM_0 (converted to `{α, C}` fp32) |
| T_kw_tp_a | four pairs in `[63:0]`. Pair n sits at `[16n+15:16n]`, with kw in the low byte and tp in the high byte. `[127:64]` is unused. | BRAM_1 |
| T_rx_ry | `[63:0]` r_x, `[127:64]` r_y | FIFO_0 |
| T_rz | two r_z values, the earlier one in `[63:0]` | FIFO_1 |
| T_r2 | two r² values, the earlier one in `[63:0]` | FIFO_2 |
| Δ | two elements, the earlier one in `[63:0]` | FIFO_3 (kept as doubles) |

Coordinates are ordered point by point and, within a point, atom by atom, in the same atom order
as the control list.

### The control list (T_kw_tp_a)

The control list describes the basis once. The same list is walked again for every grid point.

Each atom is a sequence of shells followed by a `(0, 0)` terminator. A shell is a pair
`(kw, tp)`:

- `kw` is the number of primitives (C_i, α_i) in the shell.
- `tp` is the shell type: 1 = s, 2 = p, 3 = d, 4 = f.

The primitives are taken in order from BRAM_0, so BRAM_0 holds the coefficients of all shells of
all atoms, back to back. Take two atoms: the first has shells s(3), p(2), s(1) and the second
has p(2). Their list is:

    (3,1) (2,2) (1,1) (0,0) (2,2) (0,0)

The coefficient pointer returns to 0 at every new grid point. An atom that appears twice in the
molecule also appears twice in the list and in BRAM_0.

Each shell gives 1, 3, 6 or 10 Cartesian orbitals, in the order below. Within a shell, x powers
come before y powers, and y before z.

| Shell | Orbitals |
|---|---|
| s | 1 |
| p | x, y, z |
| d | xx, xy, xz, yy, yz, zz |
| f | xxx, xxy, xxz, xyy, xyz, xzz, yyy, yyz, yzz, zzz |

Normalisation factors are not applied in hardware. The host folds them into C_i.

Δ holds the upper triangle of the N×N density matrix in row order:

    Δ00 Δ01 … Δ0,N-1  Δ11 … Δ1,N-1  …  ΔN-1,N-1

A pass of that triangle occupies ⌈N(N+1)/4⌉ words. It is streamed `cfg.delta_passes` times, once
per group of `NUM_TR_CALC` points, so `cfg.delta.words` is the length of one pass.

## The request tracker (`control1`)

All six vectors reach the chip over one 128-bit read port, and the SRAM answers after a variable
latency. `control1` decides which memory is fed next and remembers where each outstanding word
must go.

It works in this order:

1. **BRAM loads.** After `start` it requests the whole of T_αC, then waits until every word has
   come back and been written into BRAM_0. It does the same for the control list into BRAM_1.
   Nothing is computed until both are complete, because control2 needs random access to them.
2. **FIFO streaming.** Each of FIFO_0..3 asks for data when

       fill level + words in flight + BURST ≤ FIFO_DEPTH

   The FIFO keeps its own in-flight counter, so a burst it has requested but not yet received
   still counts as taken space. A FIFO therefore never overflows, whatever the SRAM latency.
   Among the FIFOs that qualify, FIFO_3 (Δ) is served first, then FIFO_2, FIFO_1 and FIFO_0.
   Each gets a burst of up to `BURST` = 16 consecutive words. `fifo_burst[k]` pulses when a
   burst for FIFO_k starts.
3. **Tagging.** Every granted request pushes its destination onto a tag FIFO (`MAX_OUT` = 32
   entries). Every returning word pops one tag, which selects the write strobe
   (`bram0_we`, `bram1_we` or `fifo_push[k]`) for `wr_data`. The number of requests in flight is
   limited to `MAX_OUT`.
4. **Δ passes.** The Δ read address wraps to `cfg.delta.base` after each pass until
   `delta_passes` passes have been requested.
5. **Completion.** When every word of every vector has been requested and returned, `done`
   (`load_done`) pulses.

The SRAM handshake is as follows:

- A read is issued in a cycle where `mem_req && mem_gnt`.
- Data return in request order, one word per `mem_rvalid`, with any latency.
- `mem_gnt` may drop at any time.

## Walking the basis (`control2`)

`control2` reads BRAM_1 asynchronously at two addresses: the current pair and the next one. The
look-ahead tells it, while it is issuing a shell's last primitive, two things:

- whether the shell ends the atom (next pair is `(0, 0)`);
- whether it ends the point (the terminator is the `n_atoms`-th).

For each primitive it issues (C_i, α_i, r²) to `ep_unit`, one per clock, with `first`/`last`
flags. For each shell it pushes `{tp, end_atom, end_point}` into the T_tp FIFO. It pops one r²
at the end of every atom.

It issues only while `room` is high. `room` means the exp_part FIFO can take every shell already
inside the EP pipeline plus one more. So EP never has to stall mid-pipeline, and a slow consumer
only throttles issue.

## Exponential and polynomial parts

**`ep_unit`** computes Σ_i C_i exp(-α_i r²) for one shell. Its chain is:

1. `fp_mul` (α·r², 2 clocks)
2. `fp_exp` of the negated product (4 clocks)
3. `fp_mul` by C_i (2 clocks)
4. a single-cycle fp32 accumulator that restarts on `first` and emits on `last`

It accepts one primitive per clock, and the shell sum appears 9 clocks after its last primitive.

**`pp_unit`** takes one shell value from the exp_part FIFO, its type from the T_tp FIFO, and the
atom's coordinates from FIFO_0 and FIFO_1. It then emits the shell's 1/3/6/10 orbitals, one per
clock, through three chained multipliers:

1. the first x factor;
2. the second (x or y) factor;
3. the third factor.

Factors that are not needed are replaced by 1.0.

The pipeline is 6 clocks deep. A 16-entry output FIFO with credit counting keeps it running
while the consumer stalls. At `end_atom` the coordinate FIFOs advance. `orb_end_point` marks the
last orbital of a point.

## The S matrix generator (`smat_gen`, `smat_lane`)

### Lanes and the Δ broadcast

The work per point is the N(N+1)/2 upper-triangle terms. The diagonal terms carry weight 1 and
the off-diagonal terms weight 2. The factor 2 is applied to the Δ element as it arrives, by
adding 1 to its exponent. That is exact and needs no multiplier.

`NUM_TR_CALC` lanes each hold a different grid point, and they step through (i, j) in lockstep:

- Each step consumes one Δ element, which is broadcast to all lanes.
- Each lane reads its own chi_i and chi_j.

So Δ is read once per group of `NUM_TR_CALC` points instead of once per point, and the lanes
never wait for each other. One (i, j) step takes one clock. A group of N orbitals takes
N(N+1)/2 clocks plus about 10 clocks of pipeline, if Δ words keep up. Two elements arrive per
128-bit word, so half the SRAM word rate is enough.

A lane (`smat_lane`) has this pipeline:

1. register
2. `fp_mul` (chi_i·chi_j)
3. `fp_mul` (·Δ_ij)
4. `facc`

Its latency is 7 clocks. `facc` adds into the 96-bit fixed-point register, so the sum is exact
for in-range terms and cannot suffer from fp32 swamping over hundreds of thousands of terms.

### Ping-pong orbital buffers

Each lane has two memories, one feeding its chi_i register and one its chi_j register. Each
memory has two banks of `MAX_ORB` words.

While the lanes compute on one bank, the incoming orbital stream writes the next group of points
into the other bank. Each point is written to its own lane, and the length N is taken from
`chi_end_point`. The banks swap, and `swap` pulses, when two conditions hold:

- the write side holds a complete group, or the last partial group of the block;
- the compute side is idle.

If both banks are busy, `chi_ready` drops and the orbital module stalls (`orb_stall`). That
stall runs back through pp_unit's FIFO to `room` and to control2.

### Output

When a group finishes, its lane sums are loaded into a parallel-to-serial register. Each sum
then passes through `facc2float`, a 1-clock conversion to fp32 with RNE, into a 64-entry output
FIFO, in point order. In a partial last group, the lanes without a point compute on stale data
and their sums are dropped.

## Timing summary

| Unit | Latency | Rate |
|---|---|---|
| `fp_mul` | 2 | 1/clock |
| `fp_exp` | 4 | 1/clock |
| `ep_unit` (last primitive to sum) | 9 | 1 primitive/clock |
| `pp_unit` (shell to first orbital) | 6 | 1 orbital/clock |
| `smat_lane` | 7 | 1 term/clock |
| `facc` / `facc2float` | 2 / 1 | 1/clock |
| `fp_f2f` | combinational | — |

Two full-size runs use all defaults and a random-latency SRAM model:

- Water (6-31G, 3 atoms, 13 orbitals, 512 points) takes 12,927 clocks from `start` to the last
  density.
- The largest basis (32 atoms, 2048 primitives, 512 orbitals, 512 points) takes 4,238,696
  clocks. That is 32 groups of about 131,350 clocks, each set by the 131,328 upper-triangle
  steps. Δ streaming and orbital generation for the next group stay hidden behind the computation.

## Departures and choices

**What follows the article:**

- the block set of the orbital module (Control 1/2, BRAM_0/1, FIFO_0..3, EP, PP, exp_part and
  T_tp FIFOs, double-to-single converters);
- the load order of the request tracker's state diagram;
- the serialized formats of T_αC, T_rx_ry and the (kw, tp) list with its (0, 0) atom terminators;
- the size limits: 32 atoms, 64 coefficients per atom, 512 points, 512 orbitals;
- the lane structure of the S generator, the use of symmetry, the ping-pong buffers and the
  parallel lanes on different points;
- conversion to IEEE-754 at the output.

**This design's own:**

- all port lists and handshakes (valid/ready, start/done, the SRAM req/gnt/rvalid port);
- the asynchronous active-low reset (it clears control state only);
- FIFO depths, burst length and request threshold;
- the FIFO priority order;
- the tp code for f (4);
- reading kw as a primitive count, with the coefficient list repeated per atom;
- the Cartesian orbital order;
- coordinate order;
- packing two r_z / r² / Δ values per word;
- the Δ order and the once-per-group re-reading;
- the fp32 format with RNE and flush-to-zero (the article only says "single precision" and
  "adjustable precision");
- the exp algorithm (the article uses an external exp core);
- the fixed-point accumulator width;
- the split of each lane's buffers into a chi_i memory and a chi_j memory, each with two banks.
  That is four 512×32 banks per lane, where the article's resource table shows two block RAMs
  per lane.

**Not included:**

- normalisation constants, which the host folds into C_i;
- the potential v = k·rho^(1/3), which the article leaves to the host;
- the V matrix update, for which the article gives only the formula and no hardware;
- the host-side data formatting;
- the RASC interface ASIC, SRAM controller and board infrastructure.

The article places the orbital module and the S generator on the two FPGAs of the blade. Here
they are connected directly inside one top level.

## Files

`rtl/`:

| File | Contents |
|---|---|
| `dft_pkg.sv` | types and the fp32 helper functions |
| `fp_f2f.sv`, `fp_mul.sv`, `fp_exp.sv` | arithmetic |
| `facc.sv`, `facc2float.sv` | fixed-point accumulator and its conversion to fp32 |
| `sync_fifo.sv` | first-word-fall-through FIFO |
| `control1.sv`, `control2.sv`, `ep_unit.sv`, `pp_unit.sv`, `orbital_module.sv` | orbital module |
| `smat_lane.sv`, `smat_gen.sv` | S matrix generator |
| `dft_xc_top.sv` | top level |

`tb/`:

- `tb_dft_pkg.sv` holds the reference models. It has real-number conversions and a host class
  that builds a molecule, the grid, all serialized vectors and the expected orbitals and
  densities in double precision.
- `rasc_sram_model.sv` is a behavioural SRAM with random grant and random in-order latency.
- There is one `tb_<module>.sv` per module, plus `tb_smat_gen_1.sv` (single-lane configuration),
  `tb_water.sv` and `tb_max_molecule.sv`.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
        rtl/dft_pkg.sv tb/tb_dft_pkg.sv tb/tb_water.sv --top-module tb_water -o sim
    ./obj_dir/sim

Replace `tb_water` with any other testbench name. Testbenches seed their random stimulus from
`$urandom`.

## Verification status

All results below were produced with the RTL as it stands. Each block's testbench was also run
against a copy of the block with a deliberate bug, and it reported failures every time.

| Testbench | Checks | What it covers |
|---|---|---|
| `tb_fp_f2f` | 3010 | random doubles incl. rounding ties, overflow, underflow |
| `tb_fp_mul` | 3011 | random and edge operands against an exact RNE model, latency |
| `tb_fp_exp` | 3377 | exp over the normal range plus underflow/overflow, relative error ≤ 2^-21, latency |
| `tb_facc` / `tb_facc2float` | 401 / 3001 | sums of mixed-sign values, conversion rounding |
| `tb_sync_fifo` | 5001 | random push/pop against a queue, full/empty |
| `tb_ep_unit` | 601 | shells of 1–8 primitives with gaps |
| `tb_pp_unit` | 1431 | s/p/d/f orbitals, ordering, back-pressure |
| `tb_control2` | 267 | control-list walk, end_atom/end_point, throttling |
| `tb_control1` | 1144 | load order, no FIFO overflow, tag routing, Δ passes (depth 64, burst 8) |
| `tb_orbital_module` | 916 | all orbitals of a mixed molecule against the double-precision model |
| `tb_smat_lane` | 61 | lane sums and latency |
| `tb_smat_gen` / `tb_smat_gen_1` | 12 / 5 | 4 lanes (MAX_ORB 64) and 1 lane: densities, swaps, writer stall, Δ consumption, throughput |
| `tb_dft_xc_top` | 42 | end to end at defaults: s/p/d/f and an f shell with 6 primitives, 40 points |
| `tb_water` | 514 | end to end at defaults: water 6-31G, 512 points |
| `tb_max_molecule` | 514 | end to end at defaults: the largest sizes the design is built for (32 atoms × 64 primitives, 512 orbitals, 512 points) |

`tb_dft_xc_top` also counts each flow-control mechanism and requires every one of them to occur:

- bursts on each of FIFO_0..3 (8/4/4/60 in a typical run);
- buffer swaps (3);
- orbital stalls from the S generator (95);
- cycles where EP issue was throttled (404);
- stalls on the density output (13).

Densities are compared with a double-precision reference at a relative tolerance of 1e-4 of the
sum of absolute terms.

