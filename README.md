# Flex-Sphere: a configurable sort-free MIMO sphere detector

A MIMO receiver sees `y = H s + n`. It has to find which vector of
constellation points `s` the transmit antennas sent. The antennas may belong
to one handset or to several users. Searching every candidate (maximum
likelihood) grows exponentially with antennas and modulation order. A K-best
detector keeps the K best nodes of each tree level, but it must sort K·√w
candidates at every level, which is slow.

This detector avoids the sort:

* the first two tree levels are expanded completely (8 × 8 = 64 nodes for
  64-QAM);
* below them, each of the 64 paths keeps only its closest child. The closest
  child comes from a single rounding step (Schnorr-Euchner), with no
  comparison among siblings;
* at the last level one minimum search over the 64 paths picks the answer.

The hardware is built for the largest case, 4 streams of 64-QAM. Two inputs
change it at run time, for each job:

* **M_T**, the number of streams: 2, 3 or 4;
* **q(i)**, the largest real constellation value of each level: 1, 3 or 7,
  for 4-, 16- or 64-QAM.

Each stream may use its own modulation.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It reproduces the
structure, block latencies and throughput of the published FPGA design.
The arithmetic inside each block is written here from the equations,
because only the block boundaries and one slicer circuit are published.

## The tree search in real numbers

The complex model is split into real and imaginary parts, giving a real
system with `M = 2·M_T` levels. The in-phase and quadrature parts of one
complex symbol sit on two neighbouring levels. This is the modified
real-valued decomposition (M-RVD) of `fs_mrvd`:

* `ŷ = (Re y₁, Im y₁, Re y₂, Im y₂, …)`;
* each complex channel entry `h` becomes the 2 × 2 block `[Re h, −Im h; Im h, Re h]`.

The conventional order would put all real parts first and all imaginary
parts second. The QR decomposition of the real channel `Ĥ` then yields the
detector's `R`; it is not part of this RTL. The M-RVD order matters in two
ways:

* the two fully expanded levels are exactly one complex symbol (all 64
  points of 64-QAM);
* a system with fewer streams simply ends earlier in the tree.

After the QR decomposition `H = QR`, with `y' = Qᴴy`, the distance splits
level by level (levels `i = M … 1`):

```
b_{i+1} = y'_i − Σ_{j>i} R_ij · s_j          (symbols already chosen above)
e_i     = b_{i+1} − R_ii · s_i
T_i     = T_{i+1} + |e_i|                    (partial Euclidean distance, PED)
```

Distances use the l1 norm `|e|`, not the square, so no squarers are needed.
Each real symbol is one of the odd values −7 … 7. Level i allows only
`|s_i| ≤ q(i)`.

**Closest child (slicer).** For the levels below the first two, the best
child of a node is the odd value nearest to `b = b_{i+1} / R_ii`, clamped to
the modulation:

```
s_i = g( 2·round((b + 1) / 2) − 1 ),    g(x) = min(max(x, −q), q)
```

The pipeline computes `b` as `b_{i+1} · (1/R_ii)`. The reciprocal of each
diagonal element comes from the pre-processing together with `R`. The `/2`
and `·2` are one-bit shifts. `round` is round-half-up. The pipeline holds:

1. an input register;
2. `+1`;
3. `>>1`, a cast to integer, `<<1` and the registered `−1`;
4. two comparisons against `−q` and `q`;
5. a registered select.

This takes 5 cycles (`fs_se_slicer`).

**Fully expanded levels.** On levels M and M−1, candidates outside the
level's modulation get the maximum PED (all ones). They can never win the
final minimum, and the saturating PED addition keeps them at the maximum
further down.

## Pipeline, rows and folding

```
           +-------+     +-------+   +-------+         +-------+
 job  -->  | PED_1 | -+->| PED_2 |-->| PED_g |-- ... ->| PED_g |--+
 (R,y',    | i = 8 |  |  | i = 7 |   | i = 6 |         | i = 1 |  |
 1/R,q,    +-------+  |  +-------+   +-------+         +-------+  |
 M_T)                 |     ... 8 rows, one per child of PED_1 ... |
                      |                 taps after i = 5, 3, 1 ----+--> Min_Finder --> s, PED
```

* **PED_1** (`fs_ped1`) computes the 8 children of the root in parallel.
  Child c has `s_8 = 2c − 7` and feeds row c.
* **PED_2** (`fs_ped2`, 8 instances) computes the 8 children of its parent
  in parallel. It sends them out **one per cycle**: child c leaves in
  cycle c and is flagged `first` (c = 0) or `last` (c = 7).
* **PED_g** (`fs_pedg`, 8 per level, 6 levels) takes one node per cycle and
  replaces it with its closest child.
* **Min_Finder** (`fs_min_finder`) has a multiplexer on each of its 8 inputs
  that picks the row's output after level 5, 3 or 1, according to the job's
  M_T. Each cycle a 3-level compare-select tree finds the best of the 8
  rows. A running minimum over the 8 cycles of the job finds the best of
  all 64 paths. On equal PEDs the lower row and the earlier cycle win.

Every row therefore handles the 8 nodes of a job in 8 consecutive cycles.
This is a folding factor F = 8: a new job may start every 8 cycles, and
each job delivers `M_T · log2(w)` bits. With 4 streams of 64-QAM that is
24 bits per 8 cycles, or 3 bits per clock. The published FPGA clock of
285.71 MHz gives 857 Mbit/s. This RTL has not been characterised on an
FPGA.

### Latency

Each block has the latency of the published design: PED_1 7, PED_2 17,
PED_g 22 and Min_Finder 8 cycles. Another 8 cycles go to the input register
and to the 7 extra cycles that the folded nodes of a row need. A job
offered and taken in cycle 0 gives `out_valid` in cycle

| M_T | levels | latency (cycles)             |
|-----|--------|------------------------------|
| 2   | 8 … 5  | 8 + 7 + 17 + 2·22 + 8 = 84   |
| 3   | 8 … 3  | 8 + 7 + 17 + 4·22 + 8 = 128  |
| 4   | 8 … 1  | 8 + 7 + 17 + 6·22 + 8 = 172  |

The arithmetic needs fewer registers than that: 3 in PED_1, 5 in PED_2 and
10 in PED_g (including the 5-cycle slicer). A delay line (`fs_delay`) pads
each block to its latency. The latencies are parameters of `flex_sphere`
(`LAT_PED1`, `LAT_PED2`, `LAT_PEDG`, `LAT_MF`). Each block checks at
elaboration that its parameter is not below its own pipeline depth. The
issue control and the testbenches follow the parameters.

## Changing M_T on the fly, stalls and job ids

Nodes of a job with fewer streams stop being valid after the job's last
level. They reach the Min_Finder earlier, so a 2-stream job started after a
4-stream job can arrive at the Min_Finder in the same cycles.
`fs_issue_ctrl` prevents that collision:

* It keeps a reservation vector of future Min_Finder cycles (bit d means
  "busy d cycles from now").
* A job with M_T streams needs the 8 cycles starting
  `OFF(M_T) = 1 + LAT_PED1 + LAT_PED2 + 2(M_T−1)·LAT_PEDG` cycles after it
  is taken.
* `in_ready` is low while those slots are taken, or while fewer than 8
  cycles have passed since the last job.

With a constant M_T the detector takes a job every 8 cycles without
stalls. After a switch from more to fewer streams, a job can wait. Results
can then leave out of order, so each result carries the id (`in_uid`)
given with its job.

The parameters of a job (R, 1/R_ii, y', q, M_T, id) go into a store of 32
entries, addressed by a tag that travels with every node. Each stage reads
its own row of R from the store when the job's nodes reach it. 32 entries
cover the longest latency (172 cycles) at one job per 8 cycles.

## Number formats

Package `fs_pkg` holds the sizes:

| item                       | format                                  |
|----------------------------|-----------------------------------------|
| R, 1/R_ii, y'              | 16-bit two's complement, 8 fraction bits (range ±128) |
| symbols                    | 4-bit signed, odd values −7 … 7          |
| internal sums, b           | 26-bit signed, 8 fraction bits          |
| PED                        | 24-bit unsigned, saturating, all ones = discarded |

* `b_{i+1}·(1/R_ii)` is truncated back to 8 fraction bits.
* It is limited to ±(2²⁴−1) before slicing, so a very large value still
  clamps to the correct edge of the constellation.
* The 16-bit word length matches the published design. The position of the
  binary point and the internal widths are this implementation's choice.

## Interface of `flex_sphere`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | job handshake; a job is taken in a cycle with both high |
| `in_r[i-1][j-1]` | in | R_ij. Only the upper triangle j ≥ i is read. |
| `in_rinv[i-1]` | in | 1/R_ii |
| `in_y[i-1]` | in | y'_i |
| `in_q[i-1]` | in | q(i): 1, 3 or 7 |
| `in_mt` | in | M_T: 2, 3 or 4 |
| `in_uid` | in | 8-bit job id |
| `out_valid` | out | one-cycle pulse per job |
| `out_uid`, `out_mt` | out | id and M_T of the job |
| `out_s[i-1]` | out | detected real symbol of level i (0 for levels the job does not use) |
| `out_ped` | out | l1 distance of the detected vector |
| `in_hc_re`, `in_hc_im`, `in_yc_re`, `in_yc_im` | in | complex 4 × 4 channel and received vector for the M-RVD front end |
| `out_h_mrvd`, `out_y_mrvd` | out | the real model `Ĥ`, `ŷ`, one cycle later, for the external QR pre-processing |

With fewer than 4 streams the system occupies levels `M−2·M_T+1 … M`, the
lower right corner of R. In M-RVD order, level 2k−1 is the in-phase part
and level 2k the quadrature part of complex symbol k. The quantities come
from the QR decomposition and ordering of the channel, which is not
included here.

## Files

| file | content |
|------|---------|
| `rtl/fs_pkg.sv` | sizes, node and coefficient structs, shared functions |
| `rtl/flex_sphere.sv` | top: job store, PED_1, 8 × PED_2, 6 × 8 PED_g, Min_Finder |
| `rtl/fs_ped1.sv`, `rtl/fs_ped2.sv`, `rtl/fs_pedg.sv` | PED blocks |
| `rtl/fs_se_slicer.sv` | closest-point slicer |
| `rtl/fs_min_finder.sv` | tap multiplexers and minimum search |
| `rtl/fs_issue_ctrl.sv` | job admission (rate and Min_Finder slots) |
| `rtl/fs_mrvd.sv` | M-RVD front end (complex to interleaved real model) |
| `rtl/fs_delay.sv` | delay line |
| `tb/fs_ref_pkg.sv` | integer reference model and random job generator |
| `tb/tb_*.sv` | self-checking testbenches, one per block and one for the top |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=F` and stops. A watchdog
ends it with a failure if it hangs. Example for the whole detector, at its
default parameters:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fs_pkg.sv tb/fs_ref_pkg.sv rtl/fs_delay.sv rtl/fs_se_slicer.sv \
  rtl/fs_pedg.sv rtl/fs_ped1.sv rtl/fs_ped2.sv rtl/fs_min_finder.sv \
  rtl/fs_issue_ctrl.sv rtl/fs_mrvd.sv rtl/flex_sphere.sv tb/tb_flex_sphere.sv \
  --top-module tb_flex_sphere -o vtb && ./obj_dir/vtb
```

Each testbench checks its block against values it works out itself:

* **`tb_flex_sphere`** sends 64 jobs with random channels, random M_T and
  random modulation per stream. It checks every detected vector and PED
  against the reference model (`fs_ref_pkg`), which tries every allowed
  value instead of slicing. It also checks:
  * the latency of 84, 128 or 172 cycles;
  * one job per 8 cycles while M_T stays constant;
  * that every M_T, every modulation, a stall, an out-of-order result, a
    slicer clamp and a discarded candidate all occur.

  The jobs are generated with little noise, so the sent vector is
  normally recovered. The testbench reports how often, but does not fail
  on it.
* **`tb_flex_sphere_rates`** runs each of the nine pairs (2, 3 or 4
  streams; 4-, 16- or 64-QAM) back to back. It checks the accepted bits
  per cycle against the published rate table divided by the published
  285.71 MHz clock. All nine agree within 0.1 % (for example 3.0
  bits/cycle for 4 streams of 64-QAM, which gives 857.1 Mbit/s).
* **`tb_flex_sphere_ber`** measures the bit error rate over a Rayleigh
  fading channel. For each vector it:
  * draws a complex channel, Gray-coded symbols and Gaussian noise;
  * passes H and y through the M-RVD ports;
  * QR-decomposes the result in the testbench (modified Gram-Schmidt in
    floating point, with no stream ordering);
  * sends the quantised R, 1/R_ii and y' to the detector.

  It uses 2000 vectors per point, with 4 receive antennas. Every result
  must equal the reference model, and the BER must fall as SNR rises.
  SNR here is the received signal power per antenna over the noise power.
  One run gave:

  | streams | QAM | BER (low SNR)     | BER (high SNR)      |
  |---------|-----|-------------------|---------------------|
  | 4       | 64  | 1.1e-1 at 20 dB   | 1.2e-3 at 32 dB     |
  | 4       | 16  | 1.8e-1 at 10 dB   | 5.5e-3 at 22 dB     |
  | 3       | 16  | 1.1e-1 at 10 dB   | 4.6e-4 at 22 dB     |

  The published curves used an extra channel ordering step and a
  different setup, so these numbers are not comparable with them.
* **`tb_fs_mrvd`** checks that `Ĥ·ŝ` equals `(Re, Im)` of the complex
  `H·s` for random values.
* **`tb_fs_se_slicer`** compares the slicer with a brute-force nearest
  point search, including exact ties and values far outside the
  constellation.
* **`tb_fs_ped1`, `tb_fs_ped2` and `tb_fs_pedg`** check every output node
  and its timing. `tb_fs_ped2` checks that the children leave one per
  cycle with their flags. `tb_fs_pedg` feeds junk into the unused part of
  the row, which must be ignored.
* **`tb_fs_min_finder`** feeds decoy nodes on the taps of other M_T
  values and forces ties, and checks the result and its latency of 8.

## Where this departs from, or goes beyond, the published design

* **Inside the blocks.** The internal pipelines of PED_1, PED_2, PED_g and
  the Min_Finder are not published; only their latencies and roles are.
  Here they are shallow pipelines padded to those latencies. The slicer
  follows the published circuit.
* **Distance and multipliers.** The l1 norm is used. The products
  `R_ij·s_j` and `b·(1/R_ii)` are real multipliers, as on an FPGA with DSP
  blocks.
* **1/R_ii** is an input from the channel pre-processing. No divider is
  built.
* **Added by this design:** the job store, the valid/ready handshake, the
  Min_Finder slot reservation with its stalls, and job ids for
  out-of-order results. The published design only states that M_T and q may
  change at any time.
* **Not included:**
  * the channel pre-processing after the M-RVD step: QR decomposition,
    ordering of the streams, `Qᴴy` and `1/R_ii`. The M-RVD outputs are
    brought out as ports, and the pre-processing results come back in as
    job inputs;
  * the FPGA board and radios the design was prototyped on.
* **Not reproduced:** the bit error rate results and the clock frequency.
  The RTL is checked against an exact integer model of the same fixed-point
  algorithm, not against floating-point BER curves.
