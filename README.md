# SIMD interconnection networks: recirculating, multistage and pipelined

An SIMD machine with N = 2^n processing elements (PEs) moves data between
PEs through an interconnection network. Each PE writes a word into its
transfer register DTRin; the network carries every word to another PE's
DTRout in one operation. This RTL builds three families of interconnection
functions, and builds each family the ways it can be built, so that you can
compare them:

* **Cube**: `Cube_i(p)` complements bit i of the address.
* **Shuffle-Exchange**: `Shuffle(p)` rotates the address left by one bit.
  `Exchange(p)` complements bit 0.
* **Plus-Minus 2^i (PM2I)**: `PM2±i(p) = p ± 2^i mod N`.

Each family comes in one or more of these forms:

* **recirculating**: a single stage of switches. Data go round it through
  DTRout, one function per pass, until they reach their destination.
* **multistage**: n stages of combinational switches. One pass routes a
  whole permutation.
* **pipelined multistage**: a register after each stage. A word cut into S
  segments then streams through the network, one segment per clock.

Two things in the design are new compared with a plain SIMD network:

* **Independent function control** for the recirculating networks. Each PE
  has its own control register, so in one pass different PEs can use
  different functions, and one PE can use several functions at once.
* **The Shuffle-No Shuffle-Exchange (SNSE) network.** Each stage of this
  multistage network may shuffle or not, then exchange or not. One pass can
  therefore perform any sequence of up to n recirculating Shuffle-Exchange
  steps, including a single Shuffle. A plain n-stage Shuffle-Exchange
  (omega) network cannot perform a single Shuffle.

The default size is N = 1024 PEs (n = 10 stages) and a data word of W = 32
bits. Segmented transfers use S = 4 segments of B = 8 bits.

## Top level: `simd_icn_top`

The networks are alternatives for the same machine. The top therefore holds
them side by side, each with its own ports:

| path | ports | contents | time per transfer |
|---|---|---|---|
| 1 | `seg_*` | shift-register DTRin → pipelined Generalized Cube, B bits wide → shift-register DTRout | n + S − 1 clocks |
| 2 | `cmb_*` | W-bit DTRin with S-to-1 mux → combinational Generalized Cube, B bits wide → 1-to-S demux into W-bit DTRout | S clocks, each as long as the whole network |
| 3 | `pm2i_*` | combinational multistage PM2I network, 1 bit wide | combinational |
| 4 | `snse_*` | combinational SNSE network, 1 bit wide | combinational |
| 5 | `rc_*`, `rp_*`, `rs_*` | recirculating Cube, PM2I and Shuffle-Exchange networks, 1 bit wide, each with DTRin, DTRout and per-PE control registers | 1 clock for the DTRin load + 1 clock per pass |

The PEs and the SIMD control unit(s) are outside the design. The top's
ports are their side: the PEs load DTRin and read DTRout, and the control
units drive the network controls. All sequential logic uses `clk` and an
asynchronous active-low `rst_n`. Every register is cleared by reset.

All vectors are packed arrays indexed by PE, stage or box number, for
example `logic [N-1:0][W-1:0] seg_word_in` and
`logic [n-1:0][N/2-1:0] seg_ctrl`.

## Multistage Generalized Cube (`cube_stage`, `gcube_network`)

An `interchange_box` is a 2×2 switch. It passes its inputs straight
(`ctrl=0`) or swapped (`ctrl=1`). Stage i holds N/2 boxes. Box k joins
the two lines whose addresses differ only in bit i. The lower line's
address is k with a 0 inserted at bit position i (`icn_pkg::insert_zero`).

Stages run from n−1 at the input down to 0 at the output. Every box has its
own control bit (individual box control), in `ctrl[stage][box]`. Setting a
whole row alike gives individual stage control. Two controls are useful:

* If every box of stage i is set to bit i of c, the network performs the
  permutation p → p XOR c.
* For a destination tag route, walk a word from stage n−1 down to stage 0.
  Set a box wherever the word's current address bit differs from the
  destination bit.

Width B > 1 stacks B identical one-bit planes that share the controls.

## Pipelined network and segmented DTRs

A word of W bits can cross a network only B = W/S bits wide, in S
segments. Two DTR arrangements are built:

* **Shift-register DTRs** (`dtr_in_piso`, `dtr_out_sipo`). DTRin is B
  registers of S bits. Register k holds word bits (k+1)S−1 … kS. Each clock,
  bit k of the segment is the LSB of register k, and every register shifts
  one place toward its LSB. Segment t therefore carries bits kS + t.
  DTRout mirrors this: each register takes its input bit at its MSB. After
  S shifts the word is whole again.
* **Multiplexed DTRs** (`dtr_seg_mux`). Full W-bit registers, with an
  S-to-1 segment mux into the network and a 1-to-S demux out of it.
  Segment t is word bits tB+B−1 … tB. A load restarts both segment indices.

`pipelined_gcube` puts a register after stages n−1 … 1. Stage 0 feeds
DTRout directly, so DTRout is the n-th pipeline stage. A segment that
enters in clock c is captured by DTRout at the end of clock c + n − 1.

`seg_pipe_ctrl` sequences a transfer. `start` begins it, with DTRin already
loaded:

* `in_shift` is high in clocks 0 … S−1.
* `out_shift` is high in clocks DEPTH−1 … DEPTH+S−2.
* `busy` covers the transfer and `done` pulses once at the end.
* A `start` while busy is ignored.

With DEPTH = n, a pipelined transfer takes n + S − 1 clocks, which is
Tp = (dr + dms)(n + S − 1). With DEPTH = 1 (path 2), a combinational
transfer takes S clocks. Each of those clocks must be as long as the whole
network: Tm = S(n·dms + 2dr). The network's box controls must stay constant
for the whole transfer.

For the per-segment time, each path is cheaper in one regime. The pipeline
costs (n+S−1)(dms+dr)/S per segment. The combinational network costs
n·dms + 2dr. With dms = dr and n = 10 the two are equal near S ≈ 2, and the
pipeline wins for longer blocks.

## Multistage PM2I (`pm2i_stage`, `pm2i_network`)

This is a data-manipulator network. Stage i lets each row j send its data
on up to three lines:

* `en[i][j][0]`: straight on, to row j.
* `en[i][j][1]`: to row j + 2^i.
* `en[i][j][2]`: to row j − 2^i.

Each receiver ORs the three lines that can reach it. A row can therefore
broadcast, and colliding data are ORed. Stage n−1 is at the input. A
uniform shift by d sets stage i to +2^i for every 1-bit of d. A negative
shift uses −2^i in the same way.

## Recirculating networks (`recirc_network` and the single stages)

`recirc_network #(.KIND(...))` is the recirculating model. Its parts:

* a DTRin register;
* a source mux that feeds the network from DTRin (first pass) or from
  DTRout (`src_dtrout=1`, recirculation);
* one single-stage network;
* a DTRout register, written at the end of every clock in which `pass` is
  high.

An M-function transfer takes M + 1 clocks after the data are ready: one to
load DTRin and one per pass. This matches dr + M(dr + dm + drn).

Each PE's control register (`ctrl_we` loads them all) holds:

* an **active** bit. Only active PEs send, but every PE receives.
* a **function set** with one bit per function. The PE sends on every
  function whose bit is set, so it can reach several PEs in one pass.

| KIND | functions (bit order of `ctrl_fn`) | single stage |
|---|---|---|
| `NET_CUBE` | bit i = Cube_i, n bits | `recirc_cube_net` |
| `NET_PM2I` | bits 0…n−1 = PM2+i, bits n…2n−2 = PM2−i for i < n−1, so 2n−1 bits (PM2−(n−1) is PM2+(n−1)) | `recirc_pm2i_net` |
| `NET_SE` | bit 0 = Shuffle, bit 1 = Exchange | `recirc_se_net` |

Conventional SIMD control is the special case where every register holds
the same function. The single stages replace the tri-state, OR-tied
drivers of a discrete build with AND-OR logic. Each receiver gets the OR of
everything sent to it, plus a `rx_valid` flag. A PE that nobody sends to
keeps its old DTRout, and `dtrout_valid` shows whether the last pass wrote
it.

**Partitioning.** The recirculating Cube can be split into groups of 2^r
PEs that share their n−r upper address bits. Simply never enable
Cube_r … Cube_{n−1}. Because the control registers are per PE, each group
can run its own function sequence (multiple-control partitioning). Two
groups that differ only in bit r merge into one group of 2^{r+1} PEs once
Cube_r is allowed. The recirculating PM2I partitions on the n−r *lower*
bits in the same way, using only PM2±i for i ≥ n−r. No extra hardware is
involved: it is a rule for the control registers.

## SNSE network (`snse_stage`, `snse_network`)

Each stage has two paths for every pair of rows 2k, 2k+1:

* the no-shuffle path: an interchange box controlled by `ex[s][k]`;
* the shuffle path: the shuffled data pass through a box controlled by
  `exs[s][k]`.

One `shuffle[s]` bit per stage selects the path for all rows. Stage 0 is
the input. The four options per stage are nothing, Exchange, Shuffle and
Shuffle-Exchange. No broadcast is possible.

To run x steps of a recirculating Shuffle-Exchange, pack them into stages.
A stage takes an optional Shuffle followed by an optional Exchange. The x
steps then need at most ⌈x/n⌉ passes. With every `shuffle` bit set, the
network is the n-stage Shuffle-Exchange (omega) network.

## Where this RTL departs from, or adds to, the source design

* The networks are synchronous RTL. Gate-level circuits (NAND boxes,
  AND-OR-INVERT packages, tri-state buffers) are described by their
  logic function. The source's chip counts and nanosecond delays therefore
  do not apply.
* PM2I control uses three enables per row per stage.
* The valid flags, "keep DTRout when not reached", the segment
  sequencer, the reset, and the control-register load strobe are this
  design's own.
* The recirculating PM2I has 2n−1 drivers per PE. A count of 2N(n−1)
  drivers in total would imply one fewer.
* DTRout in the shift-register form is built from B registers of S bits,
  mirroring DTRin.
* S = 4 is a chosen default. The source evaluates S = 1, 4, 8 and 16.
* The multistage Shuffle-Exchange (omega) network is not a separate module.
  It is the SNSE network with all shuffle bits set, which is topologically
  equivalent to the Generalized Cube.
* Pipelined controls are static. The source does not say how box controls
  would travel with segments, so different words cannot follow each other
  through the pipe with different routes.

## Files

`rtl/icn_pkg.sv` holds the address functions and the `net_kind_e` enum,
and is compiled first. Each other module is in `rtl/<module>.sv`, and each
has a self-checking testbench `tb/tb_<module>.sv`. The testbenches compare
against software models written in the testbench, and print
`TB_RESULT checks=N failures=M`.

`tb/tb_simd_icn_top.sv` runs every path of the top end to end at N = 16.
It counts each mechanism it exercises: pipeline overlap, ignored restart,
multiplexed segments, PM2I shift and broadcast, a single-pass SNSE Shuffle,
the omega setting, first pass and recirculation, independent function
control, PE broadcast, inactive PEs, and DTRout hold. A mechanism that
never happened counts as a failure.

`tb/tb_seg_sizes.sv` sweeps S = 1, 4, 8 and 16 on four 16-PE tops, using
the helper `tb/seg_size_check.sv`. For each S it checks the routed words and
both clock counts: n + S − 1 pipelined and S combinational.

`tb/tb_recirc_partition.sv` splits a 16-PE machine into four groups of four.
Under the Cube each group runs its own function sequence, and so it does
under PM2I. No word may leave its group. The test then merges two groups as
described above.

`tb/tb_simd_icn_top_n128.sv` runs the same test on a 128-PE machine, the
smaller size of the equal-cost comparison. This is the largest size
simulated end to end. The default size (N = 1024) is checked by lint and
elaboration only.

## Simulating

```
verilator --binary --timing --assert -Irtl -Itb rtl/icn_pkg.sv tb/tb_gcube_network.sv \
    --top-module tb_gcube_network -o sim && obj_dir/sim
```

Any other testbench works the same way: replace both names. `-Irtl` and
`-Itb` let verilator find the modules a testbench uses, including the
testbench helper `seg_size_check`.

For lint, run:

```
verilator --lint-only -Wall -Irtl rtl/icn_pkg.sv rtl/simd_icn_top.sv
```

The remaining lint warnings come from a few places. The 10-kbit-wide reset
constants exceed verilator's replication warning limit. The assertion's
`disable iff` uses `rst_n`, which is also an asynchronous reset. And with
`DEPTH = 1` the sequencer has a constant comparison.

The unit tests use N = 16 or 32, which routes every address bit pattern of
a small machine. The RTL itself is written for any power-of-two N.

The design is fully unrolled, so at N = 1024 verilator generates over
a hundred C++ files for the top. A single-threaded build of an end-to-end
testbench at that size did not finish within half an hour. Build with `-j`
(or `--build-jobs`) and expect a long compile.
