# A multi-style, multi-frequency FPGA fabric

Commercial FPGAs are built for one global clock. This fabric keeps a
conventional synchronous FPGA (LUT logic blocks, slices, CLBs, switch-matrix
routing, a global clock tree) and adds a small amount of hard logic that
also lets it run **bundled-data asynchronous** circuits, where each pipeline
stage is clocked by its own handshake instead of a global clock:

* one hard **two-phase handshake controller** per cluster, built around a
  C-element, with a **programmable delay element (PDE)** on its outgoing
  request;
* one **pulse generator** per cluster, which turns every transition of a
  two-phase request (rising *or* falling) into one rising clock edge for
  ordinary registers;
* a **local clock** choice in every logic block, so its register can run
  from the global clock or from a clock routed through the interconnect.

The data path of an asynchronous design is placed and routed exactly like a
synchronous one; only the clocks differ. Synchronous logic on the global
clock, asynchronous stages each at their own speed, and logic on other
routed clocks can share one fabric, hence *multi-style* and
*multi-frequency*.

The RTL describes the full test fabric: six clusters in a 2 x 3 grid, each
with five CLBs (ten slices, twenty 6-input LUTs), one controller block and
one pulse generator, plus a configuration memory that holds the bitstream.

## How an asynchronous stage runs on the fabric

This is the part that differs from any ordinary FPGA, so it is described
first.

In a bundled-data pipeline every stage has a data register and a
controller. The controller of stage *i* exchanges request/acknowledge with
its neighbours and produces the clock of the stage's register. With
**two-phase** signalling, each *transition* of a request wire means "new
data"; nothing returns to zero. This halves the transitions per transfer
compared with four-phase signalling.

`lcbm_controller` holds one C-element state `c`:

```
c follows lr when lr != ra, otherwise holds        (C-element of lr and ~ra)
la = rr = clk = c
```

A new request (lr toggles) is taken only once the right-hand side has
acknowledged the previous one (ra equals the last rr). Taking it toggles
`c`, which at once acknowledges the left side (`la`), announces data to the
right (`rr`) and marks the capture (`clk`).

Inside a cluster the stage is assembled from configurable parts:

```
 lr --> [controller] --clk--> [pulse_gen] --pulse--> global switch --> CLB local
   <-- la    |                                                        interconnect
             +--rr--> [PDE] --> rr (to next stage)                    (l_clk aux wire)
                                                                            |
 data ---------------- global switch --> LUT pins --> register (clocked on l_clk)
```

1. The controller's `clk` output is routed to the cluster's pulse generator.
2. The pulse (one short high pulse per transition) is routed to a global
   input of a CLB and selected there as the local clock `l_clk`.
3. The logic blocks of that stage are configured to use `l_clk`; their
   registers load on its rising edge.
4. `rr` passes through the PDE before leaving the controller block. The PDE
   delay, plus any delay built from routing or spare LUTs, must exceed the
   data-path delay of the next stage so that its data are valid before
   its capture pulse. This is the relative-timing constraint
   `req_i rising -> data at L(i+1) + margin  before  clk of L(i+1)`.

The controller block is also wired into the local interconnect of one CLB
(CLB 1 of each cluster), so its `la`, `rr` and `clk` can drive that CLB's
bypass, clock or enable inputs directly.

**Timing in this RTL.** The logic is zero-delay, so relative timing holds
as long as every PDE tap is at least one unit. The PDE and pulse generator
are behavioural models with real delays (`pde`: (tap+1) x `TAP_DELAY`,
`pulse_gen`: pulse width `PULSE_W`), so a simulation shows request
latencies that are the sum of the selected taps. For example, the
end-to-end test sees 11 ns through two idle stages set to taps 3 and 6.

## Logic resources

**Logic block** (`logic_block`): a 6-input LUT with output `Q`, carry logic
and a register.
* Carry: `cout = Q ? cin : ax`. The LUT produces the propagate term and
  `ax` is the generate/bypass input.
* Sum: `Q ^ cin`.
* A 2-bit field selects the register input (`Q`, sum, `ax` or `cout`).
* One bit selects the output `d`: that value directly, or the register.
* One bit selects the clock: `g_clk` or `l_clk`.
* The register has a clock enable `ce` and an asynchronous clear `grst_n`.

**Slice** (`slice`): two logic blocks.
* Carry enters the lower block (B inputs) and leaves from the upper block
  (A inputs).
* The F7 mux `f7 = ax ? Q_A : Q_B` joins the two LUTs into one 7-input
  function.
* Both blocks share their clocks, enable and reset.

**CLB** (`clb`): two slices behind one local interconnect. Carry runs from
slice 0 into slice 1. Outputs:
`out = {cout, f7_1, Db1, Da1, f7_0, Db0, Da0}`.

## Routing

**Local interconnect** (`local_interconnect`, one per CLB). The 24 global
inputs of the CLB reach the 24 LUT pins `{A[5:0], B[5:0], C[5:0], D[5:0]}`
(A/B = slice 0, C/D = slice 1) through crosspoints in the lower-left
triangle of a 24 x 24 matrix only. Numbering the pins 0 (= D[0]) to 23
(= A[5]):

* pin *p* can be driven by global input *g* only when *g <= p*;
* D[0] therefore sees only global 0, and A[5] sees all 24;
* there are 300 crosspoints.

This halves the switch count. The cost is that low-numbered pins need
their signal on a low-numbered global input. Place signals with that in
mind.

Seven **auxiliary wires** (Ax0, Bx0, Ax1, Bx1, carry-in, `l_clk`, `ce`)
each have a full crosspoint row over 34 sources:

* the 24 globals;
* the six slice outputs fed back;
* the controller's `la`, `rr` and `clk` (CLB 1 only, 0 elsewhere);
* a constant 1, needed for `ce` and for counters' carry-in.

**Global interconnect** (`global_interconnect`, one per cluster): a full
crossbar with one crosspoint bit per (sink, source).

* Sources (71): 5 CLBs x 7 outputs, the controller's la/rr/clk, the pulse,
  and 4 sides x 8 link wires in.
* Sinks (155): 5 CLBs x 24 global inputs, the controller's lr/ra, the
  pulse-generator input, and 4 sides x 8 link wires out.

All crosspoints stand for tri-state buffers. The RTL models each wire as the
OR of its enabled crosspoints. That gives the same result as long as at most
one driver per wire is on, and an immediate assertion in both interconnects
reports any wire with several. A wire with no driver reads 0.

**Fabric** (`fpga_top`): clusters at (row, col), index `row*3 + col`. Each
cluster has 8 wires per direction to each neighbour. Wires off the edge of
the grid read 0. Global IO is the south side of the two bottom corner
clusters: `io_in[0]`/`io_out[0]` at (1,0) and `io_in[1]`/`io_out[1]` at
(1,2). The global clock `g_clk` reaches every logic block directly and does
not pass through the routing.

## Configuration

The bitstream is 90 348 bits, stored in `config_memory` as 2 824 words of
32 bits. To configure the fabric:

1. Pulse `cfg_rst_n` low. This clears the memory and opens every switch.
   The memory also powers up cleared.
2. Write the words with `cfg_we` / `cfg_addr` / `cfg_wdata` on `cfg_clk`.
   Fabric bit *i* is bit *i % 32* of word *i / 32*.
3. Pulse `grst_n` low to clear all registers and controllers.

All offsets are named in `fpga_pkg`:

| field | offset | width |
|---|---|---|
| cluster *i* | `i*CLUSTER_CFG` (15 058 bits each) | |
| . CLB *k* | `k*CLB_CFG` (810) | |
| . . slice 0 / slice 1 | `CLB_S0` = 0 / `CLB_S1` = 136 | 136 |
| . . . lower block B / upper block A | `SLICE_LB_B` = 0 / `SLICE_LB_A` = 68 | 68 |
| . . . . truth table (bit *n* = output for inputs = *n*) | 0 | 64 |
| . . . . register-input select (`dsel_e`) | 64 | 2 |
| . . . . registered output | 66 | 1 |
| . . . . use local clock | 67 | 1 |
| . . local interconnect | `CLB_LI` = 272 | 538 |
| . . . crosspoint pin *p* / global *g* | `li_xp(p,g) = p(p+1)/2 + g` | |
| . . . aux wire *s* / source *k* | `li_aux(s,k) = 300 + 34 s + k` | |
| . controller PDE tap | `CL_CB` = 4 050 | 3 |
| . global crosspoint sink *j* / source *k* | `CL_GI + 71 j + k` (`CL_GI` = 4 053) | 11 005 |

The testbench package `tb/fabric_prog_pkg.sv` provides tasks that set
these fields (`set_lb`, `set_pin`, `set_aux`, `set_gi`, `set_pde`).
`tb/tb_fpga_top.sv` shows how to place a counter, a 7-input function, a
two-stage asynchronous pipeline and a five-state Johnson enable generator.

## Files

| file | contents |
|---|---|
| `rtl/fpga_pkg.sv` | sizes, bit layout, helper index functions |
| `rtl/logic_block.sv`, `slice.sv`, `clb.sv` | logic |
| `rtl/local_interconnect.sv`, `global_interconnect.sv` | routing |
| `rtl/lcbm_controller.sv`, `pde.sv`, `controller_block.sv`, `pulse_gen.sv` | asynchronous additions |
| `rtl/cluster.sv`, `config_memory.sv`, `fpga_top.sv` | tile, bitstream store, fabric |
| `tb/tb_<module>.sv` | self-checking test of each module |
| `tb/fabric_prog_pkg.sv` | configuration helpers for testbenches |

`pde` and `pulse_gen` are **behavioural models**: they use transport delays
to stand in for a buffer chain and have no synthesizable equivalent. In
silicon they are library buffers, a mux and an XOR. Everything else is
synthesizable. The controller's C-element is an intended latch
(`always_latch`).

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/fpga_pkg.sv tb/fabric_prog_pkg.sv tb/tb_fpga_top.sv --top-module tb_fpga_top
./obj_dir/Vtb_fpga_top
```

`--timing` is required for the delay models. Use the same pattern for any
`tb_<module>`; add `tb/fabric_prog_pkg.sv` only where it is imported
(`tb_clb`, `tb_cluster`, `tb_fpga_top`).

`tb_fpga_top` runs the fabric at its full size in about 15 s. It writes
the bitstream, then checks:

* a 4-bit carry-chain counter on `g_clk`;
* a random 7-input function through the F7 mux;
* 40 random tokens through the two-stage asynchronous pipeline spanning
  clusters (1,2) and (0,2), running alongside the synchronous logic. The
  receiver acknowledges after random delays, so tokens back up and the
  sender stalls;
* the idle-pipeline latency, which must equal the sum of the PDE delays;
* a full reconfiguration to a five-state Johnson counter whose decoded
  enables must run one-hot in order.

It counts each of these mechanisms and fails if any never happened.

`tb_five_stage_styles` runs one design in both styles, with identical data
placement and routing. The design is a five-stage,
one-instruction-at-a-time pipeline: each stage increments a 4-bit token,
and the stages snake through five clusters, (1,0) to (0,0), (0,1), (0,2)
and (1,2).

* **Synchronous style.** Every register runs on `g_clk` and gets its clock
  enable from a Johnson counter placed in cluster (1,1). A token takes
  exactly five cycles.
* **Asynchronous style.** The global clock is replaced by one controller
  block, pulse generator and PDE per stage, with taps 0 to 4. The
  idle-pipeline latency must be 1+2+3+4+5 = 15 ns. A slow receiver must
  make the sender wait.

Lint warnings you will see, and why they stand:

* **Circular combinational logic** (UNOPTFLAT) in `clb`, `cluster` and
  `fpga_top`. Programmable routing connects outputs back to inputs. A
  valid configuration breaks every such loop with a register or a
  handshake.
* **The latch** in `lcbm_controller`. It is the C-element.
* **Clock gating** of the logic-block register through its clock-select
  mux. This is the global/local clock choice.

## What follows the source architecture and what is chosen here

The following follow the published architecture:

* 6-input LUT, carry chain with XOR, register with `ce` and a g_clk/l_clk
  select;
* two logic blocks and an F7 mux per slice;
* two slices and a local interconnect per CLB;
* 24 global inputs per CLB and the lower-left triangular crosspoint matrix;
* tri-state crosspoints;
* five CLBs, one controller block and one pulse generator per cluster;
* controller block wired into one CLB's local interconnect;
* C-element two-phase controller with a MUX/buffer-chain PDE on `rr`;
* a pulse generator giving one pulse per transition;
* six clusters in a 2 x 3 grid with IO at the bottom corners.

The following are choices of this implementation, because the architecture
leaves them open:

* the exact inputs of the logic block's two muxes;
* the carry form `Q ? cin : ax`;
* `ax` as the F7 select;
* the register reset;
* the auxiliary routing of Ax/Bx/carry-in/`l_clk`/`ce`;
* the full-crossbar global interconnect;
* 8 wires per link;
* which CLB sees the controller (CLB 1);
* the 8-tap PDE with 1 ns per tap;
* a 2 ns pulse;
* the word-addressed configuration memory and its bit layout;
* the controller reset;
* the five-state Johnson counter (a 3-bit Johnson counter with one state
  skipped) used as the synchronous clock-enable generator.

## Limits

* **Not included.** The 8-bit MIPS processor that serves as the
  demonstration workload for this kind of fabric is not included. Its
  instruction set, netlist and placement are not part of the fabric, and
  neither are its instruction/data memories or register file. Only its
  five-stage Johnson clock-enable generator is mapped, as a configuration
  in the end-to-end test.
* **Physical parts.** The clock tree and IO pads are physical structures
  with no logic. They are the `g_clk` net and the `io_in`/`io_out` ports.
* **Routing capacity.** A MIPS-sized design needs about 50 to 54 of the 60
  slices and one controller per pipeline stage (6 available). Whether it
  routes through 8-wire links has not been checked.
* **Timing and power.** No area, power or speed figures can be obtained
  from this RTL. The relative-timing margins hold in simulation only
  because the logic has zero delay. In silicon, PDE taps must be chosen
  from post-layout delays.
* **Synthesis.** A synthesis tool will see the combinational loops and the
  delay models described above. `pde` and `pulse_gen` must be replaced by
  real cells.
