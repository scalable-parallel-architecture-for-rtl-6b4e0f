# A parallel hardware simulator for multi-compartment neurons

A neuron with a dendritic tree is modelled as a cable cut into compartments
(nodes). Every simulation step, every node's voltage is recomputed from its own
old voltage and its two neighbours' old voltages. Where three cable pieces meet
(a branch point), or where the cable reaches the cell body (the soma), the
equation is different. The soma also carries Hodgkin–Huxley sodium and
potassium channels.

This design splits that work across three kinds of processor:

* **Dendrite Segment Processors (DSPs).** Each DSP owns a list of unbranched
  cable pieces (segments) and updates their inner nodes one per clock.
* **One Common Node Processor (CNP).** It updates the branch points ("common
  nodes"), each of which joins one parent segment and two child segments.
* **One Soma Processor (SP).** It updates the soma voltage and the channel
  conductances of each cell.

A **Common Node Switch (CNS)** connects them. When a DSP reaches a segment end
that touches a common node or a soma, it sends a *request*: the end's address
plus the voltage of the node next to it. The CNS routes the request to the CNP
or the SP. When that processor has the new voltage, it sends a *response*, and
the CNS broadcasts it to every DSP. The DSPs then use the new value in the next
step.

The base unit (`nsim_top`) has three DSPs, one CNP, one SP, one CNS and a loader
for the DSP FIFOs (`packet_distributor`). All arithmetic is IEEE-754 double
precision.

## Equations

Every update is an explicit Euler step, with coefficients precomputed from the
cell's geometry, the time step and the membrane constants.

**Inner dendrite node** (`dsp_voltage_proc`, `dsp_inj_ctrl`):

```
V0' = A_d*(V-1 + V1) + (B_d*V0 + C_d)  [+ D_d if the node's inject bit is set]
```

`A_d`, `B_d` and `C_d` belong to the segment. `D_d` is a stimulus current term,
given as one input port per DSP (`d_inj`).

**Common node** (`cnp`), with the three neighbours being the parent segment's
last node and the first nodes of the two children:

```
V0' = (A_c*V-1 + B_c*V0) + (C_c*V1 + E_c) + D_c*V2
```

**Soma** (`svp`):

```
V0' = (E_s*V1 + F_s) + (D_s*G_K + C_s*G_Na) + ((G_K + G_Na)*B_s + A_s)*V0
```

`V1` is the adjacent dendrite node, and `G_K` and `G_Na` are the conductances
from the previous step.

**Gates** (`k_cond_proc`, `na_cond_proc`):

```
x' = B_x(V)*x + A_x(V)                for x in {n, m, h}
G_K = gK*n^4                          G_Na = gNa*(m*m)*(m*h)
```

The tables have 2048 entries, indexed by the new soma voltage in 0.125 mV steps
from −64 mV (`fp_to_fix`). They are loaded, not computed in hardware. The
testbenches fill them with `A = a/(a+b)*(1-exp(-dt*(a+b)))` and
`B = exp(-dt*(a+b))` at each table voltage, where `a` and `b` are the standard
Hodgkin–Huxley rate functions.

## Segment Definition Packets and the DSP FIFOs

Each segment is described by one packet of 66-bit rows. The
`packet_distributor` writes the header rows to the target DSP's Header FIFO and
the node rows to its Data FIFO.

| row | contents |
|---|---|
| header 0: start node | `[31:0]` CNI (address of the node beyond the segment's first end), `[39:32]` INDEX, `[47:40]` number of nodes N, `[65:64]` status |
| header 1: end node | the same fields, for the node beyond the last end |
| header 2, 3, 4 | `A_d`, `B_d`, `C_d` in `[63:0]` |
| N data rows | `[63:0]` node voltage, `[64]` inject bit |

The status field says what lies beyond an end:

| status | meaning |
|---|---|
| `00` | open end. The node is its own neighbour (a "fake node"), and no request is sent. |
| `01` | this segment is the **parent** of the common node, or the end touches a soma. |
| `10` | this segment is **child 1** of the common node. |
| `11` | this segment is **child 2** of the common node. |

The FIFOs recirculate. The header processor writes every row it reads back to
the Header FIFO, and the node pipeline writes each updated voltage back to the
Data FIFO. After one step, each FIFO again holds the whole model, in the same
order. A DSP knows that the step is over by counting write-backs against the
FIFO size it latched when the step started.

## Addresses and routing

A common node identifier (CNI) is 32 bits. The switch routes a request by its
CNI:

* `CNI < SOMA_LIMIT` (0x1000): a soma. The request goes to the SP. The soma
  number is `CNI[11:0]`.
* `(CNI & CND) == CND` (CND = 0x2000): a common node of this unit's CNP. The
  CNP's local address is `CNI[10:0]`.
* Anything else: the request goes into the uplink FIFO (`up_out_*`), towards a
  higher-level switch. Responses from that level come in on `up_in_*`.

Several units can therefore be joined in a tree of switches. At a higher level,
a switch may have its own CNP or SP, or neither (the `HAS_CNP` and `HAS_SP`
parameters).

Each DSP keeps a small **common node memory** (`dsp_cn_mem`, 256 entries,
matching the 8-bit INDEX field). It holds the voltages of the nodes beyond its
segment ends:

* The INDEX field of a header row names the entry to read.
* Each entry also stores its CNI as a tag.
* Responses are broadcast, and every entry whose tag matches takes the new
  voltage.

A DSP therefore needs no knowledge of where a response came from. The memory
is initialised through a configuration port (CNI, voltage) before the first
step.

## One simulation step

1. `cycle_start` pulses. Every DSP starts reading its Header FIFO.
2. For each segment, a DSP:
   * reads five header rows;
   * looks up the voltages beyond both ends (or uses the fake node for an open
     end);
   * streams the N nodes through the pipeline, one per clock;
   * pushes one request per connected end into its output buffer.

   This takes **10 + N clocks** per segment.
3. The CNS takes at most one request per clock from the DSP buffers, in round
   robin, and routes it.
4. **The CNP** turns each arriving request at once into its term group. The
   request's status selects the group:

   | status | term |
   |---|---|
   | `01` | `A_c*V-1 + B_c*V0` |
   | `10` | `C_c*V1 + E_c` |
   | `11` | `D_c*V2` |

   Finished terms wait in two per-node memories that act as a two-deep shift
   register. A 2-bit counter per node sees the third term arrive; the three
   terms are then summed, the voltage is stored, and a response is queued. The
   three requests of a node may arrive in any order and from any DSPs, and
   several nodes can complete on consecutive clocks.
5. **The SP** takes one request per clock:
   * `svp` computes the new soma voltage and queues the response.
   * The same voltage goes through `fp_to_fix` into the K and Na conductance
     processors. These update n, m and h and store the new `G_K` and `G_Na`
     for the next step.
6. The CNP and SP each have an **idle monitor**:
   * The CNP's counter adds 1 per request and subtracts 3 per completed node.
   * The SP's counter adds 1 per request and subtracts 1 per conductance
     write.
   * A processor is idle when its counter is zero and its output buffer is
     empty.
7. `end_of_cycle` is the AND of:
   * every DSP's cycle-end;
   * CNP idle;
   * SP idle;
   * switch idle (no request waiting anywhere).

   The next `cycle_start` may follow. Every value used in step k+1 was
   computed from step-k values.

Requests carry the adjacent node's voltage as it was at the start of the step,
not the value being computed in the same step. This keeps the whole update a
plain explicit Euler step, and it lets a request leave before the segment's
pipeline has drained.

## Timing

| item | clocks at the default latencies |
|---|---|
| one segment in a DSP | 10 + N |
| DSP node pipeline (`dsp_voltage_proc` + `dsp_inj_ctrl`) | 3·ADD_LAT + MUL_LAT = 44 |
| CNP, request to response | MUL_LAT + 3·ADD_LAT + 1 = 45 |
| SVP, request to response | 3·ADD_LAT + 2·MUL_LAT = 55 |
| SCP, voltage to conductances | 1 + ADD_LAT + 4·MUL_LAT = 56 |
| SP, last request to idle | 55 + 56 = 111 |

The adder and multiplier latencies `ADD_LAT` and `MUL_LAT` default to 11. With
that value the soma pipelines come out at the 55 and 56 clocks of the
reference design.

A step takes about the busiest DSP's Σ(10 + Nᵢ), plus a drain for the last
requests to pass through the CNP or SP. In the full-size end-to-end test, with
10-node segments, the drain was 92 clocks: a step took 2332 clocks against a
DSP time of 2240.

## Departures from the reference architecture

* **Floating point.** `fp_add` and `fp_mul` are written here; they are not
  vendor cores. They round to nearest even and flush subnormals to zero. NaN
  and infinity are not handled specially. Results match IEEE-754 for normal
  numbers; the testbenches check this bit for bit.
* **Switch timing.** The reference switch moves one request *or* response per
  clock, using both clock edges. This CNS uses only the rising edge, with
  separate request and response paths, so it moves one request *and* one
  response per clock.
* **CNP depth.** The reference CNP has a 50-clock depth; this one has 45. The
  CNP also sums its three terms in arrival order, so results can differ in the
  last bit from the order `(A_c V-1 + B_c V0) + (C_c V1 + D_c V2) + E_c`.
* **Common node memory lookup.** The DSP's common node memory is written by CNI
  tag match. The reference gives only the INDEX field and does not say how a
  response finds its entry.
* **Injection.** `D_d` comes in as one port per DSP, not from a memory.
* **Capacity.** The default sizes are:
  * 8192-row FIFOs per DSP;
  * 2048 common nodes;
  * 4096 somas;
  * 256 common node entries per DSP.

  A model of 600 cells, each with 7 ten-node segments, spread over three DSPs
  does **not** fit. Each DSP would need 14000 data rows, against 8192. It
  would also need about 800 distinct neighbour nodes, against 256. Its 1800
  common nodes and 600 somas do fit. A 4000-soma model fits the SP.
* **Configuration.** Coefficients, tables and initial states are loaded
  through the `cn_init_*`, `cnp_cfg_*` and `sp_cfg_*` ports, one word per clock, while the unit is idle.

## Files

All files are in `rtl/` (design) and `tb/` (testbenches).

| module | role |
|---|---|
| `nsim_pkg`, `fp64_pkg` | shared types (`sdp_row_t`, `msg_t`, `fp64_t`) and arithmetic helpers |
| `fp_add`, `fp_mul`, `delay_line`, `sync_fifo`, `fp_to_fix` | building blocks |
| `dsp` = `dsp_header_proc` + `dsp_node_ctrl` + `dsp_cn_mem` + `dsp_voltage_proc` + `dsp_inj_ctrl` + FIFOs | segment processor |
| `cnp`, `idle_monitor` | common node processor |
| `sp` = `svp` + `scp` (`fp_to_fix`, `k_cond_proc`, `na_cond_proc`) + `idle_monitor` | soma processor |
| `cns` | switch |
| `packet_distributor` | FIFO loader |
| `nsim_top` | base unit |

Each file starts with a comment that describes its interface and timing.

## Simulating

Every testbench is self-checking. It ends by printing
`TB_RESULT checks=<n> failures=<n>`, and a watchdog stops it if it hangs. To
run one block's test with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -j 0 --top-module tb_cnp \
    -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/fp64_pkg.sv rtl/nsim_pkg.sv tb/tb_util_pkg.sv tb/tb_cnp.sv
./obj_dir/Vtb_cnp
```

The packages are named first. Verilator finds the other modules in `rtl/`
and `tb/` by their file names. There are two end-to-end tests:

* `tb_nsim_top` runs a small configuration with short arithmetic latencies.
* `tb_nsim_full` runs `nsim_top` with every parameter at its default.

Two more benches run single processors at their default sizes, with the
largest loads they hold:

* `tb_sp_workload` runs 4000 somas through the SP. It measures 4111 clocks
  per step: one soma per clock, plus 55 + 56 clocks of pipeline depth.
* `tb_dsp_workload` fills one DSP with 819 ten-node segments: 8190 of its
  8192 data rows and 4095 header rows. It measures 16422 clocks per step,
  which is 819 × 20 plus a 42-clock drain.
* `tb_cns_tree` builds a two-level switch tree. Three lower switches serve
  three clients each, and one upper switch holds a CNP and an SP. The bench
  checks that each request reaches its processor once, and that all nine
  clients see every response in the same order.

Both benches do the following:

* They build a random model of cells with seven segments each. Segment 0 runs
  from the soma to a common node. Segments 1 and 2 are children of that node,
  and each leads to a further common node. Segments 3 to 6 are children of
  those two nodes and have open ends. Every fifth cell instead ties one end to
  a node served by the higher-level switch. The bench answers that node's
  requests itself.
* They compute the expected state of every node, common node and soma for
  several steps with the same equations in SystemVerilog `real` arithmetic.
* They compare the design's write-backs and stored voltages with those
  expected values, at a relative tolerance of 1e-9.
* They count how often each mechanism occurred, and count a failure for any
  mechanism that never did. The mechanisms are: open ends, the three request
  kinds, soma requests, uplink traffic, injections, competing DSP requests,
  simultaneous CNP and SP responses, and end of cycle.

To change the model size, edit the `NCELL`, `NMIN`, `NMAX` and `STEPS`
parameters of `nsim_bench` in those two files.
