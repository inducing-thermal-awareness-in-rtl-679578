# Thermal control of a 4-core MPSoC over its own network-on-chip

A multiprocessor system-on-chip heats unevenly, and a core that runs too hot
for too long costs reliability. This design gives a 4-core MPSoC thermal
control without extra wiring. The on-chip network that already connects the
processors and memories also carries the temperature readings and the
frequency commands. Each processor's network interface gets one extra input,
the reading of the thermal sensor next to the core. A central thermal
management unit (TMU) polls those interfaces over the network about once per
millisecond. It decides an operating point for every core and sends it,
again over the network, to a DVFS (dynamic voltage and frequency scaling)
unit. The DVFS unit clocks each core at 500, 250, 125 or 62.5 MHz.

The same interfaces also watch each core's memory traffic. So the TMU knows
both how hot a core is and whether it is doing anything. That lets it slow
idle cores to the minimum and raise them again within a few cycles when they
resume. It can also hold back busy cores that would only finish early and
wait.

The control traffic is tiny. A polling round is 4 polls, 4 replies and at
most 4 DVFS writes: 12 single-flit packets per 500,000 cycles.

## Structure

```
            PE0   PE1                      PE2   PE3        (external cores)
             |     |                        |     |
   TS0 --> ni_pe ni_pe <-- TS1     TS2 --> ni_pe ni_pe <-- TS3
             |     |                        |     |
   MEM0 -- [ switch S0 ] ---- [ switch S1 ] ---- [ switch S2 ] -- ni_tmu -- tmu
   MEM1 ------'                |  |  |               |
                            MEM2 MEM3 SHMEM      ni_slave -- dvfs_unit --> clock
                                                                          enables,
                                                                          voltage codes
```

| module | role |
|---|---|
| `thermal_mpsoc_top` | the whole system. The cores are outside: their request/response ports and clock enables are top-level ports |
| `noc_fabric` | three 5x5 switches in a chain, S0 - S1 - S2, with 11 endpoint ports |
| `noc_switch` | one switch: input FIFOs, table routing, round-robin output arbitration |
| `ni_pe` | a core's network interface: the core's master port, the sensor input and the transaction monitor |
| `ni_slave` | slave interface in front of each memory and of the DVFS unit |
| `ni_tmu` | the TMU's two-sided interface: master for polls and DVFS writes, slave for incoming replies |
| `tmu` | the policy engine |
| `dvfs_unit` | per-core operating-point registers, clock-enable generation, voltage codes, freeze |
| `thermal_sensor` | a per-core temperature register, written from outside (see below) |
| `mem_sram` | a private or shared memory, 4096 x 32 bits |
| `sync_fifo` | helper FIFO used by the switch |
| `thermal_pkg` | flit type, commands, node numbers, routing table, status-word layout, operating points |

The whole design uses one clock `clk`, assumed to be 500 MHz, and one
active-low asynchronous reset `rst_n`. The cores do not get separate clocks.
Each core gets an enable `pe_clk_en[i]`: high every cycle at 500 MHz, every
2nd cycle at 250 MHz, every 4th at 125 MHz and every 8th at 62.5 MHz. The
voltage that goes with each point is not specified here. `pe_vsel[i]` only
gives a 2-bit code (0 = lowest) for an external regulator.

## The thermal policies

This is the heart of the design, in `tmu.sv`. Temperatures are unsigned
Kelvin with 4 fraction bits (value = K x 16). The thresholds are parameters,
with these defaults:

| threshold | default |
|---|---|
| `TH_H` | 340 K |
| `TH_M` | 331 K |
| `TH_L` | 325 K |
| `TH_SAFE` | 321 K |

**Thermal rule (used by every policy).** Each core has a state, *rising* or
*falling*:

* **Rising.** The core runs at 500 MHz.
* **Entering falling.** A rising core switches to falling when a reading is
  at or above `TH_H`.
* **Falling.** The operating point follows the temperature band:

  | temperature | operating point |
  |---|---|
  | at or above `TH_M` | 250 MHz |
  | from `TH_L` up to `TH_M` | 125 MHz |
  | below `TH_L` | 62.5 MHz |

  Each decision lowers the point by at most one step. A sudden drop from
  340 K to 322 K therefore gives 250 → 125 MHz, and 62.5 MHz only at the next
  decision. If the temperature climbs back while the core is falling, the
  point rises with the band.
* **Back to rising.** A falling core returns to rising, and jumps straight to
  500 MHz, when a reading is at or below `TH_SAFE`.

This hysteresis makes a core that runs hot swing between the extremes. It
heats at 500 MHz, steps down as it cools, and jumps back to 500 MHz. The two
other policies exist to damp that swing.

**Policy select.** The `policy` input chooses what is applied on top of the
thermal rule:

| `policy` | name | operating point |
|---|---|---|
| 0 | local DVFS | the thermal rule alone |
| 1 | DVFS + local communication | 62.5 MHz while the core's interface reports it idle, otherwise the thermal rule |
| 2 | DVFS + workload predictor | as policy 1, but a busy core runs no faster than its entry in a per-core predictor table |
| 3 | DVFS + learning predictor | as policy 2, with the table updated at run time from the slack each core shows |

The predictor table is written through `cfg_we`/`cfg_pe`/`cfg_level`. It is
meant to hold the lowest operating point at which each core still finishes
its share of an iteration in time. That share is known from an off-line
characterisation of the application. The table resets to 500 MHz for every
core, which makes policy 2 behave like policy 1.

Policy 3 starts from the same table and keeps adjusting it. A core that has
finished its share waits for core 0 to collect it, and this wait is its
slack. The TMU measures slack as the number of polls in a row that find the
core idle. When the core wakes, the TMU moves that core's entry one step:

* down, if the slack was `SLACK_ROUNDS` polls or more (default 2);
* up, if no poll saw the core idle at all;
* not at all, otherwise.

Over a few iterations, a core with time to spare settles at a slower point.
A write through `cfg_*` always overrides the learned value.

**Idle and wake.**

* **Idle.** A core is idle when it has had no transaction in flight for
  `IDLE_TIMEOUT` cycles. The default is 5,000,000 cycles, 10 ms at 500 MHz.
  `ni_pe` decides this.
* **Wake notice.** The first request from an idle core also makes `ni_pe` send
  a wake notice to the TMU, carrying the same status word as a poll reply.
* **Serving the notice.** Between polling rounds the TMU re-evaluates that
  core at once, so the core leaves 62.5 MHz within a few tens of cycles. It
  does not wait up to a millisecond for the next poll.
* **Policy 0** ignores wake notices.

**Round timing.** A free-running timer starts a round every `POLL_CYCLES`
cycles (default 500,000 = 1 ms). The first round starts one period after
reset. In a round, for each core 0..3 in turn, the TMU:

1. sends a read (`CMD_RD`, address `ADDR_TS_STATUS`) to the core's interface;
2. waits for the reply;
3. decides the new operating point;
4. only if the point changed, sends a non-acknowledged write to the DVFS unit
   (address = core index, data = level).

`evt_round` pulses when the round is over. A round takes a few tens of
cycles, depending on network load. A round that is due while a wake notice is being served
starts right after it.

## Network and packets

Every packet is a single 59-bit flit (`thermal_pkg::flit_t`):

| field | width |
|---|---|
| `dst` | 4 |
| `src` | 4 |
| `cmd` | 3 |
| `addr` | 16 |
| `data` | 32 |

Commands:

| command | meaning |
|---|---|
| `CMD_RD` | read request, answered by `CMD_RD_RESP` |
| `CMD_RD_RESP` | read response |
| `CMD_WR` | write request, answered by `CMD_WR_ACK` |
| `CMD_WR_ACK` | write acknowledge |
| `CMD_WR_NA` | non-acknowledged write, used for all thermal-control traffic |

Nodes and their switches:

| node | what | switch |
|---|---|---|
| 0, 1 | PE0, PE1 | S0 |
| 4, 5 | private memories of PE0, PE1 | S0 |
| 6, 7 | private memories of PE2, PE3 | S1 |
| 8 | shared memory | S1 |
| 2, 3 | PE2, PE3 | S2 |
| 9 | TMU | S2 |
| 10 | DVFS unit | S2 |

The TMU and the DVFS unit share a switch, so the command path from one to the
other is the shortest possible.

**Links.** All links use valid/ready. A sender holds a flit unchanged until it
sees ready, and assertions in each sender check this.

**Switch.** A switch buffers two flits per input. Each output has a
round-robin arbiter, and the arbiter keeps its grant while the output is
stalled. A flit spends at least one cycle per switch.

**Routing.** Routing is a fixed function of switch and destination
(`thermal_pkg::route`). Because it is deterministic, packets between the same
two nodes never overtake each other.

**Core address map.** Bits [31:28] of a core's address name the target node.
Bits [17:2] give the word address. For example, core *i* reaches its private
memory at node 4+*i* and the shared memory at node 8.

## Processor interface and monitor (`ni_pe`)

The interface accepts up to 4 outstanding core transactions. It answers each
one with a one-cycle `pe_resp_valid` pulse, with `pe_resp_we` set for write
acknowledges.

Injection priority is:

1. poll replies;
2. wake notices;
3. core requests.

The status word has this layout (`ts_status_t`):

| bits | content |
|---|---|
| [15:0] | temperature |
| [16] | idle flag |
| [20:17] | outstanding-transaction count |

The sensor value is sampled when the reply is built.

## Sensors and the emulation side

The source design was evaluated in FPGA emulation. There, each sensor is a
register that a control processor writes with temperatures from an external
thermal model. `thermal_sensor` is exactly that register (reset value
300 K), written through the top-level `ts_wr_en[i]`/`ts_wr_temp[i]`.

A real on-die sensor would replace it behind the same `temp` output.

`freeze` stops emulated time while the sensors are being updated:

* every core clock enable is held low;
* the TMU's poll timer stops;
* the interfaces' idle timers stop.

Packets already in the network are still delivered, and the memories keep
running.

## Where this departs from the source design

* **The TMU is hard-wired.** The source ran the policies as software on a
  soft-core processor attached to the network. Here it is a state machine,
  with the same inputs and outputs on the network.
* **The network is a stand-in.** The source built its network with an
  existing NoC library and gives only "three 5x5 switches". The switch
  design, the single-flit packets, the chain topology and the placement of
  nodes on switches are this design's own.
* **The predictor is a table.** How the workload predictor computes its
  prediction is not specified. Here it is a table loaded from outside, which
  caps busy cores. The slack rule of policy 3 is this design's own way of
  building the table at run time.
* **Own additions.** The one-step-down limit, the wake notice and the
  status-word layout are choices of this design. So are the 1 ms poll period
  and the 500 MHz clock behind the cycle counts.
* **Idle covers all traffic.** The monitor counts all of a core's
  transactions, not only those to its private memory.
* **Partial freeze.** `freeze` stops the cores and the timers, but not the
  network or the memories.
* **One sensor and one DVFS unit.** Each interface has one sensor, and one
  DVFS unit serves all four cores. The source also allows several sensors per
  interface and several DVFS units.
* **Not included:** the processor cores and their caches, the energy sniffers
  and host link of the emulation setup, and a voltage regulator.

## Parameters of `thermal_mpsoc_top`

| parameter | default | meaning |
|---|---|---|
| `N_PE` | 4 | cores. The network and node map are built for 4 |
| `POLL_CYCLES` | 500_000 | cycles between polling rounds |
| `IDLE_TIMEOUT` | 5_000_000 | cycles with nothing in flight before a core counts as idle |
| `MEM_DEPTH` | 4096 | words per memory |
| `TH_H`, `TH_M`, `TH_L`, `TH_SAFE` | 340, 331, 325, 321 | thresholds in Kelvin |
| `SLACK_ROUNDS` | 2 | idle polls before a wake lowers a core's prediction under policy 3 |

## Simulating

All testbenches are self-checking. Each ends with a line
`TB_RESULT checks=N failures=M`, and each has a watchdog. Build and run one
with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/thermal_pkg.sv tb/tb_thermal_mpsoc_top.sv --top-module tb_thermal_mpsoc_top
./obj_dir/Vtb_thermal_mpsoc_top
```

| testbench | what it shows |
|---|---|
| `tb_thermal_mpsoc_top` | The whole system in a closed thermal loop. The testbench heats each core according to the clock enables it counts, then writes the sensors under `freeze`. A reference model of the policies predicts every operating point, and the DVFS outputs and enable rates must match it. It runs 210 rounds across policies 0 to 3, with cores pausing and resuming. It counts every mechanism and fails if one never occurs: threshold crossings, all four operating points, the one-step limit, idle, wake, predictor cap, run-time prediction update, freeze and network back-pressure. It uses a 300-cycle poll period and a 1100-cycle time-out. |
| `tb_thermal_mpsoc_full` | The top at its default sizes: two 1 ms rounds exactly 500,000 cycles apart, PE0 going 500 → 250 → 125 MHz, and memory traffic correct throughout. |
| `tb_vtc_workload` | A model of the parallel texture-coding kernel the design targets. Each core multiplies 8 rows of two 32x32 complex windows, element by element, for 3 iterations, and core 0 gathers and checksums all products. The run repeats under each of the four policy settings in the closed thermal loop. It checks the checksums, that policies 1 and 2 put sleeping cores to idle and wake them, that policy 2 holds cores 1-3 at their predicted 250 MHz, and that policy 3 changes its predictions as it runs. |
| `tb_tmu` | The policy engine against a reference model, with a modelled network. |
| `tb_ni_pe` | Packing, responses, the outstanding limit, poll replies, the idle time-out and wake notices. |
| `tb_ni_slave` | Reads, acknowledged writes and non-acknowledged writes. |
| `tb_ni_tmu` | The TMU's master and slave sides. |
| `tb_noc_switch` | Routing, ordering and loss-freedom of one switch under random load and back-pressure. |
| `tb_noc_fabric` | The same for the three-switch network, plus the latency across two links. |
| `tb_dvfs_unit` | Enable rates per operating point, voltage codes, read-back and freeze. |
| `tb_thermal_sensor`, `tb_mem_sram` | The two storage blocks. |

In the workload run, the testbench's own simple heating model gives these
results. They show the policies working, not a prediction for silicon:

| policy | run time | mean temperature | peak |
|---|---|---|---|
| 0 | 139,410 cycles | 325.5 K | 344.1 K |
| 1 | 139,059 cycles | 321.5 K | 344.5 K |
| 2 | 141,070 cycles | 317.1 K | 343.8 K |
| 3 | 161,830 cycles | 311.3 K | 343.8 K |

The peaks overshoot 340 K because temperatures only update once per round.
Policy 3 is cooler still, but slower. After each gather the testbench holds
every core idle for a fixed time, so every wake shows slack. The rule
therefore keeps lowering the workers' caps, even after slowing down stops
paying off.

`tb/pe_model.sv` is a behavioural traffic generator standing in for a core.
`tb/vtc_pe_model.sv` runs the kernel above instead.
It only issues requests on its clock-enable cycles, and it checks every read
against its own copy of what it wrote.

## Changing it

* **Thresholds, poll period, time-out and memory size** are parameters of the
  top.
* **A different topology or node count** needs changes in `thermal_pkg`:
  `node_switch`, `node_port`, `west_port` and `route`, plus `N_NODES`. The
  generate loops in the top also need updating.
* **A new policy** goes in the decision block of `tmu.sv`, which computes
  `new_fall`, `new_th` and `new_level` for the core being evaluated. The
  status word has spare bits for more monitor data.
