# Runtime energy management for a NoC-based many-core

A many-core chip cannot run all of its transistors at full speed within its
power budget. This design gives every processing element (PE) of a mesh
many-core its own clock frequency and supply voltage. It closes a loop around
them:

1. **Monitoring.** Each PE measures the energy it spent in a fixed sampling
   window.
2. **Decision.** A manager PE compares that energy with a budget.
3. **Actuation.** The PE steps its voltage/frequency pair (vf-pair) up or
   down by one step.

The control is distributed for scalability. The mesh is split into clusters.
One PE per cluster, the Local Manager PE (LMP), manages the other PEs of the
cluster, the Slave PEs (SPs). The LMP of cluster (0,0) also acts as the
Global Manager PE (GMP), which adds up the cluster energies.

The RTL covers the hardware of this loop: the mesh NoC, the PE with its two
clock domains, the network interface, the clock generator, the DVFS
protocol, the energy monitoring and the manager's zone check. The processors
that run the operating system and the management code are not part of the
RTL. Their buses come out of the top level. The testbenches use a
behavioural processor model that runs the management software
(`tb/rem_fw.sv`).

## The energy loop, end to end

Every PE has a counter on the fixed nominal clock (`sampling_timer`). At the
end of each window of `WINDOW` nominal cycles, every PE's processor is
interrupted at the same time, whatever its own clock is. The firmware of an
SP then does the following:

1. It reads the window energy from its PE's registers.
2. It sends a monitoring packet to its LMP: `{MON, x, y}`, the energy, and
   the vf-pair.
3. The LMP writes the energy into its `rem_zone` unit and reads back a zone
   and a command:
   - hot (energy above `VH_PCT` % of E_max): command DOWN.
   - cold (energy below `VL_PCT` % of E_max): command UP.
   - warm (anything in between): no command.
4. For DOWN or UP, the LMP sends a control packet back to the SP.
5. The SP writes the command into its DVFS register.
6. At each window end, every LMP other than the GMP also sends the summed
   energy of its cluster to the GMP.

The budget E_max is fixed by the design:

    E_max = WINDOW * ( mean over classes of E_class(1.1 V) * 1.1  +  E_leak per cycle(1.1 V) )

This is the mean per-class energy at the nominal pair, plus leakage. The
factor 1.1 is the 10 % energy overhead of the on-chip regulators. Averaging
over the classes, instead of taking the most expensive class, reflects that
real code mixes all instruction types. A PE that retires one instruction per
nominal cycle therefore lands near 100 % of E_max.

The default zones are {85 %, 60 %}, the "light" setting. They give the
behaviour below when an SP runs a full load and then half its work ends:

| window energy | vf-pair after the decision |
|---|---|
| ~100 % at pair 1 (1.1 V, 4.0 ns): hot | 2 (frequency step) |
| ~90 % at pair 2 (1.1 V, 4.5 ns): still hot | 3 (voltage step) |
| ~73 % at pair 3 (1.0 V, 4.5 ns): warm | stays |
| load drops to 40 %, ~32 %: cold | 2, then 1 |

The "heavy" setting, {45 %, 25 %}, drives a fully loaded PE down to the
0.9 V pairs (6 and beyond). Only the voltage steps save energy; frequency
steps alone only stretch the execution. Pick the zones so that the loop can
reach pair 6.

## DVFS protocol

There are three supply levels and seven clock periods. The nine valid
vf-pairs form a single chain (`rem_pkg::vf_table`):

| pair | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|
| supply (V) | 1.1 | 1.1 | 1.0 | 1.0 | 1.0 | 0.9 | 0.9 | 0.9 | 0.9 |
| period (ns) | 4.0 | 4.5 | 4.5 | 5.0 | 5.5 | 5.5 | 6.0 | 6.5 | 7.0 |

- DOWN moves from pair n to n+1, and UP moves from n to n-1. Both saturate
  at the ends. Reset starts at pair 1.
- Two neighbouring pairs differ in the period or in the voltage, never in
  both (an assertion in `dvfs_ctrl` checks this). Scaling down therefore
  lowers the frequency before the voltage, and scaling up raises the voltage
  before the frequency. The logic stays within its timing at every step.
- Each supply level is paired with its shortest safe period: 4.5 ns at
  1.0 V and 5.5 ns at 0.9 V. These come from the minimum periods with
  non-negative slack at those voltages: 4.479 ns and 5.229 ns.
- A **frequency step** takes effect at the next rising edge of the scaled
  clock (`clock_gen`).
- A **voltage step** is sent to the regulator (`voltage_regulator`, 100 ns
  transition). `dvfs_ctrl` holds the processor (`proc_rsp.hold`) for 100 ns,
  rounded up to whole cycles of the present period. That is 23 cycles at
  4.5 ns and 19 cycles at 5.5 ns. Commands that arrive during the hold are
  ignored.

## Two clock domains in one PE

The NoC always runs at the nominal 4 ns clock. A slow PE must never slow
down packets passing through its router. Inside a PE (`pe`), the parts are
split between the two clocks:

| nominal clock (`clk_nom`) | scaled clock (`clk_pe`, from `clock_gen`) |
|---|---|
| router | processor bus, memory-mapped registers |
| NoC-side halves of the DMNI Send and Receive | scratchpad memory |
| sampling timer | memory-side halves of the DMNI, memory access arbiter |
| | `dvfs_ctrl`, `instr_counters`, `energy_estimator`, `rem_zone` |

Three things cross between the domains:

- **Packets** pass through the two `bisync_fifo`s of the DMNI, one in each
  direction. These FIFOs use Gray-coded pointers, two-flop synchronisers,
  depth 8, and first-word fall-through.
- **The window tick** crosses as a toggle through a two-flop synchroniser.
  In the scaled domain it closes the energy window and sets the
  timer-pending flag, which raises the interrupt.
- **The vf-pair** is held in the scaled domain. `clock_gen` reads it at its
  own rising edges.

`clock_gen` and `voltage_regulator` are behavioural models (with `#`
delays). They stand in for a mixed-signal clock source and an analog
regulator. They are not synthesizable. `clock_gen` runs at 4 ns while reset
is asserted, so that the asynchronously reset flip-flops of the scaled
domain see a clock.

### Clock gating of an idle processor

A slave PE with no task left should not burn dynamic power. `clock_gen`
has a second output, `clk_gated_o`, that feeds the processor. It is the
same scaled clock with whole cycles removed. The enable is read at the
start of each cycle, so no pulse is ever cut short. Software stops its
processor by writing the SLEEP register. From then on:

- The processor gets one more clock edge after the write. The access it
  issues on that edge is still carried out, but a read result from it is
  lost. Firmware should follow the SLEEP write with a no-op.
- The memory, the DMNI and the counters stay on the ungated clock. A
  packet can still arrive, and the window timer keeps running.
- Any interrupt (a stored packet or a closed window) clears the sleep
  flag. The processor clock restarts two PE cycles after the interrupt
  rises.
- Whatever the stopped processor leaves on its bus is ignored. The PE
  only acts on a request when the processor was clocked in that cycle.

## Energy accounting

`energy_estimator` adds energy every scaled cycle:

- the energy of the retired instruction's class at the present supply, plus
  10 % regulator overhead;
- the leakage of that cycle, which is the leakage per 4 ns at the present
  supply, scaled by the present period.

At the window end the sum is published in `MMR_ENERGY` and
`MMR_ENERGY_HI` (femtojoules) and restarted. Because the sum is updated per
instruction, a vf-pair change inside a window is accounted for exactly. The
per-class counters (`instr_counters`) are also readable, for software that
prefers to work from counts.

The energy numbers in `rem_pkg` are placeholders with plausible proportions:

- At 1.1 V the class energies are 24.2, 21.78, 36.3, 33.88 and 26.62 pJ
  (arithmetic, logic, load, store, branch). They are scaled by V² for
  1.0 V and 0.9 V.
- Leakage is 2.2, 1.6 and 1.1 pJ per 4 ns tick. That is about 7 % of the
  total at 1.1 V and full load, and a larger share at the lower pairs.

Replace these numbers with the results of a gate-level characterisation of
the target PE.

## NoC and DMNI

**Router.** `router` has five ports: east, west, north, south and local.
North is +y and east is +x.

- Each input has an 8-flit FIFO. Its credit output is high while the FIFO
  has room. A flit moves whenever the sender's valid and the receiver's
  credit are both high.
- A packet has a header flit (target x in bits [15:8], target y in bits
  [7:0]), then a size flit (the number of payload flits), then the payload.
- XY routing sends the packet first along x, then along y.
- Each output has a round-robin arbiter. The grant holds for the whole
  packet (wormhole switching).
- The header needs two cycles to pass through the router. Each later flit
  needs one cycle.

**DMNI.** `dmni` is the network interface with its own DMA.

- To send, the processor writes a complete packet into memory, then writes
  `MMR_SEND_ADDR`, `MMR_SEND_LEN` and `MMR_SEND_START`. The DMNI reads the
  words (two scaled cycles per word) into the transmit FIFO. The NoC side
  pushes them into the router.
- On receive, each packet is written to the buffer at `MMR_RECV_ADDR`.
  `MMR_RECV_STATUS` then shows the packet length and `irq` rises. The next
  packet waits in the FIFO, and backs up into the NoC, until the processor
  writes `MMR_RECV_STATUS` to release the buffer.
- The memory access arbiter alternates between the send reader and the
  receive writer when both want the memory port in the same cycle.

## Register map (processor word addresses)

Addresses `0x0000`–`0x7FFF` are the scratchpad: 4 pages of 4096 words by
default. Page 0 holds the kernel and pages 1–3 hold tasks. Read data
returns one cycle after the access. Addresses with bit 15 set are
registers:

| offset | name | access |
|---|---|---|
| 0x00 | SEND_ADDR | W: memory address of the packet to send |
| 0x01 | SEND_LEN | W: length in flits, header and size included |
| 0x02 | SEND_START | W: start; R: bit 0 = send busy |
| 0x03 | RECV_ADDR | W: receive buffer address |
| 0x04 | RECV_STATUS | R: length of the stored packet, 0 = none; W: release |
| 0x08 | DVFS | W: 1 = UP, 2 = DOWN; R: {busy[12], vdd[9:8], period[6:4], pair[3:0]} |
| 0x09 | TIMER | R: window pending; W: clear |
| 0x0A / 0x0B | ENERGY / ENERGY_HI | R: energy of the last window (fJ) |
| 0x0C / 0x0D | REM_ENERGY / REM_ENERGY_HI | W: energy to classify; writing HI starts the check (managers only) |
| 0x0E | REM_RESULT | R: {valid[8], zone[5:4], command[1:0]} |
| 0x0F | SLEEP | W: gate the processor clock until the next interrupt |
| 0x10–0x14 | COUNT0..4 | R: instruction counts per class; W to 0x10: clear all |
| 0x1F | PE_ID | R: {x[15:8], y[7:0]} |

The processor interrupt (`proc_rsp.irq`) is high while a received packet
waits or a window has closed.

## Top level and parameters

`rem_manycore` builds a `MESH_X × MESH_Y` mesh of `pe` tiles. A tile whose
position is a multiple of `CLUSTER_X` in x and of `CLUSTER_Y` in y is a
manager and contains a `rem_zone`. Links at the mesh edge are tied off. PE
number `n = y*MESH_X + x` uses `pe_clk_o[n]`, `proc_req_i[n]` and
`proc_rsp_o[n]`.

| parameter | default | meaning |
|---|---|---|
| MESH_X, MESH_Y | 6, 6 | mesh size |
| CLUSTER_X, CLUSTER_Y | 3, 3 | cluster size (must divide the mesh) |
| WINDOW | 200000 | sampling window, nominal cycles |
| VH_PCT, VL_PCT | 85, 60 | hot and cold limits, % of E_max |
| PAGES, PAGE_WORDS | 4, 4096 | scratchpad size |

The 6x6 mesh of 3x3 clusters is the reference instance. The same RTL builds
the other evaluated sizes through parameters: 3x3 (3x3 clusters), 4x4 (4x4),
8x8 (4x4), 9x9 (3x3), 10x10 (5x5), 12x12 (3x3) and 12x12 (4x4). The mesh
size must be a multiple of the cluster size. Only the 6x6 default and a reduced 4x2
mesh of 2x2 clusters have been simulated. The other sizes elaborate
through the same generate loops, but they are untested. Verilator builds
of the larger meshes are slow, because every tile is a separate
specialisation.

## Where this RTL is the design's own

These points follow the reference design:

- 2D mesh with input buffering, credit-based flow control, round-robin
  arbitration and XY routing;
- clusters with an LMP at cluster position (0,0) and a GMP;
- the two-clock PE with a clock generator;
- a DMNI split around two bisynchronous FIFOs;
- one counter per instruction class;
- a nominal-clock window timer;
- the nine-pair DVFS chain, the 100 ns voltage latency and the processor
  hold;
- the 10 % regulator overhead;
- clock gating of a processor that has no task;
- E_max and the hot, warm and cold zones with UP and DOWN one step at a
  time;
- four memory pages.

These points are this design's own choices:

- flit width, packet format and buffer depths;
- the DMNI registers and interrupt rule;
- the register map;
- the clock-domain crossing of the window tick;
- the energy values;
- the hold counted in scaled cycles;
- ignoring commands during a hold;
- the sleep register, whole-cycle gating and the wake-up rule;
- tied-off mesh edges.

The reference computes the window energy and the zone decision in
operating-system code. Here both are hardware units (`energy_estimator`,
`rem_zone`) that the software reads and writes. The energy per window is
summed per instruction rather than from the counters at the end of the
window.

Not included:

- the processor and its operating system;
- the application repository that the GMP reaches;
- the power and energy characterisation flow that would supply the energy
  tables.

A 200,000-cycle window is the lower end of what keeps the monitoring
traffic cheap. Monitoring plots of the reference system show points closer
together (about 50,000 cycles). `WINDOW` is a parameter.

## Verification

Every RTL module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it shows |
|---|---|
| `tb_router` | 201 random packets from all inputs, random back-pressure; XY output port, integrity, per-pair order; 2-cycle header latency |
| `tb_bisync_fifo` | 4000 words across 4.0/5.5 ns and 7.0/4.0 ns clock pairs, full and empty both exercised |
| `tb_dmni` | send and receive overlapping across 4 ns / 5.5 ns clocks, buffer hold until release, memory arbitration |
| `tb_scratchpad` | both ports, read latency, collision rule |
| `tb_clock_gen` | all seven periods and the duty cycle, 4 ns in reset; no gated pulses while disabled, restart one cycle after enable |
| `tb_voltage_regulator` | 100 ns transitions in both directions |
| `tb_dvfs_ctrl` | the whole chain down and up against the table, hold lengths 23 and 19 cycles, commands ignored during hold |
| `tb_instr_counters`, `tb_sampling_timer`, `tb_energy_estimator`, `tb_rem_zone` | counts, window period, window energy against an independent sum, zone limits at ±1 fJ |
| `tb_pe` | loopback packet, counters, energy ratio across a frequency step, 4.5 ns clock, 23-cycle hold, regulator timing, REM unit; sleep until the next window interrupt, wake two cycles after it |
| `tb_rem_manycore` | closed loop on a 4x2 mesh of two 2x2 clusters, light zones: every mechanism (hot/warm/cold, frequency and voltage steps up and down, hold, router contention, receive back-pressure, cluster reports, sleeps with a gated processor clock after the slaves' tasks end) counted and required; energy hierarchy balanced |
| `tb_rem_manycore_heavy` | the same loop with heavy zones {45 %, 25 %}; every SP must reach the 0.9 V pairs |
| `tb_rem_manycore_full` | default 6x6 build, 200,000-cycle windows: two full REM rounds (all 32 SPs step to pair 2, then to pair 3 with a hold) |

The full-size test simulates about 420,000 nominal cycles of 36 PEs, which
takes about a minute.

## Simulating

Each testbench is a top module with no ports. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_rem_manycore \
        -y rtl -y tb +libext+.sv rtl/rem_pkg.sv tb/tb_rem_manycore.sv
    obj_dir/Vtb_rem_manycore

The models in `clock_gen` and `voltage_regulator` need `--timing`. For
synthesis, replace those two files with the clock source and regulator of
the target technology. Keep their ports.
