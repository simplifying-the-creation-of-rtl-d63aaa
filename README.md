# SG-Multi: a multi-bus interconnect with slave-side arbitration

SG-Multi connects several processor cores (masters) to memories and
peripherals (slaves) without a shared bus. Every master has its own wires to
every slave it may use, and contention is resolved **at the slave**: each slave
has a small arbiter per master. Two cores that talk to different slaves never
wait for each other. Two cores that want the same slave compete only there.
When one core loses arbitration for a read that another core is already
performing, it can take the winner's read data instead of waiting. This is
called **bus snooping**.

The masters and slaves never see each other. A master behaves as if it were
alone in the system, and a slave behaves as if it had only one master. All of
the multi-master logic sits in *wrappers*:

```
 AHB-Lite core ──► AHB adapter ──► master wrapper ═══╦══► slave wrapper ──► slave device
 AHB-Lite core ──► AHB adapter ──► master wrapper ═══╬══► slave wrapper ──► slave device
 native master ──────────────────► master wrapper ═══╩══► slave wrapper ──► slave device
                                     (16 slots)   plain wires  (one arbiter per master)
```

This repository holds synthesizable SystemVerilog for this fabric:

- the master wrapper
- the slave wrapper
- the arbiter unit
- an AHB-Lite bus adapter
- a top level that wires any number of masters (1–16) to any number of slaves (1–16)

It also holds self-checking testbenches and behavioural models of an AHB-Lite
core and of a memory slave.

## Signals and timing

Every transaction is pipelined in two stages: an **address phase** and a
**data phase**. The address phase of one transaction overlaps the last data
cycle of the previous one.

Master side:

| signal | dir | meaning |
|---|---|---|
| SGREQ | out | request; held until granted |
| SGADDR[31:0], SGSIZE[2:0], SGWnR | out | address, size (000 = 8 bit … 101 = 256 bit), write-not-read |
| SGWDATA | out | write data, valid in the data phase |
| SGGRANT | in | request accepted in this cycle (the address phase) |
| SGWAIT, SGERROR | in | status of the *next* cycle (see below) |
| SGRDATA | in | read data, valid in the last data cycle |

The slave side is the same, plus the following:

- **SGACTIVATE** from the wrapper means "this cycle is your address phase".
- **SGSNOOP** from the slave means "this read may be shared".

Byte and half-word transfers use the byte lanes of their address offset on
the 32-bit data bus.

**Early status signalling** is the subtle part. A slave drives
SGWAIT and SGERROR *before* the rising edge that starts the cycle they
describe. A master that samples SGWAIT = 1 at an edge knows that the cycle now
beginning is a wait cycle. If it samples SGWAIT = 0 after a grant or a wait
cycle, the cycle now beginning is the last one of the data phase. So
everyone knows one cycle ahead when a slave becomes free.

The slave wrapper uses this to run arbitration for the next transaction *in*
the last data cycle of the current one. That costs no extra cycle:

```
 cycle        1        2        3        4        5
 master A   addr A | wait   | wait   | last A |
 master B   req B  | req B  | req B  | addr B | wait ...
 SGWAIT@edge  1  ->  1   ->   0   ->   1        (sampled at the start of 2,3,4,5)
```

A request may only be considered in a cycle that began with SGWAIT
deasserted. The slave wrapper's *request timing filter* enforces this.

SGERROR is signalled the same way, in place of SGWAIT, for the last cycle of
a transaction. A slave with no wait cycles may also raise it together with
the grant, which rejects the transfer. SGWAIT and SGERROR are never high
together. An assertion in the slave wrapper checks this.

## Master wrapper (`sgm_master_wrapper`)

**Routing.** The top four address bits pick one of 16 slots, so the address
space is split into 16 equal blocks, one per slave.

- Only SGREQ is decoded to the chosen slot.
- Address, size, direction and write data are broadcast to all slots. Each
  slave wrapper only listens to the master it granted.
- During the address phase, SGGRANT, SGWAIT and SGERROR come back from the
  addressed slot.
- During the data phase, SGWAIT, SGERROR and SGRDATA come from the slot that
  owns the data phase. That slot is registered at the grant.

So a master can be in the address phase with one slave while it finishes a
data phase with another. `SLOT_EN` marks slots that have no slave; a request
to one of them is never granted.

**Snooping.** A four-state machine:

| state | meaning | leaves to |
|---|---|---|
| s0 idle | — | s1 when the master's *read* lost arbitration at a slave that raised SGSNOOP and SGWAIT for the winner |
| s1 analyse | first wait cycle of the winner's transaction; compare the request with SGSADDR/SGSSIZE broadcast by the slave wrapper | s0 on mismatch or SGERROR; s2 on match while SGWAIT stays high; s3 on match with the last cycle next |
| s2 wait | match found, slave still waiting | s3 when SGWAIT drops; s0 on SGERROR |
| s3 snoop | last cycle of the winner's transaction; its SGRDATA is the master's read data | s1 straight away if a new read has just lost in the same way, else s0 |

On the transition into s3 the wrapper raises SGGRANT towards the master. The
master therefore sees an ordinary grant followed by a one-cycle data phase,
and cannot tell a snooped read from one it won.

The direct s3 → s1 step matters when every core runs the same code in
lockstep. The next read loses while the previous one is being snooped, and
without that step it would miss its chance.

**Match rule.**

- The top four address bits are ignored, because they select the slave.
- So are the low address bits inside the current transaction: log2 of its
  size in bytes.
- All other address bits must be equal.
- The request may not be larger than the current transaction.

For example, a 16-bit read of 0x…102 matches a 32-bit transaction at 0x…100.
A 32-bit read of 0x…104 does not, and neither does a 64-bit read of 0x…100.

The whole data word is forwarded. The master extracts its own byte lanes.

## Slave wrapper (`sgm_slave_wrapper`) and arbiter (`sgm_arbiter`)

Each cycle, the slave wrapper does the following:

1. **Filter.** Requests pass only if the cycle began with SGWAIT low.
2. **Arbitrate.** There is one arbiter unit per slot. Every slot has two
   one-hot priority levels:
   - *static*: fixed and unique; slot 0 is highest.
   - *dynamic*: starts at level 0 and moves one level up, saturating, at every
     edge where the slot requested and lost. It returns to level 0 when the
     slot wins.

   The highest dynamic level wins, and static priority breaks ties. With all
   masters requesting continuously this becomes round-robin. The testbench
   checks an exact 1/3 share for three masters.
3. **Drive the slave.** The winner's address, size and direction go to the
   slave with SGACTIVATE, all in the grant cycle. The winner's slot is kept
   for the data phase so its SGWDATA reaches the slave.
4. **Broadcast.** The wrapper sends the following to all master wrappers:
   - the slave's SGRDATA/SGWAIT/SGERROR
   - SGSNOOP (address-phase cycle only)
   - SGSADDR/SGSSIZE, the registered address and size of the transaction in
     its data phase

**How the arbiter compares without a comparator tree.** Each unit ORs its
one-hot level onto a shared *common arbiter interconnect* when it requests.
It wins a stage if nobody put a bit on the common wires above its own bit.
The unit builds the "bits above mine" mask from its one-hot level `p` as
`~((p << 1) + '1)`, dropping the carry.

For example, with p = 00100000:

- shifting left gives 01000000;
- adding 11111111 gives 00111111;
- inverting gives the mask 11000000.

The dynamic stage comes first. Only its survivors put their static level on
the static wires. One arbiter is thus a handful of gates whose size grows
linearly with the number of masters.

`BYPASS_ARBITER` (at the top: `ARB_BYPASS`) removes the arbiter for a slave
with a single master: the filtered request is the grant. This is an area
optimisation and does not change timing.

## AHB-Lite adapter (`sgm_ahb_adapter`)

It lets an unmodified AHB-Lite master (a Cortex-M0, for instance) drive a
master wrapper:

- An AHB address phase becomes an SG-Multi request in the same cycle. HSIZE
  and SGSIZE share their encoding.
- If SGGRANT comes at once, both buses move to the data phase together, and
  the adapter adds no cycle.
- Otherwise the request is held in a register and HREADY stays low until the
  grant arrives.
- During the data phase, the registered SGWAIT and SGERROR drive HREADY.
  HREADY goes high exactly in the last SG-Multi data cycle.
- SGERROR becomes the two-cycle AHB error response: HRESP = 1 with
  HREADY = 0, then HRESP = 1 with HREADY = 1.
- HBURST, HPROT and HMASTLOCK are ignored, so bursts are carried out as
  single transfers.

## Top level (`sgm_system`)

| parameter | default | meaning |
|---|---|---|
| NUM_MASTERS | 4 | masters, 1–16; master *m* is slot *m* in every slave wrapper |
| NUM_SLAVES | 16 | slave ports, 1–16; slave *s* owns addresses with top nibble *s* |
| ADDR_W / DATA_W | 32 / 32 | bus widths |
| DYN_LEVELS | 4 | number of dynamic priority levels (≥ 1; 1 = static priority only) |
| SNOOP_EN | 1 | build the master wrappers with bus snooping |
| ARB_BYPASS | 0 | single-master systems: leave the arbiters out |
| AHB_MASTERS | all 1 | per master: AHB-Lite port through an adapter (1) or native port (0) |
| CONN | all 1 | CONN[m][s]: master *m* wired to slave *s* |

The ports are arrays of plain signals:

- per master, an AHB-Lite port set and a native port set (the unused set is
  ignored and its outputs are driven to zero);
- per slave, a native slave port set;
- one clock `sgclk` and an asynchronous active-low reset `sgresetn`.

Cores and slave devices (memories, peripherals) are outside the top.

At the defaults, generic synthesis with Yosys gives about 2,900 cells and
1,100 flip-flops.

## Measured behaviour

The cycle counts below come from `tb_sgm_workloads`. Each master reads 100
32-bit words back to back. Every slave needs four cycles per transaction
(three wait cycles).

| masters | same 100 words, snooping | same 100 words, no snooping | own slave each |
|---|---|---|---|
| 1 | 402 | 402 | 402 |
| 2 | 402 | 802 | 402 |
| 3 | 402 | 1202 | 402 |
| 4 | 402 | 1602 | 402 |
| 8 | 402 | 3202 | 402 |

- With snooping, one SRAM transaction serves every master, so the time does
  not depend on the number of masters.
- Without snooping, each extra master adds 100 × 4 cycles.
- Masters using different slaves never slow each other down.

The 402 cycles are the 400 cycles of the reads plus pipeline fill and
drain. The published measurements of the same experiment on Cortex-M0
systems were 510 cycles with snooping for 1–4 cores, and 510/811/1211/1611
without. Those counts include the program's set-up code, and they show the
same +400 per core. With an immediate grant, the AHB-Lite adapter plus fabric
takes exactly as many cycles as a plain AHB-Lite bus: 20 back-to-back
transfers take 21 cycles.

## Where this RTL departs from the original description, or fills gaps

- **SGWAIT with SGERROR.** One passage of the original protocol
  description requires SGWAIT to be high with SGERROR. The protocol
  specification and its waveforms make the two mutually exclusive. This RTL
  follows the specification.
- **AHB error polarity.** The adapter drives HRESP = 1 for an error, as
  AHB-Lite defines it.
- **Dynamic levels.** The original leaves the number of dynamic levels open;
  4 is this design's choice. "Zero dynamic levels" (pure static priority) is
  expressed as `DYN_LEVELS = 1`.
- **Static priority order.** Slot 0 is highest. A slot's dynamic level does
  not change in cycles without a request.
- **Snoop state machine details.** The exact transition conditions and the
  grant on entry to s3 are this design's reading of the state descriptions.
  The snoop is also dropped if the master withdraws its request.
- **Adapter internals.** The adapter's internals are this design's own. The
  original only requires that it add no latency.
- **Reset.** All registers reset asynchronously, and dynamic levels reset to
  level 0.
- **Not included.** The cores, the ROMs, the SRAM controller, the LED and
  serial-port controllers of the reference systems, and the design tool that
  generated such systems from XML descriptions.

## Files

| file | contents |
|---|---|
| `rtl/sgm_pkg.sv` | size encoding, slot count, snoop state type, the snoop match function |
| `rtl/sgm_arbiter.sv` | one arbiter unit |
| `rtl/sgm_slave_wrapper.sv` | slave wrapper |
| `rtl/sgm_master_wrapper.sv` | master wrapper with routing and snooping |
| `rtl/sgm_ahb_adapter.sv` | AHB-Lite to SG-Multi adapter |
| `rtl/sgm_system.sv` | top level |
| `tb/sgm_tb_pkg.sv` | shared test types, memory contents formula, byte-lane masks |
| `tb/sgm_ahb_master_model.sv` | AHB-Lite master model that checks data and error responses |
| `tb/sgm_mem_slave_model.sv` | SG-Multi memory slave with configurable wait cycles and error addresses |
| `tb/sgm_workload_bench.sv` | one system plus models running the 100-read program |
| `tb/tb_*.sv` | self-checking testbenches; each prints `TB_RESULT checks=… failures=…` |

## Simulating

Verilator 5 runs every testbench in the same way. For example, for the
full-size system:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sgm_system \
  -y rtl -y tb +libext+.sv rtl/sgm_pkg.sv tb/sgm_tb_pkg.sv tb/tb_sgm_system.sv
./obj_dir/Vtb_sgm_system
```

Replace `tb_sgm_system` with any of the following:

- `tb_sgm_arbiter`: random arbitration rounds against a reference.
- `tb_sgm_slave_wrapper`: a cycle reference model of filter, arbitration,
  dynamic levels and broadcasts, plus a round-robin check.
- `tb_sgm_master_wrapper`: directed routing and snooping cases, including
  s1 → s3, s3 → s1 and refused snoops.
- `tb_sgm_ahb_adapter`: random grant delays, wait cycles and errors, and the
  zero-latency check.
- `tb_sgm_system`: four AHB-Lite masters and sixteen slaves at full size.
  It runs random traffic with data checking and counts of each mechanism:
  contention, lost arbitration, snoops, wait cycles, errors and parallel
  transactions.
- `tb_sgm_workloads`: the table above, with checks.
- `tb_sgm_snoop_match`: the snoop address rule against a byte-range
  containment model, for all sizes and for 32- and 64-bit addresses.
- `tb_sgm_system_config`: a reduced system with three masters (one of them
  native), five slaves, one missing connection and static priority only.
  Under constant contention, masters finish in strict slot order, after 402,
  802 and 1202 cycles. Requests to an unwired or empty slot are never
  granted.

Each testbench finishes within a second.
