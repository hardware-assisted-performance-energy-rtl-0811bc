# REALprof — a hardware sampling profiler for multi-core processor systems

Software profilers learn what a processor is doing by interrupting it. They read its
performance counters from an interrupt handler. That costs time and disturbs caches and
scheduling, and the cost grows with the sampling rate and the number of counters, so software
sampling stops being useful below about a millisecond. REALprof moves the sampling into
hardware. It sits next to the processors as a bus slave and watches one program counter and a
set of event lines per core. Every *Sampling Period* clock cycles it stores, for every
monitored signal, one 32-bit record in an on-chip memory. The processors execute nothing
while a run is in progress. Software only programs a few registers before the code section of
interest, stops the run (or lets it fill up) afterwards, and reads the records back over the
bus. The period can be as short as one cycle.

The records serve two uses:

* **Performance.** Each record holds the per-period event count of each core: cache hits,
  misses and stalls, multiplies, divides, TLB misses, power-down cycles and register-file
  accesses. The PC records tie every sample to the code that was running.
* **Energy.** A component's energy over a run is estimated as
  `E = P_idle * T_total + Σ_events E_event * C_event`. Here `C_event` is an event count read
  from the records, and `P_idle` and `E_event` are per-component figures from a gate-level
  power analysis or a datasheet. This arithmetic runs on a host computer. It is not part of
  the RTL.

The RTL describes the profiler configured for a quad-core system at 100 MHz. It has 4 cores
× 17 monitors = 68 monitors, and each monitor keeps 256 records of 32 bits. That is
557,056 bits of memory, one 9-kbit FPGA block RAM per monitor.

## Structure

```
realprof (top)
├── realprof_ahb_slave      AMBA 2.0 AHB slave: register and record windows
├── realprof_ctrl           registers + control unit (offset, period, EnLog, record counter)
└── g_core[c]  (c = 0..NUM_CORES-1)
    ├── realprof_pc_monitor        event 0: samples the core's PC on EnLog
    │   └── realprof_sram
    └── g_evt[e]  (e = 1..NUM_EVENTS-1)
        └── realprof_event_monitor events 1..16: counts, logs, clears
            └── realprof_sram      256 x 32 simple dual-port, registered read
realprof_pkg                register indices, status bits, event numbers, address split
```

The controller drives the same control signals to every monitor:

* `en[e]`: the run is active and event `e` is not masked.
* `enlog`: a one-cycle pulse at the end of each period.
* `waddr`: the record number, equal to the current Sampling Number.

Each monitor answers with its memory's read port. The AHB slave gives the record index to all
memories at once and picks the addressed monitor's word.

Monitor `m = core * 17 + event`:

| event | signal (`evt[c][event-1]`, or `pc[c]` for 0) | event | signal |
|---|---|---|---|
| 0 | program counter | 9 | data cache read miss |
| 1 | pipeline stall on instruction-cache miss | 10 | data cache write miss |
| 2 | pipeline stall on data-cache miss | 11 | cache flush |
| 3 | multiply | 12 | instruction TLB miss |
| 4 | divide | 13 | data TLB miss |
| 5 | instruction cache hit | 14 | power-down cycle |
| 6 | data cache read hit | 15 | single register-file access |
| 7 | data cache write hit | 16 | double register-file access |
| 8 | instruction cache miss | | |

An event line is a level. The monitor counts the **cycles** in which it is high. A processor
that wants to count occurrences must pulse the line for one cycle per occurrence.

## A profiling run, cycle by cycle

This timing is what a user of the records has to get right. Let cycle `E` be the first clock
cycle after the edge that captures the write of `1` to `Status[0]`. Let `N` be the Start
Offset and `P` the Sampling Period, where `P = 0` counts as 1.

1. Cycles `E … E+N-1`: the run is waiting (`Status = 0x3`). Sampling Number has been cleared
   to 0, and the event counters hold at zero.
2. From cycle `E+N` on, `en` is high (`Status = 0x5`). Each event monitor adds 1 in every
   cycle in which its line is high.
3. Record `k` covers cycles `E+N+kP … E+N+kP+P-1`. In the last of these cycles, `enlog` is
   high. Then:
   * each event monitor writes its count to record `k`, including an event in that last
     cycle, and restarts from 0;
   * each PC monitor writes the PC present in that cycle;
   * Sampling Number becomes `k+1`.
4. After record 255 the run ends by itself: `en` drops and `Status = 0x8` (DONE). In the
   default configuration a run therefore covers `256 × P` cycles. At 100 MHz with `P = 100`,
   that is 256 µs at 1 µs resolution.
5. Writing `0` to `Status[0]` ends a run at once. A record whose EnLog falls in the cycle of
   the stop write is still stored and counted. The unfinished period after it is dropped.
   Records from `Sampling Number` upwards keep their old contents: the memories are never
   cleared.

While `en[e]` is low, event monitor `e` holds its counter at 0. A masked event therefore
writes zero records in every period. The PC monitor (event 0) writes 0 when masked. Writing
`1` to `Status[0]` while a run is waiting or running has no effect. Starting again from IDLE
or DONE begins a new run at record 0.

## Register map

The slave decodes the low 18 bits of the address. The system decoder must give it a 256 KB
region, `Base`. All accesses are 32-bit, with no wait states and always an OKAY response.

| offset | register | access | meaning |
|---|---|---|---|
| 0x00 | Status | RW | bit0 START: write 1 to start, 0 to stop; reads 1 while waiting or running. RO bits: bit1 WAITING, bit2 RUNNING, bit3 DONE |
| 0x04 | Sampling Period | RW | cycles per record (0 = 1). Reset 0 |
| 0x08 | Start Offset | RW | cycles between the start write and the first enabled cycle. Reset 0 |
| 0x0C | Sampling Number | RO | records taken in the current or last run (0…256) |
| 0x10 | Event Mask | RW | bit e enables event e in every core (bits 16:0). Reset 0x1FFFF |
| 0x20000 + m·0x400 + r·4 | record r of monitor m | RO | m = 0…67, r = 0…255 |

Writes to the record window and to unused offsets are ignored. Reads of unused offsets, and
of monitors at or beyond `NUM_CORES × NUM_EVENTS`, return 0. An address phase is taken when
`hsel & hready` hold and `htrans` is NONSEQ or SEQ. Bursts therefore work as runs of single
words. `hburst` is not used, and `hreadyout`/`hresp` are constant (always ready, always OKAY).

Typical driver sequence:

1. Write Sampling Period, Start Offset and Event Mask.
2. Write `1` to Status.
3. Run the code to be measured.
4. Poll Status for DONE, or write `0` to stop.
5. Read Sampling Number.
6. Read `Sampling Number` records from each monitor.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `realprof` | `NUM_CORES` | 4 | processors observed |
| | `NUM_EVENTS` | 17 | monitors per core (PC + 16 events); at most 32 (mask width) |
| | `DEPTH` | 256 | records per monitor (power of two, ≤ 256 with the address split used) |
| | `DW` | 32 | record / counter / PC width |

`NUM_CORES × NUM_EVENTS` must not exceed 128, the number of monitor slots in the record
window.

## Where this RTL goes beyond, or departs from, the original REALprof description

The register set, the offset/period/log/clear behaviour, the per-monitor 256 × 32 memory, the
event list and the 68-monitor quad-core configuration follow the published design. The
following are this implementation's own choices:

* **Status layout**, stop on full memory (DONE), and ignoring a restart while running. The
  original gives only the register's name and purpose.
* **Event Mask sharing.** A 32-bit mask cannot hold one bit per monitor (68), so bit e
  enables event e in every core.
* **Record window address split.** The original gives only the five register offsets.
* **Counting details:**
  * an event in the EnLog cycle is counted in the record being written, so a record covers
    exactly `P` cycles;
  * counters saturate rather than wrap;
  * a disabled monitor records 0.
* **Period 0 means 1** (one record per cycle).
* **Wiring.** In the original block diagram, the event lines and program counters pass
  through the controller on the way to the monitors. Here they go to the monitors directly.
  The function is the same.
* **Memory read port.** It is a simple dual-port memory with a registered read, so the bus
  reads while a run is writing.

Not included: the processors (LEON3 SPARC V8 cores with their caches, MMU and FPU) and the rest
of the system around them (AHB arbiter and decoder, DDR2 controller, debug unit and JTAG link,
AHB-APB bridge, UART, timer, interrupt controller, SPI, VGA, Ethernet). These are the
surroundings of the profiler, taken from an existing IP library, not part of it. Their
signals appear as the top's ports: the AHB slave port, `pc` and `evt`. Also not included: the
driver software and the host-side report and energy tools.

## Simulation

Every testbench checks itself. It prints `TB_RESULT checks=N failures=F` and stops, and a
watchdog ends a run that hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/realprof_pkg.sv tb/tb_realprof.sv \
          --top-module tb_realprof -o sim && ./obj_dir/sim
```

Replace `tb_realprof` with any other testbench to run it.

| testbench | what it shows |
|---|---|
| `tb_realprof` | The whole profiler at its default size. It drives random event lines with a different activity per line (one always on, one never on) and stepping/jumping PCs. A reference model computes every record from the register values written. Run 1: offset 20, period 3, two events masked, run to full. Run 2: period 0, PC masked, stopped by software. Run 3: period 5, a restart attempt, run to full. After every run all 17,408 records are read back over AHB, about 105,000 checks in all. Each mechanism must occur or the test fails. |
| `tb_realprof_case_study` | The microsecond profiling setup on a 100 MHz quad-core system: period 100 (1 µs per record), all events, stopped by software after 128 records. The stand-in cores alternate compute and memory-bound phases. Checks every record, that no count exceeds the period, that an always-on line reads 100 per record, and that memory-bound phases show higher data-cache stall counts. |
| `tb_realprof_ctrl` | With depth 8, exact cycle positions of En and of every EnLog for a given offset and period, the record addresses, DONE, software stop, period 0 and an ignored restart. |
| `tb_realprof_event_monitor` | Per-period counts with random En/EveAct and varying periods, saturation (3-bit instance), and the restart after a log. |
| `tb_realprof_pc_monitor` | PC capture on EnLog, and zero records while masked. |
| `tb_realprof_sram` | Full write/read-back, one-cycle read latency, old data on a read during a write. |
| `tb_realprof_ahb_slave` | Pipelined back-to-back AHB transfers: register writes and reads, ignored writes, record reads of every monitor, unmapped reads, `hready` low. |

Each testbench has been shown to fail on a deliberately broken copy of its module. The
full-size end-to-end test takes well under a second of simulation time on Verilator, so
simulations need no reduced parameters.

## Trust and limits

* The behaviour within the original description is covered by the tests above. The choices
  listed in the previous section are this design's, and a driver written for the original
  hardware would need to match them.
* Event lines and program counters are sampled on `clk`. They must come from the same clock
  domain, as they do when the profiler runs at the processors' clock.
* The memories are not reset. Records that a run has not yet written read as whatever was
  there before.
* The SRAMs are written as plain arrays with a registered read. FPGA tools map each one to a
  block RAM. For an ASIC, replace `realprof_sram` with a 256 × 32 two-port macro of the same
  timing.
