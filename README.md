# Deterministic multi-core fabric for a quadcopter flight controller

On an ordinary multi-core processor, tasks that share no data can still slow
each other down. They compete for a common memory controller, a common bus or
a common cache, and a worst-case timing analysis has to assume the worst of
all that contention. This design avoids sharing in the first place. Each
safety-critical task gets a *Deterministic Execution Unit* (DEU): a small
microcontroller of its own, made of a private bus, memory, timer, watchdog and
communication registers. The task's core is the only master on that bus, so
every access takes the same number of cycles whatever the other cores are
doing. A task on a DEU can then be analysed like a bare-metal program on a
single-core chip. Non-critical work stays on a conventional general-purpose
multi-core, which is coupled to the DEUs only through dedicated hardware
links.

The RTL here is the on-chip fabric of one such system: a quadcopter flight
controller with five DEUs. It is written in synthesizable SystemVerilog
(IEEE 1800-2017). The processor cores are not part of it. Each DEU exposes
an AXI4-Lite master port where a soft core (MicroBlaze, a RISC-V, a small
MIPS, ...) is attached, and the general-purpose processor has one port of
its own.

## The system at a glance

```
            core 0        core 1        core 2        core 3          core 4        general-purpose
              |             |             |             |               |              cores (ps_*)
        +-----v----+  +-----v----+  +-----v----+  +-----v-----+  +-----v----+           |
        | DEU 0    |  | DEU 1    |  | DEU 2    |  | DEU 3     |  | DEU 4    |           |
        | Sensor   |  | IMU      |  | PID      |  | Mission   |  | MAVLink  |           |
        | Control  |  |          |  | Control  |  | Control   |  |          |           |
        +-+------+-+  +-+------+-+  +-+----+---+  ++--+--+--+-+  ++--+--+--++           |
          |  vars |     | vars |      |    |       |  |  |  |     |  |  |  |            |
          io0     +-->--+  io1 +-->---+ io2 Q0.rd  io3 |  |  |    io4 |  |  |            |
                  shared-variable wires    ^          Q1.rd | |      Q0.wr|  |            |
                                           +--- Q0 <---------|-|-------+  |  |            |
                                                Q1 <---------|-|----------+  |            |
                                                Q2.rd <------+ |      Q2.wr <-----------+
                                               semaphore p0 ---+--- p1 ------+
                                               shared bus m0 -----  m1 ------+
                                                        |
                                                 shared peripheral (shp_*)
        Sobel accelerator: pix_* in, edge_* out (serves the general-purpose cores)
```

| DEU | Task | Writes variables | Reads variables | External slots (k at 0x4003_0000 + k*0x1000) |
|-----|------|------------------|-----------------|-----------------------------------------------|
| 0 | Sensor Control | 0-5 (sensor data) | none | 0: own I/O |
| 1 | IMU (attitude/position estimate) | 6-10 | 0-5 | 0: own I/O |
| 2 | PID Control | 15 (status) | 6-14 | 0: own I/O, 1: Q0 read side |
| 3 | Mission Control | 11-14 (setpoints) | 6-10 | 0: own I/O, 1: Q1 read, 2: Q2 read, 3: semaphore port 0, 4: shared bus |
| 4 | MAVLink | none | 6-15 | 0: own I/O, 1: Q0 write, 2: Q1 write, 3: semaphore port 1, 4: shared bus |

Queues: Q0 carries controller parameters from MAVLink to PID Control. Q1
carries mission commands from MAVLink to Mission Control. Q2 carries
"landing mark found" messages from the general-purpose cores to Mission
Control. The landing-mark detection itself runs in software on the
general-purpose cores, and the Sobel edge accelerator (`sobel_accel`) helps
it.

The tasks, the links between Sensor Control, IMU and PID Control, the
parameter path from MAVLink to PID and the landing signal to Mission Control
follow the reference architecture. The variable numbering, the use of queues
for Q0 and Q1, and the choice of Mission Control and MAVLink as the two users
of the shared peripheral are choices of this implementation.

## Inside a DEU (`deu`)

`deu` contains the private bus `deu_axi_bus` and four default slaves. It
also brings out `NUM_EXT` further slave slots for things outside the DEU.
Each DEU has the same address map:

| Address | Slave | Notes |
|---------|-------|-------|
| 0x0000_0000 | `deu_mem`, MEM_BYTES (64 KiB) | byte strobes, synchronous block RAM |
| 0x4000_0000 | `deu_timer` | periodic release of the task |
| 0x4001_0000 | `deu_watchdog` | fail-safe restart request |
| 0x4002_0000 | `deu_ipc` | shared variables, variable v at +4*v |
| 0x4003_0000 + k*0x1000 | external slot k | I/O, queue ports, semaphore, shared bus |
| anything else | internal responder | DECERR |

**Timing.** The bus routes all channels combinationally and adds no cycles.
Every slave inside a DEU, and every queue and semaphore port, accepts a
write when AW and W are both valid, and answers on B one cycle later. It
accepts a read when AR is valid and answers on R one cycle later. With a
master that keeps BREADY/RREADY high, every such access is exactly two
cycles from issue to response, and nothing outside the DEU can change that.
The one exception is the shared-peripheral slot, described below. One write
and one read may be outstanding at a time.

### Register maps

All registers are 32 bits wide. Unless noted, writes need all four strobes,
and bad offsets answer SLVERR.

`deu_timer`: `0x00 CTRL` [0] enable, [1] interrupt enable. `0x04 PERIOD`
in cycles, at least 2; it resets to 100 000, which is the 1 ms task period at
100 MHz. `0x08 COUNT` (read-only). `0x0C STATUS` [0] period elapsed, write 1
to clear. Writing CTRL or PERIOD restarts the count. While enabled, `tick`
pulses exactly every PERIOD cycles. `irq` = pending AND interrupt enable.

`deu_watchdog`: `0x00 CTRL` [0] enable. `0x04 TIMEOUT` resets to 200 000
cycles. `0x08 KICK`: writing the key 0x5A5A_0F0F reloads the counter, and
any other value is ignored. `0x0C COUNT` (read-only). `0x10 STATUS` [0]
expired, write 1 to clear. When the counter runs out, `reset_req` pulses for
one cycle (meant to restart the core) and `expired` stays set. The counter
then reloads, so a task that stays hung keeps firing.

`deu_ipc`: offset 4*v is shared variable v (16 of them). Writes are
accepted only for variables in `OWN_MASK`; byte strobes are honoured. Reads
are accepted for variables in `OWN_MASK` or `READ_MASK`.

`msg_queue` write side: `0x0 DATA` push; `0x4 STATUS` [0] full, [31:16]
free entries. Read side: `0x0 DATA` pop; `0x4 STATUS` [0] empty, [31:16]
entries held.

`hw_semaphore`, per port: `0x0 CTRL` [0] request (only strobe 0 is
needed). `0x4 STATUS` [0] granted to this port, [1] held by some port,
[15:8] number of the holding port.

## Shared variables: registers instead of a common memory

There is no shared memory anywhere in the fabric. A shared variable is one
register, and it sits in the `deu_ipc` of the single DEU whose task writes
it. The register's output is wired to the `deu_ipc` of every DEU that reads
it. So a read is a local access with a fixed latency, and it can never
collide with the writer. A DEU that tries to write a variable it does not
own gets SLVERR, and the register is unchanged. Variable v sits at
0x4002_0000 + 4*v in every DEU. A program built from one source tree for all
DEUs can therefore use the same symbol addresses everywhere.

In `quadcopter_soc` the variables travel on a single bus of 16 words. Each
word is the OR of the five DEUs' `var_q` outputs, since a register reads as
zero in every DEU that does not own it. `OWN_MASK` and `READ_MASK` are
parameters, so assigning a variable to a writer and its readers is a matter
of parameters. In the reference flow a generator derives them from the
system description.

Readers always see the latest value, and there is no handshake. A value
wider than 32 bits is written one word at a time, so a reader can see a mix
of old and new words. Software must allow for that, for example with a
sequence counter in a separate variable. The architecture relies on the
values changing continuously, so the newest sample is always the one that
counts.

## Message queues (`msg_queue`)

A queue is a FIFO with two separate AXI4-Lite slave ports. The write port
sits on the sending DEU's bus and the read port on the receiving DEU's bus.
Neither side ever waits. A push to a full queue and a pop from an empty
queue both answer SLVERR in the normal two cycles, and the data is not
stored or not returned. Software checks STATUS or reacts to the error. Push
and pop may happen in the same cycle, and each sees the queue as it was
before that cycle. The default DEPTH is 16 words.

The storage depends on the size. A queue of up to `REG_MAX_DEPTH` words (16)
is a register file read asynchronously at the read pointer. A larger queue
uses a RAM with a synchronous read port, so it fits FPGA block RAM. The
oldest message is then kept in an output register. Whenever that register
is free or being popped, it is refilled from the RAM. A push into a queue
whose RAM part is empty goes straight into the register. So both styles
behave the same on the bus: a word can be popped from the cycle after its
push.

## Shared peripherals: a second-level bus and a semaphore

The cleanest way to share a peripheral is to give it a DEU of its own and
send it requests through queues. When that is too costly, the peripheral can
be reached by several DEUs directly. Two blocks then work together, and they
solve different problems:

* `shared_periph_bus` keeps single transactions apart. It has one master
  port per DEU and one slave port for the peripheral. The DEU buses stay
  separate, and only accesses to this slot can be delayed. While the bus is
  idle, it registers a grant for one master that has a pending AW or AR,
  chosen round-robin starting after the previous winner. It then connects
  only that master until the B or R handshake. An uncontended access costs
  one cycle more than the peripheral itself (3 cycles with a one-cycle
  peripheral). A contended one waits for at most NUM_MASTERS-1 other
  transactions. `contention` is high for one cycle for each cycle in which a
  master waited because another master held or won the bus.
* `hw_semaphore` makes a *sequence* of accesses exclusive. Each DEU has its
  own port. A task sets its request flag and polls STATUS until it is
  granted, which needs no scheduler because each DEU runs only one task. It
  clears the flag to release the lock. When the lock is free, the waiting
  port with the lowest number wins, so priorities are static. A holder is
  never pre-empted. The grant is registered one cycle after the request is
  written, so the first poll after the write response already sees it when
  the lock was free.

In `quadcopter_soc`, Mission Control has semaphore port 0 (the higher
priority) and MAVLink port 1. The peripheral itself, for example an SPI
controller, is outside the fabric and is reached through `shp_req`/`shp_rsp`.
The semaphore does not enforce anything. A task that skips the semaphore can
still reach the peripheral through the bus, and only its single transactions
are kept whole.

## Sobel accelerator (`sobel_accel`)

This is a streaming 3x3 Sobel filter. It takes grey pixels in raster order,
one per cycle whenever `in_valid` is high, with `in_sof` on the first pixel
of a frame. Two line buffers of IMG_W pixels (640 by default) and a 3x3
shift-register window give it a full neighbourhood on every pixel. For each
input pixel at column >= 2 of row >= 2, it outputs min(|Gx| + |Gy|, 255) for
the window centred one row up and one column left. `out_x`/`out_y` give that
centre. The output comes two cycles after the pixel that completes the
window. A W x H frame gives (W-2) x (H-2) outputs, and border pixels give
none. There is no back-pressure. Frame height is unlimited. How the pixels
get to the accelerator (DMA or a video interface) is outside this RTL.

## Files

| File | Contents |
|------|----------|
| `rtl/r2d2_pkg.sv` | AXI4-Lite request/response structs, response codes, DEU address map |
| `rtl/axil_reg_port.sv` | AXI4-Lite slave front end used by all register blocks |
| `rtl/deu_axi_bus.sv`, `deu_mem.sv`, `deu_timer.sv`, `deu_watchdog.sv`, `deu_ipc.sv` | DEU parts |
| `rtl/deu.sv` | one DEU |
| `rtl/msg_queue.sv`, `hw_semaphore.sv`, `shared_periph_bus.sv` | links between DEUs |
| `rtl/sobel_accel.sv` | edge-detection accelerator |
| `rtl/quadcopter_soc.sv` | top level |
| `tb/axil_master_bfm.sv` | AXI4-Lite master for the testbenches; checks that responses stay valid until they are taken |
| `tb/msg_queue_tester.sv` | test procedure shared by both queue storage styles |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_control_loop_jitter` |

All AXI ports are pairs of packed structs (`axil_req_t`, `axil_rsp_t`), not
interfaces. That keeps the top-level ports plain and lets arrays of links be
declared directly.

## Simulating

Each testbench checks its block against values it works out on its own. It
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog if
something hangs. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/r2d2_pkg.sv tb/tb_quadcopter_soc.sv --top-module tb_quadcopter_soc
./obj_dir/Vtb_quadcopter_soc
```

`tb_quadcopter_soc` runs the whole fabric with every parameter at its
default: 64 KiB per DEU, a 100 000-cycle timer period and 640-pixel lines.
It plays all five cores and the general-purpose cores through one control
period. It publishes and reads every shared variable, checks that foreign
writes are rejected, overflows and underflows a queue, and delivers a
landing message. It makes the two semaphore users contend, contends on the
shared bus while checking that the Sensor Control DEU still answers in
exactly two cycles, and provokes a decode error. It also streams a 640 x 4
frame through the Sobel filter, lets one watchdog expire, and measures two
timer periods of exactly 100 000 cycles. It counts each of these events and
fails if any of them never happened. It takes about a second.

`tb_control_loop_jitter` repeats the measurement that motivates the
architecture. It runs the control loop for 20 timer periods, with the period
shortened to 3000 cycles. Sensor Control, IMU and PID Control execute fixed
access sequences on every tick. At the same time, Mission Control and MAVLink
hit the shared peripheral at random moments, and the general-purpose cores
post random messages. It reports the minimum, maximum and mean execution
time of each task. The three control-loop tasks must show no jitter at all,
while the two shared-bus users do vary:

```
task 0: periods 20  min 40  max 40  mean 40 cycles
task 1: periods 20  min 85  max 85  mean 85 cycles
task 2: periods 20  min 49  max 49  mean 49 cycles
task 3: periods 20  min 25  max 35  mean 26 cycles
task 4: periods 20  min 25  max 33  mean 26 cycles
```

These times count only the fabric. A real core adds its own execution
time, which the fabric cannot change.

The unit testbenches also check cycle counts: two-cycle accesses, exact timer
periods and watchdog timeouts, the one-cycle arbitration cost of the shared
bus and the Sobel output latency.

## Parameters

| Module | Parameter | Default | Meaning |
|--------|-----------|---------|---------|
| `quadcopter_soc`, `deu` | MEM_BYTES | 65536 | local memory per DEU |
| | TIMER_PERIOD | 100000 | timer reset period (1 ms at 100 MHz) |
| | WDT_TIMEOUT | 200000 | watchdog reset timeout |
| `quadcopter_soc` | QUEUE_DEPTH | 16 | words per message queue |
| `msg_queue` | REG_MAX_DEPTH | 16 | largest queue kept in registers; larger ones use RAM |
| | IMG_W | 640 | pixels per line for the Sobel filter |
| `deu` | NUM_EXT, NUM_VARS, OWN_MASK, READ_MASK | 1, 16, 0, 0 | external slots and shared-variable ownership |
| `hw_semaphore` | NUM_PORTS | 2 | users of one shared resource |
| `shared_periph_bus` | NUM_MASTERS | 2 | DEUs sharing one peripheral |

To add a DEU or a link, edit `quadcopter_soc`: instantiate another `deu`,
give it an ownership mask and OR its `var_q` into the variable bus, or add a
`msg_queue` between two external slots. The target chip has 560 KiB of
on-chip memory for all DEUs together. Five DEUs at 64 KiB use 320 KiB.

## How far to trust it, and where it goes beyond the reference architecture

* The architecture fixes the structure: one DEU per critical task, a
  sole-master AXI bus, the default timer, watchdog, IPC and memory,
  shared variables as owner-written registers wired to their readers,
  two-port FIFO queues, and a lower-level bus plus a static-priority semaphore
  for shared peripherals. It does not fix register layouts, widths, sizes,
  reset values, error behaviour or handshake timing. Every one of those here
  is a choice of this implementation. The watchdog and the Sobel filter are
  only named, so their behaviour here is the simplest usual one.
* The AXI variant is AXI4-Lite (single 32-bit transfers). A core that issues
  AXI4 bursts would need a protocol converter in front of `core_req`.
* Round-robin arbitration on the shared bus is an implementation choice. The
  reference only asks for static priorities in the semaphore.
* The system clock is not specified. The 1 ms timer default assumes 100 MHz.
  The soft cores in question run at 28-148 MHz on the target FPGA.
* Not included: the processor cores, the general-purpose processor, the
  shared peripheral and the tasks' own I/O peripherals. They are reached
  through top-level ports. The tool flow that generates a fabric like this
  from a system description is software, and the parameters of `deu` and the
  wiring in `quadcopter_soc` stand in for its output.
* Everything compiles without errors in Verilator's lint and in Yosys with
  the slang front end. The remaining lint warnings are about unused
  register-port outputs (such as the read strobe of write-only blocks). Every
  testbench passes, and each one has been shown to fail against a
  deliberately broken copy of its module.
