# OCD-FI: fault injection through an on-chip debug port

Validating a dependable microprocessor system means injecting faults into it
and watching what happens. The cheapest place to do that is the debug port
that the chip already has: a debugger can stop the processor, rewrite a memory
word and let it run again. The drawback is time. A NEXUS-style debug port is
message based, so every step (a breakpoint report leaving the chip, the
debugger deciding, a write command coming back) costs tens of clock cycles,
and in a running system the fault lands late or not at all.

OCD-FI removes the round trip. The debug unit gets one small extra block, the
FI module. Before the run, the debugger loads the faulty word and its address
into the debug unit's access register and arms the FI module. When the CPU
reaches the chosen instruction or data address, the watchpoint logic tells
the FI module, which immediately fires the preloaded memory write and then
disarms itself. The fault lands **two clock cycles** after the bus event,
with no message traffic and without stopping the processor. All the usual
debug features stay available for the rest of the campaign: run control,
breakpoints, real-time memory access and program/data trace.

The RTL here contains the full debug unit, the fault injection module, a
dual-port target RAM, and a hardware campaign player. The campaign player runs
a list of debug commands out of a RAM and records everything the target
reports, so that an entire fault campaign runs on one FPGA without a host in
the loop. The target CPU itself is not included. Its bus, run-control and
register signals are ports of the top level, and the testbenches use a small
behavioural CPU model.

## Block structure

```
                 +-------------------- ocd_fi_system ----------------------+
 campaign RAM -->| campaign_ctrl --MDI/MSEI-->+--------- ocd_fi ---------+ |
 result RAM   <--|               <--MDO/MSEO--|  mmq  <->  rw  <->  rct   | |
                 |   tgt_rst -> cpu_rst       |          ^  |       |    | |
                 |                            |          |  v       v    | |
                 |                            |          +--fi<--wp_hit  | |
                 |                            +---|------|---------^-----+ |
                 |                       mem port |  creg port     | CPU   |
                 |                 dp_ram <-------+     |          | snoop |
                 +------^-------------------------------|----------|-------+
                        | CPU data port                 v          |
                     (external CPU: cpu_* and creg_* ports of the top)
```

| Module | What it is |
|---|---|
| `ocd_pkg` | Message format, TCODEs, register map, campaign command and result types |
| `ocd_fi_system` | Top: debug unit, target RAM and campaign player |
| `ocd_fi` | The debug unit: `mmq`, `rw`, `rct` and `fi` |
| `rct` | Run control and trace: debug mode, halt/step, breakpoints and watchpoints, program and data trace |
| `rw` | Register hub and the single-trigger access register (RAW: `RWCS`, `RWA`, `RWD`) |
| `mmq` | Message queues: turns input messages into register accesses and events into output messages |
| `fi` | Fault injection module: watchpoint hit to RAW write, then self-disable |
| `nexus_rx`, `nexus_tx` | Port deserializer and serializer |
| `dp_ram` | Target data RAM: CPU port A, debug port B |
| `campaign_ctrl` | Campaign player with command and result memories |
| `sync_fifo`, `sdp_ram` | Helpers |

## The fault injection path (the part that matters)

The two-cycle latency comes from keeping every stage except one
combinational:

```
edge 0   CPU drives the bus with the watched address / retires the watched PC
edge 1   rct registers the match:  wp_hit[i] = 1
         fi: trigger = armed & |(wp_hit & mask)          (combinational)
         rw: go = trigger, drives mem_we/mem_addr/mem_wdata (combinational)
edge 2   dp_ram port B writes the word; fi clears armed and sets injected
```

The flow from the debugger's side:

1. `FI_SETUP` (ADDR, DATA) loads `RWA` and `RWD` and marks the RAW access
   as a memory write.
2. `FI_ENABLE` (IDX = watchpoint mask; 0 means any) arms the FI module.
3. Breakpoint registers are set with their enable and *watch* bits. A
   watchpoint reports but does not halt the CPU.
4. The CPU is reset and runs. At the N-th match of the armed watchpoint the
   write happens, and a `WATCHPOINT` message still goes out, so the debugger
   knows when the fault arrived.
5. `FI_DISABLE` disarms the module without injecting. `REG_READ FIS` returns
   `{injected, mask, armed}`.

Rules to know:

* Between `FI_SETUP` and the trigger, the RAW register belongs to the FI
  module. Any other debugger access through `RWCS` overwrites the preloaded
  fault.
* If the trigger and a debugger `START` arrive in the same clock, the FI
  trigger wins.
* If a CPU write and the fault write hit the same word in the same clock,
  the debug port wins.

For comparison, the same fault injected by the ordinary route (watchpoint
message out, debugger reacts with `REG_WRITE RWCS`) takes 16 clocks in the
8-bit configuration and 18 clocks in the 32-bit one. The 32-bit figure is
higher because its register packets are longer. Both use 8-pin ports.
By then the CPU has often already consumed the old value, and the end-to-end test shows exactly that: the same fault
that is detected through the FI path stays latent through the message path.

## Messages

Every message is a 6-bit TCODE followed by up to three packets: IDX (8 bits),
ADDR and DATA (each `ADDR_W`/`DATA_W`, or the register width for register
messages). The TCODE fixes which packets follow (`msg_fields()` in
`ocd_pkg`). Each packet goes out least significant beat first over the
`MDI_W`/`MDO_W` pins. A 2-bit start/end code runs alongside each beat:

| `MSEO`/`MSEI` | Meaning |
|---|---|
| `00` | beat inside a packet |
| `01` | last beat of a packet, more follow |
| `10` | last beat of the message |
| `11` | idle |

| TCODE | Dir | Packets | Use |
|---|---|---|---|
| 0 `DEBUG_STATUS` | out | IDX = DS | on entry to and exit from debug mode |
| 1 `DEVICE_ID` | out | DATA | answer to a read of register 0 |
| 4 `PROG_TRACE` | out | IDX = 1 exception / 0 branch, ADDR = target, DATA = instructions since last trace | taken branch or exception |
| 5 `DATA_TRACE` | out | ADDR, DATA | each CPU write, when enabled |
| 8 `ERROR` | out | IDX = {proto, in overflow, out overflow} | lost or malformed message |
| 15 `WATCHPOINT` | out | IDX = hit mask | every breakpoint/watchpoint hit |
| 16 `REG_READ` | in | IDX | read a debug register |
| 17 `REG_WRITE` | in | IDX, DATA | write a debug register |
| 18 `REG_VALUE` | out | IDX, DATA | answer to `REG_READ` |
| 56 `FI_SETUP` | in | ADDR, DATA | preload the fault |
| 57 `FI_ENABLE` | in | IDX = mask | arm |
| 58 `FI_DISABLE` | in | none | disarm |

Output messages wait in one slot per source, in this priority order: error,
watchpoint, register answer, status, program trace, data trace. The winner
moves to an output FIFO (`OQ_DEPTH`) in front of the serializer. When an
event arrives while its slot is still full, the event is lost, the
out-overflow flag is set, and an `ERROR` message follows. Trace at full speed
through an 8-pin port overflows on purpose in the end-to-end test. Input
messages go through a FIFO (`IQ_DEPTH`). A `REG_READ` waits until the answer
slot is free.

`EVTO` pulses one clock after any breakpoint or watchpoint match. `EVTI`
held high while the CPU leaves reset puts the CPU straight into debug mode.
Raising `EVTI` while the CPU runs halts it and enters debug mode.
`rst_n` resets the whole debug unit. The CPU reset does not touch the debug
set-up, so breakpoints and an armed FI survive the per-run reset.

## Register map

| IDX | Name | Bits |
|---|---|---|
| 00 | `DID` | device id (read only, `DEVICE_ID` parameter) |
| 01 | `DC` | [0] program trace enable, [1] data trace enable |
| 02 | `RC` | write only: [0] halt, [1] resume, [2] single step |
| 03 | `DS` | [0] debug, [1] halted, [2] pb0 hit, [3] pb1 hit, [4] db hit, [5] EVTI entry, [6] halt command, [7] step |
| 04/05 | `PB0A`/`PB0N` | program breakpoint 0 address / occurrence count |
| 06/07 | `PB1A`/`PB1N` | program breakpoint 1 |
| 08/09 | `DBA`/`DBN` | data breakpoint |
| 0A | `BPCTL` | {watch, enable} for pb0 [1:0], pb1 [3:2], db [5:4]; [6] db on write, [7] db on read |
| 10 | `RWCS` | [0] start, [1] write, [2] CPU register (else memory), [3] done, [4] error |
| 11 | `RWA` | access address |
| 12 | `RWD` | access data; a read result lands here one clock after start |
| 18 | `FIS` | FI status: [0] armed, [3:1] mask, [4] injected |

A breakpoint fires on every N-th match (N = 0 behaves as 1). Its counter
restarts on CPU reset and whenever a breakpoint register is written. A
program breakpoint matches the PC of a retiring instruction. The halt request
is registered, so the CPU stops before the instruction that follows. CPU
register access through `RWCS` needs a halted CPU, otherwise `RWCS.error` is
set. Memory access works while the CPU runs, through RAM port B.

## CPU interface

The debug unit snoops the CPU. `cpu_retire` and `cpu_pc` report each
instruction. `cpu_flow` and `cpu_exc` mark the first instruction after a
taken branch or exception. `cpu_dwe`, `cpu_dre`, `cpu_daddr` and
`cpu_dwdata` carry data accesses. The CPU reads the RAM through
`cpu_drdata`, which has one clock of latency.

The debug unit controls the CPU through `cpu_halt`, answered by
`cpu_halted`, and through `cpu_rst`, driven by the campaign player. It
reaches the CPU registers through the `creg_*` port. This port is
combinational, and the read data is taken in the same clock.

## Campaign player

A command is `{op, message}` (81 bits):

| op | Effect |
|---|---|
| `SEND` | serialize the message to the debug unit |
| `WAIT` | wait for an output message with the given TCODE; `msg.data` = timeout in clocks, 0 = none; a timeout writes a result with the timeout flag |
| `RESET` | hold `cpu_rst` for `msg.data` clocks (at least 1) |
| `DELAY` | wait `msg.data` clocks |
| `END` | stop, raise `done` |

Every message received while the campaign runs, including those after `END`
until `start` is seen again, is stored as `{timeout, 16-bit cycle stamp,
message}` in the result RAM (`res_count`, `res_full`). A typical fault
experiment looks like this:

```
SEND FI_SETUP (addr, bad word)
SEND FI_ENABLE
SEND REG_WRITE (breakpoints)
RESET
WAIT WATCHPOINT
WAIT end-of-program watchpoint
SEND REG_READ (result checks)
```

The campaign is then repeated for every fault.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `ADDR_W` | 16 | CPU address width |
| `DATA_W` | 8 | CPU data width; 8 and 32 are the intended configurations |
| `MEM_AW` | 12 | target RAM words = 2^MEM_AW |
| `MDI_W`, `MDO_W` | 8 | port pins in and out |
| `IQ_DEPTH`, `OQ_DEPTH` | 4, 8 | message FIFOs |
| `CNT_W` | 16 | occurrence counters |
| `CREG_W` | 8 | CPU register address |
| `CMD_AW`, `RES_AW` | 8 | campaign and result memory depth (log2) |

## How closely it follows the original design

These parts follow the published OCD-FI design:

* the split into run control/trace, read/write access, message queues and a
  small FI module;
* the class-2 feature set (two program breakpoints and one data breakpoint,
  each with an N-th occurrence count and a watchpoint variant; branch and
  exception trace; write data trace; real-time memory access; register
  access in debug mode; EVTI/EVTO);
* the single-trigger RAW access register;
* the FI module that disables itself after one injection;
* the campaign player built from memories;
* the two-cycle injection latency, which is checked by the testbenches.

These are choices of this implementation, because the original leaves them
open:

* all TCODE values, the packet layout and the start/end code;
* the register map;
* queue depths and the priority order;
* the CPU signal set and halt timing;
* RAM size and collision rules;
* the campaign command set and result format.

Known departures:

* The message path has different timing from the original. An ordinary
  debugger write takes 16 clocks here for the 8-bit system (14 in the
  original) and 18 clocks for the 32-bit system (21 in the original).
* The set-up costs measured in the original (about a dozen clocks for plain
  debug, 28 to 36 with FI set-up) are not reproduced as such. Set-up here is
  three messages whose length depends on the port width.
* The CPU and the program memory are not part of the RTL. The original
  used a generated 8-bit or 32-bit core and did not design it.
* The 32-bit configuration (`ADDR_W = DATA_W = 32`) is selected by
  parameters. The defaults are the 8-bit one.

## Simulation

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. `tb_nexus_pkg.sv` holds a reference message
encoder and decoder used by the port-level benches. `cpu_model.sv` is a
behavioural CPU: 3-clock instructions that run a matrix addition with a
duplicated checksum, reporting errors at 0x010 and completion at 0x011.

With plain Verilator (5.x):

```
verilator --binary --timing -Wno-fatal --top-module tb_ocd_fi_system \
    rtl/ocd_pkg.sv rtl/sync_fifo.sv rtl/sdp_ram.sv rtl/dp_ram.sv \
    rtl/nexus_rx.sv rtl/nexus_tx.sv rtl/fi.sv rtl/rct.sv rtl/rw.sv \
    rtl/mmq.sv rtl/ocd_fi.sv rtl/campaign_ctrl.sv rtl/ocd_fi_system.sv \
    tb/tb_nexus_pkg.sv tb/cpu_model.sv tb/tb_ocd_fi_system.sv
./obj_dir/Vtb_ocd_fi_system
```

Replace the top module and the last file to run the other testbenches:
`tb_fi`, `tb_dp_ram`, `tb_rct`, `tb_rw`, `tb_mmq`, `tb_campaign_ctrl`,
`tb_ocd_fi`, and `tb_ocd_fi_system_32`. The last one runs the same
campaign on the 32-bit configuration.

`tb_ocd_fi_system` runs the top at its default parameters. It:

* plays a campaign that injects a fault through the FI path, which the
  program detects;
* repeats the injection through the ordinary message path, where the fault
  stays latent, and reads it back in real time;
* enters debug mode and reads a CPU register;
* single-steps the CPU;
* reads the device id;
* provokes trace overflow.

It counts each of these mechanisms and fails if any of them never happened.
It also prints both injection latencies.
