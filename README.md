# Fault-injection debugger and NEXUS on-chip debug unit

Many microprocessors carry on-chip debug (OCD) logic that can read and write
memory while the program keeps running. This logic can be used to inject
faults, such as single bit-flips in data memory, at a chosen moment. A
commercial debugger cannot do this in real time. Each campaign step goes
through a host PC over USB or Ethernet, so a read-modify-write of one memory
cell takes milliseconds. By then the application has often overwritten the
cell, or has moved far past the trigger point.

This RTL has two halves joined by a NEXUS-style AUX port. The first is a
debugger that runs the whole fault campaign in hardware, beside the target.
The second is the on-chip debug unit (`nexus_ocd`) that sits in the target
and obeys it. The debugger works as follows:

* the host loads a campaign into the debugger's **input RAM**;
* the debugger runs the campaign on its own. It resets and starts the
  target, waits for a trigger, and then writes the faulty value into target
  memory through the OCD's real-time memory access. The target is never
  halted;
* every message the OCD sends (program and data trace, read data, errors)
  is stored in the **output RAM**. The host reads the output RAM back
  afterwards to see how the fault spread.

The trigger is a watchpoint hit on the OCD's event-out pin (EVTO) or a
chosen OCD message. The command that follows the trigger is already decoded
and waiting, so the write message starts two clocks after the trigger. The
delay that remains is the time needed to send one write message over the
narrow message-data-in bus. The debug unit then writes target RAM two
clocks after the message ends.

The debugger is written to fit on the same FPGA as the target system, and
everything runs on one clock. The top, `fi_system`, holds the debugger and
the debug unit. The target processor and its memories are not part of it:
the debug unit's processor-side signals are the top's ports.

## Block structure

```
   host ports          fi_system                      processor ports
  ------------> +-------------+   AUX port    +-----------+ <-------------
                | fi_debugger | ---MDI/EVTI-> | nexus_ocd | fetch, writes,
  <------------ |             | <--MDO/EVTO-- |           | halt, reset,
                +-------------+               +-----------+ RAM access port
```

Inside `fi_debugger`:

```
             host write port                     host read port
                    |                                  ^
             +-------------+                    +-------------+
             |  input_ram  |  campaign bytes    | output_ram  |  trace records
             +-------------+                    +-------------+
             IADDR ^  | byte                        ^ OADDR, record
                   |  v                             |
             +----------------------------------------------+
  DLINK <--> |               debugger_core                  | --> EVTI (halt)
             |  fetch queue -> assembler -> execute -> rec  | <-- EVTO (watchpoint)
             +----------------------------------------------+
                      | command          ^ message
                      v                  |
             +----------------------------------------------+
             |             nexus_comm_ctrl                  |
             |   nexus_tx (MDI, MDI_W bits/clk)             | --> mdi, msei_n
             |   nexus_rx (MDO, MDO_W bits/clk)             | <-- mdo, mseo_n
             +----------------------------------------------+
```

| File | Role |
|---|---|
| `rtl/fi_dbg_pkg.sv` | Opcodes, transfer codes (TCODEs), configuration bits, record kinds |
| `rtl/fi_system.sv` | Top level: debugger and debug unit joined by the AUX port |
| `rtl/fi_debugger.sv` | The debugger: wires its four blocks; host, DLINK and AUX-port pins |
| `rtl/nexus_ocd.sv` | Target-side debug unit: message decode, run control, watchpoint, trace, memory access |
| `rtl/debugger_core.sv` | Command fetch, execution, trigger handling, recording |
| `rtl/nexus_comm_ctrl.sv` | Command-to-message translation; MDI/MDO message ports |
| `rtl/nexus_tx.sv`, `rtl/nexus_rx.sv` | Message serializer and deserializer for one bus |
| `rtl/input_ram.sv` | Campaign memory: host write port, core read port (1-clock read) |
| `rtl/output_ram.sv` | Trace memory: core write port, host read port (1-clock read) |

## Commands

A campaign is a byte stream. Each command is one opcode byte (opcode in bits
3:0) followed by its parameters, least significant byte first. An address
takes `ADDR_W/8` bytes and a time takes `TIME_W/8` bytes. Opcodes that are
not in the table are skipped as one-byte no-operations.

| Op | Mnemonic | Parameter bytes | Effect |
|---|---|---|---|
| 1 | HALT | – | One-clock pulse on EVTI, which halts the target |
| 2 | RUN | – | Run-control message: start the target |
| 3 | RESET | – | Run-control message: reset the target |
| 4 | DRESET | – | Restart fetching at input address 0 with the default configuration. The output pointer is kept |
| 5 | DCONFIG | code | Choose what is recorded (see *Records*) |
| 6 | WAIT | time | The next command is taken `time` clocks later |
| 7 | WAITFOR | event, time | Wait for the event; give up after `time` clocks (`time` 0 means no limit) |
| 8 | READRAM | address | Memory-read message. The data comes back later as a message |
| 9 | WRITERAM | address, data | Memory-write message: one byte, written while the target runs |
| 10 | READREG | register | Register-read message (8-bit register number) |
| 11 | WRITEREG | register, data | Register-write message, e.g. to program OCD watchpoints |

The `event` byte of WAITFOR is decoded as follows:

* bit 7 set: wait for the EVTO pin;
* bit 6 set: wait for a message whose TCODE equals bits 5:0;
* TCODE `0x3F` in bits 5:0: any message.

If WAITFOR times out, execution carries on with the next command. The
debugger also sets `err_timeout`, pulses `timeout` for one clock and writes
a timeout record.

A campaign of `prog_len` bytes is run by pulsing `start`, which also clears
the output pointer and the status flags. `done` rises once the last byte
has been fetched and executed. There is no stop command: a campaign ends at
`prog_len`, or never if it loops through DRESET.

## Fetch and execute

The core has two halves joined by a one-command buffer:

* **Fetch.** Reads of the input RAM are pipelined (address out, byte back
  one clock later) into a two-entry byte queue. A read is issued only while
  the queue has room for its byte, so the queue never overflows. The
  command assembler takes one byte per clock until the opcode and all of
  its parameters are present. It then holds the finished command until the
  execute side takes it.
* **Execute.** Idle with a command waiting:
  * HALT, DRESET and DCONFIG finish in one clock;
  * a message command is taken in the clock the message bus is free;
  * WAIT and WAITFOR put the core into a waiting state.

  While the core waits, the fetch half keeps going, so the command after a
  WAITFOR is ready to go.

So with EVTO high in clock *t*:

| Clock | Action |
|---|---|
| *t* | WAITFOR sees the trigger and frees the execute stage |
| *t*+1 | The prefetched WRITERAM is handed to the communication controller |
| *t*+2 … *t*+1+B | The message goes out, one beat per clock |
| *t*+2+B | The first idle clock; the debug unit decodes the message and requests the RAM |
| *t*+3+B | Granted: the faulty value is in target RAM |

Here B = ceil((6 + ADDR_W + 8) / MDI_W) beats. The write therefore lands
**3 + B clocks after EVTO**, and EVTO itself comes one clock after the
processor executes the watched instruction. From that instruction to the
write is 4 + B clocks: 19 at the default MDI_W = 2 and ADDR_W = 16. Add one
clock if the processor is using its RAM in the grant clock. A message
trigger instead of EVTO adds the time that message takes on MDO.

## Messages on the AUX port

The NEXUS AUX port has four parts:

* a message-data-in bus to the OCD (`mdi`, `MDI_W` bits);
* a message-data-out bus from the OCD (`mdo`, `MDO_W` bits);
* a message-enable signal for each bus (`msei_n`, `mseo_n`);
* the event pins EVTI (halt) and EVTO (watchpoint hit).

A message is a 6-bit TCODE followed by its fields, sent least significant
bit first and `MDx_W` bits per clock. The enable signal is low on every
clock that carries message data. A message ends at the first clock the
enable is high again, so two messages are always at least one idle clock
apart. The receiver cannot hold off the OCD. Each completed message is
offered to the core for exactly one clock, in that idle clock.

| Direction | TCODE | Fields after the TCODE |
|---|---|---|
| to OCD | 56 run control | 2-bit code: 0 run, 2 reset |
| to OCD | 57 memory read | address |
| to OCD | 58 memory write | address, data byte |
| to OCD | 59 register read | register number (8 bits) |
| to OCD | 60 register write | register number, data byte |
| from OCD | 61 read data | data byte |
| from OCD | any other | recorded as received (payload up to `ADDR_W+8` bits) |

The TCODEs from the OCD that the test model uses (0 status, 3 program trace,
5 data write, 8 error, 15 watchpoint) are listed in `fi_dbg_pkg`. Apart from
TCODE 61, which separates read data from trace, the debugger does not
interpret them.

The message layouts, the TCODE numbers for access and run control, and the
framing are this design's own simplifications of NEXUS. They are not the
standard's bit-exact formats. To attach a real NEXUS OCD, replace
`nexus_comm_ctrl` (and its two helpers) with a controller that speaks the
OCD's actual protocol. The core only sees commands and decoded messages.

## The target-side debug unit

`nexus_ocd` is the simplest unit that provides what the debugger needs from
a NEXUS Class 2 OCD. Each incoming message is decoded in the clock it
completes:

* **Run control.** RESET pulses `cpu_reset` and holds the processor
  (`cpu_halt`). RUN releases it. EVTI halts it. After reset the processor is
  held until RUN.
* **Registers** (8-bit numbers, read with a register-read message):

  | Register | Content |
  |---|---|
  | 0 .. ADDR_W/8-1 | watchpoint address, least significant byte first |
  | 8 | watchpoint control: bit 0 pulse EVTO, bit 1 send a watchpoint message (TCODE 15), bit 2 halt on a hit (breakpoint), bit 3 also match data writes |
  | 9 | trace control: bit 0 program trace (default on), bit 1 data-write trace |
  | 10 | status (read only): bit 0 halted, bit 1 a message was lost |
  | 0x80 .. 0xFF | processor registers 0 .. 127, through the `cpu_reg_*` port |

  A processor-register write strobes `cpu_reg_we` for one clock, in the
  clock the message completes. A read samples `cpu_reg_rdata` in that same
  clock, so the processor must return it combinationally from
  `cpu_reg_addr`. Register faults are injected this way while the processor
  runs.
* **Watchpoint.** An executed instruction at the watchpoint address (or,
  with bit 3, a data write to it) raises EVTO for one clock, one clock
  later. Nothing matches while the processor is halted.
* **Trace.** A program-trace message (TCODE 3, instruction address) goes
  out for every instruction that does not follow its predecessor: a branch,
  or the first after RUN. A data-write message (TCODE 5, address and data)
  goes out for every processor write.
* **Real-time memory access.** A memory message becomes one request on
  `mem_req`, held until `mem_gnt`. Writes happen in the grant clock. Read
  data is taken the clock after the grant and returned as TCODE 61. The
  processor keeps running. One access is handled at a time; a memory
  message that arrives during an access is ignored.

Outgoing messages come from six sources: register read data, memory read
data, watchpoint, error, program trace and data trace. Each source has a one-message holding
register. One holding register per clock, in that priority order, moves
into a FIFO of `FIFO_DEPTH` messages that feeds the MDO serializer. A
message that finds its holding register still full is lost. An error
message (TCODE 8) is then queued as soon as the error holding register is
free. This is how a too-narrow MDO shows up to the debugger: as
trace-overflow errors in the output RAM.

## Records

Every record in the output RAM is `2 + 6 + ADDR_W + 8` bits wide (32 bits by
default):

| Bits | Content |
|---|---|
| top 2 | kind: 0 message, 1 WAITFOR hit, 2 WAITFOR timeout |
| next 6 | TCODE (message records), else 0 |
| low `ADDR_W+8` | message fields, or the number of clocks the WAITFOR waited |

DCONFIG bits select what is recorded:

* bit 0: read-data messages;
* bit 1: all other messages;
* bit 2: WAITFOR hit and timeout records.

`start` and DRESET restore the default configuration, 0x07 (record
everything). A message is written in the clock it completes. A WAITFOR
record that coincides with a message is written one clock later. When the
output RAM is full, further records are dropped and `out_overflow` is set.
`out_count` gives the number of records written.

## DLINK: direct control

The DLINK signals can stand in for either memory:

* With `dl_cmd_sel` high, command bytes come from the `dl_cmd_valid` /
  `dl_cmd_data` / `dl_cmd_ready` handshake instead of the input RAM. No
  `start` is needed in this mode.
* With `dl_out_sel` high, records leave on `dl_out_valid` / `dl_out_data`
  instead of being written to the output RAM. There is no back-pressure, so
  the receiver must accept one record per clock.

## Parameters (`fi_system`)

| Parameter | Default | Meaning |
|---|---|---|
| `OCD_FIFO` | 4 | Debug-unit message FIFO depth |
| `MDI_W` | 2 | Message-data-in width. Default from the recommended 8-bit configuration |
| `MDO_W` | 4 | Message-data-out width. Default from the same configuration |
| `ADDR_W` | 16 | Target address width (multiple of 8) |
| `TIME_W` | 16 | WAIT/WAITFOR time width (multiple of 8) |
| `IMEM_DEPTH` | 4096 | Input RAM bytes |
| `OMEM_DEPTH` | 4096 | Output RAM records |

`fi_debugger` has the same parameters except `OCD_FIFO`. The four target
configurations of the original evaluation map onto these parameters as
follows. The delay runs from EVTO to the write in target RAM:

| Configuration | MDI/MDO (bits) | ADDR_W | Trigger-to-write, this RTL | Trigger-to-write, original | Inconclusive, this RTL | Inconclusive, original |
|---|---|---|---|---|---|---|
| 8-bit minimal | 1/1 | 16 | 34 clocks | 25 | 4.0 % | 0 % |
| 8-bit recommended | 2/4 | 16 | 19 clocks | 14 | 2.0 % | 2 % |
| 32-bit | 2/8 | 32 | 27 clocks | 24 | 3.1 % | 4 % |
| 32-bit improved | 4/8 | 32 | 16 clocks | 21 | 2.0 % | 3 % |

The differences in delay come from the message format. The original
figures were measured with the standard NEXUS messages, whose sizes are
not known here. The order of the 8-bit cases matches: a wider MDI gives a
shorter delay. With a 1-bit MDO, the debug unit also loses trace messages
for lack of bandwidth, which matches the trace-overflow problem originally
reported for that configuration.

The inconclusive column comes from `tb_fi_workloads`. For each
configuration it runs one experiment for every pair of trigger instruction
(32) and used RAM byte (24), 768 experiments in all. An experiment is
inconclusive when the processor writes the target cell after the trigger
but before the fault arrives. The campaign computed the injected value from
the cell's contents at the trigger, so the result no longer matches.
Only the C array is written by the program. A C write that follows the
trigger by m instructions (8 clocks each) is hit when 8m is at most the
delay. So the rate grows with the delay. As in the original results, the
wider bus of each pair gives fewer inconclusive experiments. The original
0 % for the minimal configuration sits next to 88 % of campaigns that
could not be completed because the trace overflowed. Here, with a 1-bit
MDO, the debug unit loses at least one trace message in every experiment
(100 %). The other three configurations lose none, as in the original (0 %).
This testbench counts the losses but does not stop on them.

## Simulating

Every testbench checks its own results and ends with a line
`TB_RESULT checks=N failures=M`. To build one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/fi_dbg_pkg.sv tb/tb_fi_system.sv --top-module tb_fi_system -o sim
./obj_dir/sim
```

| Testbench | What it shows |
|---|---|
| `tb_input_ram`, `tb_output_ram` | Random writes and reads against a reference copy |
| `tb_nexus_comm_ctrl` | See below |
| `tb_debugger_core` | See below |
| `tb_nexus_ocd` | See below |
| `tb_fi_debugger` | See below |
| `tb_fi_system` | See below |
| `tb_fi_workloads` | See below |

**`tb_nexus_comm_ctrl`** checks that:

* every command becomes the expected message, bit for bit;
* the message takes exactly ceil(bits/MDI_W) beats, and its first beat
  comes one clock after acceptance;
* random messages on MDO are delivered once, with the right TCODE and
  payload.

**`tb_debugger_core`** checks:

* the order of commands and their operands, under random controller
  stalls;
* the EVTI pulse and the WAIT timing;
* that WAITFOR on EVTO issues the next command one clock after the
  trigger;
* WAITFOR on a message, WAITFOR timeout, DCONFIG filtering and the exact
  records written;
* the DRESET loop, DLINK in and out, and output overflow.

**`tb_nexus_ocd`** frames MDI messages and reassembles MDO messages
itself, and drives the processor side directly. It checks register
read-back, run control and EVTI, EVTO one clock after the watched fetch or
write, breakpoint halt, program trace only for branches, data trace,
memory access with a delayed grant, and that a branch every clock
overflows the FIFO and produces an error message.

**`tb_fi_debugger`** runs the debugger alone at the default parameters,
against a behavioural target model (`tb/ocd_model.sv`). The model has a CPU running a
fault-tolerant matrix add, data RAM and a NEXUS-style OCD. The testbench
runs six experiments with EVTO, message and timeout triggers. It checks:

* the fault writes;
* the 17-clock delay from EVTO to the end of the write message (2 + B);
* that every message the target sent appears, in order, in the output RAM;
* the target's error detection of the injected faults.

It then runs a looping campaign until the output RAM overflows, and uses
DLINK.

**`tb_fi_system`** runs the whole design at the default parameters.
`tb/target_cpu_model.sv` supplies the processor, which runs the same
matrix add, and its data RAM. The testbench runs the same kinds of
experiments and checks the fault writes and the 19-clock EVTO-to-write
delay. It checks that every message seen on MDO is recorded in order. It
also checks that each EVTO-triggered fault is detected by the program while
C[i] stays correct. It then covers output overflow, DLINK, and a processor
running one instruction per clock, whose trace overflows the debug unit.
Last, it injects a fault into a processor register, and checks
that C[i] is corrupted and that the program detects the fault. It counts
each mechanism and fails if one never happens.

**`tb_fi_workloads`** runs a 768-experiment campaign through `fi_system`
in each of the four configurations (`fi_workload_run`). The campaign is
loaded 96 experiments at a time. It checks:

- every fault write's address and value;
- every delay against 4 + B, or 5 + B when the processor holds the RAM.
  Up to four more clocks are allowed when the trigger is the first
  instruction, because the debugger may still be reading WAITFOR;
- that the count of inconclusive experiments equals the count predicted
  from the delay;
- that only the 1-bit MDO configuration loses trace.

`ocd_model`, `target_cpu_model` and `fi_workload_run` are testbench-only
models. They are not part of the design.

## Where this design makes its own choices

The source describes what the debugger does: its command table, the block
diagram, and the MDI/MDO widths of the evaluated configurations. For the
debug unit it gives the feature list: run control, watchpoints and
breakpoints, register access, real-time memory access, trace, event pins,
and configurable bus widths and FIFOs. It describes the internals of
neither. Everything below is therefore this design's own choice:

* the command encoding;
* the DCONFIG bits;
* the record format;
* the memory depths;
* the one-command prefetch;
* the non-blocking reads;
* end-of-campaign by length;
* the DLINK handshakes;
* the single clock;
* the message formats;
* the debug unit's register map, its message priorities, its FIFO depth,
  and the handshake of its memory access port.

The target processor, its memories, the host PC, and the two alternatives
(direct OCD signal access, and an OCD-internal fault-injection module) are
not implemented.

The original debugger measured 766 (8-bit) and 1079 (32-bit) equivalent
gates without RAM, and its OCD 6217 to 18801. This implementation adds
message recording, DLINK and timeout logic, and neither half was sized
against those figures.
