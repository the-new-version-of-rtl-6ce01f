# SOL40-SCA: ECS command engine for GBT-SCA slow control

In the LHCb upgrade readout, every front-end board is configured and
monitored through GBT-SCA ASICs. A GBT-SCA is reached over a GBT optical link
and gives access to SPI, I2C, JTAG, GPIO, ADC and DAC channels. The GBT-SCA
understands only small commands that carry at most 32 data bits. Configuring an
FPGA over JTAG therefore takes many thousands of them, and if host software
had to send each one and wait for its reply, the software would set the speed.

This core sits on the back-end board (SOL40) between the host's Avalon-MM bus
and the GBT-SC core, which does the HDLC framing and serialisation. It takes a
whole **ECS command** (ECS is the Experiment Control System) in one go. An ECS
command is a description of an operation plus any amount of data, for example
"shift these 4000 bits through the JTAG chain of GBT-SCA 3 on link 12 and
keep what comes back". The core expands it into the right sequence of GBT-SCA
commands, sends them, and collects the replies. Commands and replies are
decoupled through FIFOs and memories, so software can queue many commands
before it reads any reply. A single instance serves every link of the board:
each command carries its link number.

## Architecture

```
            Interface layer      Buffer layer                 Protocol layer
           +---------------+   +----------------------+   +---------------------------+
 Avalon-MM |               |-->| command info FIFO    |-->|  cmd_proc_unit  ---------------> sca_tx  (to GBT-SC)
 --------->| avalon_mm_    |-->| command memory       |-->|     |    ^                    |
 <---------| slave         |-->| command data memory  |-->|     v    |                    |
           |               |<--| reply data memory    |<--|  protocol_drivers           |
           |               |<--| reply FIFO           |<--|  in-flight queue            |
           +---------------+   +----------------------+   |     v                       |
                                                          |  reply_proc_unit <------------- sca_rx  (from GBT-SC)
                                                          +---------------------------+
```

| File | Role |
|---|---|
| `rtl/sol40_sca_pkg.sv` | Shared types: command settings, identifiers, GBT-SCA command and reply words, summaries |
| `rtl/avalon_mm_slave.sv` | Interface layer: address map, FIFO push and pop, status and counters |
| `rtl/sync_fifo.sv` | FIFO used for the command information FIFO, the reply FIFO and the in-flight queue |
| `rtl/ecs_cmd_mem.sv` | Command (settings) memory, 64 slots of 4 words |
| `rtl/dp_ram.sv` | Command data memory and reply data memory, 1024 x 32 bit each |
| `rtl/protocol_drivers.sv` | Expands an ECS command into GBT-SCA commands, per protocol |
| `rtl/cmd_proc_unit.sv` | Fetches commands and data and sends GBT-SCA commands |
| `rtl/reply_proc_unit.sv` | Stores reply data and writes one summary per ECS command |
| `rtl/sol40_sca_top.sv` | Wires the three layers together |

## Life of an ECS command

1. Software writes the command's data words into the **command data memory**
   at some pointer `p`.
2. It writes the four settings words into a free **command memory** slot `s`.
   The settings give the link, the GBT-SCA, the protocol, the operation, the
   number of bits and `p`.
3. It pushes the identifier `{tag, s}` into the **command information FIFO**.
   The 8-bit tag is free for software to use, for example as a sequence number.
   Software can now go on and queue more commands.
4. The command processing unit pops the identifier and reads slot `s`. It
   starts the protocol drivers, which return GBT-SCA commands one at a time.
   For each command that carries memory data, the unit reads word `p + i`.
   It then hands the command to the GBT-SC core with a fresh transaction ID.
   It also pushes a note into the **in-flight queue**: which transaction ID
   to expect, whether the reply data must be kept, where to keep it, and
   whether this is the last GBT-SCA command of the ECS command.
5. The reply processing unit takes each reply with the oldest note. This
   works because replies from one GBT-SCA come back in order, and the
   command processing unit never has commands for two different targets
   in flight (see "Reply order" below). When the note says so, the unit writes the
   reply data to the **reply data memory** at `p + j`. Reply data therefore
   lands at the same pointer as the command data. On the last reply it pushes
   a summary into the **reply FIFO**.
6. Software pops the summary: tag, slot, pointer, number of reply words,
   error byte and flags. It then reads the reply words at `p`.

A slot and its data area can be reused as soon as the command's summary has
come back. Before that, the command processing unit may still read them.

## Address map (Avalon-MM, 32-bit words)

| Word address | Access | Content |
|---|---|---|
| `0x0000 + i` | R/W | command data memory word `i` |
| `0x1000 + i` | R | reply data memory word `i` |
| `0x2000 + 4*s + w` | R/W | command memory slot `s`, word `w` |
| `0x3000` | W | push identifier `{tag[15:8], slot[7:0]}`. A push to a full FIFO is dropped and counted. |
| `0x3001` | W | pop the reply FIFO head |
| `0x3002`, `0x3003` | R | reply FIFO head, word 0 and word 1 |
| `0x3004` | R | status: command FIFO count `[7:0]`, reply FIFO count `[15:8]`, reply FIFO empty `[16]`, command FIFO full `[17]`, busy `[18]` |
| `0x3005`..`0x300A` | R | counters: ECS commands sent, GBT-SCA commands sent, replies matched, replies dropped (stale or with nothing in flight), pushes dropped, replies lost |

Reads return data one cycle later, flagged by `avs_readdatavalid`. There are
no wait states.

## Command settings

| Word | Bits | Field |
|---|---|---|
| 0 | `[7:0]` link, `[15:8]` GBT-SCA, `[18:16]` protocol, `[23:20]` op, `[28:24]` sub | target and operation |
| 1 | `[15:0]` nbits, `[31:16]` data pointer | size and location |
| 2 | cfg | protocol configuration |
| 3 | cfg2 | SPI slave-select mask |

Protocol codes: 0 controller, 1 SPI, 2 GPIO, 3 I2C, 4 JTAG, 5 ADC, 6 DAC.

## How the drivers expand commands

This is the heart of the core. Every driver is described by the same small
plan: which of six phases it uses, and with which GBT-SCA channel and command
codes. One state machine walks the plan. The serial protocols move data in
**chunks** of up to 128 bits, the size of the GBT-SCA data registers. A chunk
goes through the phases in this order:

| Phase | When | GBT-SCA command |
|---|---|---|
| PRE | once per ECS command | set-up: SPI slave select, ADC input mux |
| CTRL | each chunk | write the channel control register, with the chunk length in it |
| WR | each chunk | write data registers 0..k-1 from the command data memory |
| WR2 | each chunk, JTAG only | write the TMS registers 0..k-1 |
| GO | each chunk | start the transfer, or read a single register |
| RD | each chunk, if reading | read received-data registers 0..k-1 into the reply memory |

Here k = ceil(chunk bits / 32). An ECS command of `nbits` bits has
ceil(nbits / 128) chunks, and the last chunk may be short. Lengths go up to
65535 bits. The data memory sets the practical limit: 1024 words.

Per protocol (channel and command codes follow the GBT-SCA manual):

| Protocol | op / sub / cfg | Sequence |
|---|---|---|
| SPI (ch 0x01) | op[0] = read MISO back; cfg = control bits above the length field; cfg2 = slave select | W_SS, then per chunk: W_CTRL, W_MOSIi, GO, [R_MISOi] |
| JTAG (ch 0x13) | op[0] = read TDI back; op[1] = TMS from memory; cfg = control bits | per chunk: W_CTRL, W_TDOi, W_TMSi, GO, [R_TDIi] |
| I2C (ch 0x03+sub) | op[0] = read; cfg[6:0] = 7-bit address, cfg[9:8] = speed | per chunk of up to 16 bytes: W_CTRL (byte count), write: W_DATAi then M_7B_W; read: M_7B_R then R_DATAi |
| GPIO (ch 0x02) | op 0 write DATAOUT, 1 read DATAIN, 2 write DIRECTION, 3 read DIRECTION, 4 read DATAOUT | one command |
| DAC (ch 0x15) | sub[1:0] = output A..D; op[0] = read back | one command |
| ADC (ch 0x14) | sub = input | W_MUX, GO; the conversion result is stored |
| Controller (ch 0x00) | op 0/2/4 write CRB/CRC/CRD, 1/3/5 read them | one command |

In memory, JTAG with TMS from memory lays out each chunk as its TDO words
followed by its TMS words. Without that option, TMS is written as zero. Each
I2C chunk is a separate I2C transaction.

Example: an SPI write-and-read of 300 bits at pointer 16 becomes
W_SS, then [W_CTRL(128), W_MOSI0..3, GO, R_MISO0..3] twice, then
[W_CTRL(44), W_MOSI0..1, GO, R_MISO0..1]. That is 27 GBT-SCA commands, and
the ten received words land in reply memory words 16..25.

## Replies and summaries

The summary for each ECS command has two words:

- word 0: `tag[7:0]`, `slot[15:8]`, `flags[23:16]`, `err[31:24]`
- word 1: `data_ptr[15:0]`, `nwords[31:16]`

`err` is the OR of the GBT-SCA error bytes of all its replies. Flag bit 0
(mismatch) is set when a reply has the expected transaction ID but a
different link or GBT-SCA address. Flag bit 1 (lost) is set when at least
one reply never came back. `nwords` counts every reply word the command
asked for, lost ones included. It is therefore always the size of the reply
area, but with the lost flag set some of those words were not written.

Transaction IDs are issued in sequence, so the reply unit can tell a lost
reply from a late one:

- A reply with a later ID than expected means the expected reply was lost.
  The oldest in-flight entry is retired as lost, and the reply is matched
  with the next entry.
- A reply with an earlier ID has already been given up on, or was never
  issued. It is dropped and counted.
- If no reply arrives for `RPY_TIMEOUT` cycles, the oldest entry is retired
  as lost. This also covers a dead link.

A reply that arrives with nothing in flight is dropped and counted. If the
reply FIFO is full, the reply that would complete
an ECS command is held back (`sca_rx_ready` low). Replies that only store data
keep flowing.

## GBT-SC interface

`sca_tx` (type `sca_cmd_t`) carries one GBT-SCA command per `sca_tx_valid`
/ `sca_tx_ready` transfer. The fields are link, GBT-SCA address, transaction
ID, channel, command and 32-bit data. `sca_rx` (type `sca_rpy_t`) returns
the reply with its error byte. The GBT-SC core, or a bank of them, must send
each command to its link and return the replies of each link and GBT-SCA in
the order the commands were sent. Transaction IDs run from 1 to 254. At most
`INFLIGHT_D` GBT-SCA commands wait for a reply at any time.

### Reply order

Replies from different links (or from different GBT-SCAs on one link) may
overtake each other, since every link has its own round trip. The reply
processing unit matches replies strictly in order, so the command processing
unit keeps only one target in flight. Suppose an ECS command goes to a
different link or GBT-SCA than the previous one. Before sending its first
GBT-SCA command, the unit waits until the in-flight queue is empty. The
`order_wait` signal is high during this wait. Commands to the same target
are not held back. This costs one reply round trip per change of target. It
does not affect a long transfer to one GBT-SCA. The reply unit still compares
link, GBT-SCA and transaction ID, and flags any mismatch. A dead link costs
`RPY_TIMEOUT` cycles for each GBT-SCA command sent to it, and then the core
moves on.

## Parameters (top)

| Parameter | Default | Meaning |
|---|---|---|
| `CMD_AW` | 6 | log2 of the number of command memory slots |
| `DATA_AW` | 10 | log2 of the words in each data memory |
| `CMD_FIFO_D`, `RPY_FIFO_D` | 64 | FIFO depths |
| `INFLIGHT_D` | 4 | GBT-SCA commands awaiting a reply |
| `RPY_TIMEOUT` | 2^20 | cycles without any reply before the oldest is given up (26 ms at 40 MHz, longer than a 16-byte I2C transfer at 100 kHz) |

None of these sizes comes from a published figure: the architecture asks only
for "large" memories. All of them can be changed freely. The link and
GBT-SCA fields are 8 bits wide, which covers 48 links per board and up to 32
GBT-SCAs per link.

## Timing

- From popping an identifier to the first GBT-SCA command: four cycles. If
  the target changes, add the time for outstanding replies to return.
- After that, one GBT-SCA command every two cycles while the GBT-SC core is
  ready and the in-flight queue is not full.
- A 128-bit SPI chunk with read-back costs 10 commands, or 20 cycles.
- At a 40 MHz clock, that is about 32 MB/s of serial data on the core's side.

The target serial rate of 500 KB/s per ECS command is therefore limited by
the GBT-SCA and its e-link, not by this core. With `INFLIGHT_D = 4`, the
reply round trip sets the limit whenever it exceeds about 8 cycles.
`INFLIGHT_D` is the knob for latency hiding.

## What is specified and what is chosen here

The published description of this architecture fixes the following:

- the three layers;
- the five buffers: a command information FIFO, a command settings memory,
  separate command and reply data memories, and a reply FIFO;
- an identifier queued once per ECS command, with a pointer into the data
  memory;
- reply data and summaries written by a reply processing unit;
- protocol drivers as state machines, one per GBT-SCA function;
- serialisation and HDLC left to the GBT-SC core.

Everything below the block level is this implementation's design:

- the address map;
- the settings layout and op codes;
- chunking at 128 bits and the phase order;
- the in-flight queue and transaction-ID scheme;
- waiting for replies before changing target, and the handling of lost and
  stale replies;
- the summary format;
- all sizes.

The GBT-SCA channel numbers and command codes follow the public GBT-SCA manual.
Check them against the manual revision of your ASIC before use.

Not covered:

- The GBT-SC core, the GBT link firmware and the GBT-SCA itself. These are
  external.
- GBT-SCA operations beyond the table above: interrupts, the SEU counter, I2C
  10-bit addressing and single-byte modes, and JTAG frequency setting. All of
  them can be reached only by adding rows to `make_plan`.
- Retrying lost GBT-SCA commands. A lost reply is reported in the summary,
  and software decides whether to send the ECS command again.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sol40_sca_pkg.sv tb/tb_sol40_sca_top.sv --top-module tb_sol40_sca_top
./obj_dir/Vtb_sol40_sca_top
```

| Testbench | What it shows |
|---|---|
| `tb_sync_fifo` | FIFO data order, flags and count against a queue model |
| `tb_dp_ram` | both read ports, one-cycle latency, read-before-write |
| `tb_ecs_cmd_mem` | word placement and field layout of a settings slot, bus read-back |
| `tb_protocol_drivers` | every driver's sequence against independently written loops, for lengths of 1, 32, 33, 128, 129, 300, 512 and 4000 bits |
| `tb_cmd_proc_unit` | exact GBT-SCA command stream and in-flight notes, the two-cycle issue rate, both back-pressures, transaction-ID wrap, the wait on a target change |
| `tb_reply_proc_unit` | memory writes, summaries, error OR, mismatch and lost flags, lost replies found by a later ID and by timeout, stale and unexpected replies dropped, reply-FIFO back-pressure |
| `tb_avalon_mm_slave` | the whole address map, read latency, dropped pushes |
| `tb_sol40_sca_top` | end to end at default sizes, through the bus, against `tb/gbt_sc_model.sv` |
| `tb_jtag_config` | FPGA configuration over JTAG: 256 kbit streamed as 16 double-buffered ECS commands of 16 kbit, then 128-bit commands one at a time |

`tb_sol40_sca_top` runs in three parts:

- Twelve queued ECS commands that use every driver. These include multi-chunk
  SPI and JTAG and a two-chunk I2C write followed by a read-back.
- An overload of 150 commands. It fills the reply FIFO and overflows the
  command FIFO.
- A command to a link that never answers, followed by one to a live link.
  After `RPY_TIMEOUT` cycles the first summary carries the lost flag, and the
  second command completes normally.

The twelve commands go to six different link and GBT-SCA pairs. The model
returns replies in order for each target but lets them overtake across
targets. The testbench counts and requires each mechanism: queuing,
multi-chunk unrolling, both back-pressures, the in-flight limit, the wait on
a target change, FIFO overflow, error reporting and the reply timeout. The
GBT-SC/GBT-SCA model answers a read with the inverse of what was last
written to the matching register. A wrong word, register or pointer therefore
shows up in the read-back data.

`tb_jtag_config` measures throughput with a GBT-SC model that is ready 90% of
the time and answers after 4 to 40 cycles:

- Long ECS commands reach about 0.21 byte per cycle. That is about 8 MB/s at
  40 MHz; the test requires at least 500 KB/s.
- 128-bit commands, each awaited before the next, reach about 0.15 byte per
  cycle. The long commands are about 1.4 times faster.

The gap grows with the host's own latency, which this test leaves out.
