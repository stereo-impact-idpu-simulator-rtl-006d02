# IDPU Simulator GSE logic for the STEREO IMPACT serial link

On STEREO IMPACT, an IDPU (instrument data processing unit) commands the
instruments (MAG, SEP, PLASTIC, SWEA/STE) and collects their telemetry over a
serial link. The IDPU Simulator GSE (ISG) is a small box that lets a PC take
the place of either end of that link. An instrument can then be tested without
an IDPU, or an IDPU without an instrument. This repository holds synthesizable
SystemVerilog for the logic inside the box: the printer-port interface to the
PC, the buffering, the link transmitter and receiver, the command/timing
scheduler, the error tracking and the front-panel indicators.

The box works in one of two modes. The PC chooses the mode.

| | IDPU simulation | Instrument simulation |
|---|---|---|
| Unit under test is on | "IDPU" connector (J3) | "Instrument" connector (P3) |
| ISG sends | PC commands plus a timing command once a second | telemetry blocks loaded by the PC |
| ISG receives | telemetry blocks | commands (timing commands flash an LED) |

## Data flow

```
 PC printer port (EPP)
        |
     epp_if  --  isg_regs (register map, error flags, time set)
        |                 |                        ^
   out_framer             |                        |
        |                 |                        |
  pkt_fifo (outbound)     |                  pkt_fifo (inbound)
        |                 |                        ^
  cmd_sched (IDPU sim) <- time_gen                 |
  tlm_sender (instr sim)                         ser_rx
        |                                          ^
      ser_tx ---> J3 command / P3 telemetry     J3 telemetry / P3 command
```

`isg_top` wires these together, muxes the transmitter and receiver to the
connector of the active mode, and drives the LEDs through `led_ctrl`. Shared
constants, the register map and the status/error structs are in `isg_pkg`.

## The link format

Each direction is modelled as a bit clock and a data line. The transmitter's
clock runs all the time. Data changes while the clock is low and is sampled on
the rising edge.

- A byte is a start bit `1` followed by 8 data bits, most significant first.
- After each byte comes a start-bit slot. A `1` there starts the next byte of
  the same packet.
- A `0` in the slot must be followed by 16 more zeros. Those 17 zeros end the
  packet. A new packet may start right after them.
- A `0` in the slot that is followed by a `1` within the next 16 bits is a
  **framing error**.

Within a packet the longest run of zeros is 8 bits: a zero data byte ends at
the next start bit. So 17 zeros can only mean a gap between packets. The
receiver relies on this to recover: after any error, and after reset, it
ignores the line until it has seen 17 zeros in a row.

Packet length is checked at the end of each packet. If it is wrong, the error
is a **packet size error**:

- Telemetry: the first two bytes of a block give its total length in bytes,
  most significant byte first.
- Commands: every packet must be exactly 3 bytes.

A **timing command** is `0xFF` followed by bits 15:8 and 7:0 of the seconds
counter.

The start bit, the 17-zero end of packet, the two error types and the 3-byte
command length come from the ISG requirements. The full link definition
lives in a separate interface control document. These details are this
design's own choices: bit order, clock phase, the third harness line, the
length header and the timing-command layout. Check them against the real link
definition before connecting hardware (see "Departures and open points").

## Whole commands only: commit/rollback FIFOs

Two requirements are about never showing half of something:

- A command must never be split because the PC lost its place in the byte
  stream.
- The byte count the PC reads must include only telemetry blocks that have
  fully arrived. It must rise by a block's size when the block ends and fall
  by one for each byte read.

Both are met by `pkt_fifo`, which keeps three pointers:

```
 rd_ptr ......... cm_ptr ........ wr_ptr
   |<-- avail -->|<- uncommitted ->|
```

Bytes are written at `wr_ptr` as they arrive:

- `commit` moves `cm_ptr` up to `wr_ptr`, so the whole block becomes readable
  at once.
- `abort` moves `wr_ptr` back to `cm_ptr`, which drops the partial block.

The reader sees only `avail = cm_ptr - rd_ptr`. That value is the
complete-block byte counter itself, so no separate counter can drift.

Inbound, `ser_rx` commits at a good end of packet and aborts on a framing,
size or overflow error.

Outbound, `out_framer` decides when to commit:

- In IDPU simulation it commits every third byte. The PC's resync strobe
  (`REG_OUT_CTRL[0]`) drops a partial command and restarts the count. If a
  command loses a byte to a full FIFO, the rest of that command is dropped too.
- In instrument simulation it commits when the PC writes "block complete"
  (`REG_OUT_CTRL[1]`). `tlm_sender` then sends exactly the committed bytes as
  one packet.

## Timing commands and look-ahead

`time_gen` divides the clock down to one tick per second. It also gives
`to_tick`, the number of cycles left before the next tick. The PC can load the
32-bit seconds counter. Loading changes the value but not the tick phase.

`cmd_sched` sends the timing command on every tick. It starts a queued PC
command only if that command, including its 17-zero gap, will be off the link
before the next tick:

```
GUARD = (1 + 3*9 + 17 + 1) * BIT_DIV   clk cycles
```

That is up to one bit waiting for a bit boundary, three 9-bit bytes, the gap,
and one bit of margin. A command that cannot finish in time is held back, and
the hold-back is reported once on `deferred`. On the tick cycle itself the
timing command wins over a command that would otherwise start. So each timing
command leaves within one bit time of its tick, and a PC command never delays
it.

## PC interface

`epp_if` implements the four IEEE-1284 EPP cycles: address write, address
read, data write and data read. Each cycle uses the standard nWait handshake.
All host lines are synchronised to `clk`, so the PC may be any amount slower.
A data read pops the inbound FIFO exactly once.

The register map, from `isg_pkg::reg_addr_e`:

| Addr | Name | Access | Contents |
|---|---|---|---|
| 00 | CTRL | RW | [0] mode (1 = instrument simulation), [1] output enable, [2] timing-command enable. Reset value 0x04. |
| 01 | STATUS | R | [0] out empty, [1] out full, [2] in empty, [3] in full, [4] telemetry busy, [5] partial command, [6] any error, [7] mode |
| 02 | OUT_DATA | W | next command or telemetry byte |
| 03 | OUT_CTRL | W | [0] resync (drop uncommitted bytes), [1] block complete |
| 04 | IN_DATA | R | next received byte (pops) |
| 05/06 | IN_CNT L/H | R | bytes of complete blocks waiting. Read L first: this latches H. |
| 07/08 | CMDQ L/H | R | whole commands waiting in the queue. Read L first. |
| 09 | ERR | R/W1C | [0] framing, [1] size, [2] inbound overflow, [3] outbound overflow |
| 0A | FERR_CNT | R | framing errors, saturating at 255. Cleared with flag 0. |
| 0B | SERR_CNT | R | size errors, saturating at 255. Cleared with flag 1. |
| 0C-0F | TIME 3..0 | RW | seconds counter. Writes to 0C-0E are staged; a write to 0F loads all 32 bits. |

To collect received data, the PC reads IN_CNT and then reads IN_DATA that many
times.

In instrument simulation the PC sends telemetry like this:

1. Write the block to OUT_DATA.
2. Write 0x02 to OUT_CTRL (block complete).
3. Poll STATUS[4] until it is 0.

## Outputs and indicators

Only the connector of the active mode drives its outputs, and only while
CTRL[1] is set. Otherwise every output line is held at 0. The reset state has
the outputs disabled.

Four LEDs are lit for `LED_HOLD` cycles (50 ms) after activity:

- `led_link`: activity on the link lines, one LED per modelled line.
- `led_pc`: EPP cycles.
- `led_time`: a timing command sent or received.

Five LEDs are plain levels: `led_mode`, `led_err`, and empty/full for each
FIFO.

## Parameters (isg_top)

| Parameter | Default | Meaning |
|---|---|---|
| TICKS_PER_SEC | 20,000,000 | clk cycles per second (20 MHz clock) |
| BIT_DIV | 200 | clk cycles per link bit (100 kbit/s) |
| FIFO_DEPTH | 4096 | bytes in each FIFO (power of two) |
| LED_HOLD | 1,000,000 | LED stretch in clk cycles |

The requirements set two minimums:

- The command queue must hold at least 200 commands. 4096 bytes hold 1365
  three-byte commands.
- The FIFOs must cover at least 200 ms of PC latency. At 100 kbit/s, 200 ms is
  about 2,200 bytes, so 4096 bytes are enough for any link rate up to about
  184 kbit/s.

The clock and link rates are assumptions. Set them to the real ones, and raise
FIFO_DEPTH if the link is faster.

## Departures and open points

- **Third harness line.** The harness has three lines in each direction. Only
  clock and data are modelled, so there are four link activity LEDs instead
  of six.
- **Link details.** These are assumptions, as noted in "The link format":
  bit order, clock phase, the free-running clock, the telemetry length header
  (2 bytes, total length) and the timing-command layout (`0xFF`, 16 bits of
  seconds).
- **Daisy chaining.** Several ISGs on one printer port are not supported. The
  addressing scheme for this (address switches) is still to be decided.
- **Output disable in instrument simulation.** The output-disable bit also
  applies to the Instrument connector. The requirement states it only for
  IDPU simulation.
- **Mode changes.** A mode change does not flush the FIFOs. Change mode only
  while the link is idle.
- **Outside the logic.** Line drivers, connectors, the power converter and the
  enclosure are not logic and are not modelled.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

- `tb_isg_top` runs the whole design at reduced sizes (1 s = 20,000 cycles,
  8 cycles per bit, 256-byte FIFOs). In IDPU simulation it covers: outputs
  disabled at reset, resync of a partial command, 60 queued commands with
  hold-backs before timing commands, setting the clock, good and bad telemetry
  blocks, and an overflow. It then switches to instrument simulation: commands
  from the IDPU including a timing command and a bad one, a 25-byte telemetry
  block out, and the outbound FIFO filled. It counts each mechanism and fails
  if one never occurs.
- `tb_isg_full` runs the top at its default parameters for just over one
  second of operation (about 21 million cycles, under a minute). It checks
  two commands and the first timing command on the link, and one telemetry
  block read back.
- `tb_isg_capacity` runs the top at its default parameters for the two
  capacity requirements (about 4 million cycles, a few seconds). The PC
  queues 200 commands in one burst. Meanwhile the instrument streams 200 ms of
  telemetry that the PC does not read. The test passes only if every command
  is sent and every telemetry byte is kept.
- `tb_link_mon` is a link decoder used by the top-level testbenches.

With plain Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/isg_pkg.sv tb/tb_isg_top.sv --top-module tb_isg_top -o sim
./obj_dir/sim
```

Use the same command with another testbench name for the block tests. Each
block testbench needs only `rtl/isg_pkg.sv`, its block and itself.
