# FTT-enabled real-time Ethernet switch

This is the switching core of an Ethernet switch that gives real-time
guarantees by making the switch itself enforce a time-triggered schedule.
It follows the Flexible Time-Triggered (FTT) idea. Time is cut into
Elementary Cycles (ECs) of fixed length, 1 ms by default. At the start of
every EC the switch broadcasts a Trigger Message (TM) on all ports. The TM
names the periodic (synchronous) messages that may cross the switch in
this EC, and where each one goes.

The rest of the EC is split into windows. Synchronous messages come
first, then asynchronous (sporadic) real-time messages, then ordinary
Ethernet traffic (NRT, non real-time). The switch enforces this split.
Frames that the schedule does not allow are dropped at the input.
Sporadic messages that arrive faster than their declared minimum
inter-arrival time are dropped too. No frame is started on an output
unless it can finish inside its window, so nothing can ever delay the
next TM or the synchronous traffic.

The scheduler itself, the FTT master, is software on a separate
computer; the switch talks to it over a simple byte-stream link. The
Ethernet MACs (a vendor MAC core) and the PHYs are outside this RTL; each
port exposes a MAC client interface.

## The Elementary Cycle

All timing inside the switch core is counted in cycles of the main clock
`clk`. At 125 MHz, one cycle is one byte time of a 1 Gb/s link, and
`EC_CYCLES = 125000` is 1 ms. `ec_time` runs from 0 to `EC_CYCLES-1`:

| ec_time                     | what an output port may start              |
|-----------------------------|--------------------------------------------|
| 0 .. `cfg_sync_end`-1       | the TM (always first), then synchronous frames |
| `cfg_sync_end` .. `cfg_async_end`-1 | asynchronous frames that end before `cfg_async_end` |
| `cfg_async_end` .. end of EC | NRT frames that end before the EC ends     |

The window ends are run-time inputs of the top module.

A frame's time on the wire is taken as `max(L,60) + 24` byte times for
a frame of `L` bytes without FCS: 4 bytes of FCS, 8 bytes of preamble
and a 12-byte inter-frame gap. Each output port counts this down.
A port starts its next frame only when the previous one has left the
wire.

The sequence around each EC start is:

1. `sync_unit` pulses `ec_start`, and `ec_req` tells the master that the
   next EC's schedule is wanted.
2. The master sends the next TM as a complete frame on `tm_in_*`.
   `master_interface` stores it in the idle half of a two-bank buffer and
   decodes the schedule entries as the bytes arrive.
3. At the next `ec_start`, a complete TM becomes the active one. Its
   schedule drives validation and forwarding during that EC. One cycle
   later, `tm_go` makes every output port send it before anything else.
   If no complete TM arrived in time, the EC runs with an empty schedule:
   all synchronous and asynchronous frames are dropped and
   `ev_tm_missing` pulses.

All ports start the TM in the same cycle. Each port then reads it from
the TM buffer in its own slot of the transmit wheel. Each port's TM
therefore lags by a fixed delay of fewer than `NPORTS` cycles; it is not
copied to all ports through one shared path. Because the TM leaves at a
fixed cycle of the EC counter, its period has no jitter in main-clock cycles. The only jitter comes from the crossing
into the MAC's transmit clock: a few 8 ns periods. The testbench checks
that each port sends the TM at the same EC offset in every cycle.

## Frame format used for FTT traffic

The frame layout for FTT traffic is this design's own. FTT frames carry
EtherType `0x8FF0` (`ftt_pkg::FTT_ETYPE`):

| byte  | contents                                                          |
|-------|-------------------------------------------------------------------|
| 0-11  | destination and source MAC address                                |
| 12-13 | `0x8F 0xF0`                                                       |
| 14    | FTT type: 1 = TM, 2 = synchronous, 3 = asynchronous, 4 = request to the master |
| 15    | message id (in a TM: number of schedule entries, up to 16)        |
| 16+   | TM only: 4-byte entries `{msg_id, {async, 3'b0, input_port[3:0]}, output_mask, min_iat}` |

Any other EtherType is NRT traffic and is switched by MAC address with a
learning table, like an ordinary switch.

A synchronous frame is accepted only if all of these hold:

- the active schedule has a synchronous entry with its id;
- the entry names the port the frame came in on;
- that entry has not yet been used in this EC.

An asynchronous frame is accepted only if both hold:

- the schedule has an asynchronous entry for it;
- at least `min_iat` ECs have passed since the last accepted instance.

FTT requests (type 4) are not stored in packet memory. They go to the
master on `rq_*`.

## How a frame crosses the switch

```
 MAC rx ─► reception_unit ─► async FIFO ─► classifier_validation ─► reception_buffer ─┐
 (MAC rx clock)                         (main clock)                                   │ words
                                                                        rx_mux (TDMA) ◄┘
                                                                           │
                                                                      memory_pool
                                                                           │
 MAC tx ◄─ transmission_unit ◄─ async FIFO ◄─ transmission_buffer ◄─ tx_demux (TDMA)
                                   switching_control: reception_control, forwarding_table,
                                   buffer_manager, packet_list ×N, transmission_control, sync_unit
```

### Receiving

- **Reception Unit** (MAC receive clock). Writes each byte into a
  dual-clock FIFO and closes each frame with a status entry: good or bad.
- **Classifier & Validation Unit** (main clock). Streams the bytes on and
  picks out the addresses, the type and the id as they go by. At the
  status entry it gives the verdict: NRT, synchronous, asynchronous,
  request, or trash.
- **Reception Buffer Unit**. Packs bytes into words `NPORTS` bytes wide,
  with the first byte in the low lane, and writes them into a memory
  block. It always holds one free block in advance, so a frame can be
  written from its first byte, before its class is known. A rejected
  frame just leaves the block to be overwritten.
- **Rx Multiplexing Unit**. A TDMA wheel: in cycle `c`, port
  `c mod NPORTS` owns the memory's write port. A port makes one word every
  `NPORTS` byte times, so one write slot per turn of the wheel is exactly
  enough. The memory therefore runs at the byte clock with no speed-up.

### Forwarding

The **Reception Control Unit** takes one finished frame per cycle, round
robin over the ports, and chooses its output ports:

- Synchronous and asynchronous frames go to the output mask of their
  schedule entry. FTT frames are forwarded by the TM only.
- NRT frames go to the learned port of their destination. Broadcast,
  multicast and unknown destinations are flooded to all ports. The
  source address is learned.
- A frame is never sent back to its input port.

The unit then pushes the frame's pointer `{block, length}` into its
class queue in the **Packet List Unit** of every chosen port.

### Transmitting

- **Transmission Control Unit**. Applies the window rules above for each
  port.
- **TX Demultiplexing Unit**. The read-side TDMA wheel. It reads a frame
  word by word from its block, or the TM from the TM buffer.
- **Transmission Buffer Unit**. Turns the words back into bytes. It
  writes a 2-byte length in front of each frame into the transmit FIFO.
- **Transmission Unit** (MAC transmit clock). Starts the MAC once
  `min(length, 32)` bytes are in the FIFO. This is cut-through, with
  margin. If the FIFO runs dry mid-frame, it reports `tx_underrun`.

## Packet memory and its subdivision

The Memory Pool is a simple dual-port RAM, one write port and one read
port, each with its own clock. It holds `NBLOCKS` blocks of `WPB` words.
One block holds one frame of up to `WPB*NPORTS` = 2048 bytes, which fits
a maximum-size frame. Short frames waste space, but there is no
fragmentation to manage.

The **buffer manager** keeps the traffic classes from starving each
other:

- It keeps a free map and gives out one block per cycle.
- It charges each stored frame to its class. A class that holds its
  quota (`SYNC_Q`, `ASYNC_Q`, `NRT_Q` blocks) cannot store more, and
  further frames of that class are dropped (`ev_quota_drop`). A burst of
  NRT traffic therefore cannot use up the memory that real-time frames
  need.
- Each block carries a reference count: the number of ports that still
  have to send it. The count is set when the frame is forwarded. Each
  port releases the block once it has read it out. The block is free
  again when the count reaches zero, so multicast frames are stored only
  once.

The default `NBLOCKS = 72` is the sum of the quotas (16+16+32) plus two
blocks per port. With that margin, a port can always get its spare
block.

## Link to the master

| signal | direction | meaning |
|---|---|---|
| `ec_req` | out | pulse at every EC start: send the TM for the next EC |
| `tm_in_valid/data/last` | in | the TM frame, one byte per cycle, `last` on the final byte |
| `rq_valid/data/last/port`, `rq_ready` | out/in | FTT request frames, one at a time, with their input port |

The TM buffer holds `TM_WORDS*NPORTS` = 128 bytes per bank. That is a
16-byte header plus up to 16 schedule entries of 4 bytes; this is
`SCHED_MAX`.

Each port has a request buffer of `REQ_MAX` = 64 bytes. A second request
from a port whose buffer has not yet been sent is dropped
(`ev_req_drop`).

## Parameters of `ftt_switch`

| parameter | default | meaning |
|---|---|---|
| `NPORTS` | 4 | ports; also the memory word width in bytes |
| `EC_CYCLES` | 125000 | EC length in `clk` cycles (1 ms at 125 MHz) |
| `WPB` | 512 | words per memory block (2048 bytes) |
| `NBLOCKS` | 72 | memory blocks |
| `SYNC_Q`, `ASYNC_Q`, `NRT_Q` | 16, 16, 32 | per-class block quotas |
| `QDEPTH` | 32 | depth of each class queue per output port |
| `FT_ENTRIES` | 16 | learning-table entries (round-robin replacement, no ageing) |
| `REQ_MAX` | 64 | bytes kept of an FTT request |
| `TM_WORDS` | 32 | words per TM buffer bank |

Each port has its own receive and transmit MAC clock. All ports share
one asynchronous, active-low reset. `enable` starts the EC counter.

Event outputs pulse for one cycle; the testbench counts them:

- `ev_trash`: frame rejected at the input.
- `ev_drop`: no spare block, or frame too long.
- `ev_rx_overflow`: receive FIFO overflow.
- `ev_flood`: frame flooded to all ports.
- `ev_quota_drop`: class quota exhausted.
- `ev_tm`, `ev_sync`, `ev_async`, `ev_nrt`: frame started on a port.
- `ev_hold`: frame held back because it does not fit its window.
- `ev_tm_missing`: no TM was ready at the EC start.
- `ev_req_drop`: FTT request dropped.

## What is this design's own

The block structure follows the published architecture: per-port MAC
interface chains with dual-clock FIFOs, two TDMA wheels around a shared
block memory, and a central control unit with packet lists, a
forwarding table, transmission control and a synchronization unit. The
classification and validation rules, TM-only forwarding, blocking-free
TM transmission, window confinement and per-class memory subdivision
also follow it.

The following are choices made here, because the architecture leaves
them open:

- the FTT frame and TM layout;
- all sizes except the 4 ports and the 1 ms EC;
- the spare-block scheme;
- quotas with reference counts as the form of memory subdivision;
- the wire-time formula;
- the length prefix and start threshold on the transmit side;
- the byte-stream link to the master;
- round-robin service wherever several ports compete.

The MAC configuration sequence (`configuration_unit`) writes the
register map of the Xilinx Tri-Mode MAC:

- receiver enable;
- transmitter enable;
- flow control off;
- 1 Gb/s.

Check it against the MAC core you use.

Not included:

- the master software (scheduler, admission control, QoS manager,
  requirements database);
- the MAC core;
- the PHYs.

The Master Interface is a byte stream rather than a full Ethernet port,
so a MAC for the master link would also have to be added around it.

## Simulating

Every module has a self-checking testbench in `tb/` named `tb_<module>`.
Each prints `TB_RESULT checks=<n> failures=<m>` at the end and has a
watchdog. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/ftt_pkg.sv rtl/*.sv tb/tb_ftt_switch.sv \
          --top-module tb_ftt_switch
./obj_dir/Vtb_ftt_switch +verilator+rand+reset+2
```

`tb_ftt_switch` runs the whole switch with every parameter at its
default, over seven 1 ms ECs, in a few seconds. It models four MACs and
the master and makes every mechanism happen, counting each:

- TM broadcast, checked at a constant offset per port in every EC;
- scheduled and unscheduled synchronous frames;
- asynchronous frames, including one that breaks its minimum
  inter-arrival time;
- NRT flooding, then learned unicast;
- frames held back at a window end;
- a class quota overflow;
- a missing TM;
- an FTT request passed to the master;
- all memory blocks free again at the end.

`tb_ftt_switch_nrt_load` runs a load test at full size. One port sends
1014-byte NRT frames (1000 bytes of payload) to a learned station at
about 30% of the link rate, for three ECs. The frames arrive throughout
the EC, about half of them outside the NRT window. The test checks that
every frame leaves the output port inside the NRT window, in order and
unchanged, and that none is lost. The backlog that builds up while the
NRT window is closed stays within the NRT quota of 32 blocks as long as
that window covers at least about an eighth of the EC.

The unit testbenches use reduced sizes so that corner cases are cheap to
reach: full queues, a full FIFO, replacement in the table, multicast
release, and the rates of the two TDMA wheels.

## Limits

- One frame per block: the memory holds at most `NBLOCKS` frames,
  whatever their size.
- The learning table has no ageing. A station that moves is re-learned
  when it next sends.
- Window ends are not checked against each other or against `EC_CYCLES`.
  Set `cfg_sync_end` ≤ `cfg_async_end` < `EC_CYCLES`, and leave the
  synchronous window long enough for the TM (84 byte times for a
  60-byte TM).
- The master must deliver each TM within one EC of `ec_req`. A late TM
  is used one EC later, and the EC in between runs without a schedule.
