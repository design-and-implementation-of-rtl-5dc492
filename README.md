# EXTOLL network interface for the BrainScaleS communication FPGA

The BrainScaleS wafer-scale neuromorphic system is controlled by FPGAs. Each
FPGA plays back stimulus spikes and configuration into the analog HICANN chips,
and it records ("traces") the spikes they emit. This RTL connects such an FPGA
to an EXTOLL network instead of Ethernet. A host computer then reaches the
FPGA with EXTOLL remote-memory-access (RMA) packets:

* **Host to FPGA.** The host *puts* playback data and FPGA, HICANN or JTAG
  configuration into the FPGA. It also reads and writes the FPGA's registers
  remotely ("RRA", remote registerfile access).
* **FPGA to host.** The FPGA *puts* trace data and HICANN configuration
  responses into two ring buffers in host memory. FPGA configuration responses
  go to one fixed host address.
* **Flow control.** The FPGA tells the host how much it has written, using
  *payload notifications*. The host hands the space back with
  *acknowledge notifications*.

The core of the design is the **NHTL** (Network HMF Transaction Layer, where
HMF is the FPGA's core logic). It translates between two interfaces in two
clock domains:

* the 128-bit EXTOLL network port at 210 MHz;
* the 64-bit word + 16-bit type "AL-interface" of the core logic at 125 MHz.

```
             210 MHz network clock                 |   125 MHz core clock
                                                   |
 np_rx ─► completer ─┬─► payload async FIFO ───────┼──► AL-read mux ──► al_rd_*
                     ├─► RRA-FIFO ─► RRA engine ◄──┼─ rf bus ─► hmf_top_rf ─┬─ NHTL registers
                     ├─► NOTI-FIFO                 |                        └─ JTAG master ─► TCK/TMS/TDI
                     └─► decrements ─► trace / HICANN ring-buffer controllers
                                             ▲     |
 np_tx ◄─ responder ◄── payload async FIFO ◄─┼─────┼─── AL-write demux ◄── al_wr_*
                    ◄── packet-info async FIFO ◄───┼───┘
                    ◄── NOTI-FIFO, RRA-response FIFO
```

## Packets on the network port

Each network-port beat carries 128 bits, i.e. two 64-bit cells. An RMA packet
is laid out as follows:

| beat | low cell (bits 63:0)             | high cell (bits 127:64)            |
|------|----------------------------------|------------------------------------|
| 0    | SOP cell (`sop_t`), `sop`=1      | network descriptor (`desc_t`)      |
| 1    | destination address              | first payload word / write data    |
| 2..  | payload word                     | payload word                       |

* **End of packet.** `eop[0]` marks a packet that ends in the low cell, and
  `eop[1]` one that ends in the high cell.
* **Descriptor size field.** For puts, `tspec` holds the payload size in bytes
  minus one, so 62 QW gives 495.
* **Payload type.** For payload puts (`RMA_PUT_QW`, `RMA_PUT_IMM`), bits
  [63:48] of the destination address carry the payload type. The types are
  playback 0x0C5A, trace 0x0CA5, FPGA configuration 0x0C1B, HICANN
  configuration 0x2A1B and JTAG 0x06A4.
* **Registerfile accesses.** These are `RMA_PUT_BYTE` (write) or
  `RMA_GET_BYTE` (read) with the RRA mode bit set and an 8-byte size. For a
  read, the second cell is the host address that the `RMA_GET_BYTE_RSP` answer
  is written to.
* **Acknowledges.** Host acknowledges are `RMA_PUT_NOTI` packets. Their
  notification cell holds the payload type in [63:48] and the number of freed
  QWs in [28:0].

All packet field layouts are in `rtl/nhtl_pkg.sv`.

## Receive side: the completer

`nhtl_completer` is a three-state FSM (`LD_HEAD`, `LD_ADDR`, `LD_DATA`).

* **Routing.** It takes one beat per `np_rx_shiftout` and sorts packets into:
  * the payload FIFO;
  * the RRA-FIFO;
  * the NOTI-FIFO, for completion notifications the host asked for with
    `NOTI[1]`;
  * the decrement FIFOs of the two ring-buffer controllers.
* **Payload re-pairing.** The first payload word sits in the *high* cell of
  the address beat. The completer therefore holds each high cell for one beat,
  so that payload-FIFO entries are again `{msw, lsw}` pairs in packet order.
  A packet with an odd length ends with a one-word entry whose `eop[0]` is set.
* **Back-pressure.** The completer only shifts a beat out when every FIFO it
  might write has room.
* **Errors.** Faults are counted in the NHTL registers:
  * a wrong command;
  * a wrong payload type (the payload is dropped);
  * a bad payload size on an RRA access (the access is dropped);
  * an error field that is set;
  * a wrong mode.

On the core side, `nhtl_al_read_mux` hands entries out as single words (LSW,
then MSW) on `al_rd_data/type/valid`. A word moves when `al_rd_valid` and
`al_rd_next` are both high.

## Send side: AL-write demux, responder and ring buffers

These parts are the hardest to follow.

**AL-write demux** (`nhtl_al_write_demux`, core clock). This block packs
AL-write words into 128-bit entries and decides where packets end:

* **Trace data** is collected into packets of up to 62 QWs, the largest
  payload that fits a 512-byte EXTOLL packet. A packet closes early at:
  * a word whose low 16 bits are the end-of-trace marker 0xE11D;
  * the end of the host trace ring buffer, so that no packet wraps;
  * a word of another type;
  * the trace timeout.
* **Every other type** becomes a one-word packet.
* **Held pair.** A complete pair of trace words is held back until the next
  word shows whether the packet goes on. This way even a packet closed by a
  type change or a timeout has `eop` set on its last word. If a held pair meets
  a packet-ending word, the demux stalls for one cycle.
* **Packet-info FIFO.** For every packet one entry goes into the
  packet-information FIFO, holding the type and the word count. That entry is
  written only when the packet is complete. The payload FIFO must therefore
  hold a whole 62-QW packet (31 entries), so `TX_DEPTH` is 32.
* **Payload notifications.** These travel through the same packet-info FIFO.
  * A trace notification is sent on the end-of-trace marker, after every
    `period` packets, or after `timeout` idle cycles while un-notified data
    exists.
  * A HICANN notification is sent after `period` packets or after the
    timeout.
* **Stall.** The AL-write interface is stalled while the packet-info request
  or the notification requests wait for their FIFO.

**Responder** (`nhtl_responder`, network clock). This block builds all
outgoing packets, one at a time, with the FSM `SD_HEAD`, `SD_ADDR`, `SD_DATA`.
The sources, in strict priority order, are:

1. completion notifications (NOTI-FIFO);
2. registerfile read responses (`RMA_GET_BYTE_RSP`);
3. the packet-info FIFO, carrying payload notifications and data packets.

How it builds the packets:

* **Notification cell.** A payload notification is an `RMA_PUT_NOTI`. Its
  cell is `{type[63:48], addr_acks[47:40], space_acks[39:32], count[28:0]}`.
  The two 8-bit fields tell the host how often its ring-buffer address and
  size settings have been applied.
* **Data packets.** A data packet is an `RMA_PUT_QW`. Its words come out of
  the payload FIFO re-paired, the mirror of the completer.
* **Packet length.** The packet length comes from the packet-info count.
  The `eop` bits in the payload FIFO agree with it, but the responder does not
  need them.
* **Unconfigured host.** Until all eight host-configuration registers have
  been written, core-logic packets are read out and dropped, and
  `err_cnt_undefined_host` counts them.

**Ring-buffer controllers** (`nhtl_ringbuffer_cntrl`, one for trace data and
one for HICANN responses). Each controller keeps the next host write address
and the fill level of one ring buffer. The protocol works like this:

* **Before a packet.** The responder waits until `addr_valid` is high and
  `afull` is low.
* **After a packet.** The responder requests an increment by the packet size
  and holds it until acknowledged.
* **Host acknowledges.** These arrive as decrements and take priority over
  increments.
* **Address arithmetic.** The 64-bit address is computed as a 48-bit step and
  a 16-bit step, with the carry kept between them. The calculation takes five
  states (`CALC_0` to `CALC_4`).
* **Almost-full.** `afull` is raised when fewer than 4 × 62 = 248 QW are free.
* **Initialisation.** Setting the init bit in `config_partner_host_3` (trace)
  or `config_partner_host_6` (HICANN) starts the four-state initialisation
  (`INIT_0` to `INIT_3`). This reloads the start address and the size. An init
  request that arrives during a calculation is ignored, so software must
  re-issue it. Software should only initialise while no transfer runs.

**Configuration rules for software.** These are not checked by hardware:

* the ring buffer must be larger than 248 QW (about 2 kB);
* the notification period in packets must be less than
  `buffer_bytes / 512 − 4`.

If the period is longer, the buffer can fill before the host hears about the
data, and both sides wait forever.

## Registerfile

* **Routing.** `nhtl_rra` runs remote accesses one at a time on a simple
  request/response bus (`rf_req_t`, `rf_rsp_t`). It starts a read only when
  the response FIFO has room.
* **Address map.** `hmf_top_rf` routes the access by address:
  * 0x1000–0x10FF go to the NHTL registers (`nhtl_rf`);
  * 0x2000–0x21FF go to the JTAG master;
  * any other address is answered as invalid. The read returns 0 and is
    counted.

The NHTL registers (`nhtl_rf`, addresses in `nhtl_pkg`) are:

| address        | register                                                    |
|----------------|-------------------------------------------------------------|
| 0x1000–0x1040  | performance counters (RRA put/get, RMA put, notification put, playback, FPGA config, HICANN config, JTAG, neighbour) |
| 0x1048         | any write clears all counters                              |
| 0x1050–0x1088  | error counters                                              |
| 0x1090 host_1  | host node [15:0], PDID [31:16], VPID [41:32], mode [47:42]  |
| 0x1098 host_2  | trace ring-buffer start address                             |
| 0x10A0 host_3  | trace buffer bytes [31:0], address acks [39:32] (RO), space acks [47:40] (RO), init [48] |
| 0x10A8 host_4  | FPGA-configuration response address                        |
| 0x10B0 host_5  | HICANN ring-buffer start address                            |
| 0x10B8 host_6  | as host_3, for the HICANN buffer                            |
| 0x10C0, 0x10C8 | trace / HICANN notification: timeout [31:0] in 125 MHz cycles, period [60:32] in packets |

Values read in the core clock domain come straight from these registers
without synchronisers. They may only change while no traffic runs.

## JTAG master

`jtag_master` drives the JTAG chain of the FPGA and its HICANN chips from
registerfile writes. Its registers are:

* **Command register (0x2000).** Holds the type, the length in bits − 1, a
  pause flag and an execute bit. The execute bit clears when the command is
  done. The command types are:
  * TAP reset;
  * instruction scan;
  * data scan;
  * idle-clock on/off.
* **Status register (0x2008).**
* **Send and receive buffers.** 16 × 64 bits each, at 0x2080 and 0x2100.

A scan of up to 1024 bits walks the TAP to Shift-IR/DR and shifts the bits
LSB first. It then returns to Run-Test/Idle, or it parks in Pause-IR/DR so that
a longer scan can continue with refilled buffers. TCK runs at
`clk / (2·TCK_HALF)`.

## Parameters and sizes

| parameter          | value | meaning                                                        |
|--------------------|-------|----------------------------------------------------------------|
| `MAX_PAYLOAD_QW`   | 62    | largest EXTOLL payload (512-byte packet minus the 16-byte header) |
| `AFULL_QW`         | 248   | almost-full margin, four maximum packets                       |
| `ASYNC_DEPTH`      | 16    | receive payload FIFO and packet-info FIFO                      |
| `TX_DEPTH`         | 32    | send payload FIFO; must hold one 62-QW packet                  |
| `SYNC_DEPTH`       | 4     | RRA, RRA-response and NOTI FIFOs                               |
| `DEC_DEPTH`        | 8     | ring-buffer decrement FIFOs                                    |
| `CNT_W`            | 32    | counter width                                                  |
| `TCK_HALF`         | 2     | JTAG half period in 210 MHz clocks                             |

Bandwidth: the network side moves one 128-bit beat per 210 MHz cycle, about
26.9 Gbit/s raw. With 62-QW packets (33 beats) the payload rate is about
25 Gbit/s, above the 4 × 4.2 Gbit/s of an FPGA's link.

## Departures and own choices

The following are this design's own choices, or readings of points that the
description leaves open:

* **FIFOs.** All FIFO depths are own choices. The FIFOs use Gray-coded
  dual-clock pointers rather than vendor FIFOs.
* **Field bit positions.** These are own choices:
  * the SOP cell;
  * the VPID widths;
  * the notification cell;
  * the acknowledge cell;
  * the register fields listed above;
  * the end-of-trace marker position (bits [15:0]).
* **`RMA_PUT_IMM`** is decoded like a one-word `RMA_PUT_QW`.
* **Trace packets** also close on a type change or a timeout.
* **The responder** ends packets by the packet-info count rather than by the
  `eop` flag in the payload FIFO.
* **The neighbour-data counter** never counts, because no neighbour payload
  type is defined.
* **JTAG master.** The register addresses and bit positions are own choices.
  The master is written from its described function.
* **Invalid registerfile reads** return 0.
* **Outgoing packets** use source VPID 0.
* **The completion notification** is requested when the address beat
  arrives.

## Not included

These parts connect through ports of `bss_extoll_fpga_top`:

* the EXTOLL link and network port;
* the HMF core logic (playback, trace, HICANN interfaces);
* the DDR3 memories;
* clock generation.

Also not included:

* the FPGA's own JTAG registers as a registerfile;
* pulse routing between FPGAs;
* the global interrupt.

## Files

* `rtl/` holds one module per file:
  * `bss_extoll_fpga_top` is the top;
  * `nhtl_top` is the NHTL alone;
  * `nhtl_pkg` holds the shared types.
* `tb/tb_<module>.sv` holds a self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/nhtl_tb_pkg.sv` holds the packet-building helpers.
* `tb/jtag_tap_model.sv` is a behavioural TAP controller.
* `tb_bss_extoll_fpga_top` runs the full design at its default parameters. It
  includes:
  * a host model (configuration through RRA, acknowledges, read-back);
  * a core-logic model;
  * a JTAG scan.

  It fails if any of 19 mechanisms never happened. These include
  almost-full, ring-buffer wrap, each notification trigger, invalid-address
  and undefined-host errors, counter reinit and the JTAG scan.

To simulate with Verilator (5.x), for example the end-to-end testbench:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb --top-module tb_bss_extoll_fpga_top \
    rtl/nhtl_pkg.sv tb/nhtl_tb_pkg.sv rtl/*.sv tb/jtag_tap_model.sv tb/tb_bss_extoll_fpga_top.sv
./obj_dir/Vtb_bss_extoll_fpga_top
```

For a single block, list `rtl/nhtl_pkg.sv`, the block and its sub-modules,
and its testbench.
