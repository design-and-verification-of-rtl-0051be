# Router 1x3: a one-input, three-output packet router

This router takes byte-wide packets on a single input port. It forwards each
packet to one of three output ports. The destination comes from the two low
bits of the packet's first byte. Each output port has its own FIFO, so the
three readers can drain at their own pace. When the FIFO a packet is going
to fills up, the router tells the source to hold its data. When a packet
arrives with a bad parity byte, the router raises an error flag.

The design has six blocks: a controller, a register block, a synchronizer
and three FIFOs. All of them are synthesizable SystemVerilog with one clock
and an asynchronous active-low reset.

How the blocks connect:

- `data_in` and `pkt_valid` go to the controller (`router_fsm`), the
  register block (`router_reg`) and, for the two address bits, the
  synchronizer (`router_sync`).
- The controller drives the state signals `detect_add`, `lfd_state`,
  `ld_state`, `full_state`, `laf_state` and `rst_int_reg` to the register
  block. It sends `write_enb_reg` to the synchronizer and `busy` to the
  source.
- The register block sends back `parity_done` and `low_pkt_valid` to the
  controller. It drives `err` out, and drives the byte to be written
  (`d_out`) to all three FIFOs.
- The synchronizer turns `write_enb_reg` into one FIFO write enable. It
  returns that FIFO's full flag to the controller as `fifo_full`. It drives
  `vld_out_N` out, and drives `soft_rst_N` to FIFO N and to the controller.
- Each FIFO returns `full_N` and `empty_N` (the latter also to the
  controller), takes `read_enb_N` from its reader and drives `data_out_N`.


## Packet format

| byte   | contents                                                     |
|--------|--------------------------------------------------------------|
| 0      | header: payload length in bits 7..2, destination in bits 1..0 |
| 1..N   | payload, N = 1 to 63 bytes                                   |
| N+1    | parity: XOR of the header and all payload bytes              |

Only destinations 0, 1 and 2 exist. A byte that arrives in the decode state
with address 3 is ignored. Any payload bytes that follow it would then be
decoded as headers, so a source must not send address 3. The XOR parity rule
is this design's choice. The packet layout itself gives only the position of
the parity byte.

## Input side: `pkt_valid` and `busy`

The source drives `data_in` and `pkt_valid`:

- `pkt_valid` is high from the header through the last payload byte.
- It is low in the clock that carries the parity byte.
- A byte is taken on a rising edge if `busy` was low during that clock.
- While `busy` is high, the source holds `data_in` and `pkt_valid` unchanged.

`busy` is a Moore output of the controller. It is low only in the decode,
load-data and drop states, so the source can test it in the same clock. A packet that
never waits and never meets a full FIFO goes like this (N = 2):

```
clock      0       1        2      3      4        5        6
state      DECODE  LFD      LD     LD     LD       CHECK    DECODE
busy       0       1        0      0      0        1        0
data_in    H       D0(held) D0     D1     P        H'(held) H'
pkt_valid  1       1        1      1      0        1        1
FIFO write -       H        D0     D1     P        -        -
```

The header is taken in clock 0 and the parity byte in clock N+2. After that,
one CHECK clock passes before the next header can be taken. The end-to-end
testbench checks the N+2 figure.

## The controller (`router_fsm`)

This is a Moore machine with eight states. Most states drive one of the
control outputs:

| state              | output        | what happens                                                          |
|--------------------|---------------|-----------------------------------------------------------------------|
| DECODE_ADDRESS     | `detect_add`  | A valid header is latched. Go to LFD if its FIFO is empty, else WAIT. |
| WAIT_TILL_EMPTY    | (busy only)   | Wait until the destination FIFO is empty.                             |
| LOAD_FIRST_DATA    | `lfd_state`   | Write the header into the FIFO and mark it as a header.               |
| LOAD_DATA          | `ld_state`    | Write the input byte. Go to FULL if the FIFO is full, or to CHECK after the parity byte. |
| FIFO_FULL_STATE    | `full_state`  | The FIFO is full: wait for room.                                      |
| LOAD_AFTER_FULL    | `laf_state`   | Write the byte that was kept. Go to CHECK if it was the parity, else LD. |
| CHECK_PARITY_ERROR | `rst_int_reg` | Parities compared. Return to DECODE once `parity_done` is set.        |
| DROP_PACKET        | (none)        | Take and discard the rest of a packet whose FIFO was soft-reset.      |

`write_enb_reg` is high in LFD, LD and LAF. The synchronizer routes it to
one FIFO.

Waiting for an empty FIFO before a new packet starts means a packet is
never written into a FIFO that still holds an older one. A reader therefore
always sees whole packets in order.

### What happens when the FIFO fills

This is the subtle part of the design. In LOAD_DATA the source has already
been told (busy low) that its byte will be taken. If the FIFO turns out to
be full in that clock, the byte cannot be written, but it has still been
consumed. The register block copies it into its *full-state byte* register.
The controller then goes to FIFO_FULL_STATE with busy high, so the source
holds its next byte. Once the FIFO has room, LOAD_AFTER_FULL writes the kept
byte (busy still high), and LOAD_DATA takes the held byte. No byte is lost
or duplicated.

If the kept byte was the parity byte, `low_pkt_valid` is already set, and
LOAD_AFTER_FULL goes straight to the parity check.

A FIFO that was full when entering FIFO_FULL_STATE cannot be full again in
LOAD_AFTER_FULL, because nothing is written in between.

## Register block (`router_reg`)

The register block has four byte registers: the header, the full-state
byte, the internal parity (a running XOR) and the packet's own parity byte.
It also has three flags:

- `low_pkt_valid`: the parity byte has arrived (LD with `pkt_valid` low).
  It is cleared in CHECK.
- `parity_done`: the parity byte has been written into the FIFO.
- `err`: set in the clock after CHECK if the two parities differ.

`err`, `parity_done` and `low_pkt_valid` are cleared when the next header is
taken. So `err` stays readable while the router is idle.

The byte offered to the FIFO (`d_out`) is a multiplexer, not a register:

- the header in LFD,
- the kept byte in LAF,
- `data_in` otherwise.

Because of this, a byte is written in the same clock as the state that
writes it.

## Output side: FIFOs and synchronizer

Each `router_fifo` is 16 entries of 9 bits: the byte plus a "header" flag.

- A write happens when `write_enb` is high and the FIFO is not full.
- A read happens when `read_enb_N` is high and the FIFO is not empty. The
  byte appears on `data_out_N` after the clock edge. The output is
  registered.
- A read and a write may happen in the same clock.
- On reset: `full` = 0, `empty` = 1 and the output is 0.

When a header is read, its length field loads a count of the bytes still to
come (payload plus parity). Once that count has run out and the reader
pauses, `data_out_N` returns to 0. An idle port therefore shows 0 rather than
a stale parity byte.

`router_sync` latches the destination address while the controller is in
decode. It then does four jobs:

- It routes `write_enb_reg` to that FIFO.
- It feeds that FIFO's full flag back to the controller as `fifo_full`.
- It drives `vld_out_N` = not empty.
- It watches each port. If `vld_out_N` stays high for 30 clocks with no
  `read_enb_N`, it pulses `soft_rst_N` for one clock, which empties that
  FIFO.

The controller may be in the middle of writing a packet to that FIFO (LD,
FULL or LAF) when this happens. It then goes to DROP_PACKET, where it keeps
taking bytes with `busy` low but writes none of them. It returns to decode
after the byte with `pkt_valid` low. If the parity byte had already arrived,
it returns to decode at once. The source sees no difference, and the next
header is decoded correctly. The packet is lost, and `err` stays low for it.

## Parameters

| parameter                 | default | meaning                                  |
|---------------------------|---------|------------------------------------------|
| `router_top.FIFO_DEPTH`   | 16      | entries per output FIFO                  |
| `router_top.SYNC_TIMEOUT` | 30      | idle clocks before a port's soft reset   |

The byte width (8), the number of ports (3) and the header fields are fixed
in `router_pkg`. They follow from the packet format.

## What follows the reference design and what is this design's own

These parts follow the router as it was specified:

- the six-block structure;
- every block's port list and signal names;
- the packet format and the 1 to 63 byte payload;
- the FIFO's write, read, full, empty and reset rules, including read and
  write in the same clock;
- the four registers of the register block;
- the synchronizer's job of holding the FIFO choice for a whole packet.

These are this design's own choices, because the specification does not
give them:

- the controller's state transitions;
- the `busy` / `pkt_valid` handshake timing;
- waiting for an empty FIFO before a new packet starts;
- XOR parity, and when `err` is set and cleared;
- the FIFO depth of 16;
- the time-out rule and its length of 30 clocks;
- soft reset emptying the FIFO, and DROP_PACKET;
- the use of `lfd_state`: a header flag in each FIFO word and the idle
  output of 0;
- `d_out` of the register block as a multiplexer;
- the asynchronous reset.

## Files

| file                 | contents                                  |
|----------------------|-------------------------------------------|
| `rtl/router_pkg.sv`  | widths, header struct, controller states  |
| `rtl/router_fifo.sv` | output FIFO                               |
| `rtl/router_sync.sv` | synchronizer                              |
| `rtl/router_fsm.sv`  | controller                                |
| `rtl/router_reg.sv`  | register block                            |
| `rtl/router_top.sv`  | top level                                 |
| `tb/tb_<block>.sv`   | self-checking testbench of each block     |

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each also has a watchdog that counts a failure if the run hangs.
What each testbench checks:

- `tb_router_fifo`: random traffic against a queue model, including full,
  empty, simultaneous access, soft reset and the idle output.
- `tb_router_sync`: write steering, the full-flag select, `vld_out`, and the
  exact clock of every soft reset.
- `tb_router_fsm`: random inputs against a state-table model; every state
  and an abandoned packet must be seen.
- `tb_router_reg`: plays the controller over 400 packets with random FIFO
  full, checking the bytes offered to the FIFO, the flags and `err`.
- `tb_router_top`: the whole router at its default sizes. It sends 330
  packets of random length and parity to random ports, with three randomly
  pausing readers. It also runs two directed phases: a time-out, and a
  packet dropped mid-way. It requires that a wait for an empty FIFO, a full
  FIFO, a load after full, a parity error, a soft reset and a dropped packet
  each occur at least once.

To simulate with Verilator 5, for example the whole router:

```
verilator --binary --timing --assert -Irtl \
  rtl/router_pkg.sv rtl/router_fifo.sv rtl/router_sync.sv rtl/router_fsm.sv \
  rtl/router_reg.sv rtl/router_top.sv tb/tb_router_top.sv --top-module tb_router_top
./obj_dir/Vtb_router_top
```

A block testbench needs only `router_pkg.sv`, the block's file and its
testbench. The end-to-end run takes well under a second.

Assertions in the RTL check three things:

- the controller is in exactly one state;
- a header write is always followed by LOAD_DATA;
- the kept byte stays stable while the FIFO is full.

Verilator reports `SYNCASYNCNET` on the reset. That warning comes from using
the reset both as an asynchronous flip-flop reset and in the assertions'
`disable iff`. It does not describe the hardware.

## Limits

- Address 3 is not handled as a packet (see Packet format).
- A reader that times out loses its packet without any signal to the source
  or the reader.
- The payload length field is used only by the FIFO's read side, for the
  idle output. The input side relies on `pkt_valid` for framing, so a header
  whose length disagrees with `pkt_valid` is not detected.
- There is no rate or latency target to meet. The only timing figure the
  design commits to is the input-side timing shown above.
