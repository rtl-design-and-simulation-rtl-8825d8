# A one-input, three-output FIFO packet router

This router takes byte-wide packets on one input port. It sends each packet, whole and in
arrival order, to one of three output ports. The header byte of each packet names the port.
Every output port has its own FIFO. When a receiver is slow, its port's FIFO absorbs the
bytes. When that FIFO is full, the router stops accepting input. The sender then holds its
byte until the router is ready again. Congestion therefore slows the input down but never
loses data. When a port is idle, bytes skip its FIFO and go straight to the output register.

The architecture follows the article "RTL Design And Simulation Of A Router Employing FIFO For
High-Reliability Data Transport". The article gives these parts:

- an input interface;
- routing logic that reads the destination address in the header;
- one register-based FIFO per output port, with read and write pointers and full/empty flags;
- an output interface;
- a packet controller (`router_fsm`);
- valid/ready handshakes on both sides;
- the header / data / parity packet format;
- the split between direct transmission and FIFO buffering.

The article does not give these details, so this design chose them:

- the widths and the FIFO depth;
- the header layout;
- the parity rule;
- the reset polarity;
- the handling of addresses that name no port;
- the exact cycle timing.

The section "Choices made here" lists each one.

## Packet format

```
 byte 0        bytes 1 .. len          byte len+1
+-----------+  +-------------------+  +-----------+
|  header   |  |  payload (len)    |  |  parity   |
+-----------+  +-------------------+  +-----------+
 [7:2] len  [1:0] addr
```

- `addr` (2 bits) selects output port 0, 1 or 2. Address 3 names no port. A packet sent to
  address 3 is accepted at full speed and thrown away. `pkt_drop` pulses for it.
- `len` (6 bits) is the payload length, 0 to 63 bytes.
- `parity` should equal the XOR of the header byte and all payload bytes (even parity per bit
  column). If it does not, `parity_err` pulses for one cycle. The packet, parity byte included,
  is still delivered unchanged, so the receiver can decide what to do with it.
- The output port sends out every byte of the packet: header, payload and parity.

`router_pkg::header_t` is the header as a packed struct.

## Data path

```
            +----------+    +-----------+    +--------------+    +------------+   port p
data_in --->| input    |--->| router_fsm|--->| router_route |-+->| router_fifo|--+
valid_in -->| register |    | (framing, |    | (address     | |  +------------+  |  +-----------+
ready_in <--|          |<---|  parity)  |<---|  decode,     | |                  +->| output    |--> data_out[p]
            +----------+    +-----------+    |  full check) | +------------------->| register  |--> valid_out[p]
                                             +--------------+     direct path      +-----------+<-- ready_out[p]
```

1. **Input interface** (`router_input_if`). This is a one-word register. It takes `data_in`
   at a rising edge when `valid_in` and `ready_in` are both high. `ready_in` is high when the
   register is empty, or when the core takes the held word in the same cycle. The input can
   therefore run at one byte per cycle.
2. **Packet controller** (`router_fsm`). It has three states: `ST_HEADER`, `ST_DATA` and
   `ST_PARITY`.
   - In `ST_HEADER` it passes the address bits of the incoming header byte straight to the
     routing logic. When the header is accepted, it latches the address. Every later byte of
     the packet then goes to the same port.
   - It counts down the payload and keeps a running XOR for the parity check.
   - It takes a byte only when the destination has room (`dest_full` low). The exception is a
     dropped packet, which is always taken.
3. **Routing logic** (`router_route`). This is combinational. It decodes the address into a
   one-hot port select, steers the write strobe to that port and reports the port's FIFO full
   flag. The full flag is the congestion signal that stalls the input.
4. **Port FIFO** (`router_fifo`). It is a register array addressed by a write pointer and a
   read pointer, each with an extra wrap bit:
   - empty: the two pointers are equal;
   - full: the pointers differ only in the wrap bit.

   Reads fall through: the head word is always on `rd_data`, and `rd_en` pops it.
5. **Output interface** (`router_output_if`). This is a one-word output register per port.
   When the register is empty, or its word is taken this cycle, it reloads:
   - from the FIFO when the FIFO holds words;
   - otherwise, directly from a byte arriving for this port. `byp_take` then stops that byte
     from also being written into the FIFO.

   Bytes only take the direct path when the FIFO is empty, so the order of bytes at a port is
   always kept.

## Flow control and congestion

Both sides use the same rule: a byte moves at the rising edge where valid and ready are both
high. The side offering the byte must keep it steady until then. Assertions check this at the
input (`a_hold_while_stalled`) and at each output (`a_out_stable`). The FIFO has assertions
against overflow and underflow.

A port's traffic goes through three stages:

- **Uncongested.** The FIFO is empty and the output register is free. A byte accepted at edge
  *k* is on `data_out` after edge *k+2*: one edge into the input register, one into the output
  register.
- **Congested.** The receiver holds `ready_out` low, or the FIFO already has words. Bytes queue
  in that port's FIFO (16 words by default). The other ports are not affected, as long as the
  current packet is not addressed to the congested port.
- **Full.** The FIFO for the current packet's port is full. The controller stops taking bytes,
  the input register stays full, and `ready_in` falls. The sender holds its byte until a word
  leaves the FIFO.

One input feeds all three ports. A packet stuck behind a full port therefore blocks the
packets behind it, including packets for other ports. This is the usual head-of-line behaviour
of a single-input router.

## Interface of `router_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous, active low; empties every FIFO and register |
| `data_in` | in | 8 | packet byte |
| `valid_in` | in | 1 | `data_in` is offered |
| `ready_in` | out | 1 | router takes `data_in` at this edge; low = stall |
| `data_out[3]` | out | 8 each | byte leaving port *p* |
| `valid_out[3]` | out | 1 each | `data_out[p]` is offered |
| `ready_out[3]` | in | 1 each | receiver *p* takes `data_out[p]` at this edge |
| `parity_err` | out | 1 | one-cycle pulse after a packet whose parity byte is wrong |
| `pkt_done` | out | 1 | one-cycle pulse after the last byte of each packet is taken in |
| `pkt_drop` | out | 1 | one-cycle pulse after the header of a packet to address 3 |

Parameters:

- `router_top`: `DATA_W` (8) and `FIFO_DEPTH` (16, must be a power of two).
- `router_pkg`: the port count `RT_NUM_PORTS` (3) and the address width `RT_ADDR_W` (2).

The header layout assumes `DATA_W - RT_ADDR_W` length bits.

## Choices made here

The source gives the structure. It does not give any of the following, so they are this
design's own:

- 8-bit bytes and 16-word FIFOs.
- The header layout `{len[5:0], addr[1:0]}` and the length field. The source only shows
  packets as header, data bytes and parity.
- The parity rule (XOR of header and payload). Reporting a parity error without dropping the
  packet.
- Dropping packets to address 3.
- An active-low synchronous reset.
- First-word-fall-through FIFOs, and the one-word registers in the input and output
  interfaces.
- What "no congestion" means for the direct path: the port FIFO is empty and the output
  register is free.
- The resulting latency of 2 cycles. The source mentions a response delay but gives no figure.
- The three output ports. They come from the three FIFO instances of the source's
  implementation; the text itself does not state a port count.

The source places the FIFOs in two ways. Its block diagram draws them before the routing
logic. Its architecture text gives each output port its own FIFO. This design follows the
text.

The source says an accepted byte is latched into the FIFO at the next clock edge. Here it
first enters the input register, and reaches the FIFO (or the output register) one edge later.

The source's waveforms use the names "Packet valid", "Suspend data", `read_enb`,
`vld_out_0` and `data_out_0`. Its text uses `valid_in/ready_in` and `valid_out/ready_out`.
This design uses the text's handshake names. "Suspend data" is `ready_in` low, and `read_enb`
is `ready_out`.

The source reports an FPGA implementation (I/O port count, LUT and flip-flop counts). This RTL
was not sized to match those numbers. At the defaults it has 45 port bits, and 89 flip-flops
besides the 384 bits of FIFO storage.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_router_fifo`: random push/pop against a queue model. Checks the fill-to-full and drain
  order, every flag and the count.
- `tb_router_input_if`: random sender gaps and core stalls. Checks byte order, the `ready_in`
  rule, data held while stalled, and one byte per cycle.
- `tb_router_route`: exhaustive over address, write strobe and full-flag patterns.
- `tb_router_fsm`: 400 random packets, including zero-length, dropped and bad-parity packets,
  against a modelled router. Checks the address, accept and write decisions per byte, and
  parity_err, pkt_done and pkt_drop per packet.
- `tb_router_output_if`: output interface paired with a FIFO. Checks order, held output, the
  direct path only with an empty FIFO, one-cycle direct latency and full-rate drain.
- `tb_router_top`: the whole router at its default parameters.
  - First, the two packets of the source's timing diagrams: port 0, 3 and 8 payload bytes.
    Checks the 2-cycle latency and one byte per cycle.
  - Then 600 random packets while receivers stall at random, sometimes for 20–60 cycles.
  - A per-port scoreboard checks that every byte arrives once and in order.
  - It counts each mechanism and fails if one never happens: input stall, full FIFO, output
    backpressure, direct path, FIFO buffering, dropped packet, parity error and zero-length
    packet.

The source gives no throughput or latency numbers to check against. The cycle counts above
are this design's own.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/router_pkg.sv tb/tb_router_top.sv \
          --top-module tb_router_top -o sim
./obj_dir/sim
```

Replace `tb_router_top` with any other testbench name. Lint with
`verilator --lint-only -Wall -Irtl rtl/router_pkg.sv rtl/router_top.sv`. The only warnings
left are for the unconnected FIFO `count` and controller `state` outputs, and for package
constants that a module does not use.

## Files

- `rtl/router_pkg.sv`: shared constants, header struct, controller state enum
- `rtl/router_input_if.sv`, `rtl/router_fsm.sv`, `rtl/router_route.sv`, `rtl/router_fifo.sv`,
  `rtl/router_output_if.sv`: the blocks described above
- `rtl/router_top.sv`: the router
- `tb/tb_*.sv`: one testbench per module
