# 1x4 packet switch

A byte-wide packet switch with one input and four outputs. Packets arrive one
byte per clock on the input port. The first byte of each packet is its
destination address (DA). Each of the four output ports has an 8-bit address
that a host sets through a small memory interface. A packet whose DA equals a
port's address is copied whole into that port's 16-entry FIFO. A receiver on
that port drains the FIFO at its own pace. While the packet passes, the switch
checks its parity byte.

The RTL follows a published 1x4 switch design: its packet format, its ports,
its memory interface, its five-state controller and its 16x8 FIFOs. Where that
design leaves a detail open (flow control towards the sender, read timing,
reset values, what happens to unmatched packets), this RTL makes its own
choice. Each such choice is listed under
[Where this RTL departs from or adds to the published design](#where-this-rtl-departs-from-or-adds-to-the-published-design).

## Packet format

| byte     | field   | meaning                                             |
|----------|---------|-----------------------------------------------------|
| 0        | DA      | destination address, matched against port addresses |
| 1        | SA      | source address, carried through unchanged           |
| 2        | LEN     | number of payload bytes, 0..255                     |
| 3..LEN+2 | payload | data                                                |
| LEN+3    | FCS     | parity byte                                         |

A packet is 4 bytes long (LEN = 0) up to 259 bytes long (LEN = 255). The FCS
is even parity taken bit by bit over the whole packet. The XOR of every byte
from DA to the last payload byte equals the FCS. Put another way, the XOR of
all bytes, FCS included, is zero. An example is the packet
`0a 07 05 57 de 2d 87 2b 00`: DA `0a`, SA `07`, LEN 5, five payload bytes,
then FCS `00`.

The switch forwards the packet exactly as it arrived. The output port delivers
the header and FCS as well as the payload.

## How a packet moves through the controller

The hardest part of the design is the controller, `switch_fsm`. It has to
push a packet of up to 259 bytes through a FIFO of 16 bytes. It has to keep
packets for one port from mixing. And it has to do both while the sender only
sees a single stall signal.

The controller has five states:

| state         | busy | what happens                                                                                                 |
|---------------|------|--------------------------------------------------------------------------------------------------------------|
| `Addr_Wait`   | 0    | Idle. The next byte taken is a DA. It is compared with the four port addresses and the port is chosen.        |
| `Busy_State`  | 1    | The chosen port's FIFO still holds an earlier packet. The DA byte is parked until that FIFO is empty.        |
| `Data_Load`   | 0    | SA, LEN and the payload bytes are taken and written to the FIFO. LEN loads a down-counter.                    |
| `Parity_Load` | 0    | The FCS byte is taken, written and checked. The controller then returns to `Addr_Wait`.                       |
| `Hold_State`  | 1    | The byte just taken found the FIFO full. It is parked until the receiver makes room.                          |

The rules that are easy to miss:

- **Each byte is written on the clock edge on which it is taken.** The FIFO
  write strobe is combinational from the input byte. There is no staging
  register on the normal path. If the FIFO has room, a packet goes through
  with no added latency. Port N's `ready_N` rises one cycle after its DA byte
  is taken.
- **A stall costs one parked byte, not a lost byte.** `busy` depends only on
  the state, so it is known before the sender offers a byte. The sender
  learns that the FIFO is full only after it has offered a byte. That byte is
  taken anyway and kept in a one-byte hold register. `Hold_State` (or
  `Busy_State` for a DA byte) raises `busy` until the byte can be written.
  The controller then continues in the state the byte would have led to.
  This can be `Parity_Load`, `Data_Load` or, after a parked FCS byte,
  `Addr_Wait`.
- **Packets for one port are not interleaved, and a new packet waits for the
  old one to drain.** A new packet goes to its FIFO only when that FIFO is
  empty. So back-to-back packets to the same port are spaced by the time the
  receiver needs to drain the first one. The input is stalled while the
  controller waits, so packets queued behind it for other ports wait too.
- **LEN = 0** sends the controller straight from the LEN byte to
  `Parity_Load`.
- **Unmatched DA.** A packet whose DA matches no port is still taken, byte by
  byte and at full rate, so the input stays in step with packet boundaries.
  It is then thrown away. `pkt_drop` pulses once for it.
- **Bad FCS.** A packet with a bad FCS is forwarded anyway. The receiver
  already holds most of it by the time the FCS arrives. `parity_err` pulses
  for one cycle after the FCS byte is taken. Dropped packets are checked too.
- **Two ports with the same address.** The lowest-numbered port wins.

## Interfaces and timing

All signals are synchronous to `clk`. In the list below, "the edge" means a
rising edge of `clk`.

**Input port.** A byte on `data_in` is taken at the edge if `data_status` is
high and `busy` is low. `data_status` is a per-byte valid signal. It may drop
in the middle of a packet, and the controller simply waits. While it is low,
`data_in` is ignored.

**Output ports 0..3.**
- `ready_N` is high while FIFO N holds at least one byte.
- Driving `read_N` high pops one byte at the edge. The byte appears on
  `port_N` just after that edge and stays there until the next pop.
- Driving `read_N` while `ready_N` is low has no effect.
- A receiver that keeps `read_N` high while `ready_N` is high gets one byte
  per cycle. The switch then passes one byte per clock from input to output
  and never raises `busy`, even for 259-byte packets.

**Memory interface.** The four port addresses sit in a small register file.
- Write: `mem_en = 1`, `mem_rd_wr = 1`, `mem_add` = port number,
  `mem_data` = address. The write takes effect at the edge. A new address
  applies to the next DA that is compared.
- Read: `mem_en = 1`, `mem_rd_wr = 0`. The address of port `mem_add`
  appears on `mem_rdata` after the edge and is held until the next read.

**Status.**
- `parity_err` is a one-cycle pulse: a packet ended with a bad FCS.
- `pkt_drop` is a one-cycle pulse: a DA matched no port.

**Reset.**
- `rst_n` is active low. It may be asserted at any time. The internal reset
  follows it at once, and all registers are cleared at the next edge.
- Release is synchronised: the switch leaves reset on the second edge after
  `rst_n` rises.
- Reset empties all four FIFOs and clears the FIFO storage. It also clears
  the `port_N` outputs, resets the controller to `Addr_Wait` and sets all four
  port addresses to 0.
- A packet that is in flight during reset is lost. The host must write the
  port addresses again after reset. Until it does, every port has address 0,
  and a packet with DA `00` goes to port 0.

## Blocks

| file                  | block                                                                                              |
|-----------------------|----------------------------------------------------------------------------------------------------|
| `rtl/switch_pkg.sv`   | byte width, port count, FIFO depth, packet sizes, controller state type                            |
| `rtl/reset_sync.sv`   | reset conditioning: asynchronous assertion, two-flop synchronised release                          |
| `rtl/port_config.sv`  | memory interface and the four port-address registers                                               |
| `rtl/switch_fsm.sv`   | the packet controller described above                                                              |
| `rtl/sync_fifo.sv`    | 16x8 synchronous FIFO, one per output port, made of the three blocks below                         |
| `rtl/fifo_count.sv`   | count block: occupancy, `full`/`empty`, lets a write through only if not full and a read only if not empty |
| `rtl/fifo_ptr.sv`     | pointer block: write and read pointers                                                             |
| `rtl/fifo_mem.sv`     | write block, read block and the 16x8 array; registered read                                        |
| `rtl/switch_top.sv`   | the switch: wires the blocks above together                                                        |

`switch_top` has one parameter, `FIFO_DEPTH_P` (default 16). The package holds
the other sizes. The byte width is fixed at 8 bits, because the LEN field and
the port addresses are bytes. `sync_fifo`, `fifo_count`, `fifo_ptr` and
`fifo_mem` accept any depth. A depth that is not a power of two works, but it
skips the pointer/count consistency assertion.

Assertions in the RTL check two rules. The FIFO pointers must agree with the
count. The controller must never write two FIFOs at once, and must never write
any FIFO while it drops a packet.

## Where this RTL departs from or adds to the published design

- **`busy` output (added).** The published input port has only `Data` and
  `Data_Status`. Yet it names a `Hold_State` that waits for FIFO space, and it
  accepts 259-byte packets into 16-byte FIFOs. So some way of stopping the
  sender is needed. `busy` provides it.
- **Meaning of `Busy_State`.** The published text says the busy state "pauses
  operations when the FIFO is empty". Here this is read as "pauses until the
  destination FIFO is empty": a new packet waits until the previous one for
  the same port has drained.
- **Bad FCS.** The published results show a packet with a corrupted FCS being
  forwarded. This RTL keeps that behaviour and adds the `parity_err` flag.
  It does not discard the packet.
- **Unmatched DA.** The published design does not say what happens to such a
  packet. Here it is dropped, and `pkt_drop` is added to report it.
- **`mem_data`.** The published interface has one `mem_data` signal. Here it
  is split into a write input, `mem_data`, and a registered read output,
  `mem_rdata`. The meaning of `mem_rd_wr` (1 = write) is a choice.
- **Reset synchroniser.** The published design has one clock and an
  active-low reset. The two-flop release synchroniser is this RTL's own.
- **Read timing.** The published design does not fix it. Here the FIFO read
  is registered and `port_N` holds its value between pops.
- **Bus protocols.** The published design mentions AXI and APB in passing.
  It lists only the plain signals used here, and no bus protocol is
  implemented.

## Verification

Every block has a self-checking testbench in `tb/`. Each one compares the
block against a model written separately inside the testbench. Each one
ends by printing `TB_RESULT checks=N failures=M`.

| testbench         | what it checks |
|-------------------|----------------|
| `tb_switch_top`   | The whole switch at its default sizes. It configures the ports (`0a 14 1e 28`) and reads them back. It sends the example packet above and checks that `ready_0` rises one cycle after the DA. It sends min and max packets to every port, a bad FCS, an unmatched DA, a back-to-back packet to an occupied port, 400 random packets with idle gaps and garbage on `data_in`, and a reset in mid-packet followed by reconfiguration. Four receivers drain at 90/60/25/8 % rates. A scoreboard compares each port's byte stream. The testbench counts each mechanism (Hold_State, Busy_State, drop, parity error, min/max packet, `data_status` gaps, mid-packet reset, memory reads, use of every port) and fails if one never happened. |
| `tb_switch_cases` | The published test cases, each from a fresh reset. One port at a time is given address `0a` and receives the example packet: `ready` must rise one cycle after the DA, and the last byte must arrive 10 cycles after it. Min and max packets go to each port at full rate, and 259 bytes must pass in 259 cycles with no stall. A max packet goes to a stopped receiver, so the FIFO fills and `Hold_State` stalls the sender. Then: `data_status` held low, a bad FCS, all four ports covered, and a reset in mid-packet. |
| `tb_switch_fsm`   | The controller with FIFOs modelled in the testbench. It checks the state after every byte, same-edge writes, the pulse timing, that `busy` is high exactly in the two waiting states, that no full FIFO is ever written, and the per-port byte streams under random traffic. |
| `tb_sync_fifo`    | Fill to full (a 17th write is ignored), drain in order (a read of an empty FIFO is ignored and `dout` holds), then random push/pop against a queue. |
| `tb_fifo_count`, `tb_fifo_ptr`, `tb_fifo_mem` | The three FIFO sub-blocks against counter and array models. |
| `tb_port_config`  | Reset values, and random writes and reads against a register model. |
| `tb_reset_sync`   | Immediate assertion, and release on exactly the second edge. |

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/switch_pkg.sv rtl/*.sv \
    tb/tb_switch_top.sv --top-module tb_switch_top -Mdir obj_top -o sim
./obj_top/sim +verilator+rand+reset+2 +verilator+seed+1
```

For another block, change the testbench name. The end-to-end test finishes
in well under a second and prints how often each mechanism occurred. Every
testbench starts with `rst_n` high and drops it at time 1. This ensures that
the asynchronous reset sees a falling edge even in a simulator that starts
variables at random values.

## Limits

- Throughput to one port is bounded by its receiver. A full FIFO stalls the
  whole input, including traffic meant for other ports. This is head-of-line
  blocking, inherent in a single input with per-port FIFOs and no input
  buffer.
- A run of packets to the same port is serialised by the wait-until-empty
  rule in `Busy_State`.
- No timing or area figures are given here. The FIFOs are register arrays
  (4 x 16 x 8 bits), meant for synthesis into flip-flops or small RAMs.
