# Router architectures for a network-on-chip, with a Wishbone network interface

A network-on-chip (NoC) replaces a shared bus with small packet switches.
Processing elements (PEs) talk through a **network interface (NI)** that cuts
their words into packets of **flits** (flow-control digits). **Routers** pass the
flits along with **wormhole switching**. The head flit opens a path through
each router, the body flits follow it, and the tail flit closes the path.
How a router handles two packets that want the same output decides its cost
and its performance.

This RTL builds one NI and four 5-port routers. Each router solves the
contention problem in a different way, at a different price:

| router | on contention | buffers per router | weakness |
|---|---|---|---|
| `bufferless_router` | the loser's packet is dropped | none | retransmissions |
| `wormhole_router` | the loser waits in its input FIFO | 5 FIFOs | head-of-line blocking |
| `vc_xbar_router` | waits in a per-(input, output) FIFO | 20 FIFOs | area, 4 ready signals per port |
| `vc_router` | waits in one of 4 virtual channels, flits interleave | 20 small VC buffers | allocation logic |

`noc_top` places all of these side by side, each with its own ports. It also
holds the NI and the stand-alone 4-master round-robin bus arbiter that the
router arbiters are derived from. All code is synthesizable SystemVerilog-2017.

---

## 1. Flits and packets (`noc_pkg`)

Every flit carries its type in its two most significant bits:

| bits | type |
|---|---|
| `11` | head: opens the path |
| `10` | body: data |
| `01` | tail: data, then closes the path |
| `00` | invalid: an idle link |

There are two flit formats:

- **NI flits are 34 bits.** The type sits in `[33:32]` and four payload bytes in `[31:0]`. A head payload is `{SA, DA, PS, reserved}`:
  - SA: source address, 8 bits;
  - DA: destination address, 8 bits;
  - PS: packet size, 8 bits;
  - reserved: 8 bits, meant to carry the virtual-channel identifier between routers.
- **Router flits are 10 bits.** A head flit carries a 4-bit output-port code in bits `[7:4]`, with the codes below. The router turns the code into a one-hot port vector (`route_compute`).

| index | port | code |
|---|---|---|
| 0 | local | `0011` |
| 1 | east | `0001` |
| 2 | west | `0010` |
| 3 | north | `0100` |
| 4 | south | `1000` |

All 5-port vectors in the RTL use this index order.

## 2. The network interface

The transmit path runs from the PE to the network:

```
PE (clk_pe) --Wishbone--> wb_fifo: 64-bit latch -> 8-bit dual-clock FIFO --> ni_packer (clk_noc) --> 34-bit flits
```

The receive path runs the other way:

```
34-bit flits (clk_noc) --> 34-bit dual-clock FIFO --> ni_unpacker (clk_pe) --> bytes and Wishbone words
```

### 2.1 Dual-clock FIFO (`async_fifo`)

This FIFO is the only block that crosses between clocks. The routers reuse it as their input buffer.

- **Pointers.** Each pointer is `log2(DEPTH)+1` bits. It is kept in binary, to address the memory, and in Gray code, which changes one bit per step and so is safe to synchronise.
- **Synchronisers.** Each Gray pointer crosses into the other clock domain through two flops.
- **Empty** means the two Gray pointers are equal.
- **Full** means the two Gray pointers differ only in their two top bits. This is the Gray form of "equal except the wrap bit".
- **Flag timing.** Because of the synchronisers, both flags are pessimistic:
  - after a write, `fifo_empty` stays high for two more read clocks;
  - after a read, `fifo_full` stays high for two more write clocks.
- **Read mode.** The read is first-word-fall-through: `data_out` shows the oldest word, and `rd_en` pops it.
- **Ignored accesses.** A write while full and a read while empty are ignored.
- **Clear.** `clear_in` resets both pointers asynchronously.
- **Defaults.** 10-bit data, depth 16. `DEPTH` must be a power of two, at least 4.

### 2.2 Wishbone side (`wb_fifo`)

The PE is a Wishbone master connected point to point to this slave.

- **Width select.** `sel_i` gives the master's data width: 0 = 8, 1 = 16, 2 = 32, and 3..7 = 64 bits.
- **Write.** On `stb_i` the slave latches `dat_i` into a 64-bit register. It then writes one byte per clock into an 8-bit dual-clock FIFO, most significant valid byte first.
- **Wait states.** `ack_o` stays low as long as bytes remain in the latch or the FIFO is full. It pulses for one clock after the last byte is stored.
- **Reset.** `rst_i` clears the latch and the FIFO.

### 2.3 Packer (`ni_packer`)

The packer is a five-state machine: `IDLE`, `HEADER`, `BODY`, `TAIL` and `WAIT`. It reads the byte FIFO on `clk_noc` and collects four bytes into each flit. Each flit takes four clocks when bytes are available.

- **Header.** The first four bytes of a packet form the head flit `{SA, DA, PS, reserved}`.
- **Command.** At the end of the header the packer samples `cmd`:
  - `cmd = 1` (write) sends `PS-1` body flits and then a tail flit;
  - `cmd = 0` (read) sends the tail flit right after the head.
- **Waiting.** If the FIFO runs empty in the middle of a flit, the machine parks in `WAIT` and resumes the same flit when data arrives.
- **Output.** `valid` is high for exactly one clock per flit.
- **No back-pressure.** The packer has no ready input, so the receiver must keep up.

### 2.4 Unpacker (`ni_unpacker`)

The unpacker takes flits with a valid/ready handshake.

- **Head flits** load `src_addr`, `dst_addr` and `pkt_size`.
- **Body and tail flits** leave as four bytes on `data_out`, top byte first, one per clock with `byte_valid`. The last byte of a tail pulses `pkt_done`.
- **Word assembly.** Each byte is also shifted into a 64-bit register. When the register holds the number of bytes selected by `sel_i`, the word is offered on `dat_o`. `ack_o = stb_i` completes the Wishbone read.
- **Stalls.** Byte output stalls while a full word waits for the PE's strobe.
- **Pacing.** A byte accepted in the same clock as the word acknowledge starts the next word. Flits can therefore follow each other every four clocks, even with 8-bit words.

## 3. Arbitration

All arbiters come from one building block.

- **`prio_encoder`** is a one-hot priority encoder with enable. `i[0]` has the highest priority, and the output is zero when `en` is low.
- **`rr_bus_arbiter`** is a round-robin arbiter for 4 masters on one bus. It works as follows:
  - a one-hot shift register, reset to `1000`, enables one of four priority encoders;
  - each encoder sees the requests rotated, so encoder k favours `req[k]`, then `req[k-1]`, and so on;
  - the register shifts right every clock, so priority moves 3 → 2 → 1 → 0 → 3;
  - the grant is registered, so it appears one clock after the request.
- **`pkt_arbiter`** is the same structure adapted to wormhole switching. Priority moves per packet, not per clock:
  - while the output is free, the grant is combinational, so a head crosses in the clock it asks;
  - the winner is then locked (`busy`) until `release_i` reports that its tail has left;
  - on release the priority rotates one step.
- **`switch_arbiter`** gives each of the five outputs a 4x1 `pkt_arbiter` over the other four inputs. A packet never leaves by the port it came in on. `gnt[o][i]` is the crossbar select.
- **`crossbar`** is one one-hot multiplexer per output. An unselected output carries the invalid flit.

## 4. The routers

All four routers are 5-port routers with 10-bit flits on one clock. They differ only in where a blocked flit waits.

### 4.1 Bufferless router (`bufferless_router`)

The bufferless router has no storage apart from a "connected" flag per input.

- **Heads.** A head flit requests its output. If it wins, the output is connected to its input until the tail passes.
- **Dropping.** A head that loses, or finds its output busy, is dropped together with the rest of its packet. `drop[i]` flags every dropped flit, and the source must resend the packet.
- **Timing.** Flits cross combinationally in the clock they arrive.

### 4.2 Wormhole router (`wormhole_router`)

Each input writes into its own 16-flit FIFO, and `rdy[i]` (FIFO not full) is the flow control towards the upstream router.

- **Routing.** A head at the front of a FIFO goes through route compute and requests its output from the switch arbiter.
- **Packet switching.** The grant holds the crossbar path until the tail leaves. A flit moves only while `out_rdy` of its output is high.
- **Latency.** A flit written at clock edge t reaches the FIFO front three edges later, because the router reuses the dual-clock FIFO. It leaves in that cycle if its output is free.
- **Head-of-line blocking.** A packet waiting for a busy output blocks every packet queued behind it in the same FIFO, even one bound for an idle output.

### 4.3 Full-crossbar router (`vc_xbar_router`)

This router removes head-of-line blocking by sorting flits on arrival. Each input has four FIFOs, one for each output other than itself, which makes twenty in all.

- **Sorting.** A head flit's port code picks the FIFO, and the body and tail flits follow it into the same FIFO.
- **Flow control.** `rdy[i][o]` reports room in FIFO (i, o). The upstream router must hold a flit for output o while that signal is low, so each input needs four flow-control signals.
- **Outputs.** Each output has a 4:1 multiplexer over the four FIFOs that feed it and a packet arbiter.
- **No blocking.** A packet stuck at one output never delays packets at the same input that are bound elsewhere.
- **Bad heads.** A head whose code is unknown or points back to its own port is dropped with its packet.

### 4.4 Virtual-channel router (`vc_router`)

This is the most involved block. Each physical input carries `V = 4` virtual channels (VCs). Each VC has its own `VC_DEPTH = 4` flit buffer (`sync_fifo`). The VC number travels beside the flit (`in_vc`, `out_vc`) rather than inside it.

A packet passes four steps:

1. **Route compute.** When a head flit reaches the front of its VC buffer, its port code names the output port.
2. **VC allocation (`vc_allocator`).** The routing function names a port, not a VC, so the allocator must also pick the VC. It is separable, in two stages:
   - each input VC chooses one free VC of its output port with a V:1 round-robin arbiter;
   - each output VC picks one of the input VCs that chose it, with a round-robin arbiter.

   A loser retries in the next clock. The winner keeps the output port and VC until its tail has left. The output VC is then free again.
3. **Switch allocation (`vc_switch_allocator`).** Every clock, each allocated input VC that has a flit and at least one credit for its output VC competes in two stages:
   - a V:1 arbiter per input port;
   - a 5:1 arbiter per output port.

   At most one flit leaves each input and each output per clock.
4. **Switch traversal.** The flit crosses a 5x5 crossbar together with its new VC number.

**Interleaving.** Switch allocation is per flit, not per packet. Two packets on different VCs that share an output therefore take turns, clock by clock. A blocked packet holds only its own VC, never the physical channel, which is what removes head-of-line blocking.

**Credits.** The router keeps a counter per output VC. It starts at `VC_DEPTH`, the free space of the downstream buffer.
- Sending a flit spends one credit.
- A `credit_in[p][v]` pulse returns one.
- A VC with zero credits is not eligible for switch allocation.

In the other direction, `credit_out[p][v]` pulses when a flit leaves input buffer (p, v). This tells the upstream router that a slot is free.

A buffer slot freed by a read can take a new flit in the same clock. For that reason the VC buffers are single-clock FIFOs.

**Timing.**
- A head written at edge t is allocated a VC in cycle t+1 and crosses in cycle t+2.
- Body flits stream one per clock as long as credits last.
- A freed output VC can be reallocated in the clock after its tail leaves.

**Contract for neighbours.** Upstream routers must respect the credits. A flit written into a full VC buffer is lost.

## 5. The top level (`noc_top`)

`noc_top` instantiates every block above. Its ports come in groups, each described in the file header:

| group | clock | meaning |
|---|---|---|
| `pe_*` | `clk_pe` | Wishbone signals of the NI transmit and receive paths |
| `rx_byte`, `rx_byte_valid`, `rx_src_addr`, `rx_dst_addr`, `rx_pkt_size`, `rx_pkt_done` | `clk_pe` | unpacked header fields and bytes |
| `tx_flit`/`tx_valid`, `rx_flit`/`rx_valid`/`rx_full` | `clk_noc` | NI network side |
| `bl_*`, `wh_*`, `fx_*`, `vc_*` | `clk_noc` | the four routers |
| `ba_req`/`ba_grant` | `clk_noc` | the bus arbiter |

The NI and the routers are not connected to each other, because the NI flit is 34 bits and the router flit is 10 bits. To build a network, either narrow the NI flit or widen `W`, and connect ports of routers.

Parameters and their defaults:

| parameter | default |
|---|---|
| `W` | 10, the router flit width |
| `DEPTH` | 16, the FIFO depth |
| `V` | 4 VCs |
| `VC_DEPTH` | 4 |

## 6. Verification

Every block has a self-checking testbench in `tb/tb_<block>.sv`. Each compares the block against a reference computed independently in the testbench and ends with a line `TB_RESULT checks=N failures=M`. Each also has a watchdog.

Highlights:

- `tb_async_fifo` uses unrelated write and read clocks and checks data order, the flags, and that writes while full are ignored.
- `tb_fifo_depth_sweep` builds the same FIFO at depths 4, 8, 16, 32 and 64 and checks that each holds exactly its depth and keeps order.
- `tb_wb_fifo` and `tb_ni_unpacker` cover all four widths, wait states and the 4-clocks-per-flit pace.
- `tb_ni_packer` checks write and read packets and the stall in `WAIT`.
- The arbiter testbenches run random requests against a reference model and check fairness.
- The router testbenches check every flit of every packet. They also detect the mechanism each router is about:
  - drops in the bufferless router;
  - head-of-line blocking in the wormhole router;
  - overtaking in the full-crossbar router;
  - interleaving, credit stalls and VC-allocation conflicts in the VC router.
- `tb_noc_top` drives the whole top with every parameter at its default:
  - three NI packets are looped from `tx_flit` back to `rx_flit`, and every flit and every word read back is checked;
  - the same four-packet contention pattern goes through each router;
  - 200 clocks of random requests are checked on the bus arbiter.

  It counts, and requires, each of these: Wishbone wait states, packer waits, a read packet, a drop, a contention stall, head-of-line blocking, overtaking, VC interleaving, a credit stall and bus-arbiter rotation.

To simulate with Verilator 5, for example the top-level test:

```
verilator --binary --timing -Wno-fatal rtl/noc_pkg.sv rtl/*.sv tb/tb_noc_top.sv --top-module tb_noc_top
./obj_dir/Vtb_noc_top
```

Naming the package first puts it ahead of the modules that import it. The same command works for any `tb/tb_<block>.sv`. The testbenches use `$urandom` only and need no input files.

## 7. Departures and limits

Some parts go beyond the original description:

- **Full FIFO.** A write to a full dual-clock FIFO is ignored. In the original description it overwrites unread data.
- **Unstated details.** The following were not specified and are this design's choice:
  - the packet-size counting (PS counts the flits after the head);
  - the byte order inside a flit;
  - the `sel_i` encoding;
  - the position of the port code in the 10-bit head flit;
  - the VC buffer depth;
  - the credit counters;
  - the `in_vc`/`out_vc` side band.
- **Bus arbiter rotation.** The arbitration text gives the rotation in both directions. This design follows the shift-register form, in which priority goes 3 → 2 → 1 → 0.
- **VC buffers.** The VC router uses single-clock buffers, where the original uses the dual-clock FIFO for every buffer.
- **Routing.** There is no XY routing over a mesh. Head flits carry the output-port code directly, and no multi-router network is assembled.
- **Bufferless router.** Deflection routing is described as an alternative to dropping and is not built; the bufferless router drops.
- **Not present.** There is no Wishbone SYSCON (clock and reset generator) and no processing element. The top's ports take their place.

How far to trust it:

- Every block passes its own randomised or directed testbench.
- Every testbench was shown to fail on a deliberately broken copy of its block.
- Only Verilator's two-state simulation has been run. Clock-domain crossings were checked functionally, not for metastability.
- Nothing has been run on an FPGA or through timing analysis.
