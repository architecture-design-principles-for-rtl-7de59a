# Tightly coupled synchronizers in a GALS Network-on-Chip switch

In a globally asynchronous, locally synchronous (GALS) chip, the network runs
in a clock domain of its own, and every link that crosses a clock boundary
needs a synchronizer. The usual approach puts the synchronizer in front of the
switch as a separate block. That exposes its whole cost. The flits wait in the
synchronizer's buffers and then again in the switch input buffer, so latency,
area and power all add up.

The idea behind this design is to merge the two. **The synchronizer becomes
the switch input buffer.** The storage that synchronizes the flits also
buffers them and carries the flow control. No separate input FIFO is left in
the switch.

Two kinds of link are covered, and each gets its own merged buffer:

* **Switch-to-switch links are mesochronous.** Every switch gets the same
  clock frequency from a clock tree with relaxed skew, so only the phase is
  unknown. Each flit comes with its sender's clock (source synchronous). Three
  latch banks capture it, and the receiving switch reads them through a
  multiplexer. This is `meso_sync`.
* **The link to an IP core crosses unrelated clocks.** It uses a dual-clock
  FIFO with token-ring pointers and asynchronous full/empty detection. This is
  `dc_fifo`.

Both feed the arbiter and the crossbar of an output-buffered wormhole switch
(`gals_switch_top`). The switch uses stall/go flow control on every link.

## Block diagram

```
              in_clk[1..3] (same frequency as clk_sw, any phase)
                 |
 in_flit[1..3] --+--> meso_sync x3 ----+
 in_valid        |   3 latch banks     |      +-------------+     +-------------+
 in_stall <------+   + 3x1 mux         +----->| rr_arbiter  |     | out_buffer  |--> out_valid/out_flit
                                       |      | (per output)|     | x4, 6 flits |<-- out_stall
 in_flit[0] ----> dc_fifo -------------+----->|  crossbar   |---->|             |
 in_valid[0]     6 slots, token rings         +-------------+     +-------------+
 in_stall[0] <--  in_clk[0] (IP core clock)                            clk_sw
```

There is no register between a synchronizer and the output buffer. The mux of
the synchronizer, the arbiter and the crossbar form one combinational path,
and the output buffer flops are the first place where `clk_sw` samples an
incoming flit. The timing margin of the synchronizer is therefore measured at
the output buffer. The arbiter and crossbar delay is subtracted from the setup
margin.

## The mesochronous port: latch banks that are the input buffer

`meso_sync` has two halves that share only the latch banks.

**Front end (clock `clk_tx`, sent with the data).** A ring counter holds one
enable per bank (`enable_0..enable_2`). A flit is transferred in a `clk_tx`
cycle when `valid_i = 1` and `stall_o = 0`. It goes into the enabled bank,
which is transparent while `clk_tx` is low and closes on the rising edge. On
that edge the ring moves on to the next bank. Data launched by the sender on
a rising edge is therefore stable for the whole time the bank is open.

**Back end (clock `clk_rx`, the switch clock).** A counter selects the bank to
show on the 3x1 mux. That counter advances only when the switch takes the
flit (`pop_i`).

**Telling a full bank from an empty one.** Both counters stall with the flow
control, so the front end is not a fixed number of banks ahead of the back
end. Each bank therefore stores, next to the flit, the lap parity of the front
end: the parity flips each time the ring wraps around. The back end keeps its
own lap parity. A bank holds an unread flit when its stored parity equals the
one the reader expects for it:

* the current lap for the bank under the read pointer and the banks after it;
* the next lap for the banks before it.

No per-bank flag is cleared across the clock boundary.

**Backward flow control.** `stall_o` is one flop on `clk_tx`, the small
single-bit synchronizer of the stall signal. It samples "all three banks
hold unread flits". A flit written in a cycle marks its bank full while the
bank is open. The stall flop sees that on the next rising `clk_tx` edge. So
the cycle after the third bank fills is already stalled, and no bank is
overwritten. Reading at full rate never fills all three banks, so the link
carries one flit per cycle at every phase offset.

**Reset and bootstrap.** `rst_rx` resets both counters to bank 0 and clears the
lap tags. It is asynchronous in both domains. Release it away from the
`clk_tx` edges. One reset state serves every phase offset. Because the
pointers follow the flow control, no phase-dependent offset between front end
and back end is needed.

**What RTL simulation can and cannot show.** The safety of a latch
synchronizer rests on timing. The reader must sample a bank only while it is
stable (the "mux window"), and that depends on the phase offset. The original
analysis reports positive setup and hold margins over almost the full range of
offsets. With arbiter and crossbar delay in the path, the tightly coupled port
stops working beyond about -95% of the period. Zero-delay RTL cannot reproduce
this. The testbench checks the logic at six phase offsets; the margins have to
be checked in static timing analysis.

## The IP-core port: token-ring dual-clock FIFO

`dc_fifo` holds `DEPTH` = 6 flip-flop slots.

* **Pointers.** The writer's one-hot token ring moves on `clk_tx` for each
  enqueued flit (`valid_i & ~stall_o`). Only the addressed slot is written, so
  the buffer is not clocked when no valid data arrives. The reader's token
  ring moves on `clk_rx` for each dequeued flit (`pop_i & valid_o`) and drives
  a 6-to-1 one-hot mux.
* **Status detection.** Full and empty come from comparing the two rings
  directly, without synchronizing the pointers:
  * `empty_tmp`: the read token sits on the write token.
  * `full_tmp`: the write token sits one slot behind the read token. One slot
    stays free, so 5 flits fit.
* **Synchronizers.** `empty_tmp` can only rise through a read, which is already
  in the `clk_rx` domain. It can only fall through a write. `full_tmp` behaves
  the other way round. Each flag therefore goes through two "brute-force"
  flops of its own domain, and the raw flag sets them asynchronously:
  * a flag asserts at once;
  * it deasserts after two edges of the reading domain's clock.
* **Timing, checked by the testbench:**
  * A flit written into an empty FIFO shows at `valid_o` right after the
    second `clk_rx` edge that follows the write. That is the clock offset plus
    two receiver cycles.
  * A full FIFO read at full rate delivers its last flit `DEPTH-2` = 4 cycles
    after its first.

The full synchronizer already uses its asynchronous input for `full_tmp`, so
`rst` clears it synchronously. Hold `rst` for at least one `clk_tx` edge.
Verilator notes that `rst` is used both ways, which is intended.

## Switch core: flits, routing, arbitration, output buffers

**Flit** (`noc_pkg::flit_t`, 34 bits): `head`, `tail` and a 32-bit payload. A
one-flit packet sets both head and tail.

**Routing** is source routing. The lowest 2 payload bits of a head flit name
the output port. The switch shifts the head payload right by 2 as the flit
crosses the crossbar, so the next switch finds its own port number in the
lowest bits. Each input keeps the route of its current packet for the body
flits.

**Arbitration** (`rr_arbiter`, one per output). Among the inputs whose current
flit heads for this output, the arbiter grants the first one at or after a
rotating priority pointer. The grant is combinational. Once a head flit
passes, the grant is locked to that input until its tail flit passes, so
packets never interleave. The pointer then moves past the winner.

**Crossbar** (`crossbar`). One AND-OR mux per output, selected by the transfer
matrix: grant, request and output buffer not full.

**Output buffers** (`out_buffer`). A 6-flit FIFO per output. A flit leaves
when `out_valid = 1` and `out_stall = 0`. `clk_sw` is the strobe that travels
with the output data to the next switch's `meso_sync`.

## Link protocol and timing summary

| Link | Transfer rule | Stall reaction | Throughput |
|---|---|---|---|
| mesochronous input | rising `in_clk[i]` edge with valid = 1, stall = 0 | `in_stall` rises the cycle after the third bank fills | 1 flit/cycle at any phase |
| IP-core input | rising `in_clk[0]` edge with valid = 1, stall = 0 | `in_stall` rises at once when 5 flits are stored; falls 2 `in_clk[0]` edges after a read | limited by the slower clock |
| output | rising `clk_sw` edge with `out_valid` = 1, `out_stall` = 0 | buffer holds 6 flits | 1 flit/cycle |

Latency through the switch:

* a flit becomes visible at a mesochronous synchronizer's mux from the falling
  `in_clk` edge of the cycle it is sent in;
* it is written into the output buffer on the next `clk_sw` edge, if it wins
  arbitration;
* it is at `out_flit` one cycle after that.

## Parameters

| Module | Parameter | Default | Origin |
|---|---|---|---|
| `gals_switch_top` | `N_PORTS` | 4 | four input and four output buffers, as in the published switch drawings |
| `gals_switch_top`, `meso_sync` | `NSLOTS` | 3 | three latch banks, published |
| `gals_switch_top`, `dc_fifo` | `DC_DEPTH` / `DEPTH` | 6 | 6-slot integrated FIFO, published |
| `gals_switch_top`, `out_buffer` | `OUTBUF_DEPTH` / `DEPTH` | 6 | 6-flit output buffers of the base switch, published |
| `gals_switch_top` | `DC_PORTS` | `4'b0001` | which inputs use a dual-clock FIFO (bit set) or a mesochronous synchronizer (bit clear); this RTL's choice |
| `noc_pkg` | `PAYLOAD_W` | 32 | width of the data words in the published waveforms |

`meso_sync` needs `NSLOTS >= 2`, and `dc_fifo` needs `DEPTH >= 2`.

## Departures from the published architecture, and choices of this RTL

* **Port mix.** The published work evaluates a mesochronous switch and a
  dual-clock switch separately. Here one switch carries both: port 0 is the
  IP-core link, ports 1..3 are mesochronous. This follows the intended use,
  with dual-clock FIFOs only at the network boundary. Which port faces the
  core is a choice of this RTL. `DC_PORTS` moves or adds dual-clock ports.
* **Output buffer size.** The output buffers keep the base switch's 6 flits.
  The published dual-clock variant shrinks them to 2 so that the integrated
  6-slot FIFO costs no extra buffering. Set `DC_PORTS = 4'b1111` and
  `OUTBUF_DEPTH = 2` for that variant.
* **Three latch banks with stall/go.** For a synchronizer that feeds a
  conventional input flop, the published analysis asks for at least 4 buffer
  slots to keep stall/go working. In the tightly coupled port there is no
  such flop, and the stall is one flop computed from the bank tags. With that,
  three banks give full throughput and never overflow in simulation.
* **Designed here, not published.** The published material does not describe
  the following, so they were designed for this RTL:
  * the lap-parity tags in the latch banks;
  * the stall rule ("all banks full");
  * the latch phase (open while `clk_tx` is low);
  * the reset scheme;
  * the flit format and source routing;
  * the round-robin policy;
  * the one sacrificed FIFO slot;
  * the set-on-assert form of the brute-force synchronizers.
* **Figure detail not reproduced.** The dual-clock port drawing shows a gate
  and a flop between the synchronized empty flag and the arbiter. Their
  function is not stated. Here `valid_o` is the synchronized not-empty flag,
  and the switch gates the read with its own transfer condition.
* **Outside the scope of RTL:**
  * the hierarchical clock tree that makes the mesochronous domain possible;
  * the IP cores;
  * the area, power and skew-margin figures.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it establishes |
|---|---|
| `tb_meso_sync` | At six phase offsets (0 to 93% of the period): full rate of 100 flits in 100 cycles with no stall; random traffic against a slow reader, which forces the stall; in-order, loss-free delivery. |
| `tb_dc_fifo` | Three clock ratios. Capacity of 5. Drain of the full FIFO in consecutive cycles, last flit 4 cycles after the first. Empty deassertion after exactly 2 receiver edges. Random traffic, in order. |
| `tb_rr_arbiter` | The grant matches a reference model every cycle. Strict rotation under full load. Lock held across packets. |
| `tb_crossbar` | Random select patterns against expected outputs. |
| `tb_out_buffer` | Capacity of 6. One-cycle latency. Full-rate drain. Random push and stall, in order. |
| `tb_gals_switch_top` | The whole switch at default parameters, with three mesochronous phases and an unrelated IP-core clock. Random packets under light, heavy and no downstream stall. Checks delivery per input/output pair, no packet interleaving, and route shifting. Counts that each mechanism happened: mesochronous stall, FIFO full, downstream stall, output buffer full, contention, lock with a waiting input. |
| `tb_switch_traffic` | Idle, random and parallel (input i to output i+1) traffic. Parallel reaches 1000 flits per 1000 cycles on every output. |
| `tb_switch_dc_variant` | The all-dual-clock switch (`DC_PORTS = 4'b1111`, `OUTBUF_DEPTH = 2`) with four unrelated sender clocks. Same checks as the end-to-end test. |
| `tb_switch_chain` | Two switches joined by a mesochronous link, clocks 3.7 ns apart. An output buffer of one switch is the sender on the other's latch synchronizer. Checks two-hop source routes, in-order delivery, and back-pressure across the link. |

Each testbench was also run against a deliberately broken copy of its module,
and each reported failures.

The RTL also carries concurrent assertions, active in simulation with
assertions enabled:

* `meso_sync`: no flit is written into a bank that still holds an unread flit.
* `dc_fifo`: no write into a full FIFO and no read from an empty one.
* switch: no output buffer overflow, one-hot grants, and each input sends to
  at most one output per cycle.

Limits:

* The simulator has two states and zero delay. Metastability, the mux window
  and glitches on the asynchronous flag inputs are not modelled.
* The latch-based and asynchronous-set structures are intentional. Synthesis
  reports the banks as latches, 105 latch bits per mesochronous port.

## Simulating

All files are SystemVerilog-2017. The package `noc_pkg` must be read first.
For example, with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -y rtl +libext+.sv rtl/noc_pkg.sv tb/tb_gals_switch_top.sv \
    --top-module tb_gals_switch_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another test. The testbenches use
`$urandom`, so a different seed (`+verilator+seed+N`) gives different
traffic.

## Files

| File | Content |
|---|---|
| `rtl/noc_pkg.sv` | flit type and widths |
| `rtl/meso_sync.sv` | mesochronous latch synchronizer / input buffer |
| `rtl/dc_fifo.sv` | dual-clock token-ring FIFO / input buffer |
| `rtl/rr_arbiter.sv` | per-output round-robin arbiter with packet lock |
| `rtl/crossbar.sv` | crossbar |
| `rtl/out_buffer.sv` | output buffer FIFO |
| `rtl/gals_switch_top.sv` | the switch |
| `tb/*.sv` | testbenches listed above |
