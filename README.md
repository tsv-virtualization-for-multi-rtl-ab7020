# TSV-Hub: sharing one TSV array among several AXI links

Through-silicon vias (TSVs) are the vertical wires of a 3D chip stack. They are
large and each one costs yield. Carrying an on-chip interconnect straight through
the stack costs one TSV per wire: a 32-bit AXI link has 195 wires. Two links
need 390 TSVs.

The TSV-Hub trades wires for clock rate. The TSV array runs on a fast, synchronous
TSV clock, four times the interconnect clock (1.6 GHz against 400 MHz in the
reference setup). Every interconnect channel that crosses the stack becomes a
*virtual link* (VLink). The sender cuts each VLink word into narrow *flits* and
time-multiplexes the flits of all VLinks onto one shared array. The receiver
rebuilds the words on the other layer. A hub for two 32-bit AXI links here
uses:

- 21 data TSVs downstream (layer 1 to layer 2)
- 20 data TSVs upstream
- 12 control TSVs
- one clock TSV

With long bursts the hub still moves about 96–100 % of the beats a direct
connection would move.

This repository holds synthesizable SystemVerilog for such a hub. The top module
is `axi_tsv_hub`. It is built from generic VLink parts that can carry other
protocols too.

## Layers of the hub

The hub has three layers, from the silicon up:

- **TSV layer.** The physical arrays: `ND` data TSVs per direction, a few
  control TSVs, and the clock TSV. They have no logic. In the RTL they are
  port pairs (`*_o` drives a TSV, `*_i` receives one). The 3D integration, or
  the testbench, joins each pair with a wire.
- **VLink layer.** Per VLink there are two terminations: a sender
  (`vlink_tx`) and a receiver (`vlink_rx`). Per array and direction there is
  one multiplexer with an arbiter (`vlink_mux_tx`, `tdma_arbiter`) and one
  demultiplexer with a credit returner (`vlink_demux_rx`).
- **Interconnect layer.** Adapts a protocol to VLinks. For AXI this layer is
  only wiring, because each AXI channel already has its own valid/ready
  handshake. Each channel becomes one VLink, and its VALID/READY become the
  VLink handshake.

## Serialization: words, flits and the TSV cycle

A VLink of width `m` on an array of `nd` data TSVs sends every word as
`NF = ceil(m / nd)` flits. Flit `j` carries word bits `[j*nd +: nd]`. The
unused top bits of the last flit are zero. There is no crossbar that packs
words across flit boundaries. The last flit of a word may therefore be partly
empty, and a VLink costs `ceil(m/nd)` TSV cycles per word, not `m/nd`.

| AXI channel    | VLink width (32-bit data) | TSV array     | flits per word | termination        |
|----------------|---------------------------|---------------|----------------|--------------------|
| write address  | 55                        | down, 21 TSVs | 3              | handshake register |
| write data     | 42 (DATA_W + 10)          | down, 21 TSVs | 2              | 4-word FIFO        |
| read address   | 49                        | down, 21 TSVs | 3              | handshake register |
| read data      | 40 (DATA_W + 8)           | up, 20 TSVs   | 2              | 4-word FIFO        |
| write response | 9                         | up, 20 TSVs   | 1              | handshake register |

The channel widths and the FIFO/register split come from the reference design.

- Data channels need FIFOs to stream one beat per cycle.
- Address channels and the write response get a one-word register with a
  handshake. This is cheap, and in long bursts the delay is hidden.

The payload is carried bit-exact and opaque. The master and slave on either side
agree on the field layout. The hub does not look inside.

VLink numbering inside the top, for link `l`:

- downstream: `3l+0` AW, `3l+1` W, `3l+2` AR
- upstream: `2l+0` R, `2l+1` B

## Control TSVs: tags and credits

Each array direction carries, next to the data TSVs:

- a **flit tag** of `clog2(K+1)` TSVs. `0` means the data TSVs are idle;
  `v+1` means they carry a flit of VLink `v`. The receiver counts the flits of
  each VLink itself, so no start or end marker is needed.
- in the opposite direction, a **credit tag** with the same encoding. `v+1`
  returns one word of buffer space to VLink `v`.

Flow control works by credits:

- A sender starts with as many credits as its receiver holds words: 4 for a
  FIFO VLink, 1 for a register VLink.
- A sender starts a word only when it holds a credit.
- Each word the receiving interconnect side takes frees one credit. The
  receiver sends credits back one per TSV cycle, picking VLinks round-robin.
- Because buffer space is reserved before the first flit leaves, no flit is
  ever dropped or stalled on the TSVs.
- An assertion in `vlink_rx` checks that this holds.

At the defaults there are 6 downstream and 4 upstream VLinks. That gives
3-bit tags, so 3 + 3 control TSVs per array and 12 in total.

## Crossing clock domains

The TSV clock and every interconnect clock are assumed to come from one source
(*mesochronous*): same frequency or a fixed ratio, with an unknown but fixed
phase. Each termination crosses between its interconnect clock `clk_ic` and
`clk_tsv`:

- **`meso_fifo`**: dual-clock FIFO with Gray-coded read and write pointers.
  Each pointer passes through `SYNC` flip-flops into the other domain. A
  `w_freed` pulse per freed slot is the credit source.
- **`meso_reg_hs`**: one data register with a toggle request/acknowledge
  handshake. Each toggle passes through `SYNC` flip-flops.

`SYNC` is 1 by default. Because the phase is fixed, static timing analysis can
guarantee that a single retiming stage settles. The short delay matters:

- A credit loop runs through two synchronizers: the data goes forward and the
  freed slot comes back.
- The 4-word FIFOs stream at full rate only if that round trip fits in 4
  words.
- With `SYNC = 2`, the burst-32 throughput of the reference hub falls to
  0.79 write and 0.80 read. With `SYNC = 1` it is 0.96 and 1.00.

Use `SYNC = 2` (or more) where the clocks really are unrelated. That is the
*asynchronous* FIFO and register flavour; at full rate it needs deeper FIFOs.

`SYNC = 0` removes the retiming stages. Each side then uses the other side's
pointer or toggle directly. This is the *synchronous/ratiochronous* flavour.
It is only safe when every interconnect clock edge coincides with a TSV clock
edge (one clock, or an integer ratio from one source), so that static timing
covers each crossing path in one period of the faster clock. It shortens the
address handshake: single transfers rise from 0.25 to 0.33 beats per cycle.

## Sharing the TSV cycles: TDMA and dynamic TDMA

`tdma_arbiter` grants each TSV cycle to at most one VLink.

- **Fixed slots.** A round may start with `NFIXED` fixed TDMA slots. Slot `s`
  belongs to VLink `FIXED_OWNER[s]`. A fixed slot gives that VLink a
  guaranteed share of the bandwidth. It is wasted if the owner has nothing to
  send.
- **Dynamic slots (dTDMA).** The arbiter samples which VLinks have data, then
  gives each of them one slot in index order. So the round grows and shrinks
  with the number of busy VLinks.
- **No fixed slots (the default).** The dynamic part restarts as soon as it
  runs out. No TSV cycle is lost while anyone is waiting.

The grant is combinational. The chosen flit and its tag leave through a
register on `clk_tsv`, and the receiver registers them again on arrival.

## Top-level interface (`axi_tsv_hub`)

Parameters and defaults:

| parameter                          | default | meaning                                                   |
|------------------------------------|---------|-----------------------------------------------------------|
| `NLINK`                            | 2       | independent AXI links                                     |
| `DATA_W`                           | 32      | AXI data width (64 also supported)                        |
| `ND_DN`, `ND_UP`                   | 21, 20  | data TSVs per direction                                   |
| `FIFO_DEPTH`                       | 4       | words per data-channel FIFO                               |
| `SYNC`                             | 1       | synchronizer stages (1 mesochronous, 2+ asynchronous, 0 synchronous/ratiochronous) |
| `DN_NFIXED`, `DN_FIXED_OWNER`      | 0, 0    | fixed TDMA slots of the downstream array and their owners |
| `UP_NFIXED`, `UP_FIXED_OWNER`      | 0, 0    | the same for the upstream array                           |

Ports, per link `l`:

- `s_*`: the AXI channels of the layer-1 master side.
- `m_*`: the channels delivered to the layer-2 slave side.
- Each channel has `valid`, `ready` and `payload`.
- Clocks: `clk_ic1[l]` and `clk_ic2[l]` are the interconnect clocks on the two
  layers; `clk_tsv` is the TSV clock.
- Resets: each clock has an asynchronous, active-low reset.
- TSV terminals: `dn_tsv_data_*`, `dn_tsv_tag_*`, `dn_cr_tag_*`, and the
  `up_*` equivalents.

## Measured behaviour

`tb_axi_tsv_hub_full` runs the default hub with one AXI master model and one
memory slave model per link. Both links first write 256 beats, then read them
back. Throughput is data beats per interconnect cycle and link, where 1.0 is
what a direct AXI connection achieves:

| burst length | write (downstream) | read (upstream) | downstream flit bound `4N/(2(3+2N))` |
|--------------|--------------------|-----------------|--------------------------------------|
| 1            | 0.250              | 0.251           | 0.40                                 |
| 2            | 0.501              | 0.502           | 0.57                                 |
| 4            | 0.732              | 1.000           | 0.73                                 |
| 32           | 0.964              | 1.000           | 0.96                                 |

How to read the table:

- **Long bursts** are limited by the TSV array.
- **Single and double transfers** are limited by the address handshake
  registers. One address crosses per 4 interconnect cycles: request, retiming,
  acknowledge, retiming. This is the single-transfer weakness of register
  terminations on address channels.
- **Other compositions and TSV counts.** `tb_axi_tsv_hub_sweep` runs the
  same workload on other configurations. The flit bound is worked out from the
  widths alone. At 32-beat bursts:

| configuration                         | write | read  | downstream flit bound |
|---------------------------------------|-------|-------|-----------------------|
| 1 x 32-bit, 21/20 TSVs                | 1.000 | 1.000 | 1.00                  |
| 2 x 32-bit, 42/40 TSVs                | 1.000 | 1.000 | 1.00                  |
| 1 x 64-bit, 21/20 TSVs                | 0.981 | 1.000 | 0.98                  |
| 2 x 64-bit, 21/20 TSVs                | 0.491 | 0.502 | 0.49                  |
| 2 x 64-bit, 37/37 TSVs                | 0.975 | 1.000 | 0.97                  |
| 2 x 32-bit, 21/20 TSVs, `SYNC = 2`    | 0.793 | 0.803 | 0.96                  |
| 2 x 32-bit, 21/20 TSVs, `SYNC = 0`    | 0.966 | 1.000 | 0.96                  |

  Two 64-bit links keep about 97 % of their throughput on 37 data TSVs, and
  two 32-bit links reach full throughput at 42/40. The last two rows show the
  cost of two-stage synchronizers with the same 4-word FIFOs, and the
  synchronous/ratiochronous variant with aligned clocks. Measured values can sit a
  little above the bound because each link's window runs from its own first
  beat to its own last beat.

## Module map

| file                   | role                                                                         |
|------------------------|------------------------------------------------------------------------------|
| `rtl/tsvhub_pkg.sv`    | AXI channel widths, flit-count and tag-width functions                       |
| `rtl/meso_fifo.sv`     | Gray-pointer dual-clock FIFO with a freed-slot output                        |
| `rtl/meso_reg_hs.sv`   | one-word toggle-handshake register across clocks                             |
| `rtl/vlink_tx.sv`      | sending termination: clock crossing, serializer, credit counter              |
| `rtl/vlink_rx.sv`      | receiving termination: deserializer, clock crossing, credit source           |
| `rtl/tdma_arbiter.sv`  | fixed and dynamic TDMA slot assignment                                       |
| `rtl/vlink_mux_tx.sv`  | K senders + arbiter + multiplexer onto the data/tag TSVs                     |
| `rtl/vlink_demux_rx.sv`| TSV capture, tag demultiplexer, K receivers, credit returner                 |
| `rtl/axi_tsv_hub.sv`   | two arrays, four halves, AXI channels wired to VLinks                        |

Each file begins with a description of its function, timing, and which parts
are this implementation's own choices.

## Where this implementation makes its own choices

The reference description fixes the following:

- the layering
- the VLink concept
- the serializer without a crossbar
- the channel widths
- the FIFO/register split per channel
- the 4-word FIFOs
- the TSV counts
- the clock ratio
- the combination of fixed TDMA and dynamic TDMA

It does not fix the following, so they were chosen here:

- **Control TSV protocol.** Flit tag plus credit tag, `clog2(K+1)` TSVs each.
  The reference design quotes 47 TSVs in total for two 32-bit links. This hub
  uses 54: 41 data, 12 control, 1 clock. A tighter control encoding could
  close the gap, for example credits multiplexed with tags, or fewer credit
  bits.
- **Synchronizer circuits.** Gray-pointer FIFO and toggle handshake, with a
  single retiming stage by default. A dedicated mesochronous synchronizer, for
  example with a phase detector and a selectable delay, may be smaller. It
  would have the same interface.
- **Arbitration order and default schedule.** The default uses dynamic slots
  only. Fixed slots are available through parameters.
- **Payload layout inside each AXI channel.** Left to the attached IP.
- **Fill value of partly empty flits (zero) and reset (asynchronous,
  active-low, per clock domain).**

Not built:

- **Registers without a handshake.** This is the simplest synchronous
  termination flavour. The `SYNC = 0` register keeps its handshake.
- **The plain synchronizer between TSV clocks** used when hubs are chained
  through several layers.
- **The PLL for the TSV clock** and the TSVs themselves. These are analog and
  physical parts.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/tsvhub_pkg.sv tb/tb_axi_tsv_hub_full.sv --top-module tb_axi_tsv_hub_full
./obj_dir/Vtb_axi_tsv_hub_full
```

Replace the testbench name to run another one:

- `tb_meso_fifo`, `tb_meso_reg_hs`: the clock-crossing buffers at clock ratios
  1:4 and 4:1, with `SYNC = 2`. They check latency bounds, overflow
  protection, credit pulses and data order.
- `tb_vlink_tx`, `tb_vlink_rx`: the terminations against a model of the far
  end. They check flit contents, padding, and credit stalls and returns.
- `tb_tdma_arbiter`: a cycle-accurate reference model, guaranteed and equal
  shares, and that no cycle is idle while requests are pending.
- `tb_vlink_mux_tx`, `tb_vlink_demux_rx`: the array halves. They check
  interleaving and TSV utilisation.
- `tb_axi_tsv_hub`: the whole hub with fixed and dynamic downstream slots.
  Random traffic, full load and slow receivers run on all ten channels. It
  counts each mechanism: multi-flit words, interleaving, fixed and dynamic
  slots, contention, credit stalls, back-pressure, FIFO and register words.
  A mechanism that never occurs counts as a failure.
- `tb_axi_tsv_hub_full`: the default-size AXI burst workload above.
- `tb_axi_tsv_hub_sweep`: the same workload (`tb_hub_workload`) on the five
  configurations in the second table, including the `SYNC = 2` and
  `SYNC = 0` runs. It runs them side by side in one
  simulation.

`tb_chan_src` and `tb_chan_snk` are stream source and sink helpers used by
the testbenches.
