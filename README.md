# Reconfigurable dataflow overlay for database queries

A query such as TPC-H Q6 can be written as a small dataflow graph. Each node
is a simple streaming operator: compare, and, filter, multiply, sum. This
design is a coarse-grained *overlay* for an FPGA that runs such graphs:

- a fixed grid of tiles, joined to their four neighbours by 128-bit streams;
- DMA engines at the edges of the grid, which stream table columns in from
  memory and results back out;
- a small packet network that the host uses to set up all of it.

Each tile holds one operator (a *primitive*) and two crossbars. The crossbars
decide where the tile's inputs come from and where its outputs go. Changing
the query only means rewriting registers: which primitive each tile runs,
how the crossbars are set, and the bounds of the comparisons. The tile
fabric itself stays the same.

The overlay follows a published template for runtime-reconfigurable FPGA
overlays and its database prototype. The prototype has:

- 11 × 4 tiles in a 4-neighbour grid;
- four stream inputs and two stream outputs per compute unit;
- 128-bit streams carrying four 32-bit values;
- eleven DMA engines;
- 512-bit memory ports;
- a 250 MHz clock.

Those are the defaults here. The prototype loads each tile's operator by
dynamic partial reconfiguration. This RTL replaces that with a register that
selects one of a fixed set of primitives. See "Departures" below.

## The grid and its streams

`overlay_top` builds `ROWS × COLS` tiles (4 × 11). Row 0 is the bottom row
and column 0 the west edge.

Every stream is valid/ready with an AXI-stream-like payload of type `beat_t`:

- 128 data bits in four lanes;
- a keep bit per lane;
- a `last` flag.

Between two neighbouring tiles runs one stream in each direction. At the
edge of the grid there are two cases:

| Edge position | Connected to |
|---|---|
| West of row r | DMA r |
| East of row r | DMA 4+r |
| South of columns 1–3 | DMA 8, 9, 10 |
| Any other edge port | Nothing. Its input never carries data and its output is never ready. |

A DMA engine has one stream into the grid and one stream back out. The
memory side of each DMA engine is brought out as a reduced AXI4 port. These
ports are packed arrays indexed by DMA number, with MEM_W = 512 data bits.
The memory controllers and the interconnect behind them are not part of this
RTL.

## Inside a tile (`overlay_tile`)

```
 N,E,S,W in ─► input crossbar ─► 4 buffers ─► compute unit ─► 2 buffers ─► output crossbar ─► N,E,S,W out
                  (insel)                    (kernel, cfg)                     (outsel)
                                       ▲ reset controller
 network ◄──► router ◄──► tile_ctrl (registers, results, errors)
```

**Crossbars.** The input crossbar (`axis_xbar`, 4 directions → 4 CU inputs)
and the output crossbar (2 CU outputs → 4 directions) are plain
combinational multiplexers. Each output names one source or none. A source
feeds at most one output: if two outputs name the same source, only the
lower-numbered one gets it. A stream is duplicated with the COPY primitive,
never by the crossbar.

**Buffers.** Each buffer is an `axis_fifo` of depth 2, a full-rate register
slice. The buffers cut every combinational path through the tile, so long
routes across the grid do not form long timing paths.

**Reset controller.** `tile_rst_ctrl` holds the compute unit in reset for 16
cycles after a reset command. During that time the tile blocks every stream
handshake into and out of the CU. Upstream data waits; it is not lost.

**Compute unit.** `compute_unit` contains the primitives and routes its
ports to the one named by the 4-bit `kernel` register:

| id | kernel | ports | cfg |
|---|---|---|---|
| 0 | FIFO (unused tile, default) | in0 → out0 | – |
| 1 | dual FIFO | in0 → out0, in1 → out1, 32 beats each | – |
| 2 | COPY | in0 → out0 and out1 | – |
| 3 | cmp range | in0 values → out0 mask | cfg0 = lo, cfg1 = hi, cfg2[0] = hi inclusive |
| 4 | and | in0 mask & in1 mask → out0 | – |
| 5 | filter | in0 data, in1 mask → out0 selected values | – |
| 6 | mul | in0 × in1 lane by lane (low 32 bits) → out0 | – |
| 7 | reduce add | in0 → 64-bit sum, sent to the host | – |
| 8 | count | in0 → number of valid values, sent to the host | – |

All values are signed 32-bit integers. Every primitive takes one beat per
cycle and adds one cycle of latency.

## Mask streams: the part to understand first

Comparisons do not produce one flag per value on a 4-lane stream. They pack
their results into **mask beats of 128 bits**:

- Bit i of a mask beat belongs to the i-th value since the previous mask beat.
- A mask beat is sent after 128 values, or early with the value stream's
  final beat.
- The keep bits of a mask beat mark the 32-bit words that hold valid bits.

A stream of n values therefore gives n/128 mask beats. This matches the
n/w stream rates of the prototype's query graph.

Consequences:

- **and** works on mask beats, one pair at a time.
- **filter** pairs one mask beat with the next 32 data beats. It releases
  the selected values packed four to a beat. The last beat of a stream
  carries the remainder: keep marks its valid lanes, and it may have no
  valid lanes at all.
- A data stream that waits at a filter for its mask must be buffered for at
  least 32 beats. It also has to cover the latency of the compare/and chain.
  This is what the dual-FIFO support tiles are for. In the Q6 placement
  below, four FIFO tiles in a row hold more than 128 beats.
- Two filters fed by the same mask (discount and extended price in Q6) emit
  beats with identical keep patterns. That is why **mul** can join them beat
  by beat.

## The command/status network

The network carries 32-bit flits with a `last` flag. Every packet starts
with a header word:

```
 31      22 21      12 11  8 7     0
 [  dst   ] [  src   ] [cmd] [regn ]     dst/src = {kind(2), row(4), col(4)}
```

The address `kind` is tile, DMA or host. For a DMA, `col` is its index.

| cmd | name | payload | meaning |
|---|---|---|---|
| 1 | WRITE | 1 word | write register `regn` |
| 2 | RESET | 1 word (ignored) | reset the tile's CU |
| 3 | READ | 1 word (ignored) | tile answers STATUS with the register value |
| 4 | RESULT | 2 words, low first | 64-bit result of reduce add / count |
| 5 | STATUS | 1 word | read answer, or DMA completion |
| 6 | ERROR | 1 word: 1 bad command, 2 bad register, 3 missing payload | answer to a bad packet |

Tile registers:

| Register | Address | Contents |
|---|---|---|
| INSEL k | 0x00–0x03 | direction feeding CU input k: 0 N, 1 E, 2 S, 3 W, 4 none |
| OUTSEL d | 0x04–0x07 | CU output feeding direction d: 0, 1, or 2 for none |
| KERNEL | 0x08 | primitive id |
| CFG | 0x10–0x13 | CU configuration words |

DMA registers:

| Register | Address | Contents |
|---|---|---|
| RADDR | 0 | read address, in bytes |
| RLEN | 1 | read length, in 128-bit beats |
| WADDR | 2 | write address, in bytes |
| CTRL | 3 | bit 0 starts a read, bit 1 arms a write |

**Routing.** The network is a tree built from `noc_router`. The root sits at
the host port. Its child 0 is tile (0,0) and its child 1 is a chain through
DMA 0 … 10. Tile routers forward packets east along row 0 and north up each
column, so a packet to tile (r,c) goes east along the bottom row to column c,
then north to row r.

Each router has these properties:

- It has a 2-entry buffer per output.
- It keeps a packet together on a link.
- It merges upward traffic by round-robin over whole packets.
- It drops packets whose destination does not exist.

## DMA engines (`dma_engine`)

**Read (memory to stream).** The engine splits a read into bursts of up to
16 memory words. It issues a burst only when its 64-word receive FIFO has
room for all of it, so a stalled consumer in the grid never stalls the
memory. A downsizer (`axis_width_conv`, 512 → 128) turns each memory word
into four stream beats. Exactly RLEN beats leave; the last one has
`last = 1`, and the padding of the final memory word is dropped. Reads
always have full keep, so a column must hold a multiple of four values.

**Write (stream to memory).** An upsizer packs 128-bit beats into 512-bit
words. Each word is written with its own single-beat request, with byte
strobes taken from keep. The write ends with the beat that has `last = 1`,
once every response is back.

**Completion.** Each finished transfer sends a STATUS packet to the host:

- `regn` is 0 for a read and 1 for a write;
- the payload is the number of beats.

## Example: TPC-H Q6 on the grid

`tb/tb_overlay_top.sv` sets up Q6 the way the prototype places it: 11 compute
tiles plus 4 FIFO tiles, fed by four DMA engines. The sum
`Σ extendedprice × discount` leaves tile (2,3) as a RESULT packet.

```
 row 3   FIFO ─► FIFO ─► FIFO
          ▲               │
 row 2   COPY ─► cmp     FIFO          sum  ──► RESULT packet
        (DMA2)   disc │   │             ▲
 row 1   cmp  ─► and  │  filter(disc) ─► mul
        (DMA1)  date  ▼   ▲             ▲
 row 0   cmp  ─► and ─► COPY  ─►      filter(price)
        (DMA0)  qty                     ▲ DMA10
         col 0   col 1   col 2          col 3
```

The table rows are: DMA 0 quantity, DMA 1 shipdate (day number), DMA 2
discount (in hundredths), DMA 10 extended price.

## Departures from the original design, and limits

- **No partial reconfiguration.** The prototype swaps the compute unit's
  logic at run time; each tile's partition holds one primitive. Here every
  compute unit holds all the primitives listed above. Writing KERNEL and then
  sending RESET takes the place of loading a partial bitstream. A compute
  unit is therefore larger than a real reconfigurable partition, and the
  reconfiguration time is not modelled.
- **Primitive set.** Only the primitives of Q6, plus count and FIFO, exist.
  The prototype names 31 primitives for TPC-H, but the others are not
  specified, including the data-parallel ordered aggregation needed for Q1.
  Query 1 cannot run on this RTL, even though its 31–32 tiles and up to 11
  DMA streams fit the grid.
- **Own choices.** These are all this design's own: the encoding of the mask
  stream, the packet format, the register maps, the error codes, the
  network's tree shape, the routing, and all buffer depths.
- **DMA engines.** These stand in for vendor DMA cores. Their register
  interface is this design's own.
- **DMA placement.** The west-side and south-side DMA positions follow the
  prototype's floorplan. The east-side positions of DMA 4–7 are a choice.
- **Not included.**
  - The optional memory-mapped port of a tile.
  - The PCIe host link.
  - The memory controllers.
  - Any floorplanning.
- **Clock.** The RTL has no timing constraints; the 250 MHz target is not
  checked.

## Files

| File | Contents |
|---|---|
| `rtl/overlay_pkg.sv` | types, constants, register maps, routing function |
| `rtl/axis_fifo.sv`, `rtl/axis_xbar.sv`, `rtl/axis_width_conv.sv` | stream building blocks |
| `rtl/prim_*.sv`, `rtl/compute_unit.sv` | primitives and the compute unit |
| `rtl/noc_router.sv`, `rtl/tile_ctrl.sv`, `rtl/tile_rst_ctrl.sv` | network router, tile endpoint, reset controller |
| `rtl/overlay_tile.sv`, `rtl/dma_engine.sv`, `rtl/overlay_top.sv` | tile, DMA engine, full overlay |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_overlay_top.sv`, `tb/tb_overlay_ipr.sv` | full-overlay tests: Q6 with mode switch, parallel reduce on all DMA engines |
| `tb/tb_mem_model.sv` | behavioural memory with random read stalls |
| `tb/tb_src.sv`, `tb/tb_snk.sv` | stream driver and checker helpers |

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Each also has a watchdog that stops a hung
simulation.

To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/overlay_pkg.sv tb/tb_overlay_top.sv --top-module tb_overlay_top -Mdir obj
./obj/Vtb_overlay_top +verilator+rand+reset+2
```

`tb_overlay_top` runs the whole overlay at its default size, with no
parameter overrides, on 1000 generated rows. Its four phases are:

1. Q6. The result is checked against a sum computed in the testbench.
2. A kernel switch with a CU reset. The final tile becomes *count*, with a
   changed quantity bound, and the row count is checked.
3. A loop-back copy through DMA 0. This exercises both width converters and
   a partial final memory word.
4. Error packets from a tile and from a DMA engine.

It counts stream stalls, host backpressure, kernel switches, CU resets,
width conversions, error packets and network results, and fails if any of
them never happened. Building it takes a few minutes; the run itself takes
seconds.

`tb_overlay_ipr` is the memory-path test: all eleven DMA engines stream 2048
beats each into the tile beside them, which runs reduce add. Each sum is
checked. With a memory that never stalls, every stream must move one beat
per clock cycle from its first beat to its last, and it does.

The unit testbenches drive their block with random stalls and compare
against models in the testbench. Random stalls come from `$urandom`.
Everything the design reads is reset, because the simulator starts every
variable at a random value.
