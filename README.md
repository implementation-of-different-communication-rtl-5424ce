# Grid of Processing Cells: neighbour links for a RISC-V tile array

A grid of processing cells puts many small processors on one chip and gives
each one a memory of its own, so the cores do not all compete for one shared
main memory. Each cell (tile) holds a RISC-V core and a 32 KiB scratchpad.
A tile can also load and store directly into the scratchpads of its grid
neighbours. A core reaches its own scratchpad without any bus. It reaches a
neighbour's scratchpad over a dedicated point-to-point TileLink link. It
reaches everything else over a shared SystemBus.

Two neighbours exchange a value with a ready/valid handshake. The flags of
that handshake can live in memory and be polled over the links (the software
handshake). They can also be 1-bit wires between the tiles, read and written
through four custom CSRs (the hardware handshake). This RTL has the wires.

This repository is the communication fabric of such a grid, in
SystemVerilog: scratchpads, arbiters, DTIM adapters, the data-side address
decode, link buffers, handshake CSRs, the SystemBus, and a W x H (x D) mesh or torus
that wires them up. The cores come from a RISC-V generator (Rocket) and are
not included. Each tile's core-facing ports are brought out at the top.

## Address maps

Every core sees the same **virtual** map. Its own scratchpad is always at
the bottom, and the windows of its neighbours follow, one 32 KiB window per
neighbour slot:

| Range                      | Target                         |
|----------------------------|--------------------------------|
| 0x8000_0000 - 0x8000_7FFF  | own scratchpad                 |
| 0x8000_8000 - 0x8000_FFFF  | neighbour slot 0 (north, y-1)  |
| 0x8001_0000 - 0x8001_7FFF  | neighbour slot 1 (east, x+1)   |
| 0x8001_8000 - 0x8001_FFFF  | neighbour slot 2 (south, y+1)  |
| 0x8002_0000 - 0x8002_7FFF  | neighbour slot 3 (west, x-1)   |
| anything else              | SystemBus                      |

So the same program works on every tile: "write to my east neighbour" is
always a store to 0x8001_xxxx.

On the SystemBus the scratchpads have **physical** addresses, tile by tile
with no gaps: tile `t` owns `0x8000_0000 + t*0x8000` to
`0x8000_0000 + (t+1)*0x8000 - 1`. Tiles are numbered row by row,
`t = y*W + x`, which is also the hart id. The host uses this map to load
programs and data and to read results.

The two maps overlap. A core cannot use the SystemBus to reach the physical
ranges of tiles 0 to 4, because its own virtual windows cover those
addresses. In a 3-D grid this covers tiles 0 to 6. The host is not affected.

## Inside a tile (`gpc_tile`)

```
  core data port ──► dcache_router ──┬─► tim_arbiter port 0 ─┐
                                     ├─► outgoing link n (TileLink) ──► neighbour
                                     └─► SystemBus client
  ICache link ──► dtim_adapter (virtual local) ─► arbiter port 1 ─┤
  SystemBus   ──► dtim_adapter (physical)      ─► arbiter port 2 ─┼─► scratchpad
  incoming link d ─► dtim_adapter (slot opp(d)) ─► arbiter port 3+d ┘
  core CSR port ──► handshake_csr ◄──► ready/valid wires to the neighbours
```

* **scratchpad**: 32 KiB, one port, 32-bit words with byte enables. A read
  returns its word one cycle after the access.
* **tim_arbiter**: fixed priority. The order is core, then the ICache
  adapter, then the SystemBus adapter, then the neighbour adapters by slot. A
  request that loses is held and stalled. While the core keeps accessing its
  scratchpad, a neighbour can starve. This is inherent to the priority
  scheme, and `tb_tim_arbiter` checks that it happens.
* **dcache_router**: this is what remains of the L1 data cache. It decodes
  the core's virtual address using the table above. A local access goes to
  the arbiter with `offset = addr - 0x8000_0000`. A neighbour access leaves
  on the link of its slot as a TileLink Get/Put. The address on that link
  is still the virtual one, because the receiving adapter maps it. All
  other addresses go to the SystemBus. A slot that has no neighbour, at the
  edge of a mesh, answers with `core_err` and causes no traffic. One access
  is in flight at a time.
* **dtim_adapter**: a TileLink-UL manager in front of the arbiter. It
  handles Get, PutFullData and PutPartialData. Each adapter subtracts its
  own `BASE` from the incoming address:
  - the ICache adapter uses the local virtual base;
  - the SystemBus adapter uses the tile's physical base;
  - the adapter for the neighbour in direction `d` uses the window of slot
    `opposite(d) = (d+2) mod 4`, since that is the slot under which the
    neighbour sees this tile.

  An address outside the adapter's window, or any other opcode, gets a D
  beat with `denied=1` and no memory access.
* **handshake_csr**: described below.

## Links, buffers, the torus and 3-D grids (`gpc_top`)

For every tile `t` and every slot `d` that has a neighbour `u`, there is one
link from `t`'s router to `u`'s incoming adapter `opposite(d)`. A
`tl_buffer` sits in the middle of each link. It is a two-entry FIFO on the A
channel and another on the D channel. It delays a beat by one cycle and cuts
every combinational path, valid, data and ready alike. Without it, chains of
tiles that point at each other could close combinational loops. A pair of
neighbours therefore has two links, one in each direction, as two tiles with
mutual scratchpad access need.

With `TORUS=1`, the edge tiles are also linked to the tiles on the opposite
edge, so every tile has all four neighbours. With `TORUS=0`, slots that
point off the grid are left open.

Setting `D` above 1 stacks `D` such layers into a W x H x D grid. The tiles
are numbered `t = (z*H + y)*W + x`. Every tile then has six slots, in the
order N, E, Up (z-1), S, W, Down (z+1). The order is chosen so that the
opposite of slot `d` is again `(d + NNEIGH/2) mod NNEIGH`, here
`(d+3) mod 6`. The virtual map grows to six neighbour windows, up to
0x8003_7FFF, and the handshake CSRs use bits 0 to 5. The 2-D slot numbers
do not carry over: south is slot 2 in 2-D but slot 3 in 3-D.

## The hardware handshake

Each tile has four CSRs. Bit `n` of each one belongs to neighbour slot `n`:

| CSR   | Name       | Access | Bit n                                  |
|-------|------------|--------|----------------------------------------|
| 0x400 | selfready  | RW     | drives the ready wire to neighbour n   |
| 0x401 | selfvalid  | RW     | drives the valid wire to neighbour n   |
| 0x402 | otherready | RO     | ready wire coming from neighbour n     |
| 0x403 | othervalid | RO     | valid wire coming from neighbour n     |

Tile `t`'s `selfvalid[d]` is wired straight to neighbour `u`'s
`othervalid[opposite(d)]`, and `u`'s `selfready[opposite(d)]` to `t`'s
`otherready[d]`. There are no registers on these wires. A CSR write at one
clock edge is visible in the neighbour's CSR from the next cycle on. The
access port does read, csrrw, csrrs and csrrc, and returns the old value.
This lets one instruction set or clear a single bit. The register width
allows up to 32 neighbour slots.

One transfer from sender A to receiver B runs like this. The data word
itself always travels over the TileLink link.

1. B sets `selfready` (A sees `otherready` = 1).
2. A waits for `otherready` = 1. It then writes the data word into B's
   mailbox through the neighbour window and sets `selfvalid`.
3. B waits for `othervalid` = 1, reads the data from its own scratchpad, and
   clears `selfready`.
4. A waits for `otherready` = 0 and clears `selfvalid`.
5. B waits for `othervalid` = 0. Both sides are done.

Where the data word sits is up to the software. The original protocol lets
the sender write it into its own scratchpad, and the receiver fetches it
over the link. The test core models here push it instead: the sender
writes over the link and the receiver reads locally. The fabric supports
both ways, and both take about the same number of link round trips.

The software handshake runs the same sequence, but the two flags are words
in the receiver's mailbox. The receiver polls them locally and the sender
polls them over the link. Every poll by the sender is then a round trip
through two buffers and an adapter, and the CSR wires remove that cost. In
the end-to-end tests, the behavioural cores finish the 4 x 4 systolic
multiplication in 745 cycles with the software handshake and 534 cycles
with the hardware one. For the other grid sizes:

| Grid  | Software handshake | Hardware handshake |
|-------|--------------------|--------------------|
| 2 x 2 | 253 cycles         | 182 cycles         |
| 3 x 3 | 499 cycles         | 358 cycles         |
| 5 x 5 | 991 cycles         | 710 cycles         |

These numbers measure the fabric under an idealised core model. They are not cycle counts of real Rocket cores running compiled
C. On real cores the published measurements show a 7 to 16 % gain.

## SystemBus (`system_bus`)

* **Clients**: client 0 is the host, for loading and debugging. Client
  `1+t` is tile `t`'s router.
* **Managers**: manager `t` is tile `t`'s SystemBus adapter. Manager `W*H`
  is the external port `ext_*`, which stands for the boot ROM, UART, debug
  unit and any other devices.

The bus carries one operation at a time. A round-robin arbiter picks the
next client. The A beat is registered and sent to the decoded manager, and
the D beat is registered and returned. An uncontended Get takes about six
cycles. Rocket Chip implements its SystemBus as a crossbar, which can carry
operations to different managers in parallel; this RTL uses the simpler
shared bus. Direct neighbour traffic never touches this bus.

## Timing summary

| Path                                        | Cycles (uncontended)        |
|---------------------------------------------|-----------------------------|
| core load from own scratchpad               | 1 after grant               |
| TileLink Get into a DTIM adapter            | 3 from A beat to D beat     |
| one tl_buffer stage                         | +1 on A, +1 on D            |
| core load from a neighbour, both buffers included | ~6                    |
| CSR write to neighbour's other* CSR         | visible next cycle          |
| SystemBus Get to a tile, adapter included   | ~6                          |

All flip-flops reset asynchronously on `rst_n` low. The scratchpad contents
are not reset.

## Core-facing ports of the top

Everything per tile is an unpacked array indexed by tile number.

* **Data port** (`core_req`, `core_we`, `core_be`, `core_addr`,
  `core_wdata`, then `core_gnt`, `core_rvalid`, `core_rdata`, `core_err`).
  The request is taken in the cycle in which `core_gnt` is high, and the
  answer comes with `core_rvalid`. Keep `core_req` and its payload stable
  until `core_gnt`.
* **CSR port** (`csr_valid`, `csr_op`, `csr_addr`, `csr_wdata`, then
  `csr_hit`, `csr_rdata`). It is combinational read, and the write lands at
  the next edge. `csr_op` is `gpc_pkg::csr_op_e`: read, write, set or clear.
* **Instruction-cache link** (`ic_*`). This is a TileLink-UL manager port
  into the tile's ICache adapter. It serves the local virtual range, so
  instructions can be fetched from the scratchpad without the SystemBus.
* **Host client** (`host_*`) and **external manager** (`ext_*`) on the
  SystemBus.

TileLink payloads are `gpc_pkg::tl_a_t` and `gpc_pkg::tl_d_t`: TL-UL with
32-bit data and an 8-bit source id.

## What is not in this RTL, and choices made here

* **Not included**: the Rocket core (RV32IMA), its instruction cache, its
  TLB and its CSR file, the boot ROM, UART, debug unit and JTAG shell, and
  process-specific SRAM macros. The scratchpad is an inferred array.
* **Own choices, made where the original design gives no detail**:
  - slot numbering N/E/S/W = 0/1/2/3;
  - the SystemBus adapter's place in the arbitration order. Only the core's
    place, first, is given;
  - the ICache adapter serves the virtual local window. Fetches from
    anywhere else, such as the boot ROM, belong to the instruction cache,
    which is not included here, and would go over the SystemBus;
  - the core-side port shapes and one access in flight per tile;
  - adapter latency and error answers;
  - the two-entry link buffers;
  - the shared single-operation SystemBus instead of a crossbar;
  - the six-slot order of 3-D grids;
  - the default 4 x 4 torus. The original was evaluated from 2 x 2 to
    8 x 8, and its chip layout is a 4 x 4 torus.

## Files

`rtl/` (one module or package per file):
`gpc_pkg` (types, map, CSR numbers), `scratchpad`, `tim_arbiter`,
`dtim_adapter`, `tl_fifo2`, `tl_buffer`, `dcache_router`, `handshake_csr`,
`system_bus`, `gpc_tile`, `gpc_top`.

`tb/`:

* one self-checking testbench per block (`tb_<block>.sv`);
* `tb_core_model.sv`, the behavioural per-tile core that runs the systolic
  multiplication with either handshake;
* `tb_gpc_top.sv`, the end-to-end test at the default 4 x 4 torus;
* `tb_gpc_top_mesh.sv`, a 3 x 3 mesh, which also checks the error answer of
  open edge slots;
* `tb_gpc_top_3d.sv`, a 3 x 2 x 2 torus. Every tile writes and reads a tag
  through each of its six windows, and the host checks where each tag
  landed. It also checks the six handshake lines of every tile;
* `tb_gpc_sweep.sv` with `tb_gpc_env.sv`, the same workload on 2 x 2,
  3 x 3 and 5 x 5 torus grids. Grids from 6 x 6 to 8 x 8 are not simulated,
  because their models take too long to build.

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/gpc_pkg.sv tb/tb_gpc_top.sv \
  --top-module tb_gpc_top -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_gpc_top` with its name. The
end-to-end test builds in under a minute and runs in seconds. It prints the
cycle counts of both handshakes and how often each mechanism occurred:
SystemBus operations from the host and from tiles, external-port writes,
instruction fetches, link beats, torus wrap-around beats, arbitration
stalls, and handshakes. A mechanism that never occurs counts as a failure.

## Changing it

* Grid size and shape: the `W`, `H`, `D` and `TORUS` parameters of
  `gpc_top`.
* Scratchpad size: `SPAD_SZ`. It must be a power of two, because the
  windows are `SPAD_SZ` apart.
* Another neighbourhood: give `gpc_tile` a different `NNEIGH`, `OUT_EN`
  and `IN_EN`. The incoming adapter's window then also needs its own slot
  mapping, which `gpc_tile` currently derives as `(n + NNEIGH/2) mod NNEIGH`.
