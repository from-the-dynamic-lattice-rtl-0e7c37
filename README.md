# mDLL: a scalable FPGA machine for lattice-liquid simulation

The mDLL machine simulates dense liquids with the Dynamic Lattice Liquid (DLL)
method. It does not run the method on a processor. It gives every site of the
simulated lattice its own small hardware cell, a *KDLL cell*. The sites form a
face-centred cubic (FCC) lattice with periodic (torus) boundaries, and each
cell talks only to its 12 nearest neighbours.

The design problem is scaling. The machine must grow by adding boards, with no
long wires and no change to the FPGA configuration. The main ideas:

* **Identical blocks.** The lattice is cut into equal blocks of a reduced cubic
  lattice, one block per FPGA. The FCC sites are every second node of the
  block. With even block sides, every FPGA holds the same cell pattern, so one
  configuration serves them all.
* **Six channels per FPGA, whatever the block size.** A block borders 18
  others: 6 across faces and 12 across edges. All traffic is packed into 6
  serial channels, one per cube face. Traffic for an edge neighbour is relayed
  through a face neighbour.
* **A folded torus.** The FPGAs form a 3-D torus of blocks. Boards are placed
  "leap-frog" fashion, so the wrap-around link of every ring also joins
  neighbouring boards.

This RTL describes the machine as built: 3 panels of 3 x 3 boards, with 4 KDLL
FPGAs per board. That makes 108 FPGAs on a 6 x 6 x 3 torus, each holding
32 cells in a 4 x 4 x 4 block, for 3456 cells. The RTL also contains the
machine's two built-in tests: the neighbour self-test and the random-walk
"ball" test. The DLL move rules that the cells run in production are **not**
part of this RTL (see *Limits*).

## Lattice inside one FPGA (`kdll_fpga`)

A block has `ALPHA x BETA x ETA` nodes with local coordinates `(a,b,c)`, each
counted from 0. A node holds a cell when `a+b+c` is even. Every block side is
even, and every block starts at a multiple of its side. So a node's global
parity equals its local parity, and all blocks share one layout. Cells are
numbered

    n = ((c*BETA + b)*ALPHA + a) / 2          (0 .. ALPHA*BETA*ETA/2 - 1)

Of the two nodes `a` and `a+1` (`a` even) in a row, exactly one is a cell,
so halving the raster index numbers the cells without gaps.

The 12 FCC directions are the moves `(±1,±1,0)`, `(±1,0,±1)` and `(0,±1,±1)`.
They are numbered 0..11 in `mdll_pkg` (`dir_dx`, `dir_dy`, `dir_dz`). A move
whose target lies inside the block goes straight to the target cell. The cell
drops the ball on one clock, and the target counts the visit on the next.

## Crossing between FPGAs: 18 directions on 6 channels

This is the heart of the design. A move that leaves the block crosses one or
two faces, because an FCC move changes at most two coordinates. Call the
block offset `(fx,fy,fz)`, with each part in {-1,0,1}.

* The packet goes out on the **x** channel if `fx≠0`. Otherwise it goes on
  **y**, and otherwise on **z**.
* It carries the hops still to make, `rem_y` and `rem_z`. It also carries the
  target cell's local coordinates in the *final* block, already wrapped into
  that block.
* A receiving block with `rem_y≠0` sends the packet on along y and clears
  `rem_y`. Then `rem_z` is handled the same way. With nothing left, the block
  delivers the ball to the target cell. This second hop is the *relay*.

So 6 face neighbours are reached in one hop, and 12 edge neighbours in two,
in x→y→z order. No FPGA needs wires to its 12 edge neighbours.

Packets (`mdll_pkg::pkt_t`, 20 bits) start with a 2-bit type:

| type    | payload (18 bits)                                                      |
|---------|------------------------------------------------------------------------|
| PK_BALL | `rem_y`(2) `rem_z`(2) `tgt_a`(4) `tgt_b`(4) `tgt_c`(4) pad(2)          |
| PK_ID   | sender position `px`(4) `py`(4) `pz`(4), sending channel (3), pad(3)   |

Each outgoing channel has a 4-entry queue (`pkt_fifo`) in front of its
serialiser. A queue is fed by the block's cells, by relayed packets and by
identifiers. The queue accepts one packet per clock. If two packets want the
same queue on the same clock, or a queue is full, the extra packet is dropped
and the sticky `collision` status is raised. A single ball never causes
either.

Hand-off latency from the clock a cell sees STEP to the clock the target's
`landed` is seen, measured in the block test:

| move                       | clocks |
|----------------------------|--------|
| inside the block           | 2      |
| across one face            | 9      |
| across an edge (relayed)   | 16     |

## The channels on the wire (`chan_tx`, `chan_rx`)

Each direction of a channel has `LANES` = 4 data lines and a frame line. A
packet goes out as `ceil(20/LANES)` = 5 beats, least significant beat first,
one beat per clock, with `frame` high on every beat. Packets may follow each
other with no gap, because the receiver counts beats. If the frame drops in
the middle of a packet, the partial packet is thrown away. The receiver
presents a packet one clock after its last beat.

The real machine ran these lines as LVDS pairs at up to 800 Mb/s. That gives
four data pairs per direction, or 3.2 Gb/s per channel. Here one beat is one
system clock; the FPGA's serialiser primitives and pads are not modelled.

## Boards, panels and the fold (`mdll_top`)

There are `DELTA` panels (z), each holding `N` rows and `M` columns of
boards. The torus of blocks is `FX x FY x FZ = 2M x 2N x DELTA`. The board in
column `i` and row `j` (1-based) carries these four blocks:

    s=1: (i, j)   s=2: (2M+1-i, j)   s=3: (i, 2N+1-j)   s=4: (2M+1-i, 2N+1-j)

Torus positions 1 and 2M therefore sit on the same board column, and so does
every other ring link. Channel `ch` of block `(x,y,z)` receives what its
neighbour in direction `ch` sends on the opposite channel. The fold matters to
the logic only through the board grouping in the synchronisation chain. The
fold is applied in x and y within a panel. z is a plain ring of `DELTA`
panels.

## Synchronisation chain and control unit (`pcb_sync`, `ckdll_ctrl`)

Every board has a fifth, central FPGA. These central FPGAs are chained in
series, board `p = ((k-1)N + (j-1))M + (i-1)`, with the control unit (CKDLL)
at the head. The chain has two sets of lines:

* **3 command lines toward the boards** (`cmd_e`): NOP, CLEAR, STEP and
  IDTEST.
* **5 status lines back** (`up_t`): `landed`, `id_err`, `id_all`, `collision`
  and `holding`. Each board merges its four FPGAs with the boards behind it.
  Events and errors are ORed; "all identifiers received" is ANDed.

Each board stage adds one register in each direction. Board `p` also delays
its local copy of a command by `NPCB-1-p` clocks, so **every FPGA acts on a
command on the same clock**, NPCB clocks after it is issued. This is needed,
not cosmetic. Without it, a ball handed to a board that has not yet seen the
STEP would be moved twice by one STEP. The end-to-end test catches that case.

`ckdll_ctrl` runs the two tests:

* **Neighbour self-test** (`mode_id=1`). The unit sends CLEAR, waits
  `CHAIN_LAT`, then sends IDTEST. Every FPGA sends an identifier on its 6
  channels: its torus position and the channel number. Every receiver checks
  for the neighbour's position, wrap-around included, and the opposite
  channel number. After `ID_WAIT` clocks the unit reports `id_pass` if every
  channel of every FPGA got the right identifier and none got a wrong one.
  Otherwise it reports `id_fail`.
* **Ball test** (`mode_id=0`). CLEAR resets every visit counter, reloads
  every cell's LFSR and puts the ball on `seed_cell` of `seed_fpga`, counted
  as one visit. The unit then issues STEP, waits for `landed`, counts the step
  and issues the next STEP. It does this `n_steps` times. `lost` is reported
  if no cell holds the ball after CLEAR, or if no landing is seen within
  `STEP_TMO` clocks. `cycles` counts clocks, so `cycles/steps` is the time of
  one step. That is about 47 clocks on the full machine, most of it the chain
  round trip.

A cell (`kdll_cell`) draws its direction from its own 64-bit LFSR
(`lfsr_rng`, taps 64,63,61,60, one shift per clock) as
`(r[15:0]*12) >> 16`. The walk's quality is judged by the spread of visits:

    phi = (n_max - n_min) / n_max

An even walk drives `phi` toward 0 as the number of steps grows. Visit
counters are read through `rd_fpga`/`rd_cell` → `rd_visits`, with FPGA number
`f = (z*FY + y)*FX + x`.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `ALPHA`, `BETA`, `ETA` | 4, 4, 4 | top, `kdll_fpga` | block size in nodes (even); 32 cells |
| `M`, `N`, `DELTA` | 3, 3, 3 | top | board columns, rows, panels |
| `LANES` | 4 | top, channels | data lines per channel direction |
| `VW` | 32 | top, cell | visit counter width (saturating) |
| `RNG_W` | 64 | top, cell | LFSR length (16, 32, 64 or 128) |
| `QDEPTH` | 4 | `kdll_fpga` | outgoing queue depth |
| `CHAIN_LAT`, `ID_WAIT`, `STEP_TMO` | 2·NPCB+8, +48, 4·CHAIN_LAT+64 | `ckdll_ctrl` | waits and time-out in clocks |

Block sides up to 16 and tori up to 16 blocks per axis fit the packet fields.

## Simulating

Each module and each testbench is in a file of its own name. Name the
package `rtl/mdll_pkg.sv` first on the command line, and let Verilator find the
modules in `rtl/`:

    verilator --binary --timing --assert -Wno-fatal rtl/mdll_pkg.sv -y rtl \
        tb/tb_kdll_fpga.sv --top-module tb_kdll_fpga -Mdir obj
    ./obj/Vtb_kdll_fpga

Each testbench prints `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_lfsr_rng` | register against a tap-list model; zero seed; hold; 16-bit period 65535 |
| `tb_kdll_cell` | CLEAR, STEP pulse and drawn direction against an LFSR model, visit counting, all 12 directions occur |
| `tb_chan_tx`, `tb_chan_rx` | packets survive framing; latency; back-to-back rate of 5 clocks per packet; cut frames dropped |
| `tb_pcb_sync` | one-clock relay, delayed local copy, OR/AND merge |
| `tb_ckdll_ctrl` | both test sequences, pass and fail, ball never placed, ball lost |
| `tb_kdll_fpga` | one block closed on itself as a 1x1x1 torus: self-test pass and a corrupted lane caught; 3000 ball steps, each checked to be a legal FCC move on the periodic 4x4x4 lattice; fixed latency per move kind; every cell visited; phi falls |
| `tb_mdll_walk` | 48 FPGAs of 2x2x2 blocks (8x8x6 lattice): self-test, then 4000 steps, each checked as an FCC move on the periodic lattice; exercises in-block, one-hop and relayed moves; phi falls (1.0 after 400 steps, about 0.78 after 4000) |
| `tb_mdll_top` | full 108-FPGA machine at default parameters: self-test over all 648 channels, 2000 ball steps, visit sum, every mechanism seen |

The full machine takes about 5 minutes to compile with Verilator and about
20 seconds to run.

## Limits and departures

* **No DLL move logic.** The cells run only the ball test: random generator,
  hand-off and visit counting. The published machine's production algorithm
  is defined elsewhere, and nothing here implements it.
* **Cells per FPGA.** The built machine is described both as having 32 cells
  per FPGA and as having 3240 cells in all (30 per FPGA). This RTL uses 32
  cells (a 4x4x4 block), which gives 3456 cells.
* **Even blocks only.** Odd block sides need pairs of complementary FPGA
  layouts ("basic" and "complementary") with different channel directions.
  Those layouts are not built, and an assertion rejects odd sides.
* **Chosen, not given:**
  * the relay order;
  * the packet layout and queue depth;
  * the collision rule;
  * the command and status encodings;
  * the chain registers and equalising delay;
  * the LFSR taps and direction draw;
  * the cell seeds, taken from the global cell number;
  * framing and beat order on the channels.
* **Not modelled:**
  * LVDS pads and serialisers;
  * the multi-gigabit fibre links used for configuration and result read-out,
    here replaced by the `rd_*` port;
  * FPGA configuration through EEPROM and JTAG;
  * power and cooling.

  The whole machine runs on one clock and one reset.
* **What the tests cover.** The single-block test runs on a 1x1x1 torus,
  where +y and −y lead to the same block. The relay *direction* is therefore
  checked by `tb_mdll_walk`, on a 4x4x3 torus of small blocks. The full-size
  test checks the visit sum and the mechanisms, not each move.
