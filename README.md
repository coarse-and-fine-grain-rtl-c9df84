# Two FPGA overlays: ZUMA (fine grain) and CARBON-Razor (coarse grain)

An *overlay* is a programmable architecture built out of the logic of an
ordinary FPGA. A circuit compiled for the overlay runs on any host FPGA that
can hold the overlay, without the host vendor's tools. That gives bitstream
portability and fast compiles. The price is area and speed. This RTL holds two
overlays that attack that price from opposite ends:

* **ZUMA** is a small island-style FPGA: clusters of 6-input LUTs joined by
  length-4 unidirectional routing wires. Its trick is that *every*
  programmable element is a LUTRAM, the small distributed RAM of the host
  FPGA. That includes the LUTs, every routing multiplexer and the crossbars
  inside the cluster. No flip-flop is spent on configuration, and a routing
  mux costs one host LUT.
* **CARBON-Razor** is an array of word-wide processing elements (CGs). Each
  runs a time-multiplexed instruction schedule. It is overclocked past its
  safe timing. The timing errors this causes are caught with Razor-style
  shadow registers on the CG memories and repaired by a stall. The stall
  spreads through the array as a wavefront, one hop per clock.

The two are independent. `overlay_top` places them side by side and brings
each one's ports out.

```
overlay_top
├── zuma_fabric            fine-grain overlay
│   ├── zuma_config_ctrl   counter + write-enable shift chain
│   └── zuma_array         ROWS x COLS tiles
│       └── zuma_tile
│           ├── zuma_input_block   28 LUTRAM muxes
│           ├── zuma_iib           two-stage LUTRAM crossbar
│           ├── zuma_ble x N       LUTRAM eLUT + bypassable flop
│           └── zuma_switch_block  one LUTRAM mux per starting wire
│               (all of them built from zuma_lutram)
└── carbon_array           coarse-grain overlay
    ├── carbon_cfg         instruction-memory loader
    ├── carbon_sched       user-cycle scheduler (two modes)
    └── carbon_cg x ROWS*COLS
        ├── carbon_mem x 5 (N, S, E, W, R)  bypass + Razor shadow
        ├── carbon_alu
        └── carbon_stall_ctrl               2D stall propagation
```

---

## Part 1: ZUMA

### Default architecture

| parameter | value | meaning |
|---|---|---|
| `K` | 6 | LUT inputs; also the input count of every routing mux |
| `N` | 8 | eLUTs (LUT + flop) per cluster |
| `I` | 28 | cluster inputs |
| `W` | 112 | tracks per channel: 56 per direction |
| `L` | 4 | wire length in tiles, so 14 wires of each direction start in each tile |
| `ROWS`, `COLS` | 3, 3 | tile array (the board-tested size) |

Input connection flexibility is 6 tracks per cluster input, and the
switch-block flexibility is 3. Each started wire can be driven by 3 of the
8 cluster outputs.

### A RAM is a multiplexer

This idea drives the whole fabric, so it is worth going slowly.

A 64x1 LUTRAM with a combinational read port is a 6-input LUT. Its six
address lines are the LUT inputs, and its 64 stored bits are the truth
table. Now store the table whose entry at address `a` is `a[j]`, bit `j` of
the address. The LUT's output then equals its input `j`. That is a 6:1
multiplexer with select `j`. The select is not held in configuration
flip-flops: it is encoded in the RAM contents. Storing all zeros makes an
"unused" mux that drives 0.

`zuma_lutram` is that element. Its configuration is written through a
synchronous port (`cfg_we`, `cfg_addr`, `cfg_data`). Its read
(`rd_addr` → `rd_data`) is combinational. The fabric uses it three ways:

1. `W = 1` as an eLUT: arbitrary contents (`zuma_ble`).
2. `W = 1` as a routing mux: contents `a → a[sel]`. Used for every
   cluster input (`zuma_input_block`) and every wire that starts in a tile
   (`zuma_switch_block`).
3. `W = n` as a crossbar. One RAM, n bits wide, and all n outputs see the
   same K inputs. Output bit `b` is programmed as a pass-through of its own
   chosen input. One wide memory replaces n separate muxes (`zuma_iib`).

Because every mux and LUT is written at the same 64 addresses, one tile's
whole configuration fits in 64 words of 184 bits. The bit at position `p`
of word `a` is the contents of LUTRAM `p` at address `a`:

| bits | owner |
|---|---|
| 0 .. 27 | input-block muxes, one per cluster input |
| 28 .. 83 | switch-block muxes, wire `d*14 + s` (d: 0 E, 1 W, 2 N, 3 S) |
| 84 .. 119 | IIB stage 1: 6 crossbars x 6 outputs |
| 120 .. 167 | IIB stage 2: 6 crossbars x 8 outputs |
| 168 .. 175 | eLUT truth tables |
| 176 .. 183 | eBLE flop-bypass bits (taken at address 0 only) |

For a mux with select `j`, the word-`a` bit is `a[j]`. `tb/zuma_tb_pkg.sv`
has a function (`cfg_word`) that builds words this way from a table of
selects. It is the easiest place to see the format in use.

### The two-stage input interconnect (IIB)

Inside a cluster, 36 signals (28 inputs plus 8 eLUT feedbacks) must reach
48 eLUT pins. A full crossbar would cost 48 muxes of 36 inputs. A Clos
network of small crossbars does it instead. The third stage of the Clos
network is dropped, because the order of a LUT's inputs does not matter:
the LUT contents can absorb any permutation.

* Stage 1: 6 crossbars, each 6 inputs to 6 outputs. Crossbar `p` takes
  signals `6p .. 6p+5`.
* Stage 2: 6 crossbars, each 6 inputs to 8 outputs. Crossbar `j` takes
  output `j` of every stage-1 crossbar. Its output `n` drives input `j` of
  eLUT `n`.

Each crossbar is a single multi-bit LUTRAM. The output-to-eLUT wiring is
this design's reading of the network diagram.

### Tiles and wires

A tile (`zuma_tile`) carries four unidirectional buses of 56 wires, one per
direction. Wires are length 4 and staggered so that every tile is
identical. Of the 56 wires entering in a direction:

* indices 42..55 end here. They are the ones the switch block may turn or
  continue.
* the rest shift up by 14 (`out[14 + j] = in[j]`).
* indices 0..13 of the leaving bus are the 14 wires driven by this tile's
  switch block.

The input block can pick from all 224 wires entering the tile. Cluster input
`i` reaches tracks `(i*8 + j*38) mod 224` for `j = 0..5`. That pattern is
this design's. The original fixes only that each input reaches 6 tracks.

A switch-block mux for wire `(d, s)` has six inputs:

* the ending wire with index `s` going straight on;
* the ending wires with index `s` in the two perpendicular directions;
* cluster outputs `(3s + 2d + m) mod 8`, for `m = 0..2`.

In `zuma_array` row 0 is the south edge and column 0 the west edge. Buses
that would leave the array are outputs, and buses that would enter it are
inputs. The fabric's I/O pads attach there.

### Configuration controller

`zuma_config_ctrl` writes the tiles one group at a time. All LUTRAMs share
one 6-bit address from a counter. Each group's write enable is one flop of a
shift chain. `begin_cfg` puts a token into the chain. The counter sweeps
addresses 0..63 for the group holding the token, and its wrap moves the token
on. Loading takes `G * 64` clocks, one 184-bit word per clock (handshake
`bs_rd`). The word order is group 0 address 0..63, then group 1, and so on.
`cfg_done` then rises.

Here a group is one tile, and all groups share one data bus. That is the
slow, small end of the speed/area range the controller allows.

While loading, `zuma_fabric` holds the switch-block outputs and eBLE
outputs at 0 (`user_en = cfg_done`). A partly written fabric therefore cannot
form an oscillating loop. The original does not describe this.

### Things to know about the ZUMA RTL

* The routing is combinational and loops back on itself through the
  tiles, as in any FPGA. Verilator reports `UNOPTFLAT` for this. A
  configuration that closes a combinational loop oscillates in simulation
  just as it would in hardware.
* The eBLE mode bit is configuration state. User reset clears the eBLE
  flop, not the mode.
* Timing of the configured circuit is one clock through each registered
  eBLE. Routing and combinational eBLEs have zero delay in simulation.

---

## Part 2: CARBON-Razor

### The CG and its schedule

A CG executes one 81-bit instruction per system clock from a 256-entry
instruction memory. A *user cycle* is one pass through the schedule. The
instruction with the `last` flag ends the pass. Each instruction does the
following:

* reads operands A and B and a crossbar value X, each from one of five
  16-word memories. N, S, E and W are written by the neighbours on those
  sides, and R by the CG itself;
* computes a 32-bit ALU result, truncated to a per-instruction width (1..32
  bits);
* optionally writes the result into R;
* for each side, optionally writes either the result or X into the
  neighbour's facing memory. For example, the CG's east output writes its
  east neighbour's W memory.

All memories read synchronously (block RAM), so an instruction's operands
are requested one clock before it executes. It is fetched a clock before
that:

```
clock t    imem read at the fetch address
clock t+1  ir_d holds the instruction; its three read addresses go to the memories
clock t+2  ir_e executes; ALU; writes happen at the end of the clock
```

When `last` reaches execute, instruction 0 is already being fetched for the
next user cycle. It waits in `ir_d`, with its reads repeated every clock,
until `go`. Back-to-back user cycles therefore lose no clock.

**Memory bypass.** A block RAM cannot return a word written in the same
clock it is read. Each memory keeps the last written word and address in a
bypass register. A read of that address returns the bypass register.

The instruction layout (bit 80 first) is: op 5, width−1 5, A source 3 + address 4,
B source 3 + address 4, R write 1 + address 4, X source 3 + address 4, four
routes of (use X, write, address 4), immediate 16, last 1, and 4 spare bits.
The operations are NOP, ADD, SUB, MUL, AND, OR, XOR, NOT, SHL, SHR, SRA, EQ, NE,
LTU, LTS, PASS, LDI, LDHI, ADDI, STORE and LOAD. Constants are built with
LDI/LDHI.

**Memory-addressed LOAD and STORE.** STORE writes operand B into R at the
address held in operand A, in one clock. LOAD needs two slots, because its
address is itself a word in memory. While LOAD executes, its operand A value
replaces the read address of operand A of the *next* instruction. That next
instruction therefore receives `mem[addr]`. If the next instruction is
stalled, the address is kept in `ld_addr` and the indirect read is
repeated. LOAD must not be the last instruction of a schedule.

### Razor on a memory

Razor samples a signal twice: at the normal clock edge and again a little
later, into a *shadow* register. If the two differ, the signal arrived late
and the normal sample is wrong. CARBON keeps its state in RAMs, not flip-flops,
so the check is moved onto each memory's write (`carbon_mem`):

1. Every incoming write is also captured in a shadow register, together
   with its address and enable.
2. In the next clock, the word the RAM really stored is compared with the
   shadow. That word is read back through the write port, which equals the
   bypass register. A difference raises `mem_err`.
3. On `mem_err` the write port writes the shadow contents, which repairs
   the word. The CG stalls for that clock.

Simulation has no late clock. Here the shadow register samples the intended
data on the normal edge, and a timing error is made by the `err_inject`
input. It XORs a mask into the data on its way into the RAM only. Tie it to
0 for normal use. The testbenches use it to put errors exactly where they
want them.

### The stall wavefront

A stall in one CG must reach every CG that exchanges data with it. Otherwise
neighbours fall out of step: one would write data for instruction `y+1`
into a memory its neighbour still needs for `y`. Stalling the whole array at
once would be simpler. But then the error signal must reach every CG in one
clock, and two independent errors would cost two clocks everywhere. Instead
each CG tells only its four neighbours, one clock later. The stall spreads as
a diamond:

```
            3
         3  2  3
      3  2  1  2  3
   3  2  1  0  1  2  3      stall clock relative to the CG with the error
      3  2  1  2  3
         3  2  3
            3
```

Every CG stalls exactly once, so the whole array ends up one clock behind
its schedule. `carbon_stall_ctrl` does this with a few gates per side `d`:

```
valid[d]       = stall_in[d] & ~stall_out[d]
count_stall    = |mem_err | |valid
nxt[d]         = count_stall & ~valid[d]
stall_out[d]  <= nxt[d]                      (registered: one hop per clock)
load_shadow[d] = nxt[d] | stall_out[d]
load_shadow_R  = count_stall
```

How to read the equations:

* **`count_stall`** freezes the CG for one clock. The fetch address,
  `ir_d` and `ir_e` hold. All writes by this CG are dropped. The operands
  of the held instruction are read again, so a word repaired this clock is
  seen next clock.
* **`nxt`: propagate away from the source only.** The CG stalls every
  neighbour next clock, except the one(s) whose stall it is obeying. A
  wavefront therefore moves outwards and never bounces back.
* **`valid`: merge fronts.** Two neighbours that stall in the same clock
  each get the other's stall one clock later. Each is already sending a
  stall that way, so the `~stall_out` mask makes it ignore the incoming one.
  Two fronts that meet therefore fuse into one region that is one clock
  behind. An error that hits a CG after a front has passed it starts a new
  region, two clocks behind.
* **`load_shadow`: protect data in flight.** While a CG stalls, its
  unstalled neighbours are still writing their next results into its
  memories. Those writes would overwrite operands that the held
  instruction still needs. So the memory facing neighbour `d` writes from
  its shadow register instead, for the stall clock and the clock after.
  That delays the neighbour's writes by exactly one clock. The exception is
  the neighbour that caused the stall: it is catching up on the instruction
  the others already did, and its writes must land at once.
* **Two writes in a row.** A write that arrives while the shadow path is
  busy is held in the shadow register and written one clock later
  (`pend`), so no write is lost.

A CG that has run its whole schedule and is waiting for `go` takes no part
in stalls. By then the wave has gone as far as it needs to. In the clock
where `go` restarts the CG, no delayed writes are started. This matches the
rule that restarting the schedule clears all error history.

### User cycles: hard deadline or accelerator

`carbon_sched` issues `go` to all CGs. It has two modes:

* **Hard deadline** (`accel_mode = 0`): `go` comes every `cycle_len`
  clocks. Set `cycle_len = schedule length + e`, where `e` is the number of
  spare clocks. Each stall on a path uses up one spare clock, so any `e`
  errors per user cycle are tolerated. If `go` comes while some CG is not
  done, it is remembered. The CG starts as soon as it finishes, and the
  event is counted in `overruns`.
* **Compute accelerator** (`accel_mode = 1`): `go` comes as soon as every
  CG is done. A user cycle costs the schedule length plus the stalls that
  really happened.

`carbon_cfg` writes instructions, one 81-bit word per clock, into one CG or
broadcast into all. R-memory constants are loaded by a start-up program.

### Timing summary

| event | latency |
|---|---|
| instruction fetch to execute | 2 clocks, hidden between user cycles |
| bad write to `mem_err` | 1 clock |
| stall at distance h from the error | h clocks after the erroring CG stalls |
| user cycle, no errors | schedule length (`last` included) |
| user cycle with stalls | + 1 clock per wavefront that crosses the CG |

---

## Where this RTL departs from the original design

* **Timing-error model.** The late shadow clock is replaced by the
  `err_inject` input (see above). No real overclocking can be shown in RTL
  simulation. The clock-sweep test rig of the original (a soft processor and
  a PLL) is not included.
* **Memories.** Operand memories are 16 words deep, a size chosen so that
  the 81-bit instruction holds every field. Each has one array with three
  read ports, where the FPGA version replicates the RAM three times. The
  field layout and opcode set are this design's.
* **LOAD/STORE.** The original leaves these unfinished. Here STORE takes
  one slot and LOAD two, and the compiler must place the LOAD's consumer
  in the slot right after it. The controller that tracks used R addresses is
  not built: R addresses come from the instruction.
* **Idle CGs and restarts** ignore stalls, as described above. This is a
  choice made to fit the rule that errors are forgotten at the end of the
  schedule.
* **ZUMA connection patterns.** The input-block track pattern, the
  switch-block pattern and the wire stagger are this design's. The
  parameters that govern them (Fc_in = 6, Fs = 3, Fc_out = 3/8, W, L) are
  the original's. A bitstream from the original CAD flow will not load
  as-is.
* **ZUMA I/O and loading.** Edge routing buses stand in for I/O blocks.
  Configuration groups are single tiles on a shared data bus. User outputs
  are held at 0 while loading.
* **Array sizes.** ZUMA defaults to 3x3 tiles. The benchmark circuits used
  to evaluate the architecture need 10x10 to 22x22 arrays at track widths
  46–112, so set `ROWS`/`COLS` to fit. CARBON defaults to 2x2 CGs, the size
  of the published benchmark runs. Schedules of up to 256 instructions fit.

---

## Simulating

All files are SystemVerilog-2017. Packages: `rtl/carbon_pkg.sv` for
everything CARBON, and `tb/zuma_tb_pkg.sv` and `tb/carbon_tb_pkg.sv` for the
testbenches. With Verilator 5:

```sh
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/carbon_pkg.sv tb/carbon_tb_pkg.sv tb/zuma_tb_pkg.sv \
    tb/tb_overlay_top.sv --top-module tb_overlay_top
./obj_dir/Vtb_overlay_top
```

Replace the last file and module name to run another testbench. Every
testbench is self-checking, uses `$urandom` for its stimulus, has a
watchdog, and ends with
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it shows |
|---|---|
| `tb_zuma_lutram` | random writes; combinational read; mux programming |
| `tb_zuma_ble` | eLUT truth tables, registered/combinational mode, reset |
| `tb_zuma_iib` | random two-stage crossbar configurations against a model |
| `tb_zuma_input_block` | track pattern and select of every cluster input |
| `tb_zuma_switch_block` | straight/turning/cluster-output choices, user_en gating |
| `tb_zuma_tile` | a whole tile against a model: input block, IIB, eLUTs, stagger |
| `tb_zuma_config_ctrl` | word order, G·64 clock load time, restart mid-load |
| `tb_zuma_array` | wires across tiles and array edges |
| `tb_zuma_fabric` | bitstream load, then a registered 4-input XOR running on the fabric |
| `tb_carbon_alu` | every operation and width against a model |
| `tb_carbon_mem` | three read ports, bypass, error detect and repair, delayed writes |
| `tb_carbon_stall_ctrl` | random stall/error patterns against the equations |
| `tb_carbon_cg` | fetch timing, go/done, a stall in the middle of a program, STORE, LOAD with and without stalls |
| `tb_carbon_sched` | both modes, overrun counting |
| `tb_carbon_cfg` | single and broadcast instruction writes |
| `tb_carbon_array` | 5x5 array: diamond wavefront timing, merged fronts, a second region, both modes, program results |
| `tb_zuma_wide_gate` | 32-input AND and OR placed and routed by hand on the 3x3 fabric (two clusters), loaded by bitstream, checked at the east edge |
| `tb_carbon_razor_study` | 10x10 array, 10-instruction schedule, 1..10 random errors per user cycle: measured schedule extension, plus four exact merge/second-region cases |
| `tb_overlay_top` | whole design at default sizes; counts every mechanism (bitstream words, registered and combinational eBLEs, staggered wires, broadcast and single writes, both go modes, mode switch, timing errors, own and neighbour stalls, delayed and pending writes, bypass reads, overruns) and fails if any never happened |

`tb_overlay_top` runs with every parameter at its default. It loads a 3x3
ZUMA bitstream of 576 words and runs 2x2 CARBON programs in both scheduler
modes with errors injected.

### Error-tolerance study

`tb_carbon_razor_study` reruns, on this RTL, the study that motivated the
2D stall scheme. It uses a 10x10 array and a 10-slot schedule in accelerator
mode. Each user cycle gets 1 to 10 errors at random CGs and random clocks,
and the testbench measures how many clocks the cycle grew by. That growth
is the number of spare cycles a hard deadline would have needed. It prints
a table like this (50 user cycles per row; the numbers vary with the seed):

```
errors  mean spare cycles  P(fail, e=1)  P(fail, e=2)
     1               1.00          0.00          0.00
     5               1.62          0.62          0.00
    10               2.00          0.94          0.06
```

Because fronts merge, ten errors seldom need more than two spare cycles.

