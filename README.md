# MuCCRA core: a parameterised, dynamically reconfigurable processor array

This RTL describes a coarse-grained **dynamically reconfigurable processor array** (DRPA) of the
MuCCRA family, meant as an off-loading engine inside a system-on-chip. The array is a grid of
small word-wide processing elements (PEs) joined by an FPGA-like island-style routing fabric.
Unlike an FPGA, every PE and every switch keeps several complete configurations ("contexts")
next to it. A central controller broadcasts a *context pointer*, and the whole array switches to
another configuration in a single clock cycle. One computation can therefore be time-multiplexed
over a small array.

The architecture is a template. Granularity, array size, number of contexts, channel width and
the flexibility of each multiplexer are parameters. The control part is the same for every
instance: the context switching, the loading of configurations from a central memory (including
contexts that do not fit in the distributed context memories, "virtual hardware"), multicast
configuration delivery and double-buffered edge memories.

The defaults reproduce the first prototype chip (24-bit, 4x4 PEs, 64 contexts). One parameter
set gives the second, area-reduced prototype:

| parameter        | meaning                                   | default (prototype 1) | prototype 2 |
|------------------|-------------------------------------------|-----------------------|-------------|
| `G`              | data width of PEs and routing tracks      | 24                    | 16          |
| `ROWS`, `COLS`   | PE array size                             | 4, 4                  | 4, 4        |
| `C`              | contexts per context memory               | 64                    | 16          |
| `F_UNIT`         | inputs of each PE-core unit's selector    | 4                     | 4           |
| `FPI` (= F_po)   | PE input / output ports                   | 4                     | 4           |
| `F_SW`           | links an entering link can reach in an SE | 2                     | 3           |
| `PE_MUL`         | multiply operation inside every PE        | 0                     | 1           |
| `HAS_MULT_MACRO` | multiplier macros above the array         | 1                     | 0           |
| `W`              | tracks per channel, each direction        | 4 (own choice)        | 4           |
| `RF`             | register-file words per PE                | 8 (own choice)        | 8           |
| `MEM_DEPTH`      | words per bank of each edge memory        | 256 (own choice)      | —           |
| `CONF_DEPTH`     | words of the central configuration memory | 1024 (own choice)     | —           |

The published architecture gives the first eight values. The last four are this implementation's
choices.

## Floor plan and coordinates

Everything is placed on an extended grid of `(ROWS+2) x (COLS+2)` cells. The PEs fill the
middle, and the edge units take the ring around them:

```
            mult     mult     mult     mult          <- row 0    (multiplier macros)
   SE ---- SE ---- SE ---- SE ---- SE
 IO |  PE  |  PE  |  PE  |  PE  | IO                 <- rows 1..ROWS
   SE ---- SE ---- SE ---- SE ---- SE
   ...
            mem      mem      mem      mem           <- row ROWS+1 (double-buffered memories)
```

* A **switching element** SE(r,c), with `r` in 0..ROWS and `c` in 0..COLS, sits at every
  crossing of a horizontal and a vertical channel.
* A **segment** joins two neighbouring SEs. It carries `W` tracks in each direction, and each
  track is `G` bits wide. A unit reading a segment sees `2W` words: index `0..W-1` are the
  east- or southbound tracks and `W..2W-1` the west- or northbound ones.
* Every cell has four **corner outputs** (0 = NW, 1 = NE, 2 = SE, 3 = SW). Corner output `j`
  goes into the SE at that corner. PE(r,c)'s corners are SE(r,c), SE(r,c+1), SE(r+1,c+1) and
  SE(r+1,c).
* Every cell reads the segments on its sides through **connection blocks**. Side 0 is north,
  1 east, 2 south, 3 west.
* Edge units touch one segment. The I/O units at the ends of each PE row use the vertical
  segment beside them. A multiplier uses the top horizontal segment of its column, and a
  memory the bottom one.

## The processing element (`pe`)

```
 side segments --4 connection blocks--> pin0..pin3 (N,E,S,W)
        pin ---> [RF write mux] --> register file --rf--+
   rf / pin ---> [SMU mux] --> Shift & Mask Unit --smu--+
smu/rf/pin ---> [ALU mux A,B] --> ALU --alu-------------+--> 4 output muxes --> corner regs
```

The current context word (`pe_cfg_t`, 51 bits) sets every multiplexer and operation:

| field              | selects among                                                    |
|--------------------|------------------------------------------------------------------|
| `in_sel[i]`        | track 0..2W-1 of the segment on side i                           |
| `rf_src`           | ALU result, pin0, pin1, pin2 (write port; `rf_we`, `rf_waddr`)   |
| `rf_raddr`         | read address; the register file reads combinationally            |
| `smu_src`          | register file, pin0, pin1, pin2                                  |
| `alu_a`, `alu_b`   | SMU result, register file, pin0, pin1                            |
| `out_sel[j]`       | ALU, SMU, register file, pin j (pass-through)                    |

Each unit's selector has `F_UNIT` inputs. Selector values at or above the flexibility give
zero, so a smaller `F_UNIT` or `FPI` builds a narrower multiplexer. The SMU shifts (SLL, SRL,
SRA or rotate-left, by a constant from the context) and then keeps the low `smu_mlen` bits
(0 keeps all). The ALU covers add, subtract, logic, comparisons, unsigned min/max and pass.
With `PE_MUL` it also gives the low half of the product.

Timing: the path from pin through SMU to ALU is combinational. The corner outputs and the
register-file write are registered and advance only while the array runs (`en`). A word
leaving a PE crosses any number of SEs combinationally and is captured by the next unit
in the same cycle. One PE stage is therefore one cycle.

## Switching elements (`se`)

An SE holds `W` independent switching modules, one per track. In module `w`, the outgoing link
on side `d` is chosen by a 3-bit selector at bit `(d*W + w)*3` of the SE context word:

| selector            | drives outgoing link `d` with                                   |
|---------------------|-----------------------------------------------------------------|
| 0                   | zero (link unused)                                              |
| 1                   | entering link from the opposite side (straight on)              |
| 2                   | entering link from side `d+1` (only if `F_SW` >= 2)             |
| 3                   | entering link from side `d+3` (only if `F_SW` = 3)              |
| `F_SW+1 .. F_SW+4`  | corner output of the NW, NE, SE or SW cell of the crossing      |

With this order, each entering link can be routed to exactly `F_SW` of the three other sides.
With `F_SW = 2` the only turns are right turns (for example, northbound to eastbound). With
`F_SW = 3` left turns are possible too. The package function `se_set()` fills one selector of
an SE word.

**Combinational loops.** Like any island-style fabric, the SE network contains structural
combinational cycles (four right turns around a PE make one). A configuration must never close
one. Lint tools report the cycle (verilator `UNOPTFLAT`), and yosys' loop check enumerates it
at length. The warning is structural and stays.

## Contexts and configuration delivery

Each PE, SE and edge unit has its own **context memory** (`ctx_mem`) of `C` words. It is read
combinationally by the broadcast pointer, so a context switch costs no extra cycle. Memories
are written from one broadcast bus carrying `cfg_pkt_t`:

```
cfg_word_t = { kind[1:0] (PE, SE, EDGE, CSC), row_mask[7:0], col_mask[7:0], slot[7:0], data[63:0] }
```

An element stores a word when the kind is its own and both its row bit and its column bit are
set. One word can therefore fill the same slot of a whole row, column or rectangle-product set
(row/column multicast). The bit positions are as follows:

* a PE(r,c) uses row bit r and column bit c;
* an SE(r,c) uses row bit r and column bit c;
* an edge unit uses its extended-grid position (row 0 is the top edge, `ROWS+1` the bottom;
  column 0 is the left edge, `COLS+1` the right);
* the context switching controller uses row 0, column 0.

The **configuration controller** (`tcc`) holds the host-written central configuration memory.
On `tcc_start` it streams words `base .. base+len-1`, one per cycle; the first word reaches the
bus two cycles after the start, and `tcc_busy` stays high until the last one has left. It may do
so while the array executes other slots. Applications with more contexts than `C` are run by
refilling slots that are not in use (virtual hardware).

## Task sequencing (`csc`)

The context switching controller has its own context memory with one `csc_entry_t` per slot:

* `stay`: the number of extra cycles in this context;
* `next`: the slot that follows;
* `last`: the task ends after this context;
* `wait_cfg`: hold before leaving until configuration loading is idle.

`csc_start` with `csc_start_ctx` starts a task. The pointed context executes for `stay+1`
cycles, and then the pointer moves. During a wait the array is frozen (`run` low,
`csc_stall` high). This makes sure a slot being refilled is not entered early. After the last
context, `csc_done` pulses for one cycle. The rule that the task-end pulse swaps the memory banks
follows the architecture. The entry format and the wait rule are this implementation's own.

## Edge units

* **`io_unit`** (both ends of each row): registers `io_in` each running cycle and drives it into
  its corner SEs. When its context sets `op[0]`, it registers the word on track `sel_a` to
  `io_out` and raises `io_valid` for one cycle.
* **`mult_macro`** (above each column, prototype 1): multiplies tracks `sel_a` and `sel_b` with
  one cycle of latency. Its ops are 0 hold, 1 low half, 2 high half unsigned, 3 high half signed.
* **`dbuf_mem`** (below each column): two banks. The array owns one, and the host port
  (`mem_addr/we/wdata/rdata`, registered read) owns the other. They swap at the end of each
  task. Array ops: 1 reads at the address on track `sel_a` (one-cycle latency), and 2 writes
  track `sel_b` there.

## Using the core

1. Write configuration words with `host_cfg_we/addr/wdata`. Clear every slot you will run
   first: context memories are not reset. Three multicast words per slot do it, with kinds
   PE, SE and EDGE, masks `8'hff` and data 0.
2. Pulse `tcc_start` with `tcc_base`/`tcc_len`, and wait for `tcc_busy` to fall. Or keep it
   loading while a task runs.
3. Fill the host bank of the memories, then pulse `csc_start`. Stream `io_in`, and collect
   `io_out` where `io_valid` is high.
4. `csc_done` ends the task and swaps the memory banks.

`tb/tb_muccra_top.sv` and `tb/tb_alpha_blend_m2.sv` are worked examples. Their comments list
every route and selector value.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv` that compares against an
independent model. The models are: an operation table for the ALU, a bit-level model for the
SMU, a shadow copy for the register file and context memory, the selection rule for the SE, a
cycle model for the PE and the controllers, and 64-bit arithmetic for the multiplier. Beyond
these:

* `tb_muccra_array`: a four-PE vertical pipeline with a memory write, checked after a bank swap.
* `tb_muccra_top`, at the default size: two tasks, with every word on the right-hand outputs
  predicted.
  * Task 1 runs a 4-row, 4-stage streaming pipeline over 2 contexts.
  * While task 1 runs, task 2's contexts load in the background, which forces a stall of the
    context controller.
  * The bank swap hands host data to the array.
  * Task 2 sends memory read data up to a multiplier macro.

  The testbench counts context switches, stalls, background loads, multicast words, swaps,
  memory reads, products and outputs. It fails if any of them never happened.
* `tb_alpha_blend_m2`: the prototype-2 parameter set. It blends 4 pixel streams with
  `out = (a*alpha + b*(128-alpha)) >> 7`, using PE multipliers and an `F_SW = 3` left turn.
  It processes 480 pixels in 126 cycles.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_muccra_top \
          -y rtl -y tb +libext+.sv -Irtl rtl/muccra_pkg.sv tb/tb_muccra_top.sv
./obj_dir/Vtb_muccra_top
```

## How far this follows the published architecture

The published architecture fixes the following, and the RTL follows it:

* the island-style array with SEs at every crossing, I/O at the row ends and hard macros at the
  column ends;
* the PE made of register file, Shift & Mask Unit and ALU, each behind an `F_unit`-input
  selector, with `F_pi` input and `F_po` output ports;
* SEs with `W` switching modules, each reaching `F_sw` links;
* `G`-bit links;
* distributed context memories switched in one cycle by a broadcast pointer;
* a central configuration memory feeding them during execution;
* row/column multicast of configuration data;
* double-buffered edge memories swapped at task end;
* the parameter values of both prototypes.

This implementation chose the following itself:

* the exact source lists of every selector;
* unidirectional track pairs, and corner outputs as the output connection;
* the choice of which sides an SE can turn to;
* ALU, SMU, multiplier and memory operation sets and encodings;
* all context-word formats;
* `W`, the register-file, memory and configuration-memory depths;
* the controller's entry format, including the configuration-wait stall;
* the placement of multipliers on the top edge and memories on the bottom edge;
* the I/O unit behaviour.

The multicast rule follows the published row/column multicast idea in its general form, not
any specific implementation of it.

Not built:

* **The second prototype's shared context memory.** There, one context memory serves two PEs
  and four SEs. Here every element keeps its own; its parameter set otherwise runs as shown.
* **Chip-level parts.** These are the pads and pad ring, the layout, the generator that emits
  this template, and the compiler that produces configurations. The core's ports are brought
  out directly.

The published application results (DCT, alpha blending, SHA-1, Viterbi, contrast enhancement)
give clock counts and context counts but no configurations. They are not reproduced, apart from
the alpha-blend kernel above. Its mapping is this implementation's own.

## Files

| file | content |
|---|---|
| `rtl/muccra_pkg.sv` | shared constants, config word/packet structs, enums, helper functions |
| `rtl/muccra_top.sv` | core: configuration controller + context controller + array |
| `rtl/muccra_array.sv` | PE/SE/edge-unit grid and all routing wires |
| `rtl/pe.sv`, `pe_alu.sv`, `pe_smu.sv`, `pe_rf.sv`, `conn_block.sv` | processing element |
| `rtl/se.sv` | switching element |
| `rtl/ctx_mem.sv` | context memory with multicast address match |
| `rtl/csc.sv`, `rtl/tcc.sv` | context switching controller, configuration controller |
| `rtl/io_unit.sv`, `rtl/mult_macro.sv`, `rtl/dbuf_mem.sv` | edge units |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_alpha_blend_m2.sv` |
