# A partially reconfigurable CGRA: tile array with run-time links

This is a coarse-grain reconfigurable array (CGRA) of small 48-bit
processors ("tiles"). Each tile is tied to its nearest neighbours through
links that are changed while the array runs. An application is split into
communicating processes (for example the butterfly stages of an FFT, or the
shift / DCT / quantise / zig-zag / Huffman steps of a JPEG encoder). The
processes are placed on tiles and executed as a sequence of *epochs*. Within
an epoch the links are fixed. Between epochs a runtime manager re-points
the links of some tiles, and rewrites their code or constants, while the
other tiles keep computing. This is partial reconfiguration, and it lets
the pipeline be rebalanced at low cost.

Data move semi-systolically:

- a tile reads only its own memory;
- a tile writes either its own memory or the memory of the one neighbour
  its output link points to;
- data for a tile further away is carried by explicit copy instructions,
  one hop at a time.

The RTL models the array, each tile and the configuration path. The
runtime manager (a soft processor in the original system) and its
bitstream-loading path are not included. Their job is done by a simple
configuration port that a testbench or a host drives.

## Array and links

`remorph_array` holds `ROWS x COLS` tiles. The default is 8 x 10 = 80 tiles:
8 tiles per column, and up to ten columns for a 1024-point FFT. Tile `t`
sits at row `t / COLS` and column `t % COLS`.

Each tile has two link registers:

| register  | meaning                                        |
|-----------|------------------------------------------------|
| `out_dir` | where this tile's remote writes go (N, E, S, W) |
| `in_dir`  | which neighbour may write into this tile        |

A link carries data only when both ends agree. If tile A has
`out_dir = E` and the tile to its east has `in_dir = W`, the link is up.
Because the two directions are separate registers, two tiles can exchange
data in both directions at once: both point at each other with both
registers. This is the vertical half-exchange between row pairs used by the
FFT mapping.

A remote write that finds no link stays pending, and the writing tile
stalls until the manager sets the link. Because of this, reconfiguring a
link does not need to be timed exactly against the program.

Array edges:

- The west side of column 0 is the input column. `west_in[r]` offers a
  write (valid, 9-bit address, 48-bit data) into tile (r, 0), and
  `west_in_gnt[r]` accepts it in the same cycle. The tile's `in_dir` must
  be W.
- The east side of the last column is the output. A remote write of tile
  (r, COLS-1) with `out_dir = E` appears on `east_out[r]`. It completes in
  a cycle where `east_out_ready[r]` is 1, and until then the tile stalls.
- Links pointing off the north or south edge are never granted.

## The tile

`cgrm_tile` is made of:

- `instr_memory`: 512 x 72-bit instruction memory. One port fetches, the
  other is written by reconfiguration.
- `data_memory`: 512 x 48-bit data memory with two read ports and one write
  port. It is two identical block RAMs (`bram_1r1w`); every write goes to
  both, and each copy serves one operand.
- `addr_unit`: four base-address registers for register-indirect
  addressing.
- `dsp_alu`: the execute unit, sized like an FPGA DSP slice (25 x 18
  multiplier).
- `sequencer`: the program counter and pipeline control.
- `dmem_write_arbiter` and `link_switch`: share the memory write port and
  implement the links.

### Instruction format (this design's own)

Instructions are three-address and memory to memory: `d = a op b`.
Fields, from bit 71 down:

| bits  | field            | meaning |
|-------|------------------|---------|
| 71:66 | `op`             | opcode (see `remorph_pkg::opcode_e`) |
| 65    | `remote`         | write the result over the link into the neighbour's memory |
| 64:62 | `ind_d/a/b`      | address field is `base[bsel] + field` instead of `field` |
| 61:56 | `bsel_d/a/b`     | base register for each field |
| 55:29 | `dst, srca, srcb` | 9-bit data-memory addresses |
| 28:0  | `imm`            | immediate: shift amount, branch target, base value, MOVI constant |

Opcodes:

| group       | opcodes | notes |
|-------------|---------|-------|
| arithmetic  | ADD, SUB, MUL | MUL: signed `a[24:0] * b[17:0] >>> imm[5:0]`, for fixed-point scaling |
| logic/shift | AND, OR, XOR, SHL, SHR | SHR is arithmetic |
| moves       | MOV, MOVI | MOV with `remote` set is the copy instruction between tiles |
| addressing  | SETB, ADDB | load or add to a base register |
| branches    | BZ, BNZ, BLT, JMP | BZ/BNZ/BLT test operand a |
| control     | HALT | |

Loops walk arrays by bumping a base register with ADDB and counting down a
memory word with SUB and BNZ.

Tiles synchronise by polling. A producer sends its block and then a flag
word into the consumer's memory. The consumer waits with `BZ flag, self`.

### Pipeline and timing

There are three stages:

1. Fetch: the instruction memory is read at `pc`.
2. Decode: effective addresses are formed and both operands are read.
3. Execute: the ALU computes and the result is written.

One instruction completes per cycle (2.5 ns at 400 MHz). A taken branch
costs two bubbles. From the start command to `halted` a program takes
*instructions executed + 2 + 2 x taken branches* cycles, and the tile
testbench checks this number.

An instruction can use the result of the one just before it. The data
memory is write-first: a read at the same edge as a write to the same
address returns the new word. No forwarding network is needed.

The execute stage freezes the whole pipeline (stall) while its write is not
granted. Memory read enables drop during a stall, so the operands hold.

### Sharing the data-memory write port

One write per cycle lands in a tile's memory. Priority is fixed:

1. configuration write;
2. the tile's own result;
3. the neighbour's write arriving over the link.

A configuration write always succeeds. A losing tile or neighbour stalls
and retries.

## Reconfiguration port

`host_cfg` = {valid, target, addr[8:0], data[71:0]}, and `host_tile`
selects the tile. `cfg_router` registers the write and delivers it to that
tile one cycle later. It accepts one write per cycle. The original system
loads configuration at about 180 MB/s, one 48-bit word per 33.3 ns, so a
real source would be about 13 times slower than this port.

| target     | effect |
|------------|--------|
| `CFG_IMEM` | write instruction word `addr` |
| `CFG_DMEM` | write data word `addr` (constants, twiddle factors, copy-loop variables) |
| `CFG_LINK` | `data[1:0] = in_dir`, `data[3:2] = out_dir` |
| `CFG_CTRL` | `data[0] = 1`: start at `pc = addr` (empties the pipeline); `data[0] = 0`: stop |

An epoch change on one tile is: wait for `halted`, then `CFG_LINK`, then
`CFG_CTRL` start at the next epoch's entry point. Other tiles are not
disturbed.

After reset all tiles are halted, with links `in_dir = W` and
`out_dir = E` (a west-to-east chain) and base registers at 0. Memory
contents are not reset, so load every word a program reads.

## Where this departs from, or adds to, the source architecture

Taken from the architecture description:

- 48-bit word;
- 512 x 72 instruction memory;
- 512-word data memory with two reads and one write, built as two block RAMs;
- writes to the own memory or the neighbour's memory;
- one link per tile in one of four directions, changed at run time;
- register-indirect addressing through base registers, and loops;
- one instruction per 400 MHz cycle;
- a DSP-slice execute unit;
- 8 tiles per column and up to 10 columns.

This design's own choices, because the description does not give them:

- the instruction encoding and operation set;
- the pipeline, the branch cost and the stall-on-no-grant rule;
- the write-port priority;
- the separate in/out link registers and the two-ended link agreement;
- flag polling for synchronisation;
- the edge ports;
- the configuration bus format;
- synchronous active-high reset.

Not modelled:

- the soft-processor runtime manager, the system bus, the configuration
  access port, flash storage, UART, DRAM, clock generation, and the
  bus-side register wrapper;
- the configuration rate, which a real source would impose on the port;
- the full application programs of the original study: the 1024-point
  FFT tile code and the JPEG encoder processes. Reduced versions of both
  are in the testbenches (below). The capacity check for the full programs
  is arithmetic only: a 1024-point FFT with 128-point partitions needs
  3 x 128 + 41 = 425 of 512 data words per tile and at most 80 tiles; the
  JPEG processes need at most 180 instructions and about 90 data words
  each.

## Files

- `rtl/remorph_pkg.sv`: widths, the instruction struct, link and
  configuration types.
- `rtl/remorph_array.sv`: the top, which wires tiles and edges.
- `rtl/cgrm_tile.sv` and its parts, in the modules named above.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/remorph_asm_pkg.sv`: helper functions that build instructions for
  test programs.

`tb/tb_remorph_array.sv` runs the full 8 x 10 array at its default size,
in three epochs on column 0:

1. each row takes an 8-word block from the west and scales it;
2. row pairs exchange half their blocks over vertical links;
3. the links are re-pointed east, and the block passes through nine
   further scaling stages to the east output.

The test also does the following, and checks that each event happens at
least once:

- rewrites coefficients of columns 5-9 while the array runs;
- sets column 1's input links late, so that column 0 stalls waiting for
  the link;
- throttles the east output, so the last column stalls.

`tb/tb_fft16_workload.sv` runs a 16-point radix-2 FFT (decimation in
frequency, Q14 twiddles) on two tiles, with 8 points per tile. Points 8
apart live in different tiles, so the tiles swap half their points over
vertical links, compute the first stage, and swap half again. After that,
each tile finishes one 8-point sub-transform on its own.

Twiddle factors for the next stage come from two sources:

- tile 0 derives them by squaring the ones it has (w_2k = w_k^2);
- tile 1 cannot: its squares are the wrong powers. The manager reloads its
  twiddles while it runs.

The result is checked exactly against a fixed-point model of the same
algorithm, and against a floating-point DFT within a small tolerance.

`tb/tb_jpeg_dct_relink.sv` runs the front of a JPEG encoder on three tiles
in one column:

- the middle tile does the level shift (x - 128) on blocks from the west
  input;
- the heaviest process, an 8-point DCT followed by quantisation, runs as
  two instances, one north and one south of the middle tile;
- for each block the manager re-points the middle tile's output link to
  whichever instance is free.

The test checks that both instances are busy at the same time, and checks
the coefficients exactly against an integer model and approximately against
a floating-point DCT.

`tb/tb_cgrm_tile.sv` checks a looped program on one tile against an
instruction-level interpreter, including cycle counts, link re-pointing,
back-pressure and competing writes.

## Simulating

With Verilator 5, packages come first:

```
verilator --binary --timing -Wall -Wno-fatal --top-module tb_remorph_array \
  rtl/remorph_pkg.sv tb/remorph_asm_pkg.sv \
  $(ls rtl/*.sv | grep -v remorph_pkg) tb/tb_remorph_array.sv
./obj_dir/Vtb_remorph_array
```

Replace `tb_remorph_array` with any other testbench name. The full array
testbench builds in about 10 s and runs in well under a second.
`remorph_array` takes `ROWS` and `COLS` parameters for smaller arrays.
