# WPPA — a weakly programmable processor array

A coarse-grained reconfigurable array built from small VLIW processors. Each
processing element (a *WPPE*, weakly programmable processing element) has a
tiny program memory and a simple instruction set. An *interconnect wrapper*
surrounds each WPPE. The wrapper's switch is generated from a compile-time
*adjacency matrix*, and its multiplexer selects are registers that can be
rewritten while the array runs. A global controller loads programs and
switch settings over a shared 32-bit configuration bus. A row/column
*multicast* scheme decides which WPPEs a transfer reaches: one WPPE, a
rectangle of them, or the whole array. So one part of the array can be
reprogrammed while another part keeps computing.

The RTL is the case-study configuration:

- a 4 × 4 array;
- per WPPE: two 16-bit adders, 8 general purpose registers, 6 input FIFOs,
  2 output ports, and a 4-word × 79-bit VLIW program memory;
- 2 branch flags;
- a 32-bit configuration bus;
- the mesh adjacency matrix `A_cs` in every wrapper.

The published parameter tables fix these numbers. The instruction layout,
the configuration word formats, the bus commands and the link timing are
this implementation's own. They are marked as such below.

## Array organisation

```
            north_in/out[c][0..1]
        +--------+--------+--------+--------+
west    | (0,0)  | (0,1)  | (0,2)  | (0,3)  |   east
in/out  +--------+--------+--------+--------+   in/out
[r][0..1]| (1,0) |  ...                      |   [r][0..1]
        +--------+--------+--------+--------+
        | (3,0)  | (3,1)  | (3,2)  | (3,3)  |
        +--------+--------+--------+--------+
            south_in/out[c][0..1]
```

`wppa_top` builds one tile per grid position. A tile is an `icn_wrapper`, a
`wppe` and a `cfg_loader`. Row `r = 0` is north and column `c = 0` is west.
Every tile side has two fixed links to its neighbour. Wrapper output N(k)
drives the S(k) input of the tile above, E(k) drives the W(k) input of the
tile to the east, and so on. These fixed links are the *static* level of the
interconnect. The wrapper select registers decide which links carry what;
they are the *dynamic* level. The links at the grid edge are top-level
ports.

A link is `wppa_pkg::link_t`: 16 data bits and a `valid` bit. `valid` is
high for the one cycle in which a word is sent. Links have no back-pressure.
The receiving WPPE buffers words in its input FIFOs and raises a sticky
`pe_overflow` if a FIFO was full.

## The interconnect wrapper and its adjacency matrix

This is the central idea of the architecture. For the default matrix:

- The rows are the wrapper inputs N0 N1 E0 E1 S0 S1 W0 W1, followed by the
  WPPE outputs P0 P1.
- The columns are the wrapper outputs N0 … W1, followed by the WPPE inputs
  P0 P1.
- `ADJ[i][j] = 1` means input `i` may drive output `j`.

At elaboration, `icn_wrapper` counts the drivers `t_j` of each column and
builds one structure per column:

| drivers `t_j` | hardware for column `j`                                  |
|---------------|----------------------------------------------------------|
| 0             | output tied to zero                                      |
| 1             | a wire                                                   |
| ≥ 2           | `t_j`:1 multiplexer plus a `ceil(log2 t_j)`-bit register |

Select value `k` picks the `k`-th allowed driver, counting rows from the top
of the matrix. Values `≥ t_j` output zeros. Registers reset to 0. Each
register has the minimal width, so the wrapper's register cost is
`C_ff(Σ s_j)`.

The default matrix `A_cs` (in `wppa_pkg`) gives each wrapper these columns:

| column (output)    | allowed drivers, in select order | select bits |
|--------------------|----------------------------------|-------------|
| N0 / N1            | S0 / S1 (pass-through), P0 / P1  | 1 each      |
| E, S, W outputs    | P0 / P1 only (wires)             | 0           |
| WPPE input P0 / P1 | N, E, S, W input 0 / 1           | 2 each      |

So every WPPE output is broadcast on all four sides. Each WPPE input picks
one of the four neighbours. The north outputs can instead pass a word
arriving from the south straight through, without the WPPE, so a column can
form a combinational vertical bus. After reset every N select is 0: south
inputs run through the whole column to the north edge.

The tool-independent cost model agrees with this structure:

- Select widths are `s = (1,1,0,0,0,0,0,0,2,2)`, 6 register bits per
  wrapper.
- With inverter-normalised costs (flip-flop `8n`, 2:1 mux `3n`), and a 4:1
  mux counted as three 2:1 muxes, registers cost 48 and multiplexers 384.
  That is an 11 % / 89 % split.
- The 16 wrappers hold 32 16-bit 4:1 multiplexers in all.

Other topologies (hypercube, fat-tree-like) need other matrices. Pass them
per tile through `wppa_top`'s `ADJ_MTX[r][c]`. `A_cs` cannot route
long-distance horizontal links because it has no east/west pass-through.

## Configuration: multicast, bus protocol and timing

The external control unit (a host processor, outside this RTL) uses these
ports:

1. It fills the global configuration memory through `mem_we/mem_waddr/mem_wdata`.
   The memory has 256 words of 32 bits.
2. It writes the two mask registers with `mask_we`, `mask_h` (one bit per row)
   and `mask_v` (one bit per column). The pair of masks is the *multicast
   signature*.
3. It pulses `cfg_start` with `cfg_start_addr`. `cfg_busy` is high during the
   transfer and `cfg_done` is high in its last cycle.

A tile takes part in a transfer only when both its row bit and its column
bit are set. Bit 0 of `mask_h` is the **bottom** row (`r = N-1`). Bit 0 of
`mask_v` is the **rightmost** column (`c = M-1`). The masks can change only
while the controller is idle.

Configuration words in memory (this implementation's format):

| word          | bits                                                            |
|---------------|-----------------------------------------------------------------|
| program header| `[31:30]=01`, `[15:8]` = K VLIW words, `[7:0]` = first address  |
| program data  | 3 words per VLIW word, least significant 32 bits first          |
| icn write     | `[31:30]=10`, `[29]` = last, `[28:24]` = column j, `[7:0]` = select value |

A program transfer takes **5 + 3K + 1 cycles**, counted from the cycle in
which `cfg_start` is high:

| cycle(s)    | bus command | what happens                                        |
|-------------|-------------|-----------------------------------------------------|
| 1           | —           | read the header                                     |
| 2           | —           | decode the header                                   |
| 3           | `SELECT`    | loaders latch the signature                         |
| 4           | `BEGIN`     | first VLIW address; selected WPPEs are held at pc 0 |
| 5           | —           | read the first data word                            |
| 6 … 5+3K    | `DATA`      | one word per cycle, the next one read meanwhile     |
| 6+3K        | `END`       | end of the transfer                                 |

For K = 4 this is 18 cycles, or 0.18 µs at 100 MHz. Sending a different
program to each of the 16 WPPEs takes 16 × 18 = 288 cycles.

An interconnect transfer is a run of icn words with no header. It takes
**1 + W cycles** for W writes: one read, then one write per cycle. Twelve
select writes take 13 cycles. Each tile's `cfg_loader` turns an icn word
into a write of select register `j` of its wrapper, taking the live mask
bits. So programs and switch settings load separately: changing the
topology does not resend programs.

A WPPE is held (`pe_hold`) while its program is written. When `END` arrives
it restarts at address 0. WPPEs outside the signature keep running.

## Inside a WPPE

```
 in_link[0..5] -> input FIFOs (regI) --+
                                       +-> operand muxes -> adder 0, adder 1 -> regGP / regO -> out_link[0..1]
 regGP r0..r7, regO o0 o1 -------------+                          |
                                                            flag register
 imem[pc] -> decoder -> BUnit (multiway branch) <-----------------+
```

The WPPE executes one 79-bit VLIW word per cycle and has no pipeline:

1. The word at `pc` is read from the asynchronous program memory.
2. Operands come from the register file or from the FIFO heads.
3. Both adders compute.
4. At the clock edge, results, status flags and the new `pc` are written,
   and the FIFOs the word read are popped.

If the word reads an **empty** FIFO, the WPPE stalls: nothing is written,
nothing is popped, `pc` holds and `pe_stall` is high.

Register addresses (4 bits):

| address | register                                   |
|---------|--------------------------------------------|
| 0–7     | general purpose r0–r7                      |
| 8–13    | input FIFOs i0–i5 (a read pops)            |
| 14–15   | output registers o0–o1 (a write sends)     |

Writing o0 or o1 drives the output link with `valid` for one cycle. In the
array, the adjacency matrix gives each WPPE only two input ports. FIFOs 0
and 1 are fed from the wrapper; FIFOs 2–5 exist but receive nothing.

VLIW word layout (MSB first; `wppa_pkg::vliw_t`):

| bits    | field       | meaning                                                  |
|---------|-------------|----------------------------------------------------------|
| 78      | `br.en`     | multiway branch; 0 = go to pc+1, wrap after word 3       |
| 77:72   | `br.fsel[1:0]` | source of each branch flag (3 bits each)              |
| 71:40   | `br.tgt[3:0]`  | four 8-bit targets, indexed by `{flag1, flag0}`       |
| 39:20   | `add[1]`    | op(3) dst(4) srca(4) srcb(4) imm(5)                      |
| 19:0    | `add[0]`    | same                                                     |

Adder operations are NOP, ADD, SUB, ADDI and SUBI. Immediates are 5-bit and
sign-extended. Each adder that executes writes its Z, N and C status flags
(C is no-borrow for subtraction) into the flag register. A branch flag can
come from the six registered adder flags or from "input FIFO 0/1 holds
data". A branch word therefore tests two conditions in parallel and picks
one of four targets. It sees flags written by *earlier* words, not by
itself. An unconditional jump is a branch word with four equal targets.

## Parameters

| where            | parameter              | default | meaning                            |
|------------------|------------------------|---------|------------------------------------|
| `wppa_top`       | `N`, `M`               | 4, 4    | rows, columns                      |
| `wppa_top`       | `ADJ_MTX[r][c]`        | `A_cs`  | adjacency matrix per tile          |
| `wppa_top`       | `FIFO_DEPTH`           | 4       | words per input FIFO (own choice)  |
| `wppa_top`       | `MEM_DEPTH`            | 256     | global memory words (own choice)   |
| `wppa_top`       | `UNIFORM_SEL`          | 0       | 1 = equal-width select registers   |
| `wppa_pkg`       | `DATA_W`, `IMM_W`, `RADDR_W`, `NUM_GP`, `NUM_FIFO`, `PC_W`, `VLIW_W`, `NUM_INSTR`, `NUM_FLAGS`, `CFG_W`, `NUM_ADD` | 16, 5, 4, 8, 6, 8, 79, 4, 2, 32, 2 | case-study WPPE |

The package constants also fix the instruction layout. Changing them means
changing `vliw_t` consistently. The layout fills exactly 79 bits with two
adder slots and two branch flags.

## Departures and open points

- **Control register file and data-transfer unit.** The architecture also
  has these. The case-study configuration lists zero transfer units, and
  the document gives neither size nor instructions, so they are not built.
  Branch flags therefore come only from adder status and FIFO state.
- **Other functional units.** Multipliers, shifters, logic units and
  user-defined units are parameters of the architecture, but the case study
  has none, and they are not in this RTL.
- **Uniform select registers.** By default the wrappers use the minimal
  select width for each column. `UNIFORM_SEL = 1` gives every column,
  one-driver and undriven ones included, a register as wide as the widest
  one. A one-driver column then passes its driver only for select 0. This
  mode is tested on a small matrix only, not in the full array.
- **Identical WPPEs.** Each tile has its own adjacency matrix, but all
  WPPEs share one set of static parameters. A heterogeneous array, with
  different functional units or widths per tile, is not supported.
- **Edge I/O blocks.** The edge I/O blocks drawn around the array are
  replaced by plain ports.
- **The 5 setup cycles.** Only their number is given. What each one does, as
  listed above, is this implementation's choice. So are the bus commands and
  word formats.
- **FIFO inputs.** The six FIFOs per WPPE against two WPPE input ports in the
  adjacency matrix is resolved as described above.
- **Stream sizes.** Configuration stream sizes in bytes (as opposed to cycle
  counts) were not reproduced.

## Files and simulation

`rtl/` holds one module or package per file:

- `wppa_pkg` — types and constants
- `wppa_top` — the array
- `icn_wrapper` — the interconnect wrapper
- `wppe`, plus `wppe_fifo`, `wppe_regfile`, `wppe_adder`, `wppe_branch_unit`,
  `wppe_imem`, `wppe_decoder` — the processing element
- `cfg_loader`, `global_cfg_ctrl`, `global_cfg_mem` — configuration

`tb/` has one self-checking testbench per module, `tb_<module>`. The shared
helpers `wppa_tb_pkg` build VLIW words and configuration words. Every
testbench prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.
To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_wppa_top rtl/wppa_pkg.sv tb/wppa_tb_pkg.sv tb/tb_wppa_top.sv
./obj_dir/Vtb_wppa_top
```

Replace `tb_wppa_top` with any other `tb_<module>` to run that testbench.
Verilator warns about ascending bit ranges (`ASCRANGE`). This is intended:
adjacency matrices are declared `[0:9][0:9]` so that a matrix literal reads
in the same row order as it is printed.

`tb_wppa_top` runs the full 4 × 4 array at its default parameters, in a few
seconds. It checks, with cycle counts:

- reset pass-through routing;
- a multicast program load (18 cycles);
- sixteen single-WPPE loads (288 cycles, only the addressed WPPE held);
- a 12-write interconnect transfer (13 cycles);
- a +4 stream through every row;
- reprogramming of the bottom row while the other rows stream without loss,
  with FIFO overflow in the held row, and the new row multiplying by 16;
- a switch of the top row's north outputs from pass-through to WPPE output.

It counts each of these mechanisms, and each must happen at least once.
