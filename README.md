# Propagated instruction processor

A processor array for image processing in which no wire inside the array is longer than the distance
between two neighbouring processing elements (PEs). That includes the control wires. In a
conventional SIMD array, one sequencer broadcasts each instruction to every PE in the same clock.
When long wires are slow or impossible, that broadcast costs one clock per PE of array width. Here
the broadcast is replaced by a wave:

* the program is a stream of *nano-instructions*, one per clock, fed in at the west edge of every row;
* each PE registers the instruction, executes it, and hands it to its east neighbour one clock later;
* so instructions sweep across the stored image column by column, in bands that follow each other
  one clock apart. A program of P nano-instructions finishes over the whole array after P + COLS
  clocks, not P × COLS.

All PEs in one column execute the same instruction in the same clock. Each east or west neighbour is
exactly one instruction ahead or behind. Most of what is subtle in this design follows from that
offset.

## Structure

```
pip_top
 ├─ instruction_pipeline   FIFO that issues one nano-instruction per clock (NOP bubble when empty)
 └─ pip_array              ROWS x COLS mesh
     └─ pip_pe             one element
         ├─ control_line_buffer    registers the control word, passes it east
         ├─ local_control_buffer   holds the memory address, drives the local lines
         ├─ local_memory           8 kbit x 1 data memory
         ├─ input_gating           selects/ANDs neighbour outputs, latches the result
         ├─ bit_registers          four 1-bit registers R1..R4
         └─ bit_processor          16-function 1-bit ALU, carry flip-flop, result register Q
```

`pip_pkg` holds the control-word struct `ctrl_t` and the function-code enum `func_e`.

## The nano-instruction (`ctrl_t`, 28 bits)

| field  | bits | effect in the executing PE (all take effect on the clock edge ending the cycle) |
|--------|------|------------------------------------------------------------------------------|
| `addr` | 13   | memory address A0-A12 (8192 one-bit words) |
| `as`   | 1    | load `addr` into the address register; later instructions use it |
| `st`   | 1    | `mem[address register] <= Q` |
| `f`    | 4    | processor function (below); `Q <= result` |
| `l`    | 4    | L1: R1 <= memory bit · L2: R2 <= gating latch · L3: R3 <= this cycle's result · L4: R4 <= north neighbour's R4 (`dsel`=0) or this cycle's result (`dsel`=1) |
| `n`    | 4    | N1-N4 enable the north, east, south and west neighbours. If any is set, gating latch <= AND of the enabled neighbours' Q |
| `dsel` | 1    | source of R4 |

The architecture fixes the labelled lines A0-A12, ST, F1-F4, L1-L4 and N1-N4. The address strobe
`as`, the `dsel` line and all encodings are choices made in this RTL. The architecture's own count
is 35 control lines per element. This word carries 28 of them. The other lines are not identified,
so they are not built.

Function codes (`a` = R1, `b` = R2, `c` = R3, `d` = R4, `cy` = carry):
`NOP` (Q and carry hold), `PASS_A`, `ANDN` (a & ~b), `PASS_B`, `NOT_A`, `AND`, `OR`, `XOR`,
`ADD` (Q = a^c^cy, cy = carry out), `CLRC`, `SETC`, `PASS_C`, `PASS_D`, `ZERO`, `ONE`, `SUB`
(a + ~c + cy; set the carry first).

## Timing rules inside a PE, and why

Three rules make a neighbourhood operation work while the neighbours sit one instruction apart:

1. **Load-through for R1 and R2.** In a cycle where L1 (L2) loads R1 (R2), the processor already
   sees the new value. A load and a function can then share one nano-instruction.
2. **Registered result.** The processor result lives in `Q`. `Q` is the PE's mesh output and the data
   a store writes. With `NOP`, `Q` holds.
3. **Held address.** An address set by `as` is used from the next instruction on. A store in the
   same instruction still uses the old address.

The binary edge operation shows the effect. A pixel is an edge if it is set and not all four
neighbours are set. The operation is six nano-instructions, issued in consecutive clocks:

| k | nano-instruction | word fields |
|---|------------------|-------------|
| 0 | A1        | `as`, addr = image |
| 1 | L1:F1     | `l`=L1, `f`=PASS_A → Q = pixel (load-through) |
| 2 | F1        | `f`=PASS_A |
| 3 | N:F1      | `n`=1111, `f`=PASS_A → gating latch = AND of the four neighbours' Q |
| 4 | L2:A2:F2  | `l`=L2, `as`, addr = result, `f`=ANDN → Q = pixel & ~all-neighbours |
| 5 | ST        | `st` |

At step 3 of column c, column c+1 is at step 2. Its `Q` was written at the end of step 1 and
already holds the pixel. Column c−1 is at step 4. Its `Q` was written at the end of step 3 and still
holds the pixel. North and south neighbours are at step 3 too. So all four neighbours show their
pixel in the one clock in which the gating latch samples them. That is why `F1` is repeated three
times. The rules above are this RTL's reading of how the sequence is meant to work; the
architecture does not state them.

## Data input and output

R4 of each PE is one stage of a shift register that runs down its column. `data_in[c]` feeds the
top PE, and the bottom PE drives `data_out[c]`. Columns are used because all PEs of a column
execute a shift in the same clock. A shift along a row would travel with the instruction wave and
would not shift anything. Column c executes a given shift c clocks after column 0. The external
source must therefore present column c's bits c clocks later, and read them c clocks later.

* Input: shift in with `l`=L4, `dsel`=0, ROWS times. Then `PASS_D` moves R4 into Q, and `st` stores it.
* Output: load the bit into R1 and R4 together (`l`=L1|L4, `dsel`=1, `f`=PASS_A). Then shift
  ROWS times. Before shift j, `data_out[c]` shows row ROWS−1−j.

Edge PEs read the constant `BOUNDARY` (default 0) in place of a missing neighbour.

## Sizes

| parameter | default | described value |
|-----------|---------|-----------------|
| `ROWS` × `COLS` (`pip_top`, `pip_array`) | 64 × 64 | 1000 × 1000 |
| `MEM_BITS` per PE | 8192 | 8 kbit (1 kbyte) |
| address width | 13 | A0-A12 |
| `PIPE_DEPTH` | 16 | not specified |

The array defaults to 64 × 64. Lint and elaboration tools hold the flattened array in memory, at
about 340 KB per PE in Verilator. A 1000 × 1000 array would need hundreds of GB. The RTL itself
takes `ROWS=COLS=1000` unchanged.

At 1000 × 1000 the intended figures are:

| item | clocks |
|------|--------|
| 8-bit image in or out through the column shift registers | 8 × 1000 |
| each nano-instruction | 1 |
| sweep latency | 1000 |

## Departures and open points

* Which source feeds each register, the AND combination in the input gating, the function set and
  the carry flip-flop are this RTL's choices. The architecture names these units and shows their
  connections, but does not define them.
* The processor reads R4 (`PASS_D`) so that input data can reach memory. The element diagram shows
  three register-to-processor paths.
* One clock and one synchronous reset reach every PE. The architecture also asks for the clock to
  travel only neighbour to neighbour; that is not modelled.
* There is no program sequencer that expands macro- or micro-instructions. The architecture gives
  no encoding for them. Programs are nano-instruction streams built by the user (see the testbenches).
* `instruction_pipeline` pops one word every clock, so it never fills unless the source pushes
  faster than one word per clock. `prog_ready` exists for that case.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

```
verilator --binary --timing --assert -Irtl rtl/pip_pkg.sv tb/tb_pip_top.sv -y rtl --top-module tb_pip_top
./obj_dir/Vtb_pip_top
```

| testbench | what it runs |
|-----------|--------------|
| `tb_pip_top` | 6 × 7 array. Random image in through the shift registers, stored, then the edge sequence above, then the result out. Compared with a reference edge map; also checks east-edge latency and that shifts, stores, the neighbour accept and pipeline bubbles all occurred. |
| `tb_pip_top_full` | The same test at the default 64 × 64 size. |
| one `tb_<module>` per unit | Checks that unit against a reference model. `tb_bit_processor` includes 8-bit bit-serial add and subtract. |
