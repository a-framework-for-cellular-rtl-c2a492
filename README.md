# Streaming cellular-automaton accelerator with 29×29 neighbourhoods and Full-HD output

A cellular automaton (CA) updates every cell of a grid from the states of the
cells around it. With a large neighbourhood, such as 29×29 = 841 cells, a CPU
spends almost all of its time re-reading the same neighbours. This design
reads each cell from external DDR memory once per generation and writes it
back once. The 29 grid rows that a neighbourhood spans are kept in on-chip
block RAM. A fully pipelined engine then combines all 841 weighted
neighbours of one cell per clock.

The grid is 1920×1080 cells of 4 or 8 bits. The computation is paced by a
1080p60 video timing, so one new generation is computed and shown on a VGA
monitor every frame: 60 generations per second.

The default configuration is the one the RTL is built for:

| Parameter | Value |
|---|---|
| Grid | 1920×1080, toroidal |
| Cell size | 8 bits |
| Neighbourhood | 29×29 |
| Rule | Hodgepodge Machine (k = 5, g = 105) |
| Weights | 4-bit |
| Memory word | 128-bit bursts, 27-bit word address |

## The data flow in one frame

```
           ui_clk (81.25 MHz)                     eng_clk (200 MHz)
 DDR  ──► graphics_data_loader ──► grid_lines_buffer ──► ca_engine
  ▲          │      (reads)         (N+1 line RAMs      (N×N window,
  │          │                       + 2·(N-1)/2         weights, adder
  │          ▼                       poloidal RAMs)      tree, rule)
  │     graphics_line_buffer                                 │
  │          │   pix_clk (148.5 MHz)                         ▼
  │          ▼                                         writeback_fifo
  │     color_palette ──► VGA                                │
  │                                                          ▼
  └──────────── mem_arbiter ◄──────── write_back ◄───────────┘
```

- `memory_init` receives the initial grid over a serial line and writes it to memory. Alternatively, memory is filled from outside and `start` is raised.
- `fullhd_controller` produces the 2200×1125 video timing.
  - At 75% of every visible line it asks for the next grid row.
  - On the last blanking line it asks for row 0.
- `graphics_data_loader` is the only reader of memory.
  - For each request it reads one row: BL = X·C/128 = 120 bursts.
  - It sends each burst both to the display buffer and to the grid lines buffer.
- `grid_lines_buffer` keeps the rows the engine needs.
  - Once rows r−H..r+H are resident (H = (N−1)/2), it streams row r to the engine.
  - Row r goes out as X+N−1 columns of N cells, one column per engine clock.
- `ca_engine` emits one new cell per clock.
- `writeback_fifo` packs 16 new cells into a burst and carries it to the memory clock.
- `write_back` stores the bursts in the *other* memory segment.
- `mem_arbiter` always serves the loader first. Write-back takes the idle cycles.

Memory holds the grid twice. The most significant address bit selects the
segment. The segment being read holds generation g and the one being written
receives g+1. The two swap at the start of the next frame, once write-back
has finished. A cell is at word address `{segment, row·BL + burst, 3'b000}`:
each 128-bit burst is eight 16-bit memory words.

The budget per screen line (6.73 ns × 2200 = 14.8 µs) is:

| Work | Time |
|---|---|
| Engine, 1948 columns at 200 MHz | 9.7 µs |
| Memory, 120 reads + 120 writes at 81.25 MHz | 3.0 µs |

Every stage therefore keeps up with the beam, with margin.

## The grid lines buffer (the hard part)

The buffer is a ring of N+1 line RAMs.

- Stream line g, counted over all frames, goes into slot g mod (N+1).
- While row r is being processed, its N neighbours r−H..r+H sit in N slots. The spare slot takes the next row arriving from memory.
- Advancing the slot index is the "shift down" of the window. No data move.

The writer runs on the memory clock and the reader on the engine clock. They
exchange their line counters through `mux_sync`. This synchronizer holds a
value in a register, then passes a toggle request to the other clock
domain, where a recirculating multiplexer loads it.

- The reader starts row r once rows up to r+H have been written.
- The writer reports `wr_ready` only when the slot it would overwrite has been drained.
- If a row arrives anyway, the sticky `wr_overrun` flag rises. It is part of the top-level `error` output.

### Columns

For each row the reader produces X+N−1 columns, with x running from −H to X−1+H.

- The first N−1 columns fill the engine's window. The last ones flush it.
- `col_valid` is set only where the centre cell is a real grid cell.
- At the left and right edges the out-of-grid columns are zero for a rectangular grid.
- For a cylinder or a torus they are the cells of the opposite edge.
- Rows above 0 or below Y−1 are zero, except on a torus.

### The torus

On a torus the row above row 0 is row Y−1 of the *same* generation. It
passed through the buffer at the end of the previous frame, long before it
is needed. The buffer therefore has two extra sets of H line RAMs.

- **Bottom poloidal RAMs** keep copies of rows 0..H−1 as they arrive at the start of a frame. They serve rows Y..Y−1+H at its end.
- **Top poloidal RAMs** serve rows −H..−1.
  - They must hold rows Y−H..Y−1 of the generation being read.
  - These rows are exactly what the engine produced at the end of the previous frame.
  - The buffer therefore captures them from the engine's output stream (`cap_cell`/`cap_valid`) and packs them into bursts.

Total storage is 2N lines, which is 891 Kbit at the default size.

On the very first frame after `start` there is no previous output to capture
from. That frame is a **priming** frame.

- The loader marks it with `wr_prime`.
- The reader computes nothing. It copies the last H rows into the top poloidal RAMs.
- The first generation is computed in the second frame.

## The CA engine

`ca_engine` keeps an N×N window of registers. Every clock the window shifts
west by one column and the new column enters at the east edge.

A fixed pipeline follows:

1. Each cell is multiplied by its 4-bit weight. Weights are constants from `ca_pkg::nb_weight`, so most multipliers reduce to wiring.
2. Three pipelined adder trees (`adder_tree`, one register per level) compute:
   - the weighted sum of all cells;
   - the number of cells in the "infected" range (1..max−1);
   - the number of cells in the top state (Hodgepodge), or of excited cells (1, for Greenberg-Hastings).
3. A combinational transition stage produces the new state, which is registered.

The latency from a column entering to its centre cell leaving is
H + 3 + (1 + ⌈log₂N²⌉) clocks: 28 at N = 29. A valid bit travels alongside,
so the latency matters only for the buffer's flush length.

Supported rules (`RULE`):

| Rule | New state |
|---|---|
| `RULE_HODGEPODGE` | Healthy (0): ⌊(infected + ill)/k⌋. Ill (max): 0. Infected: ⌊weighted sum / infected⌋ + g. Results are saturated at max. |
| `RULE_GREENBERG` | Quiescent (0): 1 if more than `GH_THRESH` cells are excited (state 1), else 0. Other states: advance by one modulo 2^C. |
| `RULE_APHYSICS` | 1 if the weighted sum is 20..23 or 59..100, else 0 (binary cells). |

The counts include the centre cell, so the Hodgepodge division never
divides by zero.

Weights (`ca_pkg::nb_weight`):

- Hodgepodge: all 1, or with `WEIGHTED` a fixed pseudo-random value 1..15 for each position.
- Greenberg-Hastings: all 1.
- Artificial Physics: a disc of radius H without its centre.

## Frames, speed and stalls

`graphics_data_loader` decides what each frame does. There are three modes:

- **PROCESS** rows feed both the display and the engine.
- **SKIP** rows only feed the display. With `SPEED` = s > 1, a new generation is computed every s-th frame.
- **PRIME** is the torus start-up frame described above.

Two interlocks protect the data. Both are counted in the outputs.

- `stall_ca`: a row is not written to the grid lines buffer until it reports ready.
- `stall_wb`: the segments do not swap until write-back has finished the previous generation.

At the default clocks neither ever fires. They only matter with a slower
engine clock. If a row request arrives while the previous one is still
stalled, `error` is raised.

## Clock domains and crossings

| Domain | Clock | Contents |
|---|---|---|
| `ui_clk` | 81.25 MHz | Loader, arbiter, write-back, buffer writer, FIFO read side |
| `eng_clk` | 200 MHz | Buffer reader, engine, FIFO write side |
| `pix_clk` | 148.5 MHz | Video timing, display buffer read, palette |

The crossings work as follows:

- **Buffer line counters:** `mux_sync`.
- **FIFO:** Gray-coded pointers.
- **Row requests:** a toggle, with the row-0 flag held stable across it.
- **Display buffer:** a dual-clock RAM with two halves. The loader fills the half for row r+1 while the beam reads row r from the other half.

Each domain has its own synchronous, active-high reset.

## Top-level interface (`ca_system`)

- **Memory:** `app_en`, `app_cmd` (3'b001 read, 3'b000 write), `app_addr`, `app_rdy`, `app_wdf_data`/`app_wdf_wren`/`app_wdf_end`/`app_wdf_rdy`, `app_rd_data`/`app_rd_data_valid`.
  - This is the user interface of a DDR memory controller with 128-bit bursts.
  - Write data are offered in the same cycle as the write command.
- **Initial grid:** two ways to provide generation 0 in segment 0.
  - Hold `start` high on `ui_clk` once something else has filled memory.
  - Send the grid over `uart_rx`: 8 data bits, no parity, one stop bit, 115200 bit/s by default (`UART_CLKS_PER_BIT`).
    - Bytes go in memory order. Each burst is sent as 16 bytes, lowest byte first. Within a byte, the first cell is in the low bits.
    - `memory_init` packs the bytes into bursts and writes them through the arbiter's write port, which is otherwise idle before the first frame.
    - After the last burst it starts the system. `loading` is high while it runs.
    - A byte without a stop bit is dropped and raises `error`.
- **Video:** `vga_hsync`, `vga_vsync` and `vga_rgb` (4 bits per colour). Colour is taken from the top 4 bits of the cell through a 16-colour palette (`PAL_WINDOWS`) or a grey ramp (`PAL_GRADIENT`).
- **Status:** `generations` (finished), `frames`, `stall_ca`, `stall_wb` and `error`.

The clock generators and the DDR controller and memory are not part of this
RTL. The top's ports are where they connect. Reading generations back to a
host is not built either.

## Where this RTL departs from the reference design

- **Rules in logic, not a table.** The rules are computed with comparators and a divider, not a look-up table indexed by the sum. A table over a 22-bit sum is impractical.
- **Row capture for the top poloidal RAMs.** The buffer captures the rows from the engine output itself. In the reference design, write-back tells the buffer which row it is writing.
- **Serial loader clock.** It runs on the memory clock instead of a separate 100 MHz domain. The serial format is this design's choice.
- **Priming frame and stalls.** The priming frame, the frame modes, and the stall interlocks are additions.
- **Display buffer.** It holds two rows instead of one.
- **Buffer latency.** The reference design gives the buffer a latency of N cycles. Here a column takes 3 clocks, plus about 6 clocks of control per row.
- **Engine latency.** It is 28 clocks at N = 29. The reference design's Hodgepodge engine takes 60. This changes only the pipeline fill.
- **Default `SPEED` is 1.** The reference configuration lists a frame divider of 60, but describes 60 generations per second at 60 fps. The default follows the description. `SPEED = 60` gives one generation per second.
- **Assumed values.** Some are not given by the reference design:
  - the Greenberg-Hastings threshold (`GH_THRESH = 6`);
  - the Artificial Physics disc weights;
  - the weighted-Hodgepodge weight values;
  - the video porch widths (standard CEA-861 1080p60);
  - the FIFO depth (64 bursts).
- **Artificial Physics ranges.** The ranges are read as 20..23 and 59..100.
- **Not built:**
  - the anisotropic example rule, whose transition function and weights are not available;
  - the roughly 100 fps mode without video output;
  - reading frames back to the host over the serial line.

## Resource estimate at the defaults

- **Line storage:** 58 lines × 15,360 bits = 891 Kbit. In 36 Kbit block RAMs, 128 bits wide, that is about 116 blocks. Add about 4 blocks for the display buffer and FIFO.
  - This is roughly 90% of a 4,860 Kbit (135-block) mid-size FPGA.
  - The engine itself is 841 small constant multipliers and a 22-bit adder tree.
- **Smaller rules and grids:** change `N`, `C`, `GRID` and `RULE`.
  - Artificial Physics at N = 21, C = 4: 22 line RAMs (rectangular) or 42 (torus) of 7,680 bits.
  - Greenberg-Hastings at N = 29, C = 4, cylinder: 30 line RAMs.

## Simulating

The testbenches are self-checking. Each prints
`TB_RESULT checks=… failures=…` and ends with `$finish`. `tb/tb_ca_ref_pkg.sv`
is an independent behavioural model of the rules. `tb/ddr_model.sv` models
the memory controller's user interface, with random `app_rdy`/`app_wdf_rdy`
back-pressure and read latency. Example with Verilator 5:

```
verilator --binary --timing -j 8 -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/ca_pkg.sv tb/tb_ca_ref_pkg.sv tb/tb_ca_system.sv \
  --top-module tb_ca_system -o sim && ./obj_dir/sim
```

| Testbench | What it shows |
|---|---|
| `tb_ca_engine` | Three engines against the reference rules, cell by cell, including the latency |
| `tb_grid_lines_buffer` | Torus, cylinder and rectangle. Every column against a model of the padded or wrapped grid, under random writer pacing and forced stalls |
| `tb_writeback_fifo`, `tb_write_back`, `tb_mem_arbiter` | Packing order, addresses, segment flip, priority and one-grant rule |
| `tb_fullhd_controller`, `tb_graphics_line_buffer`, `tb_color_palette` | Video timing, request points, pixel order and colours |
| `tb_memory_init` | Serial bytes with random gaps and one framing error. Checks burst addresses and data, and the single `done` |
| `tb_graphics_data_loader` | Addresses, segment swaps, frame modes and stalls |
| `tb_ca_system` | 32×16 grids, several generations each. Every generation in memory is compared with the reference |
| `tb_ca_system_full` | The default 1920×1080 torus Hodgepodge system with no parameter changes |

`tb_ca_system` runs three configurations:

- torus, weighted Hodgepodge, N = 5, C = 8;
- cylinder, Greenberg-Hastings, C = 4, `SPEED` = 2, with a deliberately slow engine clock so the stalls occur, and the grid sent over the serial line;
- rectangle, Artificial Physics, N = 11, C = 4.

It also counts memory conflicts, back-pressure, segment swaps, priming, poloidal reads, serial-load bursts and stalls. It fails if any of these never happened.

`tb_ca_system_full` runs a priming frame and one computed frame. All
2,073,600 cells of generation 1 are checked against the reference. It takes
about 4 minutes to run (49 ms of simulated time).
